// tb_tc_control: self-checking test of the cache-write control.
// Checks the write decision for every combination of reset and match:
// a write happens only out of reset and on a miss.
module tb_tc_control;
  logic rst_n, match, load;
  int   checks = 0, failures = 0;

  tc_control dut (.rst_n(rst_n), .match(match), .load(load));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int m = 0; m < 2; m++) begin
        rst_n = 1'(r);
        match = 1'(m);
        #1;
        checks++;
        if (load !== (r == 1 && m == 0)) begin
          failures++;
          $display("rst_n=%0d match=%0d load=%b", r, m, load);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
