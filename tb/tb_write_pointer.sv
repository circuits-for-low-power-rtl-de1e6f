// tb_write_pointer: self-checking test of the round-robin write pointer.
// After reset the pointer must sit on entry 0; it must advance by one entry
// per cycle with load high, hold otherwise, wrap from the last entry to the
// first, and gate its one-hot value with load to form the write strobes.
module tb_write_pointer;
  localparam int N = 8;
  logic         clk;
  logic         rst_n, load;
  logic [N-1:0] ptr, wr_en;
  int           checks = 0, failures = 0, wraps = 0;
  int           model;

  write_pointer dut (.clk(clk), .rst_n(rst_n), .load(load), .ptr(ptr), .wr_en(wr_en));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (ptr !== N'(1) << model || wr_en !== (load ? N'(1) << model : '0)) begin
      failures++;
      $display("ptr=%b wr_en=%b load=%b expected entry %0d", ptr, wr_en, load, model);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b1;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1; model = 0;
    for (int i = 0; i < 300; i++) begin
      load = (i < 20) ? 1'b1 : 1'($urandom_range(0, 1));
      #1;
      check();
      if (load) begin
        if (model == N - 1) wraps++;
        model = (model + 1) % N;
      end
      @(negedge clk);
      // A reset in the middle of the run.
      if (i == 150) begin
        rst_n = 1'b0; load = 1'b0;
        @(negedge clk);
        rst_n = 1'b1; model = 0;
      end
    end
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("pointer wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
