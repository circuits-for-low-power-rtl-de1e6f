// tb_cam_cell: self-checking test of the CAM bit cell.
// Drives random load/data sequences and checks the stored bit and the
// per-bit compare against a one-bit model, every cycle.
module tb_cam_cell;
  logic clk;
  logic load, data, q, match_bit;
  int   checks = 0, failures = 0;
  logic model;

  cam_cell dut (.clk(clk), .load(load), .data(data), .q(q), .match_bit(match_bit));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // First write establishes a known value.
    @(negedge clk); load = 1'b1; data = 1'b1; model = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      load = 1'($urandom_range(0, 1));
      data = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (q !== model || match_bit !== (model == data)) begin
        failures++;
        $display("cycle %0d: q=%b model=%b data=%b match_bit=%b", i, q, model, data, match_bit);
      end
      if (load) model = data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
