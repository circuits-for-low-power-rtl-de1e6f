// tb_cam_entry: self-checking test of one 32-bit CAM entry.
// Checks that an entry never matches before its first write after reset,
// that it matches exactly the word last written, that it holds its word when
// not loaded, and that reset empties it again.
module tb_cam_entry;
  localparam int W = 32;
  logic         clk;
  logic         rst_n, load, valid, match;
  logic [W-1:0] data, q;
  logic [W-1:0] model;
  bit           model_valid;
  int           checks = 0, failures = 0, hits = 0;

  cam_entry dut (.clk(clk), .rst_n(rst_n), .load(load), .data(data), .q(q), .valid(valid), .match(match));

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
    #1;
    checks++;
    if (valid !== model_valid || match !== (model_valid && data == model) ||
        (model_valid && q !== model)) begin
      failures++;
      $display("data=%h q=%h valid=%b match=%b; model %h valid=%b", data, q, valid, match, model, model_valid);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; data = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1; model_valid = 1'b0;
    // Empty entry: random words, including whatever the cells hold.
    for (int i = 0; i < 10; i++) begin
      data = (i == 0) ? q : $urandom();
      check();
      @(negedge clk);
    end
    for (int i = 0; i < 400; i++) begin
      load = ($urandom_range(0, 7) == 0);
      case ($urandom_range(0, 3))
        0:       data = $urandom();
        1:       data = model ^ (W'(1) << $urandom_range(0, W - 1));
        default: data = model_valid ? model : $urandom();
      endcase
      check();
      if (match) hits++;
      if (load) begin model = data; model_valid = 1'b1; end
      @(negedge clk);
      if (i == 200) begin
        rst_n = 1'b0; load = 1'b0;
        @(negedge clk);
        rst_n = 1'b1; model_valid = 1'b0;
        data = model;
        check();
        @(negedge clk);
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("no hit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
