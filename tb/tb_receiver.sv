// tb_receiver: self-checking test of the decoding end.
// The test encodes a word stream with the reference model, drives the
// resulting bus value and match wire into the receiver and checks that the
// receiver returns the original word in the same cycle, for hits (decoded
// from its own cache) and misses (passed through and cached) alike.
module tb_receiver;
  import tc_ref_pkg::*;
  localparam int W = 32, N = 8;
  logic         clk;
  logic         rst_n, match;
  logic [W-1:0] bus, data;
  int           checks = 0, failures = 0, hits = 0, misses = 0;
  logic [W-1:0] pool [11];
  cache_model   m;

  receiver dut (.clk(clk), .rst_n(rst_n), .bus(bus), .match(match), .data(data));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned  idx;
    bit           h;
    logic [W-1:0] word;
    m = new(N);
    foreach (pool[i]) pool[i] = $urandom();
    rst_n = 1'b0; bus = '0; match = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1000) begin
        rst_n = 1'b0; match = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        m.clear();
      end
      word  = ($urandom_range(0, 7) == 0) ? $urandom() : pool[$urandom_range(0, 10)];
      h     = m.step(word, idx);
      match = h;
      bus   = h ? W'(idx) : word;
      #1;
      checks++;
      if (data !== word) begin
        failures++;
        $display("cycle %0d bus=%h match=%b data=%h expected %h", i, bus, match, data, word);
      end
      if (h) hits++; else misses++;
      @(negedge clk);
    end
    checks++;
    if (hits < 100 || misses < 100) begin
      failures++;
      $display("too few hits (%0d) or misses (%0d)", hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
