// tb_transmitter: self-checking test of the encoding end.
// Each cycle the bus value and match wire are compared with the reference
// model: on a hit the bus must carry the entry number in its low bits with
// all other bits zero, on a miss the word itself. Also checks that the first
// words after reset are sent in full and that the result appears in the same
// cycle as the input (zero-cycle latency, one word per clock).
module tb_transmitter;
  import tc_ref_pkg::*;
  localparam int W = 32, N = 8;
  logic         clk;
  logic         rst_n, match;
  logic [W-1:0] data, bus;
  int           checks = 0, failures = 0, hits = 0, misses = 0;
  logic [W-1:0] pool [11];
  cache_model   m;

  transmitter dut (.clk(clk), .rst_n(rst_n), .data(data), .bus(bus), .match(match));

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
    int unsigned idx;
    bit          h;
    logic [W-1:0] exp_bus;
    m = new(N);
    foreach (pool[i]) pool[i] = $urandom() | 32'h100;  // never a pure index pattern
    rst_n = 1'b0; data = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1000) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        m.clear();
      end
      data = ($urandom_range(0, 7) == 0) ? $urandom() : pool[$urandom_range(0, 10)];
      h = m.step(data, idx);
      exp_bus = h ? W'(idx) : data;
      #1;
      checks++;
      if (match !== h || bus !== exp_bus) begin
        failures++;
        $display("cycle %0d data=%h bus=%h match=%b; expected bus=%h match=%b", i, data, bus, match, exp_bus, h);
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
