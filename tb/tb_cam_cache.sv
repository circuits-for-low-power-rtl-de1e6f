// tb_cam_cache: self-checking test of the eight-entry CAM cache.
// Words are drawn mostly from a small pool so that hits, misses and
// replacement of the oldest entry all occur. Each cycle the cache's match,
// index and per-entry hit lines are compared with the reference model; load
// is driven as the control block would (miss only), with occasional
// cycles where the test withholds the write.
module tb_cam_cache;
  import tc_ref_pkg::*;
  localparam int W = 32, N = 8;
  logic         clk;
  logic         rst_n, load, match;
  logic [W-1:0] data;
  logic [2:0]   index;
  logic [N-1:0] hit;
  int           checks = 0, failures = 0, hits = 0, misses = 0;
  logic [W-1:0] pool [12];
  cache_model   m;

  cam_cache dut (.clk(clk), .rst_n(rst_n), .data(data), .load(load), .match(match), .index(index), .hit(hit));

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
    m = new(N);
    foreach (pool[i]) pool[i] = $urandom();
    rst_n = 1'b0; load = 1'b0; data = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      data = ($urandom_range(0, 9) == 0) ? $urandom() : pool[$urandom_range(0, 11)];
      h = m.lookup(data, idx);
      load = !h && ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (match !== h || (h && (index !== 3'(idx) || hit !== N'(1) << idx)) || (!h && hit !== '0)) begin
        failures++;
        $display("cycle %0d data=%h match=%b index=%0d hit=%b; model hit=%b idx=%0d", i, data, match, index, hit, h, idx);
      end
      if (h) hits++; else misses++;
      if (load) m.write(data);
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
