// tb_cache_sweep: the transcoder at cache sizes of 2, 4, 8, 16 and 32 entries.
//
// Feeds one word stream to five bus_transcoder instances that differ only in
// ENTRIES, checks every cycle that each delivers the input word and drives
// the bus value and match wire its reference model predicts, and prints, per
// size, the hit count and the toggles on the bus wires plus match wire
// against the toggles of the raw words. The stream imitates a register bus:
// a working set of values that drifts slowly (one word in ten is a fresh
// random value, the others repeat one of the 40 most recent values, biased
// towards the newest), so that larger caches find more hits. The test
// requires the default 8-entry cache to cut the toggle count and the
// 32-entry cache to hit at least as often as the 2-entry one.
module tb_cache_sweep;
  import tc_ref_pkg::*;
  localparam int W = 32;
  localparam int NS = 5;
  localparam int SIZES [NS] = '{2, 4, 8, 16, 32};
  localparam int LEN = 4000;

  logic         clk;
  logic         rst_n;
  logic [W-1:0] data_in;
  logic [W-1:0] data_out [NS];
  logic [W-1:0] bus      [NS];
  logic         bus_match[NS];
  int           checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_size
    bus_transcoder #(.ENTRIES(SIZES[s])) dut (
      .clk(clk), .rst_n(rst_n), .data_in(data_in), .data_out(data_out[s]),
      .bus(bus[s]), .bus_match(bus_match[s])
    );
  end

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (LEN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cache_model #(W) m [NS];
    logic [W-1:0] recent [40];
    logic [W-1:0] prev_raw, w, exp_bus;
    logic [W-1:0] prev_bus [NS];
    logic         prev_match [NS];
    int           hits [NS], enc [NS];
    int           raw;
    int unsigned  idx;
    bit           h;

    foreach (m[s]) begin
      m[s] = new(SIZES[s]);
      hits[s] = 0; enc[s] = 0; prev_bus[s] = '0; prev_match[s] = 1'b0;
    end
    foreach (recent[i]) recent[i] = $urandom();
    raw = 0; prev_raw = '0;
    rst_n = 1'b0; data_in = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < LEN; t++) begin
      // Pick a recent value, biased towards the most recent ones, or a new one.
      if ($urandom_range(0, 9) == 0) begin
        w = $urandom();
        for (int i = 39; i > 0; i--) recent[i] = recent[i-1];
        recent[0] = w;
      end else begin
        w = recent[$urandom_range(0, $urandom_range(0, $urandom_range(0, 39)))];
      end
      data_in = w;
      #1;
      for (int s = 0; s < NS; s++) begin
        h = m[s].step(w, idx);
        exp_bus = h ? W'(idx) : w;
        checks++;
        if (data_out[s] !== w || bus[s] !== exp_bus || bus_match[s] !== h) begin
          failures++;
          $display("size %0d word %h: data_out=%h bus=%h match=%b; expected bus=%h match=%b",
                   SIZES[s], w, data_out[s], bus[s], bus_match[s], exp_bus, h);
        end
        if (h) hits[s]++;
        enc[s] += $countones(bus[s] ^ prev_bus[s]) + int'(bus_match[s] != prev_match[s]);
        prev_bus[s] = bus[s];
        prev_match[s] = bus_match[s];
      end
      raw += $countones(w ^ prev_raw);
      prev_raw = w;
      @(negedge clk);
    end

    $display("raw toggles over %0d words: %0d", LEN, raw);
    for (int s = 0; s < NS; s++) begin
      $display("%2d entries: hits %0d, encoded toggles %0d (%0d%% of raw)",
               SIZES[s], hits[s], enc[s], 100 * enc[s] / raw);
    end
    // The main configuration (8 entries) must save toggles on this stream.
    checks++;
    if (enc[2] >= raw) begin
      failures++;
      $display("8 entries: no toggle saving");
    end
    checks++;
    if (hits[NS-1] < hits[0]) begin
      failures++;
      $display("32 entries hit less often than 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
