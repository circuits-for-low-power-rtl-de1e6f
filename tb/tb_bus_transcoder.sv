// tb_bus_transcoder: end-to-end test of the transmitter/receiver pair.
//
// Runs the complete transcoder at its default size (32-bit bus, eight
// entries) through three traffic phases:
//   1. a 50-word stream with strong reuse, the length of a short trace;
//   2. a long random stream over a pool of 14 words, more than the cache
//      holds, so that entries are replaced and evicted words come back;
//   3. a stream of all-new words (no reuse at all).
// A reset is applied between phases. Every cycle it checks that the far end
// delivers the input word in the same cycle, and that the bus and match wire
// carry what the reference model of the encoder predicts. It counts how often
// each mechanism happened (hit, miss, replacement of a valid entry, return of
// an evicted word, pointer wrap, reset) and fails any that never did. It also
// counts toggles on the bus wires plus the match wire against the toggles the
// raw words would cause, and requires fewer toggles in the reuse phases.
module tb_bus_transcoder;
  import tc_ref_pkg::*;
  localparam int W = 32, N = 8;
  logic         clk;
  logic         rst_n;
  logic [W-1:0] data_in, data_out, bus;
  logic         bus_match;
  int           checks = 0, failures = 0;
  int           n_hit = 0, n_miss = 0, n_replace = 0, n_evicted_return = 0, n_wrap = 0, n_reset = 0;
  cache_model   m;
  logic [W-1:0] prev_raw, prev_bus;
  logic         prev_match;
  int           raw_toggles, enc_toggles;

  bus_transcoder dut (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .data_out(data_out),
    .bus(bus), .bus_match(bus_match)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Words ever written since the last reset, to recognise evicted words.
  bit seen [logic [W-1:0]];

  task automatic do_reset();
    rst_n = 1'b0;
    data_in = '0;
    @(negedge clk);
    rst_n = 1'b1;
    m.clear();
    seen.delete();
    n_reset++;
    prev_raw = '0; prev_bus = '0; prev_match = 1'b0;
    raw_toggles = 0; enc_toggles = 0;
  endtask

  task automatic send(input logic [W-1:0] w);
    int unsigned  idx;
    bit           h;
    logic [W-1:0] exp_bus;
    int unsigned  slot;
    h = m.lookup(w, idx);
    if (!h) begin
      slot = m.next;
      if (m.valid[slot]) n_replace++;
      if (slot == N - 1) n_wrap++;
      if (seen.exists(w)) n_evicted_return++;
      m.write(w);
      seen[w] = 1'b1;
      n_miss++;
    end else begin
      n_hit++;
    end
    exp_bus = h ? W'(idx) : w;
    data_in = w;
    #1;
    checks++;
    if (data_out !== w || bus !== exp_bus || bus_match !== h) begin
      failures++;
      $display("word %h: data_out=%h bus=%h match=%b; expected bus=%h match=%b",
               w, data_out, bus, bus_match, exp_bus, h);
    end
    raw_toggles += $countones(w ^ prev_raw);
    enc_toggles += $countones(bus ^ prev_bus) + (bus_match != prev_match);
    prev_raw = w; prev_bus = bus; prev_match = bus_match;
    @(negedge clk);
  endtask

  task automatic report_phase(input string name, input bit expect_saving);
    $display("%s: raw bus toggles %0d, encoded toggles %0d", name, raw_toggles, enc_toggles);
    if (expect_saving) begin
      checks++;
      if (enc_toggles >= raw_toggles) begin
        failures++;
        $display("%s: encoding did not reduce toggles", name);
      end
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  initial begin
    logic [W-1:0] pool [14];
    m = new(N);
    foreach (pool[i]) pool[i] = $urandom();
    rst_n = 1'b0; data_in = '0;
    @(negedge clk); @(negedge clk);

    // Phase 1: 50 words, six distinct values (fits in the cache).
    do_reset();
    for (int i = 0; i < 50; i++) send(pool[$urandom_range(0, 5)]);
    report_phase("reuse, 50 words", 1'b1);

    // Phase 2: pool larger than the cache: hits, misses, replacement.
    do_reset();
    for (int i = 0; i < 5000; i++) send(pool[$urandom_range(0, 13)]);
    report_phase("pool of 14, 5000 words", 1'b1);

    // Phase 3: no reuse: every word is new and crosses the bus in full.
    do_reset();
    for (int i = 0; i < 500; i++) send({$urandom()} | 32'h8000_0000 | W'(i << 8));
    report_phase("no reuse, 500 words", 1'b0);
    checks++;
    if (enc_toggles != raw_toggles) begin
      failures++;
      $display("without reuse the bus should carry the raw words");
    end

    need("hits", n_hit);
    need("misses", n_miss);
    need("replacements of a valid entry", n_replace);
    need("evicted words sent again", n_evicted_return);
    need("write pointer wraps", n_wrap);
    need("resets", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
