// cam_cache: the eight-entry content addressable cache of the transmitter.
//
// Function: compares `data` against all entries at once. `match` is the OR of
// the entry match lines and `index` is the binary number of the entry that
// hit. When `load` is high the word is written into the entry selected by the
// round-robin write_pointer, which then moves on, so the cache always holds
// the most recent distinct words and replaces the oldest one.
//
// A word is written only on a miss (the control block lowers `load` on a hit),
// so a value lives in at most one entry; the index is therefore formed by
// ORing, for each index bit, the match lines of the entries whose number has
// that bit set, and an assertion checks that at most one entry hits.
// Timing: `match`, `hit` and `index` are combinational in `data` and the
// stored words (the match-evaluation part of the cycle); the write happens at
// the rising edge (the write part of the cycle).
module cam_cache #(
  parameter int unsigned DATA_W  = tc_pkg::DATA_W,
  parameter int unsigned ENTRIES = tc_pkg::ENTRIES,
  parameter int unsigned STACK_W = tc_pkg::STACK_W,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DATA_W-1:0]  data,   // word looked up this cycle
  input  logic               load,   // write `data` at the pointer
  output logic               match,  // some entry holds `data`
  output logic [IDX_W-1:0]   index,  // number of that entry
  output logic [ENTRIES-1:0] hit     // per-entry match lines
);
  logic [ENTRIES-1:0] wr_en;
  logic [ENTRIES-1:0] ptr_unused;

  write_pointer #(.ENTRIES(ENTRIES)) u_ptr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .ptr   (ptr_unused),
    .wr_en (wr_en)
  );

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    logic [DATA_W-1:0] q_unused;
    logic              valid_unused;
    cam_entry #(.DATA_W(DATA_W), .STACK_W(STACK_W)) u_entry (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (wr_en[e]),
      .data  (data),
      .q     (q_unused),
      .valid (valid_unused),
      .match (hit[e])
    );
  end

  assign match = |hit;

  always_comb begin
    index = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (hit[e]) index = index | IDX_W'(e);
    end
  end

  a_single_hit : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit))
    else $error("more than one cache entry matches");
endmodule
