// receiver: decoding end of the cache-based bus transcoder.
//
// Function: mirrors the transmitter's cache. When the match wire is high the
// bus carries an entry number, and `data` is the word stored in that entry;
// when it is low the bus carries the word itself, which is passed to `data`
// and written into the entry at the receiver's own round-robin pointer. Since
// both ends write exactly the same words in the same cycles, starting from
// the same reset state, the two caches stay identical and every entry number
// names the same word on both sides.
// The receiver needs no content search, so its storage is a plain register
// array read by index; its write pointer and control are the same blocks as
// in the transmitter. The array has no reset: an entry is read only after the
// transmitter has hit on it, which implies it was written.
// Timing: `data` is combinational in `bus` and `match` within the cycle; the
// cache write happens at the rising edge ending it.
module receiver #(
  parameter int unsigned DATA_W  = tc_pkg::DATA_W,
  parameter int unsigned ENTRIES = tc_pkg::ENTRIES,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] bus,    // value arriving on the long bus
  input  logic              match,  // match wire from the transmitter
  output logic [DATA_W-1:0] data    // recovered word
);
  logic               load;
  logic [ENTRIES-1:0] wr_en;
  logic [ENTRIES-1:0] ptr_unused;
  logic [DATA_W-1:0]  store [ENTRIES];
  logic [IDX_W-1:0]   index;

  tc_control u_ctrl (
    .rst_n (rst_n),
    .match (match),
    .load  (load)
  );

  write_pointer #(.ENTRIES(ENTRIES)) u_ptr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .ptr   (ptr_unused),
    .wr_en (wr_en)
  );

  always_ff @(posedge clk) begin
    for (int e = 0; e < ENTRIES; e++) begin
      if (wr_en[e]) store[e] <= bus;
    end
  end

  assign index = bus[IDX_W-1:0];
  assign data  = match ? store[index] : bus;
endmodule
