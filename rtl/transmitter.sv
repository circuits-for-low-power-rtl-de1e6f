// transmitter: encoding end of the cache-based bus transcoder.
//
// Function: each cycle the word on `data` is looked up in the cam_cache. On a
// hit, `match` is raised and the bus carries the entry number of the word,
// zero-extended to the bus width (a word of at most IDX_W ones); the cache is
// not written. On a miss, `match` is low, the bus carries the word itself and
// the word is written into the cache entry at the round-robin pointer.
// The multiplexer follows the published block diagram: input 0 is the data
// word, input 1 the entry index, selected by match. Placing the index in the
// low bits of the bus with the upper bits at zero is this design's choice.
// Timing: one word per clock. `bus` and `match` are combinational in `data`
// within the cycle; the cache write happens at the rising edge ending it.
module transmitter #(
  parameter int unsigned DATA_W  = tc_pkg::DATA_W,
  parameter int unsigned ENTRIES = tc_pkg::ENTRIES,
  parameter int unsigned STACK_W = tc_pkg::STACK_W,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data,   // word to send
  output logic [DATA_W-1:0] bus,    // value driven onto the long bus
  output logic              match   // match wire: bus holds an entry index
);
  logic               load;
  logic [IDX_W-1:0]   index;
  logic [ENTRIES-1:0] hit_unused;

  cam_cache #(.DATA_W(DATA_W), .ENTRIES(ENTRIES), .STACK_W(STACK_W)) u_cache (
    .clk   (clk),
    .rst_n (rst_n),
    .data  (data),
    .load  (load),
    .match (match),
    .index (index),
    .hit   (hit_unused)
  );

  tc_control u_ctrl (
    .rst_n (rst_n),
    .match (match),
    .load  (load)
  );

  assign bus = match ? DATA_W'(index) : data;
endmodule
