// cam_entry: one DATA_W-bit entry of the transcoder cache.
//
// Function: stores a word written with `load` and reports, combinationally,
// whether it equals `data`. It is a row of DATA_W cam_cell bit cells whose
// per-bit results feed the cam_match word-match logic.
//
// A valid bit, cleared by the synchronous active-low reset and set by the
// first write, gates `match`, so that an entry that has never been written
// cannot hit. The valid bit is this design's addition: it gives both ends of
// the bus the same well-defined empty cache after reset.
// Timing: `match` and `q` follow the stored word and `data` in the same cycle;
// a write takes effect at the rising edge.
module cam_entry #(
  parameter int unsigned DATA_W  = tc_pkg::DATA_W,
  parameter int unsigned STACK_W = tc_pkg::STACK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,   // write `data` into this entry
  input  logic [DATA_W-1:0] data,   // word looked up / written
  output logic [DATA_W-1:0] q,      // stored word
  output logic              valid,  // entry has been written since reset
  output logic              match   // valid and stored word equals data
);
  logic [DATA_W-1:0] bit_match;
  logic              word_match;

  for (genvar b = 0; b < DATA_W; b++) begin : g_bit
    cam_cell u_cell (
      .clk       (clk),
      .load      (load),
      .data      (data[b]),
      .q         (q[b]),
      .match_bit (bit_match[b])
    );
  end

  cam_match #(.DATA_W(DATA_W), .STACK_W(STACK_W)) u_match (
    .bit_match (bit_match),
    .match     (word_match)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    valid <= 1'b0;
    else if (load) valid <= 1'b1;
  end

  assign match = valid & word_match;
endmodule
