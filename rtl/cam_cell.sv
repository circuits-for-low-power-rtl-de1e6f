// cam_cell: one bit of a content addressable memory entry.
//
// Function: holds one stored bit and reports whether it equals the bit on the
// DATA line. When `load` is high at a rising clock edge the cell takes `data`;
// otherwise it keeps its value. `match_bit` is combinational: it is high when
// the stored bit equals `data` in the same cycle.
//
// The original cell is a pair of cross-coupled inverters written through an
// NMOS pass gate from DATA-bar, with a single PMOS in the feedback path cut by
// the same LOAD signal, and two compare transistors gated by DATA and DATA-bar.
// Here the storage is a flip-flop with a load enable and the compare is an
// XNOR; the single-clock, edge-triggered write is this design's choice in
// place of the two-phase (evaluate, then write) clocking of the circuit.
// The cell has no reset, like the storage node it models: the entry that
// holds it keeps a valid bit instead.
module cam_cell (
  input  logic clk,
  input  logic load,       // write strobe for this entry
  input  logic data,       // bit of the word being looked up or written
  output logic q,          // stored bit
  output logic match_bit   // stored bit equals data
);
  always_ff @(posedge clk) begin
    if (load) q <= data;
  end

  assign match_bit = ~(q ^ data);
endmodule
