// write_pointer: round-robin write pointer of the transcoder cache.
//
// Function: a ring of ENTRIES flip-flops holds a single one bit that marks the
// entry to be overwritten by the next write. Each entry's write strobe is its
// pointer bit ANDed with `load`; after every write the one bit moves on to the
// next entry, wrapping from the last back to entry 0, so the cache replaces
// its oldest word (first in, first out).
//
// Reset (synchronous, active low) puts the pointer on entry 0; this reset
// value is this design's choice. Timing: `wr_en` is combinational in `load`;
// the pointer moves at the rising edge of a cycle with `load` high.
module write_pointer #(
  parameter int unsigned ENTRIES = tc_pkg::ENTRIES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,   // a word is written this cycle
  output logic [ENTRIES-1:0] ptr,    // one-hot: entry written next
  output logic [ENTRIES-1:0] wr_en   // per-entry write strobe
);
  always_ff @(posedge clk) begin
    if (!rst_n)    ptr <= ENTRIES'(1);
    else if (load) ptr <= {ptr[ENTRIES-2:0], ptr[ENTRIES-1]};
  end

  assign wr_en = ptr & {ENTRIES{load}};

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot(ptr))
    else $error("write pointer is not one-hot");
endmodule
