// tc_control: cache-write control of one end of the bus.
//
// Function: decides, each cycle, whether the current word is written into the
// local cache. A hit (`match` high) must not write, because the word is
// already cached and a second copy would break the one-entry-per-value rule
// and desynchronise the two ends; a miss writes. So `load` is the complement
// of `match`, qualified by reset: nothing is written while `rst_n` is low.
// The same block sits in the transmitter, where `match` comes from the CAM
// lookup, and in the receiver, where it comes from the match wire of the bus.
// Combinational; the write itself happens at the next rising clock edge.
module tc_control (
  input  logic rst_n,  // synchronous active-low reset of the end
  input  logic match,  // current word is a cache hit
  output logic load    // write the current word into the cache
);
  assign load = rst_n & ~match;
endmodule
