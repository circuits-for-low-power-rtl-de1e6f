// tc_pkg: sizes shared by the cache-based bus transcoder.
//
// The transcoder carries 32-bit words over a long on-chip bus. Transmitter and
// receiver each keep the eight most recently sent distinct words; a word found
// in the cache is sent as its 3-bit entry number instead of its 32 bits. The
// 32-bit width, the eight entries and the split of the match logic into two
// series stacks of sixteen bits are the published circuit's numbers.
package tc_pkg;
  // Width of one bus word.
  parameter int unsigned DATA_W  = 32;
  // Number of cache entries on each side of the bus.
  parameter int unsigned ENTRIES = 8;
  // Bits in one series pull-down stack of the match logic.
  parameter int unsigned STACK_W = 16;
endpackage
