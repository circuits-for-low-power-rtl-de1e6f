// cam_match: word-match logic of one CAM entry.
//
// Function: `match` is high when every per-bit match input is high.
//
// How it works: the bits are split into series stacks of STACK_W bits (two
// stacks of sixteen for a 32-bit word). A stack conducts only when all of its
// bits match, and then discharges its precharged node; the nodes of the stacks
// are NORed, so the entry reports a match only when every stack discharged.
// Each `stack_node` below is the logic value of one such node after
// evaluation: high means "still charged, some bit in this stack differs".
// Because the node discharges only on a full match, the common no-match case
// leaves the nodes charged, which is the point of the series arrangement.
// Precharge devices and bleeders have no logic function and are not modelled.
// Purely combinational.
module cam_match #(
  parameter int unsigned DATA_W  = tc_pkg::DATA_W,
  parameter int unsigned STACK_W = tc_pkg::STACK_W
) (
  input  logic [DATA_W-1:0] bit_match,  // per-bit compare results
  output logic              match       // all bits match
);
  localparam int unsigned STACKS = (DATA_W + STACK_W - 1) / STACK_W;

  // Bits beyond DATA_W in the last stack are tied to "match".
  logic [STACKS*STACK_W-1:0] padded;
  logic [STACKS-1:0]         stack_node;

  always_comb begin
    padded = '1;
    padded[DATA_W-1:0] = bit_match;
  end

  for (genvar s = 0; s < STACKS; s++) begin : g_stack
    // Series pull-down: the node stays charged unless all STACK_W bits match.
    assign stack_node[s] = ~(&padded[s*STACK_W +: STACK_W]);
  end

  // NOR of the stack nodes.
  assign match = ~(|stack_node);
endmodule
