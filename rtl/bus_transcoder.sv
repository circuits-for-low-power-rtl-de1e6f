// bus_transcoder: cache-based low-power encoder/decoder pair for a long bus.
//
// Function: `data_in` enters the transmitter at one end of a DATA_W-bit bus
// and reappears on `data_out` at the receiver at the other end. Between them
// run the DATA_W bus wires and one match wire. Words that repeat one of the
// ENTRIES most recent distinct words cross the bus as a low-weight entry
// number instead of the full word, which cuts the number of transitions on the
// long wires. `bus` and `bus_match` expose the wires so that their switching
// activity can be observed.
// Timing: one word per clock; `data_out` equals `data_in` in the same cycle
// (both ends are combinational between clock edges, and both caches update at
// the rising edge). Reset is synchronous and active low and empties both
// caches; the first word after reset is always sent in full.
module bus_transcoder #(
  parameter int unsigned DATA_W  = tc_pkg::DATA_W,
  parameter int unsigned ENTRIES = tc_pkg::ENTRIES,
  parameter int unsigned STACK_W = tc_pkg::STACK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data_in,    // word to transfer
  output logic [DATA_W-1:0] data_out,   // word delivered at the far end
  output logic [DATA_W-1:0] bus,        // long bus wires
  output logic              bus_match   // match wire
);
  transmitter #(.DATA_W(DATA_W), .ENTRIES(ENTRIES), .STACK_W(STACK_W)) u_tx (
    .clk   (clk),
    .rst_n (rst_n),
    .data  (data_in),
    .bus   (bus),
    .match (bus_match)
  );

  receiver #(.DATA_W(DATA_W), .ENTRIES(ENTRIES)) u_rx (
    .clk   (clk),
    .rst_n (rst_n),
    .bus   (bus),
    .match (bus_match),
    .data  (data_out)
  );
endmodule
