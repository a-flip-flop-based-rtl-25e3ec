// nand_arbiter: cross-coupled NAND latch that decides which of two rising
// edges arrived first.
//
// Z0 = NAND(Q^U, Z1) and Z1 = NAND(Q^L, Z0). While both inputs are low (after
// CLEAR) both outputs are high. The first input to rise pulls its own output
// low, and that low output holds the other gate's output high when the second
// input rises later. So Z0 (the response bit) is 0 when the upper path wins
// and 1 when the lower path wins; Z1 is its complement once decided.
//
// Timing: asynchronous, no clock. The outputs are valid once both inputs have
// risen and stay valid until both inputs return low.
//
// The two NAND gates and their cross coupling are as described for the arbiter
// of the last stage. The latch is a deliberate combinational loop: it is the
// arbiter, and tools report it as such.
module nand_arbiter (
  input  logic q_u,
  input  logic q_l,
  output logic z0,
  output logic z1
);
  timeunit 1ps;
  timeprecision 1ps;

  assign z0 = ~(q_u & z1);
  assign z1 = ~(q_l & z0);
endmodule
