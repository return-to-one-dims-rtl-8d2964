// Return-to-one dual-rail DIMS gate set: OR, XOR and AND side by side.
//
// The three two-input gates share the dual-rail operands a and b and each
// produces its own dual-rail result, which is the arrangement of the gate
// truth table for the return-to-one protocol. Each gate has its own row of
// four minterm C-elements, as drawn, so the three results complete
// independently of one another.
//
// Ports are plain packed dual-rail words (t, f) so the block can be dropped
// into a larger 4-phase datapath; a receiver detects completion from the data
// itself (a result is complete when its t and f rails differ) and answers
// with its acknowledge, after which the sender returns a and b to the spacer
// (both rails high).
//
// Timing (4-phase, untimed): all three results leave the spacer only after
// both operands carry data, and return to the spacer only after both operands
// are back at the spacer.
module dims_rto_gates
  import dr_rto_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t y_or,
  output dr_t y_xor,
  output dr_t y_and
);

  dims_rto_or  u_or  (.a(a), .b(b), .y(y_or));
  dims_rto_xor u_xor (.a(a), .b(b), .y(y_xor));
  dims_rto_and u_and (.a(a), .b(b), .y(y_and));

endmodule
