// Dual-rail return-to-one DIMS OR gate.
//
// Four C-elements form the minterms of the two dual-rail inputs (see
// dims_minterms). Under return-to-one every wire idles high and a data word
// pulls one rail low, so the minterms that make the result 1 are merged onto
// the output t rail, and those that make it 0 onto the f rail, with AND
// gates: an AND output falls as soon as any of its minterms falls, the dual
// of the OR gates a return-to-zero DIMS gate uses. The gate structure
//   y.t = n11 & n10 & n01
//   y.f = n00
// is the published return-to-one DIMS OR gate: the C-element row and the
// minterm grouping of the classic return-to-zero gate are kept and only its
// OR gates become AND gates, so the cost is unchanged. Describing it as
// untimed RTL with a latch per C-element is this design's own choice.
//
// Interface: a, b and y are dual-rail words (dr_rto_pkg::dr_t).
// Timing (4-phase, untimed): y stays at the spacer until both a and b carry
// data, then shows a | b; it returns to the spacer only after both a and b
// are back at the spacer, and holds its data word in between.
module dims_rto_or
  import dr_rto_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t y
);

  logic n11, n10, n01, n00;

  dims_minterms u_minterms (
    .a  (a),
    .b  (b),
    .n11(n11),
    .n10(n10),
    .n01(n01),
    .n00(n00)
  );

  assign y.t = n11 & n10 & n01;
  assign y.f = n00;

  // Code-word rule: fed with code words (data or spacer), the gate never
  // drives the non-code word t0 f0.
  always_comb begin
    if (a != DR_INVALID && b != DR_INVALID)
      assert final (y != DR_INVALID)
      else $error("non-code word t0 f0 on the output");
  end

endmodule
