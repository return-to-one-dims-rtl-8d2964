// Minterm layer of a two-input dual-rail DIMS gate.
//
// Delay-Insensitive Minterm Synthesis builds any function of two dual-rail
// bits from all four rail pairings, each joined by a C-element:
//   n11 = C(A.t, B.t)   n10 = C(A.t, B.f)   n01 = C(A.f, B.t)   n00 = C(A.f, B.f)
// Exactly one pairing carries the two active rails of a data word, so exactly
// one minterm switches per data word and switches back only after both
// inputs have returned to the spacer. Under return-to-one the active level is
// low: in the spacer all four outputs are 1, and n<a><b> drops to 0 when
// A carries value a and B carries value b.
//
// The pairings and their names follow the published DIMS gate structure.
// Collecting the row in a module of its own is this design's choice; each
// gate still instantiates its own copy, as in the original gates.
module dims_minterms
  import dr_rto_pkg::*;
(
  input  dr_t  a,
  input  dr_t  b,
  output logic n11,
  output logic n10,
  output logic n01,
  output logic n00
);

  c_element u_c11 (.a(a.t), .b(b.t), .q(n11));
  c_element u_c10 (.a(a.t), .b(b.f), .q(n10));
  c_element u_c01 (.a(a.f), .b(b.t), .q(n01));
  c_element u_c00 (.a(a.f), .b(b.f), .q(n00));

endmodule
