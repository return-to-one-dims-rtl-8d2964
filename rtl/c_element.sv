// Two-input Muller C-element.
//
// The output copies the inputs when they agree and keeps its last value when
// they differ:  A=B=0 -> Q=0,  A=B=1 -> Q=1,  A!=B -> Q holds.  This is the
// event synchroniser every DIMS minterm is built from: it fires only once
// both operands have arrived and releases only once both have left.
//
// The state is described as a level-sensitive latch that is transparent while
// a == b and loads a. That is the exact truth table of the element; it is this
// design's choice of RTL description, standing in for the static transistor
// cells (Martin, Sutherland, van Berkel) the method was characterised with. The latch
// a synthesis tool reports here is intended: a C-element is a state-holding
// gate. There is no reset: as in a plain static C-element, the state becomes
// known the first time both inputs agree, which the 4-phase protocol
// guarantees by starting every channel at the spacer.
//
// Timing: untimed; the output changes in the same delta cycle as the input
// change that makes the inputs agree.
module c_element (
  input  logic a,
  input  logic b,
  output logic q
);

  always_latch begin
    if (a == b) q = a;
  end

endmodule
