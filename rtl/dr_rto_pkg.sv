// Dual-rail return-to-one (RTO) encoding shared by the DIMS gates.
//
// One bit travels on two wires, t and f. Under the return-to-one 4-phase
// protocol the idle state between two data words (the spacer) is both wires
// high, and a valid value is signalled by pulling exactly one wire low:
//   spacer  : t=1 f=1
//   logic 0 : t=1 f=0
//   logic 1 : t=0 f=1
//   t=0 f=0 : not a code word (never produced by a correct circuit)
// This is the bitwise complement of the classic return-to-zero dual-rail code.
// The meaning of t=0 f=0 is this package's reading by analogy with the
// return-to-zero "invalid" word; the other three words follow the RTO rules.
package dr_rto_pkg;

  typedef struct packed {
    logic t;  // true rail, low when the bit is 1
    logic f;  // false rail, low when the bit is 0
  } dr_t;

  localparam dr_t DR_SPACER  = '{t: 1'b1, f: 1'b1};
  localparam dr_t DR_ZERO    = '{t: 1'b1, f: 1'b0};
  localparam dr_t DR_ONE     = '{t: 1'b0, f: 1'b1};
  localparam dr_t DR_INVALID = '{t: 1'b0, f: 1'b0};

  // Code word for a single-rail bit value.
  function automatic dr_t dr_encode(input logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  // True for the two data words.
  function automatic logic dr_is_valid(input dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_is_spacer(input dr_t d);
    return d.t & d.f;
  endfunction

  // Single-rail value of a data word (the t rail is low for a 1).
  function automatic logic dr_decode(input dr_t d);
    return ~d.t & d.f;
  endfunction

endpackage
