// bcd_pkg: types and constants shared by the reduced delay BCD adder.
//
// A BCD digit is a 4-bit binary number 0..9. The adder works on BCD_DIGITS
// digits at once; the default of 16 digits (64 operand bits) is the size the
// design is presented and evaluated at. The gp_t pair (generate, propagate)
// is the element the parallel prefix carry network combines.
package bcd_pkg;

  localparam int unsigned DIGIT_W    = 4;
  localparam int unsigned BCD_DIGITS = 16;

  typedef logic [DIGIT_W-1:0] bcd_digit_t;

  typedef struct packed {
    logic g;  // the span produces a carry on its own
    logic p;  // the span passes an incoming carry through
  } gp_t;

  // Prefix operator of the carry network: 'hi' is the more significant span.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
