// digit_correct: second-level (correction) adder of one BCD digit.
//
// The binary digit sum is corrected by adding 0, 1, 6 or 7:
//   +1 when a decimal carry comes in from the previous digit,
//   +6 when this digit sends a decimal carry out (skip codes 10..15).
// Both are formed by one 4-bit addition with the operand
// {1'b0, carry_out, carry_out, carry_in} = 6*carry_out + carry_in,
// the wiring of the correction adders in the full circuit. The 4-bit result
// is the sum modulo 16, which is the BCD digit; the adder's own carry out is
// not needed (the decimal carry comes from the carry network).
// Purely combinational.
module digit_correct
  import bcd_pkg::*;
(
  input  bcd_digit_t bin_sum,
  input  logic       carry_in,
  input  logic       carry_out,
  output bcd_digit_t result
);

  bcd_digit_t corr;
  logic       unused_co;

  assign corr = {1'b0, carry_out, carry_out, carry_in};

  cla4 u_add (
    .a    (bin_sum),
    .b    (corr),
    .cin  (1'b0),
    .sum  (result),
    .cout (unused_co)
  );

endmodule
