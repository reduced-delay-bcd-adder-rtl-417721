// adder_analyzer: first-level adder of one BCD digit plus its carry analyzer.
//
// The two BCD digits a1, a2 are added by a 4-bit CLA with no carry in, so
// every digit position works independently of all others. The 5-bit binary
// sum {co, bin_sum} lies in 0..18 and is classified:
//   dg (digit generate)  = co | s3&s1 | s3&s2     -> sum >= 10, a decimal carry
//                                                    leaves whatever comes in
//   dp (digit propagate) = s0 & s3                -> sum == 9 whenever dg = 0,
//                                                    an incoming carry passes on
// dp is also 1 for 11, 13 and 15; dg is 1 there, so the carry equation
// dg | dp&cin is unaffected. These gates are as the document draws them.
// Purely combinational.
module adder_analyzer
  import bcd_pkg::*;
(
  input  bcd_digit_t a1,
  input  bcd_digit_t a2,
  output bcd_digit_t bin_sum,
  output logic       dg,
  output logic       dp
);

  logic co;

  cla4 u_add (
    .a    (a2),
    .b    (a1),
    .cin  (1'b0),
    .sum  (bin_sum),
    .cout (co)
  );

  always_comb begin
    dg = co | (bin_sum[3] & bin_sum[1]) | (bin_sum[3] & bin_sum[2]);
    dp = bin_sum[0] & bin_sum[3];
  end

endmodule
