// bcd_carry_front: first level of the BCD adder (adders + analyzers + carry network).
//
// One adder_analyzer per digit adds the digit pair of n1 and n2 in binary,
// all digits in parallel and in constant time, and reports (dg, dp). The
// carry_network turns those pairs and the carry in into the decimal carry out
// of every digit. Outputs are the uncorrected binary digit sums and the
// DIGITS decimal carries; carry[i] belongs to digit i (bits 4i+3..4i).
// Purely combinational.
module bcd_carry_front
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = bcd_pkg::BCD_DIGITS
) (
  input  logic [4*DIGITS-1:0] n1,
  input  logic [4*DIGITS-1:0] n2,
  input  logic                cin,
  output logic [4*DIGITS-1:0] bin_sum,
  output logic [DIGITS-1:0]   carry
);

  logic [DIGITS-1:0] dg, dp;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    adder_analyzer u_aa (
      .a1      (n1[4*i +: 4]),
      .a2      (n2[4*i +: 4]),
      .bin_sum (bin_sum[4*i +: 4]),
      .dg      (dg[i]),
      .dp      (dp[i])
    );
  end

  carry_network #(.DIGITS(DIGITS)) u_cn (
    .dg    (dg),
    .dp    (dp),
    .cin   (cin),
    .carry (carry)
  );

endmodule
