// rd_bcd_adder: reduced delay BCD adder, result = n1 + n2 + cin in BCD.
//
// Two levels of independent 4-bit binary adders around one carry network:
//   1. bcd_carry_front adds every digit pair in binary (no carry chains) and
//      derives each digit's decimal carry with a Kogge-Stone prefix network.
//   2. one digit_correct per digit adds 6*carry[i] + carry[i-1] to the binary
//      sum (carry[-1] = cin), giving the BCD digit.
// Only the carry network grows with the operand length; all else is constant
// depth. The critical path is first-level adder, analyzer AND/OR, carry
// network, correction adder.
// Interface: n1, n2 are DIGITS packed BCD digits, digit i in bits 4i+3..4i,
// each digit 0..9; cin is the carry in; cout is the decimal carry out of the
// top digit. Purely combinational, no clock and no reset. Operand digits
// above 9 are outside the specification and give undefined results.
// The structure follows the published design; having no registers, and
// the internals of the 4-bit adders, are this design's own choices.
module rd_bcd_adder
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = bcd_pkg::BCD_DIGITS
) (
  input  logic [4*DIGITS-1:0] n1,
  input  logic [4*DIGITS-1:0] n2,
  input  logic                cin,
  output logic [4*DIGITS-1:0] result,
  output logic                cout
);

  logic [4*DIGITS-1:0] bin_sum;
  logic [DIGITS-1:0]   carry;
  logic [DIGITS:0]     carry_into;   // carry_into[i]: decimal carry entering digit i

  bcd_carry_front #(.DIGITS(DIGITS)) u_front (
    .n1      (n1),
    .n2      (n2),
    .cin     (cin),
    .bin_sum (bin_sum),
    .carry   (carry)
  );

  assign carry_into = {carry, cin};

  for (genvar i = 0; i < DIGITS; i++) begin : g_corr
    digit_correct u_dc (
      .bin_sum   (bin_sum[4*i +: 4]),
      .carry_in  (carry_into[i]),
      .carry_out (carry_into[i+1]),
      .result    (result[4*i +: 4])
    );
  end

  assign cout = carry[DIGITS-1];

endmodule
