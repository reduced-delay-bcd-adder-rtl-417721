// carry_network: decimal carries of all digits by a Kogge-Stone prefix network.
//
// Each digit i brings a pair (dg[i], dp[i]). Its decimal carry out obeys
//   carry[i] = dg[i] | dp[i] & carry[i-1],   carry[-1] = cin,
// which has the same form as a binary carry, so any binary prefix scheme
// applies. The adder's carry in is folded into digit 0 first
// (g0 = dg[0] | dp[0]&cin); then ceil(log2(DIGITS)) Kogge-Stone levels
// combine, at level k, every position i with position i - 2^k. After the
// last level the group generate of span [i:0] is carry[i].
// Purely combinational; depth is 1 + ceil(log2(DIGITS)) AND-OR levels
// (5 at the default 16 digits). The equation and the choice of a Kogge-Stone
// network follow the published design; the node wiring is the standard
// radix-2 form, and folding cin into digit 0 is this design's own choice.
module carry_network
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = bcd_pkg::BCD_DIGITS
) (
  input  logic [DIGITS-1:0] dg,
  input  logic [DIGITS-1:0] dp,
  input  logic              cin,
  output logic [DIGITS-1:0] carry
);

  localparam int unsigned LEVELS = (DIGITS > 1) ? $clog2(DIGITS) : 0;

  // Level 0: the digits' own pairs, with the carry in folded into digit 0.
  gp_t [DIGITS-1:0] lvl0;

  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      lvl0[i].g = dg[i];
      lvl0[i].p = dp[i];
    end
    lvl0[0].g = dg[0] | (dp[0] & cin);
  end

  // g_level[k].gp[i]: generate/propagate of span [i : max(0, i-2^(k+1)+1)].
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    gp_t [DIGITS-1:0] prev;
    gp_t [DIGITS-1:0] gp;
    if (k == 0) begin : g_first
      assign prev = lvl0;
    end else begin : g_next
      assign prev = g_level[k-1].gp;
    end
    for (genvar i = 0; i < DIGITS; i++) begin : g_node
      if (i >= (1 << k)) begin : g_black
        assign gp[i] = gp_combine(prev[i], prev[i-(1<<k)]);
      end else begin : g_pass
        assign gp[i] = prev[i];
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign carry = lvl0[0].g;
  end else begin : g_out
    for (genvar i = 0; i < DIGITS; i++) begin : g_bit
      assign carry[i] = g_level[LEVELS-1].gp[i].g;
    end
  end

endmodule
