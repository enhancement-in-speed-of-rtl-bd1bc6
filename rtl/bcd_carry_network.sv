// Decimal carry network.
//
// Given the digit generate (dg) and digit propagate (dp) signals of every
// digit and the word's carry in, computes the decimal carry out of each digit:
//     carry[i] = dg[i] | dp[i] & carry[i-1],   carry[-1] = cin.
// The recurrence is the same as for binary generate/propagate, so any binary
// carry-lookahead structure can compute it. This implementation uses a
// Kogge-Stone parallel prefix network: cin is first merged into digit 0's
// generate, then ceil(log2(DIGITS)) levels of (G,P) o (G',P') =
// (G | P&G', P&P') combine spans of 1, 2, 4, ... digits. For the default
// 16 digits that is four prefix levels, so the carry of the top digit no
// longer ripples through 16 digits. Purely combinational.
// The choice of a parallel prefix network is allowed but not fixed by the
// design description; Kogge-Stone in particular is this implementation's.
module bcd_carry_network #(
  parameter int unsigned DIGITS = 16
) (
  input  logic [DIGITS-1:0] dg,
  input  logic [DIGITS-1:0] dp,
  input  logic              cin,
  output logic [DIGITS-1:0] carry
);

  localparam int unsigned LEVELS = (DIGITS > 1) ? $clog2(DIGITS) : 0;

  // Group generate and propagate after each prefix level.
  logic [DIGITS-1:0] g_lvl [LEVELS+1];
  logic [DIGITS-1:0] p_lvl [LEVELS+1];

  assign g_lvl[0] = dg | DIGITS'(dp[0] & cin);
  assign p_lvl[0] = dp;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned SPAN = 1 << l;
    for (genvar i = 0; i < DIGITS; i++) begin : g_node
      if (i >= SPAN) begin : g_black
        assign g_lvl[l+1][i] = g_lvl[l][i] | (p_lvl[l][i] & g_lvl[l][i-SPAN]);
        assign p_lvl[l+1][i] = p_lvl[l][i] & p_lvl[l][i-SPAN];
      end else begin : g_pass
        assign g_lvl[l+1][i] = g_lvl[l][i];
        assign p_lvl[l+1][i] = p_lvl[l][i];
      end
    end
  end

  assign carry = g_lvl[LEVELS];

endmodule
