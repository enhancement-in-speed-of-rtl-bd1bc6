// First adder level plus carry network of a DIGITS-digit BCD word.
//
// One bcd_digit_analyzer per digit adds the digits of n1 and n2 in parallel
// (no carry between digits) and reports each digit's binary sum and its
// digit generate / digit propagate signals. A bcd_carry_network turns those,
// together with cin, into the decimal carry out of every digit. Nothing here
// waits for another digit's sum, so the delay is one 4-bit addition, the
// analyzer gates and the prefix network.
// Interface: n1, n2 hold DIGITS packed BCD digits, digit 0 in bits [3:0];
// bin_sum is packed the same way; carry[i] is the carry out of digit i.
// Purely combinational. The partitioning follows the design description.
module bcd_carry_unit
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  logic [4*DIGITS-1:0] n1,
  input  logic [4*DIGITS-1:0] n2,
  input  logic                cin,
  output logic [4*DIGITS-1:0] bin_sum,
  output logic [DIGITS-1:0]   carry
);

  logic [DIGITS-1:0] dg;
  logic [DIGITS-1:0] dp;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_digit_analyzer u_analyzer (
      .a1      (n1[4*i +: 4]),
      .a2      (n2[4*i +: 4]),
      .bin_sum (bin_sum[4*i +: 4]),
      .dg      (dg[i]),
      .dp      (dp[i])
    );
  end

  bcd_carry_network #(.DIGITS(DIGITS)) u_network (
    .dg    (dg),
    .dp    (dp),
    .cin   (cin),
    .carry (carry)
  );

endmodule
