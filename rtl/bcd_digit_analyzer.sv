// First-level adder and analyzer of one BCD digit.
//
// Adds the two BCD digits a1 and a2 in a 4-bit binary adder with no carry in:
// the incoming decimal carry is not added here but folded into the later
// correction, so this level never waits for a neighbouring digit. The 5-bit
// result (carry c4 and sum s3..s0, at most 18) is then classified:
//   dg (digit generate)  - the sum exceeds 9, so the digit carries out
//                          whatever its carry in: dg = c4 | s3&s2 | s3&s1.
//   dp (digit propagate) - s3 & s0. This is the design's cheap form of
//                          "sum equals 9": it is also true for 11, 13 and 15,
//                          but those already raise dg, so the carry
//                          dg | dp&cin is unchanged (as with generate and
//                          propagate of a binary carry-lookahead adder).
// bin_sum is the low four bits of the binary sum, passed to the correction
// stage. Purely combinational. The dp form follows the design description;
// the gate form of dg is this implementation's own minimisation of "sum > 9".
module bcd_digit_analyzer
  import bcd_pkg::*;
(
  input  bcd_digit_t a1,
  input  bcd_digit_t a2,
  output logic [3:0] bin_sum,
  output logic       dg,
  output logic       dp
);

  logic c4;

  binary_adder4 u_add (
    .a  (a1),
    .b  (a2),
    .ci (1'b0),
    .s  (bin_sum),
    .co (c4)
  );

  always_comb begin
    dg = c4 | (bin_sum[3] & bin_sum[2]) | (bin_sum[3] & bin_sum[1]);
    dp = bin_sum[3] & bin_sum[0];
  end

endmodule
