// Correction (rectification) adder of one BCD digit.
//
// The first-level sum of a digit was formed without its carry in. Once the
// carry network has delivered both the digit's own carry out (carry_out) and
// its carry in (carry_in = carry out of the digit below, or the word's cin),
// one 4-bit binary addition produces the final BCD digit:
//     digit = bin_sum + {0, carry_out, carry_out, carry_in}  (mod 16)
// i.e. 0, 1, 6 or 7 is added. Adding 6 skips the six unused codes 1010..1111
// when the digit carries out; adding carry_in applies the incoming carry.
// The adder's own carry is dropped: the decimal carry is already carry_out.
// Purely combinational. The correction values and their bit wiring
// ('0', Carry[i], Carry[i], carry in) follow the design description.
module bcd_correction_adder
  import bcd_pkg::*;
(
  input  logic [3:0] bin_sum,
  input  logic       carry_out,
  input  logic       carry_in,
  output bcd_digit_t digit
);

  logic [3:0] corr;
  logic       unused_co;

  always_comb begin
    corr = carry_out ? BCD_CORR : 4'b0000;
  end

  binary_adder4 u_add (
    .a  (bin_sum),
    .b  (corr),
    .ci (carry_in),
    .s  (digit),
    .co (unused_co)
  );

endmodule
