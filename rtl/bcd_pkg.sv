// Shared types and constants of the high-speed BCD adder.
//
// A BCD digit is a 4-bit binary number in the range 0..9. A first-level sum
// of two digits lies in 0..18; a sum above 9 is wrong as a BCD digit and
// produces a decimal carry (digit generate), a sum of exactly 9 passes an
// incoming carry on (digit propagate). The correction added in the second
// level is BCD_CORR (0110) when a digit carries out, plus the incoming carry,
// giving the four possible corrections 0, 1, 6 and 7.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  localparam bcd_digit_t BCD_CORR = 4'b0110;

endpackage
