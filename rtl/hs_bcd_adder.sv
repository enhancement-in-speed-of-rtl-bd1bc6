// High-speed (reduced-delay) multi-digit BCD adder.
//
// Computes sum = n1 + n2 + cin for two unsigned BCD numbers of DIGITS digits
// (default 16 digits = 64 bits), with the decimal carry out in cout.
// Instead of rippling corrected carries from digit to digit, it works in
// three parallel steps:
//   1. every digit pair is added in binary with no carry in and classified
//      as generating (sum > 9) or propagating (sum = 9) a decimal carry;
//   2. a parallel prefix carry network computes all digit carries at once;
//   3. every digit adds 0, 1, 6 or 7 to its binary sum, chosen by its own
//      carry out and its carry in.
// The critical path is two 4-bit additions, the carry network and a few
// gates, independent of how far a carry travels.
// Interface: digit i of each operand and of the result is in bits
// [4*i+3:4*i]. Operand digits must be valid BCD (0..9); other codes give an
// unspecified result. Purely combinational: no clock, no reset, no latency.
// The structure and the 64-bit width follow the design description; the
// prefix network type is this implementation's choice.
module hs_bcd_adder
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 16
) (
  input  logic [4*DIGITS-1:0] n1,
  input  logic [4*DIGITS-1:0] n2,
  input  logic                cin,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);

  logic [4*DIGITS-1:0] bin_sum;
  logic [DIGITS-1:0]   carry;

  bcd_carry_unit #(.DIGITS(DIGITS)) u_carry_unit (
    .n1      (n1),
    .n2      (n2),
    .cin     (cin),
    .bin_sum (bin_sum),
    .carry   (carry)
  );

  for (genvar i = 0; i < DIGITS; i++) begin : g_correct
    // Carry into digit i: the word's cin for digit 0, else carry out of i-1.
    logic carry_into;
    if (i == 0) begin : g_lsd
      assign carry_into = cin;
    end else begin : g_upper
      assign carry_into = carry[i-1];
    end

    bcd_correction_adder u_correct (
      .bin_sum   (bin_sum[4*i +: 4]),
      .carry_out (carry[i]),
      .carry_in  (carry_into),
      .digit     (sum[4*i +: 4])
    );
  end

  assign cout = carry[DIGITS-1];

endmodule
