// 4-bit binary adder with carry in and carry out.
//
// The basic building block of both adder levels of the BCD adder: the first
// level adds two BCD digits, the second level adds the decimal correction.
// Only the name and width of this block are fixed by the design; its insides
// are left to synthesis, written as one addition.
// Purely combinational: s and co follow a, b and ci with no clock.
module binary_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);

  always_comb begin
    {co, s} = {1'b0, a} + {1'b0, b} + {4'b0, ci};
  end

endmodule
