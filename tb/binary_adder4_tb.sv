// Exhaustive self-checking testbench of binary_adder4: all 512 combinations
// of a, b and ci, compared with integer addition.
module binary_adder4_tb;

  logic [3:0] a, b, s;
  logic       ci, co;
  int         checks = 0;
  int         failures = 0;

  binary_adder4 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_total;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a = 4'(i); b = 4'(j); ci = 1'(k);
          #1;
          exp_total = i + j + k;
          checks++;
          if ({co, s} !== 5'(exp_total)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got co=%0d s=%0d", i, j, k, co, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
