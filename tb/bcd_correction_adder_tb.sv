// Self-checking testbench of bcd_correction_adder. For every pair of BCD
// digits and both carry-in values it forms the first-level binary sum and
// the true decimal carry out (a + b + cin > 9), and checks that the
// corrected digit is the decimal sum digit (a + b + cin) mod 10. Also counts
// how often each of the corrections 0, 1, 6 and 7 was exercised.
module bcd_correction_adder_tb;

  logic [3:0] bin_sum, digit;
  logic       carry_out, carry_in;
  int         checks = 0;
  int         failures = 0;
  int         seen [4];

  bcd_correction_adder dut (.bin_sum(bin_sum), .carry_out(carry_out),
                            .carry_in(carry_in), .digit(digit));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    foreach (seen[k]) seen[k] = 0;
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++)
        for (int c = 0; c < 2; c++) begin
          total     = a + b + c;
          bin_sum   = 4'((a + b) % 16);
          carry_out = (total > 9);
          carry_in  = 1'(c);
          #1;
          seen[{carry_out, carry_in}]++;
          checks++;
          if (digit !== 4'(total % 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: digit=%0d exp=%0d", a, b, c, digit, total % 10);
          end
        end
    // Each correction (0, 1, 6, 7) must have been applied.
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL correction case %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
