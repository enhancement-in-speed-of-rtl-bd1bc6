// Exhaustive self-checking testbench of bcd_digit_analyzer: every pair of
// BCD digits. Checks the binary sum, that dg is set exactly when the digit
// sum exceeds 9, and that dp is set for a sum of 9 and clear below 9 (above
// 9 dp must equal sum bit 3 AND bit 0, which dg then overrides).
module bcd_digit_analyzer_tb;

  logic [3:0] a1, a2, bin_sum;
  logic       dg, dp;
  int         checks = 0;
  int         failures = 0;

  bcd_digit_analyzer dut (.a1(a1), .a2(a2), .bin_sum(bin_sum), .dg(dg), .dp(dp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL a1=%0d a2=%0d: %s (bin_sum=%0d dg=%0d dp=%0d)", a1, a2, what, bin_sum, dg, dp);
    end
  endtask

  initial begin
    int total;
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        a1 = 4'(i); a2 = 4'(j);
        #1;
        total = i + j;
        check(bin_sum == 4'(total % 16), "binary sum");
        check(dg == (total > 9), "digit generate");
        if (total < 9)       check(dp == 1'b0, "no propagate below 9");
        else if (total == 9) check(dp == 1'b1, "propagate at 9");
        else                 check(dp == ((total % 16) % 2 == 1 && (total % 16) >= 8), "propagate above 9");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
