// Self-checking testbench of bcd_carry_network. A 16-digit instance (the
// default) and a 5-digit one (not a power of two) are driven with random and
// directed generate/propagate patterns; every carry is compared with the
// digit-serial recurrence carry[i] = dg[i] | dp[i] & carry[i-1].
module bcd_carry_network_tb;

  localparam int unsigned N = 16;
  localparam int unsigned M = 5;

  logic [N-1:0] dg, dp, carry;
  logic [M-1:0] dg5, dp5, carry5;
  logic         cin;
  int           checks = 0;
  int           failures = 0;

  bcd_carry_network #(.DIGITS(N)) dut   (.dg(dg),  .dp(dp),  .cin(cin), .carry(carry));
  bcd_carry_network #(.DIGITS(M)) dut5  (.dg(dg5), .dp(dp5), .cin(cin), .carry(carry5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ripple(input logic [N-1:0] g, input logic [N-1:0] p,
                                          input logic c0, input int n);
    logic [N-1:0] r = '0;
    logic c = c0;
    for (int i = 0; i < n; i++) begin
      c = g[i] | (p[i] & c);
      r[i] = c;
    end
    return r;
  endfunction

  task automatic apply(input logic [N-1:0] g, input logic [N-1:0] p, input logic c);
    logic [N-1:0] e16, e5;
    dg = g; dp = p; cin = c;
    dg5 = g[M-1:0]; dp5 = p[M-1:0];
    #1;
    e16 = ripple(g, p, c, N);
    e5  = ripple(g, p, c, M);
    checks++;
    if (carry !== e16) begin
      failures++;
      $display("FAIL 16: dg=%h dp=%h cin=%0d carry=%h exp=%h", g, p, c, carry, e16);
    end
    checks++;
    if (carry5 !== e5[M-1:0]) begin
      failures++;
      $display("FAIL 5: dg=%h dp=%h cin=%0d carry=%h exp=%h", g[M-1:0], p[M-1:0], c, carry5, e5[M-1:0]);
    end
  endtask

  initial begin
    // Carry from cin through every digit, and its absence.
    apply('0, '1, 1'b1);
    apply('0, '1, 1'b0);
    // A generate at each position travelling up a chain of propagates.
    for (int k = 0; k < N; k++) apply(N'(1) << k, '1, 1'b0);
    // A kill (neither g nor p) at each position blocking cin.
    for (int k = 0; k < N; k++) apply('0, ~(N'(1) << k), 1'b1);
    // Random patterns, with propagate runs made long by OR-ing masks.
    for (int t = 0; t < 4000; t++) begin
      logic [N-1:0] g, p;
      g = N'($urandom) & N'($urandom) & N'($urandom);
      p = N'($urandom) | N'($urandom);
      apply(g, p, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
