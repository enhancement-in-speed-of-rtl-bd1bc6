// Self-checking testbench of hs_bcd_adder configured for 128-bit (32-digit)
// BCD addition. The reference is schoolbook decimal addition, one digit at
// a time, carried through all 32 digits; random and directed operands,
// including a carry from cin through every digit to cout.
module hs_bcd_adder_128b_tb;

  localparam int unsigned D = 32;

  logic [4*D-1:0] n1, n2, sum;
  logic           cin, cout;
  int             checks = 0;
  int             failures = 0;
  int             cout_set = 0;

  hs_bcd_adder #(.DIGITS(D)) dut (.n1(n1), .n2(n2), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4*D-1:0] rand_bcd();
    logic [4*D-1:0] v;
    for (int i = 0; i < D; i++) v[4*i +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  task automatic apply(input logic [4*D-1:0] a, input logic [4*D-1:0] b, input logic c);
    logic [4*D-1:0] exp_s;
    int cc = int'(c);
    int t;
    n1 = a; n2 = b; cin = c;
    #1;
    for (int i = 0; i < D; i++) begin
      t = int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + cc;
      exp_s[4*i +: 4] = 4'(t % 10);
      cc = t / 10;
    end
    if (cout) cout_set++;
    checks++;
    if (sum !== exp_s || cout !== 1'(cc)) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h exp %0d_%h", a, b, c, cout, sum, cc, exp_s);
    end
  endtask

  initial begin
    apply({D{4'h9}}, '0, 1'b1);
    apply({D{4'h9}}, {D{4'h9}}, 1'b1);
    apply('0, '0, 1'b0);
    for (int t = 0; t < 10000; t++) apply(rand_bcd(), rand_bcd(), 1'($urandom));
    checks++;
    if (cout_set == 0) begin
      failures++;
      $display("FAIL cout never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
