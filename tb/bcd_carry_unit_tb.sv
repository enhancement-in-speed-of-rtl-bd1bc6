// Self-checking testbench of bcd_carry_unit (16 digits). Random and directed
// BCD operands; the expected binary sum of each digit is (a + b) mod 16 and
// the expected carries come from digit-by-digit decimal addition.
module bcd_carry_unit_tb;

  localparam int unsigned D = 16;

  logic [4*D-1:0] n1, n2, bin_sum;
  logic [D-1:0]   carry;
  logic           cin;
  int             checks = 0;
  int             failures = 0;

  bcd_carry_unit #(.DIGITS(D)) dut (.n1(n1), .n2(n2), .cin(cin), .bin_sum(bin_sum), .carry(carry));

  initial begin : watchdog
    #1000000;
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
    logic [4*D-1:0] exp_bin;
    logic [D-1:0]   exp_carry;
    int             cc, t;
    n1 = a; n2 = b; cin = c;
    #1;
    cc = int'(c);
    for (int i = 0; i < D; i++) begin
      t = int'(a[4*i +: 4]) + int'(b[4*i +: 4]);
      exp_bin[4*i +: 4] = 4'(t % 16);
      cc = (t + cc > 9) ? 1 : 0;
      exp_carry[i] = 1'(cc);
    end
    checks++;
    if (bin_sum !== exp_bin) begin
      failures++;
      $display("FAIL bin_sum %h + %h: got %h exp %h", a, b, bin_sum, exp_bin);
    end
    checks++;
    if (carry !== exp_carry) begin
      failures++;
      $display("FAIL carry %h + %h + %0d: got %h exp %h", a, b, c, carry, exp_carry);
    end
  endtask

  initial begin
    apply({D{4'h9}}, '0, 1'b1);
    apply({D{4'h9}}, '0, 1'b0);
    apply({D{4'h5}}, {D{4'h4}}, 1'b1);
    apply({D{4'h9}}, {D{4'h9}}, 1'b1);
    for (int t = 0; t < 3000; t++) apply(rand_bcd(), rand_bcd(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
