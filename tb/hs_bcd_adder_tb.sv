// End-to-end self-checking testbench of hs_bcd_adder at its default size
// (16 digits, 64 bits). Operands are random and directed BCD numbers; the
// expected result is computed by converting both operands to binary
// integers, adding them, and converting the total back to BCD.
//
// Every mechanism of the adder is counted, digit by digit, from the operands
// and must occur at least once:
//   case 1  digit sum below 9 (never carries out),
//   case 2  digit sum above 9 (carries out: digit generate),
//   case 3  digit sum of 9 with and without a carry in (digit propagate),
//   each of the four corrections 0, 1, 6 and 7,
//   a carry travelling from cin through all digits to cout,
//   cout set.
// The adder is combinational: each result is sampled 1 time unit after the
// inputs change, i.e. it is checked to appear with zero cycles of latency.
module hs_bcd_adder_tb;

  localparam int unsigned D = 16;

  logic [4*D-1:0] n1, n2, sum;
  logic           cin, cout;
  int             checks = 0;
  int             failures = 0;

  // Mechanism counters.
  int case1 = 0, case2 = 0, case3_prop = 0, case3_stop = 0;
  int corr [4];
  int full_ripple = 0, cout_set = 0;

  hs_bcd_adder dut (.n1(n1), .n2(n2), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned bcd_to_int(input logic [4*D-1:0] v);
    longint unsigned r = 0;
    for (int i = D - 1; i >= 0; i--) r = r * 10 + longint'(v[4*i +: 4]);
    return r;
  endfunction

  function automatic logic [4*D:0] int_to_bcd(input longint unsigned x);
    logic [4*D:0] r = '0;
    for (int i = 0; i < D; i++) begin
      r[4*i +: 4] = 4'(x % 10);
      x = x / 10;
    end
    r[4*D] = 1'(x);   // at most 1 after D digits
    return r;
  endfunction

  function automatic logic [4*D-1:0] rand_bcd();
    logic [4*D-1:0] v;
    for (int i = 0; i < D; i++) v[4*i +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  // Count which mechanisms this operand pair exercises.
  task automatic classify(input logic [4*D-1:0] a, input logic [4*D-1:0] b, input logic c);
    int cc = int'(c);
    int t, co;
    bit all_prop = 1;
    for (int i = 0; i < D; i++) begin
      t  = int'(a[4*i +: 4]) + int'(b[4*i +: 4]);
      co = (t + cc > 9) ? 1 : 0;
      if (t < 9) case1++;
      else if (t > 9) case2++;
      else if (cc == 1) case3_prop++;
      else case3_stop++;
      if (t != 9) all_prop = 0;
      corr[{co[0], cc[0]}]++;
      cc = co;
    end
    if (all_prop && c) full_ripple++;
  endtask

  task automatic apply(input logic [4*D-1:0] a, input logic [4*D-1:0] b, input logic c);
    logic [4*D:0] exp_v;
    n1 = a; n2 = b; cin = c;
    #1;
    exp_v = int_to_bcd(bcd_to_int(a) + bcd_to_int(b) + longint'(c));
    classify(a, b, c);
    if (cout) cout_set++;
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h exp %0d_%h", a, b, c, cout, sum,
               exp_v[4*D], exp_v[4*D-1:0]);
    end
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (corr[k]) corr[k] = 0;
    // Directed cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply({D{4'h9}}, '0, 1'b1);                   // carry from cin to cout
    apply({D{4'h5}}, {D{4'h4}}, 1'b1);            // same, every digit 5+4
    apply({D{4'h9}}, {D{4'h9}}, 1'b1);            // largest sum
    apply({D{4'h9}}, {D{4'h9}}, 1'b0);
    apply(64'h0000_0000_0000_0526, 64'h0000_0000_0000_0485, 1'b0);
    apply(64'h1234_5678_9012_3456, 64'h8765_4321_0987_6543, 1'b1);
    // A single generating digit under a run of propagating digits.
    for (int k = 0; k < D; k++) begin
      logic [4*D-1:0] a, b;
      a = {D{4'h9}};
      b = '0;
      a[4*k +: 4] = 4'h7;
      b[4*k +: 4] = 4'h5;
      apply(a, b, 1'b0);
    end
    // Random operands.
    for (int t = 0; t < 20000; t++) apply(rand_bcd(), rand_bcd(), 1'($urandom));

    $display("Mechanisms exercised (digit counts unless stated):");
    require(case1,       "case 1: digit sum < 9");
    require(case2,       "case 2: digit sum > 9 (generate)");
    require(case3_prop,  "case 3: sum 9, carry in (propagate)");
    require(case3_stop,  "case 3: sum 9, no carry in");
    require(corr[0],     "correction +0");
    require(corr[1],     "correction +1");
    require(corr[2],     "correction +6");
    require(corr[3],     "correction +7");
    require(full_ripple, "words: cin carried to cout");
    require(cout_set,    "words: cout set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
