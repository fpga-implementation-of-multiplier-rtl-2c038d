// tb_fpmul: checks the binary32 multiplier core.
// 1. The two worked examples: (132, 1.01b) x (60, 1.11b) must give sign 1,
//    exponent 66, fraction 000110...; (132, 1.001b) x (60, 1.01b) must give
//    sign 1, exponent 65, fraction 01101...
// 2. Random normal operands whose product stays in the normal range. Each
//    result is checked bit-exactly against a reference built from a 64-bit
//    integer product, and numerically against the real product of the two
//    operands: the result must have the right sign and be the real product
//    truncated toward zero (|r| <= |a*b| < |r| + 1 ulp).
module tb_fpmul;
  logic        s1, s2, sout;
  logic [7:0]  e1, e2, eout;
  logic [22:0] f1, f2, fout;
  int checks = 0, failures = 0;
  int n_carry = 0, n_nocarry = 0;

  fpmul dut (.s1, .s2, .e1, .e2, .f1, .f2, .sout, .eout, .fout);

  task automatic fail(input string what);
    failures++;
    if (failures < 10)
      $display("FAIL %s: %b %0d %h x %b %0d %h -> %b %0d %h", what,
               s1, e1, f1, s2, e2, f2, sout, eout, fout);
  endtask

  task automatic check_exact(input logic es, input logic [7:0] ee, input logic [22:0] ef);
    #1;
    checks++;
    if (sout !== es || eout !== ee || fout !== ef) fail("exact");
  endtask

  // 2^n as a real, by repeated doubling or halving.
  function automatic real pow2(input int n);
    real v = 1.0;
    for (int i = 0; i < n; i++) v = v * 2.0;
    for (int i = 0; i > n; i--) v = v / 2.0;
    return v;
  endfunction

  // Value of a normal binary32 number: (-1)^s x (1 + f/2^23) x 2^(e-127).
  function automatic real to_real(input logic s, input logic [7:0] e, input logic [22:0] f);
    real v;
    v = (1.0 + real'(f) / 8388608.0) * pow2(int'(e) - 127);
    return s ? -v : v;
  endfunction

  task automatic check_random();
    longint unsigned prod;
    logic [22:0] rf;
    int re;
    real a, b, r, exact, ulp;
    #1;
    prod = longint'({1'b1, f1}) * longint'({1'b1, f2});
    if (prod >> 47) begin
      n_carry++;
      rf = 23'(prod >> 24);
      re = int'(e1) + int'(e2) - 126;
    end else begin
      n_nocarry++;
      rf = 23'(prod >> 23);
      re = int'(e1) + int'(e2) - 127;
    end
    checks++;
    if (sout !== (s1 ^ s2) || eout !== 8'(re) || fout !== rf) fail("integer reference");
    a = to_real(s1, e1, f1);
    b = to_real(s2, e2, f2);
    r = to_real(sout, eout, fout);
    exact = a * b;
    ulp = pow2(int'(eout) - 150);
    checks++;
    if ((r < 0.0) != (exact < 0.0)) fail("sign vs real");
    if (r < 0.0) r = -r;
    if (exact < 0.0) exact = -exact;
    if (!(r <= exact && exact < r + ulp)) fail("value vs real");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example 1.
    s1 = 0; s2 = 1; e1 = 8'b10000100; e2 = 8'b00111100;
    f1 = 23'b01000000000000000000000;
    f2 = 23'b11000000000000000000000;
    check_exact(1'b1, 8'd66, 23'b00011000000000000000000);
    // Worked example 2.
    f1 = 23'b00100000000000000000000;
    f2 = 23'b01000000000000000000000;
    check_exact(1'b1, 8'd65, 23'b01101000000000000000000);
    // 1.0 x 1.0 = 1.0 ; 2.0 x -3.0 = -6.0
    {s1, e1, f1} = 32'h3f800000; {s2, e2, f2} = 32'h3f800000;
    check_exact(1'b0, 8'h7f, 23'd0);
    {s1, e1, f1} = 32'h40000000; {s2, e2, f2} = 32'hc0400000;
    check_exact(1'b1, 8'h81, 23'h400000);
    for (int i = 0; i < 20000; i++) begin
      int e;
      s1 = 1'($urandom); s2 = 1'($urandom);
      f1 = 23'($urandom); f2 = 23'($urandom);
      // Exponents such that the result exponent stays within 1..254.
      e1 = 8'($urandom_range(254, 1));
      do e = $urandom_range(254, 1);
      while (int'(e1) + e - 127 < 1 || int'(e1) + e - 126 > 254);
      e2 = 8'(e);
      check_random();
    end
    if (n_carry == 0 || n_nocarry == 0) failures++;
    $display("cases: product>=2: %0d, product<2: %0d", n_carry, n_nocarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
