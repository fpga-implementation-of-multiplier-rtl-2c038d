// tb_fpmul_de2: end-to-end test of the board-level floating-point multiplier.
//
// Runs the top at its only (binary32) size and checks:
//  - the two worked examples: e1 = 132, e2 = 60, signs 0 and 1;
//  - the board sequence 1.0100b x 1.1100b then 1.0100b x 1.0100b with the same
//    exponents (result exponents 66 then 65, leading fraction bits 0001 then
//    1001);
//  - the board display example 28 x 20 = 1.000110000b x 2^9, with both
//    operands at 2^4: displays "28", "20" and "0001", result exponent 136;
//  - random normal operands, each checked against an integer reference and
//    the display against the standard active-low digit codes.
// It counts how often each mechanism of the design occurred: a product >= 2
// that the normalize unit shifts (exponent + 1), a product < 2 that it does
// not, a negative and a positive result sign. One that never occurs is a
// failure.
module tb_fpmul_de2;
  logic        s1, s2, sout;
  logic [7:0]  e1, e2, eout;
  logic [22:0] f1, f2, fout;
  logic [6:0]  hex [8];
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_neg = 0, n_pos = 0;

  localparam logic [6:0] CODE [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                       7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  fpmul_de2 dut (.s1, .s2, .e1, .e2, .f1, .f2, .sout, .eout, .fout, .hex);

  task automatic fail(input string what);
    failures++;
    if (failures < 10)
      $display("FAIL %s: %b %0d %h x %b %0d %h -> %b %0d %h", what,
               s1, e1, f1, s2, e2, f2, sout, eout, fout);
  endtask

  // Full check of the current inputs against an integer reference.
  task automatic check();
    longint unsigned prod;
    logic [22:0] rf;
    logic [7:0]  re;
    int ma, mb;
    #1;
    prod = longint'({1'b1, f1}) * longint'({1'b1, f2});
    if (prod >> 47) begin
      n_shift++;
      rf = 23'(prod >> 24);
      re = 8'(int'(e1) + int'(e2) - 126);
    end else begin
      n_noshift++;
      rf = 23'(prod >> 23);
      re = 8'(int'(e1) + int'(e2) - 127);
    end
    if (s1 ^ s2) n_neg++; else n_pos++;
    checks++;
    if (sout !== (s1 ^ s2) || eout !== re || fout !== rf) fail("result");
    ma = 16 + int'(f1[22:19]);
    mb = 16 + int'(f2[22:19]);
    checks++;
    if (hex[7] !== CODE[ma / 10] || hex[6] !== CODE[ma % 10] ||
        hex[5] !== CODE[mb / 10] || hex[4] !== CODE[mb % 10] ||
        hex[3] !== CODE[rf[22]] || hex[2] !== CODE[rf[21]] ||
        hex[1] !== CODE[rf[20]] || hex[0] !== CODE[rf[19]]) fail("display");
  endtask

  task automatic expect_result(input logic es, input logic [7:0] ee, input logic [22:0] ef);
    checks++;
    if (sout !== es || eout !== ee || fout !== ef) fail("expected value");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example 1: product >= 2.
    s1 = 0; s2 = 1; e1 = 8'b10000100; e2 = 8'b00111100;
    f1 = 23'b01000000000000000000000;
    f2 = 23'b11000000000000000000000;
    check();
    expect_result(1'b1, 8'd66, 23'b00011000000000000000000);
    // Worked example 2: product < 2.
    f1 = 23'b00100000000000000000000;
    f2 = 23'b01000000000000000000000;
    check();
    expect_result(1'b1, 8'd65, 23'b01101000000000000000000);
    // Board sequence: 1.0100 x 1.1100, then 1.0100 x 1.0100.
    s1 = 0; s2 = 0;
    f1 = 23'b0100 << 19; f2 = 23'b1100 << 19;
    check();
    expect_result(1'b0, 8'd66, 23'b0001 << 19 | 23'b1 << 18);
    f2 = 23'b0100 << 19;
    check();
    expect_result(1'b0, 8'd65, 23'b1001 << 19);
    // Board display: 28 = 1.1100 x 2^4, 20 = 1.0100 x 2^4.
    e1 = 8'd131; e2 = 8'd131;
    f1 = 23'b1100 << 19; f2 = 23'b0100 << 19;
    check();
    expect_result(1'b0, 8'd136, 23'b000110000 << 14);
    checks++;
    if (hex[7] !== CODE[2] || hex[6] !== CODE[8] || hex[5] !== CODE[2] ||
        hex[4] !== CODE[0] || hex[3] !== CODE[0] || hex[2] !== CODE[0] ||
        hex[1] !== CODE[0] || hex[0] !== CODE[1]) fail("board display 28 x 20");
    // Random normal operands within the exponent range.
    for (int i = 0; i < 5000; i++) begin
      int e;
      s1 = 1'($urandom); s2 = 1'($urandom);
      f1 = 23'($urandom); f2 = 23'($urandom);
      e1 = 8'($urandom_range(254, 1));
      do e = $urandom_range(254, 1);
      while (int'(e1) + e - 127 < 1 || int'(e1) + e - 126 > 254);
      e2 = 8'(e);
      check();
    end
    $display("mechanisms: normalize shift=%0d no shift=%0d negative=%0d positive=%0d",
             n_shift, n_noshift, n_neg, n_pos);
    if (n_shift == 0)   begin failures++; $display("FAIL: no normalising shift"); end
    if (n_noshift == 0) begin failures++; $display("FAIL: no unshifted product"); end
    if (n_neg == 0)     begin failures++; $display("FAIL: no negative result"); end
    if (n_pos == 0)     begin failures++; $display("FAIL: no positive result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
