// tb_normalize: checks the normalisation of 48-bit significand products.
// Products with the top bit set must give the upper 24 bits and shift 128;
// products of the form 01.xxx must give bits 46..23 and shift 127. Uses the
// two worked examples 1.100 x 1.100 = 10.01 and 1.100 x 1.000 = 01.1 scaled
// to 24-bit significands, then random products of two significands.
module tb_normalize;
  localparam int unsigned N = 24;
  logic [2*N-1:0] p;
  logic [N-1:0]   np;
  logic [7:0]     shift;
  int checks = 0, failures = 0;
  int n128 = 0, n127 = 0;

  normalize #(.N(N)) dut (.p, .np, .shift);

  logic [9:0] p5;
  logic [4:0] np5;
  logic [7:0] shift5;
  normalize #(.N(5)) dut5 (.p(p5), .np(np5), .shift(shift5));

  task automatic check(input logic [N-1:0] exp_np, input logic [7:0] exp_sh);
    #1;
    checks++;
    if (np !== exp_np || shift !== exp_sh) begin
      failures++;
      if (failures < 10)
        $display("FAIL p=%h -> np=%h shift=%0d (want %h %0d)", p, np, shift, exp_np, exp_sh);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned a, b, prod;
    // 1.1b * 1.1b = 10.01b  -> np = 1.001b, shift 128
    p = 48'h9000_0000_0000;          // 10.0100...
    check(24'h900000, 8'd128);
    // 1.1b * 1.0b = 01.1b   -> np = 1.1b, shift 127
    p = 48'h6000_0000_0000;          // 01.1000...
    check(24'hC00000, 8'd127);
    for (int i = 0; i < 20000; i++) begin
      a = longint'({1'b1, 23'($urandom)});
      b = longint'({1'b1, 23'($urandom)});
      prod = a * b;
      p = 48'(prod);
      // Independent reference: find the leading one by value comparison.
      if (prod >= (64'd1 << 47)) begin
        n128++;
        check(24'(prod >> 24), 8'd128);
      end else begin
        n127++;
        check(24'(prod >> 23), 8'd127);
      end
    end
    p5 = 10'd560;
    #1;
    checks++;
    if (np5 !== 5'b10001 || shift5 !== 8'd128) failures++;
    p5 = 10'd400;
    #1;
    checks++;
    if (np5 !== 5'b11001 || shift5 !== 8'd127) failures++;
    if (n128 == 0 || n127 == 0) failures++;
    $display("cases: shift128=%0d shift127=%0d", n128, n127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
