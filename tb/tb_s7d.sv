// tb_s7d: checks the seven-segment display driver for every 5-bit operand
// value on both operand displays and every 4-bit fraction pattern, against
// the standard active-low digit codes (segments gfedcba). Includes the board
// example 28, 20 and 0001.
module tb_s7d;
  logic [4:0] mx, my;
  logic [3:0] fr;
  logic [6:0] hex [8];
  int checks = 0, failures = 0;

  // Active-low codes of digits 0..9, bit 6 = g .. bit 0 = a.
  localparam logic [6:0] CODE [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                       7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  s7d dut (.mx, .my, .fr, .hex);

  task automatic expect_digit(input int k, input int d);
    checks++;
    if (hex[k] !== CODE[d]) begin
      failures++;
      if (failures < 10) $display("FAIL HEX%0d=%h want digit %0d (%h)", k, hex[k], d, CODE[d]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Board example: 28 x 20, product fraction 0001.
    mx = 5'd28; my = 5'd20; fr = 4'b0001;
    #1;
    expect_digit(7, 2); expect_digit(6, 8);
    expect_digit(5, 2); expect_digit(4, 0);
    expect_digit(3, 0); expect_digit(2, 0); expect_digit(1, 0); expect_digit(0, 1);
    for (int v = 0; v < 32; v++) begin
      mx = 5'(v); my = 5'(31 - v); fr = 4'(v);
      #1;
      expect_digit(7, v / 10);        expect_digit(6, v % 10);
      expect_digit(5, (31 - v) / 10); expect_digit(4, (31 - v) % 10);
      for (int k = 0; k < 4; k++) expect_digit(k, (v >> k) & 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
