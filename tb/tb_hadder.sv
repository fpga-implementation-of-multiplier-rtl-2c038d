// tb_hadder: exhaustive check of the 8-bit hierarchical exponent adder.
// For every x, y and cin the output must be (x + y + cin - 127) mod 256 and
// cout the carry out of x + y + cin. Also replays the intermediate exponent
// of the worked example: 132 + 60 - 127 = 65.
module tb_hadder;
  logic       cin, cout;
  logic [7:0] x, y, sum;
  int checks = 0, failures = 0;

  hadder dut (.cin, .x, .y, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int raw;
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, x, y} = 17'(i);
      #1;
      raw = int'(x) + int'(y) + int'(cin);
      checks++;
      if (sum !== 8'(raw - 127) || cout !== (raw > 255)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d y=%0d cin=%0d -> sum=%0d cout=%0d", x, y, cin, sum, cout);
      end
    end
    cin = 0; x = 8'd132; y = 8'd60;
    #1;
    checks++;
    if (sum !== 8'd65) begin
      failures++;
      $display("FAIL example: %0d", sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
