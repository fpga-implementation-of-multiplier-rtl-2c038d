// tb_cla: exhaustive check of the 4-bit carry look-ahead adder.
// All 512 combinations of x, y and cin are applied; sum and cout are compared
// with the integer sum x + y + cin.
module tb_cla;
  logic       cin, cout;
  logic [3:0] x, y, sum;
  int checks = 0, failures = 0;

  cla dut (.cin, .x, .y, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, x, y} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} !== 5'(x + y + cin)) begin
        failures++;
        $display("FAIL x=%0d y=%0d cin=%0d -> %0d", x, y, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
