// tb_multiplier: checks the 24 x 24 shift-add multiplier against the
// simulator's own multiplication on corner values and random operands,
// including the 4-bit textbook example 13 x 11 = 143 in the low bits. A second
// instance at N = 5, the significand width of the board demonstration, is
// checked exhaustively (e.g. 20 x 28 = 560).
module tb_multiplier;
  localparam int unsigned N = 24;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  multiplier #(.N(N)) dut (.a, .b, .p);

  logic [4:0] a5, b5;
  logic [9:0] p5;
  multiplier #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  task automatic check();
    longint unsigned ref_p;
    #1;
    ref_p = longint'(a) * longint'(b);
    checks++;
    if (p !== 48'(ref_p)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h (want %h)", a, b, p, ref_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if (int'(p5) != int'(a5) * int'(b5)) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 %0d * %0d -> %0d", a5, b5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 24'd13; b = 24'd11; check();
    a = '0;     b = '1;     check();
    a = '1;     b = '0;     check();
    a = '1;     b = '1;     check();
    a = 24'h800000; b = 24'h800000; check();
    for (int i = 0; i < N; i++) begin
      a = '1; b = 24'(1) << i; check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 24'($urandom); b = 24'($urandom); check();
    end
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if (int'(p5) != int'(a5) * int'(b5)) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 %0d * %0d -> %0d", a5, b5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
