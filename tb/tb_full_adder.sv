// Self-checking test of full_adder: all eight input combinations, compared
// with the integer sum a + b + ci. Ends with a TB_RESULT line.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
