// Self-checking test of half_adder: all four input pairs, compared with the
// integer sum a + b. Ends with a TB_RESULT line; a watchdog ends a hung run.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> co=%0b s=%0b", a, b, co, s);
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
