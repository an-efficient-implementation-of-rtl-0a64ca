// Self-checking test of one_subtractor: all four (S, Bi) pairs. The expected
// difference and borrow come from the integer S - 1 - Bi: the difference is
// its low bit and the borrow is set when it is negative.
module tb_one_subtractor;
  logic s, b_in, r, b_out;
  int checks = 0, failures = 0;

  one_subtractor dut (.s(s), .b_in(b_in), .r(r), .b_out(b_out));

  initial begin
    for (int i = 0; i < 4; i++) begin
      int d;
      {s, b_in} = 2'(i);
      #1;
      d = int'(s) - 1 - int'(b_in);
      checks++;
      if (r != d[0] || b_out != (d < 0)) begin
        failures++;
        $display("FAIL s=%0b bi=%0b -> r=%0b bo=%0b", s, b_in, r, b_out);
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
