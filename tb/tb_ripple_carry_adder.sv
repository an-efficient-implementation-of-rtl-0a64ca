// Self-checking test of ripple_carry_adder at its default 8 bits: every pair
// of 8-bit inputs, compared with the integer sum (9 bits, carry included).
module tb_ripple_carry_adder;
  logic [7:0] a, b;
  logic [8:0] sum;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .sum(sum));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (sum != 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", i, j, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
