// Self-checking test of sign_bit: the product of (+-1) x (+-1) is negative
// exactly when one factor is; all four sign pairs are checked.
module tb_sign_bit;
  logic a_sign, b_sign, sign;
  int checks = 0, failures = 0;

  sign_bit dut (.a_sign(a_sign), .b_sign(b_sign), .sign(sign));

  initial begin
    for (int i = 0; i < 4; i++) begin
      int pa, pb;
      {a_sign, b_sign} = 2'(i);
      #1;
      pa = a_sign ? -1 : 1;
      pb = b_sign ? -1 : 1;
      checks++;
      if (sign != (pa * pb < 0)) begin
        failures++;
        $display("FAIL %0b %0b -> %0b", a_sign, b_sign, sign);
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
