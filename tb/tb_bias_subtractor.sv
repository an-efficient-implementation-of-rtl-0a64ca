// Self-checking test of bias_subtractor with the default bias 127 on 9 bits:
// every 9-bit input s; the expected difference is (s - 127) mod 512 and the
// borrow is set exactly when s < 127.
module tb_bias_subtractor;
  logic [8:0] s, r;
  logic       b_out;
  int checks = 0, failures = 0;

  bias_subtractor dut (.s(s), .r(r), .b_out(b_out));

  initial begin
    for (int i = 0; i < 512; i++) begin
      int d;
      s = 9'(i);
      #1;
      d = i - 127;
      checks++;
      if (r != 9'(d) || b_out != (d < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d -> r=%0d bo=%0b", i, r, b_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
