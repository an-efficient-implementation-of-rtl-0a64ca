// Self-checking test of exponent_adder (8-bit exponents, bias 127).
// A new exponent pair is applied every clock, all 65536 pairs in turn. The
// unregistered sum is checked against e1 + e2 at once; exp_int and neg are
// checked one clock later against e1 + e2 - 127 (two's complement on 9 bits,
// neg set when negative), which also checks the one-clock latency. After a
// reset the registered sum must be cleared (0 - 127 < 0, so neg is set).
module tb_exponent_adder;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] a_exp = '0, b_exp = '0;
  logic [8:0] sum, exp_int;
  logic       neg;
  int checks = 0, failures = 0, cycles = 0;

  exponent_adder dut (.clk(clk), .rst_n(rst_n), .a_exp(a_exp), .b_exp(b_exp),
                      .sum(sum), .exp_int(exp_int), .neg(neg));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int prev_e;
    repeat (2) @(negedge clk);
    check(exp_int == 9'(-127) && neg, "reset value");
    rst_n = 1'b1;
    prev_e = -1;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      if (prev_e >= 0)
        check(exp_int == 9'(prev_e - 127) && neg == (prev_e < 127),
              $sformatf("exp_int=%0d neg=%0b for sum %0d", exp_int, neg, prev_e));
      a_exp = 8'(i >> 8);
      b_exp = 8'(i);
      #1;
      check(sum == 9'(int'(a_exp) + int'(b_exp)), "comb sum");
      prev_e = int'(a_exp) + int'(b_exp);
    end
    @(negedge clk);
    check(exp_int == 9'(prev_e - 127) && neg == (prev_e < 127), "last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 70000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
