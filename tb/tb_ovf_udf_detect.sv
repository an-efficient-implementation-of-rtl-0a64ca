// Self-checking test of ovf_udf_detect: every intermediate exponent E from
// -125 to 381 (the range two normal operands can give), with and without a
// normalisation increment. Expected values: category from the sign and size
// of E; the final exponent F = E + shift; underflow when F < 1, overflow when
// F > 254.
module tb_ovf_udf_detect;
  import fpm_pkg::*;
  logic [8:0] exp_int, exp_norm;
  logic       neg, overflow, underflow;
  exp_class_e category;
  int checks = 0, failures = 0;

  ovf_udf_detect dut (.exp_int(exp_int), .neg(neg), .exp_norm(exp_norm),
                      .category(category), .overflow(overflow), .underflow(underflow));

  initial begin
    for (int e = -125; e <= 381; e++) begin
      for (int sh = 0; sh < 2; sh++) begin
        exp_class_e ec;
        int f;
        exp_int  = 9'(e);
        neg      = (e < 0);
        exp_norm = 9'(e + sh);
        #1;
        f  = e + sh;
        ec = (e < 0) ? EC_UNDERFLOW : (e == 0) ? EC_ZERO : (e <= 254) ? EC_NORMAL : EC_OVERFLOW;
        checks++;
        if (category != ec || underflow != (f < 1) || overflow != (f > 254)) begin
          failures++;
          if (failures < 10)
            $display("FAIL E=%0d shift=%0d cat=%0d ovf=%0b udf=%0b", e, sh, category, overflow, underflow);
        end
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
