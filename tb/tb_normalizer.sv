// Self-checking test of normalizer (48-bit product, 9-bit exponent).
// Products are built as the product of two random 24-bit significands with
// their top bit set, so the leading one is at bit 46 or 47, plus the two
// extreme products 1.0 x 1.0 and (2-2^-23)^2. The expected result is the
// product divided by two (integer shift) with the exponent plus one when bit
// 47 is set, unchanged otherwise; the flags follow the final exponent range.
// Both the shifted and the unshifted case must occur.
// A second instance at 8-bit product / 6-bit exponent, the size of the
// simplified normaliser drawing, is checked for every product with its
// leading one at bit 6 or 7 and every exponent 0..40 (limit 2^5 - 2 = 30).
module tb_normalizer;
  import fpm_pkg::*;
  logic [47:0] ip, nsig;
  logic [8:0]  e, ne;
  logic        neg, ovf, udf;
  exp_class_e  cat;
  int checks = 0, failures = 0, n_shift = 0, n_noshift = 0;

  logic [7:0] ip8, nsig8;
  logic [5:0] e6, ne6;
  logic       ovf6, udf6;
  exp_class_e cat6;
  normalizer #(.IP_W(8), .IE_W(6)) dut8 (
    .significand_mul_op(ip8), .exponent_add_op(e6), .exp_neg(1'b0),
    .normalized_significand(nsig8), .normalized_exponent(ne6),
    .category(cat6), .overflow(ovf6), .underflow(udf6));

  normalizer dut (.significand_mul_op(ip), .exponent_add_op(e), .exp_neg(neg),
                  .normalized_significand(nsig), .normalized_exponent(ne),
                  .category(cat), .overflow(ovf), .underflow(udf));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [23:0] x, y;
      logic [47:0] esig;
      int          ee, fe;
      x  = (i == 0) ? 24'h800000 : (i == 1) ? 24'hFFFFFF : {1'b1, 23'($urandom)};
      y  = (i == 0) ? 24'h800000 : (i == 1) ? 24'hFFFFFF : {1'b1, 23'($urandom)};
      ip = 48'(x) * 48'(y);
      ee = int'($urandom % 507) - 125;
      if (i % 10 == 2) ee = 0;
      if (i % 10 == 3) ee = 254;
      e   = 9'(ee);
      neg = (ee < 0);
      #1;
      if (ip >= 48'h8000_0000_0000) begin
        esig = ip / 2;
        fe   = ee + 1;
        n_shift++;
      end else begin
        esig = ip;
        fe   = ee;
        n_noshift++;
      end
      checks++;
      if (nsig != esig || ne != 9'(fe) || udf != (fe < 1) || ovf != (fe > 254)) begin
        failures++;
        if (failures < 10) $display("FAIL ip=%h e=%0d -> %h %0d", ip, ee, nsig, ne);
      end
    end
    for (int v = 64; v < 256; v++) begin
      for (int ee = 0; ee <= 40; ee++) begin
        int fe;
        ip8 = 8'(v);
        e6  = 6'(ee);
        #1;
        fe = ee + ((v >= 128) ? 1 : 0);
        checks++;
        if (nsig8 != 8'((v >= 128) ? v / 2 : v) || ne6 != 6'(fe) ||
            udf6 != (fe < 1) || ovf6 != (fe > 30)) begin
          failures++;
          if (failures < 10) $display("FAIL small ip=%h e=%0d -> %h %0d", ip8, ee, nsig8, ne6);
        end
      end
    end
    checks++;
    if (n_shift == 0 || n_noshift == 0) begin
      failures++;
      $display("FAIL shift=%0d noshift=%0d", n_shift, n_noshift);
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
