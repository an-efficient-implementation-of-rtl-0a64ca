// IEEE 754 single-precision floating-point multiplier, three pipeline stages,
// no rounding.
//
// The sign, the exponent and the significand are computed in parallel:
//   sign         a.sign xor b.sign                         (sign_bit)
//   exponent     a.exp + b.exp - 127                       (exponent_adder)
//   significand  1.a.frac x 1.b.frac, full 48-bit product  (csa_multiplier)
// and the 48-bit product and the exponent are then normalised (normalizer),
// which also detects overflow and underflow.
//
// Pipeline registers (latency 3 clocks, one new operation per clock):
//   cut 1  inside the significand multiplier (after row 12 of the carry-save
//          array) and inside the exponent adder, before the bias subtraction
//   cut 2  after the significand multiplier and after the exponent adder
//   cut 3  at the outputs
// The sign is carried through all three.
//
// Output top_multiplier_out[55:0] = {sign, exponent[8:0], fraction[45:0]}:
// the 9-bit exponent is the normalised biased exponent and the fraction is
// bits 45:0 of the normalised product, i.e. everything below the leading one
// of the full-precision product, kept so that a following adder (e.g. in a
// multiply-accumulate unit) can use all of it. Only a right shift by one can
// drop a bit. On underflow the exponent and fraction are forced to zero (the
// sign is kept) and underflow is set; on overflow the value is passed as
// computed and overflow is set. category reports the class of the
// intermediate exponent before normalisation (see fpm_pkg).
//
// Operands are taken to be normal numbers (exponent 1..254); zero, subnormal,
// infinite and NaN operands are not treated specially. Reset is synchronous
// and active low; it clears all pipeline registers. The reset, the flag
// policy and the category output are this design's choices.
module fp_multiplier
  import fpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [55:0] top_multiplier_out,
  output logic        overflow,
  output logic        underflow,
  output exp_class_e  category
);
  localparam int unsigned IP_W = 2 * SIG_W;       // 48
  localparam int unsigned IE_W = EXP_W + 1;       // 9

  fp32_t fa, fb;
  assign fa = a;
  assign fb = b;

  // ---------------- sign ----------------
  logic sign_0, sign_1, sign_2;
  sign_bit u_sign (.a_sign(fa.sign), .b_sign(fb.sign), .sign(sign_0));

  // ---------------- exponent (cut 1 inside) ----------------
  logic [IE_W-1:0] exp_int_1, exp_int_2;
  logic            exp_neg_1, exp_neg_2;
  exponent_adder #(.EXP_W(EXP_W), .BIAS(BIAS)) u_exp (
    .clk(clk), .rst_n(rst_n),
    .a_exp(fa.exponent), .b_exp(fb.exponent),
    .sum(), .exp_int(exp_int_1), .neg(exp_neg_1)
  );

  // ---------------- significand (cut 1 inside) ----------------
  logic [IP_W-1:0] ip_1, ip_2;
  csa_multiplier #(.N(SIG_W)) u_mul (
    .clk(clk), .rst_n(rst_n),
    .a({1'b1, fa.fraction}), .b({1'b1, fb.fraction}),
    .p(ip_1)
  );

  // ---------------- cut 2 ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_1    <= 1'b0;
      sign_2    <= 1'b0;
      exp_int_2 <= '0;
      exp_neg_2 <= 1'b0;
      ip_2      <= '0;
    end else begin
      sign_1    <= sign_0;
      sign_2    <= sign_1;
      exp_int_2 <= exp_int_1;
      exp_neg_2 <= exp_neg_1;
      ip_2      <= ip_1;
    end
  end

  // ---------------- normalisation and range check ----------------
  logic [IP_W-1:0] norm_sig;
  logic [IE_W-1:0] norm_exp;
  exp_class_e      cat_2;
  logic            ovf_2, udf_2;
  normalizer #(.IP_W(IP_W), .IE_W(IE_W)) u_norm (
    .significand_mul_op(ip_2), .exponent_add_op(exp_int_2), .exp_neg(exp_neg_2),
    .normalized_significand(norm_sig), .normalized_exponent(norm_exp),
    .category(cat_2), .overflow(ovf_2), .underflow(udf_2)
  );

  // ---------------- cut 3: outputs ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      top_multiplier_out <= '0;
      overflow           <= 1'b0;
      underflow          <= 1'b0;
      category           <= EC_ZERO;
    end else begin
      top_multiplier_out <= udf_2 ? {sign_2, 55'd0}
                                  : {sign_2, norm_exp, norm_sig[IP_W-3:0]};
      overflow           <= ovf_2;
      underflow          <= udf_2;
      category           <= cat_2;
    end
  end

  // After normalisation nothing is left above bit IP_W-2.
  assert property (@(posedge clk) disable iff (!rst_n) !norm_sig[IP_W-1])
    else $error("normalised significand has a bit above the leading-one position");
endmodule
