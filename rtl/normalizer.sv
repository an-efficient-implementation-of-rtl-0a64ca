// Normalizer for the intermediate product.
//
// The product of two significands 1.M lies in [1, 4), so with the radix point
// between bits IP_W-3 and IP_W-2 its leading one is at bit IP_W-2 or IP_W-1
// (46 or 47 for the 48-bit product):
//   - leading one at IP_W-2: already normalised, passed on unchanged;
//   - leading one at IP_W-1: shifted right by one place through a row of
//     2:1 multiplexers, and the exponent incremented by one.
// The bit shifted out is dropped; no rounding is done. The overflow/underflow
// detector sits inside, since it needs both the exponent before and after
// the increment. Purely combinational.
module normalizer
  import fpm_pkg::*;
#(
  parameter int unsigned IP_W  = 48,
  parameter int unsigned IE_W = 9
) (
  input  logic [IP_W-1:0]  significand_mul_op,   // intermediate product
  input  logic [IE_W-1:0] exponent_add_op,      // intermediate exponent
  input  logic             exp_neg,              // intermediate exponent < 0
  output logic [IP_W-1:0]  normalized_significand,
  output logic [IE_W-1:0] normalized_exponent,
  output exp_class_e       category,
  output logic             overflow,
  output logic             underflow
);
  logic shift;
  assign shift = significand_mul_op[IP_W-1];

  // Multiplexer row: bit i takes bit i+1 when shifting.
  for (genvar i = 0; i < IP_W; i++) begin : g_mux
    if (i == IP_W - 1) begin : g_top
      assign normalized_significand[i] = shift ? 1'b0 : significand_mul_op[i];
    end else begin : g_bit
      assign normalized_significand[i] = shift ? significand_mul_op[i+1]
                                               : significand_mul_op[i];
    end
  end

  assign normalized_exponent = exponent_add_op + IE_W'(shift);

  ovf_udf_detect #(.IE_W(IE_W)) u_detect (
    .exp_int  (exponent_add_op),
    .neg      (exp_neg),
    .exp_norm (normalized_exponent),
    .category (category),
    .overflow (overflow),
    .underflow(underflow)
  );
endmodule
