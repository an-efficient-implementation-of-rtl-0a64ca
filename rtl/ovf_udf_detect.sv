// Overflow / underflow detection for the product exponent.
//
// The intermediate exponent E = E1 + E2 - 127 of two normal operands lies in
// -125 .. 381. category sorts it into the four ranges of fpm_pkg::exp_class_e.
// The flags are decided on the exponent after normalisation, which is E or
// E + 1:
//   underflow  E < 0 (neg, the bias subtractor's borrow), or the normalised
//              exponent is still 0. An E of 0 that normalisation raises to 1
//              is a normal result.
//   overflow   no underflow and the normalised exponent is 255 or more, so an
//              E of 254 that normalisation raises to 255 overflows.
// A normal result has an exponent of 1 .. 254. For other widths the limit is
// the largest exponent of a format whose stored exponent has IE_W-1 bits,
// 2^(IE_W-1) - 2. Purely combinational.
module ovf_udf_detect
  import fpm_pkg::*;
#(
  parameter int unsigned IE_W = 9
) (
  input  logic [IE_W-1:0] exp_int,   // intermediate exponent (two's complement if neg)
  input  logic             neg,       // intermediate exponent < 0
  input  logic [IE_W-1:0] exp_norm,  // exponent after normalisation
  output exp_class_e       category,
  output logic             overflow,
  output logic             underflow
);
  localparam logic [IE_W-1:0] ELIM = IE_W'((1 << (IE_W - 1)) - 2);   // 254 for IE_W = 9

  always_comb begin
    if (neg)                                category = EC_UNDERFLOW;
    else if (exp_int == '0)                 category = EC_ZERO;
    else if (exp_int <= ELIM)       category = EC_NORMAL;
    else                                    category = EC_OVERFLOW;
  end

  assign underflow = neg | (exp_norm == '0);
  assign overflow  = !underflow && (exp_norm > ELIM);
endmodule
