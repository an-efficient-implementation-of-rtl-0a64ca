// Sign of the product: negative exactly when one operand is negative, so the
// result sign is the exclusive-or of the two operand signs. Purely
// combinational; the top module delays it to line up with the other paths.
module sign_bit (
  input  logic a_sign,
  input  logic b_sign,
  output logic sign
);
  assign sign = a_sign ^ b_sign;
endmodule
