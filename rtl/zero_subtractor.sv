// Zero subtractor (ZS): a 1-bit subtractor whose subtrahend T is the constant 0.
// It computes S - Bi:
//   difference R     = S xor Bi
//   borrow out  Bo   = (not S) and Bi
// Purely combinational.
module zero_subtractor (
  input  logic s,      // minuend bit S
  input  logic b_in,   // borrow in Bi
  output logic r,      // difference R
  output logic b_out   // borrow out Bo
);
  assign r     = s ^ b_in;
  assign b_out = ~s & b_in;
endmodule
