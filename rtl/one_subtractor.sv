// One subtractor (OS): a 1-bit subtractor whose subtrahend T is the constant 1.
// It computes S - 1 - Bi:
//   difference R     = not (S xor Bi)
//   borrow out  Bo   = (not S) or Bi
// With T fixed the general subtractor reduces to these two gates, which is
// what makes a constant-bias subtractor cheap. Purely combinational.
module one_subtractor (
  input  logic s,      // minuend bit S
  input  logic b_in,   // borrow in Bi
  output logic r,      // difference R
  output logic b_out   // borrow out Bo
);
  assign r     = ~(s ^ b_in);
  assign b_out = ~s | b_in;
endmodule
