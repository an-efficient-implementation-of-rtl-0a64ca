// Half adder: adds two bits. s = a xor b, co = a and b.
// Purely combinational. It is the first cell of the exponent ripple carry
// adder, the cell of the first row of the carry-save multiplier and the
// lowest cell of its vector-merging row.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
