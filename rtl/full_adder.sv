// Full adder: adds three bits (A, B and carry in Ci) into a sum S and a carry
// out Co. Purely combinational; the carry is the majority of the three inputs.
// Used in the exponent ripple carry adder and in the middle and
// vector-merging rows of the carry-save multiplier.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
