// Ripple carry adder for the two biased exponents.
// A half adder at bit 0 followed by WIDTH-1 full adders; each carry out feeds
// the next cell. The WIDTH-bit sum and the last carry are concatenated into a
// WIDTH+1-bit result, so the addition never overflows. Speed is not critical
// here: the significand multiplier is the long path, so the simplest adder
// is used. Purely combinational.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum    // {Co of the top cell, S[WIDTH-1:0]}
);
  logic [WIDTH-1:0] c;   // carry out of each cell

  half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(sum[0]), .co(c[0]));

  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i-1]), .s(sum[i]), .co(c[i]));
  end

  assign sum[WIDTH] = c[WIDTH-1];
endmodule
