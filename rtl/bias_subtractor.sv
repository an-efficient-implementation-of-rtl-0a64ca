// Bias subtractor: r = s - BIAS as a ripple-borrow chain of 1-bit constant
// subtractors. Bit i uses a one subtractor (OS) where bit i of BIAS is 1 and a
// zero subtractor (ZS) where it is 0; each borrow out feeds the next bit and
// no borrow enters bit 0. For the default BIAS = 127 on 9 bits this is seven
// OS cells (bits 0..6) followed by two ZS cells (bits 7..8).
// b_out is the borrow out of the top bit: it is 1 exactly when s < BIAS,
// i.e. when the intermediate exponent is negative (underflow); r then holds
// the two's-complement difference. Purely combinational.
module bias_subtractor #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned BIAS  = 127
) (
  input  logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] r,
  output logic             b_out
);
  localparam logic [WIDTH-1:0] T = WIDTH'(BIAS);

  logic [WIDTH:0] bw;    // bw[i] is the borrow into bit i
  assign bw[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (T[i]) begin : g_os
      one_subtractor  u_os (.s(s[i]), .b_in(bw[i]), .r(r[i]), .b_out(bw[i+1]));
    end else begin : g_zs
      zero_subtractor u_zs (.s(s[i]), .b_in(bw[i]), .r(r[i]), .b_out(bw[i+1]));
    end
  end

  assign b_out = bw[WIDTH];
endmodule
