// Exponent adder: computes the intermediate exponent E1 + E2 - BIAS.
// The two biased EXP_W-bit exponents are added by a ripple carry adder into an
// EXP_W+1-bit sum, which is registered (the first pipeline cut of the
// multiplier, placed in the middle of the exponent path); the bias is then
// subtracted by the ripple-borrow bias subtractor.
//
// Timing: exp_int and neg follow a_exp/b_exp by one clock. They are
// combinational from the register, so the top module registers them again
// (second pipeline cut). neg is the subtractor's final borrow: the
// intermediate exponent is negative. sum is the unregistered adder output.
// Reset is synchronous, active low (this design's choice).
module exponent_adder #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned BIAS  = 127
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [EXP_W-1:0] a_exp,
  input  logic [EXP_W-1:0] b_exp,
  output logic [EXP_W:0]   sum,
  output logic [EXP_W:0]   exp_int,
  output logic             neg
);
  logic [EXP_W:0] sum_q;

  ripple_carry_adder #(.WIDTH(EXP_W)) u_rca (.a(a_exp), .b(b_exp), .sum(sum));

  always_ff @(posedge clk) begin
    if (!rst_n) sum_q <= '0;
    else        sum_q <= sum;
  end

  bias_subtractor #(.WIDTH(EXP_W + 1), .BIAS(BIAS)) u_bias (
    .s(sum_q), .r(exp_int), .b_out(neg)
  );
endmodule
