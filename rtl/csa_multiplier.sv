// Unsigned N x N carry-save array multiplier with one pipeline register.
//
// Partial products a[i] & b[j] feed an array of adder cells:
//   row 1         N-1 half adders; cell j adds a[j+1]&b[0] and a[j]&b[1]
//   rows 2..N-1   N-1 full adders each; in row r, cell j (weight r+j) adds
//                 a[j]&b[r], the sum of the row above at the same weight (for
//                 the top cell: the leftover partial product a[N-1]&b[r-1])
//                 and the carry of the row above, which moves one column to
//                 the left on its way down ("carry save")
//   merging row   a ripple carry adder (one half adder, N-2 full adders) that
//                 adds the last row's sums and carries, plus a[N-1]&b[N-1]
//                 at the top, to give the upper product bits
// The lowest sum of each row is a finished product bit. The critical path
// runs from the first row through the carry chain of the merging row.
//
// Pipelining: the sums and carries leaving row PIPE_ROW, the finished low
// product bits and both operands are registered, cutting the array in two.
// p therefore follows a and b by exactly one clock. PIPE_ROW = N/2 is this
// design's choice of "the middle"; any value 1..N-1 works.
// Reset is synchronous, active low.
// Lint reports unused bits by construction: the lowest sum of a row is a
// product bit, not an input of the next row, and each row uses only two bits
// of its view of b.
module csa_multiplier #(
  parameter int unsigned N        = 24,
  parameter int unsigned PIPE_ROW = N / 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // ------------------------------------------------------------------
  // Stage register at the cut
  // ------------------------------------------------------------------
  logic [N-1:0]    a_q, b_q;
  logic [N-2:0]    cut_s, cut_c, cut_s_q, cut_c_q;
  logic [PIPE_ROW:0] plo, plo_q;        // product bits finished before the cut
  logic [N-1:0]    p_low;               // product bits 0 .. N-1

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      cut_s_q <= '0;
      cut_c_q <= '0;
      plo_q   <= '0;
    end else begin
      a_q     <= a;
      b_q     <= b;
      cut_s_q <= cut_s;
      cut_c_q <= cut_c;
      plo_q   <= plo;
    end
  end

  assign plo[0] = a[0] & b[0];

  // ------------------------------------------------------------------
  // Rows 1 .. N-1. Each row exposes s_o / c_o to the row below: its own
  // sums and carries, or their registered copies if the cut follows it.
  // ------------------------------------------------------------------
  for (genvar r = 1; r < N; r++) begin : g_row
    logic [N-1:0] aa, bb;     // operands as seen by this row
    logic [N-2:0] s, c;       // cell j: sum of weight r+j, carry of weight r+j+1
    logic [N-2:0] s_o, c_o;

    if (r > PIPE_ROW) begin : g_late
      assign aa = a_q;
      assign bb = b_q;
    end else begin : g_early
      assign aa = a;
      assign bb = b;
    end

    if (r == 1) begin : g_first
      for (genvar j = 0; j < N - 1; j++) begin : g_ha
        half_adder u_ha (.a(aa[j+1] & bb[0]), .b(aa[j] & bb[1]), .s(s[j]), .co(c[j]));
      end
    end else begin : g_mid
      for (genvar j = 0; j < N - 1; j++) begin : g_fa
        logic upper;
        if (j < N - 2) begin : g_in
          assign upper = g_row[r-1].s_o[j+1];
        end else begin : g_top
          assign upper = aa[N-1] & bb[r-1];
        end
        full_adder u_fa (.a(aa[j] & bb[r]), .b(upper), .ci(g_row[r-1].c_o[j]),
                         .s(s[j]), .co(c[j]));
      end
    end

    if (r == PIPE_ROW) begin : g_cut
      assign cut_s = s;
      assign cut_c = c;
      assign s_o   = cut_s_q;
      assign c_o   = cut_c_q;
    end else begin : g_pass
      assign s_o = s;
      assign c_o = c;
    end

    if (r <= PIPE_ROW) begin : g_plo
      assign plo[r]   = s[0];
      assign p_low[r] = plo_q[r];
    end else begin : g_phi
      assign p_low[r] = s[0];
    end
  end

  assign p_low[0] = plo_q[0];

  // ------------------------------------------------------------------
  // Vector-merging row: ripple carry over weights N .. 2N-2
  // ------------------------------------------------------------------
  logic [N-2:0] mc;   // ripple carry out of merging cell j

  half_adder u_mha (.a(g_row[N-1].s_o[1]), .b(g_row[N-1].c_o[0]),
                    .s(p[N]), .co(mc[0]));

  for (genvar j = 1; j < N - 1; j++) begin : g_merge
    logic upper;
    if (j < N - 2) begin : g_in
      assign upper = g_row[N-1].s_o[j+1];
    end else begin : g_top
      assign upper = a_q[N-1] & b_q[N-1];
    end
    full_adder u_mfa (.a(upper), .b(g_row[N-1].c_o[j]), .ci(mc[j-1]),
                      .s(p[N+j]), .co(mc[j]));
  end

  assign p[2*N-1]  = mc[N-2];
  assign p[N-1:0]  = p_low;
endmodule
