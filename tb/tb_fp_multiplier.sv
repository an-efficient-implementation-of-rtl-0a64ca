// End-to-end, self-checking test of fp_multiplier at its default (and only)
// size. A new operand pair enters on every clock; each result is checked
// exactly three clocks later, which checks both the latency and the rate of
// one operation per clock.
//
// Reference: the operands are widened to IEEE doubles and multiplied in real
// arithmetic. A double holds the full 48-bit significand product exactly, so
// its exponent and the top 46 bits of its fraction are the expected 9-bit
// exponent (rebiased to 127) and fraction; the underflow / overflow flags
// follow the rebiased exponent being below 1 or above 254.
//
// Stimulus: first the worked example 40 x -7.5 = -300 with its known output
// pattern, then operands aimed at each mechanism of the design, then random
// normal operands. The test counts how often each mechanism occurs and fails
// if one never does: normalising shift, no shift, overflow by exponent sum,
// overflow caused by the normalising shift, underflow by a negative
// exponent, underflow at exponent zero without a shift, a zero exponent
// rescued by the shift, and a reset in the middle of a stream.
module tb_fp_multiplier;
  import fpm_pkg::*;

  localparam int NRAND = 20000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic [55:0] out;
  logic        ovf, udf;
  exp_class_e  cat;

  int checks = 0, failures = 0, cycles = 0;
  int n_shift = 0, n_noshift = 0, n_ovf_sum = 0, n_ovf_norm = 0, n_udf_neg = 0,
      n_udf_zero = 0, n_zero_rescued = 0, n_reset = 0, n_normal = 0;

  fp_multiplier dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                     .top_multiplier_out(out), .overflow(ovf), .underflow(udf),
                     .category(cat));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  typedef struct {
    logic [55:0] out;
    logic        ovf, udf;
    exp_class_e  cat;
  } result_t;

  result_t pipe[3];   // expected results of the last three inputs, [0] newest
  bit      live[3];

  function automatic real to_real(logic [31:0] x);
    // single -> double, exact for normal numbers
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction

  function automatic result_t model(logic [31:0] x, logic [31:0] y, bit count);
    result_t     r;
    real         prod;
    logic [63:0] d;
    int          e_int, e_fin, shift;
    prod  = to_real(x) * to_real(y);
    d     = $realtobits(prod);
    e_int = int'(x[30:23]) + int'(y[30:23]) - 127;
    e_fin = int'(d[62:52]) - 1023 + 127;
    shift = e_fin - e_int;
    r.udf = (e_fin < 1);
    r.ovf = (e_fin > 254);
    r.cat = (e_int < 0) ? EC_UNDERFLOW : (e_int == 0) ? EC_ZERO
          : (e_int <= 254) ? EC_NORMAL : EC_OVERFLOW;
    r.out = r.udf ? {d[63], 55'd0} : {d[63], 9'(e_fin), d[51:6]};
    if (count) begin
      if (shift == 1) n_shift++; else n_noshift++;
      if (e_int > 254) n_ovf_sum++;
      if (e_int == 254 && shift == 1) n_ovf_norm++;
      if (e_int < 0) n_udf_neg++;
      if (e_int == 0 && shift == 0) n_udf_zero++;
      if (e_int == 0 && shift == 1) n_zero_rescued++;
      if (!r.udf && !r.ovf) n_normal++;
    end
    return r;
  endfunction

  // Operand pair whose exponents sum to e_int + 127; big fractions force the
  // normalising shift, zero fractions prevent it.
  task automatic aim(int e_int, int kind, output logic [31:0] x, output logic [31:0] y);
    int lo, hi, ea;
    lo = (e_int + 127 - 254 > 1) ? e_int + 127 - 254 : 1;
    hi = (e_int + 126 < 254) ? e_int + 126 : 254;
    ea = lo + int'($urandom % (hi - lo + 1));
    x = {1'($urandom), 8'(ea), 23'($urandom)};
    y = {1'($urandom), 8'(e_int + 127 - ea), 23'($urandom)};
    if (kind == 1) begin x[22:21] = 2'b11; y[22:21] = 2'b11; end   // >= 1.75^2 > 2
    if (kind == 0) begin x[22:0] = '0; end                          // 1.0 x 1.f < 2
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // apply one operand pair, then check the result that was applied 3 clocks ago
  task automatic step(logic [31:0] x, logic [31:0] y);
    @(negedge clk);
    if (live[2])
      check(out == pipe[2].out && ovf == pipe[2].ovf && udf == pipe[2].udf && cat == pipe[2].cat,
            $sformatf("out=%h ovf=%0b udf=%0b cat=%0d expected %h %0b %0b %0d",
                      out, ovf, udf, cat, pipe[2].out, pipe[2].ovf, pipe[2].udf, pipe[2].cat));
    a = x;
    b = y;
    pipe[2] = pipe[1];  live[2] = live[1];
    pipe[1] = pipe[0];  live[1] = live[0];
    pipe[0] = model(x, y, 1'b1);
    live[0] = 1'b1;
  endtask

  initial begin
    logic [31:0] x, y;
    live = '{default: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // worked example: 40 x -7.5 = -300
    step(32'h4220_0000, 32'hC0F0_0000);
    @(negedge clk); @(negedge clk);
    check(out == 56'h0, "result must not appear before the third clock");
    live = '{default: 1'b0};
    @(negedge clk);
    check(out == {1'b1, 9'd135, 46'b001011 << 40} && !ovf && !udf && cat == EC_NORMAL,
          $sformatf("40 x -7.5 gave %h", out));

    // aimed cases
    for (int i = 0; i < 200; i++) begin
      case (i % 8)
        0: aim(0, 0, x, y);                          // zero, stays zero: underflow
        1: aim(0, 1, x, y);                          // zero, rescued by the shift
        2: aim(254, 1, x, y);                        // overflow from the shift
        3: aim(254, 0, x, y);                        // largest normal
        4: aim(-1 - int'($urandom % 125), 2, x, y);  // negative: underflow
        5: aim(255 + int'($urandom % 127), 2, x, y); // overflow by the sum
        6: aim(1, 0, x, y);                          // smallest normal
        default: aim(int'($urandom % 254) + 1, 2, x, y);
      endcase
      step(x, y);
    end

    // reset in the middle of the stream: the pipeline must be cleared
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(out == '0 && !ovf && !udf && cat == EC_ZERO, "reset clears the outputs");
    live = '{default: 1'b0};
    n_reset++;

    // random normal operands
    for (int i = 0; i < NRAND; i++) begin
      x = {1'($urandom), 8'(1 + $urandom % 254), 23'($urandom)};
      y = {1'($urandom), 8'(1 + $urandom % 254), 23'($urandom)};
      step(x, y);
    end
    repeat (3) step(32'h3F80_0000, 32'h3F80_0000);

    $display("shift=%0d noshift=%0d ovf_sum=%0d ovf_norm=%0d udf_neg=%0d udf_zero=%0d zero_rescued=%0d normal=%0d reset=%0d",
             n_shift, n_noshift, n_ovf_sum, n_ovf_norm, n_udf_neg, n_udf_zero, n_zero_rescued, n_normal, n_reset);
    check(n_shift > 0, "no normalising shift");
    check(n_noshift > 0, "no unshifted result");
    check(n_ovf_sum > 0, "no overflow by exponent sum");
    check(n_ovf_norm > 0, "no overflow by normalisation");
    check(n_udf_neg > 0, "no underflow by negative exponent");
    check(n_udf_zero > 0, "no underflow at exponent zero");
    check(n_zero_rescued > 0, "no zero exponent rescued");
    check(n_normal > 0, "no normal result");
    check(n_reset > 0, "no reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > NRAND + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
