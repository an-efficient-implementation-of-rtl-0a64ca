// Self-checking test of csa_multiplier.
// Two instances: the default 24 x 24 array (cut after row 12) and the 4 x 4
// array (cut after row 2). Operands change every clock; each product is
// compared one clock later with the integer product a * b, which also checks
// the one-clock latency. The 4 x 4 array sees all 256 operand pairs, the
// 24 x 24 array its corner values (0, 1, all ones, single bits) and random
// pairs, mostly with the top bit set as for normalised significands.
module tb_csa_multiplier;
  localparam int NR = 4000;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [23:0] a = '0, b = '0;
  logic [47:0] p;
  logic [3:0]  a4 = '0, b4 = '0;
  logic [7:0]  p4;
  int checks = 0, failures = 0, cycles = 0;

  csa_multiplier                      dut   (.clk(clk), .rst_n(rst_n), .a(a),  .b(b),  .p(p));
  csa_multiplier #(.N(4), .PIPE_ROW(2)) dut4 (.clk(clk), .rst_n(rst_n), .a(a4), .b(b4), .p(p4));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [23:0] pick(int i);
    case (i % 8)
      0: return 24'd0;
      1: return 24'd1;
      2: return 24'hFFFFFF;
      3: return 24'(1) << ($urandom % 24);
      4: return 24'h800000;
      default: return {($urandom % 8) != 0, 23'($urandom)};
    endcase
  endfunction

  initial begin
    logic [47:0] exp_p;
    logic [7:0]  exp_p4;
    bit          have = 1'b0;
    repeat (2) @(negedge clk);
    check(p == '0 && p4 == '0, "reset clears the pipeline");
    rst_n = 1'b1;
    for (int i = 0; i < NR; i++) begin
      @(negedge clk);
      if (have) begin
        check(p == exp_p, $sformatf("24x24 got %h expected %h", p, exp_p));
        check(p4 == exp_p4, $sformatf("4x4 got %h expected %h", p4, exp_p4));
      end
      a  = (i < 64) ? pick(i) : pick(5 + (i % 3));
      b  = (i < 64) ? pick(i / 8) : pick(5 + ($urandom % 3));
      a4 = 4'(i);
      b4 = 4'(i >> 4);
      exp_p  = 48'(a) * 48'(b);
      exp_p4 = 8'(a4) * 8'(b4);
      have   = 1'b1;
    end
    @(negedge clk);
    check(p == exp_p && p4 == exp_p4, "last product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > NR + 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
