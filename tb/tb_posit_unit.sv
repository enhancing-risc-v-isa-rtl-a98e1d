// tb_posit_unit: runs add, subtract, multiply and divide through the
// reconfigurable posit<32,es> unit with es switching between 2 and 3 from
// one operation to the next. Results are compared with the reference
// (decode both operands to real, operate, round back to posit<32,es>), and
// the cycle count from start to done must be 5 for add/sub, 8 for multiply
// and 12 for divide. Directed cases cover zero, NaR, x/0 (NaR and dz) and
// saturation at maxpos.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_posit_unit;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  aop_e        op;
  logic [1:0]  es;
  logic [31:0] a, b, result;
  logic        busy, done, dz;
  int checks = 0, failures = 0;
  int n_es2 = 0, n_es3 = 0;

  posit_unit #(.N(32), .ES_MIN(2), .ES_MAX(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(input aop_e o, input logic [31:0] x,
                                         input logic [31:0] y, input int e);
    real rx, ry, r;
    if (x == 32'h8000_0000 || y == 32'h8000_0000) return 32'h8000_0000;
    rx = posit_to_real(64'(x), 32, e);
    ry = posit_to_real(64'(y), 32, e);
    unique case (o)
      AOP_ADD: r = rx + ry;
      AOP_SUB: r = rx - ry;
      AOP_MUL: r = rx * ry;
      default: begin
        if (ry == 0.0) return 32'h8000_0000;
        r = rx / ry;
      end
    endcase
    return 32'(real_to_posit(r, 32, e));
  endfunction

  task automatic run(input aop_e o, input logic [31:0] x, input logic [31:0] y, input int e,
                     input logic exp_dz);
    int cyc;
    logic [31:0] exp_r;
    exp_r = ref_op(o, x, y, e);
    @(negedge clk);
    op = o; a = x; b = y; es = 2'(e); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 2;  // start cycle plus the current one
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (result !== exp_r || dz !== exp_dz) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h es=%0d got=%h exp=%h dz=%0d", o.name(), x, y, e, result, exp_r, dz);
    end
    checks++;
    if (cyc != int'(aop_latency(o))) begin
      failures++;
      $display("FAIL latency op=%s cycles=%0d", o.name(), cyc);
    end
    if (e == 2) n_es2++; else n_es3++;
  endtask

  initial begin
    op = AOP_ADD; a = '0; b = '0; es = 2'd2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: 1 + 1 = 2, 3 * 0.5, 1 / 3, x / 0, NaR, zero, maxpos * maxpos
    for (int e = 2; e <= 3; e++) begin
      run(AOP_ADD, 32'h4000_0000, 32'h4000_0000, e, 1'b0);
      run(AOP_SUB, 32'h4000_0000, 32'h4000_0000, e, 1'b0);
      run(AOP_MUL, 32'(real_to_posit(3.0, 32, e)), 32'(real_to_posit(0.5, 32, e)), e, 1'b0);
      run(AOP_DIV, 32'h4000_0000, 32'(real_to_posit(3.0, 32, e)), e, 1'b0);
      run(AOP_DIV, 32'h4000_0000, 32'h0, e, 1'b1);
      run(AOP_DIV, 32'h0, 32'h4000_0000, e, 1'b0);
      run(AOP_ADD, 32'h8000_0000, 32'h4000_0000, e, 1'b0);
      run(AOP_MUL, 32'h7FFF_FFFF, 32'h7FFF_FFFF, e, 1'b0);
      run(AOP_MUL, 32'h0000_0001, 32'h0000_0001, e, 1'b0);
    end
    // random, es alternating every operation
    for (int i = 0; i < 3000; i++) begin
      aop_e o;
      o = aop_e'($urandom_range(3));
      run(o, 32'(rand_posit(32)), 32'(rand_posit(32)), 2 + (i % 2), 1'b0);
    end
    if (n_es2 == 0 || n_es3 == 0) begin failures++; $display("FAIL es modes not both used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
