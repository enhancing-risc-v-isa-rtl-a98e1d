// tb_fpu: runs FADD/FSUB/FMUL/FDIV through the single-precision FPU and
// compares with the reference (operate in double, round to single, which is
// exact rounding for these operations). Operands cover normal numbers over
// the whole exponent range, so results overflow to infinity and underflow to
// subnormals and zero, plus subnormal operands. Also checks the cycle count
// (5 / 8 / 12) and the special cases inf - inf, 0 x inf, 0/0 (NaN) and
// x/0 (infinity and dz).
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_fpu;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  aop_e        op;
  logic [31:0] a, b, result;
  logic        busy, done, dz;
  int checks = 0, failures = 0;

  fpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input aop_e o, input logic [31:0] x, input logic [31:0] y,
                     input logic [31:0] exp_r, input logic exp_dz);
    int cyc;
    @(negedge clk);
    op = o; a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 2;  // start cycle plus the current one
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (result !== exp_r || dz !== exp_dz) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got=%h exp=%h dz=%0d", o.name(), x, y, result, exp_r, dz);
    end
    checks++;
    if (cyc != int'(aop_latency(o))) begin
      failures++;
      $display("FAIL latency op=%s cycles=%0d", o.name(), cyc);
    end
  endtask

  function automatic logic [31:0] ref_op(input aop_e o, input logic [31:0] x, input logic [31:0] y);
    real rx, ry;
    rx = float_to_real(x);
    ry = float_to_real(y);
    unique case (o)
      AOP_ADD: return real_to_float(rx + ry);
      AOP_SUB: return real_to_float(rx - ry);
      AOP_MUL: return real_to_float(rx * ry);
      default: return real_to_float(rx / ry);
    endcase
  endfunction

  initial begin
    logic [31:0] x, y;
    op = AOP_ADD; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(AOP_ADD, 32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000, 1'b0);   // 1 + 1
    run(AOP_DIV, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB, 1'b0);   // 1 / 3
    run(AOP_SUB, 32'h7F80_0000, 32'h7F80_0000, 32'h7FC0_0000, 1'b0);   // inf - inf
    run(AOP_MUL, 32'h0000_0000, 32'h7F80_0000, 32'h7FC0_0000, 1'b0);   // 0 * inf
    run(AOP_DIV, 32'h0000_0000, 32'h0000_0000, 32'h7FC0_0000, 1'b0);   // 0 / 0
    run(AOP_DIV, 32'hBF80_0000, 32'h0000_0000, 32'hFF80_0000, 1'b1);   // -1 / 0
    run(AOP_MUL, 32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000, 1'b0);   // overflow
    run(AOP_ADD, 32'h0000_0001, 32'h0000_0001, 32'h0000_0002, 1'b0);   // subnormals
    for (int i = 0; i < 3000; i++) begin
      aop_e o;
      o = aop_e'($urandom_range(3));
      if (i < 1000) begin
        x = rand_float(100, 154); y = rand_float(100, 154);
      end else if (i < 2500) begin
        x = rand_float(1, 254); y = rand_float(1, 254);
      end else begin
        x = rand_float(0, 3); y = rand_float(0, 140);
      end
      if (o == AOP_SUB && i % 7 == 0) y = x;
      run(o, x, y, ref_op(o, x, y), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
