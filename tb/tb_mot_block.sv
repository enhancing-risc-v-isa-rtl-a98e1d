// tb_mot_block: drives random MOT instructions (every combination of
// destination and source types, the four operations) with random values in
// the integer, float and posit source registers, and checks the decoded
// destination type and operation, the two converted operands (reference
// conversions) and the conversion cycle count (slower of the two
// conversions: I->F 3, I->P 6, F->I 10, F->P 2, P->I 14, P->F 5, same 0).
// Includes the three documented additions F6 = P2 + I5 (C051332B),
// P6 = F2 + I5 (C051532B) and I6 = P2 + F5 (6051632B).
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_mot_block;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  logic [31:0] ir;
  logic [1:0]  es;
  logic [31:0] int_rs1, int_rs2, flt_rs1, flt_rs2, pos_rs1, pos_rs2;
  dtype_e      xd;
  aop_e        aop;
  logic [31:0] opa, opb;
  logic [3:0]  conv_cycles;
  int checks = 0, failures = 0;

  mot_block dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat(input int s, input int d);
    if (s == d) return 0;
    if (s == 1) return (d == 2) ? 3 : 6;
    if (s == 2) return (d == 1) ? 10 : 2;
    return (d == 1) ? 14 : 5;
  endfunction

  function automatic logic [31:0] pick(input int t, input int which);
    if (t == 1) return which ? int_rs2 : int_rs1;
    if (t == 2) return which ? flt_rs2 : flt_rs1;
    return which ? pos_rs2 : pos_rs1;
  endfunction

  task automatic run(input logic [31:0] instr, input int e);
    int d, s1, s2, f4, el;
    ir = instr; es = 2'(e);
    int_rs1 = $urandom; int_rs2 = 32'($urandom_range(400)) - 200;
    flt_rs1 = rand_float(100, 150); flt_rs2 = rand_float(1, 254);
    pos_rs1 = 32'(rand_posit(32)); pos_rs2 = 32'(rand_posit(32));
    d  = int'({instr[31], instr[14]});
    s1 = int'({instr[30], instr[13]});
    s2 = int'({instr[29], instr[12]});
    f4 = int'(instr[28:25]);
    #1;
    checks++;
    el = (lat(s1, d) > lat(s2, d)) ? lat(s1, d) : lat(s2, d);
    if (int'(xd) != d || int'(aop) != f4 / 4 || opa !== ref_conv(s1, d, e, pick(s1, 0)) ||
        opb !== ref_conv(s2, d, e, pick(s2, 1)) || int'(conv_cycles) != el) begin
      failures++;
      $display("FAIL ir=%h xd=%0d aop=%0d opa=%h exp %h opb=%h exp %h cyc=%0d exp %0d", instr, xd,
               aop, opa, ref_conv(s1, d, e, pick(s1, 0)), opb, ref_conv(s2, d, e, pick(s2, 1)),
               conv_cycles, el);
    end
  endtask

  initial begin
    run(32'hC051332B, 2);   // F6 = P2 + I5
    run(32'hC051532B, 2);   // P6 = F2 + I5
    run(32'h6051632B, 2);   // I6 = P2 + F5
    run(32'hD051332B, 3);   // F6 = P2 * I5
    run(32'hD851532B, 3);   // P6 = F2 / I5
    for (int i = 0; i < 3000; i++) begin
      logic [1:0] d, s1, s2;
      logic [3:0] f4;
      d  = 2'($urandom_range(2) + 1);
      s1 = 2'($urandom_range(2) + 1);
      s2 = 2'($urandom_range(2) + 1);
      f4 = {2'($urandom), 2'b00};
      run({d[1], s1[1], s2[1], f4, 5'($urandom), 5'($urandom), d[0], s1[0], s2[0],
           5'($urandom), 7'b0101011}, 2 + (i % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
