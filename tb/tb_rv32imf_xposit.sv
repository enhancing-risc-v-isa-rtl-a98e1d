// tb_rv32imf_xposit: end-to-end test of the RV32IMF_XPosit core at its
// default sizes.
//
// A small instruction-set model in the testbench executes the same program
// as the core, using the real-arithmetic reference functions, and predicts
// every register write (bank, register, value) and the cycle count of every
// instruction. A monitor collects the core's register-bank writes and
// per-instruction cycle counts and compares them in order; at the end all
// 96 registers are compared through the debug port.
//
// Program 1 contains the instruction words of the design's stand-alone and
// mixed test sets (integer, float, posit, MOT add/mul/div) plus loads,
// stores, a counted loop (BNE taken and not taken), BEQ, DTC conversions,
// subtraction in each unit and division by zero in the FPU and posit unit.
// Program 2 is a random mix of 300 float, posit, MOT and DTC instructions on
// registers seeded from integers. Each program is run with es = 2 and then
// again with es = 3, without reset in between.
//
// Each mechanism (integer ALU, load, store, branch taken / not taken, FPU,
// posit unit with es = 2 and es = 3, MOT to each destination type, DTC,
// division-by-zero flag, halt) is counted and must occur at least once.
//
// The instruction words of program 1 are taken from the original test sets;
// the instruction-set model, the random program and the checks are this
// testbench's own.
module tb_rv32imf_xposit;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0]  es;
  logic        imem_we;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  logic [1:0]  dbg_bank;
  logic [4:0]  dbg_addr;
  logic [31:0] dbg_rdata, pc;
  logic        done, dz_flag;

  rv32imf_xposit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1,
                                      input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input logic [2:0] f3,
                                      input int rd, input logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1);
    logic [11:0] im;
    im = 12'(imm);
    return {im[11:5], 5'(rs2), 5'(rs1), 3'b010, im[4:0], OPC_STORE};
  endfunction
  function automatic logic [31:0] b_t(input int imm, input int rs2, input int rs1,
                                      input logic [2:0] f3);
    logic [12:0] im;
    im = 13'(imm);
    return {im[12], im[10:5], 5'(rs2), 5'(rs1), f3, im[4:1], im[11], OPC_BRANCH};
  endfunction
  function automatic logic [31:0] dtc_t(input int xd, input int xs, input int rs, input int rd);
    return {8'd0, 2'(xd), 2'(xs), 5'(rs), 3'b000, 5'(rd), OPC_DTC};
  endfunction
  function automatic logic [31:0] mot_t(input int xd, input int xs1, input int xs2,
                                        input int f4, input int rs2, input int rs1, input int rd);
    logic [1:0] d, a, b;
    d = 2'(xd); a = 2'(xs1); b = 2'(xs2);
    return {d[1], a[1], b[1], 4'(f4), 5'(rs2), 5'(rs1), d[0], a[0], b[0], 5'(rd), OPC_MOT};
  endfunction

  // ------------------------------------------------------- reference model
  logic [31:0] prog [1024];
  int          prog_len;
  logic [31:0] mx [32];
  logic [31:0] mf [32];
  logic [31:0] mp [32];
  logic [31:0] mmem [1024];

  typedef struct {
    int          bank;
    int          rd;
    logic [31:0] val;
  } wr_t;
  wr_t exp_wr[$], got_wr[$];
  int  exp_cyc[$], got_cyc[$];

  // mechanism counters
  int n_alu, n_load, n_store, n_br_t, n_br_nt, n_fpu, n_pos2, n_pos3;
  int n_mot_i, n_mot_f, n_mot_p, n_dtc, n_dz, n_halt;

  function automatic int aop_lat(input int o);
    return (o == 2) ? 8 : (o == 3) ? 12 : 5;
  endfunction

  function automatic logic [31:0] fref(input int o, input logic [31:0] x, input logic [31:0] y);
    real rx, ry, r;
    logic xn, yn, xi, yi, xz, yz, sx;
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    yn = (y[30:23] == 8'hFF) && (y[22:0] != 0);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    yi = (y[30:23] == 8'hFF) && (y[22:0] == 0);
    xz = (x[30:0] == 0);
    yz = (y[30:0] == 0);
    if (o == 1) y[31] = ~y[31];
    sx = x[31] ^ y[31];
    if (xn || yn) return 32'h7FC0_0000;
    if (o <= 1) begin
      if (xi && yi && x[31] != y[31]) return 32'h7FC0_0000;
      if (xi) return x;
      if (yi) return y;
      if (xz && yz) return {x[31] & y[31], 31'd0};
      r = float_to_real(x) + float_to_real(y);
      if (r == 0.0) return 32'd0;
      return real_to_float(r);
    end
    if (o == 2) begin
      if ((xi && yz) || (xz && yi)) return 32'h7FC0_0000;
      if (xi || yi) return {sx, 8'hFF, 23'd0};
      if (xz || yz) return {sx, 31'd0};
      r = float_to_real(x) * float_to_real(y);
      if (r == 0.0) return {sx, 31'd0};
      return real_to_float(r);
    end
    if ((xz && yz) || (xi && yi)) return 32'h7FC0_0000;
    if (xi || yz) return {sx, 8'hFF, 23'd0};
    if (xz || yi) return {sx, 31'd0};
    rx = float_to_real(x); ry = float_to_real(y);
    r = rx / ry;
    if (r == 0.0) return {sx, 31'd0};
    return real_to_float(r);
  endfunction

  function automatic logic [31:0] pref(input int o, input logic [31:0] x, input logic [31:0] y,
                                       input int e);
    real rx, ry, r;
    if (x == 32'h8000_0000 || y == 32'h8000_0000) return 32'h8000_0000;
    rx = posit_to_real(64'(x), 32, e);
    ry = posit_to_real(64'(y), 32, e);
    unique case (o)
      0: r = rx + ry;
      1: r = rx - ry;
      2: r = rx * ry;
      default: begin
        if (ry == 0.0) return 32'h8000_0000;
        r = rx / ry;
      end
    endcase
    return 32'(real_to_posit(r, 32, e));
  endfunction

  function automatic logic [31:0] iref(input int o, input logic [31:0] x, input logic [31:0] y);
    longint sx, sy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    unique case (o)
      0: return 32'(sx + sy);
      1: return 32'(sx - sy);
      2: return 32'(sx * sy);
      default: begin
        if (y == 0) return 32'hFFFF_FFFF;
        return 32'(sx / sy);
      end
    endcase
  endfunction

  function automatic int conv_cyc(input int s, input int d);
    if (s == d) return 0;
    if (s == 1) return (d == 2) ? 3 : 6;
    if (s == 2) return (d == 1) ? 10 : 2;
    return (d == 1) ? 14 : 5;
  endfunction

  function automatic int norm_t(input int t);
    return (t == 0) ? 1 : t;
  endfunction

  task automatic put_wr(input int bank, input int rd, input logic [31:0] v);
    wr_t w;
    if (bank == 1 && rd == 0) return;
    w.bank = bank; w.rd = rd; w.val = v;
    exp_wr.push_back(w);
    if (bank == 1) mx[rd] = v;
    else if (bank == 2) mf[rd] = v;
    else mp[rd] = v;
  endtask

  // Executes the loaded program from address 0 until the halt word.
  task automatic model_run(input int e);
    int          mpc, steps;
    logic [31:0] ins;
    mpc = 0; steps = 0;
    forever begin
      logic [6:0] opc;
      logic [2:0] f3;
      logic [6:0] f7;
      int         rd, rs1, rs2, o;
      logic [31:0] imm;
      ins = prog[mpc / 4];
      if (ins == 32'd0) begin n_halt++; break; end
      steps++;
      if (steps > 5000) begin failures++; $display("FAIL model runaway"); break; end
      opc = ins[6:0]; f3 = ins[14:12]; f7 = ins[31:25];
      rd = int'(ins[11:7]); rs1 = int'(ins[19:15]); rs2 = int'(ins[24:20]);
      o = int'(f7[3:2]);
      case (opc)
        OPC_OP: begin
          logic [31:0] a, b, r;
          a = mx[rs1]; b = mx[rs2];
          if (f7 == 7'b0000001) r = (f3 == 3'b100) ? iref(3, a, b) : iref(2, a, b);
          else case (f3)
            3'b110: r = a | b;
            3'b111: r = a & b;
            3'b100: r = a ^ b;
            default: r = (f7 == 7'b0100000) ? a - b : a + b;
          endcase
          put_wr(1, rd, r); exp_cyc.push_back(5); n_alu++; mpc += 4;
        end
        OPC_OPIMM: begin
          imm = {{20{ins[31]}}, ins[31:20]};
          put_wr(1, rd, (f3 == 3'b100) ? (mx[rs1] ^ imm) : (mx[rs1] + imm));
          exp_cyc.push_back(5); n_alu++; mpc += 4;
        end
        OPC_LOAD: begin
          imm = {{20{ins[31]}}, ins[31:20]};
          put_wr(1, rd, mmem[10'((mx[rs1] + imm) >> 2)]);
          exp_cyc.push_back(5); n_load++; mpc += 4;
        end
        OPC_STORE: begin
          imm = {{20{ins[31]}}, ins[31:25], ins[11:7]};
          mmem[10'((mx[rs1] + imm) >> 2)] = mx[rs2];
          exp_cyc.push_back(5); n_store++; mpc += 4;
        end
        OPC_BRANCH: begin
          logic tk;
          imm = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
          tk = (f3 == 3'b000) ? (mx[rs1] == mx[rs2]) : (mx[rs1] != mx[rs2]);
          exp_cyc.push_back(5);
          if (tk) begin n_br_t++; mpc += int'($signed(imm)); end
          else begin n_br_nt++; mpc += 4; end
        end
        OPC_OPFP: begin
          put_wr(2, rd, fref(o, mf[rs1], mf[rs2]));
          exp_cyc.push_back(2 + aop_lat(o)); n_fpu++; mpc += 4;
        end
        OPC_POSIT: begin
          put_wr(3, rd, pref(o, mp[rs1], mp[rs2], e));
          exp_cyc.push_back(2 + aop_lat(o));
          if (e == 2) n_pos2++; else n_pos3++;
          mpc += 4;
        end
        OPC_DTC: begin
          int d, s;
          logic [31:0] src;
          d = norm_t(int'(ins[23:22])); s = norm_t(int'(ins[21:20]));
          src = (s == 1) ? mx[rs1] : (s == 2) ? mf[rs1] : mp[rs1];
          put_wr(d, rd, ref_conv(s, d, e, src));
          exp_cyc.push_back(2 + ((conv_cyc(s, d) > 1) ? conv_cyc(s, d) : 1));
          n_dtc++; mpc += 4;
        end
        OPC_MOT: begin
          int d, s1, s2, c, f4;
          logic [31:0] a, b, r;
          d  = norm_t(int'({ins[31], ins[14]}));
          s1 = norm_t(int'({ins[30], ins[13]}));
          s2 = norm_t(int'({ins[29], ins[12]}));
          f4 = int'(ins[28:27]);
          a = (s1 == 1) ? mx[rs1] : (s1 == 2) ? mf[rs1] : mp[rs1];
          b = (s2 == 1) ? mx[rs2] : (s2 == 2) ? mf[rs2] : mp[rs2];
          a = ref_conv(s1, d, e, a);
          b = ref_conv(s2, d, e, b);
          c = (conv_cyc(s1, d) > conv_cyc(s2, d)) ? conv_cyc(s1, d) : conv_cyc(s2, d);
          if (c < 1) c = 1;
          if (d == 1) begin
            r = iref(f4, a, b); exp_cyc.push_back(2 + c + 3); n_mot_i++;
          end else if (d == 2) begin
            r = fref(f4, a, b); exp_cyc.push_back(2 + c + aop_lat(f4)); n_mot_f++;
          end else begin
            r = pref(f4, a, b, e); exp_cyc.push_back(2 + c + aop_lat(f4)); n_mot_p++;
          end
          put_wr(d, rd, r);
          mpc += 4;
        end
        default: begin exp_cyc.push_back(5); mpc += 4; end
      endcase
    end
  endtask

  // ------------------------------------------------------------- monitor
  int cyc_cnt;
  bit in_instr;
  always @(posedge clk) begin
    if (rst_n) begin
      wr_t w;
      if (dut.x_we && dut.rd != 5'd0) begin w.bank = 1; w.rd = int'(dut.rd); w.val = dut.x_wd; got_wr.push_back(w); end
      if (dut.f_we) begin w.bank = 2; w.rd = int'(dut.rd); w.val = dut.f_wd; got_wr.push_back(w); end
      if (dut.p_we) begin w.bank = 3; w.rd = int'(dut.rd); w.val = dut.p_wd; got_wr.push_back(w); end
      // per-instruction cycle count: from IF to the next IF
      if (int'(dut.state) == 1) begin
        if (in_instr) got_cyc.push_back(cyc_cnt);
        in_instr = 1'b1;
        cyc_cnt = 1;
      end else if (int'(dut.state) == 8) begin
        in_instr = 1'b0;                    // halt word: not timed
      end else if (in_instr) cyc_cnt++;
    end
  end

  task automatic load_prog();
    @(negedge clk);
    for (int i = 0; i < prog_len + 1; i++) begin
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = (i < prog_len) ? prog[i] : 32'd0;
      @(negedge clk);
    end
    imem_we = 1'b0;
  endtask

  task automatic run_dut(input int e);
    int t;
    @(negedge clk);
    es = 2'(e);
    start = 1'b1; @(negedge clk); start = 1'b0;
    @(negedge clk);
    t = 0;
    while (!done && t < 200000) begin @(negedge clk); t++; end
    checks++;
    if (!done) begin failures++; $display("FAIL core did not halt"); end
    if (dz_flag) n_dz++;
  endtask

  task automatic compare_traces(input string tag);
    checks++;
    if (got_wr.size() != exp_wr.size()) begin
      failures++;
      $display("FAIL %s: %0d writes, expected %0d", tag, got_wr.size(), exp_wr.size());
    end
    for (int i = 0; i < exp_wr.size() && i < got_wr.size(); i++) begin
      checks++;
      if (got_wr[i].bank != exp_wr[i].bank || got_wr[i].rd != exp_wr[i].rd ||
          got_wr[i].val !== exp_wr[i].val) begin
        failures++;
        $display("FAIL %s write %0d: got bank %0d r%0d %h, expected bank %0d r%0d %h", tag, i,
                 got_wr[i].bank, got_wr[i].rd, got_wr[i].val, exp_wr[i].bank, exp_wr[i].rd,
                 exp_wr[i].val);
      end
    end
    checks++;
    if (got_cyc.size() != exp_cyc.size()) begin
      failures++;
      $display("FAIL %s: %0d instructions timed, expected %0d", tag, got_cyc.size(), exp_cyc.size());
    end
    for (int i = 0; i < exp_cyc.size() && i < got_cyc.size(); i++) begin
      checks++;
      if (got_cyc[i] != exp_cyc[i]) begin
        failures++;
        $display("FAIL %s instr %0d (%h): %0d cycles, expected %0d", tag, i, prog[i], got_cyc[i],
                 exp_cyc[i]);
      end
    end
    exp_wr.delete(); got_wr.delete(); exp_cyc.delete(); got_cyc.delete();
    // architectural state
    for (int b = 1; b <= 3; b++) begin
      for (int r = 0; r < 32; r++) begin
        dbg_bank = 2'(b); dbg_addr = 5'(r); #1;
        checks++;
        if (dbg_rdata !== ((b == 1) ? mx[r] : (b == 2) ? mf[r] : mp[r])) begin
          failures++;
          $display("FAIL %s final bank %0d r%0d = %h", tag, b, r, dbg_rdata);
        end
      end
    end
  endtask

  task automatic build_prog1();
    int n;
    n = 0;
    prog[n++] = 32'h00A00093;                          // ADDI x1,x0,10
    prog[n++] = i_t(-3, 0, 3'b000, 2, OPC_OPIMM);      // ADDI x2,x0,-3
    prog[n++] = i_t(7, 0, 3'b000, 3, OPC_OPIMM);       // ADDI x3,x0,7
    prog[n++] = 32'h00208233;                          // ADD x4,x1,x2
    prog[n++] = 32'h40128333;                          // SUB x6,x5,x1
    prog[n++] = 32'h0021E3B3;                          // OR x7,x3,x2
    prog[n++] = 32'h0311C513;                          // XORI x10,x3,49
    prog[n++] = r_t(7'b0000001, 2, 1, 3'b000, 8, OPC_OP);   // MUL x8,x1,x2
    prog[n++] = r_t(7'b0000001, 3, 8, 3'b100, 9, OPC_OP);   // DIV x9,x8,x3
    prog[n++] = r_t(7'b0000000, 3, 1, 3'b111, 11, OPC_OP);  // AND x11,x1,x3
    prog[n++] = s_t(8, 8, 0);                          // SW x8,8(x0)
    prog[n++] = i_t(8, 0, 3'b010, 12, OPC_LOAD);       // LW x12,8(x0)
    prog[n++] = i_t(5, 0, 3'b000, 5, OPC_OPIMM);       // ADDI x5,x0,5
    prog[n++] = i_t(0, 0, 3'b000, 13, OPC_OPIMM);      // ADDI x13,x0,0
    prog[n++] = i_t(3, 0, 3'b000, 14, OPC_OPIMM);      // ADDI x14,x0,3
    prog[n++] = r_t(7'b0000000, 1, 13, 3'b000, 13, OPC_OP);  // loop: ADD x13,x13,x1
    prog[n++] = i_t(-1, 14, 3'b000, 14, OPC_OPIMM);    // ADDI x14,x14,-1
    prog[n++] = b_t(-8, 0, 14, 3'b001);                // BNE x14,x0,loop
    prog[n++] = b_t(8, 0, 0, 3'b000);                  // BEQ x0,x0,+8
    prog[n++] = i_t(99, 0, 3'b000, 15, OPC_OPIMM);     // skipped
    prog[n++] = dtc_t(2, 1, 1, 1);                     // F1 <- x1
    prog[n++] = dtc_t(2, 1, 2, 2);                     // F2 <- x2
    prog[n++] = dtc_t(3, 1, 1, 1);                     // P1 <- x1
    prog[n++] = dtc_t(3, 1, 2, 2);                     // P2 <- x2
    prog[n++] = dtc_t(2, 1, 3, 5);                     // F5 <- x3
    prog[n++] = dtc_t(3, 1, 3, 5);                     // P5 <- x3
    prog[n++] = 32'h001101D3;                          // FADD.S F3,F2,F1
    prog[n++] = 32'h101101D3;                          // FMUL.S F3,F2,F1
    prog[n++] = 32'h181101D3;                          // FDIV.S F3,F2,F1
    prog[n++] = r_t(7'b0000100, 2, 1, 3'b000, 8, OPC_OPFP);   // FSUB.S F8,F1,F2
    prog[n++] = 32'h0011018B;                          // PADD PR3,PR2,PR1
    prog[n++] = 32'h1011028B;                          // PMUL PR5,PR2,PR1
    prog[n++] = 32'h1811038B;                          // PDIV PR7,PR2,PR1
    prog[n++] = r_t(7'b0000100, 2, 1, 3'b000, 8, OPC_POSIT);  // PSUB P8,P1,P2
    prog[n++] = 32'hC051332B;                          // F6 = P2 + I5
    prog[n++] = 32'hC051532B;                          // P6 = F2 + I5
    prog[n++] = 32'h6051632B;                          // I6 = P2 + F5
    prog[n++] = 32'hD051332B;                          // F6 = P2 * I5
    prog[n++] = 32'hD051532B;                          // P6 = F2 * I5
    prog[n++] = 32'h7051632B;                          // I6 = P2 * F5
    prog[n++] = 32'hD851332B;                          // F6 = P2 / I5
    prog[n++] = 32'hD851532B;                          // P6 = F2 / I5
    prog[n++] = 32'h7851532B;                          // I6 = F2 / P5 (as encoded)
    prog[n++] = mot_t(2, 3, 1, 4, 5, 2, 11);           // F11 = P2 - I5
    prog[n++] = dtc_t(3, 2, 3, 9);                     // P9 <- F3
    prog[n++] = dtc_t(1, 3, 7, 16);                    // x16 <- P7
    prog[n++] = dtc_t(2, 3, 7, 10);                    // F10 <- P7
    prog[n++] = dtc_t(1, 2, 3, 17);                    // x17 <- F3
    prog[n++] = r_t(7'b0001100, 0, 1, 3'b000, 9, OPC_OPFP);   // FDIV F9 = F1 / F0
    prog[n++] = r_t(7'b0001100, 0, 1, 3'b000, 10, OPC_POSIT); // PDIV P10 = P1 / P0
    prog[n] = 32'd0;
    prog_len = n;
  endtask

  task automatic build_prog2();
    int n;
    n = 0;
    // seed registers 1..8 of every bank from random integers
    for (int r = 1; r <= 8; r++) begin
      prog[n++] = i_t(int'($urandom_range(4000)) - 2000, 0, 3'b000, r, OPC_OPIMM);
      prog[n++] = dtc_t(2, 1, r, r);
      prog[n++] = dtc_t(3, 1, r, r);
    end
    for (int i = 0; i < 300; i++) begin
      int k, rd, ra, rb;
      k = int'($urandom_range(3));
      rd = 1 + int'($urandom_range(7)); ra = 1 + int'($urandom_range(7));
      rb = 1 + int'($urandom_range(7));
      unique case (k)
        0: prog[n++] = r_t({3'b000, 2'($urandom), 2'b00}, rb, ra, 3'b000, rd, OPC_OPFP);
        1: prog[n++] = r_t({3'b000, 2'($urandom), 2'b00}, rb, ra, 3'b000, rd, OPC_POSIT);
        2: prog[n++] = mot_t(1 + int'($urandom_range(2)), 1 + int'($urandom_range(2)),
                             1 + int'($urandom_range(2)), 4 * int'($urandom_range(3)), rb, ra, rd);
        default: prog[n++] = dtc_t(1 + int'($urandom_range(2)), 1 + int'($urandom_range(2)), ra, rd);
      endcase
    end
    prog[n] = 32'd0;
    prog_len = n;
  endtask

  initial begin
    es = 2'd2; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    dbg_bank = 2'd1; dbg_addr = '0;
    n_alu = 0; n_load = 0; n_store = 0; n_br_t = 0; n_br_nt = 0; n_fpu = 0; n_pos2 = 0;
    n_pos3 = 0; n_mot_i = 0; n_mot_f = 0; n_mot_p = 0; n_dtc = 0; n_dz = 0; n_halt = 0;
    in_instr = 1'b0; cyc_cnt = 0;
    for (int r = 0; r < 32; r++) begin mx[r] = '0; mf[r] = '0; mp[r] = '0; end
    for (int i = 0; i < 1024; i++) mmem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    build_prog1();
    load_prog();
    model_run(2);
    run_dut(2);
    compare_traces("prog1 es=2");
    model_run(3);
    run_dut(3);
    compare_traces("prog1 es=3");

    build_prog2();
    load_prog();
    model_run(2);
    run_dut(2);
    compare_traces("prog2 es=2");
    model_run(3);
    run_dut(3);
    compare_traces("prog2 es=3");

    $display("mechanisms: alu=%0d load=%0d store=%0d br_taken=%0d br_not_taken=%0d fpu=%0d",
             n_alu, n_load, n_store, n_br_t, n_br_nt, n_fpu);
    $display("            posit_es2=%0d posit_es3=%0d mot_int=%0d mot_flt=%0d mot_pos=%0d dtc=%0d dz=%0d halt=%0d",
             n_pos2, n_pos3, n_mot_i, n_mot_f, n_mot_p, n_dtc, n_dz, n_halt);
    begin
      int m [14];
      m = '{n_alu, n_load, n_store, n_br_t, n_br_nt, n_fpu, n_pos2, n_pos3, n_mot_i,
            n_mot_f, n_mot_p, n_dtc, n_dz, n_halt};
      for (int i = 0; i < 14; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
