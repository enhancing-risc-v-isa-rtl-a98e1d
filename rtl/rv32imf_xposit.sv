// rv32imf_xposit: a multi-cycle RV32IMF core with posit arithmetic as a
// tightly coupled unit beside the floating-point unit, plus hardware data-type
// casting between integer, float and posit operands.
//
// Execution units and state:
//   * integer ALU with the integer bank x0-x31 (ADD SUB OR AND XOR MUL DIV,
//     ADDI XORI, LW SW, BEQ BNE);
//   * FPU with the float bank F0-F31 (FADD.S FSUB.S FMUL.S FDIV.S, opcode
//     OP-FP 1010011);
//   * reconfigurable posit<32,es> unit with the posit bank P0-P31 (PADD.S
//     PSUB.S PMUL.S PDIV.S on custom-0 0001011, encoded like the F
//     instructions: funct7 0000000 / 0000100 / 0001000 / 0001100);
//   * MOT block: mixed-operand R-type arithmetic on custom-1 0101011, each
//     operand converted to the destination type before the destination's
//     own unit runs;
//   * DTC block: single-operand type conversion on custom-2 1011011.
// The posit exponent size (2 or 3) is the run-time input es; it may be
// changed between instructions.
//
// Sequencing (one instruction at a time): IF (1 cycle) reads the
// instruction memory, ID (1 cycle) decodes and reads the three register
// banks. Integer, load/store and branch instructions then take EX, MEM and
// WB (5 cycles per instruction). Posit and float arithmetic enter their unit
// in the execute stage and write back in the unit's last cycle, skipping MEM
// and WB: 2 + 5 cycles for add/sub, 2 + 8 for multiply, 2 + 12 for divide.
// MOT and DTC instructions first spend CV cycles converting (the slower of
// the operand conversions, at least one cycle); DTC then writes back, MOT
// continues in the destination's unit as above.
//
// An all-zero instruction word halts the core (done = 1) until the next
// start. Unknown opcodes execute as no-ops. Division by zero in the posit
// unit or FPU sets the sticky dz_flag, cleared by start.
//
// Interface: the instruction memory is loaded through imem_we/imem_waddr/
// imem_wdata (word addresses) while the core is idle or halted; a start
// pulse begins execution at address 0. dbg_bank (01 integer, 10 float,
// 11 posit) and dbg_addr read any register combinationally.
//
// Following the original description: the three register banks, the posit
// unit beside the FPU, the MOT and DTC blocks, the instruction encodings and
// the unit cycle counts. This design's own choices: the multicycle state
// machine with 5 cycles per integer instruction, the halt word, the
// instruction loading and debug ports, and starting a unit only once it is
// idle.
module rv32imf_xposit
  import xposit_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [1:0]                    es,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  input  logic [1:0]                    dbg_bank,
  input  logic [4:0]                    dbg_addr,
  output logic [31:0]                   dbg_rdata,
  output logic                          done,
  output logic [31:0]                   pc,
  output logic                          dz_flag
);

  typedef enum logic [3:0] {
    S_IDLE, S_IF, S_ID, S_EX, S_MEM, S_WB, S_CV, S_UNIT, S_HALT
  } state_e;

  // instruction class decided in ID
  typedef enum logic [2:0] {
    C_ALU, C_LOAD, C_STORE, C_BRANCH, C_NOP
  } iclass_e;

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);

  state_e      state;
  iclass_e     icls;
  logic [31:0] ir, instr;
  logic [6:0]  opc;
  logic [4:0]  rd, rs1, rs2;
  logic [2:0]  f3;
  logic [6:0]  f7;

  // register bank read data
  logic [31:0] x_rs1, x_rs2, f_rs1, f_rs2, p_rs1, p_rs2;
  logic [31:0] x_dbg, f_dbg, p_dbg;
  // operand latches
  logic [31:0] xa, xb, fa, fb, pa, pb, imm;
  logic [31:0] alu_a, alu_b, alu_y, alu_res, mem_rdata, wb_data;
  logic [2:0]  alu_op;
  logic        br_taken;
  logic [31:0] pc_next;

  // units
  aop_e        uop;
  dtype_e      usel;            // DT_FLT or DT_POS: which unit runs
  logic [31:0] ua, ub;
  logic        ustarted;
  logic        pu_start, pu_busy, pu_done, pu_dz;
  logic        fu_start, fu_busy, fu_done, fu_dz;
  logic [31:0] pu_res, fu_res;

  // MOT / DTC
  dtype_e      mot_xd, dtc_xd;
  aop_e        mot_aop;
  logic [31:0] mot_a, mot_b, dtc_y;
  logic [3:0]  mot_cyc, dtc_cyc, cv_cnt;
  logic        is_mot;
  logic [3:0]  cv_cyc;
  logic        cv_last;

  // register bank writes
  logic        x_we, f_we, p_we;
  logic [31:0] x_wd, f_wd, p_wd;

  // ---------------------------------------------------------------- memories
  word_mem #(.DEPTH(IMEM_DEPTH), .WIDTH(32)) u_imem (
    .clk(clk), .raddr(pc[IAW+1:2]), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  logic          dmem_we;
  logic [DAW-1:0] dmem_addr;
  assign dmem_addr = alu_res[DAW+1:2];
  assign dmem_we   = (state == S_MEM) && (icls == C_STORE);

  word_mem #(.DEPTH(DMEM_DEPTH), .WIDTH(32)) u_dmem (
    .clk(clk), .raddr(dmem_addr), .rdata(mem_rdata),
    .we(dmem_we), .waddr(dmem_addr), .wdata(xb));

  // ---------------------------------------------------------------- decode
  assign opc = ir[6:0];
  assign rd  = ir[11:7];
  assign f3  = ir[14:12];
  assign rs1 = ir[19:15];
  assign rs2 = ir[24:20];
  assign f7  = ir[31:25];

  // --------------------------------------------------------- register banks
  regfile #(.ZERO_R0(1'b1)) u_xregs (
    .clk(clk), .rst_n(rst_n), .ra1(rs1), .rd1(x_rs1), .ra2(rs2), .rd2(x_rs2),
    .ra3(dbg_addr), .rd3(x_dbg), .we(x_we), .wa(rd), .wd(x_wd));
  regfile #(.ZERO_R0(1'b0)) u_fregs (
    .clk(clk), .rst_n(rst_n), .ra1(rs1), .rd1(f_rs1), .ra2(rs2), .rd2(f_rs2),
    .ra3(dbg_addr), .rd3(f_dbg), .we(f_we), .wa(rd), .wd(f_wd));
  regfile #(.ZERO_R0(1'b0)) u_pregs (
    .clk(clk), .rst_n(rst_n), .ra1(rs1), .rd1(p_rs1), .ra2(rs2), .rd2(p_rs2),
    .ra3(dbg_addr), .rd3(p_dbg), .we(p_we), .wa(rd), .wd(p_wd));

  always_comb begin
    unique case (dbg_bank)
      2'b10:   dbg_rdata = f_dbg;
      2'b11:   dbg_rdata = p_dbg;
      default: dbg_rdata = x_dbg;
    endcase
  end

  // ------------------------------------------------------------- MOT / DTC
  mot_block u_mot (
    .ir(ir), .es(es), .int_rs1(xa), .int_rs2(xb), .flt_rs1(fa), .flt_rs2(fb),
    .pos_rs1(pa), .pos_rs2(pb), .xd(mot_xd), .aop(mot_aop), .opa(mot_a),
    .opb(mot_b), .conv_cycles(mot_cyc));

  dtc_block u_dtc (
    .ir(ir), .es(es), .int_rs(xa), .flt_rs(fa), .pos_rs(pa), .xd(dtc_xd),
    .y(dtc_y), .conv_cycles(dtc_cyc));

  assign cv_cyc  = is_mot ? mot_cyc : dtc_cyc;
  assign cv_last = (state == S_CV) &&
                   (cv_cnt == 4'd1 || (cv_cnt == 4'd0 && cv_cyc <= 4'd1));

  // -------------------------------------------------------------- ALU
  int_alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  // ------------------------------------------------------ posit unit / FPU
  assign pu_start = (state == S_UNIT) && !ustarted && (usel == DT_POS) && !pu_busy;
  assign fu_start = (state == S_UNIT) && !ustarted && (usel == DT_FLT) && !fu_busy;

  posit_unit #(.N(32), .ES_MIN(2), .ES_MAX(3)) u_posit (
    .clk(clk), .rst_n(rst_n), .start(pu_start), .op(uop), .es(es), .a(ua),
    .b(ub), .busy(pu_busy), .done(pu_done), .result(pu_res), .dz(pu_dz));

  fpu u_fpu (
    .clk(clk), .rst_n(rst_n), .start(fu_start), .op(uop), .a(ua), .b(ub),
    .busy(fu_busy), .done(fu_done), .result(fu_res), .dz(fu_dz));

  // ------------------------------------------------------------ write-back
  assign wb_data = (icls == C_LOAD) ? mem_rdata : alu_res;

  always_comb begin
    x_we = 1'b0; f_we = 1'b0; p_we = 1'b0;
    x_wd = wb_data; f_wd = fu_res; p_wd = pu_res;
    if (state == S_WB && (icls == C_ALU || icls == C_LOAD))
      x_we = 1'b1;
    if (state == S_UNIT && ustarted && usel == DT_FLT && fu_done) f_we = 1'b1;
    if (state == S_UNIT && ustarted && usel == DT_POS && pu_done) p_we = 1'b1;
    if (cv_last && !is_mot) begin
      unique case (dtc_xd)
        DT_FLT:  begin f_we = 1'b1; f_wd = dtc_y; end
        DT_POS:  begin p_we = 1'b1; p_wd = dtc_y; end
        default: begin x_we = 1'b1; x_wd = dtc_y; end
      endcase
    end
  end

  // -------------------------------------------------------------- branches
  assign br_taken = (f3 == 3'b000) ? (xa == xb) : (f3 == 3'b001) ? (xa != xb) : 1'b0;
  assign pc_next  = (icls == C_BRANCH && br_taken) ? pc + imm : pc + 32'd4;

  // ------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; icls <= C_NOP; ir <= '0; pc <= '0;
      xa <= '0; xb <= '0; fa <= '0; fb <= '0; pa <= '0; pb <= '0; imm <= '0;
      alu_a <= '0; alu_b <= '0; alu_op <= 3'd0; alu_res <= '0;
      uop <= AOP_ADD; usel <= DT_POS; ua <= '0; ub <= '0; ustarted <= 1'b0;
      cv_cnt <= '0; is_mot <= 1'b0; dz_flag <= 1'b0;
    end else begin
      if ((pu_done && pu_dz) || (fu_done && fu_dz)) dz_flag <= 1'b1;
      unique case (state)
        S_IDLE, S_HALT: begin
          if (start) begin
            pc      <= '0;
            dz_flag <= 1'b0;
            state   <= S_IF;
          end
        end

        S_IF: begin
          ir    <= instr;
          state <= S_ID;
        end

        S_ID: begin
          xa <= x_rs1; xb <= x_rs2; fa <= f_rs1; fb <= f_rs2;
          pa <= p_rs1; pb <= p_rs2;
          alu_a  <= x_rs1;
          alu_b  <= x_rs2;
          icls   <= C_NOP;
          state  <= S_EX;
          is_mot <= 1'b0;
          ustarted <= 1'b0;
          uop    <= aop_from_funct4(f7[3:2]);
          ua     <= (opc == OPC_OPFP) ? f_rs1 : p_rs1;
          ub     <= (opc == OPC_OPFP) ? f_rs2 : p_rs2;
          unique case (opc)
            OPC_OP: begin
              icls <= C_ALU;
              if (f7 == 7'b0000001)
                alu_op <= (f3 == 3'b100) ? 3'd6 : 3'd5;
              else unique case (f3)
                3'b110:  alu_op <= 3'd2;
                3'b111:  alu_op <= 3'd3;
                3'b100:  alu_op <= 3'd4;
                default: alu_op <= (f7 == 7'b0100000) ? 3'd1 : 3'd0;
              endcase
            end
            OPC_OPIMM: begin
              icls  <= C_ALU;
              alu_b <= {{20{ir[31]}}, ir[31:20]};
              alu_op <= (f3 == 3'b100) ? 3'd4 : 3'd0;
            end
            OPC_LOAD: begin
              icls  <= C_LOAD;
              alu_b <= {{20{ir[31]}}, ir[31:20]};
              alu_op <= 3'd0;
            end
            OPC_STORE: begin
              icls  <= C_STORE;
              alu_b <= {{20{ir[31]}}, ir[31:25], ir[11:7]};
              alu_op <= 3'd0;
            end
            OPC_BRANCH: begin
              icls <= C_BRANCH;
              imm  <= {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
            end
            OPC_OPFP: begin
              usel  <= DT_FLT;
              state <= S_UNIT;
            end
            OPC_POSIT: begin
              usel  <= DT_POS;
              state <= S_UNIT;
            end
            OPC_MOT: begin
              is_mot <= 1'b1;
              state  <= S_CV;
            end
            OPC_DTC: begin
              state  <= S_CV;
            end
            default: icls <= C_NOP;
          endcase
          if (ir == 32'd0) state <= S_HALT;
        end

        S_CV: begin
          // cv_cnt counts down the conversion cycles; zero on entry means
          // "load the count" (at least one cycle is spent here)
          if (cv_cnt == 4'd0)
            cv_cnt <= cv_cyc - 4'd1;
          else
            cv_cnt <= cv_cnt - 4'd1;
          if (cv_last) begin
            cv_cnt <= 4'd0;
            if (!is_mot) begin
              pc    <= pc + 32'd4;
              state <= S_IF;
            end else begin
              uop <= mot_aop;
              ua  <= mot_a;
              ub  <= mot_b;
              unique case (mot_xd)
                DT_FLT: begin usel <= DT_FLT; state <= S_UNIT; end
                DT_POS: begin usel <= DT_POS; state <= S_UNIT; end
                default: begin
                  icls  <= C_ALU;
                  alu_a <= mot_a;
                  alu_b <= mot_b;
                  unique case (mot_aop)
                    AOP_SUB: alu_op <= 3'd1;
                    AOP_MUL: alu_op <= 3'd5;
                    AOP_DIV: alu_op <= 3'd6;
                    default: alu_op <= 3'd0;
                  endcase
                  state <= S_EX;
                end
              endcase
            end
          end
        end

        S_UNIT: begin
          if (pu_start || fu_start) ustarted <= 1'b1;   // wait until the unit is idle
          if (ustarted && (usel == DT_FLT ? fu_done : pu_done)) begin
            pc    <= pc + 32'd4;
            state <= S_IF;
          end
        end

        S_EX: begin
          alu_res <= alu_y;
          state   <= S_MEM;
        end

        S_MEM: begin
          state <= S_WB;
        end

        S_WB: begin
          pc    <= pc_next;
          state <= S_IF;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_HALT);

endmodule
