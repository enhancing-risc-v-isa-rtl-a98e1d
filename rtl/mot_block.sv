// mot_block: Mixed Operand Type block. For an R-type instruction on the
// custom-1 opcode whose two sources and destination may each be an integer,
// float or posit register, it selects each source operand from the bank its
// type names and converts it to the destination type, so that the
// destination's own functional unit (integer ALU, FPU or posit unit) can then
// perform the operation, e.g. F6 = P2 + I5 becomes F6 = float(P2) + float(I5).
//
// Instruction fields: xd = {IR[31],IR[14]}, xs1 = {IR[30],IR[13]},
// xs2 = {IR[29],IR[12]} (01 integer, 10 float, 11 posit), funct4 = IR[28:25]
// (0000 add, 0100 sub, 1000 mul, 1100 div), rs2 = IR[24:20],
// rs1 = IR[19:15], rd = IR[11:7].
//
// Stage 1 is a multiplexer per source driven by xs1 / xs2; stage 2 a
// converter per source that passes the operand through when its type already
// equals xd. Combinational; conv_cycles gives the number of cycles the core
// waits for the slower of the two conversions.
//
// Following the original description: the field positions, the two-stage
// select-then-convert structure and the type codes. This design's own
// choices: type code 00 read as integer and the conversion cycle counts
// rounded from the measured conversion times.
module mot_block
  import xposit_pkg::*;
(
  input  logic [31:0] ir,
  input  logic [1:0]  es,
  input  logic [31:0] int_rs1,
  input  logic [31:0] int_rs2,
  input  logic [31:0] flt_rs1,
  input  logic [31:0] flt_rs2,
  input  logic [31:0] pos_rs1,
  input  logic [31:0] pos_rs2,
  output dtype_e      xd,
  output aop_e        aop,
  output logic [31:0] opa,
  output logic [31:0] opb,
  output logic [3:0]  conv_cycles
);

  dtype_e      xs1, xs2;
  logic [31:0] src1, src2;
  logic [3:0]  c1, c2;

  assign xd  = dtype_norm({ir[31], ir[14]});
  assign xs1 = dtype_norm({ir[30], ir[13]});
  assign xs2 = dtype_norm({ir[29], ir[12]});
  assign aop = aop_from_funct4(ir[28:27]);

  always_comb begin
    unique case (xs1)
      DT_FLT:  src1 = flt_rs1;
      DT_POS:  src1 = pos_rs1;
      default: src1 = int_rs1;
    endcase
    unique case (xs2)
      DT_FLT:  src2 = flt_rs2;
      DT_POS:  src2 = pos_rs2;
      default: src2 = int_rs2;
    endcase
  end

  dtype_converter u_cv1 (.src(xs1), .dst(xd), .es(es), .x(src1), .y(opa));
  dtype_converter u_cv2 (.src(xs2), .dst(xd), .es(es), .x(src2), .y(opb));

  assign c1 = conv_latency(xs1, xd);
  assign c2 = conv_latency(xs2, xd);
  assign conv_cycles = (c1 > c2) ? c1 : c2;

endmodule
