// xposit_pkg: types and constants shared by the RV32IMF_XPosit core.
//
// All three number formats of the core (32-bit two's-complement integer,
// IEEE-754 single and posit<32,es>) are turned into one common "unpacked"
// form before arithmetic or conversion: a sign, a signed binary scale and a
// left-justified significand whose MSB is the hidden one. Arithmetic cores
// work on that form and keep a sticky bit in the significand LSB, so each
// encoder can round to its own precision (round to nearest, ties to even).
//
// Opcodes follow the instruction listing of the design: custom-0 (0x0B) for
// the posit instructions, custom-1 (0x2B) for mixed-operand (MOT)
// instructions and custom-2 (0x5B) for data-type conversion (DTC).
//
// The opcodes and type codes follow the original description; the unpacked
// form and its widths are this design's own choice.
package xposit_pkg;

  // Significand width of the unpacked form (bit MW-1 is the hidden one,
  // bit 0 collects the sticky bit of an inexact result).
  localparam int unsigned MW = 40;
  // Width of the signed binary scale.
  localparam int unsigned SW = 12;

  typedef struct packed {
    logic                 nan;    // NaN (float) or NaR (posit)
    logic                 inf;    // float infinity
    logic                 zero;
    logic                 sign;
    logic signed [SW-1:0] scale;  // value = (-1)^sign * mant/2^(MW-1) * 2^scale
    logic [MW-1:0]        mant;
  } unp_t;

  // Operand / destination data types, as coded in the MOT and DTC formats.
  typedef enum logic [1:0] {
    DT_NONE = 2'b00,
    DT_INT  = 2'b01,
    DT_FLT  = 2'b10,
    DT_POS  = 2'b11
  } dtype_e;

  // Arithmetic operation, taken from funct7[3:0] / funct4 of the instruction
  // (the IEEE F-extension coding: 0000 add, 0100 sub, 1000 mul, 1100 div).
  typedef enum logic [1:0] {
    AOP_ADD = 2'd0,
    AOP_SUB = 2'd1,
    AOP_MUL = 2'd2,
    AOP_DIV = 2'd3
  } aop_e;

  // Major opcodes used by the core.
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_OPFP   = 7'b1010011;
  localparam logic [6:0] OPC_POSIT  = 7'b0001011;  // custom-0
  localparam logic [6:0] OPC_MOT    = 7'b0101011;  // custom-1
  localparam logic [6:0] OPC_DTC    = 7'b1011011;  // custom-2

  // Cycles an arithmetic operation occupies the execute stage (start cycle
  // to result cycle, inclusive).
  localparam int unsigned LAT_ADD = 5;
  localparam int unsigned LAT_MUL = 8;
  localparam int unsigned LAT_DIV = 12;

  // Cycles a data-type conversion takes (conversion times measured on the
  // reference FPGA implementation at 100 MHz, 10 ns per cycle); the same
  // type needs no conversion.
  localparam int unsigned CONV_I2F = 3;
  localparam int unsigned CONV_I2P = 6;
  localparam int unsigned CONV_F2I = 10;
  localparam int unsigned CONV_F2P = 2;
  localparam int unsigned CONV_P2I = 14;
  localparam int unsigned CONV_P2F = 5;

  // DT_NONE is read as an integer operand.
  function automatic dtype_e dtype_norm(input logic [1:0] t);
    return (t == 2'b00) ? DT_INT : dtype_e'(t);
  endfunction

  function automatic logic [3:0] conv_latency(input dtype_e src, input dtype_e dst);
    logic [3:0] c;
    c = 4'd0;
    if (src == DT_INT && dst == DT_FLT) c = 4'(CONV_I2F);
    if (src == DT_INT && dst == DT_POS) c = 4'(CONV_I2P);
    if (src == DT_FLT && dst == DT_INT) c = 4'(CONV_F2I);
    if (src == DT_FLT && dst == DT_POS) c = 4'(CONV_F2P);
    if (src == DT_POS && dst == DT_INT) c = 4'(CONV_P2I);
    if (src == DT_POS && dst == DT_FLT) c = 4'(CONV_P2F);
    return c;
  endfunction

  // Only funct4[3:2] distinguishes the four operations.
  function automatic aop_e aop_from_funct4(input logic [1:0] f4_hi);
    unique case (f4_hi)
      2'b00:   return AOP_ADD;
      2'b01:   return AOP_SUB;
      2'b10:   return AOP_MUL;
      default: return AOP_DIV;
    endcase
  endfunction

  // Number of leading zeros of a 64-bit word (64 for an all-zero word).
  function automatic logic [6:0] lzc64(input logic [63:0] v);
    logic [6:0] n;
    n = 7'd64;
    for (int i = 0; i < 64; i++) begin
      if (v[i]) n = 7'(63 - i);
    end
    return n;
  endfunction

  function automatic int unsigned aop_latency(input aop_e op);
    unique case (op)
      AOP_MUL: return LAT_MUL;
      AOP_DIV: return LAT_DIV;
      default: return LAT_ADD;
    endcase
  endfunction

endpackage
