// dtc_block: Data Type Converter block. For a single-source instruction on
// the custom-2 opcode it reads the source register from the bank named by
// xs = IR[21:20], converts the value to the type named by xd = IR[23:22]
// (01 integer, 10 float, 11 posit) and hands the result to the core for
// write-back into the destination bank. rs = IR[19:15], rd = IR[11:7].
//
// A source multiplexer followed by one converter. Combinational;
// conv_cycles gives the number of cycles the core waits for the conversion.
//
// Following the original description: the field positions of xd and xs, the
// type codes and the select-then-convert structure. This design's own
// choices: type code 00 read as integer, and the conversion time taken from
// the measured conversion times rounded to 10 ns cycles.
module dtc_block
  import xposit_pkg::*;
(
  input  logic [31:0] ir,
  input  logic [1:0]  es,
  input  logic [31:0] int_rs,
  input  logic [31:0] flt_rs,
  input  logic [31:0] pos_rs,
  output dtype_e      xd,
  output logic [31:0] y,
  output logic [3:0]  conv_cycles
);

  dtype_e      xs;
  logic [31:0] src;

  assign xd = dtype_norm(ir[23:22]);
  assign xs = dtype_norm(ir[21:20]);

  always_comb begin
    unique case (xs)
      DT_FLT:  src = flt_rs;
      DT_POS:  src = pos_rs;
      default: src = int_rs;
    endcase
  end

  dtype_converter u_cv (.src(xs), .dst(xd), .es(es), .x(src), .y(y));

  assign conv_cycles = conv_latency(xs, xd);

endmodule
