// fpu: the single-precision IEEE-754 floating-point unit of the core
// (FADD.S, FSUB.S, FMUL.S, FDIV.S, round to nearest, ties to even).
//
// It has the same structure and timing as the posit unit next to it, with
// the float unpacker and rounder in place of the posit decoder and encoder:
// operands are registered in the start cycle, unpacked in the next, the
// add/sub, multiply or divide result is registered in the third and rounded
// to single precision in the fourth. done pulses with a valid result
// LAT_ADD = 5, LAT_MUL = 8 or LAT_DIV = 12 cycles after (and including) the
// start cycle. Subnormals are handled in full; a NaN result is the canonical
// quiet NaN. dz is raised with done for a finite non-zero value divided by
// zero. A start while busy is ignored.
//
// The original design only names this unit and its instructions. Its
// structure and its cycle counts (made equal to the posit unit's) are this
// design's own choice, as is ignoring the rounding-mode field (always round
// to nearest even).
module fpu
  import xposit_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  aop_e        op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] result,
  output logic        dz
);

  logic [31:0] ra, rb, enc;
  aop_e        rop;
  logic [3:0]  cnt, lat;
  unp_t        ua, ub, da, db, y_add, y_mul, y_div, y_sel, y_q;
  logic        dz_c, dz_q, dz_y;

  float_to_unp u_unp_a (.f(ra), .u(ua));
  float_to_unp u_unp_b (.f(rb), .u(ub));

  unp_add u_add (.a(da), .b(db), .sub(rop == AOP_SUB), .y(y_add));
  unp_mul u_mul (.a(da), .b(db), .y(y_mul));
  unp_div u_div (.a(da), .b(db), .y(y_div), .dz(dz_c));

  always_comb begin
    unique case (rop)
      AOP_MUL: y_sel = y_mul;
      AOP_DIV: y_sel = y_div;
      default: y_sel = y_add;
    endcase
  end

  unp_to_float u_rnd (.u(y_q), .f(enc));

  assign lat  = 4'(aop_latency(op));
  assign dz_y = (rop == AOP_DIV) && dz_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; rop <= AOP_ADD;
      da <= '0; db <= '0; y_q <= '0; dz_q <= 1'b0;
      result <= '0; dz <= 1'b0;
      busy <= 1'b0; done <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      dz   <= 1'b0;
      if (start && !busy) begin
        ra <= a; rb <= b; rop <= op;
        busy <= 1'b1;
        cnt  <= lat - 4'd3;   // done shows lat-1 cycles after start
      end else if (busy) begin
        da <= ua; db <= ub;
        y_q  <= y_sel;
        dz_q <= dz_y;
        result <= enc;
        cnt <= cnt - 4'd1;
        if (cnt == 4'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
          dz   <= dz_q;
        end
      end
    end
  end

endmodule
