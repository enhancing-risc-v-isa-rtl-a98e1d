// posit_unit: the reconfigurable posit arithmetic unit of the core
// (posit<N,es> with es switchable between ES_MIN = 2 and ES_MAX = 3 at run
// time): decoder, adder/subtractor, multiplier, divider and encoder.
//
// Data flow: both operands go through a posit decoder; the decoded fields
// are routed (by op) to the adder/subtractor, the multiplier or the divider,
// whose result fields are multiplexed into the posit encoder, which packs
// and rounds the result (round to nearest, ties to even).
//
// Timing: start is a one-cycle pulse with the operands, op and es. The
// operands are registered in the start cycle, decoded fields in the next,
// the arithmetic result in the third and the encoded result in the fourth.
// done pulses, with result valid, in the last cycle of the operation:
// LAT_ADD = 5 cycles after (and including) the start cycle for add and
// subtract, LAT_MUL = 8 for multiply and LAT_DIV = 12 for divide; the
// result stays valid until the next start. The latencies are those of the
// posit accelerator measurements; the pipeline stages past the fourth only
// wait. dz is raised with done for a division of a non-zero, non-NaR value
// by zero (the result is NaR). A start while busy is ignored.
//
// Following the original description: decoder, add/sub, multiply, divide and
// encoder behind an operation select, es chosen per operation, and the
// cycle counts 5 / 8 / 12. This design's own choices: the shared unpacked
// form between stages, the start/busy/done handshake and the padding
// counter that sets the cycle count.
module posit_unit
  import xposit_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned ES_MIN = 2,
  parameter int unsigned ES_MAX = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  aop_e          op,
  input  logic [1:0]    es,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  result,
  output logic          dz
);

  logic [N-1:0] ra, rb;
  aop_e         rop;
  logic [1:0]   res_q;
  logic [3:0]   cnt, lat;
  unp_t         ua, ub, da, db, y_add, y_mul, y_div, y_sel, y_q;
  logic         dz_c, dz_q, dz_y;
  logic [N-1:0] enc;

  // field outputs of the decoders that only the unpacked form carries on
  logic                  za, na, sa, rsa, zb, nb, sb, rsb;
  logic [$clog2(N):0]    rna, rnb;
  logic signed [SW-1:0]  ka, kb;
  logic [ES_MAX-1:0]     ea, eb;
  logic [N-ES_MIN-4:0]   fa, fb;

  posit_decoder #(.N(N), .ES_MIN(ES_MIN), .ES_MAX(ES_MAX)) u_dec_a (
    .p(ra), .es(res_q), .zero(za), .nar(na), .sign(sa), .reg_s(rsa),
    .reg_n(rna), .k(ka), .exp_f(ea), .frac(fa), .u(ua));
  posit_decoder #(.N(N), .ES_MIN(ES_MIN), .ES_MAX(ES_MAX)) u_dec_b (
    .p(rb), .es(res_q), .zero(zb), .nar(nb), .sign(sb), .reg_s(rsb),
    .reg_n(rnb), .k(kb), .exp_f(eb), .frac(fb), .u(ub));

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

  posit_encoder #(.N(N), .ES_MIN(ES_MIN), .ES_MAX(ES_MAX)) u_enc (
    .u(y_q), .es(res_q), .p(enc));

  assign lat  = 4'(aop_latency(op));
  assign dz_y = (rop == AOP_DIV) && dz_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; rop <= AOP_ADD; res_q <= 2'd2;
      da <= '0; db <= '0; y_q <= '0; dz_q <= 1'b0;
      result <= '0; dz <= 1'b0;
      busy <= 1'b0; done <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      dz   <= 1'b0;
      if (start && !busy) begin
        ra <= a; rb <= b; rop <= op; res_q <= es;
        busy <= 1'b1;
        cnt  <= lat - 4'd3;   // done shows lat-1 cycles after start
      end else if (busy) begin
        da <= ua; db <= ub;   // stage 2: decoded operands
        y_q  <= y_sel;        // stage 3: arithmetic result
        dz_q <= dz_y;
        result <= enc;        // stage 4: encoded posit
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
