// dtype_converter: converts one 32-bit value between the three data types
// of the core: two's-complement integer, IEEE-754 single float and
// posit<32,es> (es = 2 or 3, selected at run time).
//
// The source is unpacked by the integer unpacker, the float unpacker or the
// posit decoder (selected by src) into the shared sign / scale / significand
// form, and packed by the integer rounder, the float rounder or the posit
// encoder (selected by dst); all round to nearest, ties to even. When src
// and dst are the same type the value passes unchanged. Special values map
// as: posit NaR -> float NaN / integer 0x7FFFFFFF; float NaN and infinity ->
// posit NaR; float infinity -> saturated integer. Purely combinational.
//
// Following the original description: which conversions exist and the time
// each one takes. This design's own choices: the insides (every conversion
// goes through the shared unpacked form), round to nearest even, and the
// special-value mapping (NaN/NaR to integer 0x7FFFFFFF, float inf/NaN to NaR,
// NaR to float NaN).
module dtype_converter
  import xposit_pkg::*;
(
  input  dtype_e      src,
  input  dtype_e      dst,
  input  logic [1:0]  es,
  input  logic [31:0] x,
  output logic [31:0] y
);

  unp_t        u_i, u_f, u_p, u;
  logic [31:0] y_i, y_f, y_p;

  // posit decoder fields that only the unpacked form carries on
  logic                  pz, pn, ps, prs;
  logic [5:0]            prn;
  logic signed [SW-1:0]  pk;
  logic [2:0]            pe;
  logic [26:0]           pf;

  int_to_unp    u_i2u (.x(x), .u(u_i));
  float_to_unp  u_f2u (.f(x), .u(u_f));
  posit_decoder #(.N(32), .ES_MIN(2), .ES_MAX(3)) u_p2u (
    .p(x), .es(es), .zero(pz), .nar(pn), .sign(ps), .reg_s(prs), .reg_n(prn),
    .k(pk), .exp_f(pe), .frac(pf), .u(u_p));

  always_comb begin
    unique case (src)
      DT_FLT:  u = u_f;
      DT_POS:  u = u_p;
      default: u = u_i;
    endcase
  end

  unp_to_int    u_u2i (.u(u), .x(y_i));
  unp_to_float  u_u2f (.u(u), .f(y_f));
  posit_encoder #(.N(32), .ES_MIN(2), .ES_MAX(3)) u_u2p (.u(u), .es(es), .p(y_p));

  always_comb begin
    if (src == dst)
      y = x;
    else begin
      unique case (dst)
        DT_FLT:  y = y_f;
        DT_POS:  y = y_p;
        default: y = y_i;
      endcase
    end
  end

endmodule
