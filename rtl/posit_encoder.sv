// posit_encoder: builds and rounds an N-bit posit from an unpacked result,
// for a run-time selectable exponent size of 2 or 3.
//
// The binary scale of the result is split into the regime value
// k = floor(scale / 2^es) and the exponent e = scale mod 2^es, which give the
// regime sign reg_s = (k >= 0) and run length reg_n. The word REF holds the
// regime terminating bit, e and the fraction, followed by guard, round and
// sticky room; it is shifted right reg_n places with reg_s filling the vacant
// MSBs. The top N-1 bits are rounded to nearest, ties to even, using the
// next bit as guard and the OR of all lower bits (and the incoming sticky
// bit) as sticky. The sign is then applied by two's complement.
//
// Results beyond the largest or below the smallest posit saturate to maxpos
// or minpos (a posit never rounds to zero or to NaR). A zero input gives 0,
// NaN or infinity gives NaR.
//
// Ports: u is the result in the shared unpacked form, es selects the
// exponent size (es = ES_MAX selects ES_MAX, otherwise ES_MIN), p is the
// posit. Purely combinational.
//
// Following the original description: the REF word, the right shift by the
// regime run filling with the regime sign, the guard/round/sticky room and
// the zero and NaR exceptions. This design's own choices: ties-to-even
// rounding and saturation at maxpos/minpos, as in the posit standard.
module posit_encoder
  import xposit_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned ES_MIN = 2,
  parameter int unsigned ES_MAX = 3
) (
  input  unp_t          u,
  input  logic [1:0]    es,
  output logic [N-1:0]  p
);

  // REF: terminator bit + exponent + fraction (MW-1 bits) + room for the
  // shift so that no set bit is shifted out.
  localparam int unsigned RW = N + 1 + ES_MAX + MW;

  logic                  es3;
  logic signed [SW-1:0]  k;
  logic [ES_MAX-1:0]     e;
  logic                  reg_s;
  logic [SW-1:0]         reg_n;
  logic [RW-1:0]         refw, shifted;
  logic [2*RW-1:0]       wide;
  logic [N-2:0]          body, rounded;
  logic                  guard, sticky, rnd;

  assign es3 = (32'(es) == ES_MAX);

  always_comb begin
    if (es3) begin
      k = u.scale >>> ES_MAX;
      e = u.scale[ES_MAX-1:0];
    end else begin
      k = u.scale >>> ES_MIN;
      e = ES_MAX'(u.scale[ES_MIN-1:0]);
    end
    reg_s = (k >= 0);
    reg_n = reg_s ? SW'(k + 1) : SW'(-k);
    refw = '0;
    if (es3)
      refw[RW-1 -: 1+ES_MAX+MW-1] = {~reg_s, e, u.mant[MW-2:0]};
    else
      refw[RW-1 -: 1+ES_MIN+MW-1] = {~reg_s, e[ES_MIN-1:0], u.mant[MW-2:0]};
    wide    = {{RW{reg_s}}, refw} >> reg_n;
    shifted = wide[RW-1:0];
    body    = shifted[RW-1 -: N-1];
    guard   = shifted[RW-N];
    sticky  = |shifted[RW-N-1:0];
    rnd     = guard & (sticky | body[0]);
    rounded = body + (N-1)'(rnd);

    if (u.nan || u.inf)
      p = {1'b1, {(N-1){1'b0}}};
    else if (u.zero)
      p = '0;
    else begin
      if (k >= signed'(SW'(N - 2)))
        rounded = {(N-1){1'b1}};                 // maxpos
      else if (k <= -signed'(SW'(N - 1)))
        rounded = {{(N-2){1'b0}}, 1'b1};         // minpos
      p = u.sign ? (~{1'b0, rounded} + 1'b1) : {1'b0, rounded};
    end
  end

endmodule
