// posit_decoder: splits an N-bit posit into its fields, for a run-time
// selectable exponent size of 2 or 3.
//
// Flow (combinational): flag the two exceptions (all zeros = zero, a lone
// MSB = NaR); take the two's complement of a negative word; the first body
// bit is the regime sign reg_s and a leading-zero count of the (inverted if
// reg_s) body gives the regime run length reg_n; the body is then shifted left
// past the regime and its terminating bit, leaving the exponent bits followed
// by the fraction bits. The regime value is k = reg_n-1 when reg_s = 1 and
// -reg_n otherwise.
//
// As in the reconfigurable posit unit, the exponent register is sized for
// the larger exponent size (ES_MAX = 3) and the fraction register for the
// smaller one (ES_MIN = 2): with es = 2 the exponent is zero-extended and
// with es = 3 the fraction is left-justified with a zero appended.
//
// Besides the fields, the decoder delivers the same number in the shared
// unpacked form (scale = k*2^es + exp, significand = 1.frac) used by the
// arithmetic cores and the type converters.
//
// Ports: p is the posit, es selects the exponent size (es = ES_MAX selects
// ES_MAX, any other value ES_MIN). Purely combinational.
//
// Following the original description: the steps of the decoding algorithm
// (two's complement of negative inputs, regime run by leading-one/zero
// count, shift out the regime, split exponent and fraction). This design's
// own choice: the extra unpacked output.
module posit_decoder
  import xposit_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned ES_MIN = 2,
  parameter int unsigned ES_MAX = 3
) (
  input  logic [N-1:0]          p,
  input  logic [1:0]            es,
  output logic                  zero,
  output logic                  nar,
  output logic                  sign,
  output logic                  reg_s,
  output logic [$clog2(N):0]    reg_n,
  output logic signed [SW-1:0]  k,
  output logic [ES_MAX-1:0]     exp_f,
  output logic [N-ES_MIN-4:0]   frac,
  output unp_t                  u
);

  localparam int unsigned FW = N - ES_MIN - 3;  // fraction register width

  logic [N-1:0] mag;
  logic [N-2:0] body, run, rest;
  logic [6:0]   lz;
  logic         es3;

  assign es3 = (32'(es) == ES_MAX);

  always_comb begin
    zero = (p == '0);
    nar  = p[N-1] && (p[N-2:0] == '0);
    sign = p[N-1];
    mag  = sign ? (~p + 1'b1) : p;
    body = mag[N-2:0];
    reg_s = body[N-2];
    run  = reg_s ? ~body : body;
    lz   = lzc64({run, {(65-N){1'b1}}});
    reg_n = ($clog2(N)+1)'(lz);
    k    = reg_s ? SW'(signed'({1'b0, lz}) - 1) : -SW'(signed'({1'b0, lz}));
    // drop regime run and its terminating bit
    rest = (int'(lz) + 1 >= N - 1) ? '0 : (body << (lz + 7'd1));
    if (es3) begin
      exp_f = rest[N-2 -: ES_MAX];
      frac  = {rest[N-2-ES_MAX -: FW-(ES_MAX-ES_MIN)], {(ES_MAX-ES_MIN){1'b0}}};
    end else begin
      exp_f = ES_MAX'(rest[N-2 -: ES_MIN]);
      frac  = rest[N-2-ES_MIN -: FW];
    end
    // unpacked form
    u       = '0;
    u.nan   = nar;
    u.zero  = zero;
    u.sign  = sign;
    u.scale = (es3 ? (k <<< ES_MAX) : (k <<< ES_MIN)) + SW'(exp_f);
    u.mant  = {1'b1, frac, {(MW-1-FW){1'b0}}};
    if (zero || nar) begin
      u.sign  = 1'b0;
      u.scale = '0;
      u.mant  = '0;
    end
  end

endmodule
