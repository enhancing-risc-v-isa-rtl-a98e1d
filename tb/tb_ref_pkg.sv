// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL with real (double-precision) arithmetic.
//
//   posit_to_real  decodes a posit<n,es> bit by bit (regime run scan);
//   real_to_posit  rounds a real to posit<n,es> by rounding the infinite
//                  bit string (regime, exponent, fraction) to n-1 bits,
//                  nearest, ties to even, never to zero or NaR;
//   float_to_real / real_to_float  IEEE-754 single <-> real, round to
//                  nearest even, with subnormals and overflow to infinity;
//   real_to_int    round to nearest even with saturation to 32 bits.
// Sums, products and quotients of two singles computed in double and then
// rounded to single are correctly rounded; for posit<32,es> operands the
// double intermediate is exact for most operand pairs, so rare mismatches
// from double rounding are possible only for near-tie results.
//
// The reference models are this package's own, built from the posit
// definition and IEEE-754, not from the RTL.
package tb_ref_pkg;

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  // binary exponent of a positive real: 2^sc <= ax < 2^(sc+1)
  function automatic int scale_of(input real ax);
    int  sc;
    real v;
    sc = 0; v = ax;
    while (v >= 2.0) begin v = v / 2.0; sc++; end
    while (v < 1.0)  begin v = v * 2.0; sc--; end
    return sc;
  endfunction

  function automatic real posit_to_real(input logic [63:0] p, input int n, input int es);
    logic [63:0] a;
    logic        s, r0;
    int          i, run, k, e, nfr;
    real         f;
    a = p & ((64'd1 << n) - 1);
    if (a == 0) return 0.0;
    s = a[n-1];
    if (s) a = ((~a) + 1) & ((64'd1 << n) - 1);
    r0 = a[n-2];
    run = 0;
    i = n - 2;
    while (i >= 0 && a[i] == r0) begin run++; i--; end
    i--;  // skip terminating bit
    k = r0 ? run - 1 : -run;
    e = 0;
    for (int j = 0; j < es; j++) begin
      e = e * 2;
      if (i >= 0) begin e = e + int'(a[i]); i--; end
    end
    f = 1.0;
    nfr = 0;
    while (i >= 0) begin
      nfr++;
      if (a[i]) f = f + pow2(-nfr);
      i--;
    end
    return (s ? -1.0 : 1.0) * f * pow2(k * (1 << es) + e);
  endfunction

  function automatic logic [63:0] real_to_posit(input real x, input int n, input int es);
    logic [63:0] body, mask, reg_bits;
    real         ax, t, rem, ti_r;
    int          sc, k, e, rl, nb;
    logic        s;
    longint      ti;
    mask = (64'd1 << n) - 1;
    if (x == 0.0) return 64'd0;
    s  = (x < 0.0);
    ax = s ? -x : x;
    sc = scale_of(ax);
    k  = (sc >= 0) ? sc / (1 << es) : -((-sc + (1 << es) - 1) / (1 << es));
    e  = sc - k * (1 << es);
    if (k >= n - 2) body = (64'd1 << (n - 1)) - 1;          // maxpos
    else if (k <= -(n - 1)) body = 64'd1;                    // minpos
    else begin
      if (k >= 0) begin
        rl = k + 2;
        reg_bits = ((64'd1 << (k + 1)) - 1) << 1;            // k+1 ones, 0
      end else begin
        rl = -k + 1;
        reg_bits = 64'd1;                                     // -k zeros, 1
      end
      nb   = n - 1 - rl;
      t    = (real'(e) + (ax / pow2(sc) - 1.0)) * pow2(nb - es);
      ti_r = $floor(t);
      rem  = t - ti_r;
      ti   = longint'(ti_r);
      body = (reg_bits << nb) | 64'(ti);
      if (rem > 0.5 || (rem == 0.5 && body[0])) body = body + 1;
      if (body >= (64'd1 << (n - 1))) body = (64'd1 << (n - 1)) - 1;
      if (body == 0) body = 64'd1;
    end
    return s ? (((~body) + 1) & mask) : body;
  endfunction

  function automatic real float_to_real(input logic [31:0] f);
    int  ex;
    real m;
    ex = int'(f[30:23]);
    m  = real'(f[22:0]) / pow2(23);
    if (ex == 0) return (f[31] ? -1.0 : 1.0) * m * pow2(-126);
    return (f[31] ? -1.0 : 1.0) * (1.0 + m) * pow2(ex - 127);
  endfunction

  function automatic logic [31:0] real_to_float(input real x);
    real    ax, q, qi, rem, r;
    int     sc, qsc;
    logic   s;
    longint m;
    s = (x < 0.0);
    ax = s ? -x : x;
    if (ax == 0.0) return {s, 31'd0};
    sc  = scale_of(ax);
    qsc = (sc < -126) ? -149 : sc - 23;
    q   = ax / pow2(qsc);
    qi  = $floor(q);
    rem = q - qi;
    if (rem > 0.5 || (rem == 0.5 && (longint'(qi) % 2 == 1))) qi = qi + 1.0;
    r = qi * pow2(qsc);
    if (r >= pow2(128)) return {s, 8'hFF, 23'd0};
    if (r < pow2(-126)) begin
      m = longint'(r / pow2(-149));
      return {s, 8'd0, m[22:0]};
    end
    sc = scale_of(r);
    m  = longint'((r / pow2(sc) - 1.0) * pow2(23));
    return {s, 8'(sc + 127), m[22:0]};
  endfunction

  function automatic logic [31:0] real_to_int(input real x);
    real fl, d;
    fl = $floor(x);
    d  = x - fl;
    if (d > 0.5 || (d == 0.5 && (longint'(fl) % 2 != 0))) fl = fl + 1.0;
    if (fl >= 2147483647.0) return 32'h7FFF_FFFF;
    if (fl <= -2147483648.0) return 32'h8000_0000;
    return 32'(longint'(fl));
  endfunction

  // Reference type conversion between integer (1), float (2) and
  // posit<32,es> (3), with the special-value mapping of the design.
  function automatic logic [31:0] ref_conv(input int src, input int dst, input int es,
                                           input logic [31:0] x);
    real v;
    if (src == dst) return x;
    if (src == 2 && x[30:23] == 8'hFF) begin          // float inf / NaN
      if (dst == 3) return 32'h8000_0000;
      if (x[22:0] != 0) return 32'h7FFF_FFFF;
      return x[31] ? 32'h8000_0000 : 32'h7FFF_FFFF;
    end
    if (src == 3 && x == 32'h8000_0000) begin         // NaR
      return (dst == 2) ? 32'h7FC0_0000 : 32'h7FFF_FFFF;
    end
    unique case (src)
      1:       v = real'($signed(x));
      2:       v = float_to_real(x);
      default: v = posit_to_real(64'(x), 32, es);
    endcase
    unique case (dst)
      1:       return real_to_int(v);
      2:       return real_to_float(v);
      default: return 32'(real_to_posit(v, 32, es));
    endcase
  endfunction

  // Random posit<n,es> bit patterns, avoiding zero and NaR.
  function automatic logic [63:0] rand_posit(input int n);
    logic [63:0] p;
    p = {$urandom, $urandom} & ((64'd1 << n) - 1);
    if (p == 0 || p == (64'd1 << (n - 1))) p = 64'd1 << (n - 2);
    return p;
  endfunction

  // Random finite single with exponent field in [lo, hi].
  function automatic logic [31:0] rand_float(input int lo, input int hi);
    logic [31:0] f;
    f = $urandom;
    f[30:23] = 8'(lo + int'($urandom_range(hi - lo)));
    return f;
  endfunction

endpackage
