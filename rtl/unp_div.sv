// unp_div: divider on the shared unpacked form; the posit unit's division
// block and the FPU's divider.
//
// The result sign is the XOR of the operand signs, the scales subtract and
// the significand of A, extended by MW+1 zero bits, is divided by that of B.
// The quotient of two significands in [1,2) lies in (1/2,2): without its
// top bit set the result is shifted one place and the scale reduced by one.
// A non-zero remainder and the dropped quotient bits form the sticky LSB.
// Specials: NaN in, 0/0 or inf/inf gives NaN; x/0 and inf/x give inf (NaR
// after posit encoding) and raise dz for x/0; 0/x and x/inf give zero.
// Purely combinational.
//
// Following the original description: divide the fractions, subtract the
// exponents, compute the result sign. This design's own choices: a
// combinational restoring quotient of 81 by 40 bits and the
// remainder-based sticky bit.
module unp_div
  import xposit_pkg::*;
(
  input  unp_t  a,
  input  unp_t  b,
  output unp_t  y,
  output logic  dz
);

  logic [2*MW:0] num, q, rem;
  logic [MW-1:0] den;
  logic          st1, st0;

  always_comb begin
    num    = {a.mant, {(MW+1){1'b0}}};
    den    = b.zero ? MW'(1) : b.mant;
    q      = num / (2*MW+1)'(den);
    rem    = num % (2*MW+1)'(den);
    st1    = q[1] | q[0] | (rem != '0);
    st0    = q[0] | (rem != '0);
    y      = '0;
    y.sign = a.sign ^ b.sign;
    dz     = 1'b0;
    if (q[MW+1]) begin
      y.mant  = q[MW+1 -: MW] | MW'(st1);
      y.scale = a.scale - b.scale;
    end else begin
      y.mant  = q[MW -: MW] | MW'(st0);
      y.scale = a.scale - b.scale - 1'b1;
    end
    if (a.nan || b.nan || (a.zero && b.zero) || (a.inf && b.inf)) begin
      y = '0;
      y.nan = 1'b1;
    end else if (a.inf || b.zero) begin
      y.inf = 1'b1; y.mant = '0; y.scale = '0;
      dz    = b.zero && !a.inf;
    end else if (a.zero || b.inf) begin
      y.zero = 1'b1; y.mant = '0; y.scale = '0;
    end
  end

endmodule
