// unp_mul: multiplier on the shared unpacked form; the posit unit's
// multiplier and the FPU's multiplier.
//
// The result sign is the XOR of the operand signs, the scales add and the
// significands multiply. The double-width product of two significands in
// [1,2) lies in [1,4): a set MSB (the carry) moves the result one place and
// adds one to the scale. The product is cut back to the unpacked width with
// the dropped bits ORed into a sticky LSB. Specials: NaN in, or 0 x inf,
// gives NaN; otherwise an infinite operand gives inf and a zero operand
// zero. Purely combinational.
//
// Following the original description: multiply the fractions, add the
// exponents, normalise on the carry, XOR the signs. This design's own
// choices: the 40-bit significands and the sticky bit from the dropped
// product bits.
module unp_mul
  import xposit_pkg::*;
(
  input  unp_t  a,
  input  unp_t  b,
  output unp_t  y
);

  logic [2*MW-1:0] prod;

  always_comb begin
    prod   = a.mant * b.mant;
    y      = '0;
    y.sign = a.sign ^ b.sign;
    if (prod[2*MW-1]) begin
      y.mant  = prod[2*MW-1 -: MW] | MW'(|prod[MW-1:0]);
      y.scale = a.scale + b.scale + 1'b1;
    end else begin
      y.mant  = prod[2*MW-2 -: MW] | MW'(|prod[MW-2:0]);
      y.scale = a.scale + b.scale;
    end
    if (a.nan || b.nan || (a.inf && b.zero) || (a.zero && b.inf)) begin
      y = '0;
      y.nan = 1'b1;
    end else if (a.inf || b.inf) begin
      y.inf = 1'b1; y.mant = '0; y.scale = '0;
    end else if (a.zero || b.zero) begin
      y.zero = 1'b1; y.mant = '0; y.scale = '0;
    end
  end

endmodule
