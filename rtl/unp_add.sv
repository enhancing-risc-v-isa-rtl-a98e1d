// unp_add: adder/subtractor on the shared unpacked form; the posit unit's
// adder/subtractor and the FPU's adder.
//
// Subtraction inverts the sign of B first. The operands are compared by
// magnitude and swapped so that A is the larger; the smaller significand is
// aligned right by the scale difference (shifted-out bits are ORed into its
// LSB as a sticky bit), the significands are added or subtracted according
// to the effective operation, and the result is renormalised: one place
// right on a carry-out, or left by its leading-zero count after
// cancellation. The result keeps the sign of A. Exact cancellation gives +0.
// Specials: NaN in, or inf - inf, gives NaN; an infinite operand gives inf;
// a zero operand returns the other one.
//
// Purely combinational; the final rounding is left to the encoder of the
// destination format.
//
// Following the original description: compare and swap so that A is the
// larger operand, then compute the result fields; subtraction negates B.
// This design's own choices: the unpacked operand form, the sticky bit and
// sharing the core with the FPU and converters.
module unp_add
  import xposit_pkg::*;
(
  input  unp_t  a,
  input  unp_t  b,
  input  logic  sub,
  output unp_t  y
);

  unp_t                 bb, big, sml;
  logic signed [SW-1:0] d;
  logic [MW-1:0]        al;
  logic                 lost;
  logic [MW:0]          sum;
  logic [6:0]           lz;

  always_comb begin
    bb      = b;
    bb.sign = b.sign ^ sub;
    if ((a.scale > bb.scale) || (a.scale == bb.scale && a.mant >= bb.mant)) begin
      big = a;  sml = bb;
    end else begin
      big = bb; sml = a;
    end
    d = big.scale - sml.scale;
    if (d >= SW'(MW)) begin
      al   = '0;
      lost = (sml.mant != '0);
    end else begin
      al   = sml.mant >> d;
      lost = ((sml.mant & ((MW'(1) << d) - 1'b1)) != '0);
    end
    al[0] = al[0] | lost;
    if (big.sign == sml.sign)
      sum = {1'b0, big.mant} + {1'b0, al};
    else
      sum = {1'b0, big.mant} - {1'b0, al};
    lz = lzc64({sum[MW-1:0], {(64-MW){1'b1}}});

    y      = '0;
    y.sign = big.sign;
    if (sum[MW]) begin
      y.mant  = sum[MW:1] | MW'(sum[0]);
      y.scale = big.scale + 1'b1;
    end else begin
      y.mant  = sum[MW-1:0] << lz;
      y.scale = big.scale - SW'(lz);
    end
    if (sum == '0) begin
      y = '0;
      y.zero = 1'b1;
    end

    if (a.nan || bb.nan || (a.inf && bb.inf && (a.sign != bb.sign))) begin
      y = '0;
      y.nan = 1'b1;
    end else if (a.inf || bb.inf) begin
      y = '0;
      y.inf  = 1'b1;
      y.sign = a.inf ? a.sign : bb.sign;
    end else if (a.zero && bb.zero) begin
      y = '0;
      y.zero = 1'b1;
      y.sign = a.sign & bb.sign;
    end else if (a.zero) begin
      y = bb;
    end else if (bb.zero) begin
      y = a;
    end
  end

endmodule
