// unp_to_int: rounds a number in the shared unpacked form to a 32-bit
// two's-complement integer, round to nearest, ties to even.
//
// The significand is shifted right so that its integer part lines up at
// bit 0; the next bit is the guard bit and the rest the sticky bit.
// Out-of-range values saturate to 0x7FFFFFFF / 0x80000000; NaN (or NaR)
// gives 0x7FFFFFFF and infinities saturate by sign, as the RISC-V F
// conversions do. Purely combinational.
//
// A helper of this design's own: the original design names the conversions
// to integer but not how they are built; saturation and NaN handling follow
// the RISC-V float-to-integer rules.
module unp_to_int
  import xposit_pkg::*;
(
  input  unp_t        u,
  output logic [31:0] x
);

  logic [MW-1:0]  ip, frac_mask;
  logic [5:0]     sh;
  logic           g, st, rnd;
  logic [MW:0]    r;

  always_comb begin
    ip = '0; g = 1'b0; st = 1'b0; rnd = 1'b0; r = '0; sh = '0; frac_mask = '0;
    if (u.nan) begin
      x = 32'h7FFF_FFFF;
    end else if (u.inf || u.scale >= SW'(31)) begin
      x = u.sign ? 32'h8000_0000 : 32'h7FFF_FFFF;
    end else if (u.zero || u.scale < SW'(-1)) begin
      x = 32'd0;   // magnitude below 0.5 rounds to zero
    end else begin
      sh        = 6'(SW'(MW - 1) - u.scale);   // 9..40
      ip        = u.mant >> sh;
      g         = u.mant[sh-6'd1];
      frac_mask = (MW'(1) << (sh - 6'd1)) - 1'b1;
      st        = ((u.mant & frac_mask) != '0);
      rnd       = g & (st | ip[0]);
      r         = {1'b0, ip} + (MW+1)'(rnd);
      if (!u.sign && r > (MW+1)'(32'h7FFF_FFFF))
        x = 32'h7FFF_FFFF;
      else
        x = u.sign ? (~r[31:0] + 1'b1) : r[31:0];
    end
  end

endmodule
