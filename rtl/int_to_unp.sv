// int_to_unp: unpacks a 32-bit two's-complement integer into the shared
// unpacked form. The magnitude is normalised with a leading-zero count, so
// the scale is the position of its leading one. Exact for every integer
// (the significand holds 40 bits). Purely combinational.
//
// A helper of this design's own: the original design names the integer to
// float and integer to posit conversions but not how they are built.
module int_to_unp
  import xposit_pkg::*;
(
  input  logic [31:0] x,
  output unp_t        u
);

  logic [31:0] mag;
  logic [6:0]  lz;

  always_comb begin
    mag     = x[31] ? (~x + 1'b1) : x;   // 0x80000000 stays 2^31 (unsigned)
    lz      = lzc64({mag, 32'hFFFF_FFFF});
    u       = '0;
    u.zero  = (x == '0);
    u.sign  = x[31];
    u.scale = SW'(31) - SW'(lz);
    u.mant  = {mag << lz, {(MW-32){1'b0}}};
    if (u.zero) u.scale = '0;
  end

endmodule
