// float_to_unp: unpacks an IEEE-754 single-precision word into the shared
// unpacked form (sign, binary scale, left-justified significand).
//
// Normal numbers get their hidden one back and scale = exponent - 127.
// Subnormals are normalised with a leading-zero count (scale down to -149).
// Exponent 255 gives infinity or, with a non-zero fraction, NaN. Purely
// combinational.
//
// A helper of this design's own: the original design names the conversions
// from float but not how they are built.
module float_to_unp
  import xposit_pkg::*;
(
  input  logic [31:0] f,
  output unp_t        u
);

  logic [7:0]  ex;
  logic [22:0] fr;
  logic [6:0]  lz;

  always_comb begin
    ex = f[30:23];
    fr = f[22:0];
    lz = lzc64({fr, 41'h1});
    u      = '0;
    u.sign = f[31];
    if (ex == 8'hFF) begin
      u.inf  = (fr == '0);
      u.nan  = (fr != '0);
      u.sign = (fr == '0) ? f[31] : 1'b0;
    end else if (ex == 8'h00) begin
      if (fr == '0) begin
        u.zero = 1'b1;
      end else begin
        // leading one of fr at bit 22-lz: value = 2^(22-lz-149) * 1.xxx
        u.scale = SW'(-127) - SW'(lz);
        u.mant  = {fr << lz, 1'b0, {(MW-24){1'b0}}};
      end
    end else begin
      u.scale = SW'(ex) - SW'(127);
      u.mant  = {1'b1, fr, {(MW-24){1'b0}}};
    end
  end

endmodule
