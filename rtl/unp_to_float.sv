// unp_to_float: rounds a number in the shared unpacked form to IEEE-754
// single precision, round to nearest, ties to even.
//
// Scales below -126 are denormalised by a right shift (the shifted-out bits
// join the sticky bit), so results round into the subnormal range and to
// zero. A rounding carry renormalises; scales above 127 give infinity.
// NaN inputs give the canonical quiet NaN 0x7FC00000. Purely combinational.
//
// A helper of this design's own: the original design names the conversions
// to float but not how they are built.
module unp_to_float
  import xposit_pkg::*;
(
  input  unp_t        u,
  output logic [31:0] f
);

  logic signed [SW-1:0] s, d;
  logic [MW-1:0]        sh;
  logic                 lost, g, st, rnd, sub;
  logic [24:0]          r;
  logic signed [SW-1:0] efield;

  always_comb begin
    s    = u.scale;
    sub  = (s < -126);
    d    = sub ? (SW'(-126) - s) : '0;
    if (d >= SW'(MW)) begin
      sh   = '0;
      lost = (u.mant != '0);
    end else begin
      sh   = u.mant >> d;
      lost = ((u.mant & ((MW'(1) << d) - 1'b1)) != '0);
    end
    g   = sh[MW-25];
    st  = (|sh[MW-26:0]) | lost;
    rnd = g & (st | sh[MW-24]);
    r   = {1'b0, sh[MW-1 -: 24]} + 25'(rnd);
    if (sub) begin
      // exponent field is 1 if rounding reached the smallest normal
      efield = r[23] ? SW'(1) : SW'(0);
      f = {u.sign, efield[7:0], r[22:0]};
    end else if (r[24]) begin
      efield = s + SW'(128);
      f = {u.sign, efield[7:0], 23'd0};
    end else begin
      efield = s + SW'(127);
      f = {u.sign, efield[7:0], r[22:0]};
    end
    if (!sub && efield >= SW'(255))
      f = {u.sign, 8'hFF, 23'd0};
    if (u.nan)
      f = 32'h7FC0_0000;
    else if (u.inf)
      f = {u.sign, 8'hFF, 23'd0};
    else if (u.zero)
      f = {u.sign, 31'd0};
  end

endmodule
