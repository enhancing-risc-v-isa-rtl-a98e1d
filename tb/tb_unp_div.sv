// tb_unp_div: checks the divider on the unpacked form. Dividends built as
// the product of the divisor and a short quotient must give that quotient
// exactly with no sticky bit; random quotients must be within one unit of
// the 40-bit significand of the real quotient, with the sticky bit set.
// Also 0/0 and inf/inf (NaN), x/0 (inf and dz), 0/x and x/inf (zero).
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_unp_div;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  unp_t a, b, y;
  logic dz;
  int checks = 0, failures = 0;

  unp_div dut (.a(a), .b(b), .y(y), .dz(dz));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real val(input unp_t v);
    if (v.zero) return 0.0;
    return (v.sign ? -1.0 : 1.0) * real'(v.mant) / pow2(MW - 1) * pow2(int'(v.scale));
  endfunction

  function automatic unp_t rnd_unp(input int sc, input int bits);
    unp_t v;
    v = '0;
    v.sign  = 1'($urandom);
    v.scale = SW'(sc);
    v.mant  = {1'b1, 39'({$urandom, $urandom})};
    v.mant  = v.mant & ~((MW'(1) << (MW - bits)) - 1'b1);
    return v;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%g b=%g y=%g", msg, val(a), val(b), val(y));
    end
  endtask

  initial begin
    unp_t q;
    real  exact, err;
    for (int i = 0; i < 3000; i++) begin
      // exact: a = b * q with 16-bit b and q (32-bit product fits)
      b = rnd_unp(int'($urandom_range(100)) - 50, 16);
      q = rnd_unp(int'($urandom_range(100)) - 50, 16);
      a = '0;
      a.sign = b.sign ^ q.sign;
      begin
        logic [2*MW-1:0] pr;
        pr = b.mant * q.mant;
        if (pr[2*MW-1]) begin a.mant = pr[2*MW-1 -: MW]; a.scale = b.scale + q.scale + 1'b1; end
        else            begin a.mant = pr[2*MW-2 -: MW]; a.scale = b.scale + q.scale; end
      end
      #1;
      chk(y.mant[MW-1] && val(y) == val(q) && !dz, "exact quotient");
      // random
      a = rnd_unp(int'($urandom_range(100)) - 50, 24);
      b = rnd_unp(int'($urandom_range(100)) - 50, 24);
      #1;
      exact = val(a) / val(b);
      err = (val(y) - exact) / exact;
      if (err < 0) err = -err;
      chk(y.mant[MW-1] && err < pow2(-37) && (y.sign == (a.sign ^ b.sign)), "quotient");
    end
    a = '0; a.zero = 1'b1; b = '0; b.zero = 1'b1; #1; chk(y.nan && !dz, "0/0");
    a = rnd_unp(1, 8); #1; chk(y.inf && dz, "x/0");
    b = rnd_unp(1, 8); a = '0; a.zero = 1'b1; #1; chk(y.zero && !dz, "0/x");
    a = rnd_unp(1, 8); b = '0; b.inf = 1'b1; #1; chk(y.zero, "x/inf");
    a = '0; a.inf = 1'b1; #1; chk(y.nan, "inf/inf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
