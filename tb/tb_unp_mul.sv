// tb_unp_mul: checks the multiplier on the unpacked form. Significands of
// 19 bits give products exact in 38 bits, so the result must equal the real
// product exactly, be normalised and carry no sticky bit; a full-width
// product must set the sticky bit when low product bits are dropped. Also
// the special cases (0 x inf -> NaN, inf, zero, NaN).
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_unp_mul;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  unp_t a, b, y;
  int checks = 0, failures = 0;

  unp_mul dut (.a(a), .b(b), .y(y));

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
    for (int i = 0; i < 4000; i++) begin
      a = rnd_unp(int'($urandom_range(200)) - 100, 19);
      b = rnd_unp(int'($urandom_range(200)) - 100, 19);
      #1;
      chk(!y.zero && y.mant[MW-1] && !y.mant[0] && val(y) == val(a) * val(b), "product");
    end
    a = rnd_unp(0, 40); a.mant[0] = 1'b1;
    b = rnd_unp(0, 40); b.mant[0] = 1'b1; #1;
    chk(y.mant[0], "sticky");
    a = '0; a.zero = 1'b1; b = '0; b.inf = 1'b1; #1; chk(y.nan, "0*inf");
    a = rnd_unp(2, 10); #1; chk(y.inf && !y.nan, "x*inf");
    b = '0; b.zero = 1'b1; #1; chk(y.zero, "x*0");
    b = '0; b.nan = 1'b1; #1; chk(y.nan, "x*nan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
