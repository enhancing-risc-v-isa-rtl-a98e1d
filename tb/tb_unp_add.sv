// tb_unp_add: checks the adder/subtractor on the unpacked form. Operands
// with 24-bit significands and scale differences below 16 have exact sums
// in 40 bits, so the result value must equal the real sum exactly (including
// full cancellation to zero); operands far apart must return the larger one
// with the sticky bit set. Also the special cases (zero, inf, inf-inf, NaN).
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_unp_add;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  unp_t a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  unp_add dut (.a(a), .b(b), .sub(sub), .y(y));

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

  function automatic unp_t rnd_unp(input int sc);
    unp_t v;
    v = '0;
    v.sign  = 1'($urandom);
    v.scale = SW'(sc);
    v.mant  = {1'b1, 23'($urandom), 16'd0};
    return v;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%g b=%g sub=%0d y=%g (z%0d i%0d n%0d)", msg, val(a), val(b), sub,
               val(y), y.zero, y.inf, y.nan);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int s0;
      s0 = int'($urandom_range(200)) - 100;
      a = rnd_unp(s0);
      b = rnd_unp(s0 + int'($urandom_range(30)) - 15);
      if (i % 50 == 0) b = a;                 // cancellation / doubling
      sub = 1'($urandom);
      #1;
      if (sub ? (val(a) - val(b) == 0.0) : (val(a) + val(b) == 0.0))
        chk(y.zero, "exact zero");
      else
        chk(!y.zero && y.mant[MW-1] && val(y) == (sub ? val(a) - val(b) : val(a) + val(b)), "sum");
    end
    // far apart: result is the large operand, sticky set
    for (int i = 0; i < 200; i++) begin
      a = rnd_unp(10); b = rnd_unp(10 - 45 - int'($urandom_range(20))); sub = 1'b0;
      #1;
      chk(y.scale == a.scale || y.scale == a.scale - 1, "far scale");
      chk(y.mant[0] == 1'b1, "far sticky");
    end
    // specials
    a = rnd_unp(3); b = '0; b.zero = 1'b1; sub = 1'b0; #1; chk(y == a, "x+0");
    b = rnd_unp(3); a = '0; a.zero = 1'b1; sub = 1'b1; #1;
    chk(val(y) == -val(b), "0-x");
    a = '0; a.inf = 1'b1; b = rnd_unp(5); sub = 1'b0; #1; chk(y.inf && !y.nan, "inf+x");
    b = '0; b.inf = 1'b1; sub = 1'b1; #1; chk(y.nan, "inf-inf");
    a = '0; a.nan = 1'b1; b = rnd_unp(0); #1; chk(y.nan, "nan+x");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
