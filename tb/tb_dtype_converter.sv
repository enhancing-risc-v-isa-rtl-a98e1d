// tb_dtype_converter: checks all nine source/destination pairs of the type
// converter (integer, float, posit<32,es>), for es = 2 and 3, on random
// values and directed edge cases (zero, negative zero, ties at .5, integer
// saturation, float infinity and NaN, posit NaR, subnormal floats), against
// the real-arithmetic reference conversions.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_dtype_converter;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  dtype_e      src, dst;
  logic [1:0]  es;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  dtype_converter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int s, input int d, input int e, input logic [31:0] v);
    logic [31:0] exp_y;
    src = dtype_e'(s); dst = dtype_e'(d); es = 2'(e); x = v;
    exp_y = ref_conv(s, d, e, v);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %0d->%0d es=%0d x=%h got=%h exp=%h", s, d, e, v, y, exp_y);
    end
  endtask

  function automatic logic [31:0] rnd_val(input int t, input int i);
    unique case (t)
      1: return (i % 3 == 0) ? 32'($urandom_range(2000)) - 1000 : $urandom;
      2: return (i % 3 == 0) ? rand_float(110, 145) : rand_float(0, 254);
      default: return 32'(rand_posit(32));
    endcase
  endfunction

  initial begin
    for (int e = 2; e <= 3; e++) begin
      for (int s = 1; s <= 3; s++) begin
        for (int d = 1; d <= 3; d++) begin
          chk(s, d, e, 32'h0);
          for (int i = 0; i < 400; i++) chk(s, d, e, rnd_val(s, i));
        end
      end
      // directed
      chk(2, 1, e, 32'h3FC0_0000);  // 1.5 -> 2
      chk(2, 1, e, 32'h4020_0000);  // 2.5 -> 2
      chk(2, 1, e, 32'hBF00_0000);  // -0.5 -> 0
      chk(2, 1, e, 32'h4F80_0000);  // 2^32 -> saturate
      chk(2, 1, e, 32'hCF00_0000);  // -2^31
      chk(2, 1, e, 32'h7F80_0000);  // inf
      chk(2, 1, e, 32'hFF80_0000);  // -inf
      chk(2, 1, e, 32'h7FC0_0000);  // NaN
      chk(2, 3, e, 32'h7FC0_0000);
      chk(2, 3, e, 32'h8000_0000);  // -0
      chk(2, 3, e, 32'h0000_0001);  // smallest subnormal
      chk(3, 2, e, 32'h8000_0000);  // NaR
      chk(3, 1, e, 32'h8000_0000);
      chk(3, 1, e, 32'h7FFF_FFFF);  // maxpos -> saturate
      chk(3, 2, e, 32'h7FFF_FFFF);  // maxpos -> float inf (es 3) or large
      chk(3, 2, e, 32'h0000_0001);  // minpos -> float zero / subnormal
      chk(1, 2, e, 32'h8000_0000);
      chk(1, 3, e, 32'h8000_0000);
      chk(1, 2, e, 32'h7FFF_FFFF);
      chk(1, 3, e, 32'h7FFF_FFFF);
      chk(1, 3, e, 32'd10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
