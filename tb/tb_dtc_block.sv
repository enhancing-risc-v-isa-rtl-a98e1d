// tb_dtc_block: drives DTC instructions for every source/destination type
// pair with random register values, and checks the destination type, the
// converted value (reference conversions) and the conversion cycle count
// (I->F 3, I->P 6, F->I 10, F->P 2, P->I 14, P->F 5, same type 0).
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_dtc_block;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  logic [31:0] ir;
  logic [1:0]  es;
  logic [31:0] int_rs, flt_rs, pos_rs;
  dtype_e      xd;
  logic [31:0] y;
  logic [3:0]  conv_cycles;
  int checks = 0, failures = 0;

  dtc_block dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat(input int s, input int d);
    if (s == d) return 0;
    if (s == 1) return (d == 2) ? 3 : 6;
    if (s == 2) return (d == 1) ? 10 : 2;
    return (d == 1) ? 14 : 5;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int d, s, e;
      logic [31:0] src, exp_y;
      d = int'($urandom_range(2)) + 1;
      s = int'($urandom_range(2)) + 1;
      e = 2 + (i % 2);
      ir = {8'd0, 2'(d), 2'(s), 5'($urandom), 3'b000, 5'($urandom), 7'b1011011};
      es = 2'(e);
      int_rs = (i % 2) ? $urandom : 32'($urandom_range(2000)) - 1000;
      flt_rs = rand_float(100, 160);
      pos_rs = 32'(rand_posit(32));
      src = (s == 1) ? int_rs : (s == 2) ? flt_rs : pos_rs;
      exp_y = ref_conv(s, d, e, src);
      #1;
      checks++;
      if (int'(xd) != d || y !== exp_y || int'(conv_cycles) != lat(s, d)) begin
        failures++;
        $display("FAIL %0d->%0d x=%h y=%h exp=%h cyc=%0d", s, d, src, y, exp_y, conv_cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
