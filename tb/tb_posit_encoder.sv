// tb_posit_encoder: checks the posit<32,es> encoder for es = 2 and es = 3.
// Random unpacked values (40-bit significands, so the last bits exercise
// guard and sticky rounding) over the whole dynamic range and beyond are
// compared with a reference that rounds the regime/exponent/fraction bit
// string to nearest even; also zero, NaN, infinity and saturation to
// maxpos / minpos.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_posit_encoder;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 32;

  unp_t         u;
  logic [1:0]   es;
  logic [N-1:0] p;
  int checks = 0, failures = 0;

  posit_encoder #(.N(N), .ES_MIN(2), .ES_MAX(3)) dut (.u(u), .es(es), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_val(input logic s, input int sc, input logic [MW-1:0] m, input int e);
    real          v;
    logic [N-1:0] exp_p;
    u = '0; u.sign = s; u.scale = SW'(sc); u.mant = m; es = 2'(e);
    v = (s ? -1.0 : 1.0) * real'(m) / pow2(MW - 1) * pow2(sc);
    exp_p = N'(real_to_posit(v, N, e));
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL s=%0d sc=%0d m=%h es=%0d got=%h exp=%h", s, sc, m, e, p, exp_p);
    end
  endtask

  initial begin
    for (int e = 2; e <= 3; e++) begin
      int maxsc;
      maxsc = (N - 2) * (1 << e);
      // specials
      u = '0; u.zero = 1'b1; es = 2'(e); #1; checks++;
      if (p !== '0) begin failures++; $display("FAIL zero"); end
      u = '0; u.nan = 1'b1; #1; checks++;
      if (p !== 32'h8000_0000) begin failures++; $display("FAIL nan"); end
      u = '0; u.inf = 1'b1; #1; checks++;
      if (p !== 32'h8000_0000) begin failures++; $display("FAIL inf"); end
      check_val(1'b0, 0, {1'b1, 39'd0}, e);           // 1.0
      check_val(1'b1, 0, {1'b1, 39'd0}, e);           // -1.0
      check_val(1'b0, maxsc + 5, {1'b1, 39'd0}, e);   // beyond maxpos
      check_val(1'b0, -maxsc - 7, {1'b1, 39'd0}, e);  // below minpos
      check_val(1'b1, -maxsc - 7, {1'b1, 39'd0}, e);
      // a tie: 1 + 2^-28 exactly halfway for es = 2 near 1.0
      check_val(1'b0, 0, {1'b1, 39'd0} | (40'd1 << (MW - 1 - 28 + (e - 2))), e);
      check_val(1'b0, 0, {1'b1, 39'd0} | (40'd3 << (MW - 1 - 28 + (e - 2))), e);
      for (int i = 0; i < 4000; i++) begin
        int sc;
        sc = int'($urandom_range(2 * maxsc + 8)) - maxsc - 4;
        if (i < 2000) sc = int'($urandom_range(40)) - 20;
        check_val(1'($urandom), sc, {1'b1, 39'({$urandom, $urandom})}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
