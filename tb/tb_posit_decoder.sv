// tb_posit_decoder: checks the posit<32,es> decoder for es = 2 and es = 3
// against a bit-by-bit reference decode: exception flags, regime value k,
// and the value carried by the unpacked form (sign, scale, significand),
// on directed words (zero, NaR, 1.0, maxpos, minpos) and random words.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_posit_decoder;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 32;

  logic [N-1:0]         p;
  logic [1:0]           es;
  logic                 zero, nar, sign, reg_s;
  logic [$clog2(N):0]   reg_n;
  logic signed [SW-1:0] k;
  logic [2:0]           exp_f;
  logic [N-6:0]         frac;
  unp_t                 u;
  int checks = 0, failures = 0;

  posit_decoder #(.N(N), .ES_MIN(2), .ES_MAX(3)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real unp_value(input unp_t v);
    return (v.sign ? -1.0 : 1.0) * real'(v.mant) / pow2(MW - 1) * pow2(int'(v.scale));
  endfunction

  task automatic check_one(input logic [N-1:0] pv, input int e);
    real ref_v, got;
    int  ref_k, run, i;
    logic [N-1:0] a;
    p = pv; es = 2'(e);
    #1;
    checks++;
    if (pv == 0) begin
      if (!zero || nar || !u.zero) begin failures++; $display("FAIL zero %h", pv); end
      return;
    end
    if (pv == {1'b1, {(N-1){1'b0}}}) begin
      if (!nar || zero || !u.nan) begin failures++; $display("FAIL NaR %h", pv); end
      return;
    end
    ref_v = posit_to_real(64'(pv), N, e);
    got   = unp_value(u);
    // reference regime value
    a = pv[N-1] ? -pv : pv;
    run = 0; i = N - 2;
    while (i >= 0 && a[i] == a[N-2]) begin run++; i--; end
    ref_k = a[N-2] ? run - 1 : -run;
    if (got != ref_v || int'(k) != ref_k || zero || nar || sign != pv[N-1] ||
        reg_s != a[N-2] || int'(reg_n) != run) begin
      failures++;
      $display("FAIL p=%h es=%0d got=%g ref=%g k=%0d ref_k=%0d", pv, e, got, ref_v, k, ref_k);
    end
  endtask

  initial begin
    for (int e = 2; e <= 3; e++) begin
      check_one('0, e);
      check_one(32'h8000_0000, e);
      check_one(32'h4000_0000, e);
      check_one(32'h7FFF_FFFF, e);
      check_one(32'h0000_0001, e);
      check_one(32'hFFFF_FFFF, e);
      check_one(32'h0000_000F, e);
      for (int i = 0; i < 3000; i++) check_one(N'(rand_posit(N)), e);
      // short regimes dominate random words: also sweep long runs
      for (int r = 1; r < N - 1; r++) check_one(N'(({$urandom} >> r) | (32'h1 << (N - 2 - r))), e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
