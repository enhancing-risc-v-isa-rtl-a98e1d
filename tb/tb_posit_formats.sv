// tb_posit_formats: the reconfigurable posit unit at the smaller word sizes
// of the format study, posit<8,es> and posit<16,es> with es = 2 or 3
// switched at run time.
//
// Two posit_unit instances (N = 8 and N = 16) are started together on random
// operands for add, subtract, multiply and divide, each operation with a
// random es. Results are compared with the real-arithmetic reference of
// tb_ref_pkg at the same <N, es>, and the cycle count from start to done is
// checked: 5 / 8 / 12 cycles whatever the format, so in particular the
// multiply takes 8 cycles for every <N, es>. The 8-bit instance also gets
// every one of its 256 x 256 operand pairs for multiplication with es = 2.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_posit_formats;
  import xposit_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  aop_e        op;
  logic [1:0]  es;
  logic [7:0]  a8, b8, r8;
  logic [15:0] a16, b16, r16;
  logic        busy8, done8, dz8, busy16, done16, dz16;
  int checks = 0, failures = 0;
  int n_fmt [4];                 // operations per format: <8,2> <8,3> <16,2> <16,3>
  logic dz8_seen, dz16_seen;     // dz sampled with done

  posit_unit #(.N(8), .ES_MIN(2), .ES_MAX(3)) u8 (
    .clk, .rst_n, .start, .op, .es, .a(a8), .b(b8), .busy(busy8), .done(done8),
    .result(r8), .dz(dz8));
  posit_unit #(.N(16), .ES_MIN(2), .ES_MAX(3)) u16 (
    .clk, .rst_n, .start, .op, .es, .a(a16), .b(b16), .busy(busy16), .done(done16),
    .result(r16), .dz(dz16));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_op(input aop_e o, input logic [63:0] x,
                                         input logic [63:0] y, input int n, input int e);
    real rx, ry, r;
    logic [63:0] nar;
    nar = 64'd1 << (n - 1);
    if (x == nar || y == nar) return nar;
    rx = posit_to_real(x, n, e);
    ry = posit_to_real(y, n, e);
    unique case (o)
      AOP_ADD: r = rx + ry;
      AOP_SUB: r = rx - ry;
      AOP_MUL: r = rx * ry;
      default: begin
        if (ry == 0.0) return nar;
        r = rx / ry;
      end
    endcase
    return real_to_posit(r, n, e);
  endfunction

  task automatic run(input aop_e o, input logic [7:0] x8, input logic [7:0] y8,
                     input logic [15:0] x16, input logic [15:0] y16, input int e);
    int cyc, c8, c16, lat;
    logic [63:0] e8, e16;
    lat = (o == AOP_MUL) ? 8 : (o == AOP_DIV) ? 12 : 5;
    op = o; es = 2'(e); a8 = x8; b8 = y8; a16 = x16; b16 = y16;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1; c8 = 0; c16 = 0;
    while ((c8 == 0 || c16 == 0) && cyc < 40) begin
      cyc++;
      if (done8 && c8 == 0) begin c8 = cyc; dz8_seen = dz8; end
      if (done16 && c16 == 0) begin c16 = cyc; dz16_seen = dz16; end
      if (c8 != 0 && c16 != 0) break;
      @(posedge clk); #1;
    end
    e8  = ref_op(o, 64'(x8), 64'(y8), 8, e);
    e16 = ref_op(o, 64'(x16), 64'(y16), 16, e);
    checks += 4;
    if (c8 != lat) begin
      failures++; $display("FAIL <8,%0d> op %0d latency %0d", e, o, c8);
    end
    if (c16 != lat) begin
      failures++; $display("FAIL <16,%0d> op %0d latency %0d", e, o, c16);
    end
    if (r8 !== e8[7:0]) begin
      failures++; $display("FAIL <8,%0d> op %0d %h %h -> %h exp %h", e, o, x8, y8, r8, e8[7:0]);
    end
    if (r16 !== e16[15:0]) begin
      failures++;
      $display("FAIL <16,%0d> op %0d %h %h -> %h exp %h", e, o, x16, y16, r16, e16[15:0]);
    end
    n_fmt[(e == 3) ? 1 : 0]++;
    n_fmt[(e == 3) ? 3 : 2]++;
    @(posedge clk); #1;
  endtask

  initial begin
    op = AOP_ADD; es = 2'd2; a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    foreach (n_fmt[i]) n_fmt[i] = 0;
    dz8_seen = 1'b0; dz16_seen = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    for (int i = 0; i < 4000; i++) begin
      aop_e o;
      o = aop_e'($urandom_range(3));
      run(o, 8'(rand_posit(8)), 8'(rand_posit(8)), 16'(rand_posit(16)), 16'(rand_posit(16)),
          2 + int'($urandom_range(1)));
    end
    // directed: zero, NaR, division by zero
    run(AOP_MUL, 8'h00, 8'h40, 16'h0000, 16'h4000, 2);
    run(AOP_ADD, 8'h80, 8'h40, 16'h8000, 16'h4000, 3);
    run(AOP_DIV, 8'h40, 8'h00, 16'h4000, 16'h0000, 2);
    checks++;
    if (!dz8_seen || !dz16_seen) begin failures++; $display("FAIL dz not raised"); end
    // every 8-bit operand pair, multiplication, es = 2
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        run(AOP_MUL, 8'(x), 8'(y), 16'(x << 8), 16'(y << 8), 2);

    foreach (n_fmt[i]) begin
      checks++;
      if (n_fmt[i] == 0) begin failures++; $display("FAIL format %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
