// tb_word_mem: fills a 1024-word memory with random words, then reads every
// address and random addresses after further random writes, comparing with a
// shadow array.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_word_mem;
  logic        clk = 1'b0;
  logic [9:0]  raddr, waddr;
  logic [31:0] rdata, wdata;
  logic        we;
  logic [31:0] sh [1024];
  int checks = 0, failures = 0;

  word_mem #(.DEPTH(1024), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(i); wdata = $urandom; sh[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      raddr = 10'(i); #1; checks++;
      if (rdata !== sh[i]) begin failures++; $display("FAIL addr %0d", i); end
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'($urandom); wdata = $urandom; sh[waddr] = wdata;
      @(negedge clk);
      we = 1'b0; raddr = 10'($urandom); #1; checks++;
      if (rdata !== sh[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
