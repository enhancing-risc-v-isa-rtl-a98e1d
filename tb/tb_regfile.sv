// tb_regfile: writes random values to random registers of a bank with x0
// hardwired to zero and of a bank without, and compares all three read
// ports with a shadow array after every write; also checks reset clears.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_regfile;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  ra1, ra2, ra3, wa;
  logic [31:0] rd1z, rd2z, rd3z, rd1, rd2, rd3, wd;
  logic        we;
  logic [31:0] shz [32];
  logic [31:0] sh  [32];
  int checks = 0, failures = 0;

  regfile #(.ZERO_R0(1'b1)) dut_z (.clk, .rst_n, .ra1, .rd1(rd1z), .ra2, .rd2(rd2z),
                                   .ra3, .rd3(rd3z), .we, .wa, .wd);
  regfile #(.ZERO_R0(1'b0)) dut_n (.clk, .rst_n, .ra1, .rd1(rd1), .ra2, .rd2(rd2),
                                   .ra3, .rd3(rd3), .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0; ra3 = '0;
    for (int i = 0; i < 32; i++) begin shz[i] = '0; sh[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; checks++;
      if (rd1z !== 0 || rd1 !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'b1; wa = 5'($urandom); wd = $urandom;
      if (i % 20 == 0) wa = 5'd0;
      @(negedge clk);
      we = 1'b0;
      sh[wa] = wd;
      if (wa != 0) shz[wa] = wd;
      ra1 = wa; ra2 = 5'($urandom); ra3 = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== sh[ra1] || rd2 !== sh[ra2] || rd3 !== sh[ra3] ||
          rd1z !== shz[ra1] || rd2z !== shz[ra2] || rd3z !== shz[ra3]) begin
        failures++;
        $display("FAIL read after write to r%0d", wa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
