// tb_int_alu: checks the integer ALU (add, sub, or, and, xor, mul low word,
// signed div with the RISC-V divide-by-zero and overflow results) against
// values computed in the testbench with 64-bit arithmetic.
//
// Reference values come from tb_ref_pkg, written independently of the RTL;
// stimulus and checks are this testbench's own.
module tb_int_alu;
  logic [2:0]  op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  int_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_y(input logic [2:0] o, input logic [31:0] x,
                                           input logic [31:0] z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    unique case (o)
      3'd0: return 32'(sx + sz);
      3'd1: return 32'(sx - sz);
      3'd2: return x | z;
      3'd3: return x & z;
      3'd4: return x ^ z;
      3'd5: return 32'(sx * sz);
      3'd6: begin
        if (z == 0) return 32'hFFFF_FFFF;
        return 32'(sx / sz);   // 64-bit: -2^31 / -1 = 2^31 -> low word 0x80000000
      end
      default: return 32'(sx + sz);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      op = 3'($urandom_range(6));
      a = $urandom; b = $urandom;
      if (i % 10 == 1) b = 32'($urandom_range(20)) - 10;
      if (i % 97 == 0) b = 0;
      if (i == 5) begin op = 3'd6; a = 32'h8000_0000; b = 32'hFFFF_FFFF; end
      #1;
      checks++;
      if (y !== expect_y(op, a, b)) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, expect_y(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
