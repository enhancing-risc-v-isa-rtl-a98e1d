// int_alu: the integer execution unit of the core, covering the RV32I/M
// subset the core implements: ADD, SUB, OR, AND, XOR, MUL and DIV (the
// immediate forms ADDI and XORI use the same unit with b = immediate).
//
// MUL returns the low 32 bits of the product. DIV is the signed RISC-V
// division: division by zero gives -1 and 0x80000000 / -1 gives 0x80000000.
// Purely combinational; the core registers the result.
//
// The operations are the RV32IM subset the core lists. Divide-by-zero and
// overflow results follow the RISC-V specification; the single-cycle
// combinational structure is this design's own choice.
module int_alu (
  input  logic [2:0]  op,      // 0 add, 1 sub, 2 or, 3 and, 4 xor, 5 mul, 6 div
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] prod;
  logic [31:0] quot;

  always_comb begin
    prod = a * b;
    if (b == '0)
      quot = 32'hFFFF_FFFF;
    else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF)
      quot = 32'h8000_0000;
    else
      quot = 32'($signed(a) / $signed(b));
    unique case (op)
      3'd0:    y = a + b;
      3'd1:    y = a - b;
      3'd2:    y = a | b;
      3'd3:    y = a & b;
      3'd4:    y = a ^ b;
      3'd5:    y = prod;
      3'd6:    y = quot;
      default: y = a + b;
    endcase
  end

endmodule
