// regfile: a 32 x 32-bit register bank with two asynchronous read ports, a
// third read port for debug observation and one synchronous write port.
// The core holds three of them: the integer bank (x0 hardwired to zero,
// ZERO_R0 = 1), the float bank F0-F31 and the posit bank P0-P31 (all
// registers writable). Registers are cleared by reset.
//
// Following the original description: 32 registers of 32 bits per bank,
// one bank per number type. This design's own choices: asynchronous read,
// the third (observation) read port, reset to zero and x0 hardwired to zero
// only in the integer bank (as in RISC-V).
module regfile #(
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned WIDTH   = 32,
  parameter bit          ZERO_R0 = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] ra1,
  output logic [WIDTH-1:0]         rd1,
  input  logic [$clog2(DEPTH)-1:0] ra2,
  output logic [WIDTH-1:0]         rd2,
  input  logic [$clog2(DEPTH)-1:0] ra3,
  output logic [WIDTH-1:0]         rd3,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wa,
  input  logic [WIDTH-1:0]         wd
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we && !(ZERO_R0 && wa == '0)) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];

endmodule
