// word_mem: word-addressed memory used as the core's instruction memory and
// data memory. One asynchronous read port and one synchronous write port;
// the contents are not reset (the instruction memory is loaded through its
// write port before the core is started).
//
// The original design uses word loads and stores but gives no memory; size
// and ports are this design's own choice.
module word_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
