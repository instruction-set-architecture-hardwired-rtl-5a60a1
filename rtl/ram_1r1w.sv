// ram_1r1w: the simple memory model of the non-pipelined implementations.
//
// WORDS words of WIDTH bits. A read can happen at any time and is
// combinational: rdata follows raddr within the cycle. A write is performed
// at the rising edge of clk when we is high, with waddr and wdata sampled at
// that edge. Reads and writes therefore both complete in one cycle. A read
// of the word being written returns the old contents until the edge.
//
// Addresses are word indices; the processors drop the two byte-offset bits
// of their byte addresses. The contents are not reset: a program and its
// data are written in through the write port (or by the simulator) before
// the processor is released from reset. The size is this design's choice.
module ram_1r1w #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
