// regfile: MIPS general-purpose register file, NREGS x XLEN bits.
//
// Two read ports are combinational: the selected register appears on rd1/rd2
// in the same cycle, with no clocking. The single write port stores wd into
// register wa at the rising edge of clk when we is high. Register 0 always
// reads as zero and writes to it are dropped, as the MIPS ISA requires.
// A write and a read of the same register in one cycle return the old value;
// the new one is visible after the edge.
//
// Reset (synchronous, active high) clears every register. The ISA defines no
// reset value; clearing them is this design's choice so that runs are
// repeatable.
module regfile #(
  parameter int unsigned NREGS = mips_pkg::NREGS,
  parameter int unsigned XLEN  = mips_pkg::XLEN,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AW-1:0]   ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [AW-1:0]   ra2,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [AW-1:0]   wa,
  input  logic [XLEN-1:0] wd
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
