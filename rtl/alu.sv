// alu: 32-bit integer ALU of the non-pipelined MIPS datapath.
//
// Purely combinational. Operand a is the rs register value; operand b is
// either the rt register value or the extended immediate (chosen by BSrc in
// the datapath). Shifts are variable shifts of b by a[4:0] (SLLV/SRLV/SRAV),
// so they fit the same two-operand datapath. ALU_ZERO is the "0?" operation
// the branches use: the result is 1 when a is zero. The output a_is_zero
// carries the same test as a single bit for the branch decision (z).
//
// ADD and SUB do not trap on overflow; the exception path is not part of
// this design.
module alu
  import mips_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y,
  output logic             a_is_zero
);

  logic [4:0] shamt;
  assign shamt     = a[4:0];
  assign a_is_zero = (a == '0);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'd0};
      ALU_ZERO: y = {31'd0, a_is_zero};
      default:  y = '0;
    endcase
  end

endmodule
