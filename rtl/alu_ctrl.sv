// alu_ctrl: ALU control.
//
// Turns the OpSel field of the hardwired control table into an ALU
// operation. OpSel = Func decodes the func field of an R-type instruction,
// OpSel = Op decodes the primary opcode of an immediate instruction,
// OpSel = + forces an add (address arithmetic of LW/SW) and OpSel = 0?
// selects the zero test used by BEQZ/BNEZ. Combinational.
//
// The opcode and func assignments are the standard MIPS-I ones. Codes that
// are not implemented fall back to an add; the control decoder already turns
// such instructions into no-ops, so the result is never written.
module alu_ctrl
  import mips_pkg::*;
(
  input  opsel_e      op_sel,
  input  logic [5:0]  opcode,
  input  logic [5:0]  func,
  output alu_op_e     alu_op
);

  always_comb begin
    alu_op = ALU_ADD;
    unique case (op_sel)
      OPSEL_FUNC: begin
        case (func)
          FN_ADD, FN_ADDU: alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: alu_op = ALU_SUB;
          FN_AND:          alu_op = ALU_AND;
          FN_OR:           alu_op = ALU_OR;
          FN_XOR:          alu_op = ALU_XOR;
          FN_NOR:          alu_op = ALU_NOR;
          FN_SLT:          alu_op = ALU_SLT;
          FN_SLTU:         alu_op = ALU_SLTU;
          FN_SLLV:         alu_op = ALU_SLL;
          FN_SRLV:         alu_op = ALU_SRL;
          FN_SRAV:         alu_op = ALU_SRA;
          default:         alu_op = ALU_ADD;
        endcase
      end
      OPSEL_OP: begin
        case (opcode)
          OP_ADDI, OP_ADDIU: alu_op = ALU_ADD;
          OP_SLTI:           alu_op = ALU_SLT;
          OP_SLTIU:          alu_op = ALU_SLTU;
          OP_ANDI:           alu_op = ALU_AND;
          OP_ORI:            alu_op = ALU_OR;
          OP_XORI:           alu_op = ALU_XOR;
          OP_LUI:            alu_op = ALU_LUI;
          default:           alu_op = ALU_ADD;
        endcase
      end
      OPSEL_ADD:  alu_op = ALU_ADD;
      OPSEL_ZERO: alu_op = ALU_ZERO;
      default:    alu_op = ALU_ADD;
    endcase
  end

endmodule
