// ctrl_decode: hardwired control of the non-pipelined MIPS implementations.
//
// Pure combinational logic: the opcode, the func field (for R-type) and the
// zero test z (z = 1 when register rs holds zero) select one row of the
// hardwired control table and drive its fields:
//
//   class  ExtSel  BSrc OpSel MemW RegW WBSrc RegDst PCSrc
//   ALU    -       Reg  Func  no   yes  ALU   rd     pc+4
//   ALUi   sExt16  Imm  Op    no   yes  ALU   rt     pc+4   ADDI ADDIU SLTI SLTIU
//   ALUiu  uExt16  Imm  Op    no   yes  ALU   rt     pc+4   ANDI ORI XORI LUI
//   LW     sExt16  Imm  +     no   yes  Mem   rt     pc+4
//   SW     sExt16  Imm  +     yes  no   -     -      pc+4
//   BEQZ   sExt16  -    0?    no   no   -     -      br if z, else pc+4
//   BNEZ   sExt16  -    0?    no   no   -     -      br if !z, else pc+4
//   J      -       -    -     no   no   -     -      jabs
//   JAL    -       -    -     no   yes  PC    R31    jabs
//   JR     -       -    -     no   no   -     -      rind
//   JALR   -       -    -     no   yes  PC    R31    rind
//
// The table itself is the document's; the BNEZ row, the assignment of
// opcodes to the ALUi/ALUiu classes and the don't-care values (shown as -)
// are this design's. An opcode or func that is not in the table decodes
// to a no-op that writes nothing and goes on to pc+4; illegal is raised.
module ctrl_decode
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] func,
  input  logic       z,
  output ctrl_t      ctrl,
  output logic       illegal
);

  localparam ctrl_t NOP = '{ext_sel: EXT_SIGN, bsrc: BSRC_REG, op_sel: OPSEL_ADD,
                            mem_w: 1'b0, reg_w: 1'b0, wb_src: WB_ALU,
                            reg_dst: DST_RT, pc_src: PC_PLUS4};

  always_comb begin
    ctrl    = NOP;
    illegal = 1'b0;
    case (opcode)
      OP_RTYPE: begin
        case (func)
          FN_JR: begin
            ctrl.pc_src = PC_RIND;
          end
          FN_JALR: begin
            ctrl.reg_w   = 1'b1;
            ctrl.wb_src  = WB_PC;
            ctrl.reg_dst = DST_R31;
            ctrl.pc_src  = PC_RIND;
          end
          FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR,
          FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV: begin
            ctrl.bsrc    = BSRC_REG;
            ctrl.op_sel  = OPSEL_FUNC;
            ctrl.reg_w   = 1'b1;
            ctrl.wb_src  = WB_ALU;
            ctrl.reg_dst = DST_RD;
          end
          default: illegal = 1'b1;
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU: begin
        ctrl.ext_sel = EXT_SIGN;
        ctrl.bsrc    = BSRC_IMM;
        ctrl.op_sel  = OPSEL_OP;
        ctrl.reg_w   = 1'b1;
        ctrl.wb_src  = WB_ALU;
        ctrl.reg_dst = DST_RT;
      end
      OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.ext_sel = EXT_ZERO;
        ctrl.bsrc    = BSRC_IMM;
        ctrl.op_sel  = OPSEL_OP;
        ctrl.reg_w   = 1'b1;
        ctrl.wb_src  = WB_ALU;
        ctrl.reg_dst = DST_RT;
      end
      OP_LW: begin
        ctrl.ext_sel = EXT_SIGN;
        ctrl.bsrc    = BSRC_IMM;
        ctrl.op_sel  = OPSEL_ADD;
        ctrl.reg_w   = 1'b1;
        ctrl.wb_src  = WB_MEM;
        ctrl.reg_dst = DST_RT;
      end
      OP_SW: begin
        ctrl.ext_sel = EXT_SIGN;
        ctrl.bsrc    = BSRC_IMM;
        ctrl.op_sel  = OPSEL_ADD;
        ctrl.mem_w   = 1'b1;
      end
      OP_BEQZ: begin
        ctrl.ext_sel = EXT_SIGN;
        ctrl.op_sel  = OPSEL_ZERO;
        ctrl.pc_src  = z ? PC_BR : PC_PLUS4;
      end
      OP_BNEZ: begin
        ctrl.ext_sel = EXT_SIGN;
        ctrl.op_sel  = OPSEL_ZERO;
        ctrl.pc_src  = z ? PC_PLUS4 : PC_BR;
      end
      OP_J: begin
        ctrl.pc_src = PC_JABS;
      end
      OP_JAL: begin
        ctrl.reg_w   = 1'b1;
        ctrl.wb_src  = WB_PC;
        ctrl.reg_dst = DST_R31;
        ctrl.pc_src  = PC_JABS;
      end
      default: illegal = 1'b1;
    endcase
  end

endmodule
