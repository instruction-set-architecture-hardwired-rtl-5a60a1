// next_pc: next-instruction address logic.
//
// Computes the four candidate addresses of the PCSrc multiplexer and picks
// one, combinationally:
//   pc+4  sequential flow;
//   br    PC-relative branch, (pc + 4) + (sign-extended offset << 2), an
//         offset counted in words, reaching +-128 KB;
//   jabs  absolute jump, {pc[31:28], target26, 2'b00}, a 256 MB region;
//   rind  register-indirect jump, the value of register rs.
// pc_plus4 is also brought out: JAL and JALR write it to R31.
// The jabs form takes the upper four bits from the PC of the jump itself,
// as the document states it (MIPS-I hardware uses those of pc+4; the two
// differ only for a jump in the last word of a 256 MB region).
module next_pc
  import mips_pkg::*;
(
  input  logic [XLEN-1:0] pc,
  input  pcsrc_e          pc_src,
  input  logic [XLEN-1:0] imm_sext,   // sign-extended 16-bit offset
  input  logic [25:0]     target,     // 26-bit jump target field
  input  logic [XLEN-1:0] rs_val,     // register rs, for JR/JALR
  output logic [XLEN-1:0] pc_plus4,
  output logic [XLEN-1:0] npc
);

  logic [XLEN-1:0] br_target, jabs_target;

  assign pc_plus4    = pc + 32'd4;
  assign br_target   = pc_plus4 + {imm_sext[XLEN-3:0], 2'b00};
  assign jabs_target = {pc[31:28], target, 2'b00};

  always_comb begin
    unique case (pc_src)
      PC_PLUS4: npc = pc_plus4;
      PC_BR:    npc = br_target;
      PC_RIND:  npc = rs_val;
      PC_JABS:  npc = jabs_target;
      default:  npc = pc_plus4;
    endcase
  end

endmodule
