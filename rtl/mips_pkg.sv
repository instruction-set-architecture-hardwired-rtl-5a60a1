// mips_pkg: types and constants shared by the hardwired, non-pipelined MIPS
// implementations (single-cycle Harvard and two-phase Princeton).
//
// The control signal names and their values (ExtSel, BSrc, OpSel, WBSrc,
// RegDst, PCSrc) are those of the hardwired control table. The binary
// instruction encoding follows the standard MIPS-I opcode and func
// assignments; BEQZ and BNEZ reuse the BEQ/BNE opcodes and test only rs.
// The set of ALU operations is this design's choice of a MIPS integer subset.
package mips_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned NREGS  = 32;
  localparam logic [4:0]  LINK_REG = 5'd31;

  // Primary opcodes, instruction[31:26].
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQZ  = 6'h04,
    OP_BNEZ  = 6'h05,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0A,
    OP_SLTIU = 6'h0B,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_LUI   = 6'h0F,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // Function codes of R-type instructions, instruction[5:0].
  typedef enum logic [5:0] {
    FN_SLLV = 6'h04,
    FN_SRLV = 6'h06,
    FN_SRAV = 6'h07,
    FN_JR   = 6'h08,
    FN_JALR = 6'h09,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A,
    FN_SLTU = 6'h2B
  } func_e;

  // ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_NOR,
    ALU_SLT,
    ALU_SLTU,
    ALU_SLL,   // b << a[4:0]
    ALU_SRL,   // b >> a[4:0]
    ALU_SRA,   // b >>> a[4:0]
    ALU_LUI,   // b << 16
    ALU_ZERO   // result = (a == 0)
  } alu_op_e;

  // Control fields of the hardwired control table.
  typedef enum logic {EXT_SIGN, EXT_ZERO} ext_sel_e;          // sExt16 / uExt16
  typedef enum logic {BSRC_REG, BSRC_IMM} bsrc_e;             // Reg / Imm
  typedef enum logic [1:0] {OPSEL_FUNC, OPSEL_OP, OPSEL_ADD, OPSEL_ZERO} opsel_e; // Func / Op / + / 0?
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC} wbsrc_e;   // ALU / Mem / PC
  typedef enum logic [1:0] {DST_RT, DST_RD, DST_R31} regdst_e; // rt / rd / R31
  typedef enum logic [1:0] {PC_PLUS4, PC_BR, PC_RIND, PC_JABS} pcsrc_e; // pc+4 / br / rind / jabs

  // Phase of the two-state Princeton controller.
  typedef enum logic {PH_FETCH, PH_EXEC} phase_e;

  typedef struct packed {
    ext_sel_e ext_sel;
    bsrc_e    bsrc;
    opsel_e   op_sel;
    logic     mem_w;
    logic     reg_w;
    wbsrc_e   wb_src;
    regdst_e  reg_dst;
    pcsrc_e   pc_src;
  } ctrl_t;

  // Instruction fields, R-type view; the I-type immediate is [15:0] and the
  // J-type target is [25:0].
  typedef struct packed {
    logic [5:0] opcode;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] func;
  } instr_t;

endpackage
