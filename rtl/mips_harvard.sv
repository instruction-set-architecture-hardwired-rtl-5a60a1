// mips_harvard: single-cycle, hardwired MIPS implementation, Harvard style.
//
// Instruction memory and data memory are separate, so every instruction
// completes in one clock cycle (CPI = 1). Within the cycle the instruction
// is read from the instruction memory at the PC, decoded by the hardwired
// control, its registers are read, the ALU computes, the data memory is read
// (LW) and the result is set up for write-back. At the next rising edge the
// PC, the register file and (for SW) the data memory are updated together.
// The clock period must cover t_IFetch + t_RFetch + t_ALU + t_DMem + t_RWB.
//
// Instruction set: ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLLV SRLV SRAV,
// ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI, LW SW, BEQZ BNEZ, J JAL JR JALR.
// Only word loads and stores are implemented; the low two address bits are
// ignored. Branches and jumps have no delay slot.
//
// Interface: rst is synchronous and active high; it sets the PC to RESET_PC
// and clears the registers. The instruction memory is read-only to the
// processor; prog_we/prog_addr/prog_wdata write it (word address) and are
// meant to be used while rst is high. retire is high in every cycle in which
// an instruction completes; pc, instr and ctrl show that instruction.
module mips_harvard
  import mips_pkg::*;
#(
  parameter int unsigned     IMEM_WORDS = 1024,
  parameter int unsigned     DMEM_WORDS = 1024,
  parameter logic [XLEN-1:0] RESET_PC   = '0,
  localparam int unsigned    IAW = $clog2(IMEM_WORDS),
  localparam int unsigned    DAW = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // program load port of the instruction memory
  input  logic            prog_we,
  input  logic [IAW-1:0]  prog_addr,
  input  logic [31:0]     prog_wdata,
  // status
  output logic [XLEN-1:0] pc,
  output logic [31:0]     instr,
  output ctrl_t           ctrl,
  output logic            retire,
  output logic            illegal
);

  logic [XLEN-1:0] npc, pc_plus4, rs_val, rt_val, imm_val, alu_b, alu_y;
  logic [XLEN-1:0] dmem_rdata, wb_data;
  logic [4:0]      wa;
  logic            z;
  alu_op_e         alu_op;
  instr_t          iw;

  // Program counter
  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= npc;
  end

  // Instruction fetch
  ram_1r1w #(.WORDS(IMEM_WORDS), .WIDTH(32)) u_imem (
    .clk, .raddr(pc[IAW+1:2]), .rdata(instr),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata)
  );

  // Decode and register fetch
  assign iw = instr_t'(instr);

  ctrl_decode u_ctrl (
    .opcode(iw.opcode), .func(iw.func), .z, .ctrl, .illegal
  );

  always_comb begin
    unique case (ctrl.reg_dst)
      DST_RT:  wa = iw.rt;
      DST_RD:  wa = iw.rd;
      DST_R31: wa = LINK_REG;
      default: wa = iw.rt;
    endcase
  end

  regfile u_rf (
    .clk, .rst,
    .ra1(iw.rs), .rd1(rs_val),
    .ra2(iw.rt), .rd2(rt_val),
    .we(ctrl.reg_w && !rst), .wa, .wd(wb_data)
  );

  imm_ext u_ext (.ext_sel(ctrl.ext_sel), .imm(instr[15:0]), .imm_out(imm_val));

  // Execute
  alu_ctrl u_aluc (.op_sel(ctrl.op_sel), .opcode(iw.opcode), .func(iw.func), .alu_op);

  assign alu_b = (ctrl.bsrc == BSRC_IMM) ? imm_val : rt_val;

  alu u_alu (.op(alu_op), .a(rs_val), .b(alu_b), .y(alu_y), .a_is_zero(z));

  // Data memory
  ram_1r1w #(.WORDS(DMEM_WORDS), .WIDTH(32)) u_dmem (
    .clk, .raddr(alu_y[DAW+1:2]), .rdata(dmem_rdata),
    .we(ctrl.mem_w && !rst), .waddr(alu_y[DAW+1:2]), .wdata(rt_val)
  );

  // Write-back
  always_comb begin
    unique case (ctrl.wb_src)
      WB_ALU:  wb_data = alu_y;
      WB_MEM:  wb_data = dmem_rdata;
      WB_PC:   wb_data = pc_plus4;
      default: wb_data = alu_y;
    endcase
  end

  // Next PC
  next_pc u_npc (
    .pc, .pc_src(ctrl.pc_src), .imm_sext(imm_val), .target(instr[25:0]),
    .rs_val, .pc_plus4, .npc
  );

  assign retire = !rst;

endmodule
