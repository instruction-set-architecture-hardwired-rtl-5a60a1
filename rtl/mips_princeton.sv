// mips_princeton: hardwired MIPS implementation, Princeton (von Neumann)
// style, with one memory for instructions and data.
//
// Because an instruction fetch and a load or store would both need the one
// memory port, every instruction takes two cycles, sequenced by a two-state
// controller (princeton_phase):
//   fetch    memory address = PC; the word read is latched into the
//            instruction register IR at the end of the cycle;
//   execute  the instruction in IR is decoded, registers are read, the ALU
//            computes, the memory is addressed by the ALU result (LW/SW),
//            and the PC, the register file and the memory are written at
//            the end of the cycle.
// CPI is 2, but the cycle only has to cover one memory access:
// t_C > t_RF + t_ALU + t_M + t_WB.
//
// The datapath units, the hardwired control table and the instruction set
// are the same as in mips_harvard. Only word loads and stores exist and the
// low two address bits are ignored; branches have no delay slot.
//
// Interface: rst is synchronous and active high; it sets the PC to RESET_PC,
// the phase to fetch, and clears IR and the registers. load_we, load_addr
// and load_wdata write the memory (word address) and take precedence over a
// store; they are meant for loading program and data while rst is high.
// retire is high in the execute cycle of each instruction; pc, instr and
// ctrl show that instruction.
module mips_princeton
  import mips_pkg::*;
#(
  parameter int unsigned     MEM_WORDS = 2048,
  parameter logic [XLEN-1:0] RESET_PC  = '0,
  localparam int unsigned    AW = $clog2(MEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // load port of the unified memory
  input  logic            load_we,
  input  logic [AW-1:0]   load_addr,
  input  logic [31:0]     load_wdata,
  // status
  output logic [XLEN-1:0] pc,
  output logic [31:0]     instr,
  output ctrl_t           ctrl,
  output phase_e          phase,
  output logic            retire,
  output logic            illegal
);

  logic [XLEN-1:0] npc, pc_plus4, rs_val, rt_val, imm_val, alu_b, alu_y;
  logic [XLEN-1:0] mem_rdata, wb_data;
  logic [31:0]     ir;
  logic [AW-1:0]   mem_addr, mem_waddr;
  logic [31:0]     mem_wdata;
  logic            mem_we;
  logic [4:0]      wa;
  logic            z, ir_en, exec_en, addr_pc;
  alu_op_e         alu_op;
  instr_t          iw;

  // Two-state controller
  princeton_phase u_phase (.clk, .rst, .phase, .ir_en, .exec_en, .addr_pc);

  // Program counter, updated at the end of the execute phase
  always_ff @(posedge clk) begin
    if (rst)          pc <= RESET_PC;
    else if (exec_en) pc <= npc;
  end

  // Instruction register, loaded at the end of the fetch phase
  always_ff @(posedge clk) begin
    if (rst)        ir <= '0;
    else if (ir_en) ir <= mem_rdata;
  end
  assign instr = ir;

  // Unified memory: the address is the PC in fetch and the ALU result in
  // execute; the load port wins over a store.
  assign mem_addr  = addr_pc ? pc[AW+1:2] : alu_y[AW+1:2];
  assign mem_we    = load_we || (exec_en && ctrl.mem_w);
  assign mem_waddr = load_we ? load_addr  : alu_y[AW+1:2];
  assign mem_wdata = load_we ? load_wdata : rt_val;

  ram_1r1w #(.WORDS(MEM_WORDS), .WIDTH(32)) u_mem (
    .clk, .raddr(mem_addr), .rdata(mem_rdata),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata)
  );

  // Decode and register fetch (from IR)
  assign iw = instr_t'(ir);

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
    .we(exec_en && ctrl.reg_w), .wa, .wd(wb_data)
  );

  imm_ext u_ext (.ext_sel(ctrl.ext_sel), .imm(ir[15:0]), .imm_out(imm_val));

  // Execute
  alu_ctrl u_aluc (.op_sel(ctrl.op_sel), .opcode(iw.opcode), .func(iw.func), .alu_op);

  assign alu_b = (ctrl.bsrc == BSRC_IMM) ? imm_val : rt_val;

  alu u_alu (.op(alu_op), .a(rs_val), .b(alu_b), .y(alu_y), .a_is_zero(z));

  // Write-back
  always_comb begin
    unique case (ctrl.wb_src)
      WB_ALU:  wb_data = alu_y;
      WB_MEM:  wb_data = mem_rdata;
      WB_PC:   wb_data = pc_plus4;
      default: wb_data = alu_y;
    endcase
  end

  // Next PC
  next_pc u_npc (
    .pc, .pc_src(ctrl.pc_src), .imm_sext(imm_val), .target(ir[25:0]),
    .rs_val, .pc_plus4, .npc
  );

  assign retire = exec_en;

endmodule
