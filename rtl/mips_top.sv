// mips_top: the two hardwired, non-pipelined MIPS implementations side by
// side.
//
// h_*  single-cycle Harvard implementation (mips_harvard): separate
//      instruction and data memories, one instruction per cycle.
// p_*  Princeton implementation (mips_princeton): one unified memory and a
//      two-state fetch/execute controller, one instruction per two cycles.
//
// Both run the same instruction set from the same clock and synchronous,
// active-high reset, and each has its own program-load port and status
// outputs (PC, current instruction, its control-table row, a retire strobe
// and an illegal-instruction flag). They share no state; placing them
// together lets one program be run on both and their results and cycle
// counts compared.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned H_IMEM_WORDS = 1024,
  parameter int unsigned H_DMEM_WORDS = 1024,
  parameter int unsigned P_MEM_WORDS  = 2048,
  localparam int unsigned HIAW = $clog2(H_IMEM_WORDS),
  localparam int unsigned PAW  = $clog2(P_MEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // Harvard implementation
  input  logic            h_prog_we,
  input  logic [HIAW-1:0] h_prog_addr,
  input  logic [31:0]     h_prog_wdata,
  output logic [31:0]     h_pc,
  output logic [31:0]     h_instr,
  output ctrl_t           h_ctrl,
  output logic            h_retire,
  output logic            h_illegal,
  // Princeton implementation
  input  logic            p_load_we,
  input  logic [PAW-1:0]  p_load_addr,
  input  logic [31:0]     p_load_wdata,
  output logic [31:0]     p_pc,
  output logic [31:0]     p_instr,
  output ctrl_t           p_ctrl,
  output phase_e          p_phase,
  output logic            p_retire,
  output logic            p_illegal
);

  mips_harvard #(.IMEM_WORDS(H_IMEM_WORDS), .DMEM_WORDS(H_DMEM_WORDS)) u_harvard (
    .clk, .rst,
    .prog_we(h_prog_we), .prog_addr(h_prog_addr), .prog_wdata(h_prog_wdata),
    .pc(h_pc), .instr(h_instr), .ctrl(h_ctrl), .retire(h_retire), .illegal(h_illegal)
  );

  mips_princeton #(.MEM_WORDS(P_MEM_WORDS)) u_princeton (
    .clk, .rst,
    .load_we(p_load_we), .load_addr(p_load_addr), .load_wdata(p_load_wdata),
    .pc(p_pc), .instr(p_instr), .ctrl(p_ctrl), .phase(p_phase),
    .retire(p_retire), .illegal(p_illegal)
  );

endmodule
