// tb_mips_top: end-to-end test of the whole design at its default sizes.
//
// The same program is loaded into both processors (the Harvard instruction
// memory and the Princeton unified memory) while reset is held, and both run
// from the same reset release. Each runs in lockstep with its own copy of
// the instruction-set reference model: PC and register write of every
// retired instruction, then the final registers and data words, must match.
// The Harvard processor must take one cycle per instruction and the
// Princeton processor two.
//
// The test also counts how often each mechanism of the design was used, in
// each processor, and counts a failure for any that never happened: every
// PCSrc choice (pc+4, br, rind, jabs), taken and untaken BEQZ and BNEZ,
// every WBSrc and RegDst choice, both immediate extensions, both B-operand
// sources, stores, a write to R0 being dropped, an unimplemented opcode
// behaving as a no-op, and, in the Princeton processor, fetch cycles and
// execute-cycle data accesses to the shared memory.
module tb_mips_top;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int NRAND = 400;
  localparam int HIW = 1024, HDW = 1024, PMW = 2048;   // the top's defaults

  logic clk = 0, rst = 1;
  logic h_prog_we = 0, p_load_we = 0;
  logic [9:0]  h_prog_addr = '0;
  logic [10:0] p_load_addr = '0;
  logic [31:0] h_prog_wdata = '0, p_load_wdata = '0;
  logic [31:0] h_pc, h_instr, p_pc, p_instr;
  ctrl_t       h_ctrl, p_ctrl;
  phase_e      p_phase;
  logic        h_retire, h_illegal, p_retire, p_illegal;
  int checks = 0, failures = 0, cycles = 0;

  mips_top dut (
    .clk, .rst,
    .h_prog_we, .h_prog_addr, .h_prog_wdata,
    .h_pc, .h_instr, .h_ctrl, .h_retire, .h_illegal,
    .p_load_we, .p_load_addr, .p_load_wdata,
    .p_pc, .p_instr, .p_ctrl, .p_phase, .p_retire, .p_illegal
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters, [0] Harvard, [1] Princeton
  typedef enum int {
    M_PC4, M_BR, M_RIND, M_JABS, M_BEQZ_T, M_BEQZ_N, M_BNEZ_T, M_BNEZ_N,
    M_WB_ALU, M_WB_MEM, M_WB_PC, M_DST_RT, M_DST_RD, M_DST_R31,
    M_SEXT, M_UEXT, M_BREG, M_BIMM, M_STORE, M_R0_DROP, M_ILLEGAL,
    M_FETCH, M_DATA_ACCESS, M_COUNT
  } mech_e;
  int mech [2][M_COUNT];

  function automatic void count(int c, ctrl_t k, logic [31:0] ins, logic ill);
    logic [5:0] op = ins[31:26];
    case (k.pc_src)
      PC_PLUS4: mech[c][M_PC4]++;
      PC_BR:    mech[c][M_BR]++;
      PC_RIND:  mech[c][M_RIND]++;
      PC_JABS:  mech[c][M_JABS]++;
      default: ;
    endcase
    if (op == 6'h04) mech[c][(k.pc_src == PC_BR) ? M_BEQZ_T : M_BEQZ_N]++;
    if (op == 6'h05) mech[c][(k.pc_src == PC_BR) ? M_BNEZ_T : M_BNEZ_N]++;
    if (k.reg_w) begin
      case (k.wb_src)
        WB_ALU: mech[c][M_WB_ALU]++;
        WB_MEM: mech[c][M_WB_MEM]++;
        WB_PC:  mech[c][M_WB_PC]++;
        default: ;
      endcase
      case (k.reg_dst)
        DST_RT:  mech[c][M_DST_RT]++;
        DST_RD:  mech[c][M_DST_RD]++;
        DST_R31: mech[c][M_DST_R31]++;
        default: ;
      endcase
      if (k.wb_src == WB_ALU) mech[c][(k.bsrc == BSRC_IMM) ? M_BIMM : M_BREG]++;
      if (k.bsrc == BSRC_IMM) mech[c][(k.ext_sel == EXT_SIGN) ? M_SEXT : M_UEXT]++;
      if (k.reg_dst == DST_RT && ins[20:16] == 5'd0) mech[c][M_R0_DROP]++;
    end
    if (k.mem_w) mech[c][M_STORE]++;
    if (ill) mech[c][M_ILLEGAL]++;
    if (c == 1 && (k.mem_w || (k.reg_w && k.wb_src == WB_MEM))) mech[c][M_DATA_ACCESS]++;
  endfunction

  initial begin
    logic [31:0] prog[$];
    int end_idx, h_steps = 0, p_steps = 0, h_cyc = 0, p_cyc = 0;
    bit h_done = 0, p_done = 0;
    mips_iss h_iss = new(0, HIW, HDW);
    mips_iss p_iss = new(1, PMW, PMW);

    build_program(prog, NRAND, end_idx);
    foreach (prog[i]) begin
      @(negedge clk);
      h_prog_we = 1; h_prog_addr = 10'(i); h_prog_wdata = prog[i];
      p_load_we = 1; p_load_addr = 11'(i); p_load_wdata = prog[i];
      h_iss.imem[i] = prog[i];
      p_iss.dmem[i] = prog[i];
    end
    @(negedge clk); h_prog_we = 0; p_load_we = 0;
    @(negedge clk); rst = 0;

    while (!(h_done && p_done)) begin
      #1;
      if (!h_done) begin
        h_cyc++;
        check(h_retire, "Harvard retires every cycle");
        check(h_pc == h_iss.pc, $sformatf("Harvard pc %h, model %h", h_pc, h_iss.pc));
        count(0, h_ctrl, h_instr, h_illegal);
        h_iss.step();
        h_steps++;
        check(dut.u_harvard.u_rf.we == h_iss.did_wr, "Harvard register write enable");
        if (h_iss.did_wr && h_iss.wr_reg != 0)
          check(dut.u_harvard.u_rf.wa == 5'(h_iss.wr_reg) && dut.u_harvard.u_rf.wd == h_iss.wr_val,
                "Harvard register write");
        if (h_pc == 32'(end_idx * 4)) h_done = 1;
      end
      if (!p_done) begin
        p_cyc++;
        if (p_phase == PH_FETCH) mech[1][M_FETCH]++;
        check(p_retire == (p_phase == PH_EXEC), "Princeton retires in execute only");
        if (p_retire) begin
          check(p_pc == p_iss.pc, $sformatf("Princeton pc %h, model %h", p_pc, p_iss.pc));
          count(1, p_ctrl, p_instr, p_illegal);
          p_iss.step();
          p_steps++;
          check(dut.u_princeton.u_rf.we == p_iss.did_wr, "Princeton register write enable");
          if (p_iss.did_wr && p_iss.wr_reg != 0)
            check(dut.u_princeton.u_rf.wa == 5'(p_iss.wr_reg) && dut.u_princeton.u_rf.wd == p_iss.wr_val,
                  "Princeton register write");
          if (p_pc == 32'(end_idx * 4)) p_done = 1;
        end
      end
      @(negedge clk);
    end

    for (int i = 0; i < 32; i++) begin
      check(dut.u_harvard.u_rf.regs[i] == h_iss.r[i], $sformatf("Harvard final r%0d", i));
      check(dut.u_princeton.u_rf.regs[i] == p_iss.r[i], $sformatf("Princeton final r%0d", i));
      check(h_iss.r[i] == p_iss.r[i], $sformatf("both processors agree on r%0d", i));
    end
    for (int k = 0; k < DATA_WORDS; k++) begin
      logic [31:0] a;
      a = 32'(DATA_BASE + 4 * k);
      check(dut.u_harvard.u_dmem.mem[h_iss.didx(a)] == h_iss.load(a), $sformatf("Harvard data word %0d", k));
      check(dut.u_princeton.u_mem.mem[p_iss.didx(a)] == p_iss.load(a), $sformatf("Princeton data word %0d", k));
    end
    check(h_steps == p_steps, "same instruction count");
    check(h_cyc == h_steps, $sformatf("Harvard CPI 1: %0d cycles, %0d instructions", h_cyc, h_steps));
    check(p_cyc == 2 * p_steps, $sformatf("Princeton CPI 2: %0d cycles, %0d instructions", p_cyc, p_steps));
    $display("Harvard:   %0d instructions, %0d cycles", h_steps, h_cyc);
    $display("Princeton: %0d instructions, %0d cycles", p_steps, p_cyc);

    for (int c = 0; c < 2; c++)
      for (int m = 0; m < int'(M_COUNT); m++) begin
        if (c == 0 && (mech_e'(m) == M_FETCH || mech_e'(m) == M_DATA_ACCESS)) continue;
        $display("  %s %-14s %0d", c ? "Princeton" : "Harvard  ", mech_e'(m), mech[c][m]);
        check(mech[c][m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
