// tb_mips_harvard: end-to-end test of the single-cycle Harvard processor.
//
// A program (directed control-flow and memory tests, then a block of random
// ALU, load and store instructions) is written into the instruction memory
// through the program-load port while reset is held. After reset the
// processor runs in lockstep with the instruction-set reference model: for
// every retired instruction the PC and the register write (enable, register
// and value) must match. At the halt (a jump to itself) the register file
// and the data words must match the model, and the cycle count must equal
// the instruction count (CPI = 1).
module tb_mips_harvard;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int IW = 512, DW = 256, NRAND = 300;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  logic [$clog2(IW)-1:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic [31:0] pc, instr;
  ctrl_t ctrl;
  logic retire, illegal;
  int checks = 0, failures = 0, cycles = 0, steps = 0, run_cycles = 0;

  mips_harvard #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_wdata,
    .pc, .instr, .ctrl, .retire, .illegal
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h)", what, pc);
    end
  endtask

  initial begin
    logic [31:0] prog[$];
    int end_idx;
    bit done = 0;
    mips_iss iss = new(0, IW, DW);

    build_program(prog, NRAND, end_idx);
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = $bits(prog_addr)'(i); prog_wdata = prog[i];
      iss.imem[i] = prog[i];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;

    while (!done) begin
      #1;   // values of this cycle settled
      run_cycles++;
      if (retire) begin
        check(pc == iss.pc, $sformatf("pc %h, model %h", pc, iss.pc));
        iss.step();
        steps++;
        check(dut.u_rf.we == iss.did_wr, "register write enable");
        if (iss.did_wr && iss.wr_reg != 0)
          check(dut.u_rf.wa == 5'(iss.wr_reg) && dut.u_rf.wd == iss.wr_val,
                $sformatf("write r%0d=%h, model r%0d=%h", dut.u_rf.wa, dut.u_rf.wd, iss.wr_reg, iss.wr_val));
        if (pc == 32'(end_idx * 4)) done = 1;
      end
      @(negedge clk);
    end

    for (int i = 0; i < 32; i++)
      check(dut.u_rf.regs[i] == iss.r[i], $sformatf("final r%0d %h, model %h", i, dut.u_rf.regs[i], iss.r[i]));
    for (int k = 0; k < DATA_WORDS; k++) begin
      int idx;
      idx = iss.didx(32'(DATA_BASE + 4 * k));
      check(dut.u_dmem.mem[idx] == iss.load(32'(DATA_BASE + 4 * k)), $sformatf("data word %0d", k));
    end
    check(iss.r[2] == 32'd55 && iss.r[3] == 32'd55 && iss.r[4] == 32'd44 && iss.r[5] == 32'd8 &&
          iss.r[6] == 32'd7 && iss.r[8] == 32'h1234_5678 - 32'd55 && iss.r[9] == 32'h1234_a987 &&
          iss.r[10] == 32'd0 && iss.r[31] == 32'd72 && iss.r[1] == 32'd0, "directed results");
    check(run_cycles == steps, $sformatf("CPI 1: %0d cycles for %0d instructions", run_cycles, steps));
    $display("Harvard: %0d instructions in %0d cycles", steps, run_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
