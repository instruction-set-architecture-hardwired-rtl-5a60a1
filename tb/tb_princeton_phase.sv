// tb_princeton_phase: self-checking test of the two-state controller. After
// reset the controller must be in fetch, then alternate fetch/execute every
// cycle with exactly one of ir_en and exec_en high, the memory address taken
// from the PC only in fetch, and nothing enabled while reset is high.
module tb_princeton_phase;
  import mips_pkg::*;
  logic   clk = 0, rst;
  phase_e phase;
  logic   ir_en, exec_en, addr_pc;
  int checks = 0, failures = 0, cycles = 0;

  princeton_phase dut (.clk, .rst, .phase, .ir_en, .exec_en, .addr_pc);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(phase_e p, logic in_reset);
    checks++;
    if (phase != p || ir_en !== (!in_reset && p == PH_FETCH) || exec_en !== (!in_reset && p == PH_EXEC) ||
        addr_pc !== (p == PH_FETCH)) begin
      failures++;
      $display("FAIL t=%0t phase=%s exp=%s ir_en=%b exec_en=%b addr_pc=%b", $time, phase.name(), p.name(),
               ir_en, exec_en, addr_pc);
    end
  endtask

  initial begin
    phase_e exp;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 expect_phase(PH_FETCH, 1);
    for (int run = 0; run < 4; run++) begin
      @(negedge clk); rst = 0;
      exp = PH_FETCH;
      repeat (50 + run * 7) begin
        #1 expect_phase(exp, 0);
        @(posedge clk); #1;
        exp = (exp == PH_FETCH) ? PH_EXEC : PH_FETCH;
        expect_phase(exp, 0);
        @(negedge clk);
      end
      // reset in the middle of an instruction returns to fetch
      rst = 1;
      #1 checks++;
      if (ir_en || exec_en) begin failures++; $display("FAIL enables during reset"); end
      @(posedge clk); #1 expect_phase(PH_FETCH, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
