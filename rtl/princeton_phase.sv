// princeton_phase: two-state controller of the Princeton implementation.
//
// With a single memory for instructions and data, an instruction fetch and
// the data access of a load or store cannot happen in the same cycle (a
// structural hazard). Each instruction therefore takes two cycles, and one
// flip-flop remembers which of them is under way:
//   PH_FETCH  the memory is addressed by the PC and the word read is
//             captured in the instruction register (ir_en);
//   PH_EXEC   the memory is addressed by the ALU result, and the register
//             file, the memory and the PC are updated at the end of the
//             cycle (exec_en).
// The phase toggles every cycle. Synchronous active-high reset returns the
// controller to PH_FETCH. The result is CPI = 2.
module princeton_phase
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  output phase_e phase,
  output logic   ir_en,     // load the instruction register this cycle
  output logic   exec_en,   // allow PC, register-file and memory updates
  output logic   addr_pc    // memory address comes from the PC
);

  always_ff @(posedge clk) begin
    if (rst) phase <= PH_FETCH;
    else     phase <= (phase == PH_FETCH) ? PH_EXEC : PH_FETCH;
  end

  assign ir_en   = !rst && phase == PH_FETCH;
  assign exec_en = !rst && phase == PH_EXEC;
  assign addr_pc = (phase == PH_FETCH);

endmodule
