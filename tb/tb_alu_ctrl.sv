// tb_alu_ctrl: self-checking test of the ALU control. Each OpSel value is
// tried with every func (for Func) or opcode (for Op) the design implements,
// against the operation the MIPS instruction names.
module tb_alu_ctrl;
  import mips_pkg::*;

  opsel_e     op_sel;
  logic [5:0] opcode, func;
  alu_op_e    alu_op;
  int checks = 0, failures = 0;

  alu_ctrl dut (.op_sel, .opcode, .func, .alu_op);

  task automatic try(opsel_e s, logic [5:0] opc, logic [5:0] fn, alu_op_e exp);
    op_sel = s; opcode = opc; func = fn;
    #1;
    checks++;
    if (alu_op !== exp) begin
      failures++;
      $display("FAIL opsel=%s opcode=%h func=%h got=%s exp=%s", s.name(), opc, fn, alu_op.name(), exp.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // R-type: func field decides
    try(OPSEL_FUNC, 6'h00, 6'h20, ALU_ADD);
    try(OPSEL_FUNC, 6'h00, 6'h21, ALU_ADD);
    try(OPSEL_FUNC, 6'h00, 6'h22, ALU_SUB);
    try(OPSEL_FUNC, 6'h00, 6'h23, ALU_SUB);
    try(OPSEL_FUNC, 6'h00, 6'h24, ALU_AND);
    try(OPSEL_FUNC, 6'h00, 6'h25, ALU_OR);
    try(OPSEL_FUNC, 6'h00, 6'h26, ALU_XOR);
    try(OPSEL_FUNC, 6'h00, 6'h27, ALU_NOR);
    try(OPSEL_FUNC, 6'h00, 6'h2A, ALU_SLT);
    try(OPSEL_FUNC, 6'h00, 6'h2B, ALU_SLTU);
    try(OPSEL_FUNC, 6'h00, 6'h04, ALU_SLL);
    try(OPSEL_FUNC, 6'h00, 6'h06, ALU_SRL);
    try(OPSEL_FUNC, 6'h00, 6'h07, ALU_SRA);
    // immediates: opcode decides, func ignored
    try(OPSEL_OP, 6'h08, 6'h22, ALU_ADD);
    try(OPSEL_OP, 6'h09, 6'h22, ALU_ADD);
    try(OPSEL_OP, 6'h0A, 6'h20, ALU_SLT);
    try(OPSEL_OP, 6'h0B, 6'h20, ALU_SLTU);
    try(OPSEL_OP, 6'h0C, 6'h20, ALU_AND);
    try(OPSEL_OP, 6'h0D, 6'h20, ALU_OR);
    try(OPSEL_OP, 6'h0E, 6'h20, ALU_XOR);
    try(OPSEL_OP, 6'h0F, 6'h20, ALU_LUI);
    // forced operations
    for (int i = 0; i < 64; i++) begin
      try(OPSEL_ADD,  6'(i), 6'(63 - i), ALU_ADD);
      try(OPSEL_ZERO, 6'(i), 6'(63 - i), ALU_ZERO);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
