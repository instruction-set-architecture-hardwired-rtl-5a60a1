// tb_next_pc: self-checking test of the next-PC logic: sequential,
// PC-relative branch (forward, backward, the +-128 KB extremes), absolute
// jump within the 256 MB region, and register-indirect targets.
module tb_next_pc;
  import mips_pkg::*;

  logic [31:0] pc, imm_sext, rs_val, pc_plus4, npc;
  logic [25:0] target;
  pcsrc_e      pc_src;
  int checks = 0, failures = 0;

  next_pc dut (.pc, .pc_src, .imm_sext, .target, .rs_val, .pc_plus4, .npc);

  task automatic try(pcsrc_e s, logic [31:0] p, logic [15:0] off, logic [25:0] t, logic [31:0] r,
                     logic [31:0] exp);
    pc_src = s; pc = p; imm_sext = {{16{off[15]}}, off}; target = t; rs_val = r;
    #1;
    checks++;
    if (npc !== exp || pc_plus4 !== p + 4) begin
      failures++;
      $display("FAIL src=%s pc=%h off=%h t=%h rs=%h npc=%h exp=%h", s.name(), p, off, t, r, npc, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(PC_PLUS4, 32'h0000_0100, 16'h0003, 26'h0, 32'h0, 32'h0000_0104);
    try(PC_BR,    32'h0000_0100, 16'h0003, 26'h0, 32'h0, 32'h0000_0110);
    try(PC_BR,    32'h0000_0100, 16'hFFFD, 26'h0, 32'h0, 32'h0000_00F8);
    try(PC_BR,    32'h0010_0000, 16'h7FFF, 26'h0, 32'h0, 32'h0012_0000);  // +128 KB - 4 + 4
    try(PC_BR,    32'h0010_0000, 16'h8000, 26'h0, 32'h0, 32'h000E_0004);  // -128 KB + 4
    try(PC_JABS,  32'h3000_0040, 16'h0000, 26'h3FF_FFFF, 32'h0, 32'h3FFF_FFFC);
    try(PC_JABS,  32'hA123_4560, 16'h0000, 26'h000_0010, 32'h0, 32'hA000_0040);
    try(PC_RIND,  32'h0000_0040, 16'h0000, 26'h0, 32'hDEAD_BEE0, 32'hDEAD_BEE0);
    repeat (500) begin
      logic [31:0] p, r, se;
      logic [15:0] o;
      logic [25:0] t;
      p = $urandom & ~32'h3;
      r = $urandom;
      o = 16'($urandom);
      t = 26'($urandom);
      se = {{16{o[15]}}, o};
      try(PC_PLUS4, p, o, t, r, p + 4);
      try(PC_BR,    p, o, t, r, p + 4 + se * 4);
      try(PC_JABS,  p, o, t, r, (p & 32'hF000_0000) | (32'(t) * 4));
      try(PC_RIND,  p, o, t, r, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
