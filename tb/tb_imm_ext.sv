// tb_imm_ext: self-checking test of the immediate extension unit, sign and
// zero extension of corner and random 16-bit immediates.
module tb_imm_ext;
  import mips_pkg::*;

  ext_sel_e    sel;
  logic [15:0] imm;
  logic [31:0] y;
  int checks = 0, failures = 0;

  imm_ext dut (.ext_sel(sel), .imm, .imm_out(y));

  task automatic try(ext_sel_e s, logic [15:0] v);
    logic [31:0] exp;
    sel = s; imm = v;
    #1;
    if (s == EXT_SIGN) exp = (v >= 16'h8000) ? 32'hFFFF_0000 + 32'(v) : 32'(v);
    else               exp = 32'(v);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL sel=%s imm=%h y=%h exp=%h", s.name(), v, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel_vals[i]) begin
      try(sel_vals[i], 16'h0000);
      try(sel_vals[i], 16'h7FFF);
      try(sel_vals[i], 16'h8000);
      try(sel_vals[i], 16'hFFFF);
      repeat (300) try(sel_vals[i], 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ext_sel_e sel_vals [2] = '{EXT_SIGN, EXT_ZERO};
endmodule
