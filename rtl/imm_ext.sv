// imm_ext: immediate extension unit.
//
// Widens the 16-bit immediate field of an I-type instruction to 32 bits,
// by sign extension (sExt16, ExtSel = EXT_SIGN) for arithmetic, loads,
// stores and branches, or by zero extension (uExt16, ExtSel = EXT_ZERO) for
// the logical immediates. Combinational.
module imm_ext
  import mips_pkg::*;
(
  input  ext_sel_e         ext_sel,
  input  logic [15:0]      imm,
  output logic [XLEN-1:0]  imm_out
);

  always_comb begin
    if (ext_sel == EXT_SIGN) imm_out = {{16{imm[15]}}, imm};
    else                     imm_out = {16'd0, imm};
  end

endmodule
