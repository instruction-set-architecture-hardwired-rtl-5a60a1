// tb_ctrl_decode: self-checking test of the hardwired control. For every
// instruction of the set, and for both values of the zero test, the decoded
// fields are compared with the row of the control table written out here;
// fields the table marks as don't-care are not compared. Unimplemented
// opcodes and funcs must decode to a no-op with illegal set.
module tb_ctrl_decode;
  import mips_pkg::*;

  logic [5:0] opcode, func;
  logic       z;
  ctrl_t      ctrl;
  logic       illegal;
  int checks = 0, failures = 0;

  ctrl_decode dut (.opcode, .func, .z, .ctrl, .illegal);

  // Expected row; care bits: ext, bsrc, opsel, wb, dst (mem_w, reg_w, pc_src always compared)
  typedef struct {
    string    name;
    logic [5:0] opc, fn;
    bit       c_ext;  ext_sel_e ext;
    bit       c_bsrc; bsrc_e    bsrc;
    bit       c_op;   opsel_e   op;
    logic     memw, regw;
    bit       c_wb;   wbsrc_e   wb;
    bit       c_dst;  regdst_e  dst;
    pcsrc_e   pc_z0, pc_z1;
  } row_t;

  task automatic check_row(row_t r);
    for (int zz = 0; zz < 2; zz++) begin
      opcode = r.opc; func = r.fn; z = zz[0];
      #1;
      checks++;
      if ((r.c_ext && ctrl.ext_sel != r.ext) || (r.c_bsrc && ctrl.bsrc != r.bsrc) ||
          (r.c_op && ctrl.op_sel != r.op) || ctrl.mem_w !== r.memw || ctrl.reg_w !== r.regw ||
          (r.c_wb && ctrl.wb_src != r.wb) || (r.c_dst && ctrl.reg_dst != r.dst) ||
          ctrl.pc_src != (zz ? r.pc_z1 : r.pc_z0) || illegal !== 1'b0) begin
        failures++;
        $display("FAIL %s z=%0d: %p", r.name, zz, ctrl);
      end
    end
  endtask

  row_t rows [$];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] rfn [13] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B, 6'h04, 6'h06, 6'h07};
    logic [5:0] aluis [4] = '{6'h08, 6'h09, 6'h0A, 6'h0B};
    logic [5:0] aluius [4] = '{6'h0C, 6'h0D, 6'h0E, 6'h0F};
    foreach (rfn[i])
      rows.push_back('{"ALU", 6'h00, rfn[i], 0, EXT_SIGN, 1, BSRC_REG, 1, OPSEL_FUNC, 0, 1, 1, WB_ALU, 1, DST_RD, PC_PLUS4, PC_PLUS4});
    foreach (aluis[i])
      rows.push_back('{"ALUi", aluis[i], 6'h3F, 1, EXT_SIGN, 1, BSRC_IMM, 1, OPSEL_OP, 0, 1, 1, WB_ALU, 1, DST_RT, PC_PLUS4, PC_PLUS4});
    foreach (aluius[i])
      rows.push_back('{"ALUiu", aluius[i], 6'h3F, 1, EXT_ZERO, 1, BSRC_IMM, 1, OPSEL_OP, 0, 1, 1, WB_ALU, 1, DST_RT, PC_PLUS4, PC_PLUS4});
    rows.push_back('{"LW",   6'h23, 6'h08, 1, EXT_SIGN, 1, BSRC_IMM, 1, OPSEL_ADD, 0, 1, 1, WB_MEM, 1, DST_RT, PC_PLUS4, PC_PLUS4});
    rows.push_back('{"SW",   6'h2B, 6'h08, 1, EXT_SIGN, 1, BSRC_IMM, 1, OPSEL_ADD, 1, 0, 0, WB_ALU, 0, DST_RT, PC_PLUS4, PC_PLUS4});
    rows.push_back('{"BEQZ", 6'h04, 6'h00, 1, EXT_SIGN, 0, BSRC_REG, 1, OPSEL_ZERO, 0, 0, 0, WB_ALU, 0, DST_RT, PC_PLUS4, PC_BR});
    rows.push_back('{"BNEZ", 6'h05, 6'h00, 1, EXT_SIGN, 0, BSRC_REG, 1, OPSEL_ZERO, 0, 0, 0, WB_ALU, 0, DST_RT, PC_BR, PC_PLUS4});
    rows.push_back('{"J",    6'h02, 6'h09, 0, EXT_SIGN, 0, BSRC_REG, 0, OPSEL_ADD, 0, 0, 0, WB_ALU, 0, DST_RT, PC_JABS, PC_JABS});
    rows.push_back('{"JAL",  6'h03, 6'h08, 0, EXT_SIGN, 0, BSRC_REG, 0, OPSEL_ADD, 0, 1, 1, WB_PC, 1, DST_R31, PC_JABS, PC_JABS});
    rows.push_back('{"JR",   6'h00, 6'h08, 0, EXT_SIGN, 0, BSRC_REG, 0, OPSEL_ADD, 0, 0, 0, WB_ALU, 0, DST_RT, PC_RIND, PC_RIND});
    rows.push_back('{"JALR", 6'h00, 6'h09, 0, EXT_SIGN, 0, BSRC_REG, 0, OPSEL_ADD, 0, 1, 1, WB_PC, 1, DST_R31, PC_RIND, PC_RIND});
    foreach (rows[i]) check_row(rows[i]);

    // everything else is illegal and harmless
    for (int o = 0; o < 64; o++) begin
      bit known;
      known = 0;
      foreach (rows[i]) if (rows[i].opc == 6'(o)) known = 1;
      if (o == 0) continue;
      opcode = 6'(o); func = 6'($urandom); z = 1'($urandom);
      #1;
      checks++;
      if (illegal !== !known || (!known && (ctrl.mem_w || ctrl.reg_w || ctrl.pc_src != PC_PLUS4))) begin
        failures++;
        $display("FAIL opcode %h illegal=%b", o, illegal);
      end
    end
    for (int f = 0; f < 64; f++) begin
      bit known;
      known = 0;
      foreach (rows[i]) if (rows[i].opc == 6'h00 && rows[i].fn == 6'(f)) known = 1;
      opcode = 6'h00; func = 6'(f); z = 1'($urandom);
      #1;
      checks++;
      if (illegal !== !known || (!known && (ctrl.mem_w || ctrl.reg_w || ctrl.pc_src != PC_PLUS4))) begin
        failures++;
        $display("FAIL func %h illegal=%b", f, illegal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
