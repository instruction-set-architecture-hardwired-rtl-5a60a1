// mips_tb_pkg: testbench support for the MIPS implementations.
//
// Contains an instruction encoder (a tiny assembler), a program generator
// that builds a directed test followed by a block of random ALU, load,
// store and forward-branch instructions, and an instruction-set reference
// model (mips_iss) written directly from the instruction semantics,
// independent of the RTL's control table. Testbenches run the model in lockstep with a processor and compare
// the PC of every retired instruction and the final architectural state.
package mips_tb_pkg;

  // ---- encoder --------------------------------------------------------------
  function automatic logic [31:0] enc_r(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(input logic [5:0] op, input int word_target);
    return {op, 26'(word_target)};
  endfunction

  localparam logic [5:0] R_FUNCS [13] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26,
                                          6'h27, 6'h2A, 6'h2B, 6'h04, 6'h06, 6'h07};
  localparam logic [5:0] I_OPS [8] = '{6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F};

  localparam int DATA_BASE = 32'h1000;  // byte address held in r28
  localparam int DATA_WORDS = 64;       // data words the program touches

  // Builds the test program. Returns the word index of the final
  // self-jump ("halt") in end_idx.
  function automatic void build_program(ref logic [31:0] prog[$], input int nrand, output int end_idx);
    int k;
    prog.delete();
    prog.push_back(enc_i(6'h0F, 29, 0, 16'h1234));   //  0 lui  r29, 0x1234
    prog.push_back(enc_i(6'h0D, 29, 29, 16'h5678));  //  1 ori  r29, r29, 0x5678
    prog.push_back(enc_i(6'h0D, 28, 0, DATA_BASE));  //  2 ori  r28, r0, DATA_BASE
    prog.push_back(enc_i(6'h08, 1, 0, 10));          //  3 addi r1, r0, 10
    prog.push_back(enc_i(6'h08, 2, 0, 0));           //  4 addi r2, r0, 0
    prog.push_back(enc_r(6'h20, 2, 2, 1));           //  5 loop: add r2, r2, r1
    prog.push_back(enc_i(6'h08, 1, 1, -1));          //  6 addi r1, r1, -1
    prog.push_back(enc_i(6'h05, 0, 1, -3));          //  7 bnez r1, loop
    prog.push_back(enc_i(6'h2B, 2, 28, 0));          //  8 sw   r2, 0(r28)
    prog.push_back(enc_i(6'h23, 3, 28, 0));          //  9 lw   r3, 0(r28)
    prog.push_back(enc_i(6'h04, 0, 0, 1));           // 10 beqz r0, 12 (taken)
    prog.push_back(enc_i(6'h08, 4, 0, 99));          // 11 addi r4, r0, 99 (skipped)
    prog.push_back(enc_i(6'h04, 0, 3, 1));           // 12 beqz r3, 14 (not taken)
    prog.push_back(enc_i(6'h08, 4, 0, 44));          // 13 addi r4, r0, 44
    prog.push_back(enc_j(6'h03, 20));                // 14 jal  func
    prog.push_back(enc_i(6'h08, 5, 6, 1));           // 15 addi r5, r6, 1
    prog.push_back(enc_i(6'h0D, 7, 0, 22 * 4));      // 16 ori  r7, r0, func2
    prog.push_back(enc_r(6'h09, 31, 7, 0));          // 17 jalr r7
    prog.push_back(enc_i(6'h08, 0, 0, 5));           // 18 addi r0, r0, 5 (no effect)
    prog.push_back(enc_j(6'h02, 24));                // 19 j    over
    prog.push_back(enc_i(6'h08, 6, 0, 7));           // 20 func: addi r6, r0, 7
    prog.push_back(enc_r(6'h08, 0, 31, 0));          // 21 jr   r31
    prog.push_back(enc_r(6'h22, 8, 29, 2));          // 22 func2: sub r8, r29, r2
    prog.push_back(enc_r(6'h08, 0, 31, 0));          // 23 jr   r31
    prog.push_back(32'hFC00_0000);                   // 24 over: unimplemented opcode (no-op)
    prog.push_back(enc_i(6'h0E, 9, 29, 16'hFFFF));   // 25 xori r9, r29, 0xffff (zero-extended)
    prog.push_back(enc_i(6'h0A, 10, 8, -1));         // 26 slti r10, r8, -1
    // clear the data words the random block may load
    for (k = 0; k < DATA_WORDS; k++) prog.push_back(enc_i(6'h2B, 0, 28, 4 * k));
    // random block; branches only go forward and never past the halt
    for (k = 0; k < nrand; k++) begin
      int sel = int'($urandom_range(0, 10));
      int off = int'($urandom_range(0, 3));
      int rd  = int'($urandom_range(11, 27));
      int rs  = int'($urandom_range(0, 29));
      int rt  = int'($urandom_range(0, 29));
      if (sel < 4)       prog.push_back(enc_r(R_FUNCS[$urandom_range(0, 12)], rd, rs, rt));
      else if (sel < 7)  prog.push_back(enc_i(I_OPS[$urandom_range(0, 7)], rd, rs, int'($urandom_range(0, 65535))));
      else if (sel < 8)  prog.push_back(enc_i(6'h23, rd, 28, 4 * int'($urandom_range(0, DATA_WORDS - 1))));
      else if (sel < 10 || k + off >= nrand)
                         prog.push_back(enc_i(6'h2B, rt, 28, 4 * int'($urandom_range(0, DATA_WORDS - 1))));
      else               prog.push_back(enc_i($urandom_range(0, 1) ? 6'h04 : 6'h05, 0, rs, off));  // forward branch
    end
    end_idx = prog.size();
    prog.push_back(enc_j(6'h02, end_idx));           // halt: j halt
  endfunction

  // ---- reference model --------------------------------------------------------
  class mips_iss;
    logic [31:0] r [32];
    logic [31:0] pc;
    logic [31:0] imem [int];
    logic [31:0] dmem [int];
    bit          unified;
    int          iwords, dwords;
    // what the last step did
    bit          did_wr;
    int          wr_reg;
    logic [31:0] wr_val;

    function new(bit unified_mem, int imem_words, int dmem_words);
      unified = unified_mem;
      iwords  = imem_words;
      dwords  = dmem_words;
      pc      = '0;
      foreach (r[i]) r[i] = '0;
    endfunction

    function int iidx(logic [31:0] a); return int'((a >> 2) % iwords); endfunction
    function int didx(logic [31:0] a); return int'((a >> 2) % dwords); endfunction

    function logic [31:0] fetch(logic [31:0] a);
      if (unified) return dmem.exists(didx(a)) ? dmem[didx(a)] : 32'h0;
      return imem.exists(iidx(a)) ? imem[iidx(a)] : 32'h0;
    endfunction
    function logic [31:0] load(logic [31:0] a);
      return dmem.exists(didx(a)) ? dmem[didx(a)] : 32'h0;
    endfunction

    function void wr(int n, logic [31:0] v);
      did_wr = 1; wr_reg = n; wr_val = v;
      if (n != 0) r[n] = v;
    endfunction

    function void step();
      logic [31:0] ins, a, b, se, ze, nxt;
      logic [5:0]  op, fn;
      int          rs, rt, rd;
      ins = fetch(pc);
      op  = ins[31:26]; fn = ins[5:0];
      rs  = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      a   = r[rs]; b = r[rt];
      se  = {{16{ins[15]}}, ins[15:0]};
      ze  = {16'h0, ins[15:0]};
      nxt = pc + 4;
      did_wr = 0;
      case (op)
        6'h00: case (fn)
          6'h20, 6'h21: wr(rd, a + b);
          6'h22, 6'h23: wr(rd, a - b);
          6'h24: wr(rd, a & b);
          6'h25: wr(rd, a | b);
          6'h26: wr(rd, a ^ b);
          6'h27: wr(rd, ~(a | b));
          6'h2A: wr(rd, ($signed(a) < $signed(b)) ? 32'd1 : 32'd0);
          6'h2B: wr(rd, (a < b) ? 32'd1 : 32'd0);
          6'h04: wr(rd, b << a[4:0]);
          6'h06: wr(rd, b >> a[4:0]);
          6'h07: wr(rd, $unsigned($signed(b) >>> a[4:0]));
          6'h08: nxt = a;
          6'h09: begin wr(31, pc + 4); nxt = a; end
          default: ;
        endcase
        6'h08, 6'h09: wr(rt, a + se);
        6'h0A: wr(rt, ($signed(a) < $signed(se)) ? 32'd1 : 32'd0);
        6'h0B: wr(rt, (a < se) ? 32'd1 : 32'd0);
        6'h0C: wr(rt, a & ze);
        6'h0D: wr(rt, a | ze);
        6'h0E: wr(rt, a ^ ze);
        6'h0F: wr(rt, {ins[15:0], 16'h0});
        6'h23: wr(rt, load(a + se));
        6'h2B: dmem[didx(a + se)] = b;
        6'h04: if (a == 0) nxt = pc + 4 + (se << 2);
        6'h05: if (a != 0) nxt = pc + 4 + (se << 2);
        6'h02: nxt = {pc[31:28], ins[25:0], 2'b00};
        6'h03: begin wr(31, pc + 4); nxt = {pc[31:28], ins[25:0], 2'b00}; end
        default: ;
      endcase
      pc = nxt;
    endfunction
  endclass

endpackage
