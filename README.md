# Hardwired, non-pipelined MIPS: Harvard single-cycle and Princeton two-phase

This is RTL for the simplest way to implement a MIPS-style instruction set:
no pipeline, no microcode, only a datapath and a block of combinational
control logic that turns each instruction's opcode into the datapath's
multiplexer selects and write enables. It comes in two variants that run the
same instructions:

* **Harvard** (`mips_harvard`): separate instruction and data memories. Every
  instruction is fetched, decoded, executed, does its data-memory access and
  writes back in **one clock cycle** (CPI = 1). The clock period must cover
  the whole chain, t_C > t_IFetch + t_RFetch + t_ALU + t_DMem + t_RWB.
* **Princeton** (`mips_princeton`): one memory for instructions and data. An
  instruction fetch and the data access of a load or store cannot use the one
  port in the same cycle (a structural hazard), so a two-state controller
  spends one cycle fetching into an instruction register and one executing:
  **CPI = 2**, but the cycle holds only one memory access. When memory time
  dominates, the Princeton cycle is about half the Harvard one and the two
  deliver the same performance.

`mips_top` places both side by side, sharing only clock and reset, so one
program can be run on both and compared.

## Instruction set

32 general-purpose 32-bit registers, R0 reads as zero. All instructions are
32 bits, in the standard MIPS-I formats and codes.

| class | instructions | notes |
|---|---|---|
| ALU (R-type) | ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLLV SRLV SRAV | rd = rs op rt; shifts shift rt by rs[4:0] |
| ALUi | ADDI ADDIU SLTI SLTIU | immediate sign-extended |
| ALUiu | ANDI ORI XORI LUI | immediate zero-extended |
| memory | LW SW | word only, address = rs + sext(imm) |
| branches | BEQZ (op 0x04) BNEZ (op 0x05) | test rs against zero; rt ignored |
| jumps | J JAL JR JALR | JAL and JALR link PC+4 into R31 |

* Branch target: (PC + 4) + sext(offset) × 4, a ±128 KB reach.
* Jump target: {PC[31:28], target, 00}, a 256 MB region. The upper bits come
  from the jump's own PC; MIPS-I takes them from PC + 4.
* There are no delay slots: the instruction after a taken branch or jump is
  not executed.
* ADD and SUB do not trap on overflow. They behave like ADDU and SUBU.
* Any other opcode or func executes as a no-op and raises `illegal` for that
  instruction.
* JALR always links into R31, as the control table below has it. MIPS-I
  links into rd.
* Byte and half-word loads and stores, the shift-by-shamt forms, multiply and
  divide, floating point and exceptions are not implemented.
* Addresses are byte addresses. The memories ignore the two low bits.

## The hardwired control table

Everything the processors do is steered by `ctrl_decode`, a pure
combinational function of opcode, func and the zero test `z` (`z` = 1 when
register rs is zero). Its output is the `ctrl_t` struct (see `mips_pkg`):

| class | ExtSel | BSrc | OpSel | MemW | RegW | WBSrc | RegDst | PCSrc |
|---|---|---|---|---|---|---|---|---|
| ALU | – | Reg | Func | no | yes | ALU | rd | pc+4 |
| ALUi | sExt16 | Imm | Op | no | yes | ALU | rt | pc+4 |
| ALUiu | uExt16 | Imm | Op | no | yes | ALU | rt | pc+4 |
| LW | sExt16 | Imm | + | no | yes | Mem | rt | pc+4 |
| SW | sExt16 | Imm | + | yes | no | – | – | pc+4 |
| BEQZ | sExt16 | – | 0? | no | no | – | – | z ? br : pc+4 |
| BNEZ | sExt16 | – | 0? | no | no | – | – | z ? pc+4 : br |
| J | – | – | – | no | no | – | – | jabs |
| JAL | – | – | – | no | yes | PC | R31 | jabs |
| JR | – | – | – | no | no | – | – | rind |
| JALR | – | – | – | no | yes | PC | R31 | rind |

The fields select, in order: the immediate extension (`imm_ext`), the ALU's B
operand (register rt or immediate), the ALU operation class (`alu_ctrl` turns
Func / Op / + / 0? into an `alu_op_e`), the data-memory write enable, the
register-file write enable, the write-back value (ALU result, memory data or
PC + 4), the destination register, and the next-PC multiplexer (`next_pc`).
Don't-care entries (–) are driven to fixed values.

The "0?" test is part of the ALU (`ALU_ZERO`), and the ALU also brings it out
as a separate `a_is_zero` signal. The branch decision uses that signal, so it
does not pass back through the ALU's operation select. It depends on rs only,
and there is no combinational loop through the control.

## Datapath, cycle by cycle

Both processors are built from the same units:

| module | function |
|---|---|
| `regfile` | 32 × 32, two combinational read ports, one write port at the rising edge, R0 = 0 |
| `ram_1r1w` | memory model: combinational read, write at the rising edge when enabled |
| `imm_ext` | sign or zero extension of the 16-bit immediate |
| `alu_ctrl`, `alu` | operation select and the 32-bit ALU |
| `ctrl_decode` | the hardwired control table |
| `next_pc` | pc+4, branch, absolute-jump and register-indirect targets, PCSrc mux |
| `princeton_phase` | the Princeton fetch/execute flip-flop |

**Harvard.** The PC addresses the instruction memory. The instruction read
feeds the decoder, the register file and the immediate extension, all in the
same cycle. The ALU computes rs op B, and its result addresses the data
memory. The write-back mux picks ALU, memory or PC + 4, and `next_pc` picks
the next PC. At the next rising edge the PC, one register and, for SW, one
memory word are written together. `retire` is high in every cycle after
reset.

**Princeton.** `princeton_phase` toggles between two states:

| phase | memory address | what is written at the end of the cycle |
|---|---|---|
| fetch | PC | IR ← memory word |
| execute | ALU result | PC ← next PC; register (RegW); memory word (MemW) |

Decode reads IR, so the instruction stays stable through its execute cycle.
The register file, memory and PC update only in execute (`exec_en`), and
`retire` is high only then. Every instruction takes both phases, including
those that make no memory access.

## Interfaces

All resets are synchronous and active high. Reset sets the PC to `RESET_PC`
(default 0), clears the register file and, in the Princeton processor, IR,
and puts it in the fetch phase. The memories are not reset.

Programs are loaded through a write port while reset is held:

* `mips_harvard`: `prog_we`, `prog_addr` (word address) and `prog_wdata`
  write the instruction memory, which the processor itself only reads. The
  data memory starts with whatever it holds, so a program should store before
  it loads.
* `mips_princeton`: `load_we`, `load_addr` and `load_wdata` write the unified
  memory. The load port overrides a store in the same cycle.

Both processors bring out `pc`, `instr` (for Princeton, the IR), the decoded
`ctrl` row, `retire` and `illegal`, and the Princeton one also brings out
`phase`. `mips_top` prefixes these with `h_` and `p_`.

| parameter | default | meaning |
|---|---|---|
| `mips_top.H_IMEM_WORDS` | 1024 | Harvard instruction memory, words |
| `mips_top.H_DMEM_WORDS` | 1024 | Harvard data memory, words |
| `mips_top.P_MEM_WORDS` | 2048 | Princeton unified memory, words |
| `RESET_PC` (each processor) | 0 | reset address |

The memory sizes are free choices. Addresses wrap modulo the memory size.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog.

* Unit tests compare against expressions written in the testbench: every ALU
  operation on corner and random operands, every control-table row for both
  values of z, all illegal codes, branch and jump targets at their range
  limits, and register-file and memory read/write ordering around the clock
  edge.
* `tb/mips_tb_pkg.sv` holds a small encoder, a program generator and an
  instruction-set reference model (`mips_iss`). The model is written from
  the instruction semantics, not from the control table. The program has
  directed tests followed by a random block of ALU, load, store and
  forward-branch instructions:
  * a counted loop (BNEZ taken and not taken);
  * BEQZ taken and not taken;
  * JAL and JR, JALR;
  * a write to R0;
  * an unimplemented opcode;
  * a store and a load.
* `tb_mips_harvard` and `tb_mips_princeton` run a processor in lockstep with
  the model. They compare the PC and the register write of every retired
  instruction, then all registers and the data words, and check CPI = 1 and
  CPI = 2 exactly.
* `tb_mips_top` runs both processors at the default sizes on the same
  program. It checks both against the model and against each other, and
  counts the use of every mechanism:
  * each PCSrc and WBSrc choice, and each RegDst choice;
  * both extensions and both B sources;
  * stores and dropped R0 writes;
  * illegal no-ops;
  * Princeton fetches and execute-cycle data accesses.

  A mechanism that never happened is a failure. A typical run is about 490
  instructions. Harvard takes exactly that many cycles and Princeton exactly
  twice as many.

To run one test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

Replace the top module with any other `tb_*`. The unit testbenches need only
`rtl/mips_pkg.sv` plus their module.

## Limits

* Only a subset of the integer instruction set is implemented. There are no
  interrupts or exceptions, no floating-point registers and no special
  registers.
* Memory timing is idealised: reads are combinational and every access
  completes in one cycle. A real SRAM with a registered read would change
  both cycle schemes.
* The Princeton variant spends an execute cycle with an idle memory port on
  instructions that make no data access. A controller that overlaps the next
  fetch with such an execute cycle (CPI < 2) is the obvious next step and is
  not built here.
