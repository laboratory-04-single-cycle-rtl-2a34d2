# MIPS 16: a 16-bit single-cycle MIPS processor

MIPS 16 is a reduced MIPS processor: same organisation and same instruction
formats as 32-bit MIPS, but with 16-bit instructions and data, eight registers and a
3-bit opcode. It is small enough that every internal value fits a 16-bit display,
which makes it a good vehicle for seeing how a single-cycle data-path and its control
fit together. Every instruction is fetched, decoded, executed and written back in
one clock cycle, so CPI is exactly 1.

The RTL here implements the whole processor, including a test program in its
instruction ROM. Beside it sits a small ROM tracer that steps through the same
program one word per button pulse.

## Instruction set

All instructions are 16 bits long. There are three formats:

| format | 15..13 | 12..10 | 9..7 | 6..4 | 3  | 2..0  |
|--------|--------|--------|------|------|----|-------|
| R      | opcode | rs     | rt   | rd   | sa | funct |
| I      | opcode | rs     | rt   | imm[6:0] (7 bits)  ||||
| J      | opcode | target[12:0] (13 bits)  ||||||

R-type instructions use opcode `000` and select the operation with `funct`. That
gives 8 R-type and 7 I/J-type instructions, 15 in all:

| instruction      | opcode | funct | operation                                 |
|------------------|--------|-------|-------------------------------------------|
| `add rd,rs,rt`   | 000    | 000   | rd = rs + rt                              |
| `sub rd,rs,rt`   | 000    | 001   | rd = rs - rt                              |
| `sll rd,rt,sa`   | 000    | 010   | rd = rt << sa                             |
| `srl rd,rt,sa`   | 000    | 011   | rd = rt >> sa (zeros shifted in)          |
| `and rd,rs,rt`   | 000    | 100   | rd = rs & rt                              |
| `or rd,rs,rt`    | 000    | 101   | rd = rs \| rt                             |
| `xor rd,rs,rt`   | 000    | 110   | rd = rs ^ rt                              |
| `slt rd,rs,rt`   | 000    | 111   | rd = (rs < rt, signed) ? 1 : 0            |
| `addi rt,rs,imm` | 001    |       | rt = rs + sext(imm)                       |
| `lw rt,imm(rs)`  | 010    |       | rt = MEM[rs + sext(imm)]                  |
| `sw rt,imm(rs)`  | 011    |       | MEM[rs + sext(imm)] = rt                  |
| `beq rs,rt,imm`  | 100    |       | if rs == rt: PC = PC + 1 + sext(imm)      |
| `andi rt,rs,imm` | 101    |       | rt = rs & zext(imm)                       |
| `ori rt,rs,imm`  | 110    |       | rt = rs \| zext(imm)                      |
| `j target`       | 111    |       | PC = {(PC+1)[15:13], target}              |

The base set is add, sub, sll, srl, and, or, addi, lw, sw, beq and j. Each
implementation is meant to add two R-type and two I-type instructions of its own.
This design adds xor and slt (R-type) and andi and ori (I-type). The numeric opcode
and function codes are also this design's own; only "R-type has opcode 0" comes
from MIPS.

Things to keep in mind when writing programs:

- **Word addressing.** Each address holds one 16-bit word, so the PC steps by 1, not
  by 4. Branch offsets count instructions relative to PC+1. Load and store
  addresses are word addresses.
- **Shifts by 0 or 1.** The `sa` field is one bit wide, so `sll` and `srl` shift by
  at most one position.
- **Immediates are 7 bits.** addi, lw, sw and beq sign-extend them (range −64..63).
  andi and ori zero-extend them (0..127), following the MIPS rule for logical
  immediates.
- **`$0` is always zero.** Writes to it are ignored, as in MIPS. The all-zero word
  (`add $0,$0,$0`) is therefore a no-op.
- **Overflow is ignored.** add, sub and addi wrap around.

## Data-path

`mips16_top` wires the blocks into the classic single-cycle MIPS data-path. Within
one clock cycle:

1. **Fetch.** `program_counter` holds the PC. `instr_rom` returns the instruction at
   that address combinationally.
2. **Decode.** `main_control` turns the opcode into the control word. `reg_file`
   reads rs and rt combinationally. `ext_unit` widens the 7-bit immediate: sign
   extension when ExtOp = 1, zero extension when ExtOp = 0.
3. **Execute.** `alu_control` derives the 3-bit ALUCtrl from ALUOp and, for R-type,
   from funct. The ALU's B operand is rt, or the immediate when ALUSrc = 1. `alu`
   produces the result and a Zero flag.
4. **Memory.** `data_ram` is addressed by the ALU result. It reads combinationally
   and writes rt at the clock edge when MemWrite = 1.
5. **Write-back.** The ALU result, or the memory data when MemtoReg = 1, goes to rd
   (RegDst = 1) or rt (RegDst = 0) at the clock edge when RegWrite = 1.
6. **Next PC.** The next PC is chosen in this order of priority:
   - Jump = 1: `{(PC+1)[15:13], target}`.
   - Branch = 1 and Zero = 1: `PC+1+sext(imm)`.
   - Otherwise: `PC+1`.

The PC, the written register and the written memory word all update on the same
rising edge. No value is held across cycles except in those three places. The
longest combinational path runs from the PC through the ROM, register file, ALU and
RAM read to the register-file write data. This path sets the clock period; the RTL
places no constraint on it.

### Control

The control is decoded in two levels, as in the usual MIPS design. `main_control`
maps the opcode to the signals below. Don't-care signals are driven to 0.

| instr  | RegDst | ExtOp | ALUSrc | Branch | Jump | ALUOp | MemWrite | MemtoReg | RegWrite |
|--------|:------:|:-----:|:------:|:------:|:----:|:-----:|:--------:|:--------:|:--------:|
| R-type | 1      | 0     | 0      | 0      | 0    | RTYPE | 0        | 0        | 1        |
| addi   | 0      | 1     | 1      | 0      | 0    | ADD   | 0        | 0        | 1        |
| lw     | 0      | 1     | 1      | 0      | 0    | ADD   | 0        | 1        | 1        |
| sw     | 0      | 1     | 1      | 0      | 0    | ADD   | 1        | 0        | 0        |
| beq    | 0      | 1     | 0      | 1      | 0    | SUB   | 0        | 0        | 0        |
| andi   | 0      | 0     | 1      | 0      | 0    | AND   | 0        | 0        | 1        |
| ori    | 0      | 0     | 1      | 0      | 0    | OR    | 0        | 0        | 1        |
| j      | 0      | 0     | 0      | 0      | 1    | ADD   | 0        | 0        | 0        |

`alu_control` then maps ALUOp to ALUCtrl:

- RTYPE passes funct through, since the function codes and ALUCtrl codes coincide.
- ADD, SUB, AND and OR select that operation directly.

ALUOp needs 3 bits rather than the usual 2, because andi and ori each need their own
ALU operation. The ALU performs eight operations, so ALUCtrl is also 3 bits. All the
encodings are in `rtl/mips16_pkg.sv` as enums, together with the control-word struct
`ctrl_t`.

## Memories and register file

| block        | organisation                    | read          | write                           | reset        |
|--------------|---------------------------------|---------------|---------------------------------|--------------|
| `instr_rom`  | `DEPTH` × 16 bit (default 256)  | combinational | none                            | none         |
| `data_ram`   | `DEPTH` × 16 bit (default 256)  | combinational | rising edge, MemWrite           | none         |
| `reg_file`   | 8 × 16 bit, 2 read + 1 write    | combinational | rising edge, RegWrite           | all cleared  |

- **Depth.** Both memories use the low log2(DEPTH) address bits and ignore the
  rest, so contents repeat through the 16-bit address space. The depth of 256
  words is a free choice.
- **Read during write.** A register read in the same cycle as a write to that
  register returns the old value.
- **Reset.** Reset is synchronous and active high. It clears the PC and the
  registers. It does not clear the data RAM, so a program must store a word before
  loading it.

## The test program

The instruction ROM holds a 28-word program. It is listed with its expected
effects in the header of `rtl/instr_rom.sv`. The program works in two parts:

- **A loop.** It stores 5, 4, 3, 2, 1 to words 16..20, loads each back and sums
  them into `$2` (15). This uses sw, lw, add, addi with a negative immediate, a
  not-taken beq and a backward j. The loop ends through a taken beq.
- **The rest of the instruction set.** A straight run covers sub, sll, srl, and,
  or, xor, both outcomes of slt, ori and andi with immediates that sign extension
  would change, a write to `$0`, a store and load with offset −1, and a forward
  branch that skips one instruction.

The program then halts in `j 27`, a jump to itself, which it reaches after exactly
53 instructions (53 cycles). The final state is:

- Registers: `$1 = 0x8001`, `$2 = 15`, `$3 = 21`, `$4 = 0x7FF8`, `$5 = 0xFFF1`,
  `$6 = 0x8001`, `$7 = 0xFFFF`.
- Memory: word 0 = 15, words 16..19 = 5, 4, 3, 2, word 20 = 0x8001.

To run another program, replace the `program_word` case table in
`rtl/instr_rom.sv`. The `enc_r`, `enc_i` and `enc_j` functions in `mips16_pkg` build
the instruction words.

## ROM tracer

`rom_tracer` is a 16-bit counter feeding its own copy of the ROM. Each clock cycle
with `step` high advances it by one address. It is meant for checking a program on
a board before the processor runs it: each press of a debounced push button shows
the next address and instruction. In `mips16_top` it has its own ports
(`trace_step`, `trace_addr`, `trace_instr`) and shares nothing with the processor
except clock and reset.

## Top-level ports

`mips16_top` has two parameters, `IMEM_DEPTH` and `DMEM_DEPTH`. Both default to
256. Its ports:

- **Inputs:** `clk`, `rst` (synchronous, active high) and `trace_step`.
- **Processor debug outputs:** `pc`, `instr`, `next_pc`, `rd1`, `rd2`, `ext_imm`,
  `alu_res`, `mem_rd`, `wb_data`, `wb_addr` and the control word `ctrl`.
- **Tracer outputs:** `trace_addr` and `trace_instr`.

The debug outputs are there so a board display can select among them.

## Not included

- **Push-button pulse generator.** It is not included; drive `trace_step` with a
  one-cycle pulse.
- **Seven-segment and LED display drivers.** They are not included either. Their
  inputs would be the debug outputs.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.
The testbenches share the hand-assembled reference program in
`tb/mips16_tb_pkg.sv`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    --top-module tb_mips16_top rtl/mips16_pkg.sv tb/mips16_tb_pkg.sv tb/tb_mips16_top.sv
./obj_dir/Vtb_mips16_top
```

The packages are listed first; the modules are found in `rtl/` and `tb/` by name.
Other blocks work the same way: change the top module and the testbench file. The
block testbenches are `tb_alu`, `tb_alu_control`, `tb_main_control`, `tb_ext_unit`,
`tb_reg_file`, `tb_data_ram`, `tb_instr_rom`, `tb_program_counter` and
`tb_rom_tracer`.

`tb_mips16_top` runs the processor at its default sizes against an
instruction-level reference model written in the testbench:

- **Per cycle.** It compares the PC, the instruction, the next PC, every register
  write-back and every store with the model.
- **Timing.** It requires the halt loop to be reached after exactly 53 cycles.
- **Final state.** It checks the final registers and memory against the
  hand-worked values above.
- **Coverage.** It counts each mechanism: taken and not-taken branches, jumps,
  loads, stores, sign and zero extension, shifts, slt, a discarded write to `$0`
  and tracer steps. It fails if any of them never happens.

## How far to trust it

Every block passes its testbench. Each testbench has been shown to fail when one
thing in its block is broken deliberately: a wrong reset value, a wrong branch
target, slt comparing unsigned, and similar faults. Verilator's lint reports
only unused-signal and unused-parameter warnings: the memories ignore their upper
address bits, and some modules use only part of the shared package.

The test program is the only software it has run. No timing or FPGA results are
claimed.

These parts are design choices rather than fixed by the architecture, and a port to
another variant of this processor would most likely differ in them:

- word addressing of the PC and data memory
- the jump-target formation
- the opcode, function, ALUOp and ALUCtrl codes
- the memory depths
- the reset behaviour
