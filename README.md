# RISC_4spipelining_16bit: a four-stage, two-edge pipelined RISC core with clock gating

This is a small in-order RISC processor. Its instruction words are 16 bits wide, its data path is
8 bits wide, and it has sixteen general-purpose registers. The pipeline has four stages: fetch,
decode, execute and memory/write-back. The stages alternate between the rising and the falling
clock edge, so one instruction goes from fetch to write-back in one and a half cycles, and the
core still finishes one instruction per cycle. Three features keep the pipeline full:

- A result written back on a falling edge is handed to the decode stage on that same edge, so
  back-to-back dependent instructions need no stall.
- A two-bit dynamic branch predictor lets correctly predicted branches cost nothing. A
  mispredicted branch costs one cycle.
- Only the multi-cycle MUL stalls the pipeline. It is a multiplier built from the ALU adder.

For low power, a latch-based clock gate stops the whole core after `HLT`. A second gate clocks the
multiplier only while a MUL is running. The decode register also reloads the immediate and the ry
operand only for instructions that use them.

The design follows the published description of a "16-bit low power pipelined RISC processor":
its stage list and clock edges, its block diagram and its RTL schematics (a 2:1 operand mux, the
instruction memory, the program counter), its signal names and its feature list. That description
says little about encodings and internals. Everything it does not fix is a choice made here, and
each module's opening comment says which parts are which.

## The two-edge pipeline

| edge | stage | what is registered |
|---|---|---|
| rising | **IF** fetch | `ifid` ← instruction memory at PC; PC ← PC+1, or PC+offset if the fetched word is `JMP` or a conditional branch predicted taken |
| falling | **ID** decode | `idex` ← control word, register indices, immediate, rx/ry operands read from the register file |
| rising | **EX** execute | `exwb` ← ALU / shifter / multiplier result (or memory address and store data); zero flag; branch resolved, and on a mispredict the PC is corrected and `ifid` squashed; `HLT` sets `halted` |
| falling | **MEM/WB** | data memory written (STORE) or read (LOAD); register file written |

For instruction *i*, fetched on rising edge *t*: it is decoded at *t*+½, executed at *t*+1 and
written back at *t*+1½. Instruction *i*+1 is decoded at that same *t*+1½ edge. The register file's
read ports pass through the value being written when the addresses match. So *i*+1 latches *i*'s
result even though the write and the read happen on one edge. Instruction *i*+2 is decoded at
*t*+2½, after the write. No other forwarding path is needed, and no data hazard causes a stall.
This holds for loads as well. The data memory is read asynchronously in the MEM/WB half-cycle, and
its output goes through the same write-through path.

Every register in the core is clocked by `core_clk`, the gated clock. The only exception is
`halted`, which runs on the free clock, because it has to stay valid after the core clock stops.

## Instruction word and instruction set

```
R  op[15:12] rd[11:8] rx[7:4] ry[3:0]     rd = rx OP ry
U  op=8      rd       rx      fn          rd = FN(rx)
I  op[15:12] rd[11:8] imm[7:0]            MVI, branches (imm = signed PC offset)
M  op[15:12] rd[11:8] base[7:4] off[3:0]  LOAD/STORE at base + signed off
```

| op | mnemonic | effect | Z flag |
|---|---|---|---|
| 0 | NOP | nothing | – |
| 1 | MVI rd, imm8 | rd = imm8 | – |
| 2 / 3 | ADD / SUB rd, rx, ry | rd = rx ± ry | set |
| 4 / 5 / 6 | AND / OR / XOR | bitwise | set |
| 7 | MUL rd, rx, ry | rd = (rx·ry) mod 256, 9 execute cycles | set |
| 8 | unary, fn = 0..7 | NOT, INC, DEC, MOV, SHL, SHR, ROL, ROR (all by one bit) | set |
| 9 / A | NAND / NOR | bitwise | set |
| B | BRZ rd, off8 | branch if register rd = 0 | – |
| C | LOAD rd, [base+off4] | rd = mem[base + sext(off4)] | – |
| D | STORE rd, [base+off4] | mem[base + sext(off4)] = rd | – |
| E | JMP / BZ / BNZ off8 (rd field = 0 / 1 / 2) | PC-relative; BZ/BNZ test Z | – |
| F | HLT | stop; core clock gated off | – |

A branch target is the branch's own address plus the sign-extended 8-bit offset. Undefined `fn`
values and undefined branch conditions decode as NOP. The zero flag is written only by
instructions that compute a result (ALU, shift, MUL). MVI and LOAD leave it alone.

The field positions reproduce the reference simulation waveform's decode values. For example,
`12AA` decodes to immediate `AA` with rx index 2, and `5323` decodes to rx 2, ry 3. The opcode
numbers themselves are this design's own assignment. The `control_unit` has two decode sections:
one maps opcodes to arithmetic/logic operations and controls, and one maps the unary `fn` field to
shifts and rotates.

## Multiplying with the adder, and the stall it needs

`multiplier` is a shift-and-add sequencer around an `alu` instance fixed to ADD. A MUL spends
W+1 = 9 cycles in execute: one cycle captures the operands, then there are eight add/shift steps,
and the product is latched on the last step. `hazard_detection_unit` handles it as follows:

- `mul_start` is raised while a MUL sits in execute and the multiplier is idle.
- While `mul_busy` is high, fetch and the PC hold (`stall_fetch`), the decode register holds
  (`hold_decode`, sampled on the falling edge), and execute sends bubbles to write-back
  (`ex_bubble`) until `mul_last`.
- On the start cycle itself, fetch still advances once. The instruction behind the MUL then waits
  in `ifid`.

The net cost is exactly 8 extra cycles per MUL.

## Branches: prediction at fetch, repair at execute

`branch_predictor` holds 16 two-bit saturating counters, indexed by PC[3:0] and reset to weakly
not-taken. Fetch pre-decodes the word it reads:

- `JMP` is always taken.
- BZ, BNZ and BRZ follow the counter.
- The PC moves to PC+offset at once when the prediction is taken.

The branch resolves in execute, on the rising edge after its falling-edge decode. That edge
updates the counter. If the prediction was wrong, the same edge loads the correct PC and turns the
instruction being fetched into a bubble. That costs one cycle. A correct prediction costs nothing,
so nothing is flushed.

The whole-program cycle count from reset release to `halted` is therefore exactly:

```
cycles = executed instructions (including HLT) + 1 + 8 × MULs + mispredicted branches
```

The end-to-end tests check this count for every program they run.

## Halt and clock gating

`low_power_unit` holds two `clock_gate` cells. Each is a latch that is transparent while `clk` is
low, followed by an AND gate, so enables may change at any time during the low phase without
clipping a pulse:

- `core_clk` is enabled while `!halted`. When `HLT` reaches execute, it squashes the instruction
  fetched behind it and sets `halted`. After that the core receives no clock edges until reset.
- `mul_clk` is enabled while a MUL is starting or running.

Synthesis reports the two gating latches. They are intended.

## Interface of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (PC = 0, registers = 0, predictor weakly not-taken) |
| `irq0..irq3` | in | 1 | interrupt pins of the original top-level symbol; no behaviour defined, not read |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1/8/16 | program load into the 256×16 instruction memory (use while in reset) |
| `dbg_reg_addr`, `dbg_reg_data` | in/out | 4/8 | read any register |
| `halted` | out | 1 | HLT executed |
| `pc_out`, `instr_out` | out | 8/16 | PC and the instruction word at it |
| `immed`, `rdxo`, `rdyo`, `rxdata`, `rydata` | out | 8/4/4/8/8 | contents of the decode register |
| `wrbkdata` | out | 8 | value being written back |

The data memory is 256×8 and is not reset.

## Files

- `rtl/risc_pkg.sv`: sizes, opcode and control-word types
- `rtl/RISC_4spipelining_16bit.sv`: top; pipeline registers, fetch pre-decode, branch resolution
- Modules, one per file: `program_counter`, `instruction_memory`, `control_unit`,
  `register_file`, `mux_2_1`, `alu`, `shifter_rotator`, `multiplier`, `data_memory`,
  `hazard_detection_unit`, `branch_predictor`, `clock_gate`, `low_power_unit`
- `tb/tb_<module>.sv`: a self-checking testbench for each module
- `tb/tb_RISC_4spipelining_16bit.sv`: end-to-end test. It runs 41 programs against an
  instruction-set model written inside the testbench and compares all registers, data memory and
  exact cycle counts. It also counts that every mechanism occurs: MUL stall, write-through bypass,
  correct taken prediction, mispredict flush, halt with the core clock stopped, and gated
  multiplier cycles.
- `tb/tb_program_workloads.sv`: two programs.
  - The reference waveform's instruction sequence, with the decoded fields checked edge by edge.
  - Multiplication by an ADD loop next to the MUL instruction, with the cycle counts checked.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_RISC_4spipelining_16bit \
    -y rtl -y tb +libext+.sv rtl/risc_pkg.sv tb/tb_RISC_4spipelining_16bit.sv
./obj_dir/Vtb_RISC_4spipelining_16bit
```

Use the same command with any other `tb_*` name. Each testbench ends with a line
`TB_RESULT checks=N failures=M`. The package has to be named first on the command line. The other
files are found through `-y`. All testbenches run at the default parameters in well under a
minute.

To change sizes, start with `risc_pkg` (`DATA_W`, `PC_W`, `DMEM_AW`) and the `BP_ENTRIES`
parameter of the top. The instruction format assumes 4-bit register indices and 8-bit immediates.

## Departures from the source description, and open points

- **Width.** The design is called a 16-bit processor. Its schematics and waveform show an 8-bit
  operand path with 16-bit instructions, and that reading is used here.
- **Instruction memory size.** One passage gives the instruction memory a 9-bit address and a 9-bit
  word, and another speaks of a 33-bit instruction. The schematic (8-bit address, 16-bit data) is
  followed.
- **Instruction count.** 33 instructions are claimed but not listed. The 25 implemented here cover
  every instruction the description names: JMPZ is treated as BZ, and MOV, ROL, ROR and BNZ are
  added.
- **Immediate operands.** Register-immediate arithmetic (an ALU operation on a register and a
  sign-extended immediate) is described but has no opcode here: the 4-bit opcode space is full.
  Immediates reach the ALU through the 2:1 mux only for MVI and for LOAD/STORE addresses.
- **Load/store offset.** Load/store is described with a 16-bit immediate offset. Only a 4-bit
  signed offset fits in a 16-bit instruction together with two register fields.
- **Data memory placement.** The block diagram draws the data RAM feeding the ALU. Here it sits in
  the MEM/WB stage as in a usual load-store machine.
- **Interrupts.** The four interrupt pins have no defined behaviour and are not connected.
- **Power.** The power figures of the original FPGA build are not reproduced. Only the
  mechanisms, clock gating and reduced register switching, are implemented.
- **Choices made here.** The multiplier keeps only the low 8 bits of the product. The
  zero-flag rules, the predictor size and the reset behaviour are choices made for this design.
