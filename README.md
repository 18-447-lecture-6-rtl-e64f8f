# Two multi-cycle RV32 cores: a MasterEn-gated single-cycle datapath and a microprogrammed shared datapath

A single-cycle processor runs every instruction at the speed of the slowest
one, and it needs a separate adder, memory port and register-file port for
everything any one instruction uses. This RTL contains the two answers to that
from CMU 18-447 Lecture 6 ("Microprogrammed Multi-Cycle Implementation",
J. C. Hoe):

* **Ver 1.0 core (`mc1_cpu`): go faster.** The single-cycle datapath is not
  changed. It runs off a fast clock tick, 50 ps in the lecture's numbers. A
  small ROM state machine counts how many ticks the current instruction's
  combinational path needs. Then it raises **MasterEn**, the only signal that
  lets the PC, the register file and the data memory update. A JAL takes 6
  ticks and a load takes 12, not the worst case for every instruction.
* **Microprogrammed core (`ucode_cpu`): go cheaper.** The datapath keeps one
  memory port, for instructions and data, and one ALU, for PC+4, branch
  targets, addresses and arithmetic. Values that must outlive a cycle are held
  in the registers IR, MDR, A, B and ALUOut. Each cycle performs one set of
  register transfers that don't conflict. A microsequencer steps through a
  control store to choose which set.

Both cores implement the same RV32I subset: the R-type and I-type ALU
instructions, `LW`, `SW`, the six conditional branches, `JAL` and `JALR`. The
top module `lec6_top` places the two cores side by side. They share only
`clk` and `rst_n`.

## The microprogrammed core

### Shared datapath (`mc_datapath`)

```
            +--------- PC <---------------- ALU result (bit 0 cleared) | ALUOut
            |           |
 IorD: PC / ALUOut ---> MEMORY ---> IR  (instruction)
                          ^   \---> MDR (loaded word)
                     B ---+ (write data)
 IR.rs1/rs2 ---> REGFILE ---> A , B
 ALU in 1: A | PC      ALU in 2: B | imm(IR) | 4      ---> ALU ---> ALUOut
 REGFILE write data: ALUOut | MDR        (rd = IR[11:7])
```

Each state register has its own latch enable: PC, IR, MDR, A, B, ALUOut,
the register-file write and the memory write. The steering selects are the
ALU inputs, the memory address (IorD), the register-file write data and the
PC source. Together these make the 19-bit control word `rv_pkg::uctrl_t`. A
cycle can use the ALU, the memory port and the register-file write port once
each. That limit decides how many steps an instruction needs. An assertion
checks that a memory write never happens in the same cycle as an instruction
fetch.

### The microprogram

Every instruction starts with the same two steps. Then the opcode selects a
short sequence. Each row below is one clock cycle. "start" returns to fetch.

| uPC | step | register transfers | next |
|---|---|---|---|
| 0 | FETCH | IR <- MEM[PC] | next |
| 1 | DECODE | A <- RF[rs1]; B <- RF[rs2]; ALUOut <- PC + imm | dispatch on opcode |
| 2, 3 | R-type | ALUOut <- A op B / RF[rd] <- ALUOut; PC <- PC+4 | next / start |
| 4, 5 | I-type | ALUOut <- A op imm / RF[rd] <- ALUOut; PC <- PC+4 | next / start |
| 6-8 | LW | ALUOut <- A+imm / MDR <- MEM[ALUOut] / RF[rd] <- MDR; PC <- PC+4 | next, next, start |
| 9, 10 | SW | ALUOut <- A+imm / MEM[ALUOut] <- B; PC <- PC+4 | next / start |
| 11-13 | Bxx | PC <- PC+4 / evaluate cond(A,B) / PC <- ALUOut | next / start if not cond / start |
| 14, 15 | JAL | PC <- ALUOut; ALUOut <- PC+4 / RF[rd] <- ALUOut | next / start |
| 16, 17 | JALR | ALUOut <- PC+4 / PC <- A+imm; RF[rd] <- ALUOut | next / start |
| 18 | other opcode | PC <- PC+4 | start |

Three details are easy to miss:

* **The target is computed early.** DECODE stores PC + imm in ALUOut before
  the opcode is known. A branch or JAL then only has to copy ALUOut into the
  PC. `imm_gen` picks the immediate format from the opcode: SB for branches,
  UJ for JAL, S for stores and I otherwise.
* **Branches always do PC <- PC+4 first.** The middle step only compares A
  and B. If the condition is false, the sequencer returns to fetch and the
  already-incremented PC stands. If it is true, one more step overwrites the
  PC with the target. A branch takes 4 cycles not taken and 5 taken.
* **Writes at one clock edge use the old values.** In `JAL` step 1 the PC is
  loaded from ALUOut while ALUOut is loaded with the old PC + 4. Both happen
  at the same edge, so each reads the other's previous value.

Cycles per instruction are 4 for R/I-type, SW, JAL, JALR and untaken
branches, 5 for LW and taken branches, and 3 for an opcode outside the
subset.

### Microsequencer (`microsequencer`)

The sequencer has a uPC register, a +1 incrementer and an address-select
mux. The 2-bit sequencing field of the current microinstruction picks one
of four next addresses:

* `SEQ_NEXT`: uPC + 1.
* `SEQ_DISPATCH`: a per-opcode table of first addresses. This is the
  "case opcode" of the decode step.
* `SEQ_START`: 0, the fetch step.
* `SEQ_START_IF_NCOND`: 0 if the branch condition is false, otherwise
  uPC + 1.

There is no general jump. Each instruction's steps therefore sit at
consecutive addresses, which is why the R-type and I-type write-back step
appears twice. The `retire` output is 1 in the last cycle of each
instruction.

### Control store: horizontal or vertical

`ucode_rom` is the horizontal store, the default. Each word holds every
control field directly.

Set `VERTICAL_UCODE=1` on `ucode_cpu` (or `U_VERTICAL_UCODE=1` on
`lec6_top`) to use `ucode_rom_vertical` instead. Each of its words holds a
16-bit uop, one bit per register transfer, such as "PC <- PC+4" or
"MDR <- MEM[ALUOut]". `uop_decoder` expands the uop into the control word.
It is written as combinational logic, not as a table with 2^16 rows. The two
stores hold the same microprogram, and the tests check that the two
variants behave identically cycle for cycle. `uop_decoder` asserts that a uop
never asks for two ALU operations at once.

## The Ver 1.0 core

`mc1_datapath` is a plain single-cycle RV32 datapath:

* separate instruction and data memories;
* a register file with two read ports;
* one ALU, whose `cond` output decides branches;
* next-PC logic choosing PC+4, PC+imm (a taken branch or JAL) or
  (rs1+imm) & ~1 (JALR);
* write-back of the ALU result, the loaded word or PC+4.

The PC update, the register-file write and the data-memory write are ANDed
with `master_en`. Everything else is combinational from one architectural
state to the next. `sc_control` decodes the opcode into the usual controls
(RegWrite, MemWrite, ALUSrc, MemtoReg, Branch, Jump, plus JALR and link). It
also gives the instruction class.

`tick_sequencer` is a state register and a 128-row ROM addressed by
{state, class}. Each row holds {next state, MasterEn}, and the table is
built at elaboration:

| state | R/I-type | LW | SW | Bxx | JALR | JAL |
|---|---|---|---|---|---|---|
| IF1, IF2, IF3 | next | next | next | next | next | next |
| IF4 | ID | ID | ID | ID | ID | EX1 |
| ID, EX1 | next | next | next | next | next | next |
| EX2 | WB | MEM1 | MEM1 | IF1 + MasterEn | IF1 + MasterEn | IF1 + MasterEn |
| MEM1-MEM3 | | next | next | | | |
| MEM4 | | WB | IF1 + MasterEn | | | |
| WB | IF1 + MasterEn | IF1 + MasterEn | | | | |
| **ticks** | **8** | **12** | **11** | **7** | **7** | **6** |

MasterEn is raised in the last tick, so the instruction commits at that
tick's closing edge. The tick count of each class equals that class's
single-cycle delay (memory 200 ps, ALU 100 ps, register file 50 ps) divided
by 50 ps, rounded up. Opcodes outside the subset are sequenced like R/I-type
and commit only PC+4.

## Performance

The end-to-end test runs the same 60-instruction mix on both cores. The mix
is the lecture's example: 25% LW, 15% SW, 40% ALU, 13.3% branches and 6.7%
jumps.

| core | cycles for 60 instructions | CPI | at the lecture's clock |
|---|---|---|---|
| Ver 1.0 | 551 ticks | 9.18 | 20 GHz / 9.18 = 2178 MIPS |
| microprogrammed | 255 cycles | 4.25 | (clock period not modelled) |

Notes on the table:

* The Ver 1.0 CPI matches the lecture's weighted mean of 9.18. That figure
  counts every jump as a JAL (6 ticks), and so does this mix.
* The single-cycle reference is 1667 MIPS at 1667 MHz.
* The microprogrammed core's clock would have to cover its slowest step,
  which is one memory access. The RTL has no picosecond timing, so this
  comparison is only arithmetic.

## Interfaces

`lec6_top` parameters:

* `MEM_WORDS` (default 1024): the size of every memory, in 32-bit words.
* `U_VERTICAL_UCODE` (default 0): use the vertical control store in the
  microprogrammed core.

Ports are prefixed `u_` (microprogrammed core) and `v_` (Ver 1.0 core).

* `*_load_we`, `*_load_addr`, `*_load_data`: write one word per clock into
  memory. Use them while `rst_n` is 0, because the load port has priority
  over the core. The Ver 1.0 core also has `v_load_imem`, which selects the
  instruction memory (1) or the data memory (0).
* `*_retire`: the last cycle of an instruction. On the Ver 1.0 core this is
  MasterEn.
* `u_pc`, `u_ir`, `u_upc`, `v_pc`, `v_instr`, `v_tick_state`: state, for
  observation.
* `*_dbg_reg` / `*_dbg_reg_data`: a third, combinational register-file read
  port.
* `*_dbg_addr` / `*_dbg_mem_data`: a second memory read port.

All memory addresses are byte addresses. Only aligned words are accessed,
and an index wraps at `MEM_WORDS`. Reset is asynchronous and active low. It
clears the PC, all datapath registers and the register file, and puts the
sequencers at fetch (uPC 0) and IF1. Memories are not reset.

Timing: memory and register-file reads are combinational, and every write
happens at the rising clock edge.

## Departures from the lecture and choices made here

* The lecture's single-cycle figure is drawn for MIPS (16-bit sign extend,
  `Instruction[25:21]`, jump by shift-left-2). Its instruction list and
  register transfers are RISC-V. This RTL uses RV32I encodings and fields
  throughout.
* The lecture's step table shows `Jump` as just "PC <- PC + imm". `JAL` and
  `JALR` here also write the link value PC+4 to rd, using transfers the
  lecture lists ("ALUOut <- PC+4", "RF[rd] <- ALUOut").
* The lecture gives the JALR target as A + SB-type immediate. RV32I uses the
  I-type immediate, which is used here, and clears bit 0.
* The lecture's ALU-input steering names only {RF, PC} and {RF, immed}. A
  constant 4 is added to the second ALU input here, because the lecture's own
  register transfers PC <- PC+4 and ALUOut <- PC+4 need one.
* I-type ALU instructions get their own two steps. The lecture's table shows
  only R-type.
* Opcodes outside the subset act as no-ops. This choice is not from the
  lecture.
* Not built:
  * the single-read/write-port register file, which the lecture mentions as a
    further reduction;
  * LUI and AUIPC, and byte or half-word loads and stores;
  * exceptions.
* Design choices of this RTL, not from the lecture:
  * the memory size;
  * the reset behaviour;
  * the encodings of the control word, uPC, uops and tick states;
  * the 4-bit ALU operation code (the lecture's figure shows a 3-bit MIPS
    ALU control);
  * the load and debug ports.
* The 8086 single-bus datapath and the x86-to-uop translation the lecture
  mentions are background only and are not modelled.

## Verification

Every module has a self-checking test bench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* **`rv_tb_pkg`** holds the shared pieces:
  * instruction encoders;
  * an independent instruction-set model (`rv_iss`);
  * the expected cycles per instruction class;
  * two program generators: a program with random ALU work, stores and
    loads, a counted loop, all six branch conditions, JAL, JALR (to an odd
    address), an unknown opcode and a halt loop; and the 60-instruction mix.
* **`tb_ucode_cpu`, `tb_mc1_cpu`**: lock-step against the model. At every
  retired instruction they check the instruction, the new PC, the destination
  register and the exact cycle count. At the end they compare all registers
  and the data words. `tb_ucode_cpu` also runs the vertical-store variant
  alongside and compares it cycle for cycle.
* **`tb_lec6_top`**: the end-to-end test at default parameters. It runs both
  cores in lock-step, then the instruction mix with its exact cycle totals.
  It counts each mechanism (uPC next, dispatch, start, branch condition true
  and false, every microprogram entry, the unknown-opcode path, MasterEn
  commits, JAL skipping ID, MEM ticks) and fails if any never occurs. It
  finishes in well under a second.
* **Unit benches**:
  * ALU operations and branch conditions;
  * immediate formats;
  * the register file;
  * the memory, including load-port priority;
  * the microprogram, walked step by step and translated back into register
    transfers;
  * the sequencer's next-address rules;
  * the datapath driven by hand-written control words;
  * the tick ROM's counts and paths;
  * the main-control table;
  * the single-cycle datapath under a random MasterEn, which must hold its
    state on every tick without MasterEn.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_lec6_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/rv_pkg.sv tb/rv_tb_pkg.sv tb/tb_lec6_top.sv
./obj_dir/Vtb_lec6_top
```

Replace the top module and its file to run another bench. Lint a module
with `verilator --lint-only -Wall -y rtl rtl/rv_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about address bits that the memories ignore.

## Files

| file | contents |
|---|---|
| `rtl/rv_pkg.sv` | opcodes, ALU operations, control-word, uop and sequencing types, microprogram addresses |
| `rtl/lec6_top.sv` | both cores side by side |
| `rtl/ucode_cpu.sv` | microprogrammed core |
| `rtl/mc_datapath.sv` | shared-resource datapath |
| `rtl/microsequencer.sv` | uPC, incrementer, dispatch, address select |
| `rtl/ucode_rom.sv` | horizontal control store (the microprogram) |
| `rtl/ucode_rom_vertical.sv`, `rtl/uop_decoder.sv` | vertical control store and its decoder |
| `rtl/mc1_cpu.sv` | Ver 1.0 core |
| `rtl/mc1_datapath.sv` | single-cycle datapath with MasterEn |
| `rtl/sc_control.sv` | main control decoder |
| `rtl/tick_sequencer.sv` | tick-counting ROM sequencer |
| `rtl/alu.sv`, `rtl/regfile.sv`, `rtl/imm_gen.sv`, `rtl/memory.sv` | shared building blocks |
