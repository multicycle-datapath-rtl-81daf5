# Multicycle MIPS-style datapath

A single-cycle processor must stretch its clock to fit the slowest instruction
(a load: memory, register read, address add, memory, register write), so every
instruction pays for it, and it needs a separate instruction memory, data
memory, PC incrementer and branch-target adder because each is used at most
once per cycle. This datapath instead splits every instruction into short
stages of one clock cycle each:

1. instruction fetch and PC increment
2. register read
3. ALU operation
4. data memory read or write
5. register write back

An instruction only goes through the stages it needs, and because one unit can
now be used in different cycles of the same instruction, the hardware
shrinks to **one memory** for instructions and data and **one ALU** that also
does the PC increment and the branch-target addition. A few registers hold the
values that one stage produces and a later stage consumes.

The RTL is the datapath only. The control unit, which produces the control
signals cycle by cycle, is an open interface: every control signal is an
input of the top module. A behavioural control sequencer, used by the
end-to-end testbench, shows one way to drive it.

## Structure

Data flows from the PC through the memory into the instruction register,
from its register fields into the register file and on into A and B, through
the ALU into ALUOut, and back into the memory address, the register file or
the PC. Six multiplexers decide, cycle by cycle, which path is in use:

| Unit | Module | Role |
|---|---|---|
| PC | `pc_register` | loads the next PC only under **PCWrite** |
| IorD mux | `mux2` | memory address: 0 = PC (fetch), 1 = ALUOut (lw/sw) |
| Memory | `unified_memory` | one array for code and data; **MemRead**, **MemWrite**; write data is B |
| Instruction register | `instruction_register` | keeps the instruction under **IRWrite** for all of its cycles; fields op[31:26], rs[25:21], rt[20:16], rd[15:11], imm[15:0], funct[5:0] |
| MDR, A, B, ALUOut | `data_register` | load every cycle, no enable: each value is only needed in the next cycle |
| RegDst mux | `mux2` (5 bits) | write register: 0 = rt, 1 = rd |
| MemToReg mux | `mux2` | register write data: 0 = ALUOut, 1 = MDR |
| Registers | `register_file` | 32 x 32, two combinational reads, one clocked write under **RegWrite** |
| Sign extend, Shift left 2 | `sign_extend`, `shift_left_2` | immediate as a byte offset or, times 4, as a branch offset |
| ALUSrcA mux | `mux2` | 0 = PC, 1 = A |
| ALUSrcB mux | `mux4` | 0 = B, 1 = constant 4, 2 = sign-extended immediate, 3 = that shifted left 2 |
| ALU | `alu` | the only adder in the design; result and **Zero** |
| PCSource mux | `mux2` | next PC: 0 = ALU result (PC + 4 in the fetch cycle), 1 = ALUOut (a branch target computed earlier) |

Shared types live in the package `mc_pkg`: `word_t`, `reg_idx_t`, the ALU
function `alu_op_t`, the ALUSrcB select `alu_src_b_t` and the control bundle
`ctrl_t`. The top module is `multicycle_datapath`.

## How one ALU replaces three adders

The hard part of the design is seeing that the register layout makes the unit
sharing work. Which value sits where in which cycle:

| Cycle | What the ALU computes | Where the result goes |
|---|---|---|
| fetch | PC + 4 (ALUSrcA = 0, ALUSrcB = 1) | straight into the PC through PCSource = 0, same cycle as the memory reads the instruction into IR |
| register read | PC + 4 + (imm << 2) (ALUSrcA = 0, ALUSrcB = 3) | ALUOut: a branch target, computed speculatively while A and B are being read |
| ALU stage, R-type | A op B | ALUOut |
| ALU stage, lw/sw | A + sign-extended imm | ALUOut, then used as the memory address (IorD = 1) |
| ALU stage, beq | A - B | only Zero is used; if set, the PC loads ALUOut (the target from the previous cycle) through PCSource = 1 |

So the PC adder and the branch adder of a single-cycle machine are both gone:
the increment happens in cycle 1 and the target in cycle 2, when the ALU would
otherwise be idle. ALUOut is what lets a value computed by the ALU in one cycle
be used while the ALU is busy with something else in the next.

The same trick removes the second memory: the memory is read at the PC in the
fetch cycle and at ALUOut in the memory cycle; the instruction register is
what keeps the instruction's fields stable once the memory is reused for data,
and that is why it (and the PC) have write enables while MDR, A, B and ALUOut
do not.

## Timing

Every register changes on the rising edge of `clk`; `rst_n` is synchronous
and active low. Memory and register-file reads are combinational, so a word
read in a cycle is captured in IR, MDR, A or B at the end of that cycle.
Writes to memory and the register file happen on the clock edge that ends the
cycle in which MemWrite or RegWrite is high.

With the stage sequence above, an instruction takes:

| Instruction | Stages | Cycles | At 2 ns per cycle |
|---|---|---|---|
| lw | 1 2 3 4 5 | 5 | 10 ns |
| R-type (add, sub, and, or, slt) | 1 2 3 5 | 4 | 8 ns |
| sw | 1 2 3 4 | 4 | 8 ns |
| beq | 1 2 3 | 3 | 6 ns |

The 2 ns cycle is the delay of the slowest single stage (memory access or ALU)
under the unit delays used for the comparison: memory 2 ns, register file
1 ns, ALU 2 ns. For an instruction mix of 48 % arithmetic, 22 % loads,
11 % stores and 19 % branches the average is
0.48 x 4 + 0.22 x 5 + 0.11 x 4 + 0.19 x 3 = 4.03 cycles, about 8.1 ns per
instruction, against 8 ns for a single-cycle machine with the same unit
delays. With these particular numbers the gain is in hardware (one memory, one
ALU), not yet in speed; the speed gain appears when stage delays are less
uniform than the instruction delays, for example with a slow memory.

## Control interface

`ctrl` (type `ctrl_t`) carries one setting per cycle:

| Field | Meaning |
|---|---|
| `pc_write` | load the PC from the PCSource mux |
| `i_or_d` | memory address: 0 = PC, 1 = ALUOut |
| `mem_read`, `mem_write` | memory read (output is zero otherwise) / write B at the address |
| `ir_write` | load the instruction register from memory |
| `reg_dst` | write register: 0 = rt, 1 = rd |
| `mem_to_reg` | write data: 0 = ALUOut, 1 = MDR |
| `reg_write` | write the register file |
| `alu_src_a` | 0 = PC, 1 = A |
| `alu_src_b` | `SRCB_B`, `SRCB_FOUR`, `SRCB_IMM`, `SRCB_IMM_SH` (0..3) |
| `alu_op` | `ALU_AND` 000, `ALU_OR` 001, `ALU_ADD` 010, `ALU_SUB` 110, `ALU_SLT` 111 |
| `pc_source` | next PC: 0 = ALU result, 1 = ALUOut |

Outputs to the control unit: `opcode` (IR[31:26]), `funct` (IR[5:0]) and
`zero`. A conditional branch is made by the control unit setting `pc_write`
from `zero` in the beq ALU cycle; the datapath has no separate
branch-condition input. `pc` and `ir` are brought out for observation. An
assertion flags MemRead and MemWrite high together.

`ld_en`, `ld_addr`, `ld_data` write one word per clock into the memory, with
priority over MemWrite; use them (typically while `rst_n` is low) to load a
program.

Parameters of `multicycle_datapath`: `MEM_WORDS` (default 1024 words, 4 KiB)
and `RESET_PC` (default 0). Addresses are byte addresses; accesses are whole
words and bits [1:0] are ignored.

## What is specified and what is chosen here

Taken from the datapath's description: the set of units, every connection
and multiplexer input number listed in the tables above, the PCWrite and
IRWrite enables, the enable-free MDR/A/B/ALUOut, the one-stage-per-cycle
execution and the five stages.

Chosen in this design, where the description is silent:

- the control unit is not part of the RTL (see below);
- ALU operations and their 3-bit encoding (the usual MIPS ALU-control codes),
  and Zero = (result == 0), used with subtraction for beq;
- 32 registers with register 0 hard-wired to zero;
- memory size, combinational reads, word-only accesses, zero output while
  MemRead is low, the loader port;
- synchronous active-low reset of every register and of the register file,
  reset PC 0;
- the funct field IR[5:0].

Not built: jumps (no jump path into the PCSource mux), byte or halfword memory
accesses, immediate arithmetic, and the control finite-state machine.

## The control sequencer used in simulation

`tb/control_sequencer_model.sv` is a testbench model, not design RTL. It steps
FETCH, DECODE, EXEC, MEM, WB with the settings in the "one ALU" table above,
skipping MEM for R-type and beq and WB for sw and beq, and supports add, sub,
and, or, slt, lw (0x23), sw (0x2b) and beq (0x04). Opcode 0x3f halts it, so a
testbench can tell that a program has ended. A real control unit would replace
it and connect to the same `ctrl`, `opcode`, `funct` and `zero` signals.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv` that compares
against values computed in the testbench, and ends with
`TB_RESULT checks=N failures=M`.

`tb/tb_multicycle_datapath.sv` runs the top module at its default parameters
with the sequencer:

- a directed program with `lw $t0, -4($sp)`, `add $s4, $t1, $t2`,
  sub/and/or/slt, sw, a branch not taken, a taken forward branch and a
  five-pass loop closed by a backward branch;
- a 300-instruction random program drawn with the 48/22/11/19 % mix above.

Both are compared with an instruction-level reference model in the testbench:
final registers, the whole memory, the total cycle count and the cycle count
of every single instruction (3/4/4/5). It also checks that IR never changes
without IRWrite, and counts that every mechanism happened: fetch addressed by
PC, data access addressed by ALUOut, each ALUSrcB input, both RegDst and
MemToReg choices, PC loaded from the ALU result and from ALUOut, a branch not
taken. One run measured a CPI of 4.12 on the random program.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mc_pkg.sv rtl/*.sv \
    tb/control_sequencer_model.sv tb/tb_multicycle_datapath.sv \
    --top-module tb_multicycle_datapath -Mdir obj
./obj/Vtb_multicycle_datapath
```

A unit testbench needs only the package, its module and itself, for example
`verilator --binary --timing -Irtl rtl/mc_pkg.sv rtl/alu.sv tb/tb_alu.sv
--top-module tb_alu`. Verilator simulates with two-state values; every
register that is read is reset.
