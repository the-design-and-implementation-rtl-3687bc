# Freezing idle function units in an ARM9-style execute stage

Most instructions use only part of a processor's execute stage. A load uses the
ALU for its address but not the multiplier. A `MOV` needs neither the ALU nor,
often, the shifter. In a conventional ARM9TDMI-style pipeline the idle units
still see new values on their input buses every cycle, because the buses are
shared. The units then compute results that nobody uses, and that switching
costs power.

This RTL implements the decode (ID) and execute (EX) stages of an ARM
integer pipeline built to avoid that waste. It uses three mechanisms:

1. **Early unit decision.** The decoder marks, already in ID, which of the
   three function units (ALU, barrel shifter, multiplier) the instruction
   will use. It also flags *dummy operations*: operations that only move a
   value from one register to another.
2. **Freezing.** A unit that is not used keeps both its control code and its
   operands exactly as they were in the last cycle it worked. Nothing at its
   inputs changes, so nothing inside it switches.
   - A *Partial-Latch-Control* (PLC) unit keeps the control code. It stops
     that unit's fields of the ID/EX pipeline register from reloading.
   - *Operand-Selection Units* (OSUs) keep the operands. One OSU sits in
     front of every function-unit input.
3. **Bypass paths.** Extra data-paths carry the value of a dummy move or a
   dummy shift around the ALU or the shifter. The unit stays frozen instead
   of passing the value through.

Results are the same as those of an unmodified datapath. The mechanisms change
only which nodes switch. The approach works on combinational units without
gating any clock, so it adds a mux delay rather than clock-tree changes.

## Where it sits

```
             ID stage                    |  ID/EX latch   |            EX stage
 id_instr -> insn_decoder --usage--> plc --L_ctrl-->  [exec ctrl: OSU | ALU | shifter | mul]
                 |  ra1..ra3                         [mem ctrl] [wb ctrl]
 rd1..rd3 (register bank) ------------------------>  [operand1] [operand2] [operand3] [pc]
                                                            |
                    A mux (op1|pc)  B mux (op2|imm)  C mux (op3[7:0]|imm amount)
                        |               |                 |
                      OSUs            OSUs              OSUs         OSUs (op2, op3, op1)
                        |               |--bypass--+      |              |
                        |            shifter <------------+          multiplier
                        |               |          |                     |
                        +---> ALU <-----+----------+                     |
                               |  (move bypass)                          |
                               +----------------- result mux <-----------+
```

`lp_ex_top` holds only these two stages. These parts belong to the host core
and are reached through ports:

- fetch;
- the register bank;
- the memory and write-back stages;
- the CPSR;
- condition evaluation.

| port | dir | meaning |
|---|---|---|
| `id_valid`, `id_instr` | in | instruction in ID; `id_valid = 0` is a bubble |
| `id_pc` | in | what R15 reads as for this instruction (its address + 8) |
| `ra1`, `ra2`, `ra3` | out | register-bank read addresses: Rn (MLA: accumulator), Rm, Rs (store: Rd) |
| `rd1`, `rd2`, `rd3` | in | the three register values, in the same cycle |
| `cpsr_flags` | in | current NZCV, used in EX |
| `ex_result` | out | ALU, multiplier or bypass result; branch target; updated load/store base |
| `ex_mem_addr`, `ex_store_data` | out | load/store address (the base itself when post-indexed) and store data |
| `ex_flags` | out | the NZCV the instruction sets, valid when `ex_wb.set_flags` |
| `ex_mem`, `ex_wb` | out | memory-stage and write-back-stage control codes (`mem_ctrl_t`, `wb_ctrl_t` in `lp_pkg`) |
| `ex_status` | out | which units worked and which bypasses were taken this cycle |

Timing:

- One instruction enters per clock.
- An instruction presented in ID in cycle *t* has its EX outputs valid during
  cycle *t + 1*.
- The register bank must supply values that include the result now in EX.
  In other words, it must forward.
- Reset is asynchronous and active low. It clears the ID/EX latch and every OSU.
- There is no stall input. The host inserts bubbles, and a bubble freezes
  every unit.

## What "frozen" means, cycle by cycle

A unit is frozen when both its operands and its control code stay constant.
Two pieces of hardware handle these, one in each stage.

**OSU (`osu`).** It is a register with enable plus a 2:1 mux, and both share
one select line:

- select = 1: the new operand goes straight through to the unit and is
  stored at the clock edge;
- select = 0: the unit gets the stored value, which is the operand of the
  last cycle in which the unit worked.

The selects are the unit enables `alu_en`, `shift_en` and `mul_en`. They are
part of the execution-stage control code and are loaded into the ID/EX latch
every cycle. `ex_stage` places one OSU on every function-unit input:

- ALU: operand A, operand B, and the carry/overflow/shift-carry bits;
- shifter: value, amount and carry-in;
- multiplier: Rm, Rs and the accumulator.

**PLC (`plc`) and the ID/EX latch (`idex_latch`).** The execution-stage control
code is split into four fields, each with its own load enable:

- OSU/mux control;
- ALU control code;
- shifter control code;
- multiplier control code.

The PLC loads a unit's field only when the next instruction uses that unit, so
the opcode a frozen ALU sees does not change either. The three operand
registers and the PC register work the same way: each loads only when the
instruction reads it. The memory and write-back control codes load every cycle.

The end-to-end testbench checks the freeze property every cycle, by hierarchy:
a unit whose enable is low must see bit-for-bit the operands and control code
of the previous cycle.

## Dummy operations and their bypasses

The decoder treats these as dummies:

- **Dummy shift**:
  - a register operand with `LSL #0`;
  - a data-processing immediate with rotate 0;
  - the immediate offset of a load/store, and any halfword-transfer offset;
  - the target register of `BX`.

  The B-mux value goes directly to the ALU's second operand, and the shifter
  stays frozen. The shifter carry is then the CPSR C flag, which is ARM's rule
  for `LSL #0`.
- **Dummy move**: a data-processing `MOV`. The second operand becomes the
  result, from the shifter or from the shift bypass, and the ALU stays frozen.
  With `S` set, N and Z come from the result, C from the shifter path and V
  is unchanged.

These are *not* dummies, even though their shift field is 0:

- `LSR #0`, which means LSR #32;
- `ASR #0`, which means ASR #32;
- `ROR #0`, which means RRX;
- a register-specified shift whose register happens to be 0. That case is
  known only in EX.

`MVN` is not a dummy either, because it inverts its operand.

## Instructions executed

| class | units | notes |
|---|---|---|
| data processing, immediate / immediate shift / register shift | ALU + shifter, either may be a dummy | all 16 opcodes, S bit |
| `MUL`, `MLA` | multiplier only | low 32 bits; `MULS` sets N, Z and keeps C, V |
| `LDR`/`STR`/`LDRB`/`STRB`, immediate or scaled register offset | ALU (add/sub), shifter for a register offset | pre/post-indexing and write-back are reported to the later stages |
| `LDRH`/`STRH`/`LDRSB`/`LDRSH`, immediate or register offset | ALU (add/sub); the shifter is always bypassed | size and sign extension are in `ex_mem` |
| `B`, `BL` | ALU adds `id_pc` to the offset, which the shifter shifts left by 2 | link write is the host's job |
| `BX` | none: the target register passes both bypasses | `ex_wb.exchange` set; the Thumb state change is the host's job |

These classes pass through with `ex_wb.unsupported` set and every unit frozen:

- long multiplies, which need four register reads;
- swap, and doubleword transfers;
- `MRS`/`MSR`;
- block transfers;
- coprocessor instructions;
- `SWI`;
- condition `1111`;
- Thumb instructions, which this decoder does not translate.

The condition field is carried in `ex_wb.cond`. The host must discard an
instruction whose condition fails.

## Following the original design, and this design's own choices

These parts follow the low-power ARM9TDMI modification this RTL implements:

- the split into an enhanced decoder, a PLC in ID and OSUs plus bypass paths
  in EX;
- the OSU structure (latch and mux sharing one control);
- the definition of dummy operations as moves and shifts by an immediate 0;
- the idea of keeping both control codes and operands.

These are this design's own choices:

- **OSU count and placement.** There is one OSU per unit input, nine in all.
  The original drawing shows a few OSUs between the operand muxes and the
  units, without saying which input each one serves.
- **Roles of the three operand muxes.** A picks Rn or PC, B picks Rm or the
  immediate, C picks the shift amount.
- **Which ID/EX fields the PLC keeps.** The PLC also keeps operand and PC
  registers that are not read.
- **Register read ports.** The decoder's port assignment is its own.
- **Multiplier.** It is single-cycle and does the accumulate itself. The
  ARM9TDMI's own multiplier takes several cycles, and its structure is not
  modelled here.
- **ALU and shifter.** Both follow the ARM architecture's definitions,
  because only the units' names and roles were given.
- **Instruction coverage.** Only the classes listed above are executed.
- **Pipeline interface.** The two-stage interface has no stall and expects a
  forwarding register bank.
- **Reset.** Reset behaviour is this design's choice.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_arm_shifter`, `tb_arm_alu` and `tb_arm_multiplier` compare against a
  separate reference model (`tb/arm_ref_pkg.sv`):
  - the shifter is checked against a bit-serial shifter, for all types, both
    amount encodings and amounts 0 to 255;
  - the ALU is checked against 64-bit integer arithmetic, for all 16 opcodes,
    with corner operands;
  - the multiplier is checked against 64-bit products.
- `tb_osu` checks the hold/pass behaviour.
- `tb_plc` checks every combination of its inputs.
- `tb_idex_latch` gives the latch random per-field enables and compares it
  against a model.
- `tb_insn_decoder` runs hand-encoded instructions of every class, including
  dummy and non-dummy zero shifts, unsupported classes and bubbles.
- `tb_ex_stage` applies random control codes in six modes:
  - ALU with the shifter;
  - ALU with the shift bypass;
  - move through the shifter;
  - move with both bypasses;
  - multiply;
  - idle.

  It checks results, flags and frozen inputs.
- `tb_lp_ex_top` plays the host core for a random stream of 20,000
  instructions. It checks every EX output against the reference model and the
  freeze property every cycle. It fails if any of these never happened:
  - a frozen ALU, shifter or multiplier;
  - a move or shift bypass;
  - a control code kept by the PLC;
  - a bubble or an unsupported instruction;
  - a carry-using operation;
  - a register shift;
  - a branch, a load, a store or a multiply.

  The stream mixes instructions the way the design's premise assumes: about
  one shift in three has an immediate amount of 0, and about one ALU
  operation in six is a move.

`tb_lp_program` runs real code through the two stages. The testbench itself
acts as the host core: fetch, a forwarding register bank, data memory,
condition evaluation and write-back, and one bubble after each taken branch.
It runs two programs:

- an IMA-ADPCM-style encoder over 64 signed 16-bit samples, modelled on the
  rawcaudio media benchmark;
- a 32-tap MLA dot product.

It compares the encoded bytes and the dot product with a direct SystemVerilog
computation.

Both end-to-end testbenches count bit toggles at the function-unit inputs, with
the OSUs and with the raw mux outputs. These are input counts only, not power
figures. The input toggles that remain with the OSUs are:

| unit | synthetic mix (~10 % multiplies) | ADPCM + dot-product programs |
|---|---|---|
| ALU | about 85 % | about 88 % |
| shifter | about 61 % | about 24 % |
| multiplier | about 18 % | about 5 % |

The ALU works for nearly every instruction, so it gains least. The multiplier
is idle most of the time, so it gains most. The shifter's saving comes mainly
from dummy shifts and moves. These trends are what the technique predicts.
The exact numbers depend on the instruction mix.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/lp_pkg.sv tb/arm_ref_pkg.sv \
    tb/tb_lp_ex_top.sv --top-module tb_lp_ex_top
./obj_dir/Vtb_lp_ex_top +n=20000
```

Replace the testbench name to run any other testbench (for example `tb_lp_program`). `+n=` sets the length
of the top-level random stream. Verilator has only two signal states, so every
testbench resets or initialises what it reads.

## Files

- `rtl/lp_pkg.sv` — opcode and shift encodings, the control-code structs.
- `rtl/insn_decoder.sv`, `rtl/plc.sv`, `rtl/idex_latch.sv` — ID stage and
  pipeline register.
- `rtl/ex_stage.sv`, `rtl/osu.sv` — EX stage with OSUs and bypass paths.
- `rtl/arm_alu.sv`, `rtl/arm_shifter.sv`, `rtl/arm_multiplier.sv` — the
  function units.
- `rtl/lp_ex_top.sv` — the two stages wired together.
