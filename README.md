# 32-bit processor core with instruction-level data gating and dual-supply voltage scaling

This core saves power by letting each instruction decide, in the same cycle, which function
unit is awake and at what voltage. It has three function units: a 32-bit adder, a 32-bit
shifter and a 16x16-bit multiplier. An instruction uses at most one of them. The decoder
raises one enable for that unit (ADDEN, SHEN or MULEN), and that one wire does two jobs:

* **Data gating.** The operands of every unit whose enable is low are forced to zero, so its
  logic does not toggle. Only the selected unit sees real data.
* **Voltage scaling.** Each unit has its own power switch, the DVSPS (dynamic voltage scaling
  power supply). The switch's control input PMCNT is that unit's enable. With PMCNT high the
  unit runs from the full rail VDD (1.2 V). With PMCNT low it sits on the reduced rail VDDL
  (0.8 V, two thirds of VDD).

No voltage scheduler, workload predictor or DC-DC converter is involved. The supply level is
a fixed property of each opcode. The instruction register, decoder, register file and
load/store unit always run at VDD. The core is meant to be one element of a SIMD/MIMD
array, used as a coprocessor for bulk data.

The published circuit-level results for this scheme are: at 100 MHz and 100 MIPS, data
gating plus dual-supply scaling cuts power from 1 mW to 0.531 mW, compared with data gating
alone at a fixed 1.2 V. That is 188.4 instead of 100 MIPS/mW. Those figures come from
transistor-level simulation. This RTL cannot reproduce them. What the RTL gives you is the
control behaviour that produces them: which unit is gated and powered in which cycle.

## Block diagram

```
 instr_i ──► pp_instr_reg ──► pp_decoder ──► ADDEN/SHEN/MULEN, ADDOP/SHOP/MULOP, ctrl
                                 ▲  │                     │
                         RFIN, PUIN │ RFSel, PUSel        ▼
 d_i ──► pp_lsu ── DIN ──► pp_regfile ── rs1 (32) / rs2 (32) ──┬───────────┬──────────────┐
 d_o ◄──        ◄─ DOUT ──           ▲                        ▼           ▼              ▼
                                     │                  pp_adder   pp_shifter    pp_multiplier
                                     │                 (32 + 32)   (32 + 4)      (16 + 16)
                                     │                   ▲ ADDEN     ▲ SHEN        ▲ MULEN
                                     │               pp_dvsps    pp_dvsps      pp_dvsps
                                     │                   │           │              │
                                     └── pp_result_bus ◄─┴───────────┴──────────────┘
                                          (ADDOP / SHOP / MULOP select)
```

The shifter takes its shift amount from the low 4 bits of the second operand. The multiplier
takes the low 16 bits of both operands.

## Instruction set

The published design gives the datapath but no instruction encoding. This RTL uses the
encoding below, defined in `rtl/pp_pkg.sv`. Change it there and in `pp_decoder`.

| bits    | field | use |
|---------|-------|-----|
| [31:28] | opcode | see below |
| [27:24] | rd    | destination register |
| [23:20] | rs1   | first operand; the register read for a store |
| [19:16] | rs2   | second operand; bits [3:0] of its value are the shift amount |
| [15:12] | RFSel | copied to the `rfsel` output |
| [11:8]  | PUSel | copied to the `pusel` output |
| [7:0]   | —     | unused, write 0 |

| code | name | action | unit at VDD |
|------|------|--------|-------------|
| 0 | NOP | nothing | none |
| 1 | ADD | rd = rs1 + rs2 | adder |
| 2 | SUB | rd = rs1 − rs2 | adder |
| 3 | SHL | rd = rs1 << rs2[3:0] | shifter |
| 4 | SHR | rd = rs1 >> rs2[3:0], logical | shifter |
| 5 | SRA | rd = rs1 >>> rs2[3:0], arithmetic | shifter |
| 6 | MUL | rd = rs1[15:0] × rs2[15:0], unsigned, 32-bit product | multiplier |
| 7 | LD  | rd = D bus | none |
| 8 | ST  | D bus = rs1, in the next cycle | none |
| 9–15 | — | treated as NOP | none |

The register file holds 16 registers of 32 bits. All of them are general purpose, and r0 is
not hard-wired to zero. Reset (`rst_n` low, asynchronous) clears the registers and loads a
NOP into the instruction register.

## Timing

Everything runs on one rising-edge clock.

1. Edge *k*: `instr_i` is captured in the instruction register.
2. Cycle *k*: the instruction is decoded and its operands are read (reads are
   combinational). The enabled unit computes and its supply is at VDD. For a load, `d_i` must
   hold the data during this cycle.
3. Edge *k+1*: the result or the load data is written to `rd`. The next instruction is
   captured on the same edge.

So one instruction completes every cycle, which is 100 MIPS at the published 100 MHz. There
are no hazards: a result is written before the next instruction reads the register file. A
store registers its data at edge *k+1*. It then drives `d_o` with `d_oe` high for cycle
*k+1* only.

The enables, and with them the unit supplies (`adder_pvdd`, `shifter_pvdd`, `mul_pvdd`),
change right after the capturing edge. They hold for one cycle. A run of ADDs keeps the adder
at VDD for the whole run. When the next instruction belongs to another unit, the adder drops
to VDDL.

## Array-level signals: RFIN, PUIN, RFSel, PUSel

The published block diagram names these four decoder signals but does not define them. This
RTL treats them as hooks for the array the core sits in:

* `puin` low: no function unit is enabled. All three stay gated at VDDL and no unit result is
  written.
* `rfin` low: no register is written, neither unit results nor loads.
* `rfsel` and `pusel` carry the instruction's RFSel and PUSel fields out of the core. An array
  controller can decode them into the RFIN/PUIN of each core.

Both inputs take effect in the cycle the instruction executes, not when it is captured.

## The power switch model

`pp_dvsps` is a behavioural model of an analog switch, not logic. Its rails are `real` values
in volts, and its output follows `pmcnt ? vdd : vddl` with no delay. In silicon, this part
switches a unit's virtual supply rail. The published design claims that it works without
level shifters between the VDD and VDDL domains and without disturbing the rails. That claim
is a circuit property, which this model neither shows nor needs. Yosys synthesis does not
accept the `real` ports. For a gate-level flow, remove the three `pp_dvsps` instances from
`pp_core` and use the enables `adden`, `shen` and `mulen` (which are top-level outputs) as
the switch controls.

## Where this RTL departs from, or adds to, the published design

* **Clocks.** The published core has two clocks, CLK1 and CLK2. The result bus reaches the
  register file through a buffer clocked by CLK2. Their phasing is not specified. Here both
  are folded into one clock edge, as described under Timing.
* **Data bus.** The bidirectional D<31:0> is split into `d_i`, `d_o` and `d_oe`. No address
  bus is given for the load/store unit, so addressing belongs to whatever drives D. The bus
  timing is this design's own.
* **Result bus.** The published diagram shows one tristate output buffer per unit, selected by
  ADDOP, SHOP or MULOP. Here it is an AND-OR select. An assertion forbids more than one
  select at a time.
* **Decoder.** The decoder is combinational, whereas the published diagram shows it clocked.
  ADDOP/SHOP/MULOP equal the enables.
* **Own choices.** The instruction set and encoding, the register count, SUB, the three shift
  kinds and unsigned multiplication are all this design's choices. The published design gives
  only the unit types and widths.
* **Not built.** The fixed-supply comparison core (data gating only) is not built. Neither are
  the supplies of the always-on blocks, which are not modelled.

## Files

| file | block |
|------|-------|
| `rtl/pp_pkg.sv` | widths, opcodes, instruction and control structs |
| `rtl/pp_core.sv` | top level |
| `rtl/pp_instr_reg.sv` | instruction register |
| `rtl/pp_decoder.sv` | instruction decoder, enable gating signals |
| `rtl/pp_regfile.sv` | 16 x 32 register file, two read ports, one write port |
| `rtl/pp_lsu.sv` | load/store unit |
| `rtl/pp_adder.sv`, `rtl/pp_shifter.sv`, `rtl/pp_multiplier.sv` | gated function units |
| `rtl/pp_result_bus.sv` | write-back select |
| `rtl/pp_dvsps.sv` | power switch, behavioural |
| `tb/tb_<module>.sv` | self-checking unit tests, one per module |
| `tb/tb_pp_core.sv` | end-to-end test at default sizes |
| `tb/tb_pp_wave_program.sv` | add → multiply → shift → add program with per-unit supply residency |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`. Each finishes in
well under a second. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/pp_pkg.sv tb/tb_pp_core.sv --top-module tb_pp_core -o sim
./obj_dir/sim
```

`tb_pp_core` generates a program of 463 instructions. Loads fill the registers, then come
runs of adds, multiplies and shifts, then a random mix with stores, NOPs and cycles where
`rfin` or `puin` is low, and finally a store of every register. A reference model with its
own arithmetic and a shadow register file checks every register after every cycle and every
value driven on D. Every cycle, the testbench also checks:

* that only the right unit is enabled;
* that the unselected units' internal operands are zero;
* that each supply is VDD exactly when its unit is enabled.

It counts each mechanism: every opcode, every VDDL→VDD and VDD→VDDL transition of each
unit, and writes blocked by RFIN or PUIN. It fails if any mechanism never happened, and it
checks one instruction per cycle. `tb_pp_wave_program` runs a short program in the unit order
of the published supply waveform. It checks that each unit spends exactly its own
instructions' cycles at VDD, and prints the residency counts.
