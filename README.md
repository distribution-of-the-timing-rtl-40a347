# Clock and Control Board logic for a CSC crate

Every crate of the CMS endcap muon Cathode Strip Chamber (CSC) electronics has one Clock
and Control Board (CCB) in its middle slot. The CCB takes the LHC timing, trigger and
control (TTC) stream from the optical TTC receiver and puts it on the crate's custom
backplane: the 40.08 MHz bunch-crossing clock, an 80.16 MHz clock, TTC commands, and
the Level 1 Accept (L1A). It also generates the Hard_Reset pulses that make every
board reload its FPGA, and it lets software follow the reloads. A peripheral crate holds
nine Trigger Motherboards (TMB), nine DAQ Motherboards (DMB) and one Muon Port Card
(MPC). A Track Finder crate holds twelve Sector Processors and a Muon Sorter on the same
CCB pinout.

This repository holds synthesizable SystemVerilog for the logic of that board. It does
not cover the TTC receiver and PLL ASICs, the GTLP and LVDS drivers, or the oscillator.
Their signals are ports of the top module, `ccb_top`.

## The two paths to the backplane

The central idea of the board is that its critical path avoids the FPGA:

* **Discrete logic mode** is the main mode. The TTC receiver's commands are latched and
  its L1A is re-timed by logic that, on the real board, is built from discrete CMOS parts
  that radiation upsets cannot reach. Nothing programmable lies between the receiver and
  the backplane.
* **FPGA mode** gives the flexibility that chamber tests need. In this mode the FPGA
  drives the backplane. It passes the TTC commands through, or issues commands of its
  own when software writes them. It builds the L1A from any of five sources: the TTC
  receiver, a TMB request, a DMB request, a VME write, and the front panel. A
  programmable delay is added to the L1A.

`mode_mux` selects the path. The reset decoding sits after the multiplexer, so both
modes use the same Hard_Reset logic. That logic lies in the discrete part of the board,
so the main mode never depends on the FPGA.

```
 TTCrx ──┬─> ttc_cmd_latch (x2) + L1A flop ──────────────┐ discrete
         │                                               ├─> mode_mux ─> Fast Control Bus ─┬─> backplane
         └─> fpga_cmd_gen ─────────────────┐             │                                 │
 TMB/DMB/front panel/VME ─> l1a_generator ─┴─────────────┘ FPGA                            │
                                                                                           v
 VME bus ─> ccb_csr (mode, L1A mask/delay, commands, Hard_Reset, Configuration_Done)    hard_reset_gen
 QPLL / oscillator clocks ─> clock_select ─> 40.08 MHz logic and slot clock; 80.16 MHz ─> Hard_Reset, Soft_Reset,
                                                                                        CCB reload
```

## Fast Control Bus

| signal | width | meaning |
|---|---|---|
| `brcst`, `brcst_str` | 6 + 1 | TTC broadcast command and its 25 ns strobe |
| `data`, `data_str` | 8 + 1 | low 8 bits of the 14-bit TTC individual command and its 25 ns strobe |
| `l1a` | 1 | Level 1 Accept, one clock wide |

Both command busses use one decoding table. The command word stays on the bus between
strobes. In both modes a TTC command reaches the backplane one clock after the receiver's
strobe. An L1A takes one clock in Discrete logic mode and `delay + 1` clocks in FPGA mode.

## Hard_Reset, Soft_Reset and CCB reload

The radiation environment can corrupt FPGA configurations. Boards recover by reloading
from their PROM. To make that possible, the CCB decodes the reset commands itself and
expands each Hard_Reset to 500 ns. A receiving board can then wire the line straight to
the PROG_B pin of its Xilinx FPGA.

| code (hex) | command | lines driven |
|---|---|---|
| 03 | Hard_Reset, all boards | TMB, ALCT, DMB, MPC, and the CCB's own FPGA in FPGA mode |
| 04 / 05 / 06 / 07 | Hard_Reset TMB / ALCT / DMB / MPC | that line only |
| 08 | CCB_Hard_Reset | CCB FPGA reload (`ccb_prog`), in FPGA mode only |
| 09 | Soft_Reset, all boards | all Soft_Reset lines |
| 0A / 0B / 0C | Soft_Reset TMB / DMB / MPC | that line only |

The code values are this design's own choice: the source material gives the command set
but not the numbers. They live in `ccb_pkg` and can be changed there. An individual command is
decoded only when its top two bits are zero.

* Hard_Reset lines rise one clock after the command is on the backplane. They stay high
  for 20 clocks (499 ns, the closest whole number of clocks to 500 ns). A repeated command
  restarts the 20 clocks.
* Soft_Reset lines are one clock wide.
* While `ccb_prog` is high, the FPGA-side blocks (`fpga_cmd_gen`, `l1a_generator`) are
  held in reset, because reloading the FPGA clears them. Commands and L1As still inside
  them are dropped. The discrete side and the registers keep running. This reload is how
  an upset in the CCB's FPGA is cleared in FPGA mode.
* Software can also raise Hard_Reset lines directly by writing a board mask to
  `REG_HARD_RST`, in either mode.
* All lines are active high. The inversion to PROG_B's active-low level is left to the
  line drivers.

The boards answer with Configuration_Done once they are reloaded. The CCB brings these
lines, 9 TMB + 9 DMB + 1 MPC, into its clock domain and lets software read them.

## Register bus and register map

`ccb_csr` sits behind a simple synchronous bus that stands for the VME slave: `addr`,
`wr`, `rd`, `wdata`, `rdata`, `ack`. The VME handshake (DS/DTACK, address modifiers) is
not part of this RTL. The board answers when address bits 23:19 equal its VME64x
geographic address `ga`. `ack` and read data come one clock after the request.

| offset | access | content |
|---|---|---|
| 0x00 | rw | bit 0 mode (0 Discrete logic, 1 FPGA), bit 1 use oscillator clocks |
| 0x02 | rw | [4:0] L1A source enable: bit 0 TTC, 1 TMB, 2 DMB, 3 VME, 4 front panel |
| 0x04 | rw | [7:0] L1A delay in bunch crossings (FPGA mode) |
| 0x06 | w | issue a broadcast command [5:0] (FPGA mode) |
| 0x08 | w | issue an individual command [7:0] (FPGA mode) |
| 0x0A | w | issue an L1A from the VME source |
| 0x0C | w | Hard_Reset mask [3:0] = {TMB, ALCT, DMB, MPC} |
| 0x10 / 0x12 / 0x14 | r | Configuration_Done of the TMBs [8:0] / DMBs [8:0] / MPC [0] |

After reset the board is in Discrete logic mode and uses the TTC clocks. All L1A sources
are off and the delay is zero.

In FPGA mode, a TTC command and a command that software writes can arrive in the same
clock. The TTC command goes first and the written one waits for the next free clock. Each
bus can hold one waiting command; a newer write replaces it.

The L1A delay is a 256-stage shift register with a selectable tap, so any number of
L1As can be in flight. Change the delay only when none are in flight: the line holds
the last 256 clocks of requests, so a new tap position can repeat or skip one.

## Clocks

`clock_select` chooses between the QPLL clocks (40.08 and 80.16 MHz) and the on-board
quartz oscillator. Each frequency goes through a glitch-free switch (`clk_switch`, enable
flip-flops on the falling edge of each source). The oscillator is enabled as soon as it
is selected. It is disabled only after both switches are back on the TTC clocks. The
board's logic runs on the selected 40.08 MHz clock. The reset input is asynchronous and
is released to the logic through a two-flop synchroniser.

## Where this design departs from, or adds to, the board description

* Command codes, the register map, the L1A delay range (0–255) and the OR of the
  enabled L1A sources are this design's own choices.
* The latencies are this design's own choices, as are the command arbitration in FPGA
  mode and the glitch-free clock switch.
* The VME interface is a register bus, not a full VME64x slave.
* The MUX/DEMUX of the board diagram is built only as a multiplexer. What the
  demultiplexer half routes is not specified.
* Of the front-panel LVDS monitor outputs only the L1A copy is provided. The CCB status
  lines of the Fast Control Bus carry only the current mode (`ccb_mode`).
* The ALCT has its own Hard_Reset line and no Soft_Reset line of its own. The common
  Soft_Reset still sets every bit of the Soft_Reset vector.
* Not in this RTL: the TTC receiver and PLL, the GTLP and LVDS drivers and their
  terminations, the oscillator, the configuration PROM, the delay adjustments on other
  boards, and the TMB's 80 MHz command multiplexing.

## Files

`rtl/` — `ccb_pkg` (types, codes, register map), `ttc_cmd_latch`, `cmd_decoder`,
`pulse_stretcher`, `hard_reset_gen`, `l1a_generator`, `fpga_cmd_gen`, `mode_mux`,
`ccb_csr`, `clk_switch`, `clock_select`, `ccb_top`. Every file starts with a header on
its function, interface and timing.

`tb/` — one self-checking testbench per module (`tb_<module>`). There are also
`tb_ccb_top` and `tb_l1a_rate`:

* `tb_ccb_top` runs the whole board at its default parameters. It covers both modes,
  every reset command, CCB reload, Configuration_Done readout, commands written by
  software (one of them waiting behind a TTC command), all five L1A sources with delay,
  a CCB reload that drops an L1A still in the delay line, and a switch to the oscillator
  and back. It fails if any of these never happened.
* `tb_l1a_rate` sends 600 L1As at an average of 100 kHz through both modes. In FPGA mode
  it adds a 4-crossing delay. It checks that each L1A arrives exactly once, with the
  right latency.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
          rtl/ccb_pkg.sv tb/tb_ccb_top.sv --top-module tb_ccb_top -o sim
./obj_dir/sim
```

Replace `tb_ccb_top` with any other testbench name. Every testbench finishes within
seconds, except `tb_l1a_rate`, which simulates about 240,000 bunch crossings of the
whole board and takes about two minutes. Verilator has only two logic states, so every register that
is read is reset.
