# Station Board configuration fan-out FPGA

A Station Board carries 46 FPGAs that must be loaded from one place: a PC
mezzanine card (PCM card) that holds the bitstreams. The card has a single
8-bit SelectMAP bus (CDATA[7:0], CCLK), twelve active-low PROG_B lines and
twelve DONE inputs, at 3.3 V LVTTL. The configuration fan-out FPGA sits
between the card and the board. It has almost no logic and a lot of pins. Its
jobs are:

* copy the configuration bus to every FPGA on the board;
* send each PROG_B pulse to the chip or group of chips it belongs to, and
  let the board's monitor-and-control FPGA (the MCB) mask single chips so
  that one filter FPGA can be reloaded without touching its 17 neighbours;
* fold the 46 DONE lines back into the card's twelve;
* give the MCB a small register file: version, a scratch register, the
  masks, every chip's DONE line, the board serial number, the power-good
  lines and a sticky record of supply dips.

The RTL here is synthesizable SystemVerilog with one top, `cfg_fpga_top`.
It follows the register map, the PROG/DONE mapping and the chip grouping of
the Station Board Configuration FPGA specification. Where that document is
silent, the choices are listed in [Choices made here](#choices-made-here).

## Two paths through the chip

```
             PCM card                                      46 target FPGAs
 CDATA[7:0], CCLK ─────────► cfg_fanout ──────────────► 11 byte buses, 46 CCLKs
 nPROG[11:0] ──────────────►   (masking) ─────────────► 46 PROG_B
 CHIP_ENA ─────────────────►      ▲
                                  │ disable masks
 DONE[11:0] ◄───────────── done_combiner ◄───────────── 46 DONE
                                  │
             MCB FPGA             │           (MCB_CLK domain)
 MCB_CS/RW/ADDR/DATA ◄────► cfg_regs ◄── sync_bits ◄── DONE x46, power-good x10,
                              ▲   │                     CHIP_ENA, board_id[15:0]
                              │   ▼
                          pwr_err_latch
```

**Configuration path.** No clock and no flip-flop. CDATA, CCLK and PROG_B go
through gates only, so the bytes reach the targets with the same timing the
card gives them. The specification budgets at most 12 ns from pin to pin in
both directions. That is a property of the placed device, and the RTL only
keeps the path free of registers.

**Control path.** Everything the MCB sees is clocked by MCB_CLK. The
asynchronous board inputs go through a two-flop synchroniser first.

## Who gets which PROG line

The card's twelve PROG/DONE pairs map to chips as follows. Filter `Fn` of a
bank (n = 0..17) is group `n / 6` (G1..G3), chip `n % 6` in the top's
`[group][chip]` port arrays.

| pair | chips | PROG output(s) | masked by |
|------|-------|----------------|-----------|
| 0  | this FPGA | none (drives nothing here) | – |
| 1  | MCB  | `other_prog[0]` | – |
| 2  | DMA (delay module A) | `other_prog[1]` | – |
| 3  | DMB (delay module B) | `other_prog[2]` | – |
| 4  | IC (input chip) | `other_prog[3]` | – |
| 5  | WBC (wide-band correlator) | `other_prog[4]` | – |
| 6  | TC (timing chip) | `other_prog[5]` | – |
| 7  | OUTA | `other_prog[6]` | – |
| 8  | OUTB | `other_prog[7]` | – |
| 9  | VSIA and VSIB | `other_prog[8]`, `other_prog[9]` | CC[5], CC[6] |
| 10 | filter bank A, F0A..F17A | `prog_ag[g][c]` | CD1[15:0] for F0A..F15A, CC[1] F16A, CC[2] F17A |
| 11 | filter bank B, F0B..F17B | `prog_bg[g][c]` | CD2[15:0] for F0B..F15B, CC[3] F16B, CC[4] F17B |

A target FPGA starts configuring on the rising edge that ends a low pulse on
its PROG_B. A chip whose mask bit is 1 has its PROG_B held high. It never sees
the pulse and keeps its current configuration. The rest of its group is
reloaded as usual. To reload only filter F5A, the MCB writes
CD1 = 0xFFDF and sets CC[2:1] = 11. The card then pulses PROG[10] and streams
the bitstream. Only F5A accepts it: the others are not in configuration mode
and ignore CCLK.

CHIP_ENA (CE) from the card is a global gate. While it is low, no PROG pulse
reaches any chip and `cdata_oe` is low, so the pins that the board pinout
lists as tristate (all CDATA buses and the single-chip CCLKs) are released.

Data buses are shared the way the board routes them: one bus per group of
six filters, `cdata_wbc_p` for WBC and VSIA, `cdata_ic_p` for IC and VSIB,
`cdata_tc_p` for TC, OUTA and OUTB, and `cdata_33_p` / `cdata_33b_p` for MCB,
DMA and DMB. Every bus carries the same byte. Each chip has its own CCLK line.

## DONE back to the card

DONE lines are open-drain with pull-ups, so a group reads 1 only when all of
its chips are configured. `done_combiner` reproduces this with an AND:
`DONE[10]` is the AND of the 18 bank-A lines, `DONE[11]` of bank B and
`DONE[9]` of the VSI pair. `DONE[1..8]` pass through. `DONE[0]` stands for
this FPGA and is driven 1, because the logic runs only once the FPGA is
configured. When a single masked-in chip is being reloaded, its group's DONE
line drops and comes back, and the card sees exactly the state of that reload.

## Register file (MCB bus)

All registers are 16 bits wide. The bus has an 8-bit address, a chip select
and a read/write line. It is single-cycle and synchronous to MCB_CLK:

* **write:** `mcb_cs_p = 1`, `mcb_rw_p = 0`; data is taken on the rising edge;
* **read:** `mcb_cs_p = 1`, `mcb_rw_p = 1`; `mcb_data_o` shows the register
  combinationally and `mcb_data_oe` is high, for the bidirectional MCB_DATA
  pads. The MCB samples on the rising edge that ends the cycle.

| addr | name | access | contents |
|------|------|--------|----------|
| 0x00 | FVR    | R   | [7:4] version, [3:0] revision; reset 0x0001 (parameters `VERSION`, `REVISION`) |
| 0x01 | RBT    | R/W | scratch register, returns the last value written |
| 0x02 | CC     | R/W | [1] F16A, [2] F17A, [3] F16B, [4] F17B, [5] VSIA, [6] VSIB disable; other bits read 0 |
| 0x03 | CD1    | R/W | [n] disables filter FnA, n = 0..15 |
| 0x04 | CD2    | R/W | [n] disables filter FnB, n = 0..15 |
| 0x05 | DONEA1 | R   | [11:0] DONE of F0A..F11A |
| 0x06 | DONEA2 | R   | [5:0] DONE of F12A..F17A |
| 0x07 | DONEB1 | R   | [11:0] DONE of F0B..F11B |
| 0x08 | DONEB2 | R   | [5:0] DONE of F12B..F17B |
| 0x09 | DONE   | R   | [0] MCB [1] DMA [2] DMB [3] IC [4] WBC [5] TC [6] OUTA [7] OUTB [8] VSIA [9] VSIB |
| 0x0a | SBSER  | R   | board serial number, from the 16 `board_id` straps |
| 0x0b | PWS    | R   | [0] CE, then power-good: [1] 5 V [2] 3.3 V [3] 2.5 V [4] 1.5 V [5] 1.2 V B2 [6] 1.2 V B1 [7] 1.2 V B [8] 1.2 V A2 [9] 1.2 V A1 [10] 1.2 V A |
| 0x0c | PSE    | R, clear on read | [i] = supply of PWS bit i+1 has dropped out of range since the last read |

Writes to read-only registers and to addresses 0x0d..0xff are ignored, and
those addresses read 0. Reset (`reset_p`, active high, asynchronous) clears
RBT, CC, CD1 and CD2, so after reset no chip is masked.

Status fields show the pins two MCB_CLK edges late (the synchroniser).

### Power-error bits (PSE)

PWS shows the power-good lines as they are now. PSE keeps a short dip on
record. `pwr_err_latch` sets bit i on the clock after power-good i falls from 1
to 0. The bit stays set when the supply recovers, and it is cleared on the
clock edge that ends an MCB read of 0x0c. A fall that arrives in the same
cycle as the clearing read is kept. A supply that stays low after the read is
not reported again until it has recovered and fallen once more. The latch
reacts to the falling edge rather than to the low level, so supplies ramping
up after reset do not show as errors. A deep dip of the 1.2 V B2 rail makes
this FPGA itself lose its configuration, and then no bit can record it.
E1V2B2 only records dips the FPGA survives.

## Files

| file | contents |
|------|----------|
| `rtl/cfg_pkg.sv` | sizes, register address enum, PROG/DONE indices, `pwr_stat_t` and `prog_dis_t` structs |
| `rtl/cfg_fpga_top.sv` | top: wires the two paths, the status struct and the synchroniser |
| `rtl/cfg_fanout.sv` | CDATA/CCLK copies, PROG fan-out with masks and CE |
| `rtl/done_combiner.sv` | DONE[11:0] to the card |
| `rtl/cfg_regs.sv` | MCB register file and mask decode |
| `rtl/pwr_err_latch.sv` | sticky PSE bits |
| `rtl/sync_bits.sv` | N-bit, S-stage synchroniser |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cfg_fpga_top` for the whole chip |
| `tb/target_cfg_model.sv` | behavioural model of a target FPGA's configuration port (testbench only) |

Top-level port names follow the board pinout (`cdata_p`, `nprog_p`, `done_p`,
`chip_ena_p`, `mcb_*_p`, `stat_*`, `board_id`). The per-pin groups `*_aG1..3`
and `*_bG1..3` are packed into `[group][chip]` arrays. MCB_DATA is split into
`mcb_data_i`, `mcb_data_o` and `mcb_data_oe`. The pads, with their LVTTL or
LVCMOS 2.5 V standards, the tristate drivers and the level shifting belong to
the vendor's I/O cells and pin constraints, not to this RTL.

## Choices made here

The specification defines the registers and the mapping. It leaves the
following open, and this design settles them:

* **MCB bus protocol.** Only the pin names are given. Single-cycle
  synchronous access, active-high CS and RW = 1 for read are this design's.
* **Read-back register.** The specification says both that writes to RBT
  "have no effect" and that it keeps the last value written, and lists it as
  R/W. Here it stores writes, which is what a read-back test needs.
* **FVR.** The reset value 0x0001 (version 0, revision 1) is used. The
  prose suggests the first production version would be 1; change the
  `VERSION` parameter for that.
* **DONE register bit order.** One table shows OUTB at bit 6 and OUTA at
  bit 7. The field descriptions give OUTA = 6 and OUTB = 7. The field
  descriptions are followed.
* **Masked PROG level.** A masked chip's PROG_B is held high (inactive).
  How the mask acts is not specified.
* **CE.** Used to block all PROG pulses and as the output enable of the
  tristate pins. The specification only says CE enables programming.
* **Group "sum" of DONE** is read as AND (all chips configured).
* **Which of CDATA_33 / CDATA_33B feeds which chips.** Not given. It
  doesn't matter logically, since both carry the same byte.
* **Twelve or eleven PROG/DONE pins.** The card's bus is twelve bits wide,
  but pair 0 belongs to this FPGA itself, whose own PROG_B and DONE are the
  device's dedicated configuration pins. The board therefore routes only
  eleven PROG and eleven DONE lines through user I/O. The RTL keeps the full
  12-bit buses, with PROG[0] unused and DONE[0] tied high. How the eleven
  user pins are numbered against PROG[1..11] has to come from the board
  netlist.
* **Synchronisers, reset polarity, PSE edge detection, PROG[0] unused,
  DONE[0] tied to 1.** Not specified.
* **Not implemented:** the four `test_port` pins, whose function is not
  described. Also CS_B, RD/WR_B and INIT_B of the targets, which are tied or
  unused at board level and have no pins on this FPGA.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/cfg_pkg.sv tb/tb_cfg_fpga_top.sv --top-module tb_cfg_fpga_top
./obj_dir/Vtb_cfg_fpga_top
```

Replace the testbench name to run a single module's test (`tb_cfg_regs`,
`tb_cfg_fanout`, `tb_done_combiner`, `tb_pwr_err_latch`, `tb_sync_bits`).

`tb_cfg_fpga_top` runs the top at its default parameters with 46 instances
of `target_cfg_model`. The testbench acts as the PCM card (PROG pulse, a wait
for the targets to get ready, then a 24-byte test bitstream on CCLK) and as
the MCB. It checks:

* a full board configuration, PROG[1] to PROG[11];
* that PROG and DONE cross the chip within 12 ns;
* a masked reload of one filter per bank;
* VSIA reloaded alone;
* CE blocking a PROG pulse;
* a supply dip recorded in PWS and PSE, and cleared by a read;
* the serial number and all status registers.

It counts how often each of these happened, and counts a failure for any
that never happened. It simulates about 55 µs and runs in well under a
second.

The module testbenches compare against reference values computed in the
testbench: random stimulus plus directed corner cases, such as a set and a
clear of PSE in the same cycle, or one chip missing from each DONE group.
Each testbench was also run against a deliberately broken copy of its module
and reports failures there.

## How far to trust it

* All RTL lints clean under Verilator `-Wall`, apart from unused package
  constants. It also elaborates in Yosys/slang and synthesises to about
  130 cells and 220 flip-flops. Most outputs are plain copies of inputs,
  as a fan-out buffer should be.
* The register map, bit positions, PROG/DONE mapping and filter grouping
  were checked field by field against the specification tables.
* Nothing has been tried on hardware. The 12 ns pin-to-pin figure depends
  on placement and I/O standards, and a zero-delay simulation cannot show it.
* The MCB bus timing is an assumption. If the real MCB master uses a
  different strobe or samples read data at another point, adapt `cfg_regs`
  (and the PSE clear strobe `pse_rd` with it).
