# Digital readout logic for hybrid and monolithic pixel detector chips

This repository holds synthesizable SystemVerilog for the digital parts of four
pixel-detector ASICs built in a 180 nm high-voltage CMOS process:

* **MPROC**: a readout chip for a CdTe hybrid detector. It stamps every hit
  with a 20 bit coarse time, a 10 bit falling-edge (time-over-threshold)
  stamp and a 7 bit fine time from a per-pixel TDC. It drains the 30 × 540
  hit buffers through a column/end-of-column priority readout and sends
  52 bit hit words out as a 2 bit stream, which becomes 1.6 Gbit/s after a
  2:1 output serializer.
* **HVMAPS25**: a monolithic sensor with 17 280 pixels. It uses the same
  readout scheme with a 10 bit time stamp and 6 bit ToT, and has a
  row/column configuration that can switch off each column's hit bus.
* **CCPD53**: a capacitively coupled sensor. The only digital content is
  the wiring that encodes 16 pixels onto 8 transmission pads.
* **PHOTON**: a 32 × 30 counting chip. Each pixel has a 13 bit counter
  gated by a shutter and a mask.

The chips do not form one system. The top module `detector_asics_top`
places their digital parts side by side, each with its own ports. The analog
front ends are not logic and are outside the RTL: amplifiers, comparators,
the TDC ramp, bias DACs and the PLL. Their digital outputs are inputs here:
comparator outputs and the TDC's "ramp crossed threshold" signals.

## The hit buffer: how a hit is captured

Every MPROC pixel has two readout cells, so a column holds 540
`hit_buffer`s. A cell holds three small RAMs and a constant address, and it
captures a hit without any per-pixel counter:

* The **TS RAM** follows the global leading-edge stamp TS1 for as long as
  `hit` is low. The rising comparator edge sets `hit` through an edge
  detector and an SR flip-flop. From then on the RAM holds the stamp of the
  leading edge.
* The **ToT RAM** follows the global TS2 while the comparator is high, so it
  ends up holding the stamp of the falling edge. The time over threshold is
  the difference of the two stamps and is computed off chip.
* The **TS3 RAM** follows the global TS3 until the pixel's TDC reports that
  its ramp crossed threshold. The ramp starts fast at the hit and slows at
  the next clock edge, so the delay between the edge and the crossing
  stretches the sub-period phase of the hit.
* **LdPix** copies `hit` into `hitflag`. Only a complete hit is flagged: the
  comparator must be low again and the TDC must have fired. This design
  adds that condition so that a read never returns an unfinished ToT or
  fine stamp. A hit still in progress is flagged by a later LdPix.
* **RdPix** reads the highest-priority flagged cell. The cell puts
  `{TS1, TS2, TS3, row}` on the column bus and clears itself in the same
  cycle.

All stamps are Gray coded. TS1 has two halves. TS11 (bits 9:0) changes on
the rising edge of the 100 MHz time stamp clock. TS12 (bits 19:10) is a copy
of TS11 taken on the falling edge. When a hit arrives close to a rising
edge, at least one of the two halves was stable when the TS RAM closed. The
fine stamp then tells which half to trust; the off-chip formula is not part
of the RTL.

A second comparator pulse while a hit is stored does not start a new hit
(dead time). The ToT RAM still follows it, as a cell wired this way would.

## Priority: fast and slow OR chains

`priority_chain` chooses the highest flagged cell among 540 without a
540-gate ripple. The cells form groups of 30.

* Inside a group, each cell's *Slow* input is the previous cell's ScanOut.
* Every cell of a group shares one *Fast* input: the ScanOut of the last
  cell of the previous group.
* Each cell computes `ScanOut = flag | Slow | Fast` and
  `Enable = flag & ~Slow & ~Fast`.

So at most one cell is enabled, the one with the lowest index. The column's
last ScanOut says "this column has something to read". The same block with
one group of 30 chains the end-of-column (EoC) blocks.

## Readout: LdPix, PullDN, LdCol, RdCol

`rcu_fsm` drains the matrix in rounds:

| state  | action |
|--------|--------|
| LDPIX  | one-cycle LdPix: complete hits become flagged |
| CHECK  | if no column reports a flag, go back to LDPIX |
| PULLDN | clear the EoC latches (the bus bits can only be pulled up) |
| LDCOL  | each column with a flag sends RdPix to its top cell; its EoC captures the word |
| SETTLE | EoC flags settle |
| RDCOL  | one RdCol per cycle while the serializer is free: the top EoC puts `{word, 5 bit column}` out and clears |

When the EoCs are empty, the FSM goes back to PULLDN if columns still hold
flags, and otherwise to LDPIX. A hit that arrives during a round waits for
the next LdPix. RdCol is only issued when `hit_serializer` can accept a
word, so the serializer is never overrun. This back-pressure is this
design's choice.

`hit_serializer` sends each word as a frame: a 12 bit header `0xB5C`, then
the 52 bit word, MSB first, two bits per clock, with `00` when idle. The
header and idle code are this design's choice. `ser2to1` is a behavioural
model of the analog 2:1 output stage. It is not synthesizable logic. It
sends bit 1 in the high clock phase and bit 0 in the low phase. With an
800 MHz readout clock, a frame takes 32 clocks, or 40 ns per hit at
1.6 Gbit/s.

## Configuration register

Each `cfg_bit` has three parts:

* **Shift stage.** It is clocked by two non-overlapping clocks: Ck1 takes
  Sin, and Ck2 moves the bit to Sout.
* **Latches.** `Load` copies the shift stage into three redundant latches
  behind a majority gate.
* **Auto-refresh.** When the three copies disagree, the majority value is
  written back. An `upset` input lets a testbench flip single copies.

With `Rb`, the next Ck1 loads the majority value instead of Sin, so the
latch contents can be shifted out for read-back. `cfg_register` chains the
bits.

* MPROC has 25 bits per column and 16 assumed bias DACs of 7 bits:
  862 bits.
* HVMAPS25 has 48 × 6 row-control bits and 30 × 8 column-control bits:
  528 bits. Bit 6 of each column block disables that column's hit bus.

The latch outputs are brought out as ports, because the DACs and pixel RAM
they drive are analog.

## CCPD53 and PHOTON

`ccpd53_encoder` is combinational. A group has 16 pixels: subgroups A–D
with index 1–4, and pixel `Q[4*s + i-1]`. Each pixel has two comparator
outputs, OutR and OutL:

* Index pad *i* is the OR of the OutR outputs of the four pixels with
  index *i*.
* Subgroup pad *s* is the OR of the OutL outputs of subgroup *s*.

A single hit raises exactly one pad of each kind.

`photon_pixel` counts rising comparator edges while the shutter is open and
the pixel is not masked. It saturates at 8191 and is cleared by `clear`.
Saturation and clear are this design's choices. The counts come out in
parallel, because the readout path of the counting chip is not specified.
`photon_matrix` is 32 × 30 of them.

## Files

| file | contents |
|------|----------|
| `rtl/det_pkg.sv` | widths, frame header, RCU state enum, Gray conversion |
| `rtl/hit_buffer.sv`, `priority_chain.sv`, `pixel_column.sv` | one column |
| `rtl/eoc.sv`, `readout_matrix.sv` | columns + EoCs + EoC priority chain |
| `rtl/ts_generator.sv`, `rcu_fsm.sv`, `hit_serializer.sv`, `ser2to1.sv` | periphery |
| `rtl/cfg_bit.sv`, `cfg_register.sv` | configuration chain |
| `rtl/mproc_chip.sv`, `hvmaps25_chip.sv` | chip digital parts |
| `rtl/ccpd53_encoder.sv`, `photon_pixel.sv`, `photon_matrix.sv` | CCPD53 / PHOTON logic |
| `rtl/detector_asics_top.sv` | all of the above side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/readout_agent.sv` | shared hit source, frame receiver and scoreboard |
| `tb/tdc_ramp_model.sv` | behavioural model of the analog TDC ramp |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/det_pkg.sv tb/tb_mproc_chip.sv \
  tb/readout_agent.sv rtl/*.sv --top-module tb_mproc_chip -j 4
./obj_dir/Vtb_mproc_chip
```

* The chip testbenches (`tb_mproc_chip`, `tb_hvmaps25_chip`) use reduced
  matrices: 4 columns of 90 and 96 cells. `readout_agent` injects bursts of
  hits and models the TDC ramps. It rebuilds the frames from the 2 bit
  output and checks every field of every word against its own time stamp
  counters. It fails the run if any readout mechanism never occurred:
  several hits per column in one round, several columns per LdCol,
  serializer back-pressure, hits during a round, dead-time pulses, or hit
  bus activity.
* `tb_detector_asics_top` runs the full-size top with default parameters:
  16 200 + 17 280 hit buffers. It covers both chips, all CCPD53 groups and
  the PHOTON matrix, including counter saturation. Building it takes
  about 8 minutes of C++ compilation on 4 cores (use `-j`). The run then
  takes under 4 minutes: 150 hits per chip, 69 µs of simulated time.

## Where this design departs from, or adds to, the source description

* **ToT RAM width.** A figure shows a 7 bit ToT RAM and a 37 bit cell bus.
  The text gives TS2 as 10 bits and lists a 52 bit hit word. The 10 bit
  version is built.
* **HVMAPS25 ToT width.** HVMAPS25's ToT is given as 6 bits in one place
  and 5 bits in another. 6 bits is built. HVMAPS25 has no TDC, so its
  32 bit word carries a fine-time bit that is always 0. That bit lets it
  reuse the MPROC readout blocks.
* **Assumed sizes and choices.**
  * The readout clock is 800 MHz. It is inferred from 1.6 Gbit/s and two
    bits per clock.
  * MPROC has 16 bias DACs.
  * The HVMAPS25 priority group size is 24.
  * The frame header, the FSM state order and the serializer back-pressure
    are this design's choices.
* **Data rate.** The stated 1.6 Gbit/s as "32 bits per 25 ns, about one
  hit per 50 ns" does not match a 52 bit hit. Here one hit takes 40 ns of
  output time.
* **Not modelled.** The edge detector's adjustable pulse width, DRAM
  refresh and all analog timing are not modelled. Everything is clocked on
  the readout clock.
* **Not built.** The HVMAPS25 pixel RAM write path (which row/column bits
  select which of the 12 pixels) is not built, because it is not
  specified. The shift registers that would drive it are built.
