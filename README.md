# TOF / MTD / PP2PP branch of the STAR trigger DSM tree (2009)

This is RTL for one branch of the STAR Level-0 trigger: the tree of DSM
(Data Storage and Manipulation) boards that turns the raw per-crossing data
of three detectors into a handful of trigger bits. The three detectors are
the Time-of-Flight barrel (TOF), the Muon Telescope Detector (MTD) and the
PP2PP Roman Pots. Every RHIC bunch crossing, the branch delivers one 16-bit
word to the last DSM (LD301) or the TCU:

| bit  | meaning |
|------|---------|
| 0    | MTD: east and west TAC both good, TAC difference inside its window, TAC sum outside its window |
| 1    | ET: PP2PP elastic trigger |
| 2    | ITE: PP2PP inelastic, east |
| 3    | ITW: PP2PP inelastic, west |
| 4    | TOF total multiplicity above threshold |
| 5:10 | one bit per TOF 2-hour sector, that sector's multiplicity above threshold |
| 11:15| 0 |

It also delivers a 16-bit scaler word for rate monitoring.

## The tree

```
 TOF trays (120 x 5 bit)                MT001 QT      PP001 QT
   |  20 per board                       (2 TACs)     (16 hits)
 TF001 .. TF006   tof_l0_dsm  x6            |            |
   |  10-bit sector sums                 MT101           |
 TF101            tof_l1_dsm          mtd_l1_dsm         |
   |  13-bit total + 6 sector bits          | MTD bit    |
   +-----------------+----------------------+------------+
                  TF201   tof_l2_dsm
                     |
              LD301 / TCU (16 bits) + scalers (16 bits)
```

`tof_mtd_pp2pp_tree` wires this up. The two QT boards (MT001, PP001) run
QT-board firmware that is specified elsewhere, and they are not part of this
RTL. Their outputs are ports of the top, `mt101_ch_in` and `pp001_hits`.

All boards share the same I/O shape: 8 input channels of 16 bits
(`dsm_pkg::dsm_in_t`). Unused channels and bits are ignored on input and
driven with zero on output.

## Steps, clocks and latency

Each board's algorithm is a numbered sequence of steps. Step 1 always
latches the inputs and the last step latches the outputs. The FPGA runs on a
clock four times the RHIC crossing clock. In this RTL **every step is one
register stage on that clock**. Each board is therefore a straight pipeline:

| board | steps = latency (clocks) | why |
|-------|------|-----|
| TF001..TF006 | 8 | one extra RHIC tick (4 clocks), so that 20 values can be added in series |
| TF101 | 8 | same reason |
| MT101 | 4 | normal DSM timing |
| TF201 | 4 | normal DSM timing |

Because the pipeline is full, a board accepts new data on every clock. That
is more than the four clocks per crossing the experiment needs, so one
crossing per clock is a stricter test.

The TOF data take 16 clocks to reach TF201 and the MTD data take 4. In the
experiment the QT boards and the cable lengths make all three detectors'
data for one crossing reach TF201 together. Those delays are not part of
this design. The top stands in for them with two plain delay lines:
`MT_ALIGN = 12` clocks in front of MT101 and `PP_ALIGN = 16` clocks on the
PP2PP bits. So data for one crossing, applied to all top-level inputs on the
same clock, appears on `ld301_out` and `tf201_scalers` exactly **20 clocks**
later. `tf101_out` and `mt101_out` appear 16 clocks later. These two are
extra observation ports. An elaboration-time assertion in the top checks that
the two alignment parameters are consistent with the board latencies. If you
model real cable timing instead, change them.

## TOF: summing 120 trays in two layers

**Layer 0 (`tof_l0_dsm`).** Each board takes 20 tray multiplicities of 5
bits. Three of them are packed per channel on channels 0..5: tray `3k+j` is
in channel `k`, bits `5j+4:5j`. The last two trays are on channel 6, bits
0:9. The board's input LUT is a plain identity, except that it zeroes dead,
noisy or uninstrumented trays. Here it is a 20-bit `tray_enable` mask, a
static configuration input that is applied in step 2. The sum is built as a
tree, one level per step:

```
step 2:  0:2  3:5  6:8  9:11  12:14  15:17   18:19      (7-bit / 6-bit)
step 3:   0:5        6:11        12:17       18:19 held
step 4:        0:11                   12:19
step 5:                  0:19   (10 bits, max 620)
step 6,7: delay     step 8: output latch
```

The output is bits 0:9 of a 16-bit channel.

**Layer 1 (`tof_l1_dsm`).** TF101 takes the six 10-bit sector sums on
channels 0..5 and works on two tasks in parallel:

* It sums the six values to a 13-bit total, at most 6138. The sums are 0:1,
  2:3 and 4:5 in step 2, then 0:3 in step 3, then 0:5 in step 4. The total
  is then held until step 8.
* In step 2 it compares each sector with register R0 (`r0_sector_th`,
  10 bits). The six resulting bits are held until step 8.

Its output is 32 bits, split over two channels: bits 0:12 hold the total
and bits 16:21 the sector bits.

## MTD: a TAC-difference window with a TAC-sum veto (`mtd_l1_dsm`)

The MT001 QT board sends a 12-bit "good TAC" for each end of the MTD. Its
two cables are swapped at MT101, so in the 32 bits `{ch1, ch0}`:

| bits  | content |
|-------|---------|
| 0:7   | TAC-W[11:4] |
| 8:15  | unused |
| 16:27 | TAC-E[11:0] |
| 28:31 | TAC-W[3:0] |

In step 2 the board forms `diff = 4096 + TAC-W - TAC-E` and
`sum = TAC-W + TAC-E`. Both are 13 bits wide, and the 4096 offset keeps the
difference positive. In step 3 it evaluates

```
MTD = (TAC-E > 0) & (TAC-W > 0) & (R0 < diff < R1) & !(R2 < sum < R3)
```

All comparisons are strict. The difference must fall inside its window and
the sum must fall outside its own. The bit is latched in step 4.

## PP2PP: Roman Pot logic in TF201 (`tof_l2_dsm`)

The PP001 QT board sends one good-hit bit per PMT, two PMTs per Roman Pot.
The pots are named by side (East/West), by orientation (Vertical Up/Down,
Horizontal Outer/Inner) and by PMT number (1/2). The bits arrive in this
order, bit 0 first: EVU1 EVU2 EVD1 EVD2, WVU1 WVU2 WVD1 WVD2, EHO1 EHO2 EHI1
EHI2, WHO1 WHO2 WHI1 WHI2. The `dsm_pkg::pp_hit_bit_e` enum gives the same
map.

In step 2 the bits of each pair are ORed into one bit per pot (EVU, EVD, ...).
The pot bits then form ten components:

| component | logic | meaning |
|-----------|-------|---------|
| EA, EB | WVU&EVD, WVD&EVU | vertical pots on opposite sides, one up and one down (elastic topology) |
| EC, ED | WHO&EHI, WHI&EHO | the same for the horizontal pots |
| EOR, WOR | OR of the four pots on one side | anything on east / west |
| EVF, EHF, WVF, WHF | both pots of a pair hit | veto conditions |

In step 3 the components form three triggers, each a raw condition with its
veto removed:

```
ET  = (EA|EB|EC|ED) & !(WVF|WHF|EVF|EHF)
ITE = EOR & !(EVF|EHF)
ITW = WOR & !(WVF|WHF)
```

In the same board, step 2 also compares the TOF total with R0
(`r0_mult_th`, 13 bits, strictly greater), and the MTD and sector bits
pass through a two-stage delay. Step 4 latches the output word (see the
table at the top) and the scaler word:

| scaler bits | 0..9 | 10 | 11 | 12:15 |
|---|---|---|---|---|
| | EA EB EC ED EOR WOR EVF EHF WVF WHF | MTD | TOF total bit | 0 |

## Choices made in this RTL

The channel maps, bit maps, equations and step schedules above follow the
2009 algorithm description of these boards. The following points are not
fixed by that description:

* **Threshold compares.** The TOF sector and total multiplicity bits use
  a strict "greater than". The description says only "compared to a
  threshold". MT101's window compares are strict, as described.
* **Sign of the MTD difference.** The difference is west minus east,
  `4096 + TAC-W - TAC-E`, so the R0/R1 window is centred on 4096 for equal
  TACs.
* **Registers.** Every board register (R0..R3) is a static input port. How
  registers are loaded over the crate bus is not modelled.
* **LUTs.** Only the TF001 zeroing mask is modelled. All other LUTs are
  identities and are left out.
* **Reset.** A synchronous, active-high `rst` clears every pipeline stage.
* **Scalers.** They are latched together with the output word.
* **Alignment delays.** `MT_ALIGN` and `PP_ALIGN` in the top are described
  above. They model timing outside the DSM boards.
* **Not modelled.** The QT-board firmware of MT001 and PP001 is not here.
  Neither is the PP2PP logic that the MT101 version-c firmware still
  contains but no longer uses, since that input was disconnected.

## Files and interfaces

| file | contents |
|------|----------|
| `rtl/dsm_pkg.sv` | channel types, widths, latencies, PP2PP bit enum, component struct |
| `rtl/dsm_delay.sv` | parameterised pipeline delay (`WIDTH`, `DEPTH`) |
| `rtl/tof_l0_dsm.sv` | TF001..TF006 |
| `rtl/tof_l1_dsm.sv` | TF101 |
| `rtl/mtd_l1_dsm.sv` | MT101 |
| `rtl/tof_l2_dsm.sv` | TF201 |
| `rtl/tof_mtd_pp2pp_tree.sv` | the whole branch (top) |
| `tb/tb_*.sv` | one self-checking testbench per module above, plus the end-to-end one |

All modules use one clock, `clk` (the 4xRHIC FPGA clock), and `rst`. None
has a handshake. Data are sampled on every rising edge.

## Verification

Each testbench drives random data on every clock, plus directed corner
cases. It compares every output word with a reference model written
independently in the testbench, at the exact latency, so a wrong value and a
wrong cycle count both fail. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_tof_l0_dsm`: random trays and masks, all trays at maximum (620),
  all trays masked, junk on unused bits.
* `tb_tof_l1_dsm`: random sectors, the maximum total (6138), and sectors
  exactly equal to the threshold.
* `tb_mtd_l1_dsm`: TAC pairs around the difference window, exactly at R0,
  zero TACs and sum-vetoed pairs, with two register sets.
* `tb_tof_l2_dsm`: random hit patterns, with counts that show ET, ITE and
  ITW each firing and each vetoed.
* `tb_tof_mtd_pp2pp_tree`: the whole branch at its default parameters,
  over 4000 clocks. In the first half a new crossing arrives every clock.
  In the second half each crossing is held for four clocks, which is the
  real crossing rate. It checks TF101, MT101 and TF201 outputs every clock. It
  counts 17 mechanisms (LUT masking, both outcomes of each threshold,
  equality at each threshold, MTD firing, MTD outside the difference
  window, MTD sum veto, MTD zero TAC, and each PP2PP trigger firing and
  vetoed), and it fails if any of them never happened.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dsm_pkg.sv tb/tb_tof_mtd_pp2pp_tree.sv --top-module tb_tof_mtd_pp2pp_tree
./obj_dir/Vtb_tof_mtd_pp2pp_tree
```

Swap in another testbench name to run a single board. Each run finishes in
seconds.
