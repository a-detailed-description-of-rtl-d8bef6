# FMS cluster trigger: SystemVerilog model of the QT/DSM trigger tree

The Forward Meson Spectrometer (FMS) is a wall of lead-glass cells: small cells
in the middle, large cells around them, split into four quadrants. A photon
leaves a *cluster* in it: one central cell with a large signal and eight
neighbours with less. The trigger has to find such clusters within a few beam
crossings and with very little logic. Each of its boards can see only part of
the detector.

The trick that makes this cheap is the way cells are cabled. Every QT board
reads 32 cells that form a rectangle. Its four QT8 daughter cards each read one
*stripe* of 8 cells running along the rectangle. Each card reports only the
sum of its stripe (5 bits), and the board also reports its highest cell (HT,
7 bits) and that cell's ID (HTID, 5 bits). A 3x3 cluster around the highest
cell is then approximated by **the sum of the stripe holding that cell and the
two stripes next to it**. A handful of 5-bit additions replaces a real 3x3
search.

This repository holds synthesizable RTL for the whole chain. It runs from the
12-bit ADC values of the 40 FMS QT boards and 4 FPD-East QT boards to the
16-bit layer-2 trigger word.

```
 FMS, per quadrant (x4: South-Top, South-Bottom, North-Top, North-Bottom)
   QT A B C D ──► FM001-type  (small cells)            ──┐
   QT E F G H ──► FM005-type  (large, top/bottom part)  ─┤
   QT I J     ──► FM006-type  (large, side part)        ─┤   layer 0: 12 boards
                                                          │
   4 x FM001-type ─────────────────► FM101 (small cells) ─┐
   FM005/6 + FM007/8 (South) ──────► FM102               ─┤  layer 1
   FM009/10 + FM011/12 (North) ────► FM103               ─┤
 FPD-East: 4 QT boards ─► FE101 ─► (delay 5) ─────────────┤
                                                          └► FP201 (layer 2)
                                                             ├─► trig_out
                                                             └─► scaler_out
```

## Word formats

All boards talk over 16-bit DSM channels. A 32-bit word uses a pair of
channels, and the lower-numbered channel carries bits 0:15.

| Word | Bits |
|---|---|
| FMS QT board → layer 0 | 0:4 QT8(0), 5:9 QT8(1), 10:14 QT8(2), 15:19 QT8(3), 20:26 HT, 27:31 HTID |
| layer 0 → layer 1 | 0:7 cluster sum, 8:14 extended HTID = {board 0..3, HTID}, 16:20 low-edge QT8 sum, 21:25 high-edge QT8 sum, 26 HT threshold bit |
| FM101 → FP201 | 0:2 ST, 3:5 SB, 6:8 NT, 9:11 NB cluster bits (threshold 0,1,2), 12:15 HT bits (ST,SB,NT,NB) |
| FM102/FM103 → FP201 | 0:2 Top, 3:5 Bottom cluster bits, 6:7 HT bits (Top, Bottom) |
| FPD-East QT → FE101 | 0:16 sum of 32 ADC values |
| FE101 → FP201 | bit 0 module 1, bit 1 module 2 over threshold |
| FP201 output | 0:2 small cluster th0..2, 3:5 small multi-cluster th0..2, 6 small HT, 7:9 large cluster, 10:12 large multi-cluster, 13 large HT, 14 FPD-East, 15 unused |

The package `fms_trig_pkg` declares each of these as a packed struct.

## Layer 0: choosing which stripes make a cluster

This is the part of the design that takes the most care. A layer-0 board
receives four QT board words (two for the side boards). It does four things:

1. It finds the board with the highest HT, using six pairwise comparisons.
2. It compares every HT with its 7-bit HT threshold register.
3. It picks the cluster sum that belongs to the winning HTID.
4. It prefixes the HTID with the 2-bit board number, giving the extended HTID.

Inside a QT board, channel ID `id` sits on stripe `id[4:3]` at position
`id[2:0]` along the stripe. Most cells take stripes *s-1, s, s+1*. The
exceptions come from the geometry:

* **Stripes of the neighbouring board.** The cluster may need a stripe from
  the neighbouring board, for example A(2)+A(3)+B(0). That is fine while both
  boards feed the same layer-0 board.
* **Edge of the layer-0 region.** Here the board sums only the stripes it has,
  and passes the missing stripe up, to be added at layer 1 (see below).
* **Where the stripes change direction.** Next to board D (small cells) and
  next to the corner of board F (large cells), the stripes turn through 90°.
  There a fourth stripe is needed: D(0) or F(3). Only that one extra stripe
  (the first QT8 sum of board D, or the last QT8 sum of board F) is carried
  into step 3 and added after the board has been selected.
* **Not completable.** Some cells would need five stripes: D cells 1:5 and F
  cells 25:30. There was no time for that in the original hardware, so only
  the board's own two stripes are used: D(0)+D(1) or F(2)+F(3). The RTL does
  the same.
* **Boundary cells.** These are the outer edges, the small/large boundary and
  the North/South split. The QT boards are meant to mask them out of the HT
  search. If such an HTID still arrives, this design outputs a cluster sum
  of 0.

In the RTL, step 2 computes one candidate sum per (board, stripe). Step 3 uses
a small table function, `cell_use`, that says for each (board, HTID) whether
the cell is ignored, uses the candidate sum, or uses the candidate plus the
fourth stripe. The full table for each of the three board types is in that
function in `dsm_fms_fm001.sv`, `dsm_fms_fm005.sv` and `dsm_fms_fm006.sv`. The
testbenches check it against an independent copy in `tb/fms_ref_pkg.sv`
(`l0_terms`). That copy writes every cluster as the explicit list of QT8 sums
it adds.

One quadrant has 293 cells. 166 clusters are finished at layer 0, 28 are
finished at layer 1 and 11 cannot be completed. The remaining 88 cells lie on
a boundary.

## Layer 1: completing the boundary clusters

Some clusters sit on the edge between two layer-0 regions. For each of them
the layer-0 board forwards the one stripe its neighbour needs:

| From | Stripe forwarded | Used for |
|---|---|---|
| small-cell board | A(0) | A cells 1:5 of the quadrant on the other side (ST↔NT, SB↔NB) |
| small-cell board | D(3) | D cells 25:29 of the other half of the same side (ST↔SB, NT↔NB) |
| top/bottom large board | H(3) | I cells 1:6 of the side board of the same quadrant |
| side large board | I(0) | H cells 25:30 of the top/bottom board of the same quadrant |
| side large board | J(3) | J cells 25:30 of the other side board (Upper-Side↔Lower-Side) |

The layer-1 board forms every possible boundary sum in step 2: 8 in FM101 and
6 in FM102. In step 3 it compares all of them, and the plain cluster sums,
with three 8-bit thresholds. The extended HTID of each input then selects
which set of threshold bits counts. FM102 and FM103 also OR the Top and
Upper-Side sections into one Top quadrant, and the Bottom and Lower-Side
sections into one Bottom quadrant. FM102 and FM103 are two instances of
`dsm_fms_fm102`.

## Layer 2 and FPD-East

FP201 ORs the quadrant bits into South and North bits, and then into
whole-array bits for the small cells and for the large cells. For each
cluster threshold it also counts how many of the four quadrants fired. The
*multi-cluster* bit is set when that count is above 1. The two FPD-East bits
are ORed. The final word is registered twice: once for the trigger and once
as the copy for the scaler system.

On the FPD-East side, each QT board adds its 32 ADC values into 17 bits, with
a mask that drops dead or noisy channels. FE101 adds boards 1+2 and 3+4 into
two 18-bit module sums. It compares each sum with an 18-bit threshold made of
two registers: 12 low bits in R0 and 6 high bits in R1. A DSM register holds
at most 16 bits, which is why the threshold is split.

## Timing

Every DSM runs its four steps in four clock cycles: latch, compute, select,
output latch. It accepts a new crossing every clock. The FMS QT boards take
2 cycles and the FPD-East QT boards 1 cycle. From the ADC inputs to
`trig_out` is 2 + 4 + 4 + 4 = **14 clocks**. The FPD-East path is shorter by
one layer. The top delays the FE101 word by 5 clocks (`pipe_delay`), so that
FP201 combines the FMS and FPD-East data of the same crossing.

## Choices this RTL makes where the scheme is silent

* **QT scaling.** The QT board algorithm is specified only by what it
  produces. Here each 5-bit QT8 sum is (sum of 8 ADCs) >> `SUM_SHIFT`,
  saturated at 31. The HT is ADC >> `HT_SHIFT`, saturated at 127. Both
  shifts default to 5 and are parameters of `qt8_card`, `qt_fms_board` and
  the top.
* **HT mask.** A mask bit of 1 removes the cell from the HT search, but not
  from the stripe sum. If every channel is masked, the board sends HT 0 and
  HTID 0.
* **Ties.** The lowest channel, card and board win ties.
* **Thresholds.** Every threshold fires on *strictly greater than*.
* **Registers.** All threshold and mask registers are plain input ports.
* **Reset.** Reset is asynchronous and active-low, and clears every pipeline
  register.
* **Boundary cells.** An HTID that the cluster table never uses gives a
  cluster sum of 0.
* **Layer-1 output channels.** A layer-1 word travels on the first channel of
  its channel pair. The second channel is 0.
* **All four quadrants are identical.** Every quadrant uses the same board
  letters and channel IDs. The cluster table is laid out for one quadrant,
  and the cable map is taken to make the others look the same.

## Files

`rtl/`
* `fms_trig_pkg.sv`: widths, word structs, latencies, small helpers
* `qt8_card.sv`, `qt_fms_board.sv`: FMS QT daughter card and board
* `qt_fpe_board.sv`: FPD-East QT board
* `dsm_fms_fm001.sv`, `dsm_fms_fm005.sv`, `dsm_fms_fm006.sv`: the three layer-0 board types
* `dsm_fms_fm101.sv`, `dsm_fms_fm102.sv`: small-cell and large-cell layer 1
* `dsm_mix_fe101.sv`: FPD-East layer 1
* `dsm_l2_fp201.sv`: layer 2
* `pipe_delay.sv`: alignment delay
* `fms_trigger_top.sv`: the whole tree

`tb/`
* `fms_ref_pkg.sv`: an untimed reference model of every board
* `tb_<module>.sv`: one self-checking testbench per module
* `tb_cluster_statistics.sv`: per-cell census of the cluster logic

## Simulating

Each testbench streams a new random input every clock. It compares every
output with the reference model at the exact latency, and prints
`TB_RESULT checks=N failures=M`. It also counts how often each mechanism
happened, and fails if one never did. The mechanisms are:

* each kind of layer-0 cell;
* each of the five layer-1 completions actually changing a threshold bit;
* ties, saturation and masks;
* single-cluster and multi-cluster bits;
* the FPD-East bit.

The end-to-end test `tb_fms_trigger_top` runs the full-size tree with its
default parameters: 1600 crossings in four threshold settings, about 30 s.

`tb_cluster_statistics` probes every cell of every layer-0 board type. For
each cell it finds which stripes the RTL adds at layer 0 and whether layer 1
adds one more. It then counts the cells of each kind per quadrant:

| Region | Finished at layer 0 | Finished at layer 1 | Cannot be completed |
|---|---|---|---|
| small cells | 70 | 10 | 5 |
| large cells, top/bottom | 60 | 6 | 6 |
| large cells, side | 36 | 12 | 0 |

These are the counts the scheme was designed for.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fms_trig_pkg.sv tb/fms_ref_pkg.sv tb/tb_fms_trigger_top.sv \
    --top-module tb_fms_trigger_top -o sim
./obj_dir/sim
```

Replace `tb_fms_trigger_top` with any other `tb_*` name to run that block's
test. For synthesis, read `rtl/fms_trig_pkg.sv` first. The whole tree is about
27k word-level cells and 8.1k flip-flops before technology mapping.

## How far to trust it

Every block is checked against a reference model that was written separately.
For layer 0, that model is a row-by-row transcription of the cluster table.
It has not been compared with the original board firmware. Where the
description leaves a point open, the choice taken is listed above. The QT
board internals (scaling, saturation, register stages) are this design's own;
only their inputs and outputs are fixed by the scheme.
