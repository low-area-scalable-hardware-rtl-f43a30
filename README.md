# Scalable DMM-1 wedgelet encoder for 3D-HEVC depth maps

Depth maps are mostly flat areas separated by sharp edges. 3D-HEVC has an
intra mode, Depth Modelling Mode 1 (DMM-1), that handles such an edge by
splitting the block along a straight line (a *wedgelet*). Each side of the
line is predicted by one constant value. The encoder tries every wedgelet in
a fixed table. For each one it computes:

1. the mean of the samples on each side (the two *region averages*);
2. the SAD between the block and that two-valued prediction.

It keeps the wedgelet with the lowest SAD. It then sends the residue (the
block minus the chosen prediction) and the wedgelet index on to the rest of
the encoder.

This RTL is a hardware version of that search with no refinement step. The
reference encoder normally refines the winner by trying up to eight
neighbouring wedgelets; this design skips that step. Skipping it means the
refinement wedgelets never need storing, which shrinks the pattern table by
about 30 % for a measured coding loss of about 0.1 % BD-rate. One parameter,
`N`, sizes the whole design, and each block size (4×4, 8×8, 16×16, 32×32) is
its own instance of the same RTL.

## The idea: one sample per core, patterns flowing through rows

The block sits in an **N×N array of D-Cores**, with one depth sample stored
in each core. Within a row, the cores form a chain from west to east. Each
core adds one term to the partial result coming from its western neighbour
and passes the sum east through a register. A core holds two channels, one
per region. Its bit of the current pattern decides which channel gets its
term. The other channel passes through unchanged.

| step (`stage`) | term a core adds to its region's channel | result at the east edge |
|---|---|---|
| prediction (`00`) | its sample | per-row sum of each region |
| SAD (`10`) | \|sample − average of its region\| | per-row SAD of each region |
| residue (`01`) | none: it latches `sample − PRED` | – |

Each row is a pipeline N stages long, so N patterns are in the array at
once, one per column. Every issued step is a small **token**:

- the step code;
- the pattern index;
- the two averages for an SAD or residue step;
- a running count of region-1 samples.

The token moves one column per clock. All N cores of a column share it. Each
array column has its own read port on the pattern memory. That port is
addressed by the token one column upstream, so the pattern bits reach a
column in the same clock as the token.

Below the array:

- **Two adder trees** add the N east outputs of each region in a single
  registered stage.
- **Two dividers** turn the region sums of a prediction step into averages
  one clock later.
- The **comparator** adds the two region SADs of an SAD step and keeps the
  best pattern.

With N patterns in the columns, one in the adder trees and one in the
dividers, N+2 patterns are in flight.

```
 rows in          pattern memory (one read port per column)
 N bytes/clk        |bits col0 |bits col1      |bits col N-1
    |               v           v               v
    +--> [core r,0]-->[core r,1]--> ... -->[core r,N-1]--> east0[r], east1[r]
         token ---->  token ---->  ...  --> token          |   (N rows)
                                                           v
                                   adder tree 0 / adder tree 1  (1 clk)
                                      |                      |
                prediction step: dividers (1 clk)    SAD step: comparator
                                      |                      |
                             register bank (FIFO)      best {SAD, idx, avg0, avg1}
                                      |                      |
                             feeds the SAD step      feeds the residue step
```

## Interlacing the prediction and SAD steps

The SAD step of a pattern needs that pattern's averages, and they are ready
only after its prediction step has gone through the array, an adder tree and
a divider (N+3 clocks). The controller avoids waiting by **interlacing** the
two steps:

- On even clocks it issues the prediction step of the next pattern.
- On odd clocks it issues the SAD step of the oldest pattern whose averages
  are ready.

The averages wait in the **register bank**, a 4-entry FIFO of {index, avg0,
avg1}. It is filled by the dividers and popped when the SAD step is issued.
Once the pipeline is full, the array gets one new step every clock: half
prediction, half SAD.

After the last SAD result reaches the comparator, the controller issues one
**residue step** carrying the winner's index and averages. Each core picks
its PRED value from those two averages according to its bit of the winning
pattern. Column c of residues leaves on `res_data` when the token reaches
column c. The N residue columns therefore take N clocks.

Cycle budget for one block, from the first row accepted to `done`, counting
both ends:

```
 N          fill, one row per clock
 N + 5      first prediction reaches the register bank, first SAD issued
 2*(P-1)    one pattern every two clocks
 N + 3      last SAD through the array, adder tree and comparator
 N + 1      residue token through the columns
 -----
 4N + 2P + 8   (P = number of patterns)
```

| configuration | N | stored pattern | patterns P | pattern memory | clocks / block | published clocks / block | clock for 1080p at 30 fps |
|---|---|---|---|---|---|---|---|
| 4×4 | 4 | 4×4 | 58 | 928 bits | 140 | 132 | 544 MHz |
| 8×8 | 8 | 8×8 | 314 | 20,096 bits | 668 | 648 | 649 MHz |
| 16×16 | 16 | 16×16 | 384 | 98,304 bits | 840 | 816 | 204 MHz |
| 32×32 (default) | 32 | 16×16 | 384 | 98,304 bits | 904 | 876 | 55 MHz |

The last column is (1920·1080/N²) blocks × clocks per block × 30. The
published implementation reached 514, 630, 198 and 53 MHz in a 65 nm
process, with a few clocks less per block. At those frequencies this RTL
would give about 28.4 to 29.2 frames/s instead of 30. Its pipeline is 8 to 28
clocks longer per block than the published cycle counts. The published
design gives only the N fill clocks and N residue clocks of its schedule, not
its internal latencies.

## Pattern memory and the wedgelet table

The pattern memory holds P patterns of PR×PR bits. It is split into PR
column banks, each with its own read port, so every array column can read a
different pattern in the same clock.

32×32 blocks use the 16×16 table: each stored bit covers a 2×2 square of
samples (`PR = 16`, `S = N/PR = 2`). This keeps the 32×32 memory the same
size as the 16×16 one.

**The wedgelet table itself is not part of this RTL.** Its contents are fixed
by the 3D-HEVC wedgelet generation rules. Load it after reset through
`pat_wr_en/pat_wr_addr/pat_wr_data`: one pattern per clock, with bit
`r*PR + c` for row r, column c, and 1 meaning region 1. Any table of P
two-region patterns works. The testbenches build their own from straight
lines.

## Averages without a divider array

The division-value memory is a read-only table of reciprocals, filled at
elaboration:

```
recip[k] = ceil(2^SH / k),   k = 1 .. N*N,   SH = (SW + 1) + ceil(log2(N*N + 1))
avg      = ((sum + k/2) * recip[k]) >> SH      = round-half-up(sum / k)
```

With this SH the product is exact for every possible region sum. The
testbench checks this for all k up to 1024, including the extreme sums. The
region sizes come from counting the pattern bits as the token passes the
columns, with k0 = N² − k1, so nothing per pattern has to be stored. An
empty region gives average 0. The comparator keeps the first pattern among
equal SADs.

## Interface (`dmm1_encoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of control and pipeline valid bits |
| `pat_wr_en`, `pat_wr_addr`, `pat_wr_data` | in | 1, log2 P, PR² | pattern table load |
| `row_valid` / `row_ready` | in / out | 1 | a row of N samples is taken when both are high |
| `row_pixels` | in | N × 8 | the row's samples, column 0 first |
| `busy` | out | 1 | a block is being processed; no rows are taken |
| `res_valid`, `res_col` | out | 1, log2 N | residue column `res_col` is on `res_data` |
| `res_data` | out | N × 9 signed | residues of that column, indexed by row |
| `done` | out | 1 | with the last residue column |
| `best_idx`, `best_sad`, `best_avg0`, `best_avg1` | out | | the chosen wedgelet; valid from the first residue column until the next block's SAD results arrive |

Parameters: `N` (block size, default 32), `PR` (stored pattern size, default
`min(N,16)`), `NUM_PAT` (default 384). To get the other configurations, set
`N=16, NUM_PAT=384`, `N=8, NUM_PAT=314` or `N=4, NUM_PAT=58`.

A block is accepted only in the load state. The next block can start one
clock after `done`.

## Modules

| module | role |
|---|---|
| `dmm1_pkg` | step codes (`stage_e`), widths |
| `dmm1_dcore` | one D-Core |
| `dmm1_core_array` | N×N D-Cores with the row chains and row loading |
| `dmm1_pattern_mem` | banked pattern memory, upsampling for PR < N |
| `dmm1_divider_mem` | reciprocal table, two read ports |
| `dmm1_divider` | round(sum / count), one clock |
| `dmm1_adder_tree` | balanced tree over N row results, one clock |
| `dmm1_comparator` | best SAD, index and averages |
| `dmm1_reg_bank` | 4-entry FIFO between the prediction and SAD steps |
| `dmm1_control` | fill / interlaced issue / residue sequencer |
| `dmm1_encoder` | top: token pipeline and wiring |

## How far to trust it, and where it departs

These parts follow the published architecture:

- the D-Core steps and their STAGE coding;
- the N×N array with pipelined row chains;
- the two memories, two adder trees, two dividers, comparator and register
  bank;
- N bytes of input per clock;
- interlaced prediction and SAD steps;
- the N-clock fill and the N-clock residue output.

These are this design's own choices, because the published description does
not give them:

- the token pipeline and the per-column memory ports;
- reciprocal dividers and round-half-up averaging;
- splitting SADs into two region channels that the comparator adds;
- the FIFO register bank;
- the even/odd issue slots and the handshakes;
- all widths, reset behaviour and latencies. As a result, the clock count
  per block is 8 to 28 clocks above the published figures.

The best pattern's averages reach the residue step straight from the
comparator. They are not written back into the register bank first.

Neither the enable test that decides whether DMM-1 runs at all (first RD-list
mode not planar, block variance above a threshold) nor the RD-list is
included. Both belong to the surrounding encoder.

Every module has a self-checking testbench in `tb/` that compares against a
model written independently of the RTL. Four end-to-end testbenches run the
whole encoder:

- `tb_dmm1_encoder` (4×4, 12 blocks);
- `tb_dmm1_encoder_8x8`;
- `tb_dmm1_encoder_16x16`;
- `tb_dmm1_encoder_full` (32×32 at the default parameters).

Each one encodes sharp-edged depth-like blocks, random blocks and a flat
block (where all patterns tie). It checks the chosen pattern, its SAD and
averages, every residue and the exact clock count. It also counts each
mechanism and fails if one never happens: row fill, prediction and SAD steps,
interlacing, register-bank traffic, comparator updates, residue output, and
pattern upsampling at 32×32. All of them pass. The RTL has not been run
against the standard's own wedgelet table or against reference-encoder
output.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. It has a watchdog. From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dmm1_pkg.sv \
    tb/tb_dmm1_encoder_full.sv --top-module tb_dmm1_encoder_full -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Verilator finds the other
modules through `-Irtl`, one module per file. The 32×32 build takes about a
minute and the simulation under a second. Nothing relies on X values, and
every register that is read is reset or written first.
