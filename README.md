# Calorimeter trigger: cluster finding, isolation, jets and sorting

This is synthesizable SystemVerilog for the regional part of a calorimeter trigger. At each
25 ns bunch crossing it takes a grid of calorimeter towers. Each tower has an ECAL and an HCAL
transverse energy and an ECAL fine-grain bit. The design builds a 2x2 tower cluster at every
tower position. It removes the double counting between overlapping clusters and marks the local
maxima. Each cluster gets an electron/photon bit and a half-tower position. The design then
computes electron/tau isolation and jet sums on an 8x8 lattice of clusters. Finally it returns
the four most energetic electron, tau and jet candidates.

The main configuration is an 8x8 cluster grid. It needs 9x9 towers, which arrive over 6
transceiver dual tiles (12 serial links, 15 towers per tile). All grid sizes are parameters.

```
 12 links ──► tower_input_buffer x6 ──► cluster_grid (7 stages) ──┬─► cluster_isolation x64 ─┐
 (16-bit words,  8 words/link/frame)   particle_cluster_finder    ├─► jet_finder x64 ────────┤
                                        cluster_overlap_filter     │                          ▼
                                        cluster_weighting          │            candidate select ─► bitonic_sorter_n4 x3
                                        pattern zeroing            └─► clusters (port)              (electrons, taus, jets)
```

## Tower input and the frame format

Each dual tile delivers two streams of 16-bit words, 8 words per link per bunch crossing.
`tower_input_buffer` collects them in two banks of 8 registers. When the eighth word arrives,
it copies all 16 words into 16 output registers. Those registers hold the frame for a whole
crossing. The frame layout is:

| frame word | link, word | contents |
|---|---|---|
| 0..7   | link 0, words 0..7 | towers 0..7: ECAL Et in bits 7:0, HCAL Et in bits 15:8 |
| 8..14  | link 1, words 0..6 | towers 8..14, same layout |
| 15     | link 1, word 7     | fine-grain bits of towers 0..14 in bits 14:0 |

This packs 15 x 17 bits into 256. Towers are numbered row-major over the (R+1) x (C+1) tower
grid. Tower t goes to slot t mod 15 of tile t / 15. `lane_sof` marks word 0 of a frame, and
`lane_valid` qualifies a word. A frame that is started again by a new `lane_sof` is dropped.
The original system uses three clocks: 640 MHz for the transceiver, 320 MHz for the banks and
40 MHz for the frame. Here one clock with a word strobe replaces them. The transceivers
themselves are not part of this RTL, so `lane_data` already holds the parallel words.

## The cluster pipeline (`cluster_grid`)

The cluster at (r, c) uses towers (r, c), (r, c+1), (r+1, c) and (r+1, c+1). They are numbered
0 top-left, 1 top-right, 2 bottom-left and 3 bottom-right. Neighbouring clusters therefore
share one tower (diagonal neighbours) or two (edge neighbours). Every cluster has its own
logic, which is full hardware replication. The pipeline has seven stages, so at 200 MHz a grid
leaves 35 ns after it enters:

| stage | work |
|---|---|
| 1 | tower filter: a tower whose E+H is below `tower_thr` is zeroed (both ECAL and HCAL) |
| 2 | cluster ECAL sum, cluster HCAL sum, OR of the 4 fine-grain bits; overlap filter: cluster sums; weighting: H, V, S |
| 3 | EPIM (1 of 2); overlap filter: 8 comparisons → pruning mask; weighting: bins |
| 4 | EPIM (2 of 2); overlap filter: pruned re-sum |
| 5 | overlap filter: cluster threshold, central bit |
| 6 | pattern zeroing: a cluster whose pattern check failed is cleared |
| 7 | output register |

Each cluster leaves as an 18-bit `cluster_t` record:
`{central, egamma, fg, hpos[1:0], vpos[1:0], et[10:0]}`. Towers are 9 bits of E+H, so the
four towers of a cluster form a 36-bit bundle and the cluster sum fits in 11 bits.

### Overlap filter: one energy per particle

Because clusters overlap, one energy deposit would be counted by up to four clusters. The
overlap filter (`cluster_overlap_filter`) settles this locally. It compares each cluster's ET
with the ETs of its eight neighbours. When a neighbour is more energetic, the towers the two
share are set in a 4-bit pruning mask:

| neighbour | NW | N | NE | W | E | SW | S | SE |
|---|---|---|---|---|---|---|---|---|
| shared towers (bit i = tower i) | 0001 | 0011 | 0010 | 0101 | 1010 | 0100 | 1100 | 1000 |

The towers left unmasked are summed again, and the result must reach `cluster_thr` or it
becomes 0. The cluster is a local maximum (`central = 1`) when no tower was pruned, which is
the NOR of the mask. The neighbours' sums are the same stage-1 sums that each neighbour's own
filter computes. They are shared over the grid instead of being recomputed nine times per
cluster. Clusters on the grid edge see zero-ET neighbours outside it.

Equal energies need a rule. If two equal neighbours both kept the shared towers, their energy
would be counted twice. If both pruned, the towers would be lost. This design breaks ties by
direction. A neighbour to the W, NW, N or NE prunes only when it is strictly greater. A
neighbour to the E, SW, S or SE also prunes when it is equal. Of any equal pair, exactly one
cluster gives up the shared towers, and that is the one further up and to the left.

### Position weighting (`cluster_weighting`)

With towers E0..E3 as above, the unit forms H = E1 + E3 − E0 − E2 (right minus left),
V = E2 + E3 − E0 − E1 (bottom minus top) and S = E0 + E1 + E2 + E3. H/S and V/S give the
position to half a tower. No division is needed, because the sign and a comparison of 2|H|
with S pick one of four bins:

| hpos | H/S |
|---|---|
| 0 | [−1, −0.5) |
| 1 | [−0.5, 0) |
| 2 | [0, 0.5] |
| 3 | (0.5, 1] |

So hpos counts from left to right and vpos from top to bottom. Together they select one of 16
points in the cluster. A cluster with S = 0 gets bin 2.

### Electron/photon bit (`epim`)

A cluster is electron/photon-like when it has ECAL energy and its HCAL sum is at most its ECAL
sum shifted right by `epim_shift` (3 means H ≤ E/8). This criterion is an assumption. Only the
unit's place in the pipeline and its two-cycle latency come from the original design.

## Isolation and jets on the 8x8 cluster lattice

For every cluster (r, c), the top module forms an 8x8 lattice of cluster ETs. The lattice spans
rows r−3..r+4 and columns c−3..c+4, so the cluster itself sits at lattice position (3, 3).
Clusters outside the grid read as 0.

**Isolation** (`cluster_isolation`, 3 cycles). Each of the 63 neighbours passes two threshold
units (ET > `e_thr`, ET > `tau_thr`). Two adders count them. The cluster is isolated when

    count < A + B·ET + C·ET²

where ET is the cluster's own ET. Electrons and taus have separate A, B and C. The
alternative, a lookup table on a compressed ET, is not built.

**Jets** (`jet_finder`, 6 cycles). Four 16-input pipelined adder trees sum the lattice
quadrants. Their outputs are combined into the half sums U (rows 0–3), D (rows 4–7),
L (columns 0–3), R (columns 4–7) and the total ET. A jet is accepted when the lattice centre
is a local maximum and both |R − L| and |U − D| are below ET >> 3 (12.5 %). The output is then
ET, otherwise 0. `adder_tree` is a generic binary tree with a register after every level (or
none). The isolation counters use it as a combinational population count.

## Candidate selection and the n-to-4 bitonic sorter

An electron candidate is a central, e/gamma, electron-isolated cluster. A tau candidate is a
central, tau-isolated cluster. Their sort key is the cluster ET. Every cluster's jet sum is a
jet key. Non-candidates get key 0. These selection rules are this design's choice. Each kind
goes to its own `bitonic_sorter_n4`. The tag is the cluster index r·C + c.

The sorter finds the 4 largest of N keys (N a power of two, at least 8). It is built from
bitonic merge units trimmed to what the top four need:

| unit | does | stages | comparators each |
|---|---|---|---|
| BM[2] (+/−) | sorts pairs, alternately ascending/descending | 1 | 1 |
| BM[4] (+/−) | sorts a bitonic 4 (a + pair and a − pair) | 2 | 4 |
| BM[8]_4 (+/−) | keeps the larger half of a bitonic 8 (4 max-selects), then sorts it with a BM[4] | 3 | 8 |
| MAX | element-wise max of the last + and − group of 4 | 1 | 4 |

BM[8]_4 is repeated log2(N) − 3 times, and each pass halves the candidates. In total there are
3·log2(N) − 5 stages and 3.5·N − 12 comparators: 7/44 for 16-to-4, 13/212 for 64-to-4. The MAX
stage leaves the four largest in bitonic order (rising then falling, or the reverse). They are
not fully sorted. A consumer that needs rank order must add a 2-stage BM[4]. `STAGE_REG` picks
which comparator stages get a register, which trades latency against clock rate. Equal keys may
come out with either tag.

## Configuration (`calo_cfg_t`)

All thresholds are run-time inputs. They should be changed only while no event is in flight.

| field | meaning |
|---|---|
| `tower_thr` | tower kept when E+H ≥ tower_thr |
| `cluster_thr` | cluster kept when its pruned ET ≥ cluster_thr |
| `epim_shift` | e/gamma when HCAL ≤ ECAL >> epim_shift |
| `e_thr`, `tau_thr` | neighbour counted for isolation when ET > threshold |
| `e_a/b/c`, `tau_a/b/c` | isolation limit A + B·ET + C·ET² |

## Timing of `calo_trigger_top`

The following counts are clock cycles after the edge that accepts the last word of a frame.
The input buffer's `frame_valid` follows after 1. `clusters`/`clusters_valid` follow after 8.
`iso_e`, `iso_tau`, `jet_et` and `obj_valid` follow after 14. The top-4 outputs and
`sort_valid` follow after 15 + (3·log2(N) − 5), which is 28 for the 8x8 grid. `pattern_pass` is
sampled with word 0 of each frame. A new frame can follow every 8 cycles, and every stage after
the buffers takes a new grid each cycle.

For a full system these counts are only the logic. The original system estimates 15 cycles
(75 ns) for the input transceivers and buffers and 10 cycles (50 ns) for the output links.
Together with the 7-cycle cluster pipeline that makes 32 cycles (160 ns) at 200 MHz. The input
buffer here adds a single cycle, because the transceivers are outside this RTL.

## Sizes

| parameter | default | note |
|---|---|---|
| `GRID_ROWS` x `GRID_COLS` | 8 x 8 | 8 x 16 needs 9x17 = 153 towers, 11 tiles (22 links); 16 x 16 needs 289 towers, 20 tiles (40 links) |
| tiles | ceil((R+1)(C+1)/15) | 6 for 8x8 |
| `bitonic_sorter_n4` `N`, `KEY_W` | 16, 10 | the top uses N = 64 with 11-bit (electron, tau) and 17-bit (jet) keys |
| `adder_tree` `N` | 64 | |
| lattice | 8 x 8 clusters | fixed in `calo_pkg` (`LATTICE`) |

## Where this RTL departs from or fills in the original design

- One clock with valid strobes replaces the 640/320/40/200 MHz clocks.
- The tower word split (ECAL 7:0, HCAL 15:8), the fine-grain word 15 and the tower-to-tile
  mapping are assumptions.
- The tower E+H is kept at 9 bits. One block diagram labels the per-tower adder output
  "8 bit". The 36-bit four-tower bus and the 11-bit cluster ET elsewhere in the design need
  9 bits.
- The overlap-filter tie rule, the threshold comparison senses (≥ for tower and cluster
  thresholds, > for isolation), and the bin boundaries of the weighting are this design's
  choices.
- The EPIM criterion is an assumption.
- The cluster record is 18 bits: central, e/gamma, FG, 4 position bits, 11-bit ET. The
  original lists these same fields but quotes a 17-bit record.
- Pattern zeroing is placed in stage 6, not stage 5, so that every unit can keep its
  stand-alone latency.
- The lattice placement (centre at (3, 3)), the quadrant split of the jet halves and the
  candidate selection rules are assumptions.

## Not included

- The serial transceivers and their link protocol. They are vendor hard macros.
- The pattern check, whose accepted patterns are not specified. Its pass bits enter on
  `pattern_pass`.
- The output links and buffers.
- The missing-ET and total-ET sums.

## Simulation

Every block has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. `tb/calo_ref_pkg.sv` holds a reference model of the cluster
pipeline. It is written from the algorithm rather than from the RTL: real-valued positions,
explicit neighbour loops. The cluster-grid and top testbenches use it.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/calo_pkg.sv tb/calo_ref_pkg.sv \
          tb/cluster_grid_tb.sv --top-module cluster_grid_tb && obj_dir/Vcluster_grid_tb
```

Replace the testbench name for the other blocks. `cluster_grid_sizes_tb` runs the cluster
pipeline at the larger grid sizes, 8x16 and 16x16. It shares its checker, `cluster_grid_check`,
with the 8x8 test. `calo_trigger_top_tb` runs the whole design
at its default size: 24 events through the link framing, including an aborted frame and an idle
gap. It checks every cluster record, isolation bit, jet sum and top-4 list and every latency. It
also counts each mechanism and fails if one never occurred: tower zeroing, pruning, local
maxima, cluster threshold, e/gamma, fine grain, pattern zeroing, isolation both ways, jets
accepted and rejected, and a sorter that had to drop candidates. Its C++ build takes several
minutes. The simulation itself takes well under a second.
