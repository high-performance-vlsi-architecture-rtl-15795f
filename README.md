# Histogram peak-climbing clustering processor

This is synthesizable SystemVerilog for a processor that clusters feature vectors
without supervision. It is built for colour-texture segmentation of video. Each
frame supplies J feature vectors of N dimensions, one vector per image window. The
processor groups these vectors into clusters, writes a cluster label for every
window, and reports how many clusters it found. The default size is that of a
DVD-quality frame: J = 24882 vectors of N = 22 dimensions.

The algorithm is histogram peak climbing:

1. **Quantise.** The range of each dimension, max minus min over the frame, is cut
   into Q equal cells, with Q between 3 and 8. The cells of different dimensions
   have different lengths, so every vector falls into a hyper-box (a *bin*) named
   by N three-bit cell indexes.
2. **Histogram.** The density of a bin is the number of vectors in it.
3. **Link.** Every bin is linked to the neighbouring bin with the largest density,
   when that density is larger than its own. Neighbours differ by at most one
   cell in every dimension. A bin with no denser neighbour is a **peak**.
4. **Cluster.** A peak and every bin whose chain of links ends at it form one
   cluster. The label of a window is the cluster of its vector.

The architecture follows the one published as *High Performance VLSI Architecture
for Data Clustering Targeted at Computer Vision*. The stages run one after another
as in a global systolic chain, and inside each stage many processing elements
(PEs) work in parallel. The per-dimension stages have N PEs, one per dimension.
The histogram stages have J PEs, one per vector. Where that source leaves a detail
open, this design makes its own choice. Section 8 lists those choices.

## 1. Frame flow and timing

`cluster_ctrl` runs the following phases for each `start`:

| phase  | unit                        | what happens                                                   | cycles |
|--------|-----------------------------|----------------------------------------------------------------|--------|
| MIN    | `minmax_pe` x N             | frame read once; every dimension keeps its minimum             | J      |
| MAX    | `minmax_pe` x N             | frame read again; every dimension keeps its maximum            | J      |
| CS     | `cs_pe` x N                 | cell size per dimension                                        | 2      |
| INDEX  | `index_pe` x N, `vector_bank` | frame read a third time; 3-bit cell index per dimension      | J + 3  |
| ALLOC  | `bin_allocator` (J PEs)     | bins and densities                                             | J + 2  |
| LINK   | `link_unit` (J PEs)         | parent of every bin                                            | J + 2  |
| ASSIGN | `cluster_assign` (J PEs)    | peak of every vector                                           | J + 2  |
| GROUP  | `cluster_group` (J PEs)     | labels 0..K-1 for the peaks, cluster count K                   | J + 2  |
| MAP    | `map_back`                  | label of vector j written to label memory address j            | J + 2  |

Here J stands for the number of vectors in the frame, `num_vec`. It can be any
number from 1 up to the built capacity J. From the cycle that samples `start` to
`done`, a frame takes **8J + 17 cycles**. That is 199 073 cycles for a full frame of
24882 vectors and 7 705 cycles for a frame of 961 vectors. Writing the frame into
the input memory takes another J cycles. The testbenches check this cycle count
exactly.

The min/max PE has only one compare cell. A 2-input multiplexer (`refs`) selects
its reference: the MIN register in the first pass and the MAX register in the
second. This is why the frame is read twice before the cell sizes are known.

## 2. Cell size and cell index arithmetic

Features are 16-bit two's complement values covering [-1, +1).

`cs_pe` computes

    CS = floor((MAX - MIN) * Qinv / 2^17) + 1,    Qinv = ceil(2^17 / Q)

A six-entry table holds Qinv, so the division by Q becomes one multiplication.
Both the rounding up of Qinv and the final +1 (one LSB) make CS slightly larger
than the exact range/Q. As a result, (f - MIN) / CS is always below Q, even for
f = MAX, and the cell index always fits in three bits for every Q from 3 to 8.

`index_pe` computes `(F - MIN) / CS` with a three-stage parallel restoring divider.
The stages try CS*4, CS*2 and CS in turn, and each yields one quotient bit. The
stored index is zero based (0 .. Q-1). A dividend of 8*CS or more cannot occur for
data inside the measured range; it would saturate at 7.

## 3. Bin allocation: broadcast, compare, compress

This stage holds most of the hardware. PE j holds the index vector of vector j
(N x 3 = 66 bits) and a BINNED flag. A counter steps t from 0 to J-1 and broadcasts
vector t to all PEs. Every PE compares its own vector with the broadcast one:

    UPDATE_j = NOR(BINNED_j, not EQU_j)      (equal, and not yet in a bin)

The **ones compressor** counts the J UPDATE bits in the same cycle. At the clock
edge every PE with UPDATE set does three things:

- it sets BINNED;
- it stores t as its bin;
- it stores the count as the density of its bin.

Two cases follow:

- **t is the first vector of its bin.** All of the bin's vectors update together,
  t included. The count is the bin's density.
- **t already has a bin.** No PE updates, and the count is zero.

A bin is therefore named by its lowest-numbered vector, its *head*. Each bin is
counted exactly once, and `num_bins` counts the non-zero counts.

`ones_compressor` is a counter tree. A layer of full adders reduces each group of
three input bits to a 2-bit sum. Each following layer adds the partial sums in
pairs, one bit wider, and halves their number. For J = 24882 that is 8294 full
adders, then 14 adder layers, giving a 16-bit count. An odd partial sum left over
in a layer passes on to the next layer unchanged. The tree is combinational, as is
the whole compare-and-count path. This path is the longest in the design: it limits
the clock rate, but no pipelining is added here.

## 4. Links and the neighbour detector

`link_unit` sweeps the vectors again. Each cycle it broadcasts three things for
vector t:

- its index vector;
- the density of its bin;
- whether t heads a bin.

Every PE starts with its own bin as parent and that bin's density as *best*. It
takes the broadcast bin as its new parent when all three of these hold:

- the broadcast vector heads a bin;
- it is a neighbour;
- its density is strictly larger than *best*.

When several neighbours share the largest density, the lowest-numbered one wins.

The neighbour detector tests `|a - b| <= 1` on the three-bit index of each
dimension and ANDs the N results. A cell is its own neighbour. In two dimensions
this is the familiar 8-neighbourhood.

Because the PEs of non-head vectors run the same test, every vector ends up with
a parent:

- members of a peak bin point at their head;
- members of any other bin point at the same denser neighbour as their head.

A vector is a peak when its parent is itself, which only a peak's head can be.
Densities rise strictly along every link, so the links never form a loop.

## 5. Following links to the peaks

`cluster_assign` loads every PE's pointer with its parent. It then makes one
broadcast sweep: in cycle t, every PE that points at t takes over t's pointer.

One sweep is enough. Before cycle t, no pointer rests on a non-peak vector
numbered below t. The pointer broadcast for t is therefore either a peak or a
vector still to come, and this holds again after cycle t. After the last cycle,
every pointer rests on a peak. The testbench checks this on random link forests
whose chains run both up and down the vector numbers.

## 6. Labels, cluster count, output

`cluster_group` does two things at once:

- Its ones compressor counts the peak flags. That count is the number of clusters,
  registered when the stage starts.
- One sweep hands the peaks the labels 0, 1, 2, ... in vector order. Every vector
  whose peak is t copies t's label in the same cycle.

`map_back` then writes the label of vector j to address j of the label memory,
one per cycle. Vector j comes from window j of the frame in raster order, so the
label memory is the J_V x J_H cluster map of the frame.

## 7. Using `cluster_top`

| port                         | dir | meaning                                                    |
|------------------------------|-----|------------------------------------------------------------|
| `clk`, `rst_n`               | in  | clock; asynchronous active-low reset                       |
| `fr_we`, `fr_waddr`, `fr_wdata[N][16]` | in | write vector `fr_waddr` of the input frame       |
| `q`                          | in  | quantisation levels, 3..8 (values outside are clamped)    |
| `num_vec`                    | in  | vectors in the frame, 1..J; hold stable while `busy`       |
| `start`                      | in  | one-cycle pulse while idle: cluster the stored frame       |
| `busy`, `done`, `phase`      | out | running; one-cycle pulse at the end; current phase        |
| `num_clusters`, `num_bins`   | out | clusters found; non-empty histogram bins                   |
| `lbl_raddr` / `lbl_rdata`    | in/out | read the label of a window, one cycle latency           |

The sequence is:

1. Write vectors 0 .. num_vec-1 and set `num_vec`.
2. Pulse `start`.
3. Wait for `done`.
4. Read the labels.

A new frame can be clustered with another Q without rewriting the frame memory.

Parameters: `N` (22), `J` (24882), `W` (16). The package `cluster_pkg` holds the
defaults, the index width (3) and the width functions. Every J-wide PE array is a
loop over the J PEs inside its stage module. At full size the design holds about
4 M flip-flops (about 160 bits per vector) in the PE arrays, plus the frame memory (24882 x 352 bits) and
the label memory (24882 x 15 bits).

## 8. What follows the published design and what is this design's own

These parts follow the published design:

- the phase order;
- the one-compare-cell min/max PE with its REFS multiplexer;
- the cell-size PE: subtract, multiply by 1/Q from a table, add 1;
- the 3-bit restoring divider;
- the allocation PE: comparator, NOR with BINNED, UPDATE into a J-input ones
  compressor;
- the structure of the compressor tree: full-adder layer, halving adder layers,
  16-bit result at J = 24882;
- the neighbour detector;
- the sizes N = 22, J = 24882 and Q = 3..8.

The source describes the link and assignment stages only as "similar to the
allocation stage". It names the controller, grouping, cluster count and map-back
stages without detailing them. For all of these, the PE structure, sweeps and
handshakes here are this design's own.

This design's own choices:

- **Feature width.** 16-bit features.
- **Qinv table.** Qinv is held with 17 fraction bits and rounded up.
- **Index base.** The index is zero based; the source numbers cells from 1.
- **Bin names.** A bin is named by its first vector.
- **Link rule.** A link needs a strictly larger density. Ties go to the
  lowest-numbered bin. Equal neighbouring bins both stay peaks. The source speaks
  of linking to the "closest" densest cell; the neighbour detector gives only a
  yes/no test, so closeness inside the neighbourhood is not used.
- **Broadcast multiplexer.** One J:1 multiplexer is shared by all PEs. The source
  draws a J-1:1 multiplexer in each PE; the comparisons made are the same.
- **Assignment.** Links are followed to the peaks by a single broadcast sweep.
- **Labels.** Peaks get consecutive labels in vector order.
- **Cluster count timing.** The number of clusters is taken at the start of the
  grouping sweep, not in a separate parallel stage.
- **Memories.** The input and label memories are single-port-write,
  registered-read arrays inside the top.
- **Timing and handshakes.** All timing, start/done handshakes and reset
  behaviour are this design's own.
- **Frame size.** J is the largest frame the build holds. The `num_vec` input sets
  the size of each frame, such as 961 vectors for a 128 x 128 image. Only the
  first `num_vec` PEs of each array take part, and every sweep is that long.

## 9. Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed in the testbench, ends with a `TB_RESULT checks=.. failures=..`
line, and has a watchdog. `tb/cluster_model_pkg.sv` is a reference model of the
whole algorithm. It works vector by vector, with no sweeps, and the end-to-end
testbenches use it.

- `tb_cluster_top` runs J = 96 vectors of N = 22 dimensions through three frames
  with Q = 3, 5 and 8. It compares every label, the cluster and bin counts, and
  the 8J + 17 frame time. A fourth run clusters only the first 61 vectors with
  Q = 3, after the full frames. It also checks that shared bins, links, chains of
  two links, several clusters, both Q extremes and the partial frame each occurred.
- `tb_cluster_full` runs one full-size frame with all parameters at their
  defaults: J = 24882, N = 22, Q = 4. It checks all 24882 labels. It then clusters
  a 961-vector frame (`num_vec` = 961, Q = 6) in the same build and checks it the
  same way. Building and running it takes about two minutes with Verilator.
- `tb_ones_compressor` checks the compressor at the full 24882 inputs.

To run a testbench with Verilator:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/cluster_pkg.sv tb/cluster_model_pkg.sv tb/tb_cluster_top.sv \
        --top-module tb_cluster_top
    obj_dir/Vtb_cluster_top

Replace `tb_cluster_top` with any other testbench name. Testbenches of single
blocks do not need `tb/cluster_model_pkg.sv`.

Not verified: timing closure and area. The combinational compare-and-compressor
path of the allocation stage spans all J PEs. A real implementation at full size
would likely pipeline it.
