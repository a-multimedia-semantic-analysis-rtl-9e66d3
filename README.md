# SASoC — a semantic-analysis SoC with an image engine and a machine-learning engine

Recognising what is in a video frame takes two very different kinds of work.
First, pixel-level feature extraction: filters, Haar-like rectangle features,
noise reduction, each a window operation repeated at every pixel position.
Second, vector-level machine learning: inner products, distances, exponentials
and rankings over feature vectors of a few hundred dimensions (AdaBoost, SVM,
GMM, k-nearest-neighbour). This design puts one engine for each on a chip and
streams the features from the first to the second:

```
            clk (root) ──► system_monitor ──► clock_unit ──┬──► clk_isps
                              ▲   ▲                        └──► clk_fsps
                      stalls  │   │ bubbles
   ┌──────────── ISPS (clk_isps) ────────────┐    ┌──────────── FSPS (clk_fsps) ─────────────┐
   │ slice_memory ─128b─► risp ─► feature ───┼─►async_fifo─► fsps_controller ─► IVM         │
   │      ▲          (LPU, OPU,   stream     │    │            │                 │            │
   │ isps_sequencer   stream network,        │    │            ▼                 ▼            │
   │                  dual output memory)    │    │   vpu: low (256 lanes) ► mid (16) ► high │
   └─────────────────────────────────────────┘    │            │ results            │ terms   │
                                                  │            ▼                    ▼         │
                                                  │           OVM            knn_processor    │
                                                  └───────────────────────────────────────────┘
```

The reimplementation follows the architecture of the SASoC chip as it was
published: its block structure, its main sizes (16x16 windows in one cycle,
16-bank slice memory with 128-bit stripes, four RISP modes, a three-level VPU
of 256 dimensions, a 128-PE K-NN processor, three clock domains with
frequency scaling and gating). The published description gives little about
the inside of each block, so most of the internals here (encodings, pipeline
timing, memory depths, the control rules) are this design's own; each file's
header says which is which. "Departures and gaps" below lists what differs.

Everything is SystemVerilog-2017 in `rtl/`, one module per file, with shared
types in `rtl/sasoc_pkg.sv`. Self-checking testbenches are in `tb/`.

## Image-Stream Processing System (ISPS)

### Slice memory: a stripe at any row, every cycle

`slice_memory` stores one frame (default 160x120, 8-bit pixels) in 16 banks.
Pixel (x, y) lives in bank `y mod 16` at word `(y / 16) * W + x`. Any 16
vertically adjacent pixels are therefore in 16 different banks, so one column
segment of 16 pixels — a 128-bit *stripe* — starting at any row can be read in
one cycle: each bank is addressed for the one row it holds, and the 16 bank
outputs are rotated so that lane i carries row `ry + i`. Reads are registered
(one cycle), like an SRAM macro. Rows below the frame read as zero.

### RISP: two window processors and the routing between them

Each processing unit sits behind a `local_pixel_memory`, a 16x16 window built
as a shift register of columns: every stripe that enters moves the window one
pixel to the right, so a new complete window is available every cycle.

* `lpu` (Linear Processing Unit) computes `sum(win[r][c] * coef[r][c])` over
  all 256 pixels with a programmable signed 8-bit mask, then optionally takes
  the absolute value, shifts right and saturates to 8 bits. Box filters,
  gradients and Haar-like rectangle features are all such masks.
* `opu` (Order Processing Unit) returns the value of a chosen rank among the
  pixels of the top-left KxK part of the window (K = 1..16): minimum, maximum,
  median or any rank. It finds the answer one bit at a time, most significant
  first: it counts the pixels that agree with the bits found so far and have 0
  in the current bit; if the wanted rank is below that count the bit is 0,
  otherwise it is 1 and the count is subtracted from the rank. This takes 8
  rounds of 256 comparisons instead of sorting.

`stream_network` connects the units to the memories according to the mode:

| mode | stage 1 (reads slice memory) | stage 2 (reads output memory 1) | final result |
|------|------------------------------|----------------------------------|--------------|
| A    | LPU                          | —                                | LPU → OM0    |
| B    | OPU                          | —                                | OPU → OM0    |
| C    | OPU → OM1                    | LPU                              | LPU → OM0    |
| D    | LPU → OM1                    | OPU                              | OPU → OM0    |

In modes C and D both units work in the same cycles. This is the hardest part
of the ISPS to follow. The second unit needs whole 16x16 windows of the
*intermediate* image, and stage 1 writes that image into output memory 1 one
band of rows at a time. `isps_sequencer` therefore runs stage 2 exactly 16
bands behind stage 1. Band y of stage 2 reads rows y..y+15 of the
intermediate image. Stage 1 finished those rows in its bands y..y+15, which
all lie before its current band y+16. Output memory 1 is itself a
`slice_memory`, so stage 2 gets its stripes the same way stage 1 does. A pipelined
frame costs 16 extra bands; everything else overlaps.

Scan order and timing: for each band y the sequencer walks x = 0..W-1, one
stripe per cycle. A stage request (x, y) issued in cycle t is read in t,
shifted into the window in t+1, computed in t+2 when x >= 15, and written at
(x-15, y) in t+3. Only complete windows produce results, so stage 1 gives a
(W-15) x (H-15) image and stage 2 a (W-30) x (H-30) image; no border padding.
A frame takes `W * bands + 3` cycles, with bands = H-15 (modes A, B) or
max(H-15, 16 + H-30) (modes C, D): 16,803 and 16,963 cycles at 160x120.

Every final result is written to output memory 0 (readable by the host
through a stripe port) and sent out as the feature stream. When the
stream's `feat_ready` is low, every register and memory access of the ISPS
holds, so no feature is lost.

## Feature-Stream Processing System (FSPS)

### Vector Processing Unit: three levels, one term per cycle

A classification is a sum of *terms*; each term compares the input vector with
one model entry (a support vector, a Gaussian, a weak classifier, a database
vector). The VPU evaluates one term per cycle over all 256 dimensions:

* **low level** (`vpu_low`, 256 lanes): `a`, `a*b`, `a-b`, `|a-b|` or
  `(a-b)^2` per element, where `a` is the input vector from the Input Vector
  Memory and `b` a model vector from the low-level Local Vector Memory (LVM).
  Elements are signed 8-bit.
* **mid level** (`vpu_mid`, 16 lanes): sums the 256 lane results in 16 groups
  of 16, optionally weights each partial sum by a signed 16-bit weight from
  the mid-level LVM (shifted right by `mid_wshift`), and adds the 16 into one
  scalar `s`: an inner product, an L1 or squared-L2 distance, or a per-block
  weighted distance (e.g. a diagonal covariance).
* **high level** (`vpu_high`, scalar): `t = s`, `t = exp(-u/256)` with
  `u = max(s,0) >> exp_shift` (Q0.16 result), or a decision stump
  `t = (pol ? -s : s) < (pol ? -thr : thr)`; then `term = t * weight` from the
  high-level LVM entry `{pol, thr, weight}`, accumulated over the terms.
  The last term produces `acc + bias` and the decision `acc + bias >= 0`.

This covers SVM with an RBF kernel (`(a-b)^2`, sum, exp, weight = alpha),
GMM likelihoods (weighted squared distance, exp, weight = mixture weight),
AdaBoost (inner product with a Haar mask, stump, weight = alpha) and
nearest-neighbour search (`(a-b)^2`, sum, pass). A level is bypassed with
its pass operation. The exponential uses `exp(-v) = 2^(-v log2 e)` with
`log2 e ≈ 5909/4096`. The fraction of the power of two comes from a 17-entry
table `2^(-k/16)` with linear interpolation; the integer part is a right
shift. The error stays below 0.2% of full scale.

Pipeline: issue (LVM read) in cycle t, input vector in t+1, low result
registered in t+1, mid in t+2, high outputs in t+4. Throughput is 256
dimensions per cycle.

### K-NN processor

`knn_processor` has 128 PEs holding the 128 smallest distances seen since the
last clear, in ascending order, with their ids. A new distance is compared
with all PEs at once. PEs with a larger distance (or none) take their left
neighbour's entry, the first of them takes the new one, and the rest keep
theirs. Each distance is thus sorted in and stored in the same cycle. Equal
distances keep arrival order. The FSPS feeds it every term's high-level
value with the term index, so a classification run over a database in the
LVM also ranks the database.

### Control and memories

`fsps_controller` packs the incoming feature bytes (element 0 first) into
256-element vectors and writes each to the next of 8 Input Vector Memory
slots. A complete vector starts a classification (`auto_en`), or the host
starts one on any slot. The classification issues `n_terms` terms (LVM
entries 0..n-1) back to back and writes `{decision, acc}` to the next Output
Vector Memory word. A classification of n terms takes n + 5 cycles. If a
second vector completes before the first has started, the input is held off.
`vector_mem` is the one synchronous-read memory used for the IVM (8 x 2048
bits), the three LVMs (128 entries each) and the OVM (128 x 33 bits).

## Clock domains and power-aware frequency scaling

The root clock runs `system_monitor` and `clock_unit`. `clock_unit` divides
it by 1..15 for each of the two engines (`clk_div_gate`: registered divided
clock; for ratio 1 the root clock through a falling-edge-enabled AND gate)
and stops either clock when the host marks that engine unused
(`mon_isps_on`, `mon_fsps_on`). Features cross from the ISPS to the FSPS
through `async_fifo` (16 words, Gray-coded pointers, two-flop synchronisers).

The two engines rarely need the same time per frame. When the FSPS is the
slower one, the FIFO fills and the ISPS stalls. When the ISPS is slower, the
FSPS idles (bubble cycles) and burns clock power for nothing.
`system_monitor` counts both conditions over windows of 256 root cycles:

* more than 32 stall cycles: speed the FSPS up one ratio step, or, if it
  already runs at full speed, slow the ISPS;
* otherwise, more than 32 bubble cycles (FSPS idle while the ISPS works):
  speed the ISPS up, or, if it already runs at full speed, slow the FSPS.

The supply voltage is not scaled. The saving comes from running the
under-loaded engine at a lower frequency, and from gating an unused engine.
With `mon_auto = 0` the host's ratios are used as given.

## Top level and interfaces

`sasoc` instantiates everything. Host ports are grouped by clock domain. Pixel
loading, mask loading, RISP mode/configuration, start and output-memory reads
are synchronous to `clk_isps`. LVM/IVM loading, the FSPS program (`prog`,
`n_terms`, `bias`, `auto_en`, `knn_en`, start), OVM reads and the K-NN list
are synchronous to `clk_fsps`. The monitor ports are on `clk`. Both derived
clocks are outputs. `rst_n` is an asynchronous reset shared by all domains. Assert it with a
falling edge: the derived clocks are stopped while reset is low, so the
ISPS and FSPS registers are cleared by that edge rather than by a clock.
Default sizes: 160x120 frame, 8 IVM slots, 128-entry LVMs and OVM, 128 K-NN
PEs, 16-word crossing FIFO.

Approximate storage at the defaults: slice memory and the two output
memories 3 x 20 KB (120 rows padded to 128), low-level LVM 32 KB, IVM 2 KB,
mid LVM 4 KB, high LVM
and OVM below 1 KB each. That is about 100 KB of the 149 KB of SRAM the
original chip reports.

## Departures and gaps

* **Stripe orientation and bank mapping.** The original says only that 16
  banks supply 16-pixel stripes at arbitrary positions. Vertical stripes and
  the row-interleaved mapping are this design's choice.
* **Mode meanings.** The original has four modes with the two units
  pipelined in C and D, but does not define them. The table above is this
  design's reading. Mode C is the face-detection flow (OPU noise reduction,
  then LPU features).
* **ANN.** The original lists artificial neural networks among the
  supported algorithms. Weighted sums are available, but no sigmoid or other
  activation is built.
* **Input to any VPU level.** Inputs reach the mid and high levels only
  through the pass operations of the lower levels; there are no separate
  input ports per level.
* **Vectors longer than 256 dimensions** are not split over several terms
  before the K-NN processor sees them. The original's K-NN rate "adapts to the
  vector dimension"; here it is fixed at one vector of up to 256 dimensions
  per cycle.
* **Automatic gating.** Gating follows host flags; the monitor does not
  detect an idle engine by itself. There is no PLL; the root clock is an
  input. Memories are arrays, not SRAM macros.
* **Rates.** The original quotes 76.8 Gpixel/s (ISPS, pipelined),
  51.2 Gdimension/s (SVM) and 0.2 Gvector/s (K-NN) but no clock frequency.
  This design does one 256-dimension term or one K-NN insertion per cycle,
  which matches the last two at 200 MHz. Each RISP unit handles 256 window
  pixels per cycle.

## Simulating

Each testbench is a top module with no ports that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary -Irtl -Itb rtl/sasoc_pkg.sv tb/tb_isps.sv --top-module tb_isps -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_sasoc_full` | the whole chip at its default sizes: a 160x120 frame through mode C (3x3 median, then a Haar-like mask) and mode A; 105 feature vectors classified against 24 database vectors; every OVM word and the K-NN list checked against a model of the whole chain (about 10 s) |
| `tb_sasoc` | the same chain at 48x48 in all four modes. It also requires that each mechanism occurs: both units active in one cycle, ISPS stall, FSPS bubbles, monitor adjustment, IVM back-pressure, gating of the ISPS clock |
| `tb_isps`, `tb_risp` | every feature of all four modes against a window-operation model, with random back-pressure, frame cycle counts, output-memory reads |
| `tb_fsps` | K-NN retrieval and an RBF SVM (checked against a real-valued exponential), classification cycle count |
| `tb_vpu`, `tb_vpu_low/mid/high` | lane arithmetic, reductions, exp accuracy, stumps, the 4-cycle latency |
| `tb_knn_processor` | 600 insertions with duplicates against a sorted reference list |
| other `tb_*` | one per block: slice memory, window, LPU, OPU, stream network, sequencer, vector memory, controller, FIFO, clock unit, monitor |

To change sizes, override the parameters of `sasoc` (`W`, `H`, `LDEPTH`,
`NPE`, ...). `W` and `H` must be at least 31 for the pipelined modes to
produce output. Frame dimensions need not be multiples of 16.
