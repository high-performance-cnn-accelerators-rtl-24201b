# NP-P hybrid CNN accelerator (VGG-16 class networks, no off-chip memory)

A compressed CNN is split into two kinds of layers, and each kind gets its own engine:

* **NP-layers** (the convolution layers) are *not pruned*. Their weights are 8-bit fixed
  point, dense and regular, so they run on a large array of FIR-based convolution units
  that stream feature maps straight out of on-chip RAM.
* **P-layers** (the fully connected layers) are *pruned* (96 % / 96 % / 77 % of FC6 / FC7 /
  FC8 in VGG-16) and their surviving weights are quantized to powers of two, `±2^-e`. A
  multiplier is then only a shifter, and the irregular sparsity is handled by an
  *activation-driven* data flow: each activation is read once and every neuron that needs
  it grabs it as it goes by.

The two engines form a pipeline: while the P-layers finish image *k*, the NP-layers
already work on image *k+1*. Everything (weights and feature maps) lives on chip.

This RTL implements that architecture in the main configuration of the original design:
M_np = 32 input channels and N_np = 32 output channels in parallel in the convolution
engine, a 64-lane shift-accumulator engine for the P-layers, 16-bit activations, and
memories sized for VGG-16 at 224×224. Counting the streaming cycles of the 13 VGG-16
convolution layers gives 1 823 226 cycles, or 82 frames/s at 150 MHz. The original design
reports 83 frames/s for the same configuration.

## Block map

```
haco_top
├── np_engine                 convolution (NP) layers
│   ├── sdp_ram  ×M_np        FMRs: feature map RAMs, one per input channel slot
│   ├── fppb     ×M_np        3×3 ping-pong buffers: words -> three row streams
│   ├── ccpu     ×N_np        one output channel each
│   │   ├── conv_pe ×M_np     3×3 PE = three retimed_fir3
│   │   ├── adder_tree        sums the M_np PE outputs
│   │   ├── PE buffer         partial sums across input-channel groups
│   │   └── max_pool          ReLU output -> 2×2 max pooling or bypass
│   ├── sdp_ram  ×N_np        WRs: weight RAMs, one per CCPU
│   ├── weight_buffer ×N_np   WBs: active + shadow bank of M_np kernels
│   ├── data_trans ×N_np      CCPU pixels -> 3-pixel words
│   └── sdp_ram  ×M_np        map buffer (output feature map)
├── hand-over                 map buffer -> P input activations (flattening)
└── p_engine                  pruned (P) layers
    ├── sdp_ram ×2            ping-pong activation buffers
    ├── sdp_ram ×N_p          per-lane compressed weight RAMs
    └── sac_pu                decode, activation-driven read, shift-accumulate
        └── shift_acc ×N_p    M_p shifters + adder_tree + accumulator
```

`cnn_pkg` holds the shared widths, the packed record types (`np_layer_t`, `p_layer_t`,
`pentry_t`, `slot_tag_t`) and small helpers.

## The convolution engine

### Retimed FIRs and the Conv-PE

A 3×3 convolution is three 3-tap FIR filters, one per kernel row, added together. Each
`retimed_fir3` is a transposed 3-tap FIR with a cut-set register in its adder chain, so the
longest path is one multiply and one add. The register costs one cycle of latency. A
`conv_pe` feeds rows *i-1*, *i*, *i+1* of the input into its three FIRs, registers the
three results and adds them. Its output is the 3×3 correlation, two cycles after the last
sample. Kernel tap `(r,k)` must hold `H[r][2-k]`, because a streaming FIR reverses the tap
order.

The Conv-PE also has two other modes, selected by `pe_mode_e`:

* `PE_SERIAL` chains the three FIRs through their cascade ports (`xcas` delayed samples and
  `sin` partial sums) into one 9-tap filter. This is for kernels larger than 3×3.
* `PE_POINTWISE` keeps the three FIR sums apart instead of adding them. For 1×1 kernels
  this gives three outputs per cycle.

Both modes are built and tested in `conv_pe`. The layer controller, however, only runs the
parallel 3×3 mode (see *Limits*).

### Integrated rows and the FPPB

An FMR word holds three neighbouring activations of one row. A row of width W takes
`RW = floor(W/3)+1` words. This always leaves at least one zero after the last pixel, so
the zero padding between rows comes for free.

The read sequence interleaves three rows word by word: row *i-1* word *x*, row *i* word
*x*, row *i+1* word *x*, then word *x+1*, and so on. Rows outside the image read as zero.
The `fppb` collects three such words into a 3×3 block (written row-wise) and reads the
block out column-wise. It therefore turns one word per cycle into three row streams of
one activation per cycle. It has two blocks, so one fills while the other drains.

One (pass, input-group) sweep over a W×H map takes `3·RW·H + 3` cycles. For W = 224 this is
exactly `(W+1)·H + 3`.

### CCPU: accumulation over channels and passes

Each `ccpu` computes one output channel. Its M_np Conv-PEs work on M_np input channels at
once, and the pipelined `adder_tree` (two-input adders, one register per level, 5 levels
for 32 inputs) sums them.

When a layer has more input channels than M_np, the input is processed in *groups*. The
partial sum of every output slot waits in the PE buffer and is added to on the next group.
The first group overwrites and the last group releases the sum. A `slot_tag_t` travels
down the pipeline next to the data. It carries the PE-buffer address, the first/last flags,
whether the slot is a real pixel or a row separator, the output column and the row parity.
The engine generates the tags once, where the FPPB output leaves. They are then only
delayed, so no unit has to count.

On the last group the sum goes through ReLU and requantization: an arithmetic shift by the
layer's `shift`, then saturation to 16 bit. It then enters `max_pool`. In pooling mode the
pooling buffer keeps the pairwise maxima of even rows, and the odd row completes each 2×2
window. Otherwise the bypass path is used.

### Passes, weight buffers and the map buffer

The N_np CCPUs produce N_np output channels per sweep. A layer with N output channels
needs `passes = ceil(N/N_np)` of them. The controller in `np_engine` runs, per layer:

```
for p in passes:            # N_np output channels
  for g in groups:          # M_np input channels
     stream FMR group g through the FPPBs to all CCPUs
```

Every CCPU reads its kernels from its own weight RAM. WR *j* holds the kernel for output
channel `p·N_np + j` and input channel `g·M_np + m` at word
`wbase + (p·groups + g)·M_np + m`. Before each sweep the M_np kernels are copied into the
shadow bank of the CCPU's `weight_buffer`, and a `swap` makes them active.

`data_trans` packs each CCPU's output pixels back into 3-pixel words, in the same
integrated-row format, and writes them to the map buffer. The map buffer has M_np banks and
the CCPUs only N_np, so pass *p* writes bank `(p mod M_np/N_np)·N_np + j`, in group
`p / (M_np/N_np)`. The map buffer therefore holds the output in exactly the FMR layout.
After every layer except the last, it is copied into the FMRs (one word per bank per
cycle), and the next layer starts.

## Hand-over

When the last NP-layer is done, `haco_top` reads the map buffer and writes the
activations into the P engine's input buffer. It reads one activation per cycle, in
channel-major `(c, y, x)` order, which is the flattening order of the first FC layer. It
then starts the P engine.

`np_ready` stays low while the NP engine or the hand-over is busy, and `np_start` is ignored
during that time. The hand-over waits until the P engine has finished the previous image.
As soon as it is done, the host can load the next image into the FMRs and start it. The
NP-layers of that image then overlap the P-layers of the previous one.

## The pruned-layer engine

### Weight format

Each kept weight of a neuron is a 9-bit entry `{run[4:0], code[3:0]}`:

| field | meaning |
|---|---|
| `run` | number of zero weights skipped before this one (0..31) |
| `code = {s, e}` | weight `(-1)^s · 2^-e`, with e = 0..6 |
| `code = 0111` | zero filler: skip `run+1` positions without a weight (for gaps over 31) |
| `code = 1111` | end of this neuron's kernel |

A weight `±2^-e` applied to a 7-fraction-bit activation scale is a left shift by `7-e`.
The P-layer sums therefore share the NP-layers' fixed-point scale.

### SAC-PU: decode, activation-driven read, shift-accumulate

The `sac_pu` handles N_p = 64 neurons (one *group*) at a time, in three phases:

1. **Weight decoding (WD).** All 64 lane RAMs are read in parallel. Each lane turns its
   entries into absolute input indexes and weight codes in its index and weight caches.
   This takes (longest entry list + 2) cycles.
2. **Activation reading (AR).** The activations `0 .. L-1` are read once, in order, where L
   is one past the largest index in the group. Each activation is broadcast to all lanes.
   A lane whose next wanted index equals the current address stores the activation in its
   activation cache ("if needs?"). This takes L + 1 cycles.
3. **SAC computing (SC).** Every lane feeds M_p = 4 (activation, code) pairs per beat into
   its `shift_acc`: 4 shifters, a small adder tree and an accumulator. This takes
   `ceil(max nnz / 4)` beats plus the tree latency.

`p_engine` runs the groups of a layer. It requantizes (with optional ReLU) and writes the
64 results into the other activation buffer, then goes on to the next layer with the
buffers swapped. The final layer's outputs are read through `res_raddr/res_rdata`.

## Interface summary (`haco_top`)

All memories are loaded by a host through plain write ports, while the engine concerned is
idle:

| ports | loads |
|---|---|
| `fmr_we/bank/addr/wdata` | input image: channel c to bank `c mod 32`, word `(c/32)·H·RW + row·RW + x/3` |
| `wr_we/bank/addr/wdata` | 3×3 kernels, 72 bits (tap `(r,k)` at bits `(3r+k)·8`, holding `H[r][2-k]`) |
| `np_lt_*` | NP layer table: `{w, h, groups, passes, pool, shift, wbase}` per layer |
| `pw_we/lane/addr/wdata` | P weights: neuron n in lane `n mod 64` from `wbase + (n/64)·kstride` |
| `p_lt_*` | P layer table: `{u_out, groups, kstride, wbase, relu, shift}` |
| `xfer_w/h/ch` | size of the last NP map handed to the P-layers |

Operation:

1. Pulse `np_start` while `np_ready` is high.
2. `frame_done` pulses when that image's P-layer results are ready.
3. Read the results with `res_raddr` (registered read, one-cycle latency).

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `M_NP` | 32 | input channels in parallel (Conv-PEs per CCPU, FMRs) |
| `N_NP` | 32 | output channels in parallel (CCPUs, WRs) |
| `GRP` | 2 | adder inputs per adder-tree node |
| `FMR_DEPTH` | 33600 | words per FMR / map-buffer bank (224 rows × 75 words × 2 groups) |
| `WR_DEPTH` | 65536 | kernels per weight RAM (VGG-16 needs 51 136) |
| `PEBUF_DEPTH` | 50401 | partial sums per CCPU (224 × 225 + 1) |
| `MAX_W` | 224 | widest feature map (pooling buffer) |
| `N_P` | 64 | shift-accumulator lanes |
| `M_P` | 4 | shifters per lane |
| `CACHE_D` | 2048 | per-lane index/weight/activation cache entries |
| `PA_DEPTH` | 25088 | P activation buffer (7×7×512) |
| `PW_DEPTH` | 131072 | compressed weight entries per lane |

M_np = N_np = 32 is the original design's main configuration. N_p, M_p, the cache depth
and the RAM depths are this implementation's choices: they are sized so that VGG-16 fits,
and powers of two were used where the design asks for them.

## Limits and departures from the original design

* **One clock.** The original design runs the weight RAMs, the convolution engine and the
  shift-accumulators at different frequencies (for example 100 / 150 / 300 MHz). Here
  everything shares one clock, and there are no clock-domain crossings.
* **Only 3×3, stride-1 convolutions are sequenced.** The Conv-PE's serial mode (for
  kernels larger than 3×3) and its 1×1 mode exist and are tested, but the layer controller
  never selects them. Strides other than 1, and residual additions, are also missing, so
  ResNet-type networks do not run.
* **Fully connected P-layers only.** Pruned convolution layers are not supported.
* **AR and SC are not overlapped.** Within a group, the three phases follow each other.
  P-layer time is therefore the sum WD + AR + SC. Overlapping activation reading with
  shift-accumulation, so that only the longer of AR and SC counts, is a possible
  refinement that is not built.
* **P-layer storage is sized for VGG-16's fully connected layers.** A kernel may keep at
  most CACHE_D = 2048 weights, and its entry list, fillers included, is limited to 4095
  entries by the 12-bit kernel-stride field. All kernels of all P-layers together may use at most
  PW_DEPTH = 131 072 entries per lane. Random weights at the VGG-16 pruning rates use
  about 97 % of that space. A model pruned less would need larger memories.
* **Max pooling only.** The pooling is 2×2 with stride 2; average pooling is not built.
* **Map buffer copy.** Between layers the map buffer is copied back into the FMRs. This
  costs `ceil(passes/(M_np/N_np)) · H_out · RW_out` cycles per layer, which is small next
  to the convolution itself.
* **Own choices:** the weight and activation layouts in the RAMs, the P-weight entry codes
  (filler and end markers), the hand-over order, the slot-tag scheme, requantization by a
  per-layer shift with saturation, and the host load interface.
* The compression (pruning and quantization training) and the design-space search that
  picks M_np, N_np, M_p and N_p are offline software, and are not part of this RTL.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb rtl/cnn_pkg.sv \
          tb/tb_ccpu.sv --top-module tb_ccpu
./obj_dir/Vtb_ccpu
```

(`cnn_pkg.sv` must come first on the command line.) The block testbenches compare against
models computed in the testbench. Where the design fixes a latency or a rate, they also
check the cycle counts:

* FIR and Conv-PE latencies;
* adder-tree depth;
* CCPU first-pixel latency;
* NP stream length `3·RW·H + 3` per sweep;
* the SAC-PU phase lengths WD, AR and SC.

Two testbenches run the whole accelerator end to end; they share `tb/haco_tb_body.svh`:

* `tb_haco_top` uses reduced sizes (M_np = 4, N_np = 2, N_p = 8).
* `tb_haco_full` uses every default size. It compiles in about 2 minutes and simulates in
  well under a minute.

Both run a small network on two images:

* a 6×4 three-channel image;
* two convolution layers, the first with pooling;
* the hand-over;
* a pruned 16-neuron layer with ReLU and a 10-neuron output layer.

The second image is started while the first is still in the P-layers. The results are
compared with a bit-exact model. The testbenches count every mechanism and fail if any of
them never occurs:

* pooling;
* PE-buffer accumulation over input-channel groups;
* multiple output passes;
* weight-buffer swaps;
* map-buffer copies;
* the hand-over;
* activation captures;
* zero-filler entries;
* multi-beat shift-accumulation;
* ReLU clamping;
* NP/P overlap;
* `np_start` being ignored while busy.

They also check the total streaming cycle count.

Two more testbenches run real VGG-16 layers at full size on the engines at their default
parameters. The data is random, and each testbench generates its own.

* `tb_vgg_conv1` runs conv1_1 (224×224, 3 → 64 channels, two output passes) on
  `np_engine`. It checks every output pixel and that the two streams together take
  2·(3·75·224 + 3) = 100 806 cycles. It simulates in about 2.5 minutes.
* `tb_vgg_fc` runs FC6 → FC7 → FC8 (25088 → 4096 → 4096 → 1000, with 4 %, 4 % and 23 % of
  the weights kept) on `p_engine`. The testbench compresses the weights itself and packs
  each layer with a kernel stride equal to its longest kernel. For the random weights this
  uses 127 008 of the 131 072 lane-RAM words. It checks all 1000 outputs, and the WD, AR and
  SC phase lengths of all 144 neuron groups. It simulates in about a minute.
