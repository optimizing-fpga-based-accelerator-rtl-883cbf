# Tiled floating-point accelerator for CNN convolutional layers

Convolutional layers make up over 90 % of the arithmetic of a CNN such as
AlexNet. This design computes one convolutional layer,

    out[m][r][c] = sum over n < N, i < K, j < K of  w[m][n][i][j] * in[n][S*r+i][S*c+j]

for R x C output pixels, M output maps, N input maps, a K x K kernel and
stride S, all in IEEE-754 single precision. The layer is too big for on-chip
memory, so the loop nest is **tiled**. Tiles of Tr x Tc output pixels, Tm
output maps and Tn input maps go through on-chip buffers. Inside a tile a
compute engine of **Tm x Tn multipliers** works through one kernel position
and one pixel per cycle. The tile sizes set both the peak throughput and the
off-chip traffic. The published design picked them with a roofline model,
which weighs the computation against the bandwidth each candidate needs. That
exploration is an offline calculation and is not part of this RTL. The RTL
implements the accelerator that the exploration produced:

* 448 processing elements (Tm = 64, Tn = 7),
* Tr = Tc = 13,
* 100 MHz on a Virtex-7 485T.

The published accelerator ran AlexNet's five convolutional layers in about
21.6 ms on the board. It was built with high-level synthesis. This is an
independent RTL version of its architecture, not the original code.

## How the loop nest becomes hardware

The tiled loop nest, with the order of the loops as the hardware runs them:

    for row in 0..R step Tr        -- tile loops: controller, one tile at a time
     for col in 0..C step Tc
      for to in 0..M step Tm
       for ti in 0..N step Tn      -- output tile stays on chip through this loop
        for i in 0..K              -- point loops: one (i, j, trr, tcc) per cycle
         for j in 0..K
          for trr in 0..Tr
           for tcc in 0..Tc
            for too in 0..Tm       -- unrolled: Tm PEs
             for tii in 0..Tn      -- unrolled: Tn multipliers per PE
              out[to+too][row+trr][col+tcc] += w[..][..][i][j] * in[..][S*trr+i][S*tcc+j]

`i` and `j` are outermost inside the tile. So an output pixel is revisited
only once every Tr*Tc cycles, which leaves time for the multiply–add pipeline
to write back its partial sum before the pixel is read again. One tile
therefore takes

    K*K*Tr*Tc + P cycles, with P = 4 here (3 cycles of pipeline drain, 1 to start the next tile),

and a layer takes ceil(R/Tr) * ceil(C/Tc) * ceil(M/Tm) * ceil(N/Tn) tiles. This
holds when data transfer keeps up. Tiles are always computed at full size.
At the layer's edges the input stream carries zero words, and the results for
pixels outside the layer are produced and then discarded.

## Compute engine (`pe`, `compute_engine`, `fp_mul`, `fp_add`)

Each PE owns one output map. It multiplies the Tn input words by its own Tn
weights and sums the products with a binary adder tree. It then adds the
pixel's partial sum, which it reads back from the output buffer. The Tn input
words are broadcast to all Tm PEs.

Pipeline of a point issued in cycle t:

| cycle | what happens |
|---|---|
| t   | controller presents input, weight addresses |
| t+1 | buffer words arrive, Tn products computed |
| t+2 | products registered, adder tree; partial-sum read address presented |
| t+3 | tree sum registered, partial sum arrives, accumulate, write back |

The first contribution to a pixel (first input tile, i = j = 0) overwrites
the output word instead of adding to it, so the output buffers never need
clearing. For Tn not a power of two (7), the tree is padded with zero leaves.

The floating-point units are combinational. They round to nearest, ties to
even, and flush subnormals to zero. An overflow gives infinity. NaNs get no
special handling. All of this is a choice of this design: the original
describes the arithmetic only as floating point.

## Buffers, crossbars and double buffering

There are three kinds of buffer, and each comes as a ping-pong pair of sets
(`bank_set`). A set is a row of synchronous-read RAM banks:

| buffer | banks per set | words per bank (default) | address |
|---|---|---|---|
| input  | Tn (one per input map) | ((Tr-1)*S_MAX+K_MAX)^2 = 3481 | y*IW + x inside the input tile |
| weight | Tm x Tn (one per multiplier) | K_MAX^2 = 121 | i*K + j |
| output | Tm (one per output map) | Tr*Tc = 169 | trr*Tc + tcc |

A `crossbar` sits in front of each pair. It connects the compute side to one
set and the transfer side to the other. The controller keeps one flag per set:

* `in_full[s]`: input/weight set s holds a loaded tile;
* `out_full[s]`: output set s holds a finished tile.

The loader may start only on an empty set and the engine only on a full one.
The storer takes a full output set and empties it. A new output tile starts
only on an empty output set. Each side then alternates between the two sets.
The next tile can therefore load, and the previous output tile drain, while
the engine computes. This is how the design hides transfer time behind
computation. The output tile stays on chip across the whole `ti` loop and
leaves the chip once, with its final values. A naive tiling would load and
store partial output tiles once per input tile. An assertion in each crossbar checks that
the two sides never use the same set.

## Data transfer and the stream format (`transfer_mgr`, `stream_fifo`)

All traffic goes through two FIFOs of 32-bit words, one word per cycle each
way. They are meant to face DMA engines that read and write main memory. The
host must send, for every tile in the order row, col, to, ti:

1. the Tn input-map tiles one after the other, each (Tr-1)*S+K rows of
   (Tc-1)*S+K words, row by row. Words outside the layer, or of input maps
   ≥ N, are +0;
2. the Tm x Tn kernels, output map outer and input map inner, each K*K words
   row by row. Kernels of maps outside the layer are +0.

After the last `ti` tile of an output tile, the accelerator returns Tm x Tr x
Tc words, output map outer, then rows, then columns. Words for pixels or maps
outside the layer must be dropped by the receiver. The storer issues a bank
read only if the output FIFO has room for it and for the read already in
flight. This keeps it at one word per cycle without overflowing the FIFO.

## Controller and interface (`controller`, `accel_top`)

Write the layer on `cfg` (R, C, M, N: 12 bits; K: 4; S: 3) and pulse `start`
while `busy` is low. `busy` falls and `irq` pulses once when the last output
word has entered the output FIFO. The controller takes one layer per `start`
and has no instruction memory: a host runs a network by configuring one layer
after another.

Performance event outputs, one bit per cycle:

* `perf_overlap`: the engine computes while a tile is being loaded;
* `perf_in_stall`: the engine waits for input;
* `perf_out_stall`: the engine waits for an output set to drain.

Reset is synchronous and active low.

Parameters of `accel_top`:

| parameter | default | meaning |
|---|---|---|
| TM | 64 | output maps per tile = PEs |
| TN | 7 | input maps per tile = multipliers per PE |
| TR, TC | 13, 13 | output rows and columns per tile |
| K_MAX, S_MAX | 11, 4 | largest kernel and stride the buffers are sized for |
| FDEPTH | 16 | depth of each FIFO |

The condition Tr*Tc ≥ 2 must hold so that an output word is written back
before it is read again.

## Where this differs from the original accelerator

* **Transfer width.** The FIFOs move one 32-bit word per cycle, which makes
  AlexNet layers transfer-bound here. For conv3, 1.24 M input words take
  12.6 ms in simulation, against 3.4 ms of computation. The original's port widths are not
  published in enough detail to copy. Widening the stream means widening
  `stream_fifo` and having the loader write several banks per cycle.
* **Edge tiles** are computed at full size with zero padding rather than with
  shortened loops. The cycle count is the same as the original's performance
  model, which also charges full tiles.
* **Host system.** The host system is not included. The original connects to
  a MicroBlaze processor, AXI buses, DMA engines, a timer, an interrupt
  controller and a DDR3 memory controller. Here the accelerator's side is
  plain ports: `cfg`/`start`/`irq` in place of the AXI4-Lite registers, and
  the two streams.
* **Intra-buffer data transfer module.** The original shows a block by that
  name, wired from the output side to the input crossbar, but does not say
  what it does. It is not built.
* **Weight buffering.** Weights are double-buffered and loaded with each
  input tile. They sit in one bank per multiplier.
* **Tile sizes.** Tm = 64 and Tn = 7 are one factorisation of the published
  PE count of 448; Tr = Tc = 13 are the published tile sizes.
* **Arithmetic details.** Pipeline depth, FIFO depth, stream order,
  handshakes and the floating-point edge cases are this design's own choices.

## Performance on AlexNet

The table gives two times for each layer at 100 MHz. Compute-bound is the
time if the engine were never starved: tiles x (K*K*Tr*Tc + 4) cycles. Input
stream is the time to send the layer's input words at one word per cycle. The
outputs leave on their own stream at the same time. Layer shapes are the
standard AlexNet ones, with conv2, conv4 and conv5 split into two groups.

| layer | tiles | compute-bound | input words | input stream | original's estimate |
|---|---|---|---|---|---|
| conv1 (55x55, M 96, N 3, K 11, S 4) | 50 | 10.2 ms | 3,928,750 | 39.3 ms | 7.32 ms |
| conv2 (27x27, M 2x128, N 48, K 5) | 252 | 10.7 ms | 3,332,196 | 33.3 ms | 5.11 ms |
| conv3 (13x13, M 384, N 256, K 3) | 222 | 3.39 ms | 1,244,754 | 12.4 ms | 3.42 ms |
| conv4 (13x13, M 2x192, N 192, K 3) | 168 | 2.56 ms | 941,976 | 9.42 ms | 2.59 ms |
| conv5 (13x13, M 2x128, N 192, K 3) | 112 | 1.71 ms | 627,984 | 6.28 ms | 1.73 ms |

The compute-bound times of conv3 to conv5 match the original's estimates.
Those of conv1 and conv2 do not, which suggests the original used different
tile sizes for those layers. With one-word streams every layer is bound by its
input stream. The simulated layers confirm this. Each took its input word
count plus 1 to 4 %: the last tile's compute, the last output tile's drain
and a few cycles per tile. For example, conv3 took 1,257,546 cycles for
1,244,754 words. All other computation and output traffic is hidden behind
the loading.

## Verification

Every module has a self-checking testbench in `tb/`, each printing
`TB_RESULT checks=N failures=M`. The floating-point reference
(`fp_ref_pkg`) does each operation in double precision and rounds the result
to single precision by bit manipulation. For a single addition or
multiplication this gives the correctly rounded answer. The layer reference
(`conv_ref_pkg`) applies those operations in the datapath's order (tree,
then accumulate), so results must match bit for bit.

* `tb_accel_top`: five layers at a reduced size (Tm 4, Tn 3, Tr 3, Tc 4),
  with random input gaps and output back-pressure. It checks every real
  output pixel, K*K*Tr*Tc cycles per tile, and one `irq` per layer. It also
  checks that each mechanism happens: transfer overlapped with compute, the
  engine waiting for input, the engine waiting for an output set, a full
  input FIFO, output back-pressure, accumulation over several input tiles,
  several output tiles, edge padding, and stride > 1.
* `tb_accel_full`: the top at its default parameters. It runs a 13x13x64
  layer with K = 3 and N = 14 (two input tiles), and an 11x11 stride-4 layer
  shaped like conv1, reduced to one output tile.
* `tb_alexnet`: AlexNet at the default parameters. It runs conv3 whole, one
  group each of conv4 and conv5 whole, and bands of 13 output rows of conv1
  (all 96 maps) and of conv2 (64 maps). It checks every output pixel, every
  tile's cycle count, and that each layer takes no longer than its input words
  plus one tile's compute, one output tile's drain and 4 cycles per tile. It simulates in about
  1.5 minutes.
* `tb_controller`, `tb_transfer_mgr`, `tb_pe`, `tb_compute_engine`,
  `tb_bank_set`, `tb_crossbar`, `tb_stream_fifo`, `tb_fp_mul`, `tb_fp_add`:
  the blocks on their own, against independent models.

Conv1 and conv2 were not simulated whole, to keep the run short. Their
remaining rows use the same tile sequence.

To run a testbench with Verilator 5, list the packages first and let
Verilator find the modules by name:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        --top-module tb_accel_top \
        rtl/cnn_pkg.sv tb/fp_ref_pkg.sv tb/conv_ref_pkg.sv tb/tb_accel_top.sv
    ./obj_dir/Vtb_accel_top

## Files

* `rtl/cnn_pkg.sv`: data word and layer-configuration types.
* `rtl/accel_top.sv`: top level.
* `rtl/controller.sv`: tile sequencing, engine pipeline, ping-pong flags.
* `rtl/transfer_mgr.sv`: loader and storer.
* `rtl/stream_fifo.sv`: the two FIFOs.
* `rtl/crossbar.sv`: set switch in front of each buffer pair.
* `rtl/bank_set.sv`: one buffer set of RAM banks.
* `rtl/compute_engine.sv`, `rtl/pe.sv`: the Tm x Tn engine.
* `rtl/fp_mul.sv`, `rtl/fp_add.sv`: single-precision arithmetic.
* `tb/`: the testbenches and the reference packages.
