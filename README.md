# Sparse INT8 Conv1 + Pool1 engine with zero-skipping and CE data gating

This is the first convolution and pooling stage of a small MNIST classifier
(Conv1 → Pool1 → Conv2 → Pool2 → FC), built to save switching power when many
weights and activations are zero. It uses two mechanisms:

* **Zero-skip.** The Conv1 weights are pruned offline by magnitude. The
  smallest |w| are set to zero, at sparsity levels from 0 % to 80 %. Next to
  the weights, the engine keeps a one-bit-per-weight *bitmap* that marks the
  non-zero weights. The bitmap bit is read in the same cycle as the weight
  address. When it is 0, the MAC's operand registers and accumulator are not
  written, so the multiplier inputs do not toggle.
* **CE (clock enable, used here as a write enable).** A consecutive-zero
  detector in front of the MAC watches the activation stream. When a zero
  activation ends a run of at least `ZRUN` zeros (2 by default), CE goes low
  and the MAC registers keep their values for that cycle. This is *data
  gating*, not clock gating: the clock still reaches every flip-flop. CE can
  only save what toggling the data path itself costs. Its own detector and
  counter add switching, so it can cost slightly more power than zero-skip
  alone. The mode is selectable so the two can be compared.

Neither mechanism changes a result. A skipped tap always has a zero weight
or, under CE, a zero activation. Neither changes the timing either: the
engine spends one cycle per kernel tap, whatever the sparsity, so latency is
fixed and known in advance.

## Data flow

```
            host loads                      start
               |                              |
   +-----------v-----------+         +--------v--------+
   | image_buffer 28x28 x8 |<--addr--|   conv1_ctrl    |-- first/last --+
   +-----------+-----------+         |  (tap sequencer)|                |
               | act            +----+-----------------+                |
   +-----------v-----------+    |  addr                                 |
   | zero_run_ce (CE, cnt) |    |                                       |
   +-----------+-----------+  +-v---------------------------+           |
               | ce           | weight_buffer 150 x8         |          |
               |              | + non-zero bitmap + 6 biases |          |
               |              +-----+--------------+---------+          |
               |                wgt | nz (bitmap)  | bias               |
             +-v--------------------v---+          |                    |
             | zs_mac (skip / CE gating)|<---------|--------------------+
             +-------------+------------+          |
                           | 32-bit sum            |
                 +---------v---------+             |
                 |   requant_relu    |<------------+
                 +---------+---------+
                           | INT8
                 +---------v---------+
                 |  maxpool2x2       |--> out_valid, out_ch/row/col, out_data
                 +-------------------+
```

All arithmetic is INT8 × INT8 into a 32-bit accumulator. The default
geometry is that of the classic LeNet-5 first layer: a 28×28 single-channel
image and six 5×5 kernels without padding, which give 24×24 maps. Pooling is
2×2, giving 12×12 maps, so a frame produces 6 × 144 = 864 pooled values.

## Tap schedule: why Pool1 needs no line buffer

`conv1_ctrl` issues one kernel tap per cycle, with no gaps. Its loop order,
outer to inner, is:

```
channel ch (6) > pooled row py (12) > pooled col px (12) >
pool sub-row sy (2) > pool sub-col sx (2) > kernel row ky (5) > kernel col kx (5)
conv output (oy, ox) = (2*py + sy, 2*px + sx)
pixel address  = (oy + ky) * 28 + (ox + kx)
weight address = ch * 25 + ky * 5 + kx
```

The four conv outputs of a pooling window are therefore computed one after
another. The pool only keeps a running maximum and a count to four, and needs
no line buffer. The price is that neighbouring windows re-read overlapping
pixels. The image buffer is on chip, so that costs reads but no bandwidth.

## Timing

| event | rising edge, counting the edge that samples `start` as 0 |
|---|---|
| tap *k* sampled by the buffers (pixel, weight, bitmap bit registered) | *k* = 1 … 86 400 (6·24·24·25) |
| CE for tap *k* valid (combinational) | in the cycle after edge *k* |
| MAC operand registers (stage 1) | *k* + 1 |
| MAC accumulator / `result` (stage 2) | *k* + 2 |
| pooled value registered, `out_valid` high | *k* + 3, *k* = last tap of the window |
| `done` high (with the last pooled value) | after edge 86 403; `busy` falls at edge 86 404 |

`frame_cycles` reads 86 404 for every sparsity and both modes. Outputs leave
in channel, row, column order, and `out_ch/out_row/out_col` name each one.
`mode` and `shift` are sampled when a frame starts. `start` is ignored while
`busy` is high. An assertion checks that the host does not write the buffers
while a frame runs.

## Modules

| module | role |
|---|---|
| `conv1_pkg` | sizes, `act_t`/`wgt_t`/`acc_t`, `gate_mode_e` (`MODE_ZERO_SKIP`, `MODE_ZERO_SKIP_CE`) |
| `image_buffer` | 784 × INT8, host write port, synchronous read that holds its output while idle |
| `weight_buffer` | 150 × INT8 weights, 150-bit non-zero bitmap (set on write when the weight ≠ 0), 6 × 32-bit biases. The weight register loads only for non-zero weights. `nz_count` reports how many weights are non-zero |
| `conv1_ctrl` | tap sequencer described above |
| `zero_run_ce` | consecutive-zero detector, CE output, `gated_cycles` counter |
| `zs_mac` | two-stage MAC. A tap is worked on only if `nz && ce`; otherwise no register is written. Counts skipped and multiplied taps |
| `requant_relu` | `y = clamp((acc + bias) >>> shift, 0, 127)` |
| `maxpool2x2` | running maximum over 4 consecutive values |
| `conv1_pool1_top` | wires it all together. Brings out the load ports, the output stream and the counters |

### The counters

After each frame the top reports:

* `skipped_cycles`: taps with a zero weight. This always equals (number of
  zero weights) × 576, because each weight is used at 24×24 positions.
* `gated_cycles`: taps blocked by CE. It is 0 in `MODE_ZERO_SKIP`.
* `mac_cycles`: taps actually multiplied.
* `frame_cycles`, and `nz_weights`.

These count events, not toggles. To estimate power from switching activity,
dump the signal activity of a gate-level or RTL simulation and scale it
against an unpruned reference run.

## Where this design chooses for itself

The behaviour described above follows the published description of this
design:

* the Conv1 → Pool1 structure;
* INT8 data;
* magnitude pruning with a bitmap for single-cycle zero detection;
* zero-skip that keeps results unchanged and latency fixed;
* CE as a write enable driven by a consecutive-zero detector before the MAC,
  with a gated-cycle counter and a selectable mode.

The following are this implementation's own choices, and the first things to
revisit when adapting it:

* **Layer sizes.** 28×28 input, 6 kernels of 5×5, no padding, 2×2 *max*
  pooling. These are LeNet-5 values; change them through the parameters
  `IMG`, `K`, `CH`, `P`.
* **One MAC, one tap per cycle.** There is no parallelism, and the sequencer
  order is the one given above.
* **CE run threshold `ZRUN = 2`.** The second zero in a row, and each later
  one, is gated. The run counter runs across dot-product boundaries, following
  the raw tap stream.
* **Requantization.** A 32-bit bias, a power-of-two scale (`shift`) with
  floor rounding, then ReLU and saturation to 0…127. Activations are signed
  INT8 with zero point 0.
* **Operand isolation.** Both the weight register and the MAC operand
  registers hold their value on a skipped tap.
* **Host interface.** Plain write ports, a `start`/`busy`/`done` handshake
  and a valid-only output stream with no back-pressure. The consumer must
  accept one value whenever `out_valid` is high.
* **Reset.** Asynchronous and active-low. It clears control, counters,
  the bitmap and the biases. The image and weight arrays are not reset; the
  cleared bitmap makes unwritten weights read as zero.

Not included:

* **Conv2, Pool2 and the FC layer.** Only the first stage is built. No sizes
  are given for the later layers, so whole-network accuracy cannot be
  reproduced from this RTL alone.
* **Integrated clock gating.** This is the natural next step, because CE as
  built here cannot reduce clock-tree power.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_image_buffer` | every address, the one-cycle read, output hold with `rd_en` low |
| `tb_weight_buffer` | bitmap after reset and after writes, weight-register hold on zero weights, `nz_count`, biases |
| `tb_zero_run_ce` | CE and `gated_cycles` against a run-length model, in both modes, plus the isolated-zero case |
| `tb_zs_mac` | 400 sparse dot products with random CE, two-cycle latency, counters |
| `tb_requant_relu` | random and edge values against a 64-bit model; all three outcomes occur |
| `tb_maxpool2x2` | 1000 windows with idle gaps, including negative values; one-cycle output latency |
| `tb_conv1_ctrl` | all 86 400 taps of two frames against the loop nest, and `start` ignored while busy |
| `tb_conv1_pool1_top` | the full engine at default parameters (see below) |
| `tb_toggle_activity` | the same 34-frame sweep, counting register toggles per frame and estimating relative power (below) |
| `tb_image_subset` | 100 different images, each reloaded and run at 0 %, 45 % and 65 % sparsity in both modes (600 frames, about 40 s) with the same checks |

`tb_conv1_pool1_top` builds a synthetic digit-like image: strokes on a zero
background. It also generates one random kernel set and prunes it by
magnitude at every level from 0 % to 80 % in 5 % steps. Each level runs in
both modes, for 34 frames and 2.9 M cycles. For each frame it checks:

* all 864 outputs and their coordinates against an independent model of
  convolution, requantization and pooling;
* that CE changes no output;
* the fixed frame length;
* the skip, gate and multiply counters against the model's count over the
  tap stream.

It also checks that zero-skip, CE gating, the mode switch, ReLU clipping,
saturation and a pool choice other than the first value each happened at
least once. It prints one line of activity per frame. With the test image,
CE blocks 51 125 of the 86 400 taps, and zero-skip at 65 % blocks 56 448.

## Switching activity and estimated power

Dynamic power follows P = α·C·V²·f. If every toggled register bit is given
the same capacitance, the power of a configuration relative to a reference
is the ratio of their toggle counts: P = P_ref · α / α_ref.
`tb_toggle_activity` counts toggles per frame in three groups:

* the data-path registers: image and weight read registers, MAC operands,
  accumulator and result;
* the CE control: run-length register and gated-cycle counter;
* the clock: two edges per cycle.

It then scales the counts against the unpruned zero-skip run, with
P_ref = 0.236 µW as the reference value for the block. On the test image
the estimate behaves as follows:

* Data-path activity falls steadily with sparsity. It drops about 52 % at
  65 %, and the estimated power drops from 0.236 to about 0.128 µW.
* The clock count is the same in every configuration. Its share grows from
  12 % to 28 %.
* CE lowers the data-path toggles by a further 10–16 %. Its detector and
  counter add about 140 k toggles per frame, so CE is slightly cheaper than
  zero-skip alone below about 40 % sparsity and more expensive above it. At
  65 % the estimates are 0.137 µW with CE and 0.128 µW without.

Gate-level measurements of this kind of design found CE never cheaper, at
any sparsity, because the gating logic and the clock tree both keep
switching. The register-level count here credits CE with more savings at low
sparsity than that. These are register-level counts on one synthetic image. They leave out
combinational logic and the clock tree, so they show trends only. Use a
gate-level activity dump for real numbers.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --top-module tb_conv1_pool1_top \
  -y rtl -y tb +libext+.sv rtl/conv1_pkg.sv tb/tb_conv1_pool1_top.sv
./obj_dir/Vtb_conv1_pool1_top
```

Replace the module name to run another testbench. `conv1_pkg.sv` must come
first on the command line. The full-size run takes a few seconds.
