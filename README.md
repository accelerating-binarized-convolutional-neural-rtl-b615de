# Binarized CNN accelerator (CIFAR-10) in SystemVerilog

A binarized neural network (BNN) constrains weights and activations to +1 or -1.
Encoding +1 as bit 0 and -1 as bit 1 turns every multiplication into an XOR, and a
dot product of N terms into `N - 2 * popcount(a ^ w)`. The arithmetic then fits in
LUT logic instead of DSP multipliers, and the feature maps become so small that all
of them fit on chip. This RTL implements an accelerator of that kind, following
the architecture described in "Accelerating Binarized Convolutional Neural Networks
with Software-Programmable FPGAs". It runs the CIFAR-10 BNN (six 3x3 conv layers,
three max-pooling steps, three dense layers) one layer at a time on three shared
compute units:

| unit | layers | what it does |
|---|---|---|
| FP-conv (`fp_conv_unit`) | first conv | 3x3 conv of the quantized 8-bit RGB image with binary weights |
| Bin-conv (`bin_conv_unit`) | conv 2-6 | binary 3x3 conv, optional 2x2 max pooling, batch norm, binarization |
| Bin-FC (`bin_fc_unit`) | dense 1-3 | binary dot products; the last layer gives integer class scores |

Two feature-map buffers, A and B (`data_buffer`), take turns: each layer reads one
and writes the other. A weight buffer (`weight_buffer`) is refilled from an
off-chip weight stream for each output map or neuron. The controller
(`bnn_controller`) steps through the layer table and reports the class with the
highest score. `bnn_top` wires these together.

## The network

The layer table `bnn_pkg::BNN_CIFAR10`, in execution order:

| # | kind | in | out | map width | pool |
|---|---|---|---|---|---|
| 0 | FP-conv | 3 | 128 | 32 | no |
| 1 | Bin-conv | 128 | 128 | 32 | yes |
| 2 | Bin-conv | 128 | 256 | 16 | no |
| 3 | Bin-conv | 256 | 256 | 16 | yes |
| 4 | Bin-conv | 256 | 512 | 8 | no |
| 5 | Bin-conv | 512 | 512 | 8 | yes |
| 6 | Bin-FC | 8192 | 1024 | - | - |
| 7 | Bin-FC | 1024 | 1024 | - | - |
| 8 | Bin-FC (scores) | 1024 | 10 | - | - |

These layers hold 14.02 million weight bits (13.4 Mibit), 8.0 Mibit of them in the
first dense layer. The source names the layer counts, 3x3 filters and these two
totals, but not the channel counts. The channel counts here are those of the
standard CIFAR-10 BNN, and they reproduce both totals. The table is a top-level
parameter (`LAYERS`, `NL`), so other networks built from the same layer kinds can
be run.

## Data representation

Everything hinges on how bits are packed, so this section is exact.

* **Word.** `WORD = 64` bits hold 64 pixels of one binary map in raster order. A
  32-wide map has 2 rows per word (16 words per map), a 16-wide map 4 rows (4
  words), and an 8x8 map is exactly one word.
* **Row and lane.** A data-buffer row holds `F_IN` words side by side, one per
  *lane*. One read therefore delivers one word from each of `F_IN` maps, which is
  what the `F_IN` convolvers consume in a cycle. Word `k` of map `m` lives in row
  `(m / F_IN) * WPM + k`, lane `m % F_IN`, where `WPM` is words per map.
* **Pooled 8x8 maps.** A pooled 8x8 map is 4x4 = 16 bits. Four consecutive maps
  share one word, map `m` in bits `(m % 4) * 16`. For addressing, those words are
  treated as maps with `WPM = 1`.
* **Dense vectors** are flat: bit `j` is bit `j % 64` of word `j / 64`, and word
  `f` is in row `f / F_IN`, lane `f % F_IN`. The output of the last conv layer
  (512 maps of 4x4) is already in this order, as the 8192-bit input vector
  `j = m * 16 + pixel`.
* **Image.** Pixel `p` (raster order) is in row `p / F_IN`, lane `p % F_IN`. The
  signed 8-bit channels R, G and B are in bits `[7:0]`, `[15:8]` and `[23:16]`. The
  image goes into buffer A through the `img_wr_*` port while the accelerator is
  idle.
* **Batch norm** is folded into one signed 16-bit threshold `T` and a `flip` bit
  per output map or neuron. The output is +1 when `sum >= T`, or when `sum <= T`
  if the batch-norm scale was negative (`flip = 1`). There is no bias term.

## Bin-conv unit

This unit does most of the work and has three kinds of parallelism:

* **Input maps (`F_IN`).** Each cycle, one data-buffer row feeds `F_IN`
  convolvers, one input map each.
* **Pixels (`WORD`).** Each convolver computes all 64 pixels of its word at once.
* **Output maps (`f_out = 1`).** One output map is built at a time.

**Convolver (`bin_convolver`).** Words of one map arrive in order. A one-cycle
`flush` follows the last word of each map. The line buffer holds the current word
and the last row of the previous word, sized for widths up to 32 and set by
`lw = log2(width)`. The row below comes from the next word as it arrives. When
that word or the flush arrives, the convolver emits the 64 partial sums of the
current word, registered one cycle later. Taps outside the map are skipped, which
is zero padding. Each sum lies in [-9, 9].

**Per output map**, the unit takes these steps:

1. **Load.** The weight buffer receives the map's batch-norm word and `Cin / F_IN`
   kernel rows. Row `g` holds the 9-bit kernels of input maps `g*F_IN .. g*F_IN+F_IN-1`,
   lane `l` in bits `[l*9 +: 9]`, sent as `ceil(9*F_IN/64)` stream beats.
2. **Convolve.** For each group `g`, words `k = 0 .. WPM-1` are read from row
   `g*WPM + k`, followed by one flush step. The `F_IN` partial-sum words are
   added, and the total is accumulated in the integer feature-map buffer
   (`int_fmap_buffer`, 16 words of 64 x 16-bit sums). The buffer is cleared by
   group 0.
3. **Output.** The `WPM` integer words go through pooling, batch norm and
   binarization, in that order (`pool_unit`, then `bn_binarize`).
   * Pooling works on the integer sums. A map with `flip = 1` takes the 2x2
     minimum instead of the maximum. Its binarization is decreasing in the sum, so
     the result still equals max pooling of the +1/-1 values.
   * A pooled word gives 16 bits, and four of them are packed into each output
     word.

Without stream stalls, one output map takes about
`1 + (Cin/F_IN)*ceil(9F_IN/64) + (Cin/F_IN)*(WPM+1) + 2 + WPM` cycles.

## FP-conv and Bin-FC

**FP-conv** scans the image once per output map, one pixel (all three channels)
per cycle, through a `2*32+3`-pixel line buffer. Once pixel `p` arrives, the 3x3
window of pixel `p - 33` is complete. The 27 taps add or subtract their pixels
according to the kernel bits (bit `c*9 + ky*3 + kx`), with zero padding. The total
goes through batch norm and binarization. The output bits are packed 64 to a word.
Each map takes about 1060 cycles plus a 2-beat weight load. This stage is
deliberately not parallelized. It takes about 20% of the run time.

**Bin-FC** handles one neuron at a time. It loads the neuron's batch-norm word and
`Cin/64` weight words (`F_IN` beats per row). It then compares one data row with
one weight row per cycle, `F_IN*64` bits at once, and accumulates the popcount.
Hidden layers binarize and pack 64 neurons per output word. The last layer emits
`sum - T` (or `T - sum` if `flip`) on `score_valid/score_idx/score`, and the
controller keeps the argmax. The weight load dominates, so the dense layers run
at the speed of the weight stream.

## Weight stream

`w_valid / w_ready / w_data` is a 64-bit stream with a valid/ready handshake. A
beat moves when both are high, and the source holds its data while `w_valid` waits.
It stands for the DMA engine and off-chip memory, which are not part of this RTL.
The stream carries the layers in table order. For each output map or neuron it
sends one batch-norm word (`[15:0]` = T, `[16]` = flip), then:

| layer | words after the batch-norm word |
|---|---|
| FP-conv | 1 word, kernel bits `[26:0]` |
| Bin-conv | `Cin/F_IN` rows of `ceil(9*F_IN/64)` words, lane kernels packed from bit 0 |
| Bin-FC | `Cin/64` words, input bit `j` in word `j/64`, bit `j%64` |

The accelerator pulls exactly this many words and stops (`w_ready` low) between
loads. Assertions in `weight_buffer` flag a beat that changes or disappears while
waiting for `w_ready`, and a load requested while another is in progress.

## Timing and size

At the defaults (`F_IN = 8`, full network), one image takes 655,127 cycles when the
weight stream never stalls. At 143 MHz that is 4.58 ms. The reported design takes
5.94 ms per image at that clock, including its DMA overheads, which are not
modelled here.

The approximate split is:

| layers | cycles |
|---|---|
| FP-conv | 136k |
| binary conv | 340k |
| dense | 180k |

On-chip memory is 311,904 bits:

| memory | bits |
|---|---|
| two data buffers | 2 x 131,072 |
| weight buffer | 32,768 |
| integer buffer | 16,384 |

## Where this RTL makes its own choices

The source gives the block structure, the parallelization scheme, `f_out = 1`, the
XOR encoding, the order pooling → batch norm → binarization, and the ping-pong
buffers. The following are choices of this design:

* the numeric sizes: `WORD = 64`, `F_IN = 8`, 8-bit pixels, 16-bit sums and
  thresholds
* all buffer layouts and the weight-stream format
* zero padding
* the threshold form of batch norm and min/max pooling by its sign
* the scoring rule of the last layer (`sum - T`, which assumes one batch-norm scale
  for all classes)
* load-then-compute without overlap
* the controller, which the reported design generates with its tool flow

The DMA engine, the off-chip DRAM and the host processor are outside the design.
Their interfaces are the image-write port and the weight stream.

## Simulation

All testbenches are self-checking and end with a
`TB_RESULT checks=<n> failures=<n>` line. `tb/bnn_tb_pkg.sv` holds pseudo-random
weights, thresholds and images generated from a hash of their indices, the
weight-stream builder, and a bit-level reference model. The reference model works
in the +1/-1 domain and pools binarized values, independently of the hardware
structure.

| testbench | covers |
|---|---|
| `tb_bnn_full` | all defaults, full network, one image; checks all 10 scores, the class and the cycle count (must beat 849,420 = 5.94 ms x 143 MHz); about 1.5 min |
| `tb_bnn_top` | reduced 8-layer network (`F_IN = 2`, 8 maps per layer, every layer kind and width) with a stalling stream; also counts that each mechanism occurred |
| `tb_bin_conv_unit`, `tb_fp_conv_unit`, `tb_bin_fc_unit` | one unit with the weight buffer and a memory model, every output bit |
| `tb_bin_convolver`, `tb_pool_unit`, `tb_bn_binarize`, `tb_int_fmap_buffer`, `tb_data_buffer`, `tb_weight_buffer`, `tb_bnn_controller` | block level |

Mechanisms counted by `tb_bnn_top`: FP-conv, Bin-conv with and without pooling,
Bin-FC, scoring layer, both batch-norm orientations, both buffer directions, four
pooled maps per word, stream stalls.

To run one, for example:

```
verilator --binary --timing -Irtl -Itb rtl/bnn_pkg.sv tb/bnn_tb_pkg.sv \
    tb/tb_bnn_full.sv --top-module tb_bnn_full -Mdir obj_full
./obj_full/Vtb_bnn_full
```

Other testbenches work the same way: replace the testbench file and module.
Verilator finds the remaining modules in `rtl/` and `tb/` by their file names.

## Changing it

* `F_IN` (top parameter): it must divide every binary-conv fan-in, and `F_IN*64`
  must divide every dense fan-in. For this network, any power of two up to 16
  works. The buffer depths follow from it (`2048 / F_IN` data rows,
  `512 / F_IN` weight rows).
* `LAYERS` / `NL`: the network. Conv widths must be 8, 16 or 32. The first layer
  must be FP-conv, and the last a scoring Bin-FC. Layers pooled at width 8 need a
  multiple of 4 output maps. The largest stack of maps must fit 2048 words.
* `WORD`, `IMG_W`, `PIX_W`, `SUM_W` are package constants. The convolver geometry
  assumes `WORD = 64`.
