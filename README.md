# An output-stationary neural-network accelerator with two size knobs

This is synthesizable SystemVerilog for a configurable inference accelerator modelled on
Gemini, the near-memory accelerator described in *Performance Modeling and Estimation of a
Configurable Output Stationary Neural Network Accelerator*. The whole design is sized by two
parameters:

* **WPAR**: how many neighbouring output pixels of one feature-map row are computed at once;
* **MPAR**: how many filters (output channels) are computed at once.

The accelerator has NPE = WPAR × MPAR processing elements (PEs). Each PE owns one output pixel
("output stationary"). It accumulates one product per clock cycle until the pixel is complete,
then quantizes the pixel back to 8 bits. Both knobs also shape the memories: the feature-map
SRAM has WPAR banks that are MPAR bytes wide, and the weights SRAM is NPE bytes wide. Because
the schedule is a fixed loop nest, a layer's run time follows from its shape and the two knobs
with no data dependence. The RTL meets that formula to the cycle.

Defaults: WPAR = 4, MPAR = 8 (32 PEs), 8-bit signed pixels and weights, 640 KiB of fmaps SRAM
plus 640 KiB of weights SRAM. The RTL is written for any WPAR, MPAR ≥ 2. Eleven configurations
have been simulated with exact results, from (2,2) to (2,32) and (32,3).

## Block structure

```
               +------------------------------- tpu -----------------------------------+
 fmaps RAM ==> | ifmap mixer  --pixels-->  +-----------+                                |
 (WPAR banks)  |                           | PE array  | --5-cycle quant--> storing ====|==> fmaps RAM
               |                           | WPAR×MPAR |                    stage       |    (write ports)
 weights RAM =>| weights mixer --weights-->+-----------+                                |
 (NPE bytes)   |        ^                                                               |
               |        +------ tpu_controller (descriptors, loop nest, addresses) -----+
               +-----------------------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/gemini_pkg.sv` | widths, enums, layer-descriptor field map |
| `rtl/pe.sv` | one PE: MAC (or max) accumulator, then a 5-cycle quantizer |
| `rtl/pe_array.sv` | WPAR × MPAR PEs with common control |
| `rtl/ifmap_mixer.sv` | rotator + channel select from the fmaps banks to the PEs |
| `rtl/weights_mixer.sv` | picks each PE's weight out of a weights word |
| `rtl/storing_stage.sv` | drops unwanted results, writes the rest to the fmaps banks |
| `rtl/tpu_controller.sv` | reads layer descriptors and runs the loop nest |
| `rtl/tpu.sv` | the five blocks above wired together |
| `rtl/fmaps_ram.sv`, `rtl/weights_ram.sv` | the two SRAMs, written as arrays |
| `rtl/gemini_top.sv` | TPU + SRAMs + host load/read ports (the top) |

## The schedule

A network runs layer by layer. Each layer reads its input tensor from the fmaps RAM and writes
its output tensor back into the fmaps RAM. The PE array performs one *step* per clock cycle.

**Convolution, depthwise convolution and max pooling** use this loop nest:

```
for mg  in filter groups of MPAR               (ceil(M/MPAR))
  for yo in computed rows                      (H with vertical "same" padding, else H-R+1)
    for xo0 in column groups of WPAR           (ceil(W/WPAR), over the full input width W)
      for c < C, r < R, s < S : one step       (C = 1 for depthwise and pooling)
```

In a step, PE (w, m) multiplies the input pixel (c, yo+r−pad_top, xo0+w+s−pad_left) by tap
(c, r, s) of filter mg·MPAR+m and adds the product to its accumulator. The first step of a
group (c = r = s = 0) starts a new sum. After its last step, all NPE sums move into the quantizer
together, and the next group's steps begin in the next cycle. Depthwise layers use channel
mg·MPAR+m in PE row m. Pooling replaces multiply-accumulate with a running maximum.

The array always computes every column of the input width and, with a stride, every row. The
stride and the horizontal padding do not change the run time. The unwanted results are
discarded later by the storing stage. This spends a few PE operations to keep the mixers simple.
The cycle count of a layer is therefore

    ceil(M/MPAR) · rows · ceil(W/WPAR) · S·R·C

**Fully connected layers** compute NPE output neurons per group. Each step broadcasts one input
neuron to all PEs, together with a weights word that holds a different weight for every PE.
A layer takes ceil(Nout/NPE) · Nin cycles.

**Fixed overhead.** Each layer also spends 18 cycles fetching and decoding its descriptor and
9 cycles letting its last results drain through the quantizer and storing stage. The final
end-of-network descriptor costs another 18 cycles. Between asserting `start` and `done`, the
accelerator is busy for exactly Σ(steps + 27) + 18 cycles. The testbenches check this count
to the cycle.

For the VGG-like network below, at the default configuration, this gives 442,240 compute
cycles and 442,555 cycles in total.

## Memory layout

**Feature maps.** Pixel (c, y, x) of a tensor that starts at word `base` is stored here:

* bank: x mod WPAR
* lane (byte within the word): c mod MPAR
* word: base + ((c div MPAR)·H + y)·ceil(W/WPAR) + x div WPAR

One word row across all banks therefore holds WPAR neighbouring pixels for MPAR channels. That
is exactly one group of PE-array results, so the storing stage writes a whole group in one
cycle.

A fully connected output of N neurons is stored as a tensor with min(N, MPAR) channels,
height 1 and width ceil(N/MPAR). Neuron n goes to lane n mod MPAR of column n div MPAR.
A fully connected layer reads its input in word order: lane, then column, then row, then
channel group, stopping after Nin neurons. Weights for a layer that follows a convolution must
be ordered the same way.

**Reading a shifted window.** Because of the filter offset s and the padding, the WPAR pixels
needed in a step start at an arbitrary column. The controller gives every bank its own
address, so that each bank delivers the one pixel of the window it holds. The first pixel of
the window then comes out of bank `rot`. The ifmap mixer rotates the banks by `rot`, which
takes about NPE·ceil(log2 WPAR) multiplexers, and selects the channel lane. Columns outside the
tensor are replaced by the padding value: 0, or −128 for pooling.

**Convolution weights.** Filter group mg occupies ceil(S·R·C / WPAR) words from the layer's
weight base. Tap k = (c·R + r)·S + s of filter m is in word k div WPAR, at byte
(k mod WPAR)·MPAR + m. A word is therefore read once every WPAR steps, and the weights mixer
picks one slot of it per step. Each filter's tap goes to its whole PE row. The same words are
read again for every row and column group.

**Fully connected weights.** The weight of input i for output neuron g·NPE + p is in word
base + g·Nin + i, at byte p.

**Layer descriptors** live in the weights RAM. Each descriptor is 16 words long, and field i is
in the low 32 bits of word i. The first descriptor is at address 0.

| field | contents |
|---|---|
| 0 | bits [2:0]: type (0 end, 1 conv, 2 depthwise, 3 max pool, 4 fully connected); bit 3: ReLU; bit 4: vertical "same" padding; bit 5: horizontal "same" padding; bits [7:6]: log2 of the stride |
| 1–3 | C, H, W of the input tensor |
| 4 | M: filters (conv), channels (depthwise/pool, = C), or Nout (fully connected) |
| 5–6 | R, S: filter height and width |
| 7–8 | word addresses of the input and output tensors in the fmaps banks |
| 9 | Nin (fully connected only) |
| 10–11 | quantization scale (16-bit unsigned) and right shift |
| 12–13 | OH, OW: output height and width; for fully connected, 1 and ceil(Nout/MPAR) |
| 14 | weights-RAM address of the next descriptor |
| 15 | weights-RAM address of this layer's weights |

Output sizes follow from the loop nest:

* rows = H with vertical padding, otherwise H−R+1; OH = (rows−1)/stride + 1
* last kept column = W−1 with horizontal padding, otherwise W−S; OW = last/stride + 1
* "same" padding puts (R−1)/2 rows above the input and (S−1)/2 columns to its left

The layer's output region must not overlap its input region.

## The storing stage

Kept results satisfy three conditions: column ≤ last kept column, column a multiple of the
stride, and row a multiple of the stride. Result w of a group becomes output column
ox = (xo0+w)/stride of output row yo/stride. It is written to bank ox mod WPAR. The kept
results of one group are consecutive output columns, at most WPAR of them, so no two of them
target the same bank. A small mixer routes each result to its bank, and the whole group is
written in one cycle with one register stage of delay. The stage runs in parallel with the PE
array and needs its own write port on every fmaps bank.

## PE and quantization

The accumulator is 32 bits wide. For a convolution, it is loaded with the first product and
adds one product per cycle after that. For pooling, it keeps a running maximum instead. When
the pixel is finished, the sum enters a 5-cycle quantization pipeline:

1. capture the sum;
2. multiply by the unsigned 16-bit scale;
3. add a rounding term of 2^(shift−1);
4. shift right arithmetically by `shift`;
5. saturate to [−128, 127], and clamp to 0 if ReLU is enabled.

The result appears 5 cycles after the last operand. The scale, shift and ReLU flag are layer
constants and must stay stable while results are in the pipeline. The controller guarantees
this by draining the pipeline between layers.

## Using it

1. Hold `rst_n` low, then release it.
2. While `busy` is low, load the weights RAM through `host_w_*` (descriptors and weights).
3. Load the input tensor through `host_fm_*` (`host_fm_we`, one bank word at a time).
4. Pulse `start`. The controller begins at descriptor 0.
5. Wait for `done`. It stays high until the next `start`.
6. Read results with `host_fm_re`. The data appear on `host_fm_rdata` one cycle later.

Host accesses are ignored while `busy` is high.

Simulating with Verilator (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/gemini_pkg.sv tb/gemini_model_pkg.sv tb/tb_gemini_top.sv --top-module tb_gemini_top
./obj_dir/Vtb_gemini_top
```

Replace `tb_gemini_top` with any testbench name. Every testbench prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_gemini_vgg` | The VGG-like network at full size, default parameters. The input is 128×128×1. Then come two 3×3 convolutions with 4 filters, 2×2 max pooling, two 3×3 convolutions with 8 filters, 2×2 max pooling, and two 3×3 convolutions with 16 filters. The last three layers are fully connected: 16384→32, 32→32 and 32→1. Random data. All 11 layer outputs are compared with the reference model, and the cycle count with the formula. About 2 s of simulation. |
| `tb_gemini_sweep` | 30 single-layer networks at default parameters, each loaded, run and checked on its own. Convolutions vary the 2D input size from 4×4 (16 pixels) to 32×32 (1024 pixels), the number of filters (1 to 32), the filter size (1×1 to 7×7, and 3×1), the stride (1, 2, 4, 8) and the padding. Depthwise and pooling layers vary size, stride and padding. Fully connected layers have Nin from 25 to 500 and Nout from 1 to 64. Every output pixel and every cycle count is checked. |
| `tb_gemini_top` | Six layers on a 3×2 array, chosen to exercise padding, stride-2 dropping, trailing-column dropping, unaligned (rotated) reads, partial filter groups, depthwise, pooling, two-group fully connected layers, saturation and ReLU. Counts each mechanism and fails if one never occurs. |
| `tb_gemini_configs` | One six-layer mixed network on eight configurations side by side: (2,2), (2,5), (5,3), (8,4), (7,6), (16,2), (2,32) and (32,3). Every output and the exact cycle count are checked for each. The helper `gemini_config_run` holds one configuration's run. |
| `tb_tpu` | The TPU with behavioural SRAMs: convolution, pooling, depthwise and fully connected layers. |
| `tb_tpu_controller` | Every step's addresses, routing, flags and storing tags against an independently generated step list. |
| `tb_pe`, `tb_pe_array`, `tb_ifmap_mixer`, `tb_weights_mixer`, `tb_storing_stage`, `tb_fmaps_ram`, `tb_weights_ram` | The individual blocks. |

`tb/gemini_model_pkg.sv` builds the RAM images for a network: descriptors, weights and input.
It also computes every layer's expected output with a direct loop over output pixels, and each
layer's expected step count from the formula above.

## What follows the source and what is this design's own

The following come from the published description:

* the two-parameter organisation, NPE = WPAR·MPAR;
* the fmaps SRAM as WPAR banks of MPAR bytes, and the weights SRAM as one NPE-byte bank that
  also holds layer information;
* 8-bit pixels and weights;
* PEs with an accumulation stage followed by a quantization stage that always takes 5 cycles;
* shifter-style mixers on both inputs of the PE array;
* a storing stage that discards the results made unnecessary by stride and horizontal padding;
* the step counts of the convolution and fully connected formulas;
* layer-by-layer execution;
* support for convolution, depthwise, pooling and fully connected layers.

The source's TPU was generated by high-level synthesis and its internals are not published.
Everything below is therefore a choice made for this RTL:

* **Layouts and formats.** The fmaps and weights layouts, and the descriptor format. The
  source says only that layer information is stored "compacted"; here it takes 16 words per
  layer.
* **Controller.** The explicit controller, and its 27-cycle per-layer overhead.
* **Quantization.** The quantization arithmetic and widths, and the optional ReLU. No bias is
  implemented; the source notes only that bias cycles are negligible.
* **Padding and stride.** The padding amounts and the −128 padding for pooling. Only
  power-of-two strides up to 8 are supported.
* **Column grouping.** Columns are grouped row by row. The source's formula groups the
  flattened W·rows pixels, so the two counts differ slightly when WPAR does not divide W.
* **Vertical padding in the formula.** The source writes the computed rows as
  H − (R−1)·pad_v. Here that term is read as 1 for a layer *without* vertical padding, which
  then computes H−R+1 rows, and as 0 for a layer with "same" padding, which computes H rows.
  The descriptor's padding bit has the opposite polarity: it is 1 for "same" padding.
* **Weights per cycle.** The source speaks of one weight broadcast to all PEs each cycle.
  Here, one tap per filter (MPAR weights) is taken each cycle and broadcast along that
  filter's PE row, since PEs working on different filters need different weights.
* **SRAM ports.** The fmaps SRAM has a read port and a write port per bank.
* **Host ports and reset.** The host load/read ports, and the asynchronous active-low reset.
* **Default sizes.** The defaults (4, 8) and the 640 KiB + 640 KiB split of the 1.3 MB of
  SRAM quoted for the VGG-like example.

Not covered here: the HLS flow, and the power, area and latency estimator that is the
source's main subject. Off-chip transfers are also not covered; the whole network must fit on
chip, as in the source.

## Limits worth knowing

* The network must fit in the SRAMs. At the defaults, the VGG-like network uses 16,787 of
  20,480 weights words and 16,643 of 20,480 words per fmaps bank, even with every layer's
  output kept in its own region.
* Dimensions are 16-bit. The "same"-padding offset must be below 16·WPAR columns.
* A fully connected layer can only follow a layer whose output is laid out as described above.
  No hardware flattening or reordering is done.
* Nothing checks that a layer's input and output regions are disjoint.
