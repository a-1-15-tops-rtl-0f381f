# A three-operation CNN processor for multi-scale object detection

This is synthesizable SystemVerilog for an 8-bit neural-network processor. It
runs an FSSD-style object detector for automotive cameras (KITTI-size
1280x384 input images). The network uses only three layer types:

* 3x3 convolution (stride 1 or 2, optional zero padding of one pixel),
* 1x1 convolution (stride 1 or 2),
* 4x4 deconvolution with stride 2, which doubles the feature map in both
  directions.

The deconvolution is what makes multi-scale detection possible. Downsampling
uses stride-2 convolution instead of pooling layers. Concatenation needs no
hardware: a concatenated channel group is just another pass that reads another
region of the input memory. Restricting the network to these operations keeps
the datapath a fixed SIMD array with no general-purpose machinery.

The processor has 16 *processor element clusters* (PECs) of 8 *processor
elements* (PEs) of 9 multipliers each, so 1152 8-bit MACs work in every
cycle. That is 1.15 TOPS at 500 MHz when every MAC is busy.

## Dataflow: passes over channel groups

A layer is computed as a series of **passes**. One pass takes one group of
input channels and produces partial results for a group of output channels
over the whole (tile of the) output map:

| layer type | input channels per pass | output channels per pass | MACs used |
|---|---|---|---|
| 3x3 convolution | 8 (one per PE) | 16 (one per PEC) | 16 x 8 x 9 = 1152 |
| 1x1 convolution | 64 (8 per PE) | 16 | 16 x 8 x 8 = 1024 |
| 4x4 deconvolution | 8 | 8 (two PECs per channel), 4 outputs each | 16 x 8 x 8 = 1024 |

Each pass adds to the partial sums of the passes before it. Those are kept on
chip in the PS (partial-sum) memory as 16-bit values. The last pass of a
layer applies batch normalisation and ReLU and streams out 8-bit
activations. Parallelism over both input channels (8) and output channels
(16) avoids two costs. Pure input-channel parallelism means re-reading inputs
from external memory. Pure output-channel parallelism means moving partial
sums in and out many times.

The weights are stationary. At the start of a pass each PEC pops one entry
from its **W buffer** (a FIFO) into its weight registers. The entry holds
72 weights plus the BN parameters of its output channel. The host can refill
the FIFO while the pass runs.

Inside a pass the window moves **down a column** by the stride. At the bottom
it starts again at the top of the next column. Every window position reads all
of its inputs from the IN memory again, so no line buffers are needed. One
window is issued per cycle.

## Number formats

| quantity | format |
|---|---|
| inputs / activations | 8 bit; signed only for the first layer, unsigned after ReLU |
| weights | 8 bit signed |
| products | 16 bit |
| PE sum | 20 bit (four-input 20-bit adders) |
| PEC accumulator | 32 bit (two-input 32-bit adders) |
| stored partial sum | 16 bit: `sat16(acc >>> ps_shift)` |
| BN scale A_c / offset B_c | 16 bit / 8 bit signed |
| BN result | 32 bit: `A_c * x + (B_c <<< b_shift)` |
| activation | `clamp(y >>> bn_shift, 0, 255)` with ReLU, else `clamp(.., -128, 127)` |

Batch normalisation with the convolution bias folded in is a single MAC per
channel: `y = A_c * x + B_c`, where `A_c = gamma/sqrt(var+eps)` and
`B_c = A_c*(b - mu) + beta`. A_c spreads over about four decades, so it gets
16 bits; B_c stays small and gets 8. The 16x16 product is built from four 8x8
multipliers (`nnp_bn_mac`).

Fixed-point positions change from layer to layer ("dynamic fixed point"). In
the hardware this appears as three per-layer shift amounts in the pass
descriptor. `ps_shift` converts between the 32-bit accumulator and the 16-bit
stored partial sum. When an old partial sum is read back, it is shifted left
by the same amount before it is added. `b_shift` aligns B_c to the product.
`bn_shift` selects the 8 output bits. Results saturate rather than wrap. Layers
without batch normalisation (the final prediction layers) set `bn_en = 0`;
with `relu_en = 0` they give signed 8-bit outputs.

## The PE and its three modes (`nnp_pe`)

A PE has nine multipliers and three four-input adders in a three-stage
pipeline:

1. the nine products are registered;
2. products 0-3 and 4-7 are summed, and product 8 is carried along;
3. the results are combined.

Input `pix[t]` is window pixel (r, c), with t = 3r + c. Each mode routes the
taps differently:

* **3x3 conv**: multiplier k gets `pix[k]`, and `out0` is the sum of all nine
  products.
* **1x1 conv**: `pix[0..7]` are eight channels of one pixel, and multiplier 8
  is idle.
* **4x4 deconv, stride 2, padding 1**: output pixel (2y+py, 2x+px) depends on
  a 2x2 block of inputs around input pixel (y, x). A 3x3 window centred on
  (y, x) therefore yields all four outputs (py, px in {0,1}), using 16
  products.
  * The 16 products are split over two PEs in neighbouring PECs (2k and
    2k+1). PEC 2k computes output row 2y and PEC 2k+1 computes row 2y+1
    (`half`).
  * In each of these PEs, multipliers 0-3 make output column 2x (`out0`) and
    multipliers 4-7 make column 2x+1 (`out1`).
  * Window column 1 feeds both outputs through small selectors.

For `half` = h, multiplier k < 4 reads window pixel (h + k/2, k%2), and
multiplier 4+k reads (h + k/2, 1 + k%2). So the W-buffer entry of a PE must
hold these kernel taps, where K is the 4x4 kernel in the usual
transposed-convolution orientation (`out[2i-1+ky][2j-1+kx] += in[i][j]*K[ky][kx]`):

    w[k]     = K[3 - h - 2*(k/2)][3 - 2*(k%2)]      k = 0..3
    w[4 + k] = K[3 - h - 2*(k/2)][2 - 2*(k%2)]      k = 0..3

Only the first layer's inputs are signed. The multiplier therefore computes
signed x signed or unsigned x signed products (`in_signed`). Both fit in
16 bits.

## The PEC (`nnp_pec`)

A PEC adds the eight PE results with a tree of 32-bit two-input adders.
Unless this is the first pass, it also adds the old partial sum from PS
memory. Which accumulators are used depends on the mode:

* In convolution this is ACC0.
* In deconvolution the PEC keeps two accumulators: ACC1 adds the `out0`
  values and ACC2 the `out1` values.
* ACC0 and ACC1 share one adder tree.

One cycle later the renewed 16-bit partial sums go back to PS memory. On the
last pass they go instead through the PEC's single BN MAC. A deconvolution
window gives two results per PEC, so on its last pass the controller issues a
window only every second cycle; the BN MAC takes `acc_a` first and `acc_b` one
cycle later (`act_sel`). Intermediate deconvolution passes run at full rate.

## Memories and aligners

All memories are 16 kB banks of 64-bit words (`nnp_sram`, single-port,
one-cycle read latency). There are 25 banks, 400 kB in all:

**IN memory (`nnp_in_mem`, banks a-i, 144 kB).** One word is one pixel of
eight channels. For 3x3 convolution and deconvolution, pixel (y, x) of a
channel group is stored in bank `3*(y mod 3) + (x mod 3)`, at word
`base + (y div 3)*pitch + (x div 3)`, with `pitch = ceil(W/3)`. With this
layout any 3x3 window hits each bank exactly once, so a whole window is read
in one cycle (576 bits). For 1x1 convolution the 64 channels of one pixel are
spread over banks a-d and f-i at word `base + y*W + x`. Bank e is not used.

**IN aligner (`nnp_in_aligner`).** It undoes the modulo-3 rotation of the bank
layout and transposes the data, so PE j gets channel j of all nine window
pixels. It writes zeros for pixels outside the map (zero padding). In 1x1 mode
PE j gets the eight channels of bank j, skipping bank e, and a dummy zero on
tap 8. All 16 PECs receive the same data.

**PS memory (`nnp_ps_mem`, 16 banks, 256 kB).** A 16-bit partial sum does not
fit the 8-bit lanes of a 64-bit word, so the banks work in pairs A-H. Bank X0
holds the upper bytes and bank X1 the lower bytes of 8 output channels.

**PS aligner (`nnp_ps_aligner`).** Pairs A-D serve PECs 0-7 and E-H serve
PECs 8-15. Each pass reads old sums from one set of pairs and writes new ones
to another, so no single-ported pair is read and written in the same cycle.

* Convolution uses one read pair and one write pair per half (`rd_pair`,
  `wr_pair`).
* Deconvolution uses two pairs to read and two to write: 2*`rd_pair[1]`(+1)
  and 2*`wr_pair[1]`(+1). That is twice the bandwidth of convolution.

The host swaps the read and write pairs from pass to pass. Lane p of a pair
word belongs to PEC p (or PEC 8 + p). The PS word address of a window is
`ps_base` plus its index in the scan.

## Timing of one window (`nnp_ctrl`)

| cycle | event |
|---|---|
| t | window issued: nine IN bank addresses |
| t+1 | IN data; aligner rotates and masks (registered) |
| t+2 .. t+4 | PE pipeline (products, partial adds, final add) |
| t+4 | PS read issued (not on the first pass) |
| t+5 | PEC accumulate (`acc_en`), old partial sums arrive |
| t+6 | PS write of renewed sums (not on the last pass); BN input |
| t+7 | activation out (deconvolution: second column at t+8) |

Each pass has some overhead around its windows:

* Before the first window, the controller waits until every W buffer holds an
  entry; the `stall` output is high while it waits. Loading the weights then
  takes one cycle.
* After the last window, the pipeline needs 10 cycles to drain before `done`.

With weights already loaded, a pass of N windows takes N + 12 cycles from
`start` to `done`, or 2N + 11 on the last pass of a deconvolution.

## Using the top level (`nnp_top`)

The ports of `nnp_top` are plain synchronous signals:

* `in_wr_*` writes one IN word. Use the layout above.
* `wb_push[i]` with `wb_data` pushes a W-buffer entry into PEC i. The entry
  (`nnp_pkg::wentry_t`) holds `w[pe][tap]`, `bn_a` and `bn_b`.
  * For convolution, PE j of PEC i holds the weights of input channel j of the
    group, for output channel i.
  * For 1x1 convolution, tap k of PE j is input channel 8j + k.
  * For deconvolution, PECs 2k and 2k+1 both carry output channel k, and the
    tap order is given above.
* `cfg` (`nnp_pkg::cfg_t`) describes the pass: operation, stride, padding,
  first/last pass, BN/ReLU enables, the three shifts, the PS pairs, the input
  height, width and pitch, and the IN and PS base addresses. Hold it stable
  while `busy`. Pulse `start` and wait for `done`.
* Activations appear on `act_valid` for output position (`act_y`, `act_x`)
  of the scan.
  * Convolution: `act[i]` is output channel i.
  * Deconvolution: PECs 2k and 2k+1 hold output channel k, rows
    2*`act_y` and 2*`act_y`+1; `act_sel` selects column 2*`act_x` or
    2*`act_x`+1.

Per pass, the maps must fit the on-chip memory:

* at most 2048 words per IN bank (for example a 135x135-pixel tile of eight
  channels for 3x3 convolution);
* at most 2048 output positions of partial sums per PS pair.

A full 1280x384 layer is therefore run as a series of tiles. The host moves
those tiles between external DRAM and the chip.

## What follows the source design and what is this implementation's own

These parts follow the processor's published description:

* the organisation: 16 PECs x 8 PEs x 9 multipliers, 9 IN banks and 16 PS
  banks of 16 kB with 64-bit words;
* the number formats;
* the three-stage SIMD PE with four-input 20-bit adders and 32-bit two-input
  adders in the PEC;
* the four-multiplier BN MAC;
* the per-PEC weight FIFOs;
* the column-wise scan;
* the pairing of PEs for deconvolution;
* the PS pair organisation, with doubled bandwidth for deconvolution.

These choices are this implementation's own:

* the IN memory layout and the modulo-3 aligner rotation;
* the exact deconvolution tap table and weight order;
* the shift-and-saturate realisation of dynamic fixed point;
* the pipeline cut points and latencies;
* the sharing of the ACC0/ACC1 adder tree;
* serialising the two deconvolution results through one BN MAC (half rate on
  the last deconvolution pass);
* the PS pair selection per pass, set by the host;
* the W-buffer depth (4) and entry format;
* the whole host interface, including streaming activations out rather than
  writing them back to on-chip memory;
* an asynchronous active-low reset.

What is not included:

* Tiling and the DRAM traffic schedule are the host's job.
* Idle PEs/PECs in layers with fewer than 8 or 16 channels are not gated off.
  Give them zero weights instead.
* The clock PLL is analog and is not included; `clk` is an input.
* Multipliers are written as `*`. The source uses 8x8 Wallace trees, and
  synthesis is left to build them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_nnp_mul8` | exhaustive, all four sign modes |
| `tb_nnp_pe` | three modes, random and extreme operands, 3-cycle latency |
| `tb_nnp_bn_mac` | random BN parameters and shifts, saturation both ways |
| `tb_nnp_w_buffer` | FIFO against a queue model, including full |
| `tb_nnp_pec` | partial sums in all modes, BN outputs, deconvolution serialisation |
| `tb_nnp_sram`, `tb_nnp_in_mem`, `tb_nnp_ps_mem` | memory models |
| `tb_nnp_in_aligner` | bank rotation, padding, 1x1 distribution |
| `tb_nnp_ps_aligner` | pair enables and routing, ping-pong |
| `tb_nnp_ctrl` | addresses, masks, strobe timing, stall, issue rate |
| `tb_nnp_top` | end to end at the default sizes |

`tb_nnp_top` runs six layers through the whole design:

* 3x3 convolution with padding, signed input and three passes (one of them a
  middle pass that both reads and writes partial sums);
* strided 3x3 convolution;
* 1x1 convolution over 128 channels;
* strided 1x1 convolution;
* a two-pass deconvolution;
* a layer without BN whose weights arrive late (weight stall).

It compares every activation with a reference model written directly from the
layer definitions; the deconvolution reference uses the scatter form. It also
checks the cycle count of each pass and requires every mechanism to occur,
including partial-sum saturation.

`tb_nnp_network` runs a small slice of the detection network as a chain of
layers, with the testbench acting as the host that copies each layer's
activations back into the IN memory:

* a stride-2 3x3 convolution of a signed 3-channel 12x16 image to 16 channels;
* a second stride-2 3x3 convolution (two passes);
* a two-pass 4x4 deconvolution back to 6x8;
* a concatenation of that result with the first layer's output (24 channels);
* a 1x1 prediction layer without BN.

Every layer is checked against an independent reference chain. The slice
averages about 400 MACs per busy cycle out of 1152, because on maps this
small the per-pass overhead and the partly filled PEs dominate.

To simulate with Verilator (the package first):

    verilator --binary --timing --assert --top-module tb_nnp_top \
        rtl/nnp_pkg.sv $(ls rtl/*.sv | grep -v nnp_pkg) tb/tb_nnp_top.sv
    ./obj_dir/Vtb_nnp_top

Swap the top module and testbench file to run any other testbench. All
parameters default to the sizes described above (2048-word banks, 16 PECs,
8 PEs); `nnp_top` exposes `MEM_DEPTH` and `WB_DEPTH`.
