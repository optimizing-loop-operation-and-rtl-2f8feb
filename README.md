# A loop-optimised convolution accelerator for VGG-style CNNs

This is synthesizable SystemVerilog for a convolution-layer accelerator built around one idea:
**finish every output pixel inside its multiplier–accumulator before moving on**. A 3x3
convolution layer is four nested loops:

| loop | runs over | here |
|------|-----------|------|
| Loop-1 | the kernel window, `Nkx x Nky` | serial, one kernel position per cycle |
| Loop-2 | the input feature maps, `Nif` | serial, right after Loop-1 |
| Loop-3 | the output map plane, `Nox x Noy` | unrolled `PIX x PIY` = 14 x 14 |
| Loop-4 | the output feature maps, `Nof` | unrolled `POF` = 16 |

Loops 1 and 2 produce the partial sums of one output pixel, and both run serially inside the
multiplier–accumulator (MAC). So a partial sum is never written anywhere, and only
`PIX x PIY x POF` = 3,136 sums exist at any time, one per MAC. Loops 3 and 4 are spread across
the MAC array. Their unroll factors are the same for every layer, so every layer maps onto the
array the same way, whatever its kernel or map count. They also give two kinds of data reuse:

* in a cycle, **one weight** goes to all 196 MACs of an output map;
* **each pixel** goes to the 16 MACs at the same (x, y), one per output map. Pixels are then
  passed from register to register, so each pixel of a tile's input window enters the
  registers only once per input map.

With the default sizes, one job covers all input maps and either a whole map or a horizontal
stripe of one. Every pixel and weight of a layer then crosses the DMA streams exactly once.

The data is fixed point: 16-bit pixels, 8-bit weights and 30-bit partial sums. The decimal point
of the results is set per layer.

## Block diagram

```
             weights (8 b)              pixels (16 b)                pixels out (16 b)
  DMA ==wt_*==>+                 +<==in_*== DMA               DMA <==out_*==+
               |   dma_manager   |                                          |
               +----+-------+----+------------------------------------------+
                    |       |                                               ^
             weight_buffer  input_pixel_buffer (14 banks)        output_pixel_buffer (14 banks)
              (16 w/word)         | 14 words/cycle                    ^          ^  |
                    |             v                                   |  drain   |  | 2x2 max
                    +----> conv_pe_array ---> psum_quantizer ---------+          |  v
                           conv_reg_array + 14x14x16 mac_unit                pooling_unit
                                   ^
            conv_controller -------+  (phases, loop counters, buffer addresses, drain)
```

`cnn_accel_top` wires these together. The scatter-gather DMA engines and the DRAM are outside
the design. Their data streams are the top's `wt_*`, `in_*` and `out_*` ports.

## The pixel register dataflow

This is the part of the design that is hardest to follow. Each of the `PIY` rows of the MAC
array has a row of `W = PIX + K - 1` pixel registers in front of it (`conv_reg_array`). MAC column
`x` always multiplies register `K-1+x`. One kernel weight is applied per cycle, kernel row by
kernel row. The registers move so that, at every step `(ky, kx)`, the register in front of
MAC (x, y) holds padded input pixel `(y + ky, x + kx)` of the tile:

* **Kernel row 0.** Every register row is fed by its own input-buffer bank. At `kx = 0` a whole
  buffer word (`PIX` pixels) lands in registers `K-1 .. W-1`. At each later `kx` the row shifts
  left by one, and pixel `kx-1` of the next word enters on the right. After `K-1` shifts the row
  holds all `W` input pixels of its row segment, in order.
* **Kernel rows 1 .. K-1.** The window moves down one input row, and that row is exactly what
  the register row below has just collected. So at `kx = 0` row `y` copies row `y+1`, rotated by
  `K-1` positions so the taps see the first window column. At each later `kx` it rotates left by
  one. Only the bottom row needs new pixels: it reads bank `ky-1`, which holds the next padded
  input row, the same way as in kernel row 0.

Example with 3 x 3 MACs, a 3 x 3 kernel and the 6 x 6 map `11 .. 66` with one pixel of zero
padding. These are the registers of row 1 (positions 0..4) after each step:

| step (ky,kx) | reg 0 | reg 1 | reg 2 | reg 3 | reg 4 | source |
|---|---|---|---|---|---|---|
| 0 (0,0) | – | – | 0 | 0 | 0 | bank 0, word 0 |
| 1 (0,1) | – | 0 | 0 | 0 | 0 | shift, bank 0 word 1 slot 0 |
| 2 (0,2) | 0 | 0 | 0 | 0 | 0 | shift, slot 1 |
| 3 (1,0) | 13 | 14 | 0 | 11 | 12 | row 2 rotated |
| 4 (1,1) | 14 | 0 | 11 | 12 | 13 | rotate |
| 5 (1,2) | 0 | 11 | 12 | 13 | 14 | rotate |

In row 2, step 3 shows `23 24 0 21 22`. The bottom row reads `0 31 32` from bank 0, where padded
row 3 is stored. `tb_conv_reg_array` checks this example and then random tiles.

Each step reads one word from every bank, `Nif x K x K` words per bank and tile. In most of those
reads only one pixel is taken: one for each row at `kx > 0`, and one only for the bottom row at
`ky > 0`. Over a tile and input map, the registers take in exactly the
`(PIY+K-1) x (PIX+K-1)` input window, each pixel once. All other reuse comes from moving pixels
between registers.

## Buffers and their layout

* **Input pixels** (`input_pixel_buffer`): 14 banks of 5,120 words, 14 pixels per word. Padded
  row `r` of every input map is in bank `r mod 14`, at word
  `(map * rows_per_bank + r / 14) * words_per_row + column / 14`. Consecutive rows are in
  different banks, so kernel row 0 reads all 14 rows of a tile in one cycle. Zero padding is not
  stored. The read path zeroes every slot outside the real-pixel window, and the loader places
  real pixels at their padded position.
* **Weights** (`weight_buffer`): 36,864 words of 16 weights. A word holds the weights that the
  16 output-map slices use in the same cycle. Its address is
  `((of / 16) * Nif + if) * 9 + ky * 3 + kx`.
* **Output pixels** (`output_pixel_buffer`): 14 banks of 2,048 words, 14 pixels per word. Output
  row `r` of a map is in bank `r mod 14`. Draining a finished tile writes 14 rows in one cycle per
  output map, 16 cycles in all. Pooling reads two neighbouring rows in one cycle.

Together these are 27.2 Mbit, about the RAM that the reference FPGA implementation gives its
convolution buffers.

## One job

The host sets up `cfg` (`cnn_pkg::layer_cfg_t`) and pulses `start`. `cfg` holds the input maps
`nif`, the output maps `nof` (a multiple of 16), the width and height, which sides get zero
padding, the result shift `frac_shift`, and the `relu_en` and `pool_en` flags. `conv_controller`
then runs these phases in order:

1. **Load weights**: `nof * nif * 9` weights on the `wt_*` stream, in (out map, in map, ky, kx)
   order.
2. **Load pixels**: `nif * niy * nix` pixels on the `in_*` stream, in (map, row, column) order,
   without padding.
3. **Convolve.** The loops, outermost first, are: tile row, tile column, group of 16 output
   maps, input map, ky, kx. One step is issued per clock. A step reads one word per input bank
   and one weight word. One cycle later, the data and the step controls go to the PE array.
   The MACs accumulate one cycle after that, and on a tile's last step they latch the
   finished sums.
4. **Drain.** The PE array signals that a tile is finished. For each of the 16 output maps in
   turn, the sums pass through `psum_quantizer` and are written to all 14 output banks. The
   quantizer shifts right by `frac_shift`, applies ReLU if enabled and saturates to 16 bits.
   The drain overlaps the next tile. The next tile's last step waits while a drain is still
   running. This **stall** only happens when `nif * 9 < 19`, that is for one or two input maps.
5. **Pool** (if `pool_en`). `pooling_unit` does 2x2 max pooling with stride 2 in place, at 3
   cycles per pooled word.
6. **Store**: the final maps go out on `out_*` in (map, row, column) order, at one pixel per
   two cycles. Then `done` pulses.

The convolution phase takes exactly
`ceil(Noy/14) * ceil(Nox/14) * (nof/16) * nif * 9` cycles plus the stall cycles. Run over
VGG-16's 13 convolution layers, that is 4,893,696 cycles: 32.6 ms at 150 MHz. The reference
implementation reports about 33.6 ms of convolution time per image. Loading, pooling and storing
come on top, because this design does not overlap them with computation.

Streams use valid/ready. A beat moves on a clock edge where both are high.

### Fitting VGG-16

No layer fits in the buffers whole, so a layer is run as several jobs. A job covers either the
whole map with a subset of the output maps, or a stripe of rows with all output maps. The
stripe's halo rows are part of its input, and its padding flags mark only the true image
borders. With the default sizes:

| layers | split |
|---|---|
| conv1_1 – conv2_2, conv3_2, conv3_3 | stripes of 28 output rows, all output maps |
| conv3_1 | whole map, 2 jobs of 128 output maps |
| conv4_1 | whole map, 2 jobs of 256 maps |
| conv4_2, conv4_3, conv5_x | whole map, 4 jobs of 128 maps |

The hardware does not check that a job fits. Choosing the split is up to the host.

## What is this design's own

The loop scheme, the unroll factors, the register dataflow, the interleaved input banks, the
data widths and the block structure follow the published architecture. The following are this
design's own choices, because the source is silent on them:

* the layer descriptor, the one-job-per-layer-or-stripe model, and the phase order without
  overlap;
* the buffer depths and word layouts, the output banking, and zero padding made on read;
* the drain path, a result register in each MAC so the next tile can start at once, and the
  stall rule;
* rounding by truncation, saturation and optional ReLU when narrowing sums to pixels;
* 2x2 max pooling in place as a separate phase (VGG-16's pooling);
* the DMA manager's stream orders and handshakes.

Stride is fixed at 1, and the kernel size `K` is a parameter (default 3). Not built:
fully-connected layers (how the source computes them is not described), the DMA engines, the
DRAM, and a control path that the block diagram draws from the pooling unit to the PE array
without explaining it.

## Files

`rtl/` holds one module or package per file:

| file | content |
|---|---|
| `cnn_pkg.sv` | widths, `layer_cfg_t`, `layer_geom_t` |
| `layer_geometry.sv` | padded sizes, output sizes, rows per bank, words per row |
| `mac_unit.sv` | one PE |
| `conv_reg_array.sv` | pixel register rows |
| `conv_pe_array.sv` | register array + `PIX x PIY x POF` MACs |
| `psum_quantizer.sv` | 30-bit sums to 16-bit pixels |
| `input_pixel_buffer.sv`, `weight_buffer.sv`, `output_pixel_buffer.sv` | on-chip buffers |
| `pooling_unit.sv` | 2x2 max pooling |
| `dma_manager.sv` | stream ↔ buffer addressing |
| `conv_controller.sv` | phases, loops, drain |
| `cnn_accel_top.sv` | the accelerator |

`tb/` has one self-checking testbench per block (`tb_<module>.sv`) and three end-to-end
testbenches:

* `tb_cnn_accel_top` runs a 4 x 4 x 8 array over four jobs;
* `tb_cnn_accel_full` runs the default 14 x 14 x 16 array over two jobs;
* `tb_vgg_conv5` runs the default array over jobs cut from VGG-16 layers. One is a group of
  16 output maps of a conv5 layer, with 512 input maps. Another is the top 28-row stripe of
  conv1_1, 224 pixels wide, whose 64 output maps fill the output buffer.

The end-to-end testbenches compare every output pixel with a reference convolution written in
plain SystemVerilog. They also check the cycle count of the convolution phase and count each
mechanism: drain stall, zero padding, rows handed up, ReLU, saturation and pooling. Each
testbench prints `TB_RESULT checks=N failures=M`.

Simulating with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/cnn_pkg.sv tb/tb_cnn_accel_top.sv \
          --top-module tb_cnn_accel_top -Mdir obj_top -o sim
./obj_top/sim
```

The same command works for any `tb_*.sv` file. The package has to come first, and
`-Irtl -Itb` lets Verilator find the other modules by name. The full-size testbench takes about
a minute to build and run.

## Changing it

* `PIX`, `PIY`, `POF` and `K` are parameters of `cnn_accel_top`. Pooling needs `PIX` and `PIY`
  to be even, and the register hand-over needs `K - 1 <= PIY`.
* `nof` must be a multiple of `POF`.
* The buffer depths are parameters. Addresses are computed with 16-bit counters, so keep each
  buffer under 65,536 words.
* Supporting larger strides would change the register moves. With stride 1, a register row
  takes over the row below it exactly, and that no longer holds for other strides.
