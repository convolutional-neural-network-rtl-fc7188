# FP16 3×3 convolution accelerator for a VGG11 network on a Cyclone V SoC

A VGG11 network, cut down to 32 × 32 RGB inputs and 10 classes, runs on the
ARM processor of a Cyclone V SoC board (DE1-SoC). The processor keeps the
network and does the cheap work: ReLU, max pooling, adaptive average pooling,
the fully connected layers, and the sum over input channels. It hands the
expensive part, the 3×3 convolutions, to FPGA logic. All values are IEEE 754
half precision (FP16). FP32 would double the memory needed. INT8 would lose
accuracy.

The FPGA logic does one small job many times. It takes one 3×3 kernel, one
bias and one square single-channel feature map of up to 32 × 32 pixels. It
returns the same-size map convolved with the kernel: stride 1, one pixel of
zero padding, bias added, no activation. A VGG11 layer with C_in input and
C_out output channels is C_in × C_out such passes. The host adds up the
results.

The design is built around a single idea: keep the arithmetic small. There
are **nine FP16 multipliers**, one per kernel tap, so all products of an
output pixel are formed in one cycle. A **single FP16 adder** then sums them
over nine cycles. The feature map is never held in registers. It stays in an
on-chip RAM, and only the nine pixels of the current window are fetched.
Holding the whole 32 × 32 map in registers was tried first: it needs a
16,384-bit register and a 14-to-16,384 decoder, and it does not fit the
device.

## Data path of one pass

```
 host ─► SDRAM ─► DMA ─► RX on-chip memory ─► read_ocm ─► conv_opt ─► write_ocm ─► TX on-chip memory ─► DMA ─► SDRAM
                        (ocm_ram, 4608 B)                (9 × fp16_mult,          (ocm_ram, 4608 B)
                                                          1 × fp16_add)
```

`cnn_system` is the FPGA top. It holds the two memories and `conv_pipeline`,
which wraps the reader, the convolution engine and the writer. The host, the
SDRAM, the two DMA controllers and the SoC's AXI bridges are not in the RTL.
Each memory's DMA-side port is brought out of `cnn_system` as a plain
byte-wide port (`rx_*`, `tx_*`). So is the control interface:

| port | dir | meaning |
|---|---|---|
| `start` | in | one-cycle pulse: load the kernel and convolve one map |
| `fm_dim[5:0]` | in | side of the map, 1…32 (sampled with `start`; larger values are clamped to `DIM_MAX`) |
| `finish` | out | high from the end of the pass until the next `start` |
| `progress[15:0]` | out | output pixels written so far |
| `rx_addr/rx_write/rx_writedata/rx_readdata` | | DMA side of the RX memory |
| `tx_addr/tx_write/tx_writedata/tx_readdata` | | DMA side of the TX memory |

Both memories have a registered read. The byte for the address presented in
cycle *t* appears in cycle *t+1*. A new `start` restarts the pipeline from any
state.

### Memory layout

Every FP16 value is stored as two bytes, low byte first.

| RX bytes | content |
|---|---|
| 0 … 17 | weights w0 … w8, kernel row-major (w0 top-left, w8 bottom-right) |
| 18 … 19 | bias |
| 20 … 20 + 2·d² − 1 | input map, row-major |

The TX memory holds the d × d output map from byte 0, in the same order and
byte order. A 32 × 32 pass uses 2068 RX bytes and 2048 TX bytes. Each memory
is 4608 bytes, so the two together are 73,728 bits.

## The reader / engine / writer handshake

This is the part that sets the timing. All three blocks are strictly
sequential: nothing overlaps.

**`read_ocm`.** After `start` it reads the 20 kernel bytes, one per cycle. It
places value *i* in `weight_bias[16*i +: 16]`, so the bias sits in
`[159:144]`. It then raises `in_data_ready`, 22 cycles after the `start`
cycle. After that, each one-cycle `start_fm` pulse fetches the window of the
next output pixel in raster order. The reader tracks the row and column
itself.

A window has 18 byte slots: 9 pixels × 2 bytes. Window pixel k = 3·row + col
goes to `feat_map_in[16*k +: 16]`. The reader handles one slot per cycle. A
slot inside the map issues a RAM read, and the byte is collected one cycle
later. A slot outside the map is written as zero with no read. That is the
zero padding. `finish_fm` pulses 20 cycles after `start_fm`, and
`feat_map_in` then holds still until the next request.

**`conv_opt`.** The engine runs these steps for each pixel:

1. Pulse `start_fm`.
2. On `finish_fm`, register the nine products from its nine `fp16_mult`
   units. Load `acc` with the first product.
3. Step `add_idx` from 1 to 9, one addition per cycle through its one
   `fp16_add`: `acc += p1`, …, `acc += p8`, then `acc += bias`. Every
   addition is rounded to FP16.
4. Pulse `start_out` with `out_data = acc` and `out_idx` = raster index.
5. Wait for `finish_out`.

After d² pixels, `finish` goes high and `mult_idx` equals d² (1024 for a full
map).

**`write_ocm`.** It writes the low byte at 2·index and the high byte at
2·index + 1, one per cycle. It pulses `finish_out` three cycles after
`start_out`.

**Cycle budget per output pixel: 36.**

| cycles | step |
|---|---|
| 1 | request |
| 20 | window fetch |
| 1 | register the products |
| 9 | additions |
| 1 | hand-over |
| 3 | write |
| 1 | see `finish_out` |

A pass takes **24 + 36·d² cycles** from the `start` cycle to `finish`. For
32 × 32 that is 36,888 cycles, or 738 µs at 50 MHz. This is the same order as
the 840 µs reported for the original implementation of this architecture. No
clock frequency was given for that figure.

## FP16 arithmetic

The format is binary16: sign bit 15, exponent bits 14…10 with bias 15, and
fraction bits 9…0 (for example 0x416F ≈ 2.717). Both units are purely
combinational. The policies below are this design's own choice:

- results are rounded to nearest, ties to even, once per operation;
- subnormal inputs count as zero;
- results below 2⁻¹⁴ become a signed zero;
- overflow gives a signed infinity;
- 0 × ∞, ∞ − ∞ and NaN inputs give the quiet NaN `16'h7E00`;
- an exact cancellation gives +0.

- `fp16_mult`: 11 × 11-bit significand product, normalise by at most one
  place, round.
- `fp16_add`: does not use guard/round/sticky alignment. Both operands are
  placed exactly on a 41-bit fixed-point grid with unit 2⁻²⁴. That grid is
  wide enough for every normal binary16 value. The magnitudes are added or
  subtracted exactly, a leading-one search normalises the result, and it is
  rounded once. This is simple to reason about and exactly rounded, at the
  cost of wide shifters.
- `cnn_pkg::fp16_round_pack` is the single shared rounding step.

Because every step is rounded, the result depends on the order of the
additions: products left to right, bias last. Bit-exact reference models must
use the same order.

## Using it for VGG11

With a 32 × 32 input, the convolution layers run at map sizes 32, 16, 8, 8, 4,
4, 2 and 2. Each fits the 32-pixel limit and the 4608-byte memories one
channel at a time.

| layer | channels | passes | cycles per pass |
|---|---|---|---|
| conv1 | 3 → 64 @ 32² | 192 | 36,888 |
| conv2 | 64 → 128 @ 16² | 8,192 | 9,240 |
| conv3 | 128 → 256 @ 8² | 32,768 | 2,328 |
| conv4 | 256 → 256 @ 8² | 65,536 | 2,328 |
| conv5 | 256 → 512 @ 4² | 131,072 | 600 |
| conv6 | 512 → 512 @ 4² | 262,144 | 600 |
| conv7 | 512 → 512 @ 2² | 262,144 | 168 |
| conv8 | 512 → 512 @ 2² | 262,144 | 168 |

For small maps the fixed 24-cycle kernel load and the DMA transfers, which
are outside this RTL, weigh more and more against the 36 cycles per pixel. The
deep layers need hundreds of thousands of passes, so the cost of moving data
between SDRAM and the on-chip memories is expected to dominate there rather
than the arithmetic.

## What is this design's own choice

The block structure is taken from the original design:

- two on-chip memories between DMA controllers;
- a reader, a nine-multiplier / one-adder convolution engine, and a writer;
- the signal names and widths (`feat_map_in[143:0]`, `weight_bias[159:0]`,
  `in_data_dim[5:0]`, `mult_idx`, `add_idx`, `ocm0_addr[16:0]`, byte-wide
  memory data);
- the 32 × 32 FP16 map with one pixel of zero padding.

The following were not specified and were chosen here:

- the memory depth (4608 bytes each);
- the byte order: low byte first, consistent with a waveform of the original
  design;
- the order of weights, bias and map in the RX buffer;
- the slot-per-cycle fetch schedule;
- the one-cycle `start_fm`/`finish_fm` and `start_out`/`finish_out` pulses,
  and the fully sequential operation;
- the addition order;
- the rounding, subnormal, overflow and NaN policy;
- `fm_dim` as a run-time input, and the `start`/`finish` control ports;
- the memory collision rule: the DMA port wins, and out-of-range addresses
  read as zero.

The original design's per-pixel cycle count is not known, so the 36-cycle
budget is this design's alone.

Not in the RTL:

- ReLU, pooling and the classifier, which are host software;
- the host, SDRAM, DMA controllers and bus bridges, which are SoC hard blocks
  or vendor IP;
- the abandoned whole-map-in-registers variant.

A few status signals are left unconnected inside `conv_pipeline`:
`fm_save_idx`, `add_idx` and `n_written`. They exist for waveform debugging.

## Files

| file | content |
|---|---|
| `rtl/cnn_pkg.sv` | FP16 type, constants, shared rounding function |
| `rtl/fp16_mult.sv`, `rtl/fp16_add.sv` | FP16 multiplier and adder |
| `rtl/ocm_ram.sv` | byte-wide dual-port RAM (RX and TX memories) |
| `rtl/read_ocm.sv` | kernel and window fetch with zero padding |
| `rtl/conv_opt.sv` | 9 multipliers + 1 adder convolution engine |
| `rtl/write_ocm.sv` | result writer |
| `rtl/conv_pipeline.sv` | reader + engine + writer |
| `rtl/cnn_system.sv` | top: memories + pipeline |
| `tb/tb_fp16_ref.sv` | reference FP16 arithmetic via IEEE double |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_vgg_layers` |

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --top-module tb_cnn_system -y rtl -y tb +libext+.sv \
          rtl/cnn_pkg.sv tb/tb_fp16_ref.sv tb/tb_cnn_system.sv
./obj_dir/Vtb_cnn_system
```

Replace `tb_cnn_system` with any other testbench name.

- `tb_fp16_mult` and `tb_fp16_add` compare the units with reference results
  on directed cases and 20,000–30,000 random operand pairs. The reference
  computes the exact result in double precision and rounds it once to FP16.
- `tb_read_ocm` checks the kernel and every window (padding included) for
  5 × 5, 1 × 1 and 32 × 32 maps, and checks the 22- and 20-cycle latencies.
- `tb_conv_opt` drives the engine with reader and writer models, some with
  random latencies, and checks every result, the raster index and the
  36-cycle pixel time.
- `tb_conv_pipeline` checks whole maps of 6, 3 and 11 pixels and the
  24 + 36·d² cycle count.
- `tb_cnn_system` runs the whole design at its default sizes. It checks full
  passes at 32, 16, 8, 4 and 2 pixels and a pass restarted with a new size
  while running. It compares every output pixel and the cycle count, and it
  counts the padded fetches, kernel loads, size changes and restarts it saw.

- `tb_vgg_layers` uses the accelerator as the host would. It runs the whole
  first VGG11 layer: 3 → 64 channels at 32 × 32, which is 192 passes and
  about 9 million cycles, a few seconds in Verilator. It also runs a
  4 × 2-channel slice of a layer at each later size (16, 8, 4, 2). The host
  model sums the passes in FP16 and applies ReLU. Every pass output and its
  cycle count are checked.

The testbenches use only `$urandom` and two-state-safe code, so they do not
depend on X propagation.

To change the maximum map size, set `DIM_MAX`; `fm_dim` is 6 bits, so keep it
≤ 63. For the memory size, set `OCM_BYTES` on `cnn_system`. It must hold
20 + 2·DIM_MAX² bytes.
