# FELICS lossless image encoder, two pixels per clock

This is a hardware encoder for FELICS (fast, efficient, lossless image
compression system) on 8-bit grey-level images. FELICS predicts each pixel
from two neighbours that were coded before it. When the pixel lies between
them it is nearly uniformly distributed there, so it is sent with a
near-fixed-length *adjusted binary code*. When it lies outside, its distance
to the range is small with high probability, so it is sent with a
*Golomb-Rice code*. The encoder has no probability tables and needs only one
stored image row. Every pixel is coded in a fixed number of clocks.

The architecture:

* **Two-level parallelism.** Even and odd columns of a row are coded by two
  identical engines. Two pixels enter and two codewords leave each clock.
* **Four-stage pipeline.** The stages are the prediction template, then
  classification and code parameters, then codeword generation, then
  bit-stream packing.
* **Simplified adjusted binary code.** Three cheap steps replace the
  classic recursive formulation: parameter computation, circular rotation and
  codeword generation.
* **Storage-less Golomb-Rice parameter.** The parameter k follows from the
  neighbours' spread alone. Classic FELICS keeps a table of cumulative code
  lengths for every context (1024 entries for a variable k) to choose it.

## How a pixel is coded

For the current pixel P with reference pixels N1 and N2:

    L = min(N1, N2)   H = max(N1, N2)   delta = H - L

| case        | condition     | bits sent                                  |
|-------------|---------------|--------------------------------------------|
| raw         | first two pixels of the image | the 8 pixel bits            |
| in range    | L <= P <= H   | `0`, then adjusted binary code of P - L    |
| below range | P < L         | `10`, then Golomb-Rice code of L - P - 1   |
| above range | P > H         | `11`, then Golomb-Rice code of P - H - 1   |

### Reference pixels (prediction template)

| position of P         | N1                     | N2                     |
|-----------------------|------------------------|------------------------|
| row 0, columns 0 and 1 | none: raw             |                        |
| row 0, column c >= 2  | P[0][c-1]              | P[0][c-2]              |
| row r > 0, column 0   | P[r-1][0]              | P[r-1][1]              |
| row r > 0, column c > 0 | P[r][c-1] (left)     | P[r-1][c] (above)      |

### Simplified adjusted binary code

The in-range sample x = P - L takes one of `range = delta + 1` values. Its
parameters are:

    upper_bound = ceil(log2(range))      lower_bound = floor(log2(range))
    threshold   = 2^upper_bound - range  shift       = (range - threshold) / 2

1. **Parameter computation** (`abc_param`) forms the four values above. The
   lower bound is the position of the leading one of `range`. The upper bound
   is one more unless `range` is a power of two.
2. **Circular rotation** (`abc_rotation`) computes
   `r = (x - shift) mod range`. The middle of the range is the likeliest part
   and moves to `0 .. threshold-1`. Both ends move to
   `threshold .. range-1`.
3. **Codeword generation** (`abc_codeword_gen`): if `r < threshold`, r is
   sent in `lower_bound` bits. Otherwise `r + threshold` is sent in
   `upper_bound` bits. A long codeword's first `lower_bound` bits are never
   below `threshold`, so a decoder knows after `lower_bound` bits whether one
   more bit follows.

Worked example for delta = 4: range = 5, bounds 2 and 3, threshold = 3 and
shift = 1.

| P - L    | 0   | 1  | 2  | 3  | 4   |
|----------|-----|----|----|----|-----|
| rotated  | 4   | 0  | 1  | 2  | 3   |
| codeword | 111 | 00 | 01 | 10 | 110 |

When delta = 0 the range has one value, so an in-range pixel costs only its
`0` prefix.

### Golomb-Rice code and the choice of k

    k = max(floor(log2(delta + 1)) - 1, 0)

This gives delta 0..2 -> 0, 3..6 -> 1, 7..14 -> 2, and so on up to
127..254 -> 6 and 255 -> 7. A residual v is sent as `v >> k` ones, then a
zero, then the k low bits of v. With k = 0 a residual could need up to 256
bits. So a quotient of 16 or more is sent as an *escape*: 16 ones followed
by the 8 bits of v. The longest codeword is therefore 2 + 16 + 8 = 26 bits.

## Bit stream

Each clock, the bit-stream generator appends the even pixel's codeword, then
the odd pixel's. It outputs 64-bit words, first bit in the MSB (bit 63).
Within a row, pixels are in column order, so the stream is in plain raster
order.

How the accumulator works (`bitstream_generator`):

* It is a right-aligned shift register of 64 + 2x32 bits.
* Appending a codeword shifts the register left by the codeword's length and
  ORs the codeword in.
* Once 64 or more bits wait, the oldest 64 leave as a word.
* At most 63 bits wait between clocks. The longest pair of codewords is
  52 bits. So the register never overflows and the encoder never stalls.
* An assertion checks this.

At the last pixel pair of an image the remainder is flushed as a
left-aligned word. `out_nbits` gives its valid bits and `out_last` is set.
If the last pair brings the count above 64, a full word leaves in that clock
and the remainder in the next. That next clock may already carry the first
pair of the next image. Its codewords start a fresh accumulator, so images
follow each other with no gap. Each image's stream starts on a word
boundary and can be decoded on its own.

## Pipeline and timing

| stage | module                                       | work |
|-------|----------------------------------------------|------|
| 1     | `prediction_template` (+ `line_buffer`)      | raster position, row buffer read/write, N1/N2 selection, raw and last flags |
| 2     | `coding_engine` x2: `intensity_classifier`, `abc_param`, `gr_k_select` | L, H, delta, class, residual, code parameters, k |
| 3     | `coding_engine` x2: `abc_rotation`, `abc_codeword_gen`, `golomb_rice_coder` | codeword with class prefix |
| 4     | `bitstream_generator`                        | packing into 64-bit words |

Each stage ends in a register.

* A pixel pair presented in clock t has its codewords in stage 3 at t+3.
* Its bits are in a word at t+4 if that word fills then.
* Throughput is one pair per clock with no stalls.
* A W x H image presented without gaps finishes within W*H/2 + 5 clocks of
  its first pair.

The row buffer holds IMG_W/2 words of two pixels. It is read and rewritten
at the same address each clock, so the pair read back is the same pair of
the previous row. The even pixel's left neighbours come from a register
that holds the previous pair. The odd pixel's left neighbour is the even
pixel of the same clock.

## Interface (`felics_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset; returns to the top-left pixel and empties the accumulator |
| `in_valid` | in | 1 | a pixel pair is presented; gaps are allowed, no back-pressure |
| `in_pix_even`, `in_pix_odd` | in | 8 | pixels of columns 2j and 2j+1 of the current row, raster order |
| `out_valid` | out | 1 | `out_word` carries stream bits |
| `out_word` | out | `OUT_W` | stream bits, first in the MSB |
| `out_nbits` | out | 7 | valid bits in `out_word`; `OUT_W` except in a final word |
| `out_last` | out | 1 | final word of an image |
| `dbg_even`, `dbg_odd` | out | `lane_out_t` | each engine's stage-3 codeword, length and class, for observation |

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG_W` | 10 | pixels per row, even |
| `IMG_H` | 10 | rows per image |
| `OUT_W` | 64 | output word width |

The defaults match the 10 x 10 test image the encoder was characterised on.
For real images, set `IMG_W`/`IMG_H`; the row buffer then grows to
`IMG_W/2` x 16 bits. Shared types (`tmpl_t`, `cw_t`, `lane_out_t`, `cls_e`)
and the constants `CW_W` = 32, `LEN_W` = 6 and `GR_QLIM` = 16 are in
`felics_pkg`.

## What is from the original design and what is not

These parts come from the published description of this encoder:

* the FELICS split into in-range and out-of-range coding;
* L = min and H = max of the neighbours;
* the adjusted-binary formulas for range, upper bound, lower bound and
  threshold, and the worked delta = 4 code table;
* the three-step simplified coder (parameters, circular rotation, codeword
  generation);
* Golomb-Rice coding for the out-of-range pixels;
* uncoded first two pixels;
* two engines for even and odd samples;
* four pipeline stages.

The description quotes table sizes for k selection: 1024 entries for a
variable k and 256 for a fixed k. It does not say what a 256-entry table
would hold. This design follows the table-free selection the description
names and keeps no table at all.

The description leaves the rest open. These are this implementation's own
choices:

* the neighbour template away from the first two pixels (the usual FELICS
  one);
* the shift-number formula (chosen because it reproduces the code table);
* the out-of-range residual minus one;
* the class prefixes `0`/`10`/`11`;
* the Golomb-Rice unary form, its 16-ones escape and the k mapping (the
  description names only a table-free selection);
* the split of work between stages;
* the output word format, the flush and the reset.

A decoder written for another FELICS variant will not read this stream
unless it makes the same choices.

Not included:

* **Colour-difference preprocessing.** It is named as an option, but
  without a definition. The encoder codes grey-level images only.
* **Image preparation.** Conversion of a colour image to grey level and
  resizing is left to software.
* **A decoder.** The testbenches contain a behavioural one
  (`tb/felics_ref_pkg.sv`).

Published FPGA results for the original implementation (about 33.7 MHz,
83 slice registers, 203 four-input LUTs) are not a target of this RTL. The
row buffer and the 116-bit accumulator alone take more registers than that.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

* `abc_param`, `abc_rotation`, `abc_codeword_gen`, `gr_k_select`,
  `golomb_rice_coder`: exhaustive over all inputs, against integer reference
  formulas. These tests also cover the delta = 4 code table, prefix-freeness
  and decodability.
* `intensity_classifier`: 100,000 random triples plus corner cases.
* `coding_engine`: 20,000 random pixels against the reference encoder
  (`tb/felics_ref_pkg.sv`). It also checks the two-clock latency.
* `prediction_template`: random images with input gaps, at 6 x 4 and
  10 x 10. It checks the neighbours, the raw flags and the last flags.
* `bitstream_generator`: 20,000 random codeword pairs. It rebuilds the
  stream and covers every way an image can end.
* `tb_felics_top`: the whole encoder at its default parameters, 31 images
  back to back and with gaps. The first is the 10 x 10 test image. The
  stream is decoded by the reference decoder and compared pixel for pixel.
  The test counts raw, in-range, below and above pixels, zero-length codes,
  escapes, two-word image ends and flushes that overlap the next image, and
  fails if any count is zero. It also checks the W*H/2 + 5 clock bound.
  The 10 x 10 test image takes 824 bits, against 800 bits raw. That image is
  a heavily downsampled photograph with little correlation between
  neighbours.
* `tb_felics_vga`: one 640 x 480 image (about 30 s of simulation). It comes
  out as 778,351 bits, 2.53 bits per pixel, in 153,603 clocks.

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/felics_pkg.sv tb/felics_ref_pkg.sv tb/tb_felics_top.sv \
        --top-module tb_felics_top -o sim
    ./obj_dir/sim

Replace the testbench file and the top-module name to run the others.

## Files

`rtl/felics_pkg.sv` (types and constants), `rtl/felics_top.sv`,
`rtl/prediction_template.sv`, `rtl/line_buffer.sv`,
`rtl/coding_engine.sv`, `rtl/intensity_classifier.sv`, `rtl/abc_param.sv`,
`rtl/abc_rotation.sv`, `rtl/abc_codeword_gen.sv`, `rtl/gr_k_select.sv`,
`rtl/golomb_rice_coder.sv`, `rtl/bitstream_generator.sv`. Testbenches
`tb/tb_<module>.sv`, plus `tb/tb_felics_vga.sv` and the reference model
`tb/felics_ref_pkg.sv`.
