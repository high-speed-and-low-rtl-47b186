# Multiplierless 2-D wavelet transform and inverse with 4-tap Daubechies filters

This RTL computes a multi-level 2-D discrete wavelet transform (DWT) of a
square image, and its inverse (IDWT). Both use the 4-tap Daubechies filter
pair. Each direction uses one transform module, which consumes or produces a
whole 2x2 block of samples per clock. The same module serves every level of
the decomposition: a small RAM feeds each level's LL subband back into the
module as the input of the next level. No multipliers are used. Every filter
tap is a sum of at most three signed powers of two, so each product is three
shifts, a carry-save adder and one adder.

The transform module is busy on every clock of a frame. An N x N image over
L levels takes

    (N/2)^2 + (N/4)^2 + ... + (N/2^L)^2 = (1 - 4^-L) * N^2 / 3  clock cycles

in each direction. That is 1344 cycles for the default 64 x 64 image with
3 levels. The sequencer adds two drain cycles per level on top of this.

The architecture follows a published design for JPEG-2000-style image
coders. The filter rounding, the number format, the border handling, the RAM
layout, the handshakes and the pipeline registers are this implementation's
own choices. Each is explained below.

## The filters

The low-pass taps are a(0..3). The high-pass taps follow the mirror rule
b(k) = (-1)^k a(3-k):

| tap | shift-and-add form          | value      | exact Daubechies |
|-----|-----------------------------|------------|------------------|
| a0  | 2^-1 - 2^-5 - 2^-10         | 0.467773   | 0.482963         |
| a1  | 1 - 2^-3 - 2^-5             | 0.843750   | 0.836516         |
| a2  | 2^-2 - 2^-6 - 2^-8          | 0.230469   | 0.224144         |
| a3  | -2^-3 - 2^-8 + 2^-10        | -0.127930  | -0.129410        |

These taps are not the nearest three-term values to the exact taps. They
were picked from all three-term candidates within 0.02 of each exact tap to
satisfy the two perfect-reconstruction conditions. These are
sum a(k)^2 = 1 and a0*a2 + a1*a3 = 0, and their combined error is below 4e-4.
The nearest-value rounding gives a reconstruction error of about 8 grey
levels. These taps give about 0.3 grey levels. The taps live in
`rtl/dwt_pkg.sv` as `sd_coef_t` constants (three `{en, neg, shift}` terms
each), and can be changed there.

Number format: samples are 20-bit two's complement with 6 fractional bits
(`DW`, `FRAC` in `dwt_pkg`). An 8-bit pixel p enters as p*64. Every shifted
term is truncated by an arithmetic right shift, and sums wrap at 20 bits.
At 3 levels the worst-case LL growth is about 1.67^6 * 255 * 64 < 2^19, so
nothing overflows. More levels need a wider `DW`.

## Forward transform module (`dwt_transform`)

The forward filter along a row is the decimated convolution

    L(n) = a0 x(2n+1) + a1 x(2n) + a2 x(2n-1) + a3 x(2n-2)
    H(n) = b0 x(2n+1) + b1 x(2n) + b2 x(2n-1) + b3 x(2n-2)

It is split into an even phase (x(2n+1), x(2n-1): taps 0 and 2) and an odd
phase (x(2n), x(2n-2): taps 1 and 3). Each phase is one processing element
(`pe`). A PE holds the previous sample of its phase in a register and forms
both its low-pass and its high-pass partial sum. Adding the two phases gives
L and H. A 2x2 block brings two samples of each of two rows, so four row PEs
produce L and H of both rows in one clock.

The column stage repeats the same structure on L and H. L of the upper row
plays the odd phase and L of the lower row the even phase. Here the delay
element is a line delay (`line_delay`) holding the value one block row
earlier. The low-pass sums give LL and the high-pass sums give LH. H gives
HL and HH in the same way. One register stage follows each filter stage, so
the coefficients of a block appear two cycles after it is accepted.

## Inverse transform module (`idwt_transform`)

The inverse module runs the synthesis bank, columns first. Each subband goes
through a PE with a line delay. LL and HL use the low-pass taps and LH and HH
use the high-pass taps. Each PE has two outputs: the even-phase output uses
taps 3 and 1, the odd-phase output taps 2 and 0:

    upper row of L(m) = a3 LL(m) + a1 LL(m-1) + b3 LH(m) + b1 LH(m-1)
    lower row of L(m) = a2 LL(m) + a0 LL(m-1) + b2 LH(m) + b0 LH(m-1)

H is formed likewise from HL and HH. The row stage applies the same two
phases along the rows, with a register as the delay, and gives the 2x2
output block.

**The one-block shift.** Both filter directions are causal, so the inverse
cannot return sample 2n until it has seen coefficient n+1. Output block
(r, c) therefore holds samples (2r-2 .. 2r-1, 2c-2 .. 2c-1). Block row 0 and
block column 0 lie before the image. The last two rows and columns are never
produced, because their coefficients (index N/2) were cut off by the forward
transform. This shift drives the rest of the inverse design.

## Borders

The delay elements are not preloaded. At the first block of a row, and at
the first block row of a level, the delayed operand is forced to zero
(`in_first_col`, `in_first_row`). This is zero padding before the image.
Each row yields N/2 coefficients, and the N/2+1-th, which would need the
samples past the end, is dropped. The transform is therefore not exactly
invertible near the bottom and right edges:

- After one level, the last 2 rows and columns are lost.
- After L levels, the last 2^(L+1) - 2 rows and columns are lost. That is
  14 for 3 levels.
- Everything else is rebuilt to within the tap rounding. The 64 x 64 test
  image, over 3 levels, comes back within 18/64 of a grey level.

## Running the levels: sequencers and RAM

`dwt2d` combines the transform module, a banked RAM (`bank_ram`), the input
multiplexer and the address sequencer (`dwt_seq`):

- Level 0 takes pixel blocks from outside.
- Levels 1 and up read the previous LL back from the RAM, one 2x2 block per
  clock.
- The line length of the column filters halves at every level. `line_delay`
  takes its length at run time, and `restart` resets its pointer between
  levels.

**RAM organisation.** The RAM holds N/2 x N/2 words in four banks, one per
(row parity, column parity). This lets a whole 2x2 block be read, or
written, in one cycle. LL word (r, c) goes to bank {r[0], c[0]} at address
(r>>1)*N/4 + (c>>1).

In the forward direction each new LL is written over the one being read. Its
write address never passes the read pointer, so no word is overwritten before
it is used.

The inverse direction cannot work in place like this, because each level
writes four times as much as it reads. An intermediate LL that is read at an
odd level therefore starts at bank row N/8; all others start at row 0. The
LL being read and the LL being written then never meet.

`idwt2d` with its sequencer `idwt_seq` works coarsest level first:

- At the coarsest level, LL comes from the input.
- Below it, LL comes from the RAM, through a three-way multiplexer.
- The multiplexer gives zero for the last two rows and columns, which were
  never produced.
- Output block (r, c) of an intermediate level is written as block
  (r-1, c-1), which undoes the one-block shift. This lines the
  reconstructed LL up with the next level's detail subbands.
- Blocks with r = 0 or c = 0 are dropped.

**Drain.** A level must not read the RAM before the previous level has
finished writing it. So after the last block of a level, both sequencers
wait two cycles until that block leaves the pipeline, and then start the
next level.

## Interfaces and timing

All modules use one clock (`clk`) and a synchronous active-low reset
(`rst_n`).

`dwt2d #(N, LEVELS)`:

- **Input:** `in_valid` / `in_ready`, with pixels `p00 p01 p10 p11` =
  (2r, 2c), (2r, 2c+1), (2r+1, 2c), (2r+1, 2c+1). Blocks arrive in raster
  order. `in_ready` is low while levels 1 and up run and during the drain
  cycles.
- **Output:** one block per transform cycle on `out_valid`, carrying
  `out_ll out_lh out_hl out_hh` and their position `out_level`, `out_row`,
  `out_col`. Level 0 is the finest. `out_ll_final` marks the last level,
  whose LL is the residual image. The output has no back-pressure.

`idwt2d #(N, LEVELS)`:

- **Input:** `in_valid` / `in_ready` with `in_ll in_lh in_hl in_hh`. Levels
  run from `LEVELS-1` down to 0, in raster order within a level. `in_ll` is
  used only at the coarsest level. `level` shows the level being accepted.
- **Output:** `out_valid` at level 0 only, with block counters
  `out_row`/`out_col` and samples `out_x00..out_x11`. The samples are in the
  internal format: divide by 64 for grey levels. Block (r, c) holds image
  samples (2r-2 .., 2c-2 ..).

`dwt_idwt_top #(N = 64, LEVELS = 3)` places the two processors side by side
with prefixed ports (`dwt_*`, `idwt_*`). They are independent. The forward
processor emits the finest level first, and the inverse wants the coarsest
level first. Chaining them therefore needs a frame store between them, which
is not part of this design.

Cycle counts for the defaults:

| | value |
|---|---|
| Busy cycles per frame, each direction | 1344 |
| Forward, first block accepted to last coefficient out | 1344 + 2*3 - 1 = 1349 cycles |
| Transform module pipeline latency | 2 cycles |
| Memory: LL RAM | 1024 x 20 bits |
| Memory: line delays | 8 x 32 x 20 bits |

Parameters: `N` must be a power of two, at least 8, with `N >> LEVELS >= 1`.
`N = 8, LEVELS = 3` is the smallest full decomposition; its transform module
is busy for 16 + 4 + 1 = 21 cycles.

## Differences from the architecture it follows

- **Coefficient values.** The architecture quantises the taps to a
  shift-and-add form but does not list the values. The values above are
  this design's.
- **Border handling and the one-block alignment.** Both are this design's.
  The original drawings show only a plain register or line delay.
- **Pipeline registers and drain cycles.** The original counts only the busy
  cycles. Here each frame takes 2 cycles per level more than the formula.
- **PE delay.** The original mentions three registers per PE. These PEs hold
  one delay element each, as the block diagrams draw them.
- **Level count.** The design is configured for 3 levels. The original's
  processing-time formula takes the decomposition all the way down
  (j = log2 N). `LEVELS` can be raised as long as `DW` has room, but then
  the border losses grow.
- **Cascade.** The original notes that three transform modules can be
  cascaded, one per level, for more throughput. Only the single-module
  processor is built here.
- **Not included.** The standard-cell implementation of the original
  (0.18 um, 588 x 588 um core, 28.5 mW at 50 MHz) is not reproduced; this is
  RTL only. The 512 x 512 pictures usually used with such processors need
  `N = 512`. That means 65536 words of LL RAM, which has not been simulated.

## Files

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | word format, tap encoding and the eight taps |
| `rtl/sd_mult.sv` | shift / carry-save / add constant multiplier |
| `rtl/line_delay.sv` | run-time-length line delay |
| `rtl/pe.sv` | processing element (register or line delay, two outputs) |
| `rtl/dwt_transform.sv`, `rtl/idwt_transform.sv` | forward and inverse transform modules |
| `rtl/bank_ram.sv` | four-bank LL RAM |
| `rtl/dwt_seq.sv`, `rtl/idwt_seq.sv` | level/block sequencers and RAM addressing |
| `rtl/dwt2d.sv`, `rtl/idwt2d.sv` | forward and inverse processors |
| `rtl/dwt_idwt_top.sv` | top level |
| `tb/tb_dwt_pkg.sv` | independent reference models (taps, one level forward and inverse, alignment) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/dwt2d_runner.sv`, `tb/idwt2d_runner.sv` | reusable drivers for the processor testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
Some also print the reconstruction error and cycle counts. To build and run
one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/dwt_pkg.sv tb/tb_dwt_pkg.sv tb/tb_dwt_idwt_top.sv \
        --top-module tb_dwt_idwt_top -o sim
    ./obj_dir/sim

`tb_dwt_idwt_top` runs the default 64 x 64, 3-level configuration end to end
and does the following:

- Decomposes a test picture, checking every coefficient bit-exactly against
  the reference model.
- Reconstructs the picture from the captured coefficients, checking every
  output sample against the reference and the inner 50 x 50 samples against
  the picture.
- Checks the 1344-cycle busy count in both directions.
- Checks that each mechanism occurs at least once: input stalls, refused
  input, RAM-fed blocks, level switches, border blocks and zero-filled LL.

Building it takes a few minutes, because of the reference model's large
arrays. The simulation takes well under a second.

The other testbenches use smaller sizes:

- `tb_dwt2d`: 16 x 16 and 8 x 8, both with 3 levels, including the 21-cycle
  case.
- `tb_idwt2d`: 16 x 16 with 3 levels and 32 x 32 with 2.
- Module testbenches: lines of 8 to 16 samples.
