# Full-parallel 2-D 9/7 lifting DWT with merged scaling

This is a one-level, two-dimensional discrete wavelet transform (CDF 9/7 filter
pair, lifting form) that consumes an image at 2M pixels per clock and produces
one column of each of the four sub-bands (LL, LH, HL, HH) per clock. It follows a
published full-parallel architecture whose main point is where the lifting
scaling is done. A separable 9/7 lifting transform normally scales the low-pass
output by K and the high-pass output by 1/K, in the row pass and again in the
column pass. Here both passes stay unscaled and the scaling is done once, at the
very end:

| sub-band | row scale x column scale | applied here |
|----------|--------------------------|--------------|
| LL       | K x K                    | x K^2        |
| LH       | K x 1/K                  | none         |
| HL       | 1/K x K                  | none         |
| HH       | 1/K x 1/K                | x 1/K^2      |

Only LL and HH need a multiplier, M/2 of each. In the flipping-scheme variant of
the same structure, the scale factors no longer cancel, so every sub-band needs
its own multiplier. The saving is the reason this lifting version uses fewer
multipliers at large block sizes. The flipping variant is not included here.

At the default size (M = 16 rows per strip, 512-pixel rows) the datapath holds
exactly the counts of the reference design at block size 32:

* 128 lifting cells (one constant multiplier and two adders each);
* 16 scaling multipliers, so 144 multipliers and 256 adders in all;
* 2048 words of on-chip line memory (4N for N = 512).

## How an image is fed: strips

The image is cut into horizontal strips of M rows. A strip is fed one column
pair per cycle, left to right, so an M x N strip takes N/2 cycles. Strips follow
each other top to bottom with no gap needed, so a 512 x 512 frame takes
512*512 / 2M cycles (8192 at M = 16, 16384 at M = 8).

In cycle n of a strip, row m of the strip presents two pixels:

* `x_odd[m]` = image column 2n. In the lifting equations this is x(m,2n-1), the
  sample being predicted.
* `x_even[m]` = image column 2n+1. In the lifting equations this is x(m,2n), its
  neighbour.

Three flags go with each pair:

* `in_valid`: the pair is presented this cycle. When it is low, every register
  in the design holds.
* `in_first_col`: high on the first pair of each strip (n = 0). The row pipelines
  then start from zero, and the column counter restarts.
* `in_first_strip`: high on every pair of the first strip of a frame. The carry
  from the strip above then reads as zero.

A strip must contain exactly N/2 valid pairs. The line buffers are addressed by
column index, so a strip of another length misaligns the carry into the next
strip. An assertion in `column_processor` reports a strip that starts early.

## The lifting section

Everything is built from one unit, `lifting_section`. It holds four lifting cells
in series, each computing `a + c*(b + d)`. For a pair (a, b) and the previous pair
(marked ') it computes

    s1 = a   + alpha * (b  + b')      predict
    s2 = b'  + beta  * (s1 + s1')     update
    s3 = s1' + gamma * (s2 + s2')     predict  -> high-pass
    s4 = s2' + delta * (s3 + s3')     update   -> low-pass

It passes (b, s1, s2, s3) on as the carry for the next pair. These are the
standard 9/7 lifting steps. The only question is where the "previous pair" comes
from:

* **Row processor.** Each of the M rows has one section. The previous pair is the
  previous clock cycle, so the carry goes into four 12-bit registers per row.
  Rows are independent. All M of them work in parallel, four lifting cells deep,
  in one cycle.
* **Column processor.** The column of M values from the row processor is lifted
  across its rows in space, not in time. Section k takes rows (2k, 2k+1), and its
  previous pair is section k-1 in the same cycle. The M/2 sections form a chain,
  but each stage of section k needs only stage outputs of section k-1. The logic
  depth is therefore four lifting cells whatever M is. There is no ripple through
  the sections.

## Crossing strip boundaries: R1..R4

Section 0 of the column lifting needs the carry of the last section of the strip
above, for the same image column. That strip went through N/2 cycles earlier.
Each column block therefore has four line buffers, R1..R4 (`r_line_buffer`),
N/2 words each, one for each carry word b, s1, s2 and s3. In every cycle, for the
current column index:

1. the buffer returns the word stored one strip earlier, and section 0 uses it;
2. the buffer stores the current last section's word in the same place, for the
   strip below.

This makes the column transform continuous over the whole frame height. The
output is exactly a 1-D lifting of each full image column, as if the column
processor held all H rows at once. The testbenches check it against that.
`in_first_strip` forces the buffer outputs to zero, which is the top border of a
new frame. The memories themselves are never cleared.

The column index that addresses the buffers is kept in `column_processor`. It is
0 on the cycle with `in_first_col` and counts valid cycles, wrapping after N/2.

## Pipeline and timing

```
 x_odd/x_even --> row processor --> [pipeline register] --> column processor --> v_ll, v_lh,
 (M pairs)       (M sections,        u_l, u_h, flags         (2 blocks x M/2       v_hl, v_hh
                  4 regs per row)                             sections, R1..R4,     (M/2 each)
                                                              scaling)
```

Take a pair accepted at a rising edge while `in_valid` is high. Its sub-band
column is on `v_*` with `out_valid` high during the next clock cycle, so the
latency is one cycle. The outputs come combinationally from the pipeline
register through the column logic and are not registered. The critical path runs
through four lifting cells and one scaling multiplier; the row processor's path
is four lifting cells.

The column processor has two blocks:

* The low-pass block lifts the row low-pass columns u_l. It gives
  `v_lh = s3` and `v_ll = K^2 * s4`.
* The high-pass block lifts u_h. It gives `v_hl = s4` and `v_hh = s3 / K^2`.

Output lane k of a strip s belongs to global section g = s*M/2 + k.

## Which coefficient appears where (borders)

The transform is causal. No sample is read ahead, and nothing past the edge of
the image is read.

**Along a row.** The row output in strip cycle n is:

* the high-pass coefficient centred on image column 2n-2;
* the low-pass coefficient centred on image column 2n-3.

**Down a column.** It works the same way. Output g is:

* the high-pass coefficient centred on image row 2g-2;
* the low-pass coefficient centred on image row 2g-3.

So LL at output (g, n) is centred on (row 2g-3, column 2n-3), and HH on
(row 2g-2, column 2n-2).

The transform treats samples before the first column and above the first row as
zero. The first two outputs in each direction are therefore border terms. The
last high-pass coefficient and the last two low-pass coefficients of each row
(and of each frame column) are never produced: the next strip or frame starts
first. The source does not say how the image edges are handled. Symmetric
extension would need extra flush cycles, which the N/2-cycles-per-strip schedule
does not have. If exact edge coefficients matter, pad the image before feeding
it.

## Number format and accuracy

* **Pixels.** 8-bit unsigned, zero-extended. There is no DC level shift.
* **Words.** Every intermediate and output word is 12-bit two's complement,
  integer only (`dwt_pkg::W`).
* **Constants.** 12-bit signed with 10 fraction bits, rounded from the CDF 9/7
  values:

  | constant | value        | 10-fraction-bit code |
  |----------|--------------|----------------------|
  | alpha    | -1.586134342 | -1624                |
  | beta     | -0.052980118 | -54                  |
  | gamma    | 0.882911076  | 904                  |
  | delta    | 0.443506852  | 454                  |
  | K^2      | 1.321590     | 1353                 |
  | 1/K^2    | 0.756664     | 775                  |

  (K = 1.149604398.) The source does not print the constants or their format.
* **Rounding.** Each product is rounded to nearest: add half an LSB, then shift
  right arithmetically. Each sum saturates at the 12-bit limits.
* **Range.** For 8-bit input, a bound computed from the lifting steps puts every
  intermediate value within +-1244. Twelve bits are enough, and the saturation
  never triggers on pixel data; it only guards other inputs.
* **Measured accuracy.** On a smooth test image the outputs are within 6 LSB of a
  real-valued 9/7 transform computed in the same order. The error comes from
  rounding in eight lifting steps and from the coarse beta code (-54/1024 against
  -0.05298).

## Parameters

| parameter        | default | meaning                                          |
|------------------|---------|--------------------------------------------------|
| `M` (top)        | 16      | rows per strip. Block size (pixels per cycle) is 2M. The reference design was evaluated at 2M = 16 and 32. |
| `N` (top)        | 512     | pixels per image row. The line buffers hold N/2 words. |
| `dwt_pkg::W`     | 12      | word width                                       |
| `dwt_pkg::PIX_W` | 8       | pixel width                                      |

M must be even and N/2 at least 2. The frame height can be any multiple of M.

## What is taken from the source and what is not

Taken from the source:

* the lifting equations;
* row processor, pipeline stage and column processor, with their low-pass and
  high-pass blocks;
* the section chaining and the R1..R4 carry;
* the merged scaling: which sub-band gets K^2 or 1/K^2, and which gets none;
* the sizes: 512 x 512, 8-bit pixels, 12-bit words, block sizes 16 and 32, and
  the 4N words of on-chip memory.

Choices of this design (the source is silent on them):

* the lifting constant values and the fixed-point format;
* rounding and saturation;
* the valid/flag interface, the stall behaviour and the asynchronous active-low
  reset;
* zero borders, and the causal output placement described above;
* the R1..R4 buffers as N/2-word memories with read-before-write. Drawn as single
  boxes, they are sized from the on-chip memory count.

The row processor is built from the equations alone, because no drawing of its
insides was available. The frame buffer that supplies strips is outside the
design.

## Files

Design, `rtl/`:

| file                     | content                                             |
|--------------------------|-----------------------------------------------------|
| `dwt_pkg.sv`             | widths, constants, `word_t`, the carry struct `carry_t` |
| `lifting_cell.sv`        | one lifting step `a + c*(b+d)`                      |
| `lifting_section.sv`     | four lifting cells in series                        |
| `row_processor.sv`       | M row sections with their carry registers           |
| `r_line_buffer.sv`       | one of R1..R4                                       |
| `col_lifting_array.sv`   | M/2 chained sections plus R1..R4, shared by both column blocks |
| `scaling_unit.sv`        | M/2 constant multipliers                            |
| `col_lowpass_block.sv`   | LH, and LL x K^2                                    |
| `col_highpass_block.sv`  | HL, and HH x 1/K^2                                  |
| `column_processor.sv`    | both blocks plus the column counter                 |
| `dwt2d_lifting_top.sv`   | row processor, pipeline register, column processor  |

Testbenches, `tb/`:

* `dwt_ref_pkg.sv` is an independent reference model. It does whole-row and
  whole-column lifting on integer arrays, plus a real-valued version. Its
  constants are derived from the real values.
* There is one self-checking testbench per module, `tb_<module>.sv`.
* `tb_dwt2d_lifting_top.sv` streams four 512 x 512 frames through the default
  configuration, with and without idle cycles. It checks:
  * every output word;
  * the one-cycle latency and the 8192-cycle frame time;
  * that stalls, strip carries, row restarts and frame restarts all occurred.
* `tb_dwt2d_p16_workload.sv` does the same for block size 16 (M = 8), including
  the 16384-cycle frame time.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv rtl/*.sv tb/tb_dwt2d_lifting_top.sv \
  --top-module tb_dwt2d_lifting_top -Mdir obj_top
./obj_top/Vtb_dwt2d_lifting_top
```

The full-size run takes well under a second. To run another testbench, replace
the testbench file and the top module name. `verilator --lint-only -Wall -Irtl
rtl/dwt_pkg.sv rtl/<module>.sv` lints a single module. The only remaining
warnings are package constants that a given module does not use.
