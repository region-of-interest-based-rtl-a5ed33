# Approximate display rendering pipeline

A camera has to turn the scene it recorded into values that a specific
monitor reproduces correctly. This RTL does that per pixel, in three steps,
for 12-bit RGB:

```
 in_px ──► tone mapping ──► colour space conversion ──► EOTF compensation ──► out_px
          (sigmoid curve,    (3x3 matrix, 9 multipliers)  (inverse sRGB curve,
           3 sparse tables)                                3 sparse tables)
```

The point of the design is that each step is built from **approximate
components whose strength is a parameter**: sparse look-up tables instead
of full 4096-word tables, reduced fractional precision in the matrix
product, and adders whose low bits are replaced by an OR or by a copy of
one operand. Each knob trades output quality for block RAM, registers and
logic, and so for power. One set of parameter values is one point on that
quality/power trade-off, and one elaboration of the RTL. Choosing good
points is left to an offline search. The hardware only has to build
whatever point it is given, and to build it exactly, so that a
bit-accurate software model predicts its output.

## Interface and timing

`display_rendering_pipeline` (top):

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | active-low synchronous reset; clears only the valid pipeline |
| `in_valid`  | in  | 1     | `in_px` holds a pixel |
| `in_px`     | in  | 36    | `drp_pkg::rgb_t` = `{r, g, b}`, 12 bits each, scene-referred |
| `out_valid` | out | 1     | `out_px` holds a pixel |
| `out_px`    | out | 36    | display-referred (sRGB-encoded) pixel |

The pipeline accepts one pixel on every clock and has no back-pressure.
Each pixel leaves exactly **8 clocks** after it entered: 2 for tone mapping,
4 for the colour conversion and 2 for the EOTF step. Pixels are
independent, so gaps in `in_valid` simply travel through. Data registers
are not reset. The intended target is a mid-range FPGA at 266 MHz.
Every pipeline stage holds at most one multiplier, one adder or one table
read, but timing has not been checked on an FPGA.

## Sparse tables (`sparse_lut`)

Both non-linear steps are tables. A full table would hold 4096 words of
12 bits per channel: six such tables make 294,912 bits. A sparse table
stores far fewer words, using two levels of **uniform segmentation**:

1. The input range 0..4095 is cut into `N_SEC` equal *sections*
   (`N_SEC` = 1, 2, 4, ... 32).
2. Section `s` is cut into `N_SEG[s]` equal *sub-segments*, a power of two
   between 1 and the section width. Steep parts of a curve get many
   sub-segments and flat parts get few.
3. One word is stored per sub-segment, so the table holds
   `N_total = sum(N_SEG)` words.

Because every size is a power of two, finding the word is just bit slicing
and one small constant table of section base addresses:

```
OB   = 12 - log2(N_SEC)               bits of offset inside a section
s    = x >> OB                        section
off  = x & (2^OB - 1)
L    = OB - log2(N_SEG[s])            log2 of the sub-segment width
addr = BASE[s] + (off >> L)           BASE[s] = N_SEG[0] + ... + N_SEG[s-1]
frac = off & (2^L - 1)                position inside the sub-segment
```

Two output modes, chosen by `INTERP`:

* **No interpolation:** each word holds the function at the centre of its
  sub-segment. Every input in the sub-segment gets that word.
* **Linear interpolation:** each word holds the function at the start of
  its sub-segment. The table reads word `addr` and word `addr+1` (two read
  ports) and returns `y0 + round((y1 - y0) * frac / 2^L)`. Word `addr+1` is
  always the value at the start of the next sub-segment, even across a
  section boundary, because sub-segments are contiguous. The table holds
  one extra word, f(4096), so that the last sub-segment has an end point.

Example from the default EOTF table: `N_SEC = 4`, `N_SEG = {64, 1, 64, 256}`.
The first quarter of the input range, where the sRGB curve is steepest,
gets 64 words, one per 16 codes. The second quarter is a single word. The
last quarter gets one word per 4 codes. That is 385 words instead of 4096.

The contents are computed during elaboration from the reference curve
(functions in `drp_pkg`), rounded to the nearest code. The RTL describes
them as an initialised read-only memory, which FPGA tools map to a
pre-loaded block RAM. The two curves are:

* **Tone mapping:** a global sigmoid,
  `out = 4095 * L / (L + (h*I_a)^k)` with `h = 9`, `k = 0.6`, `I_a = 0.4`.
  The input is log-encoded: `L = 2^x` with `x = X_in/256 - 8`, that is,
  16 stops centred on code 2048.
* **EOTF compensation:** the inverse sRGB transfer function,
  `12.92*Y` below `Y = 0.0031308`, else `1.055*Y^(1/2.4) - 0.055`, with
  `Y = code/4095`.

A table takes 2 clocks: the first registers the read, the second registers
the interpolated result. It takes 2 clocks without interpolation too, so
the pipeline latency does not depend on the parameters.

## Colour space conversion (`color_space_conversion`, `csc_channel`, `approx_adder`)

Each output channel `i` is one `csc_channel`:

```
R ─►(×m_i1)─►[>> s1]─┐
                      (+ adder 1)─┐
G ─►(×m_i2)─►[>> s2]─┘            (+ adder 2)─►[>> F_IN]─► clamp 0..4095 ─► O_i
B ─►(×m_i3)─►[>> s3]──────────────┘
```

There are three places where precision is reduced on purpose:

* **Coefficient precision `F_CO[i][j]`.** The matrix is stored with 13
  fractional bits (`M_REF`). Channel `i` rounds coefficient `j` to
  `F_CO[i][j]` fractional bits. The coefficient multiplier shrinks
  accordingly; each of the 9 products fits one DSP multiplier.
* **Intermediate precision `F_IN[i]`.** Every product is shifted so that
  it keeps `F_IN[i]` fractional bits: an arithmetic right shift of
  `F_CO - F_IN` that drops bits, or a left shift where `F_CO < F_IN`. The
  adders and registers after it are `12 + 3 + 2 + F_IN` bits wide.
* **Approximate adders.** Each of the two adders (`approx_adder`) is cut
  at bit `A_P[i][k]`. The bits above the cut are added exactly. The bits
  below it are approximated:
  * `A_T = 0`, **lower-OR adder (LOA)**: the low bits are `a | b`. The
    carry into the exact part is `a[P-1] & b[P-1]`.
  * `A_T = 1`, **lower-select adder (LSA)**: the low bits are copied from
    one operand (`A_S = 0`: the first, `A_S = 1`: the second). There is no
    carry into the exact part.

  `A_P = 0` gives an exact adder. A split point is meaningful only up to
  `12 + F_IN` (the integer and fractional bits of the data), so larger
  values are clipped to that.

The last shift removes the `F_IN` fractional bits and is not approximated.
The result is clamped to 0..4095, because the matrix has negative entries
and an approximate sum can leave the range. A channel takes 4 clocks:
product, adder 1, adder 2, shift and clamp.

The matrix is a parameter. The default converts BT.2020 primaries to
BT.709/sRGB primaries. The right matrix depends on the camera and the
display.

## Parameters

All approximation parameters are top-level parameters. Their defaults, in
`drp_pkg`, are the example parameter set that this design was published
with:

| step | parameter | default |
|------|-----------|---------|
| tone mapping | `TM_INTERP_P`, `TM_N_SEC_P`, `TM_N_SEG_P` | 1 (linear), 1 section, {512} |
| colour conversion | `CSC_F_CO_P` | {{7,1,3},{8,0,13},{8,1,14}} |
| | `CSC_F_IN_P` | {4,0,2} |
| | `CSC_A_T_P` (0 = LOA, 1 = LSA) | {{1,0},{1,0},{0,1}} |
| | `CSC_A_S_P` | {{1,0},{1,0},{0,0}} |
| | `CSC_A_P_P` | {{10,0},{1,16},{6,0}}; 16 acts as 12 (clipped to `12 + F_IN`) |
| | `CSC_M_REF_P` | BT.2020 to BT.709 matrix, ×8192 |
| EOTF | `EOTF_INTERP_P`, `EOTF_N_SEC_P`, `EOTF_N_SEG_P` | 0, 4 sections, {64,1,64,256} |

Valid ranges, checked at elaboration where it matters: `N_SEC` is a power
of two up to 32, and each `N_SEG` entry is a power of two up to the section
width. `F_CO` goes up to 13 in the design space. 14 is accepted and gives
the same value as 13. `F_IN` is at most the largest `F_CO` of its row, and
`A_P` lies in `0..12+F_IN`. The exploration also requires at least 16 table
words (`sum(N_SEG) >= 16`). The hardware does not enforce that rule.

The colour-conversion arrays are packed arrays indexed `[row][column]`,
with index 0 first (`'{row0, row1, row2}`).

**The default set is an encoding example, not a tuned design point.** In
particular, the second adder of the green channel has its cut at bit 12
with no fractional bits, which ORs together the whole integer part of two
operands. On the training set below, the default set gives a maximum
ΔE of 161 and a mean ΔE of 22.4. Points that are useful for display
lie below a maximum ΔE of about 5 and a mean ΔE of about 2. A difference
below about 2 is seen only on close inspection. To use the pipeline, pick a parameter set from a quality/power
exploration and pass it as parameters. A full-precision build, with full
tables, 13 fractional bits and exact adders, serves as the reference.

Table storage: the default set needs 3 × (513 + 385) × 12 = 32,328 bits.
Full tables need 294,912 bits.

## Measured quality

`tb_training_set` runs the training set used to rate parameter sets
through two builds: the default set and the full-precision build. The
training set is the colour cube sampled in 128 steps per channel (the
7 MSBs), with random noise below the step size added, which gives
2,097,152 pixels. Both builds are checked bit for bit against models. The
testbench then reports the CIE76 ΔE between the two outputs, taking them
as sRGB values with D65 white. With a different parameter set (edit the
parameters of `u_apx`), the same testbench rates that set.

## Where this RTL makes its own choices

These points are not fixed by the method the design follows and were
chosen here:

* the valid-only streaming interface, the pipeline registers and the
  8-clock latency;
* the input encoding of the tone curve (16 stops, `x = X_in/256 - 8`) and
  its output scaling (full 12-bit range);
* which point of a sub-segment a table word holds (centre or start), the
  extra end-point word, and round-half-up in the interpolation;
* the LOA carry-in, taken from the lower-OR adder as first published, and
  which operand `A_S` selects;
* the coefficient format (sign plus 2 integer bits, range [-4, 4)),
  round-to-nearest of coefficients, truncating product shifts, and the
  final clamp;
* the conversion matrix;
* clipping `A_P` to `12 + F_IN`. One value of the example set (16, in
  green adder 2) exceeds that bound.

The offline exploration is not part of this RTL. It is a genetic
algorithm with non-dominated sorting (NSGA-II, or a region-of-interest
variant) that chooses the parameter set using resource, power and ΔE
models.

## Files

| file | content |
|------|---------|
| `rtl/drp_pkg.sv` | types (`rgb_t`, parameter arrays), default parameter set, reference curves |
| `rtl/display_rendering_pipeline.sv` | top: the three steps in a row |
| `rtl/tone_mapping.sv`, `rtl/eotf_compensation.sv` | one `sparse_lut` per channel |
| `rtl/sparse_lut.sv` | hierarchical sparse table with optional interpolation |
| `rtl/color_space_conversion.sv` | three `csc_channel` rows |
| `rtl/csc_channel.sv` | one output channel: multipliers, precision scaling, two adders |
| `rtl/approx_adder.sv` | LOA / LSA adder |
| `tb/drp_ref_pkg.sv` | bit-accurate reference models used by all testbenches |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_training_set.sv` | 2M-pixel training set, both builds, ΔE report |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_display_rendering_pipeline \
  -y rtl -y tb +libext+.sv rtl/drp_pkg.sv tb/drp_ref_pkg.sv tb/tb_display_rendering_pipeline.sv
./obj_dir/Vtb_display_rendering_pipeline
```

Replace the top module and file for another testbench. The packages must
come first on the command line. The block testbenches run in well under a
second. `tb_training_set` runs for about 10 seconds.

What the testbenches cover:

* every input code through four table configurations, including the
  8-section example `{1, 2, 4, 16, 4, 8, 4, 2}`;
* random and corner pixels through each row of the colour conversion and
  through an exact build, compared with the real-valued matrix;
* five adder configurations;
* the top at its default parameters, with a check of the 8-clock latency
  and of full throughput (an unbroken 4101-pixel burst). The test also
  counts how often each approximation changes a result: interpolation,
  shared sparse words, LOA, LSA, precision truncation, and clamping at 0
  and at 4095. A mechanism that never fires counts as a failure.

The reference models in `tb/drp_ref_pkg.sv` are written from the
arithmetic: division instead of bit slicing, and bit-serial adders. They
share only the curve definitions with the RTL.
