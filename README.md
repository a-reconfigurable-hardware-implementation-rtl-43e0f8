# Multiplier-free three-octave discrete wavelet transform

This is synthesizable SystemVerilog for a one-dimensional discrete wavelet
transform (DWT) and its inverse, using the Daubechies 8-tap wavelet over three
octaves. The design takes a stream of 8-bit samples, at up to one per clock.
It produces the detail sequences H1, H2 and H3 and the coarse sequence L3, and
rebuilds the input from them. It uses no multipliers. Two ideas make it cheap
and fast:

* **Polyphase filter banks.** Each octave filters and then keeps only every
  other output (decimation). The inverse inserts zeros between samples and
  then filters (interpolation). Both are rearranged so that the hardware never
  computes an output that is thrown away and never multiplies an inserted
  zero. Every 8-tap filter is split into an even-tap branch and an odd-tap
  branch of 4 taps each.
* **Distributed arithmetic (DA).** Each inner product of four samples with
  four coefficients is computed one bit plane at a time. Bit *j* of the four
  samples addresses a 16-entry table of precomputed coefficient sums. The
  table outputs are then weighted by 2^j and added. The two 4-tap polyphase
  branches of a filter are exactly the two 4-input tables of a
  "partitioned-LUT" DA filter, so one adder combines them.

The architecture follows the polyphase + distributed-arithmetic DWT of
"A Reconfigurable Hardware Implementation of the One-Dimensional Discrete
Wavelet Transform". That work evaluated it on a Xilinx Virtex FPGA. The number
formats, handshakes, alignment buffers and pipelining here are this design's
own choices. They are listed under "Departures and choices" below.

## What is computed

Forward transform, one octave (Mallat's algorithm), with the filters written
as FIR taps:

    L_k[n] = sum_{i=0..7} H0[i] * L_{k-1}[2n - i]      (low pass, decimated)
    H_k[n] = sum_{i=0..7} H1[i] * L_{k-1}[2n - i]      (high pass, decimated)

Here L_0 is the input. Inverse transform, one octave:

    L_{k-1}[n] = sum_m L_k[m] * G0[n - 2m] + sum_m H_k[m] * G1[n - 2m]

The coefficients are the standard orthogonal Daubechies 8-tap set:

| tap | H0 (analysis LP) | H1 (analysis HP) | G0 (synthesis LP) | G1 (synthesis HP) |
|----:|-----------------:|-----------------:|------------------:|------------------:|
| 0 | -0.0106 | -0.2304 |  0.2304 | -0.0106 |
| 1 |  0.0329 |  0.7148 |  0.7148 | -0.0329 |
| 2 |  0.0308 | -0.6309 |  0.6309 |  0.0308 |
| 3 | -0.1870 | -0.0280 | -0.0280 |  0.1870 |
| 4 | -0.0280 |  0.1870 | -0.1870 | -0.0280 |
| 5 |  0.6309 |  0.0308 |  0.0308 | -0.6309 |
| 6 |  0.7148 | -0.0329 |  0.0329 |  0.7148 |
| 7 |  0.2304 | -0.0106 | -0.0106 | -0.2304 |

G0 is H0 reversed, and G1[k] = (-1)^k H0[7-k]. One octave of analysis
followed by synthesis returns its input delayed by exactly 7 samples. Over
three octaves the reconstruction is the input delayed by
7 * (2^3 - 1) = **49 samples**.

## Number formats (`dwt_pkg`)

| quantity | format | notes |
|---|---|---|
| input sample | 8-bit two's complement integer | `in_sample_t` |
| every internal sample (L, H, rebuilt L, y) | 20 bits, 8 fractional (`DW`, `FRAC`) | `sample_t`, range ±2048 |
| coefficient | 16 bits, 14 fractional (`CW`, `CF`) | round-to-nearest of the real value |
| LUT word | 18 bits, 14 fractional (`LW`) | sum of up to four coefficients |
| inner product | 40 bits, 22 fractional (`ACC_W`) | exact, no rounding inside a filter |

After every filter the 40-bit result is rounded (add half, shift right by 14)
back to `sample_t`. With these widths, random 8-bit input comes back exactly
after the forward and inverse transforms: 8143 of 8143 samples in the
end-to-end test. A three-octave low-pass gain of at most about 2.8 and an
8-bit input leave enough headroom in 11 integer bits.

## Distributed-arithmetic filter (`da_filter`, `da_lut4`)

For two's-complement samples x_i with bits x_{i,j} (j = 0 is the LSB and
j = DW-1 the sign):

    sum_i c_i x_i = sum_{j<DW-1} F_j 2^j  -  F_{DW-1} 2^{DW-1},
    F_j = sum_i c_i x_{i,j}

F_j depends only on the 4 address bits x_{0..3,j}. So `da_lut4` stores all
16 values. They are computed at elaboration from the coefficient parameter,
and no table file is used. `da_filter` has two tables per evaluated bit
plane: table A for taps `taps_a` with coefficients `COEF_A`, and table B for
`taps_b` with `COEF_B`. Their outputs are added into F_j, weighted and
accumulated. The sign plane is **subtracted**. Getting that wrong is the
classic DA bug, and the testbench drives the most negative sample on purpose.

`DA_BITS` sets how many bit planes are evaluated per clock. It must divide
`DW`:

| `DA_BITS` | organisation | results | latency | LUT pairs |
|---|---|---|---|---|
| 20 (`DW`, default) | all planes at once, adder tree | 1 per clock | 1 clock | 20 |
| 10, 5, 2 | digit-serial | 1 per 20/DA_BITS clocks | 20/DA_BITS + 1 | DA_BITS |
| 1 | bit-serial: parallel-to-serial registers feeding a scaling accumulator, LSB first | 1 per 20 clocks | 21 clocks | 1 |

In the serial forms `ready` falls while an inner product is in progress. New
taps are accepted in its last step, so results follow back to back. The
default is bit-parallel because the transform must take one sample per clock.
That rate is impossible if every filter needs 20 clocks per output.

## Polyphase filter banks

**`analysis_bank`** (one forward octave). Samples alternate between two
delay lines: even-indexed samples x[2n], x[2n-2], ... and odd-indexed
samples x[2n-1], x[2n-3], .... The first sample after reset has index 0. When
an even sample arrives, the bank starts one low-pass and one high-pass inner
product. The even taps go to table A (coefficients 0, 2, 4, 6) and the odd
taps to table B (1, 3, 5, 7). One output pair comes out per two inputs,
2 clocks after the even sample.

**`synthesis_bank`** (one inverse octave). For every input pair
(low[m], high[m]) both output samples are computed directly:

    y[2m]   = sum_i low[m-i] G0[2i]   + high[m-i] G1[2i]
    y[2m+1] = sum_i low[m-i] G0[2i+1] + high[m-i] G1[2i+1]

Each of these is a `da_filter`. Table A holds a branch of G0 and is addressed
by the low-pass history. Table B holds the same branch of G1 and is addressed
by the high-pass history. The even output appears 2 clocks after the pair.
The odd output is held for `SPACING` clocks so that the output stream is
evenly spaced at twice the input rate. Pairs must be at least `2*SPACING`
clocks apart, and an assertion checks this.

## The transform trees

**`dwt_forward`**: `LEVELS` (3) analysis banks in cascade. Octave k's
low-pass output feeds octave k+1. Its high-pass output leaves as `h[k-1]`.

**`dwt_inverse`**: `LEVELS` synthesis banks, deepest octave first. The
subtle part is **stream alignment**. The low-pass sequence rebuilt from
octaves below k lags the original L_k by D_k = 7 * (2^(3-k) - 1) samples:
0 for octave 3, 7 for octave 2 and 21 for octave 1. So H2 and H1 pass
through `coef_align_fifo` buffers. These are preloaded at reset with 7 and 21
zero samples, which stand for the zero history before the first coefficient.
Each rebuilt low-pass sample pops its partner from the FIFO. The FIFOs (32 and
64 entries) also absorb the few samples in flight, and assertions flag
overflow and underflow. The inverse expects its inputs at the clocks
`dwt_forward` produces them. In particular, H_k[m] must not arrive later than
the rebuilt L_k sample it pairs with. `SPACING` of the octave-k stage is
2^(k-1) at the default, so the three stages emit one sample per 4, 2 and
1 clocks.

**`dwt_top`**: the forward transform feeding the inverse. It brings out all
coefficient streams and the reconstruction `y`. It also brings out
`y_sample`, which is `y` rounded to 8 bits and saturated.

## Rates and latency at the default configuration

The input arrives at 1 sample per clock:

| stream | rate | first output after the sample that completes it |
|---|---|---|
| H1, L1 | 1 per 2 clocks | 2 clocks |
| H2, L2 | 1 per 4 clocks | 4 clocks (2 per octave) |
| H3, L3 | 1 per 8 clocks | 6 clocks |
| rebuilt L2 | 1 per 4 clocks | |
| rebuilt L1 | 1 per 2 clocks | |
| y | 1 per clock | y[n] = x[n-49] |

Input gaps are allowed anywhere, and everything downstream simply waits.
There is no back-pressure on outputs.

With `DA_BITS` < `DW`, the first octave accepts an even-indexed sample only
every `DW/DA_BITS` clocks (`in_ready`). Every octave's odd-output spacing is
then multiplied by `DW/(2*DA_BITS)`, so `DW/DA_BITS` must be 1 or even.

## Interfaces

All modules use one clock and a synchronous, active-low `rst_n`. A stream is
a `*_valid` strobe with data on the same clock, and there is no ready on the
output side.

| module | inputs | outputs |
|---|---|---|
| `dwt_top` | `in_valid`, `in_sample[7:0]` | `in_ready`, `h_valid[3]`, `h[3]` (H1..H3), `l_valid`, `l` (L3), `y_valid`, `y`, `y_sample[7:0]` |
| `dwt_forward` | `in_valid`, `in_sample` | `in_ready`, `h_valid[]`, `h[]`, `l_valid`, `l` |
| `dwt_inverse` | `h_valid[]`, `h[]`, `l_valid`, `l` | `y_valid`, `y` |
| `analysis_bank` | `in_valid`, `in_sample` | `in_ready`, `out_valid`, `out_low`, `out_high` |
| `synthesis_bank` | `in_valid`, `in_low`, `in_high` | `in_ready`, `out_valid`, `out_sample` |
| `da_filter` | `in_valid`, `taps_a[4]`, `taps_b[4]` | `ready`, `out_valid`, `result` (40 bits) |

Parameters: `LEVELS` (3) and `DA_BITS` (20) on the trees and the top. `LO`,
`HI`, `SPACING` and `DA_BITS` go on the banks, and `COEF_A` and `COEF_B` on
the DA filter. Widths and coefficients are in `dwt_pkg`.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The reference model (`tb/dwt_ref_pkg.sv`)
uses plain multiply-accumulate on 64-bit integers. It filters directly, then
decimates, and it inserts zeros, then filters. It applies the same rounding
as the RTL, so results are compared bit for bit.

| testbench | what it checks |
|---|---|
| `tb_da_lut4` | all 16 entries of two tables; quantised coefficients against the 4-decimal values |
| `tb_da_filter` | random taps, including the extreme values, against multiplication; 1-clock latency |
| `tb_da_filter_serial` | bit-serial (1 plane per clock) and 4-planes-per-clock forms: values, latency of DW/DA_BITS+1, back-to-back results |
| `tb_analysis_bank` | low/high outputs against filter-and-decimate; count, 2-clock latency, 1 output per 2 clocks |
| `tb_synthesis_bank` | outputs against zero-insert-and-filter; even/odd timing with `SPACING` = 2 |
| `tb_dwt_forward` | every H1, H2, H3, L3 value and its exact output clock; full-rate spacing of 2, 4 and 8 |
| `tb_dwt_inverse` | reference coefficient streams in forward timing; bit-exact output; reconstruction equals input delayed by 49; 1 output per clock |
| `tb_dwt_top` | 8192 samples end to end at the default parameters, with full-rate and gapped input and the extreme inputs -128 and 127; every coefficient and reconstructed sample bit-exact, and the 8-bit reconstruction equal to the input 49 samples earlier; counts decimation and interpolation in every octave at full rate |
| `tb_dwt_top_serial` | the whole transform with bit-serial DA, input paced by `in_ready` |

To run one with plain Verilator (5.x), from the folder holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
    ./obj_dir/Vtb_dwt_top

Substitute any testbench name. Each builds and runs in seconds, and each has a
watchdog that reports a failure if it hangs.

## Departures and choices

* **Bit-parallel distributed arithmetic by default.** The published filter
  structure serialises samples and evaluates one bit plane per clock. It also states
  that the transform takes one sample per clock. Both cannot hold at once, so
  the default evaluates all 20 planes in a clock. The bit-serial form is
  available with `DA_BITS = 1`, at 1/10 of the input rate. In the serial form
  the sample history is stored as words. The chosen taps are loaded into
  parallel-to-serial registers for each inner product, instead of the history
  living in bit-serial shift registers. The bits presented to the tables are
  the same. `DA_BITS` of 2, 5 and 10 (digit-serial) also reconstruct
  exactly.
* **Widths, rounding and reset** are this design's choices (see above). The
  published design only requires "sufficient precision" for exact reconstruction.
* **Detail-stream alignment FIFOs** in the inverse are added. The published
  design shows only the filter tree.
* **Output pacing** of the synthesis banks (the odd sample held `SPACING`
  clocks) is added to give the evenly spaced 1/4, 1/2 and 1 per clock rates.
* **No FPGA mapping figures.** The published slice counts and clock rates
  (about 374 slices and 131.7 MHz forward, 461 slices and 119.6 MHz inverse,
  on an XCV300) are not reproduced. The bit-parallel default uses 20 table
  pairs per filter, so its size is not comparable.
* **Not included:** a two-dimensional transform. It would need a matrix
  transpose memory between two 1-D transforms, and the published design only
  mentions it as an extension. The baseline direct-form and non-polyphase variants it
  compares against are also not included.

## Changing the design

* **Another wavelet:** replace `H0`, `H1`, `G0` and `G1` in `dwt_pkg` with
  integers equal to coefficient × 2^14. The tables follow automatically. A
  filter length other than 8 also needs `TAPS` changed; each table then has
  `TAPS/2` address bits. The alignment delay in `dwt_inverse` is `TAPS-1`
  per octave, which holds for orthogonal filters with G0 equal to H0
  reversed.
* **More or fewer octaves:** set `LEVELS`. The alignment delays, FIFO depths
  and output spacing are derived from it. Two and four octaves have been
  run through the end-to-end test with exact reconstruction. Keep the integer headroom of
  `sample_t` in mind, since the low-pass gain grows by about 1.41 per octave.
* **Wider input:** raise `IN_W`, and `DW` with it.
