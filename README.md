# Parallel lifting CDF(2,2) 2-D wavelet transform — four subbands per clock

This is a one-level 2-D discrete wavelet transform (DWT) for 8-bit greyscale images. It uses the
CDF(2,2) wavelet (also called LeGall 5/3, the reversible JPEG2000 filter) computed with lifting.
Every clock cycle the core takes a 3×3 pixel window. From it, it produces the four coefficients
LL, LH, HL and HH of one 2×2 image block. An N×N image therefore takes exactly N²/4 cycles.

## Lifting steps

Split each line into even samples `s_i = x[2i]` and odd samples `d_i = x[2i+1]`. Then:

```
predict (dual lifting):    d_i <- d_i - floor((s_i + s_{i+1}) / 2)
update  (primal lifting):  s_i <- s_i + floor((d_{i-1} + d_i) / 4)
```

`d` is the high-pass coefficient and `s` the low-pass one. There is no normalisation scaling, and
the floor divisions are arithmetic shifts. The result maps integers to integers and can be
inverted exactly. No `+2` rounding offset is added to the update step, so low-pass values can differ by
one from a JPEG2000 5/3 implementation that adds it.

At the image edges the transform uses whole-sample symmetric extension: `x[-1] = x[1]` and
`x[N] = x[N-2]`. The first rule gives `d_{-1} = d_0`. The second gives `s_N/2 = s_N/2-1` for
the last predict step.

## The three-row trick

The vertical predict step for rows j and j+1 needs the row-transformed data of row j+2 as well.
A simple design would row-transform each line once and keep the results in line buffers for the
column stage. This core instead runs **three row processors in parallel**:

```
            pixels                 row coeffs            subbands
 row j   --> R_WT1 --s--+--------> C_WT1 (s_i)    --> LL, LH
 row j+1 --> R_WT2 --s--+--------> C_WT1 (d_i)
 row j+2 --> R_WT3 --s--+--------> C_WT1 (s_i+1)
             R_WT1/2/3 --d-------> C_WT2 (s_i, d_i, s_i+1) --> HL, HH
```

Each row processor gets three neighbouring pixels of its row: `x[2i]`, `x[2i+1]` and `x[2i+2]`.
It outputs the row low-pass and high-pass coefficients for column pair i. The two column
processors apply the same lifting steps in the vertical direction. C_WT1 works on the three
low-pass values and gives LL and LH. C_WT2 works on the three high-pass values and gives HL and HH.
(The second letter names the vertical filter.)

Row j+2 is transformed twice: once as "row j+2" of row pair j/2, and again as "row j" of the
next row pair. This extra processor is what lets the column stage work without storing
row-transformed lines.

## The Z feedback delays

The update step needs `d_{i-1}`, the high coefficient of the *previous* position. Each
processor keeps it in a feedback delay `Z` (`z_delay.sv`).

* **Row processors.** Windows arrive left to right within a row pair, so `d_{i-1}` was produced
  in the previous accepted cycle. Z is a single register.
* **Column processors.** The previous *vertical* high coefficient of column pair i was produced
  for the previous row pair. That was N/2 windows earlier. Z is therefore a circular buffer of
  N/2 words, one per column pair (256 × 11 bits per column processor at N = 512). It is read
  and rewritten at the same address every accepted cycle.

Some storage of this kind cannot be avoided. Any scan order that keeps one of the two directions
as a one-cycle delay must store one word per position of the other direction. Row-major order was
chosen because it makes the row delays single registers. It also makes the third row processor
useful: its row becomes the next row pair's first row. The column Z buffers are the only memory
in the design: 2 × 256 × 11 = 5632 bits at N = 512.

## Edges

The flags from `dwt_scan_ctrl` apply the symmetric extension:

| edge | where | rule |
|---|---|---|
| left (column pair 0) | each `row_wt` | `d_{i-1}` := the new `d_i` |
| right (column pair N/2−1) | top-level multiplexer | column 2i+2 := column 2i |
| top (row pair 0) | each `col_wt` | previous vertical `d` := the new one |
| bottom (row pair N/2−1) | top-level multiplexer | row j+2 := row j |

The source therefore never needs pixels from outside the image. Window pixels that lie outside the
image are ignored.

## Interface and timing (`cdf22_dwt2d`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a window is offered this cycle |
| `pix[3][3]` | in | 8 each | `pix[r][c] = x[2p+r][2i+c]` for row pair p, column pair i |
| `out_valid` | out | 1 | coefficients valid |
| `out_row`, `out_col` | out | log2(N/2) | subband position (p, i) |
| `frame_done` | out | 1 | high with the last output of a frame |
| `ll`, `lh`, `hl`, `hh` | out | 11 signed | subband coefficients |

* Windows must arrive in row-major order of (row pair, column pair). That is column pairs
  0 … N/2−1, then the next row pair. The position counters wrap after N²/4 windows, so frames
  can follow each other with no gap.
* `in_valid` may be low for any number of cycles (a stall). The pipeline waits. There is no
  back-pressure: the core accepts a window in every cycle where `in_valid` is high.
* Latency is two cycles: a row stage register, then a column stage register. A frame without
  stalls produces `frame_done` N²/4 + 1 cycles after its first window is accepted.

## Word widths

An 8-bit pixel is treated as a 9-bit signed value. Each lifting step at most doubles the magnitude
of its operands, so every 1-D stage adds one bit. Row coefficients are 10-bit signed and the 2-D
coefficients are 11-bit signed, so nothing can overflow. `cdf22_pkg` defines `PIXEL_W`, `ROW_W`
and `COEF_W`, plus the two lifting functions.

## Files

| file | contents |
|---|---|
| `rtl/cdf22_pkg.sv` | widths and the predict/update functions |
| `rtl/z_delay.sv` | Z delay: register (DEPTH = 1) or N/2-word circular buffer |
| `rtl/row_wt.sv` | row processor R_WT, with its one-register Z |
| `rtl/col_wt.sv` | column processor C_WT, with its N/2-word Z |
| `rtl/dwt_scan_ctrl.sv` | window position counters and edge flags |
| `rtl/cdf22_dwt2d.sv` | top: 3 × R_WT, 2 × C_WT, edge multiplexers, pipeline control |
| `tb/cdf22_ref_pkg.sv` | whole-image reference model (rows, then columns, explicit floor division) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cdf22_dwt2d_full` |

Parameters: `N` sets the image size (default 512). It must be even and at least 4; it need not
be a power of two. `PIXEL_W` (in the package, default 8) sets the pixel width.

## Verification

Each testbench compares the RTL with `cdf22_ref_pkg`. That model transforms whole rows and then
whole columns, uses explicit floor division, and shares no code with the RTL. Each testbench ends
by printing `TB_RESULT checks=<n> failures=<n>`.

* `tb_cdf22_dwt2d`: six back-to-back 8×8 frames. They use random pixels, the two extreme
  checkerboards (largest coefficient magnitudes) and a ramp, with and without random stalls.
  Pixels outside the image are driven with random values, so the edge multiplexers are really
  tested. The testbench checks all four subbands, the output positions, the 2-cycle latency, the
  N²/4 + 1 cycle frame time and `frame_done`. It counts stalls, each edge type, back-to-back
  frames and stall-free frames, and fails if any of them never happens.
* `tb_cdf22_dwt2d_full`: one 512×512 frame at the default parameters, with a generated
  gradient + stripe + noise image. It checks all 65 536 × 4 coefficients and the 65 537-cycle
  frame time.
* `tb_row_wt`, `tb_col_wt`, `tb_z_delay` and `tb_dwt_scan_ctrl` test the blocks on their own,
  including stalls and extreme input values.

To run one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/cdf22_pkg.sv tb/cdf22_ref_pkg.sv tb/tb_cdf22_dwt2d.sv --top-module tb_cdf22_dwt2d
./obj_dir/Vtb_cdf22_dwt2d
```

The full-size run takes a few seconds.

## Limitations and choices

* The architecture fixes the processor arrangement, the lifting equations, the 8-bit pixels
  and the one-block-per-cycle rate. The following are this implementation's own choices:
  * row-major window order;
  * symmetric edge extension;
  * floor rounding without an offset;
  * the two pipeline registers;
  * the valid/stall interface;
  * the N/2-word column Z buffers.
* The column processors hold one line of N/2 coefficients each, in the Z feedback. The pixel
  windows come from outside the core. How the image is stored and how three rows are read at
  once is left to the system that uses it.
* One decomposition level only. A multi-level transform would feed the LL subband back in as a
  new (N/2)×(N/2) image. This needs an outside buffer, and the core would have to be built with
  that size, because N is fixed when the design is elaborated.
* The normalisation gains of the full CDF(2,2) factorisation (×1 on the low output, ×(−1/2) on the
  high output) are left out, as is usual for lossless coding. A floating-point reference
  will differ from this core by those factors.
* There is no inverse transform.
