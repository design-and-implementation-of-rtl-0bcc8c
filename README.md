# 3x3 two-dimensional FIR low-pass filter: direct and data-broadcast structures

This RTL smooths an 8-bit image streamed in raster order, one pixel per clock. It
applies a 3x3 separable low-pass kernel. The kernel is built from two 3-tap 1-D
low-pass prototypes. The filter comes in two structures that compute the same
convolution and differ only in where the delay registers sit:

* **non-broadcast (direct form)**: each row of the window delays the *pixels*.
  Every multiplier sees its own delayed copy of the input.
* **data broadcast (transposed form)**: each incoming pixel is *broadcast*
  undelayed to all three multipliers of its row. The registers hold *partial
  sums* instead.

Both structures use the same two line buffers, the same constant coefficients and
the same output adder tree. `fir2d_top` holds one of each, side by side.

## The kernel

The two prototypes are 3-tap filters designed with a rectangular window:

| tap | w1 (cut-off 0.5) | w2 (cut-off 0.7) |
|-----|------------------|------------------|
| 0   | 0.280            | 0.211            |
| 1   | 0.439            | 0.576            |
| 2   | 0.280            | 0.211            |

The 2-D kernel is their outer product, `a(i,j) = w2(i) * w1(j)`. The first index
`i` runs along a line (horizontal, `n1`). The second index `j` runs across lines
(vertical, `n2`). In real numbers this is

```
        j=0    j=1    j=2
i=0    0.059  0.092  0.059
i=1    0.161  0.252  0.161
i=2    0.059  0.092  0.059
```

The hardware multiplies 8-bit pixels by **4-bit unsigned coefficients** and
produces 12-bit products. Each real tap is scaled by 16 and rounded to the
nearest integer:

```
a(i,*) for i = 0, 1, 2:   1 1 1 / 3 4 3 / 1 1 1      (sum 16)
```

The kernel sums to 16, so the filter has unity DC gain once the output is divided
by 16. The outputs are **not** divided: `youtfn` is the full-precision sum, 16
bits wide, and peaks at 255 * 16 = 4080. `fir2d_pkg` keeps the prototype taps in
thousandths. Its constant function `fir2d_coefs()` forms the product and rounds it
during elaboration. To change the kernel, change `W1_MILLI`/`W2_MILLI`, or pass a
whole `coef_mat_t` as the parameter `A` of either 2-D filter. A tap that rounds
above 15 saturates at 15.

## Data flow

```
x(n1,n2) ──┬────────────────────────────► row 0  ─► yout  ─┐
           │                                              (+)─► yout3 ─┐
       line_delay ── x(n1,n2-1) ─────────► row 1  ─► yout1 ─┘          (+)─► youtfn
           │                                                           │
       line_delay ── x(n1,n2-2) ─────────► row 2  ─► yout2 ─► (align) ─┘
```

* A **line delay** (`line_delay`) is a `LINE_LEN`-stage shift register. Its output
  is the pixel in the same column one line earlier. `LINE_LEN` is the image
  width. It defaults to 8, and a real image width should be set here.
* A **row** (`fir1d_nonbroadcast` or `fir1d_broadcast`) is a 3-tap FIR along the
  line. It computes `H[0]*x(n) + H[1]*x(n-1) + H[2]*x(n-2)`. Its sum is
  combinational in the current pixel.
* The **output stage** (`fir2d_combine`) registers the three row sums as `yout`,
  `yout1` and `yout2`. It then adds rows 0 and 1 into `yout3`, and finally adds
  row 2 to give `youtfn`. Row 2 passes through one extra register, so it reaches
  the last adder in step with `yout3`.

### Timing

When pixel `x(n1,n2)` is presented in clock `t` and captured at the end of `t`:

| output  | valid after edge | value |
|---------|------------------|-------|
| `yout`  | t                | row 0 sum of the window whose newest pixel is x(n1,n2) |
| `yout1` | t                | row 1 sum (line n2-1) of that window |
| `yout2` | t                | row 2 sum (line n2-2) of that window |
| `yout3` | t+1              | yout + yout1 of that window |
| `youtfn`| t+2              | the complete 3x3 result for that window |

Measured from the clock in which the pixel is applied, `youtfn` appears 3 clocks
later. The filter has no valid or enable signal: it takes one pixel every clock,
and the outputs always show the window of the pixel applied 1 to 3 clocks
earlier, as the table gives.

### Borders

There is no border logic. A synchronous reset clears every register and both line
buffers to zero. After a reset, the first two lines of an image therefore see
zeros above them. Pixels left of column 0 are taken from the end of the previous
line (or are zero after reset). Windows that straddle a line boundary are normally
discarded by the consumer. Reset the filter between frames if a zero border above
each frame is wanted.

## The two row structures

The direct-form row (`fir1d_nonbroadcast`) holds the last two pixels in 8-bit
registers. It multiplies `x(n)`, `x(n-1)` and `x(n-2)` by `H[0..2]` and adds the
three products in one combinational chain. That chain (three products and two
additions) is its critical path.

The transposed row (`fir1d_broadcast`) multiplies the current pixel by all three
coefficients at once:

```
s2 <= H[2]*x
s1 <= s2 + H[1]*x
y   = s1 + H[0]*x
```

Its delays are 16-bit partial-sum registers, and only one multiply and one add
follow the last register.

**Tap placement.** In the direct-form 2-D filter, row `r` applies `a(0,r)` to the
newest pixel and `a(2,r)` to the oldest. In the transposed 2-D filter, the
product with `a(0,r)` passes through both partial-sum registers, so `a(0,r)`
weights the oldest pixel. The broadcast filter therefore computes the kernel
mirrored along the line:

```
non-broadcast:  youtfn = sum a(i,j) * x(n1-i,   n2-j)
broadcast:      youtfn = sum a(i,j) * x(n1-2+i, n2-j)
```

The default kernel is symmetric in `i`, so both filters give identical outputs for
identical inputs. For a kernel that is not symmetric they differ by this mirror.
The testbenches check both forms with a deliberately non-symmetric kernel.

## Interfaces

All modules share `fir2d_pkg`: `data_t` (8 bits), `coef_t` (4 bits), `prod_t`
(12 bits), `acc_t` (16 bits), `coef_row_t`/`coef_mat_t`, and the output struct

```systemverilog
typedef struct packed { acc_t yout, yout1, yout2, yout3, youtfn; } fir2d_out_t;
```

| module | parameters | ports |
|--------|------------|-------|
| `fir2d_top` | `LINE_LEN` | `clk`, `reset`, `x_nb`, `y_nb`, `x_bc`, `y_bc` |
| `fir2d_nonbroadcast`, `fir2d_broadcast` | `LINE_LEN`, `A` (kernel) | `clk`, `reset`, `x`, `y` (`fir2d_out_t`) |
| `fir1d_nonbroadcast`, `fir1d_broadcast` | `H` (`H[k]` weights `x(n-k)`) | `clk`, `reset`, `x`, `y` (combinational) |
| `fir2d_combine` | - | `clk`, `reset`, `row0..row2`, `q` |
| `line_delay` | `LINE_LEN`, `DATA_W` | `i_clk`, `i_sync_reset`, `i_data`, `o_data` |

Reset is synchronous and active high everywhere. Arithmetic is unsigned.

## What follows the published design, and what does not

Taken from the published design:
* the two structures and where their delays sit;
* the tap placement in each row;
* the two line delays;
* the prototype taps and the outer-product rule;
* the 8-bit pixel, 4-bit coefficient, 12-bit product and 16-bit output widths;
* the output names and the adder order (rows 0 + 1, then row 2);
* a synchronous reset.

Choices made here:
* **Line length.** The image width is not published. `LINE_LEN` defaults to 8.
* **Coefficient scale.** The mapping from the real taps to 4-bit integers is not
  published. Scale 16 with rounding was chosen.
* **One printed tap.** One tap of the published real-valued kernel is printed as
  0.092 where the outer product gives 0.059. The outer product is used here. Both
  values round to 1, so the integer kernel does not depend on it.
* **Alignment register.** The register that delays row 2 in the output stage is
  an interpretation. Without it, row 2 would be added one pixel late.
* **Borders and flow control.** There is no border handling and no valid
  handshake.

The reference implementation was reported on an Artix-7 (xc7a35t) FPGA:

| structure | LUTs | critical path | power |
|-----------|------|---------------|-------|
| data broadcast | 39 | about 7.46 ns | 0.169 W |
| non-broadcast | 39 | 7.332 ns | 0.183 W |

This RTL has not been through an FPGA flow, and those figures are not reproduced
here. A published simulation waveform shows settled values `yout=1`, `yout1=10`,
`yout2=1`, `yout3=11` and `youtfn=12`. These obey the same adder relations, but
the input stimulus behind them is unknown, so they are not replayed.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `fir2d_pkg_tb` | the elaborated kernel against the hand-computed one; rounding and saturation of `fir2d_coefs()` |
| `line_delay_tb` | delays of 8, 3 and 1 against a pixel history; a reset in the middle of the stream |
| `fir1d_nonbroadcast_tb`, `fir1d_broadcast_tb` | an impulse, random and full-scale input, on the default taps and on non-symmetric taps |
| `fir2d_nonbroadcast_tb`, `fir2d_broadcast_tb` | all five outputs every clock against the convolution model, at default size and at `LINE_LEN=5` with a non-symmetric kernel; an impulse, full-scale bursts, a mid-stream reset |
| `fir2d_top_tb` | the top at its default parameters. It runs whole 8x8 frames: impulse, full scale, ramp, random. Both filters run on shared frames, where their outputs must agree, and on independent frames. It also counts windows spanning three lines, full-scale outputs, and resets between and inside frames. |

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fir2d_pkg.sv tb/fir2d_top_tb.sv --top-module fir2d_top_tb -o sim
./obj_dir/sim
```

Replace `fir2d_top_tb` with any other testbench name. `-y rtl` lets Verilator
find the submodules by file name. Every simulation finishes in well under a
second.

## Files

* `rtl/fir2d_pkg.sv`: widths, types, prototype taps, kernel function.
* `rtl/line_delay.sv`: one-line pixel delay.
* `rtl/fir1d_nonbroadcast.sv`: direct-form 3-tap row.
* `rtl/fir1d_broadcast.sv`: transposed 3-tap row.
* `rtl/fir2d_combine.sv`: registered output adder stage.
* `rtl/fir2d_nonbroadcast.sv`: the complete direct-form 2-D filter.
* `rtl/fir2d_broadcast.sv`: the complete data-broadcast 2-D filter.
* `rtl/fir2d_top.sv`: both filters side by side.
* `tb/*_tb.sv`: one testbench per module, named after it.
