# 32-bit LNS arithmetic unit with an interleaved-memory function interpolator

A logarithmic number system (LNS) stores a real number as a sign and a
fixed-point base-2 logarithm, `x = (-1)^s * 2^e`. Multiplication and division
become exact additions and subtractions of `e`. Addition and subtraction are
the hard part. With `a` the operand of larger magnitude and `r = e_b - e_a <= 0`:

    e_c = e_a + f_a(r),   f_a(r) = log2(1 + 2^r)    (magnitudes add)
    e_c = e_a + f_s(r),   f_s(r) = log2(1 - 2^r)    (magnitudes subtract)

This unit evaluates `f_a` and `f_s` with a second-order polynomial
interpolator. It does not store polynomial coefficients. It stores the function
values themselves on a grid and forms the coefficients on the fly from three
neighbouring values. The grid values sit in an *interleaved* memory. One ROM
word holds 8 consecutive points plus 2 more, so any 3 consecutive points can be
read in one access, and each stored point serves three neighbouring intervals.
The whole approximation fits in 312 ROM words of 10 x 31 bits (96,720 bits),
and it uses two small multipliers (19x16 and 12x16, 496 partial-product cells
in all).

The aim is accuracy. The worst-case relative error of every add and subtract
must not exceed that of IEEE single precision (`2^-24`, i.e. 0.5 in units of
`2^-23`). One exception is subtraction of operands within a factor of two.
There the error is measured relative to the larger operand (the "weak" error
model). An exhaustive simulation of every distinct `r` confirms the bound (see
*Accuracy*).

## Number format

| field | bits | meaning |
|---|---|---|
| `s` | 31 | sign |
| `e` | 30:0 | two's-complement exponent, 8 integer and 23 fraction bits |

One LSB of `e` is `2^-23`, so the representation error is constant at about
`ln2 * 2^-24` relative. Zero, infinities and NaN have no encoding. The unit
flags them instead (see *Interface*). The 8/23 split of the exponent is this
design's choice. Only the 23 fraction bits and the 32-bit word size are fixed.

## Interpolation from stored function values

Let `x_i` be grid points with spacing `h` (a power of two), with
`i = floor(x/h)` and `u = x/h - i` in `[0, 1)`. The interpolator uses the
three points `x_{i-1}, x_i, x_{i+1}`. This is Lagrange interpolation with the
centre point as origin. Of the three possible intervals, the centre one has the
smallest error.

    a0 = f(x_i)
    a1 = (f(x_{i+1}) - f(x_{i-1})) / 2
    a2 = (f(x_{i+1}) - 2 f(x_i) + f(x_{i-1})) / 2
    f(x) ~ a0 + u * (a1 + u * a2)

The coefficient step is the inverse of a constant 3x3 Vandermonde matrix with
nodes -1, 0, 1. It costs only a sum/difference pair and one more adder, with no
multiplier.

### Interleaved memory

A plain table would need three ROM reads per evaluation, or three ROMs. Here
one ROM word holds `P + K = 10` values: word `q` of a segment holds points
`8q-1 .. 8q+8`. For interval `j` the three needed points are entries
`j mod 8`, `j mod 8 + 1` and `j mod 8 + 2` of word `j / 8`. A rotator
(`interleave_rotator`) picks them out. The cost is 25 % more storage than the
bare grid (10 entries per 8 points). Each segment is rounded up to whole ROM
words.

## Segments of the r axis

`f_a` and `f_s` are far from polynomial near `r = 0`, and `f_s` has a
singularity there. The `r` axis is therefore split into intervals, each with its
own step `h`:

| table | interval | count |
|---|---|---|
| `FN_A`  `i = 0..24` | `-i-1 <= r < -i` | 25 |
| `FN_S`  `i = 1..24` | `-i-1 <= r < -i` | 24 |
| `FN_SS` `i = 0..23` | `-2^-i <= r < -2^-(i+1)` | 24 |

For `r < -25` the correction is below half an LSB and is taken as 0.
`FN_SS` is used for subtraction with `r >= -1`. Its accuracy target is the weak
one: absolute error at most about `a * 2^-24`. This keeps the table small near
the singularity.

In hardware, with `r` in two's complement:

- For `FN_A` and `FN_S`, the interval number is the inverted integer part of `r`.
- For `FN_SS`, the interval number is the count of leading ones of the fraction bits.
- The offset within the interval is the lower bits, below the interval's leading bits.

The words per interval (`1/h` times the interval width) are, for `i` ascending:

    FN_A : 128 128 128 64 64 64 64 32 32 32 16 16 16 8 8 8 4 4 4 2 2 2 2 2 2
    FN_S : 256 128 128 64 64 64 32 32 16 16 16 8 8 8 4 4 4 2 2 2 2 2 2 2
    FN_SS: 128 128 64 64 64 32 32 32 16 16 16 8 8 8 4 4 2 2 2 2 2 2 2 2

The entries for `i = 0..3` and `i = 24` are the published design point. The others come from the same rule. Halve `h` until the
second-order interpolation error at both ends of the interval is within bound.
The bound is `2^-27` for `FN_A`, `2^-26` for `FN_S`, and `2^-24 * 2^(-f_s)`
for `FN_SS` (weak model). This gives 896 + 866 + 640 grid words, against 2218
words for the published tables. The bounds are conservative here because the
stored values are plain rounded function values, not values tuned to reduce
error.

The ROM contents are computed at elaboration time in `lns_pkg::seg_value`:
`round(|f(x0 + j*h)| * 2^26)` for `j = -1 .. W`, using `real` arithmetic. Near
`r = 0`, `1 - 2^x` is evaluated as a series to avoid cancellation. The table
is the formula, not a list of numbers. To change the grid, edit `SEG_LOG2W`.

## The interpolation datapath

```
 e_a, e_b -> lns_partition --rom_addr--> lns_fn_rom --10 values--> interleave_rotator
               |  i mod P  ------------------------------------------^        |
               |  u (16 b), sh1, sh2                         gm, g0, gp      |
               v                                                             v
             lns_interp_dp:  diff = gp - gm,  c = gp + gm - 2*g0
                             m2 = (c >>> sh2)[12 b] * u      -> >> to 2^-30
                             t  = diff*2^3 + m2               (a1 + u*a2 at 2^-30)
                             m1 = (t >>> sh1)[19 b] * u      -> >> to 2^-30 = corr
             final +/- :     e_c = e_a +/- (g0 + corr), rounded from 30 to 23 fraction bits
```

| precision | bits |
|---|---|
| ROM values (`F_ROM`) | 26 fraction bits (5 integer bits) |
| data path (`F_DP`) | 30 fraction bits |
| m1 (`M1W x M1H`) | 19 x 16 |
| m2 (`M2W x M2H`) | 12 x 16 |
| `u` | 16 bits, truncated |

The ROM stores `|f|`: `f_a >= 0` and `f_s <= 0`. The last adder adds for
`f_a` and subtracts for `f_s`.

The multipliers are narrower than the data they see. Each segment has two
constant shift amounts (`SEG_SH1`, `SEG_SH2` in `lns_pkg`). Each is the
smallest right shift that makes the operand fit in the multiplier width. The
multiplier output is shifted back by the same amount. Both are derived at
elaboration from the largest first and second differences stored in the
segment. All internal shifts truncate. Only the final result is rounded to
nearest, with ties going up.

## Accuracy

The error is in units of `2^-23`. For `f_a` and `f_s` it is the relative error
`2^(e_c - e_exact) - 1`. For `FN_SS` it is `(c - c_exact) / a`. The table
below comes from the exhaustive run (`tb_lns_exhaustive`: every `r` in
`[-25, 0)`, add and subtract, 4.19e8 cases):

| region | min | max | mean | mean abs |
|---|---|---|---|---|
| `f_a`  | -0.4949 | 0.4393 | 0.0056 | 0.1773 |
| `f_s`  | -0.4556 | 0.4749 | -0.0056 | 0.1776 |
| `f_ss` (weak) | -0.3454 | 0.4101 | -0.0145 | 0.0675 |

Every case is inside +/-0.5, the single-precision worst case. A value that is
exactly representable in LNS and a correctly rounded result would give a mean
absolute error of `ln2 * 0.25 = 0.17`. The interpolator is close to that.

## Interface (`lns_unit`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears `out_valid` only) |
| `in_valid` | in | 1 | start an operation this cycle |
| `op` | in | 2 | `OP_ADD`, `OP_SUB`, `OP_MUL`, `OP_DIV` (`lns_pkg::op_e`) |
| `a`, `b` | in | 32 | operands |
| `out_valid` | out | 1 | result valid; one cycle after `in_valid` |
| `z` | out | 32 | result |
| `zero` | out | 1 | exact cancellation (`x - x`); `z` then holds +2^(-128) |
| `ovf`, `unf` | out | 1 | exponent out of range; `z` is saturated |

The add/subtract path is combinational. The ROM is a combinational lookup
table. A single output register gives a latency of one clock and a throughput
of one operation per clock. For a faster clock, add pipeline registers between
the partition, ROM, multiplier and final-adder stages. The module boundaries
follow those stages.

## Modules

| file | role |
|---|---|
| `rtl/lns_pkg.sv` | formats, segment table, ROM and shift generators, enums |
| `rtl/lns_partition.sv` | orders the operands, computes `r`, finds table/segment, ROM address, `i mod P`, `u`, shifts and the special cases |
| `rtl/lns_fn_rom.sv` | interleaved ROM, 312 words x 10 x 31 bits |
| `rtl/interleave_rotator.sv` | picks `K+1` consecutive values (generic in `P`, `K`, width) |
| `rtl/lns_interp_dp.sv` | sum/diff, m2, m1, shifts |
| `rtl/lns_addsub.sv` | full combinational add/subtract, sign logic, final add, rounding, flags |
| `rtl/lns_unit.sv` | top: add/sub/mul/div with an output register |

Testbenches in `tb/` are self-checking and print
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_lns_unit` | end to end at default sizes: random back-to-back operations, every mechanism (each table, far `r`, `r = 0`, cancellation, swap, mul, div, overflow, underflow, idle cycles) |
| `tb_lns_addsub` | sweep of 1/249 of all `r` (parameter `STRIDE`), error statistics per region |
| `tb_lns_exhaustive` | the same sweep at stride 1: every `r`, about 2 minutes |
| `tb_lns_partition`, `tb_lns_fn_rom`, `tb_interleave_rotator`, `tb_lns_interp_dp` | each block against a double-precision model |

To simulate with Verilator:

    verilator --binary --timing -Irtl rtl/lns_pkg.sv rtl/*.sv tb/tb_lns_unit.sv \
        --top-module tb_lns_unit -o sim && ./obj_dir/sim

For the sweeps, add `tb/tb_lns_addsub.sv` (and `tb/tb_lns_exhaustive.sv`) to
the command and change `--top-module`.

## What is this design's own choice

- Integer width of the exponent (8 bits), the zero/overflow/underflow flags with saturation, and sign handling for mixed-sign operands.
- The output register, the valid handshake and the operation encoding. No pipelining is specified for the datapath.
- The words per interval for the middle intervals (see *Segments*). The stored values are rounded rather than optimised.
- The shift control for the multipliers: per-segment constants. The only requirement is that they keep as many significant bits as fit.
- `FN_SS` interval 24 (`-2^-24 <= r < -2^-25`) is not stored. No 23-fraction-bit `r` falls in it.

## Not included

- The exact-error-model table for `r` near 0 (`f_ssx`). It would replace the 640-word `FN_SS` table with about 7700 words and gain little accuracy.
- The other interleaving variant, with `P` separate ROMs, an address incrementer and per-bank multiplexers. It is equivalent in function to the single ROM used here.
- Interpolators of other orders (linear, fourth order). The package and the generic rotator would carry over, but the datapath is written for `K = 2`.
