# Reconfigurable DCT-V: one length-32 or five length-4 transforms per cycle

This RTL computes the Discrete Cosine Transform of type V,

    X_k = sum_{l=0}^{N-1} x_l * cos(2*pi*k*l / (2N-1)),   k = 0..N-1,

for N = 32, or five independent N = 4 transforms at once. It is one of
the odd-type transforms in the adaptive multiple-transform tool of recent
video codecs. A direct length-32 DCT-V costs 1024 multiplications. This
datapath uses 126 constant multipliers. It needs so few because the 32 output
points split into small, regular sub-transforms, and five of those are
DCT-V of length 4. Adding a few multiplexers to those five gives the N=4 mode
for almost no extra area.

The datapath is combinational between an input register and an output
register. It takes one 32-sample vector per clock (N=32) or 20 samples per
clock (5 x N=4). Samples are 16 bits, internal words 32 bits, and constant
coefficients have 8 fractional bits.

## The factorization

Think of the input as the coefficients of a polynomial in the Chebyshev basis,
`p(x) = sum x_l T_l(x)`. Then `X_k = p(cos(2*pi*k/63))`: the DCT-V evaluates p
at 32 points. Since 63 = 3 * 3 * 7, these points fall into groups that are the
roots of simpler polynomials. Reducing p modulo each group's polynomial uses
only adders. Each group is then a smaller trigonometric transform.

```
x0..x31 --B32--+-- 11 coeffs: DCT-V N=11 (points k = 0,3,...,30)
               |      --B11--+-- 4 coeffs : DCT-V N=4          (k = 0, 9, 18, 27)
               |             +-- 7 coeffs : skew DCT-III N=7, r=2/3   (other k = 3j)
               |
               +-- 21 coeffs: roots of T_21(x) + 1/2 = T_3(T_7(x)) - cos(2pi/3)
                      --B3,7-- 7 groups of 3
                      --7 x skew DCT-III N=3, r=2/3 (one per group)
                      --3 x skew DCT-III N=7, r = 2/9, 8/9, 4/9
```

* **B32** (`b32_c5`, 42 adders). On the 11 points with k divisible by 3,
  `T_l = T_{21-l} = T_{l-21}`, so `y_m = x_m + x_{21-m} + x_{21+m}`. On the
  other 21 points, `T_21 = -1/2` and `T_{21+m} = -T_m - T_{21-m}`, so
  `a_0 = x_0 - x_21/2` and `a_m = x_m - x_{21+m}`, `a_{21-m} = x_{21-m} - x_{21+m}`.
* **B11** (`b11_c5`, 14 adders) does the same one level down, with 7 in place
  of 21.
* **B3,7** (`b37_c3`, 18 adders) rewrites the 21 coefficients in the basis
  `T_i(x) * T_j(T_7(x))`, with i = 0..6 and j = 0..2. It uses
  `T_{7+i} = 2 T_i T_7 - T_{7-i}`. Each group i is then a degree-2 polynomial
  in `y = T_7(x)`. A skew DCT-III of length 3 evaluates it at the three roots
  `y = cos(2pi/9), cos(8pi/9), cos(4pi/9)`.
* For each of those three roots, a **skew DCT-III of length 7** (r = 2/9,
  8/9, 4/9) evaluates the seven group values at the 7 points x with
  `T_7(x) = y`.
* **Output permutation.** Each sub-transform output is the value at one
  known point `cos(2*pi*k/63)`. Fixed wiring in `dctv_reconf` sends it to
  `X_k`.

A *skew DCT-III of length n with parameter r* evaluates
`sum_l a_l T_l(x)` at the n roots of `T_n(x) = cos(r*pi)`, which are
`x = cos((r + 2i)*pi/n)`.

## Inside the skew DCT-III of length 7 (`skew_dct3_n7`)

This is the block that is hardest to follow. Write the roots as
`theta_i = phi + (2i+1)*pi/7` with `phi = (r-1)*pi/7`. Then
`cos(l*theta_i)` splits into a twiddle by `l*phi` and a length-7 real DFT.
The DFT's cosine half is a DCT-V of length 4 and its sine half is a
transposed DST-VII of length 3:

| stage | module | what it does |
|---|---|---|
| P7(r) | `p7_c3` | Three butterflies with 12 multipliers: `y_l = cos(l phi) x_l - cos((7-l) phi) x_{7-l}` and `y_{7-l} = sin(l phi) x_l + sin((7-l) phi) x_{7-l}` |
| G7^T | wiring | With this twiddle convention the P7 outputs are already in order (straight connection) |
| D4, D'7 | inline | Negate positions 1 and 3 (cosine part) and 4 and 6 (sine part): the `(-1)^l` of the odd DFT points |
| C4^V | `dctv_n4` | DCT-V N=4 of positions 0..3 |
| (S3^VII)^T | `dst7t_n3` | `sum_l z_l sin(pi(2l+1)(k+1)/7)` of positions 4..6 |
| J4 | wiring | Reverses the four DCT-V outputs |
| H7 | `h7` | Butterflies: `y_j = x_j - x_{6-j}`, `y_{6-j} = x_j + x_{6-j}`, `y_3 = x_3` |

Output `o` is the point with index `i = {6,1,4,3,2,5,0}[o]`
(`dctv_pkg::H7_POINT`). Every user of the block relies on this order.

**DCT-V N=4** (`dctv_n4`, 4 multipliers, 13 adders). Let `s = x1+x2+x3`. Then
`y0 = x0 + s`. The common part of y1..y3 is `T = y0 - (7/6) s`. The zero-mean
remainder is a 3-point cyclic correlation, done Karatsuba-style with three
products: C52 (x1-x3), C53 (x3-x2) and C54 (x1-x2).

**Skew DCT-III N=3** (`skew_dct3_n3`, 6 multipliers, 6 adders). Twiddles
form `p = c1 x1 + s2 x2` and `q = c2 x2 + s1 x1`, with `c_l = cos(l psi)`,
`s_l = sin(l psi)` and `psi = (2r+1) pi/6`. Then `y1 = x0 - q`,
`b = y1 + 1.5 q`, and `y0, y2 = b -/+ (-sqrt3/2) p`.

All constants are computed in `dctv_pkg` from their formulas when the design
is elaborated and rounded to `FRAC` fractional bits (`round(c * 256)` at the
default `FRAC = 8`). `u = 2*pi/7` throughout.

## Reconfiguration

In front of each of the five DCT-V N=4 units sits a 2:1 multiplexer. Four of
the units sit inside the skew DCT-III N=7 blocks and one is in the N=11
branch. With `mode4 = 1`, unit g takes `x[4g .. 4g+3]` and the output
multiplexers put its result on `X[4g .. 4g+3]`, for g = 0..4. The units are
assigned to groups in this order:

| g | DCT-V N=4 unit |
|---|---|
| 0 | N=11 branch |
| 1 | skew N=7, r=2/3 |
| 2 | skew N=7, r=2/9 |
| 3 | skew N=7, r=4/9 |
| 4 | skew N=7, r=8/9 |

In N=4 mode, `X[20..31]` carry meaningless values from the N=32 path.

## Interface and timing (`dctv_reconf`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous active-low reset: clears valid flags and registers |
| in_valid | in | 1 | x and mode4 are valid; captured on this edge |
| mode4 | in | 1 | 0: one DCT-V N=32; 1: five DCT-V N=4 |
| x | in | 32 x 16 (signed) | input samples |
| out_valid | out | 1 | X holds a result |
| X | out | 32 x 16 (signed) | coefficients |

A vector captured on clock edge t comes out of the output register on edge
t+1, so results appear two edges after the inputs are presented. A new vector
can be accepted on every edge, and the mode may change from one vector to the
next. Outputs are scaled and saturated to 16 bits:
`X_k = sat16(transform >>> OSH32)` with `OSH32 = 5` (that is, /32) in N=32
mode, and `>>> OSH4` with `OSH4 = 2` (/4) in N=4 mode. With these shifts no
input can overflow. An assertion in `dctv_reconf` checks in simulation that
`out_valid` always follows the captured `in_valid` by exactly one edge.

## Accuracy

All constants are rounded to 8 fractional bits and all products are
truncated. Against a floating-point DCT-V, random full-scale inputs show
errors up to about 55 LSB of the 16-bit output in N=32 mode (about 0.17 % of
full scale) and about 35 LSB in N=4 mode. This 8-bit precision was chosen for
video coding, where the rate loss it causes is negligible. For more accuracy,
raise `FRAC` in `dctv_pkg`: every constant is requantized automatically.
`coef_t` is 16 bits, which is enough up to `FRAC = 13`.

## Where this design departs from, or fills in for, the reference

The block structure, the operation counts, the constants C31/C32, C51..C54,
S31..S34, the widths and the register placement follow the original
architecture. The following details are not fixed by that description;
they are derived or chosen here:

* The reduction matrices B32, B11 and B3,7 are derived from the polynomial
  argument above. They match the stated adder counts (42, 14, 18) and the
  two stated B32 outputs.
* The output permutations Q3^11, K7^21 and Q10^32 are computed from the point
  each output evaluates.
* The twiddle definitions of P7(r) and of the N=3 skew DCT-III are this
  design's own. P7 keeps the stated pairing and counts (12 multipliers,
  6 adders). This is why G7^T is a straight connection here.
* The sign of C51: the coefficient table gives +7/6, but the network only
  computes a DCT-V with -7/6, which is used.
* The pre- and post-adder network of the DST-VII N=3 is this design's own and
  uses the original constants. It needs 11 adders where the original states
  10, so a skew DCT-III N=7 has 40 adders instead of 39.
* Not given in the original and chosen here: the output scaling
  (OSH32/OSH4), saturation, the valid handshake, the reset, and the
  assignment of input groups to the five N=4 units.
* Not built: the N = 8 and 16 sizes (the original only estimates their
  cost) and a 2-D transform around this 1-D unit.

## Files

`rtl/`:

| file | contents |
|---|---|
| `dctv_pkg.sv` | widths, types, constants, `cmul` (fixed-point constant multiply) |
| `dctv_reconf.sv` | top: registers, B-stages, sub-transforms, output permutation, multiplexers |
| `b32_c5.sv`, `b11_c5.sv`, `b37_c3.sv` | adder-only reductions |
| `skew_dct3_n7.sv`, `p7_c3.sv`, `h7.sv` | skew DCT-III N=7 and its stages |
| `skew_dct3_n3.sv`, `dctv_n4.sv`, `dst7t_n3.sv` | small transforms |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
compares against a floating-point model, or against polynomial identities for
the adder stages. `tb_dctv_reconf` streams about 600 vectors through the top
at its default parameters. The stream mixes both modes, mode switches in
both directions, idle cycles and a reset. It checks every result and its
latency. `tb_residual_blocks` uses the unit the way a residual coder would:
it transforms a 32x32 block row by row, transposes the results in the
testbench and transforms the columns, giving a separable 2-D DCT-V. It then
does the same for twenty 4x4 blocks in N=4 mode. It checks the 2-D
coefficients and the cycle counts. Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

Run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/dctv_pkg.sv tb/tb_dctv_reconf.sv --top-module tb_dctv_reconf -o sim
./obj_dir/sim
```
