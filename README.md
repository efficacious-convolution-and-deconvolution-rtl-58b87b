# Vedic-arithmetic convolution and deconvolution engine

Convolving two finite sequences is the same computation as multiplying two
numbers whose "digits" are the samples, except that no carry moves from one
column to the next. For x = (x0..x3) and h = (h0..h3):

```
                     x3    x2    x1    x0
                  x  h3    h2    h1    h0
   ------------------------------------------
                   x3h0  x2h0  x1h0  x0h0
             x3h1  x2h1  x1h1  x0h1
       x3h2  x2h2  x1h2  x0h2
 x3h3  x2h3  x1h3  x0h3
 ------------------------------------------
  y6    y5    y4    y3    y2    y1    y0
```

Each output sample y[n] is the full-width sum of its column. Deconvolution is
the matching long division: to recover x from y and h, divide the leading
column by the leading coefficient of h, subtract that quotient sample times h
column by column, and repeat.

This RTL builds both operations from "Vedic" arithmetic blocks. The
multipliers follow the Urdhva Tiryagbhyam ("vertically and crosswise") rule:
every product bit is formed from exactly the partial products of its own
place value. The divider follows the Nikhilam rule ("all from 9 and the last
from 10"): it divides using the divisor's complement, multiplications by it
and additions, with no trial subtractions (one final correction at most). The architecture follows the paper
*Efficacious Convolution and Deconvolution VLSI Architecture for
Productiveness DSP Applications*. Where that paper leaves something open, the
choices made here are listed in [Departures and own choices](#departures-and-own-choices).

Default size: two sequences of **N = 8 samples of W = 6 bits** (unsigned),
giving 15 linear outputs of 15 bits. The design can be parameterised.

## Block structure

```
vedic_dsp_top
├── conv_unit                  linear + circular convolution, pipelined
│   ├── vedic_mul  x N*N       one product per sample pair
│   │   ├── mul2x2             (W = 2)
│   │   ├── mul4x4             (W = 4)   four mul2x2, CSA, 5-bit and 4-bit adders
│   │   ├── vedic_mul_nxn      (W = 8, 16, ...) tree of mul4x4 + vedic_combine
│   │   └── urdhva_mul         (any other W, e.g. the default 6) column-wise
│   ├── cla_adder              columns with 2 products, circular fold
│   └── csa_rca_adder          columns with >= 3 products (csa_row + rca_adder)
└── deconv_unit                sequential carry-free long division
    ├── nikhilam_div           one quotient sample at a time
    │   └── urdhva_mul         head x complement
    └── vedic_mul  x N         quotient sample x h[j]
```

The two engines share only the clock and the reset, so they can work at the
same time. Feeding `conv_y_lin` and the same h into the deconvolution port
gives back x.

## The multipliers

**`mul2x2`.** This is the leaf. Four AND gates form A0B0, A0B1, A1B0 and A1B1.
C0 is A0B0 directly. One half adder sums the two middle products into C1 and a
carry. A second half adder adds A1B1 and that carry, giving C2 and C3.

**`mul4x4`.** Each operand is split into 2-bit halves. Four `mul2x2` blocks
form the vertical products (low×low, high×high) and the crosswise products
(high×low, low×high):

* P1..P0 come straight from the low×low product.
* A 4-bit carry-save row adds the two crosswise products and the upper half of
  low×low.
* A 5-bit adder resolves that row into P3..P2 and three upper bits.
* A 4-bit adder adds those bits to high×high, giving P7..P4.

**`vedic_mul_nxn`** handles any power of two N ≥ 4; the default is 16×16. It
cuts both operands into 4-bit digits and multiplies every digit pair with
`mul4x4`. Each further level doubles the chunk size. `vedic_combine` joins
four sub-products the same way `mul4x4` joins its 2×2 products: low half,
middle sum through carry-save and ripple adders, then high half.

**`urdhva_mul`** handles any WA×WB; the default is 6×6. It applies the
vertically-and-crosswise rule bit by bit. Column sum `pt[k]` counts the bit
products a[i]&b[j] with i+j = k. The columns are then resolved from the LSB
up: column sum plus incoming carry gives the product bit (LSB) and the carry
out (the rest). For 6×6 there are 11 columns with 3-bit sums (for a = 100101, b = 011010 they are, from the most significant column down, 0 1 1 0 2 1 1 2 0 1 0). The divider
also uses this block with unequal widths (15×6).

**`vedic_mul`** picks one of these by sample width: 2 → `mul2x2`,
4 → `mul4x4`, larger powers of two → `vedic_mul_nxn`, anything else →
`urdhva_mul`.

All multipliers are unsigned and purely combinational.

## Convolution unit (`conv_unit`)

1. **Products.** N×N `vedic_mul` instances compute every x[i]·h[j] in
   parallel. Instance j·N+i takes x[i] and h[j].
2. **Latch.** A register captures all N² products when `in_valid` is high.
3. **Column adders.** Output y[n] adds the min(n+1, 2N−1−n) products with
   i+j = n. The adder depends on that count:
   * one product (y[0] and y[2N−2]): wired through, no adder;
   * two products (y[1] and y[2N−3]): a carry look-ahead adder (`cla_adder`,
     4-bit look-ahead groups);
   * three or more: a chain of carry-save rows and a final ripple-carry
     adder (`csa_rca_adder`).

   Every column is 2W + log2(N) bits wide, and no carry crosses between
   columns.
4. **Circular convolution.** The N-point circular result folds the linear
   one: yc[n] = y[n] + y[n+N] for n < N−1, and yc[N−1] = y[N−1]. Each fold is
   one carry look-ahead adder.
5. **Output register.** `y_lin`, `y_circ` and `out_valid` are registered.

**Timing.** With `in_valid` high in cycle t, `out_valid` is high in cycle
t+2. A new convolution can enter every cycle, and results leave in order.
Outputs hold between valid results. Reset is synchronous and active low.

Some top bits of the outer samples can never be set, because those columns
hold only one or two products: 3 bits each of y[0] and y[2N−2], and 2 bits
each of y[1] and y[2N−3] at the default size. They are kept so that all
samples have the same width.

## Nikhilam divider (`nikhilam_div`)

This is the least obvious block. The decimal Nikhilam method divides by d
using its complement to the next power of ten. For example, 123 / 8 uses the
complement 2:

* the head digit 1 is carried into the quotient and 1×2 is added back;
* the process repeats, with no carry from the remainder part into the
  quotient part;
* a remainder that is still too large is divided again.

The binary version works as follows.

* Let k be the bit length of the divisor d, so 2^(k−1) ≤ d < 2^k. The base is
  B = 2^k and the complement is c = B − d. Because d ≥ B/2, c ≤ d.
* The running remainder R splits at the base into a head q = R >> k and a
  tail t = R mod B. Since R = q·B + t = q·d + (q·c + t), one step adds q to
  the quotient and replaces R by **q·c + t**. That is one multiplication by
  the small complement (`urdhva_mul`) and one addition.
* Because c ≤ B/2, R roughly halves with each step. Steps run, one per clock,
  until the head is zero (R < B).
* One correction follows. If R ≥ d, the quotient gains 1 and d is subtracted.
  Since R < B, R − d < c ≤ d, so one correction is always enough.

**Interface.** A `start` pulse while idle loads `dividend` and `divisor`.
`busy` stays high while the divider works. `done` pulses for one cycle, after
which `quotient` and `remainder` are valid; they hold until the next start.
`corrected` reports that the final correction was taken.

**Timing.** From the start pulse to `done` takes at most DW + 2 cycles: 17
for the default 15-bit dividend, 6-bit divisor. A zero divisor finishes at
once with `div_by_zero` set and quotient 0. A `start` while busy is ignored,
and an assertion reports it in simulation.

## Deconvolution unit (`deconv_unit`)

Inputs are `y_in` (2N−1 samples, same width as the convolution output) and
`h_in` (N samples). The unit works from the highest index down, like written
long division. For i = N−1 down to 0:

1. Start the Nikhilam divider with the leading remainder sample r[i+N−1] and
   the leading coefficient h[N−1].
2. Take the quotient as x[i].
3. Subtract x[i]·h[j] from r[i+j] for all j at once, using N `vedic_mul`
   instances. No borrow passes between samples.

A final cycle checks the remainder. `exact` is set only when every remainder
sample is zero, meaning y really was x*h.

Inputs that are not an exact convolution are still handled:

* a negative leading remainder gives x[i] = 0;
* a quotient above 2^W − 1 is saturated;
* in both cases `exact` is cleared.

A zero h[N−1] ends the run at once with `div_by_zero` set.

**Interface and timing.** The handshake is the same as the divider's:
`start`, then `busy`, then a one-cycle `done` pulse. Each output sample takes
one cycle to start the divider, the divider's cycles, and one cycle to
subtract. One more cycle checks the remainder. The bound is N·(YW + 4) + 2
cycles, where YW = 2W + log2 N; that is 154 cycles for the defaults.

Example (4 samples of 4 bits): h = (4, 3, 5, 4) and
y = (12, 17, 37, 34, 28, 16, 0) give x = (3, 2, 4, 0) with `exact` set. Written
highest index first, this is 16 28 34 37 17 12 ÷ 4 5 3 4 = 4 2 3.

## Top level (`vedic_dsp_top`)

Parameters: `N` (samples, default 8) and `W` (bits per sample, default 6).
The output sample width is 2W + clog2(N).

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `conv_in_valid`, `conv_x[N]`, `conv_h[N]` | in | one convolution request per cycle |
| `conv_out_valid`, `conv_y_lin[2N-1]`, `conv_y_circ[N]` | out | result, 2 cycles later |
| `dec_start`, `dec_y[2N-1]`, `dec_h[N]` | in | start a deconvolution (ignored while busy) |
| `dec_busy`, `dec_done`, `dec_x[N]`, `dec_exact`, `dec_div_by_zero` | out | deconvolution status and result |

Coarse synthesis (generic cells, default size): the convolution unit has
about 7,400 word-level cells and 1,090 flip-flops. Most of the cells are the
64 6×6 multipliers. The deconvolution unit has about 700 cells and 160
flip-flops.

## Departures and own choices

Taken from the paper:

* the 2×2 array multiplier;
* the 4×4 Vedic multiplier's block list (four 2×2, 4-bit CSA, 5-bit and 4-bit
  adders);
* the reduction of N×N multipliers to 4×4 blocks;
* the column rule of the Urdhva multiplier;
* the convolution architecture: product array, latch, then no adder, CLA or
  CSA+RCA per column;
* deconvolution as carry-free long division, using Nikhilam division and
  Vedic partial products.

Chosen here, where the paper says nothing:

* **Default size.** The paper's architecture drawing shows 4 samples of 4
  bits with 4×4 multipliers. Its simulation runs 8 samples of 6 bits, and
  those are the defaults here. `N=4, W=4` gives the drawn configuration;
  `vedic_mul` then uses `mul4x4`.
* **Bit-level wiring of `mul4x4`**, and how each `vedic_combine` level joins
  its sub-products.
* **Timing and interfaces.** The "latch" is an edge-triggered register. The
  valid / start / busy / done handshakes, the 2-cycle convolution latency, the
  synchronous reset and the 4-bit CLA groups are all this design's own.
* **Circular convolution** appears in the paper only by name. Here it is the
  N-point fold of the linear result.
* **Nikhilam division in binary.** The base is chosen from the divisor's bit
  length, and a final single correction replaces "divide the remainder
  again". The two are equivalent.
* **Deconvolution of inputs that are not exact convolutions, and division by
  zero**, are handled as described above. The paper does not treat them.
* **Number format.** All samples are unsigned.
* **Worked example.** The paper's printed convolution example
  (f = 8 9 11 10, g = 13 12 14 15) lists y[3] = 498 and y[4] = 419. Its own
  partial-product rows put 10·13 and 10·12 under swapped columns. The correct
  sums, 508 and 409, are what this design produces and what the testbenches
  check.

Not covered: the FPGA implementation results (slices, LUTs, delays). These
depend on the target device and are not reproduced.

## How far it is verified

Every block has a self-checking testbench in `tb/`. Each compares against
arithmetic computed in the testbench and prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_mul2x2`, `tb_mul4x4` | exhaustive |
| `tb_urdhva_mul` | 6×6 exhaustive, plus random 15×6; for 37×26 also the eleven internal column sums |
| `tb_vedic_mul_nxn` | 8×8 exhaustive, 16×16 corners plus 20,000 random pairs |
| `tb_cla_adder`, `tb_csa_rca_adder` | carry-chain corners and random operands |
| `tb_conv_unit` | worked example, all-ones input, random back-to-back stream; 2-cycle latency checked |
| `tb_nikhilam_div` | 123/8, every divisor with the largest dividend, 3,000 random pairs, zero divisor; cycle bound |
| `tb_deconv_unit` | both division examples, 200 random exact and 20 perturbed cases, zero leading coefficient |
| `tb_vedic_dsp_top` | end to end at the default size (see below) |
| `tb_paper_workloads` | the paper's worked examples through the top at the default size: all-ones 8×6 convolution, the 4-sample convolution and its deconvolution, the 16 28 34 37 17 12 ÷ 4 5 3 4 division, 37×26 |

`tb_vedic_dsp_top` runs the whole design at the default size. Each of its 60
rounds does the following:

* it convolves random sequences;
* it deconvolves the result and checks that x comes back exactly;
* meanwhile it streams further convolutions back to back.

It also feeds disturbed y and zero leading coefficients. It counts and
requires each of these at least once:

* back-to-back convolutions;
* circular results;
* exact and inexact deconvolutions;
* negative or oversized quotient steps;
* zero leading coefficients;
* Nikhilam fold steps and final corrections.

It finishes in well under a second.

## Simulating

Everything is plain SystemVerilog-2017. The package `rtl/vedic_pkg.sv` must
be read first, and the other modules are found by name in `rtl/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vedic_pkg.sv \
    --top-module tb_vedic_dsp_top tb/tb_vedic_dsp_top.sv
./obj_dir/Vtb_vedic_dsp_top
```

Any other testbench runs the same way with its own name. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/vedic_pkg.sv rtl/<module>.sv`.
To try another size, override `N` and `W` on `vedic_dsp_top`, `conv_unit` or
`deconv_unit`. Widths follow automatically. The testbenches are written for
the sizes they instantiate (8×6 and 4×4) and need their constants changed
for other sizes.
