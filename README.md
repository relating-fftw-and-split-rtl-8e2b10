# Split-radix FFT circuits with FFTW-equal or split-radix-equal operation counts

This is a parameterised, fully combinational N-point complex FFT (N a power of two)
together with a thin clocked wrapper. The circuit counts its cost in real arithmetic
operations. Its structure comes from the textbook decimation-in-frequency recursion
with three refinements:

1. **Twiddle factors are exact roots of unity.** Each one is identified by the exact
   pair (k, N) of w_N^k = e^{-i 2 pi k / N}, not by a rounded pair of numbers. This makes
   it possible to decide exactly which multiplications are free.
2. **Decimation in frequency.** The even-indexed outputs are a half-size transform of
   `x_j + x_{j+N/2}`. The odd-indexed outputs are a half-size transform of
   `(x_j - x_{j+N/2}) w_N^j`.
3. **Pulling a common root out of a sum.** In the next stage the odd half is split again.
   Every sum then has the form `w1*c +- w2*d` with `w2/w1 = -i`. It is computed as
   `w1*(c +- (w2/w1)*d)`, so the inner multiplication is a swap and only one real root
   multiplication remains.

Unrolled, these refinements give the split-radix recursion. The only remaining design
choice is the complex multiplier used for general twiddles:

| `STYLE` | complex multiply by a constant a+ib | real operations per general twiddle | whole-transform count equals |
|---|---|---|---|
| `CMUL_4M2A` (default) | (ac - bd) + i(ad + bc) | 4 multiplies, 2 adds | FFTW's generated codelets |
| `CMUL_3M3A` | t1 = a(c+d), t2 = d(b+a), t3 = c(b-a); (t1 - t2) + i(t1 + t3) | 3 multiplies, 3 adds (b+a and b-a are constants) | the classic split-radix algorithm |

## The recursion that `fft_dif_sr` builds

For N >= 4, with j < N/4 for the odd parts:

```
d_j = x_j - x_{j+N/2}           e_j = x_{j+N/4} - x_{j+3N/4}
y_{2k}   = FFT_{N/2}( x_j + x_{j+N/2} )_k                 (j < N/2)
y_{4k+1} = FFT_{N/4}( (d_j - i e_j) * w_N^j  )_k
y_{4k+3} = FFT_{N/4}( (d_j + i e_j) * w_N^3j )_k
```

N = 2 is a single butterfly and N = 1 a wire. Inputs and outputs are in natural order.
The module calls itself three times, once at N/2 and twice at N/4. Elaboration unrolls
this into a flat network of adders and constant multipliers. There are no registers,
no memory and no control.

Each twiddle goes to `twiddle_mul`, which classifies it when the circuit is built:

- **+1, -i, -1, +i**: a swap and/or a negation, with no arithmetic. In this recursion only
  w^0 = 1 actually occurs (at j = 0). The multiplications by -i and +i are absorbed into
  the `d_j -+ i e_j` adders.
- **Odd powers of w_8** (j = N/8): both parts of the root have magnitude sqrt(2)/2.
  `cmul_w8` forms `c+d` and `d-c` and scales each by +-sqrt(2)/2: 2 multiplies, 2 adds.
- **Everything else**: `cmul_4m2a` or `cmul_3m3a`, selected by `STYLE`.

## Operation counts

`fft_pkg::fft_muls(N, STYLE)` and `fft_pkg::fft_adds(N, STYLE)` walk the same recursion,
using the same classification function as the generate blocks. They return the number
of real multipliers and real adders/subtractors the circuit contains. The testbench
checks them against these published reference counts (multiplies/adds):

| N | 4 | 8 | 16 | 32 | 64 | 128 | 256 |
|---|---|---|---|---|---|---|---|
| `CMUL_4M2A` | 0/16 | 4/52 | 24/144 | 84/372 | 248/912 | 660/2164 | 1656/5008 |
| `CMUL_3M3A` | 0/16 | 4/52 | 20/148 | 68/388 | 196/964 | 516/2308 | 1284/5380 |

FFTW has no single codelet for 128 and 256 points. For those sizes the counts
commonly quoted for FFTW are estimates (about 752/2208 and 2016/5184), and this circuit
uses fewer operations. The counts do not include rounding adders, sign changes or
wiring.

## Number format (this design's choice)

The operation counts above are usually stated for floating-point arithmetic. This RTL
uses two's-complement fixed point instead:

- **Samples.** Every internal value of an N-point transform has the same width `W`.
  `fft_top` sets `W = DW + log2(N) + 1`, which holds the largest possible output bin
  (N * sqrt(2) * full scale) without overflow. No scaling is done between stages, and
  the output is the unscaled DFT.
- **Coefficients.** These are signed `TW`-bit integers scaled by 2^(TW-2). With TW = 16,
  1.0 is 16384, and sqrt(2), needed for b+a and b-a, still fits. `fft_pkg` computes them
  at elaboration time from `$cos`/`$sin`: `round(cos(2 pi k/N) * 2^(TW-2))` and
  `round(-sin(2 pi k/N) * 2^(TW-2))`. For b+a and b-a it rounds the exact sums.
- **Rounding.** Each complex multiplier adds its products at full precision and rounds
  once back to `W` bits: it adds half an LSB, then shifts right arithmetically.

Accuracy measured against a double-precision DFT with random full-scale 16-bit input:
the worst bin error is a few LSB at N = 16, about 20-40 LSB at N = 64..128, and about
30-55 LSB at N = 256. At N = 256 the output is 25 bits wide. The error comes mainly
from the 14 fraction bits of the coefficients; raise `TW` to reduce it.

## Clocked wrapper `fft_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a new input vector is present |
| `in_re[N]`, `in_im[N]` | in | `DW` signed | samples x_0 .. x_{N-1} |
| `out_valid` | out | 1 | `out_re`/`out_im` hold a new transform |
| `out_re[N]`, `out_im[N]` | out | `DW+log2(N)+1` signed | bins y_0 .. y_{N-1}, natural order |

Parameters: `N = 256`, `DW = 16`, `TW = 16`, `STYLE = CMUL_4M2A`.

Each vector is registered on entry, transformed combinationally and registered on exit.
`out_valid` therefore follows `in_valid` by exactly two cycles, and a new vector can
enter every cycle. The output registers hold their value when no vector is finishing.
The transform itself is combinational. The registers exist only to give the block a
clocked interface. The whole combinational network lies between two register stages,
so the clock period must cover log2(N) adder levels plus the twiddle multipliers. At
N = 256 the wrapper has 20,994 flip-flop bits, and coarse synthesis reports about
6,900 word-level cells.

## Modules

| file | role |
|---|---|
| `rtl/fft_pkg.sv` | style and root-kind enums, twiddle constants, root classification, operation-count functions |
| `rtl/cmul_4m2a.sv` | constant complex multiply, 4 multiplies and 2 adds |
| `rtl/cmul_3m3a.sv` | constant complex multiply, 3 multiplies and 3 adds |
| `rtl/cmul_w8.sv` | multiply by w_8, w_8^3, w_8^5 or w_8^7: 2 multiplies and 2 adds |
| `rtl/twiddle_mul.sv` | picks the free case, `cmul_w8` or one of the two general multipliers for w_N^K |
| `rtl/fft_dif_sr.sv` | the recursive combinational transform |
| `rtl/fft_top.sv` | registered input/output wrapper (top) |

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and
has a cycle watchdog.

- `tb/cmul_4m2a_tb.sv`, `tb/cmul_3m3a_tb.sv`, `tb/cmul_w8_tb.sv`: every non-trivial
  root of 32 (or every odd power of w_8), with random and extreme inputs. Each result
  is checked bit-exactly against an integer model of the formula. It is also checked
  against the exact complex product, within 1 LSB plus the coefficient error.
- `tb/twiddle_mul_tb.sv`: all 16 roots of 16 in both styles. The trivial roots must be
  exact.
- `tb/fft_dif_sr_tb.sv`: sizes 4 to 128 in both styles, with corner-case vectors
  (impulse, all-maximum, all-minimum, alternating, a pure tone) and random vectors,
  compared against a direct double-precision DFT. It also checks the operation-count
  table above for N = 4 .. 256.
- `tb/fft_top_tb.sv`: the top at its defaults (N = 256). It checks back-to-back and
  gapped traffic, the 2-cycle latency, output hold, reset while a vector is in flight,
  and every bin of 12 transforms.
- `tb/fft_top_sr_tb.sv`: the same test with `STYLE = CMUL_3M3A` at N = 256.

Vectors pass when every bin is within an error budget of log2(N) x (2 LSB + 2^-17 x
the sum of input magnitudes). This is roughly ten times the error observed. A
structural mistake produces errors of 10^5 LSB or more.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/fft_top_tb.sv --top-module fft_top_tb -o sim
./obj_dir/sim
```

Replace `fft_top_tb` with any other testbench name. The N = 256 testbenches spend most
of their time compiling, typically under half a minute. The simulation itself takes
seconds.

## Changing the design

- **Size.** Set `N` to any power of two. Counts and widths follow automatically.
- **Complex multiplication.** Set `STYLE` to `CMUL_3M3A` to trade one multiplier for
  one adder per general twiddle.
- **Precision.** `DW` is the input width. `TW` is the coefficient width: fraction
  bits = `TW - 2`.
- **Pipelining.** The core is a single combinational cloud. For a high clock rate,
  insert registers between recursion levels in `fft_dif_sr`, at the outputs of the
  butterflies and of the `twiddle_mul` instances.

## Departures and limits

- Fixed point instead of floating point. The counts of real multipliers and adders
  are the same, but the accuracy is that of the chosen widths.
- The input and output registers and the valid bit are additions for a clocked
  interface. The published circuits are combinational.
- When Verilator lints `fft_dif_sr` on its own as the top module, it reports the
  sub-transform nets as unused or undriven. This comes from the self-instantiation.
  Inside `fft_top` or a testbench the lint is clean (see the module header).
- Only the forward transform is provided, with no inverse and no scaling options.
