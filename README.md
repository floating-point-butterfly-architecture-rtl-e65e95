# Floating-point FFT with a binary signed-digit butterfly

An FFT butterfly does little more than a complex multiply-add. Built from
ordinary IEEE-754 units, though, every multiply and every add pays for its own
carry-propagating adder, leading-zero detection, normalization and rounding.
This design removes most of that cost in two ways:

* **Redundant significands.** Data significands are kept in binary
  signed-digit (BSD) form. Each digit is -1, 0 or +1, stored as a *posibit*
  and a *negabit*. Two BSD numbers add with no carry chain, so partial
  products and the sums that follow never need a carry to ripple across the
  word.
* **Fused operations.** Every output component of a radix-2 butterfly has the
  form `b1*w1 + b2*w2 + a`. One fused dot-product-add (FDPA) unit computes
  this with two multipliers and a three-operand adder. The two exact products
  and the addend are added, and normalization and rounding happen once, at
  the end.

The butterfly is used in a fully pipelined N-point radix-2
decimation-in-time FFT (default N = 8; N = 2 to 32 supported). The FFT takes
and returns IEEE-754 single-precision complex samples. Inside, all data
between stages is in BSD floating point.

## Number formats (`rtl/bsd_fp_pkg.sv`)

| type | contents | value |
|---|---|---|
| `fp32_t` | IEEE-754 single bit pattern | as IEEE-754 |
| `bsdfp_t` | `exp` (10-bit signed, unbiased), `pos[23:0]`, `neg[23:0]` | `(pos - neg) * 2^(exp - 23)` |
| `bsdprod_t` | `exp`, `pos[52:0]`, `neg[52:0]`, `zero` | `(pos - neg) * 2^(exp - 46)`, or 0 if `zero` |
| `bsd_cplx_t`, `fp32_cplx_t` | `re`, `im` | complex pairs |

In these formats:

* Posibits and negabits are stored with their true meaning: `neg[i] = 1`
  means a digit of -1. The whole significand is then simply `pos - neg`.
* The sign lives in the digits, so negation is a swap of `pos` and `neg`.
* A BSD number is zero exactly when every digit is zero, that is when
  `pos == neg`. This follows because the top nonzero digit outweighs all the
  digits below it.
* The canonical zero has all digits zero and exponent `EXP_ZERO = -512`.

Twiddle factors are never converted. They stay in IEEE-754 single form and
are constants.

## The carry-limited BSD adder (`bsd_adder`)

This is the cell everything else is built from. Internally the negabits are
inverted: the bit `~n` has value `1 - n`. A digit is then `p + ~n - 1`, and
each position can use ordinary full adders (FA). At position i:

1. `FA(xp, yp, ~xn)` gives `s1 + 2*c1`. The position now holds
   `s1 + ~yn - 2 + 2*c1`. The term `2*(c1 - 1)` goes up one position as an
   inverted negabit, `c1`.
2. `FA(s1, ~yn, c1 from position i-1)` gives `s2 + 2*c2`. Including the -1
   carried by the incoming negabit, the position holds `(s2 - 1) + 2*c2`. The
   `c2` goes up one position as a posibit.

Result digit i is the posibit `c2` from position i-1 and the negabit `~s2`.
No signal crosses more than one position, so the delay is two full adders
whatever the width. The N+1-digit sum is exact. Position N takes the last
two transfers. If both operands have a zero top digit, that digit is zero in
value (its posibit and negabit may both be set). The multiplier tree relies
on this when it drops it.

## Redundant multiplier (`bsd_fp_mult`)

The multiplier computes a BSD operand times an IEEE twiddle:

* **Exponent.** The unbiased exponents are added.
* **Partial products.** The 24-bit twiddle significand is recoded into 13
  radix-4 Booth digits in {-2..2}. Each partial product is the BSD
  significand shifted by 2k, or 2k+1 for a digit of magnitude 2. A negative
  digit, or a negative twiddle, swaps `pos` and `neg`. No partial product
  needs an adder.
* **Reduction.** A tree of BSD adders sums the 13 partial products
  (13 → 7 → 4 → 2 → 1, four adder delays).
* **No final adder.** The product stays redundant (53 digits) and is exact.
  Normalization and rounding are left to the three-operand adder.
* **Zero.** The `zero` flag is set when the BSD operand is zero or the
  twiddle has a zero biased exponent.

## Three-operand adder and the termination step (`fp3_add`, `fp_norm_round`)

The adder works in three steps:

1. **Alignment.** The addend `a` is widened to the product format. The
   largest exponent among the nonzero operands is chosen. Each operand is
   shifted right by its exponent difference into an 80-digit window, which
   has 27 guard digits below the product LSB. Digits shifted past the window
   are dropped. They weigh less than 2^-70 of the largest operand.
2. **Addition.** Two BSD adders in series add the three operands, still with
   no carry propagation.
3. **Termination.** `pos - neg` is formed by one subtraction. This is the
   only carry-propagating step in a butterfly. The result is normalized by
   leading-one detection and rounded to nearest-even to 24 bits with a guard
   bit and a sticky bit. It is returned as a `bsdfp_t` whose digits are all
   posibits (positive result) or all negabits (negative result).

The termination does not use a redundant LZD, normalizer or rounder. A fully
redundant termination would be faster, at higher area.

## FDPA and butterfly (`fdpa`, `bsd_butterfly`)

`fdpa` is `r = b1*w1 + b2*w2 + a`: two `bsd_fp_mult` feeding one `fp3_add`.
The butterfly computes `x = a + b*w` and `y = a - b*w` with four FDPAs:

```
x.re = a.re + b.re*w.re    + b.im*(-w.im)
x.im = a.im + b.re*w.im    + b.im*w.re
y.re = a.re + b.re*(-w.re) + b.im*w.im
y.im = a.im + b.re*(-w.im) + b.im*(-w.re)
```

A negated twiddle component is made by flipping its sign bit. Each output
component is rounded exactly once.

## FFT data path (`fft_bsd`, `fft_splitter`, `fft_combiner`)

```
in_re/in_im (IEEE, natural order)
  -> fft_splitter   IEEE -> BSD (carry-free), bit-reversed order, register
  -> stage 1        N/2 combiners of size 2
  -> stage 2        N/4 combiners of size 4
  -> ...            stage s: N/2^s combiners of size 2^s, each register-terminated
  -> bsd_to_fp32    BSD -> IEEE (carry-propagate, round), register
out_re/out_im (IEEE, natural order): X[k] = sum_n x[n] e^{-j 2 pi n k / N}
```

The splitter carries out the decimation-in-time split: even-indexed samples
go to one half, odd-indexed samples to the other, repeated down to pairs.
That places sample n at position bitrev(n).

A combiner of size M receives the transform E of the even samples in its
lower half and the transform O of the odd samples in its upper half. It
produces `E[k] ± W_M^k O[k]` with M/2 butterflies. The twiddle constants come
from `twiddle(n, k)` in the package. That function builds W_n^k from a table
of cos(2πj/32), j = 0..8, rounded to single precision, using the symmetries
of cosine. This is why N is limited to 32.

**Interface and timing.** `clk` and `rst_n` (asynchronous, active low; only
the valid bits are reset) are followed by the inputs `in_valid`,
`in_re[N]` and `in_im[N]`, then by the outputs `out_valid`, `out_re[N]` and
`out_im[N]`. The pipeline timing is:

* A new block can enter every cycle, and there is no backpressure.
* `out_valid` rises exactly log2(N)+2 cycles after `in_valid`, so 5 cycles
  for N = 8.
* Data registers load only when their valid bit is set.

## Numerical behaviour and limits

* Each butterfly output is rounded once, to 24 significant bits. The
  alignment window drops digits below 2^-70 of the largest term, so results
  can differ from exactly rounded ones only in rare rounding ties.
* An N-point transform goes through log2(N) butterfly roundings, plus the
  final conversion. Against a double-precision DFT, the bins stay well within
  2^-19 of the sum of the input magnitudes.
* Input subnormals are flushed to zero.
* Infinities and NaNs at the inputs are not supported.
* An output beyond the single-precision range becomes ±infinity. One below
  the normal range becomes ±0.
* The internal 10-bit unbiased exponent (range -512..511) is not checked for
  overflow. It is ample for data that starts out as IEEE singles and passes
  through a few butterflies.

## Design choices not fixed by the butterfly architecture

The following were chosen here:

* The gate-level BSD adder cell, described above. Its critical path is two
  full adders.
* Radix-4 Booth recoding.
* The 53-digit product.
* The 80-digit alignment window without a sticky bit.
* Round to nearest, ties to even.
* The 10-bit exponent.
* Zero, subnormal and overflow handling.
* Pipeline registers after the splitter, after every combiner stage and after
  the output conversion. The butterflies themselves are combinational.
* Conversion of the FFT outputs back to IEEE-754 single.
* The default transform size of 8 points. The twiddle table also supports
  16 and 32 points.

The butterflies are combinational, and the FFT pipeline adds registers
between its stages. A build that has to match a flop-light, mostly
combinational FPGA implementation (a few hundred registers for the
8-point FFT) would drop the output registers of `fft_combiner`.

Two other butterfly structures are not built: the conventional one (4
multipliers, 6 adders) and Golub's 3-multiplier form (9 adders). They serve only
as comparison points for the fused design.

## Files

`rtl/`: one module or package per file.

* `bsd_fp_pkg.sv`: types, widths and the twiddle table.
* `bsd_adder.sv`
* `bsd_fp_mult.sv`
* `fp3_add.sv`
* `fp_norm_round.sv`
* `fdpa.sv`
* `bsd_butterfly.sv`
* `fp32_to_bsd.sv`
* `bsd_to_fp32.sv`
* `fft_splitter.sv`
* `fft_combiner.sv`
* `fft_bsd.sv`: the top.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each
testbench:

* compares against references computed in the testbench, in double precision
  or exact integers;
* has a watchdog;
* prints `TB_RESULT checks=<n> failures=<n>`.

The testbenches share some code:

* `tb_fp_util_pkg.sv` holds the reference arithmetic.
* `fft_run_check.sv` drives and checks a whole FFT:
  * It checks latency, and that valid appears exactly when expected.
  * It uses random, zero-laden, constant and impulse blocks.
  * It sends blocks both back to back and with idle cycles between them.
* `tb_fft_bsd.sv` runs the default 8-point FFT, 300 blocks.
* `tb_fft_bsd16.sv` runs a 16-point FFT, 100 blocks.

The same checker has also passed 60 blocks at N = 32. That size is left out
of the testbench set because its C++ build takes several minutes.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary -Wno-fatal -y rtl -y tb rtl/bsd_fp_pkg.sv tb/tb_fp_util_pkg.sv \
          tb/tb_fft_bsd.sv --top-module tb_fft_bsd
./obj_dir/Vtb_fft_bsd
```

To run another testbench, change the testbench file and the top module name.
The 8-point FFT builds in about a minute and simulates 300 blocks in
well under a second. To change the transform size, set `N` on `fft_bsd` to a
power of two no larger than 32.
