# Multiplier-less transposed-form FIR filter with CSD coefficients

This is a finite-impulse-response filter, y(n) = Σ b(k)·x(n−k), with no
hardware multipliers. Each product b(k)·x(n) has a constant coefficient, so
it can be built from shifted copies of the sample that are added together.
The coefficients are written in **canonical signed digit (CSD)** form, which
makes the number of those additions as small as possible. The products feed
a **transposed-form** delay/adder chain. The coefficients are symmetric
(linear phase), so one multiplier serves each mirror pair of taps. That
halves the multiplier count: 6 shift-add units for the 11 taps of the
default filter.

The default configuration is a 32-bit datapath:

| quantity            | default | note                                         |
|---------------------|---------|----------------------------------------------|
| taps (order)        | 11 (10) | `TAPS`                                       |
| sample `x_in`       | 32 bit  | signed integer                               |
| coefficients        | 32 bit  | signed Q1.31, `COEFS`                        |
| products            | 64 bit  | exact                                        |
| chain / `y_out`     | 65 bit  | exact, no rounding                           |
| distinct multipliers| 6       | (TAPS+1)/2, one CSD shift-add unit each      |
| throughput          | 1 sample per clock, with idle cycles allowed |  |
| latency             | 3 clock edges from sample to output          |  |

The default coefficients form an 11-tap Hamming-windowed band-pass for the
telephone voice band (300 Hz – 3.4 kHz) at a 48 kHz sample rate. Longer
filters of the same kind (orders 100 and 400, Hamming or Blackman) are
built from the same RTL by overriding `TAPS` and `COEFS`. They are exercised
in `tb/csd_fir_workload_tb.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/csd_fir_pkg.sv` | widths, default coefficients, `csd_recode()` |
| `rtl/csd_const_mult.sv` | CSD shift-add constant multiplier (combinational) |
| `rtl/tdf_chain.sv` | transposed-form delay/adder chain with output register |
| `rtl/csd_fir.sv` | top level: input register, multiplier bank, product registers, chain |
| `tb/csd_const_mult_tb.sv` | multiplier and CSD recoding against `*` |
| `tb/tdf_chain_tb.sv` | chain against a direct-form model, with idle cycles and reset |
| `tb/csd_fir_tb.sv` | whole filter at default size: impulse, full scale, random, gaps, reset, latency |
| `tb/csd_fir_workload_tb.sv`, `tb/fir_window_bench.sv` | order-100 and order-400 Hamming/Blackman filters with test tones |

## How a constant multiplier becomes shifts and adds

In binary, a coefficient such as 0x10888889 has a 1 in every place that
costs an adder. A signed-digit form lets each digit be −1, 0 or +1. CSD is
the signed-digit form in which no two neighbouring digits are both
nonzero. It is unique, and no signed-digit form of the same number has
fewer nonzero digits. On average it has about a third as many nonzero digits
as there are bits, compared with a half for plain binary. Runs of ones
collapse: 0111 1111 = 1000 0000 − 0000 0001.

`csd_recode()` in `rtl/csd_fir_pkg.sv` builds the digits from the least
significant end, keeping a remainder r that starts at the coefficient:

* if r is even, the digit is 0;
* if r ≡ 1 (mod 4), the digit is +1 and r becomes r − 1;
* if r ≡ 3 (mod 4), the digit is −1 and r becomes r + 1;

then r is shifted right by one. Choosing ±1 this way leaves r divisible
by 4, so the next digit is always 0. A 32-bit signed coefficient needs at most
33 digits. The result is two 33-bit masks, `pos` and `neg`.

`csd_const_mult` gets the coefficient as a parameter, so the masks are
constants at elaboration. Its `always_comb` loop adds `x <<< i` for every
`pos` bit and subtracts it for every `neg` bit. All terms are
sign-extended to the 64-bit product width. Digits that are zero produce no
logic after constant folding. The result is exact: p = x·COEF for every
32-bit x, including −2^31. The six default coefficients have 8, 9, 10, 12,
11 and 8 nonzero digits: 58 terms, so 52 adders/subtractors in the
multiplier bank.

## Transposed form and the shared products

In the direct form, the samples move along a delay line and one wide
adder tree sums the products. The transposed form moves partial sums
instead. Every tap multiplies the *current* sample, and a register sits
between each pair of adders:

```
x(n) ──┬──────────┬──────────┬── ... ──┬
     b(0)·      b(1)·      b(2)·     b(N-1)·
       │          │          │          │
 y ◄─[+]◄─[D]◄──[+]◄─[D]◄──[+]◄─ ... ◄─[D]
```

`tdf_chain` holds partial sums s[1..N−1]. On each sample it sets
s[N−1] ← p[N−1], s[k] ← p[k] + s[k+1], and y ← p[0] + s[1]. Every path
between registers crosses only one adder, whatever the filter length.

With symmetric coefficients b(k) = b(N−1−k), taps k and N−1−k need the same
product. `csd_fir` therefore builds only (N+1)/2 multipliers, and both
mirror taps read the same product register. The symmetry is checked at
elaboration: an asymmetric `COEFS` stops elaboration with an error.

The chain is 65 bits wide. The result is exact only while Σ|b(k)| < 4 in
Q1.31 units. The value is Σ|b| ≈ 0.61 for the default filter and 2.4 for the
order-400 Hamming filter. If you load coefficients with a larger absolute
sum, widen `AW`.

## Pipeline and interface (`csd_fir`)

```
x_in ─►[x_r]─► 6 × csd_const_mult ─►[prod_r ×6]─► tdf_chain ─►[y_out]
in_valid ─► v1 ───────────────────────► v2 (chain enable) ──► out_valid
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; clears the pipeline and the filter history |
| `in_valid` | in | 1 | `x_in` carries a sample this cycle |
| `x_in` | in | 32 | signed sample |
| `out_valid` | out | 1 | `y_out` carries the output for one sample |
| `y_out` | out | 65 | signed, Σ b(k)x(n−k) with b in Q1.31: `y_out / 2^31` is on the scale of `x_in` |

A sample accepted on clock edge t produces its output on edge t+3, with
`out_valid` high for one cycle. Samples may come on every clock or be
separated by any number of idle cycles. The chain advances only when a
sample's products arrive, so idle cycles do not change the output. At
48 kHz audio rates the filter is idle almost all the time. There is no
back-pressure: the filter always accepts.

## Coefficients

`csd_fir_pkg::HAMMING_BP_COEFS` holds the 11 default values. Both the
package and the testbenches give the formula behind them:
d(m) = [sin(2πf2·m) − sin(2πf1·m)]/(πm) with m = n − 5, d(0) = 2(f2 − f1),
f1 = 300/48000 and f2 = 3400/48000. The window is
w(n) = 0.54 − 0.46·cos(2πn/10), and b(n) = round(d(m)·w(n)·2^31).
An 11-tap filter cannot resolve a 300 Hz edge at 48 kHz. The default
filter is therefore in practice a 3.4 kHz low-pass. The stated band needs
the longer filters.

To use another symmetric filter, pass `TAPS` and a matching `COEFS` array
(`csd_fir_pkg::coef_t`, Q1.31). The multipliers are rebuilt for the new
constants. `tb/fir_window_bench.sv` shows how to compute such an array at
elaboration with a constant function.

## Verification

Every testbench checks itself and ends with `TB_RESULT checks=… failures=…`.

* `csd_const_mult_tb`: 13 constants, the 6 filter coefficients plus
  0, ±1, −2^31, 2^31−1 and alternating-bit patterns. Each gets corner and
  2000 random samples, compared with a 64-bit `*`. `csd_recode` is also
  checked on 213 constants: the digits must sum to the constant, with no
  adjacent nonzero digits.
* `tdf_chain_tb`: random products against a direct-form model, about 25 %
  idle cycles, and a reset in the middle of the run.
* `csd_fir_tb` (default parameters): impulse responses, full-scale steps
  and ±full-scale alternation (the largest outputs), 3500 random samples
  with random gaps, and a reset while the pipeline is full. Every output
  value is checked, and so is its 3-cycle latency. It also counts these
  events and fails if one never happened.
* `csd_fir_workload_tb`: 101- and 401-tap Hamming and Blackman voice-band
  filters. Each is driven with noisy tones from 100 Hz to 10 kHz and
  checked sample by sample. The gain at 1 kHz must be within 10 % of unity
  and the gain at 10 kHz below 0.01. Measured gains: at 1 kHz −0.1 dB
  (101-tap Hamming) and 0.0 dB (401 taps). At 300 Hz about −6 dB (401 taps).
  At 10 kHz −64 dB (101-tap Hamming), −72 dB (101-tap Blackman) and about
  −71 dB for 401 taps, where the test's noise floor limits the measurement.

Running with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module csd_fir_tb \
    -y rtl -y tb +libext+.sv rtl/csd_fir_pkg.sv tb/csd_fir_tb.sv -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the other tests. The
package must come first on the command line. Each test runs in well under a
second.

## Where this design makes its own choices

The following are not fixed by the filter's description and were chosen
here:

* **Register placement.** This design registers the input (32 bit), the six
  products (64 bit) and the chain (10 + 1 registers, 65 bit). A reference
  implementation of the same structure used one more 65-bit register and
  had a long path from the input pin to its first register. That suggests
  the CSD adders came before any input register. Registering the input first
  shortens that path and costs one cycle of latency.
* **Handshake and reset.** The `in_valid`/`out_valid` strobes and the
  synchronous active-high reset were added here.
* **Coefficient format and values.** The format is Q1.31. The values come
  from the windowed-sinc formula above, because no coefficient values were
  specified.
* **Full-precision output.** There is no rounding or saturation. The
  65-bit `y_out` is the exact sum.
* **Adder arrangement.** Inside each CSD multiplier the terms are summed in
  one linear chain, and synthesis may rebalance them. No shared
  subexpressions between coefficients (for example multiple-constant
  multiplication) are used.
* **Data converters.** The sample-and-hold, ADC and DAC around the filter
  are not part of this RTL. `x_in`/`in_valid` and `y_out`/`out_valid` are
  where they connect.
* **Only the CSD structure is built.** A direct-form filter and a
  transposed filter with ordinary multipliers are the usual baselines for
  comparing area and speed. They are not included. Each is the same
  `tdf_chain`, or a plain delay line, with `*` in place of `csd_const_mult`.
