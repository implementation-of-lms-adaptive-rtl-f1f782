# LMS adaptive FIR filter with Vedic multipliers

An adaptive filter changes its own coefficients while it runs. It does not
need the statistics of the signal or of the noise to be known beforehand.
This design is a transversal (tapped-delay-line) FIR filter whose tap weights
are trained by the least-mean-squares (LMS) algorithm. Each clock it receives
an input sample `x[n]` and the desired response `d[n]`. It then runs one whole
LMS step:

```
y[n]     = sum_{k=0}^{TAPS-1} w_k[n] * x[n-k]      filter output
e[n]     = d[n] - y[n]                             estimation error
w_k[n+1] = w_k[n] + mu * x[n-k] * e[n]             tap-weight adaptation
```

Every multiplication in that loop is done by a Vedic multiplier. This is a
parallel array multiplier based on the *Urdhva Tiryagbhyam* ("vertically and
crosswise") rule of Vedic arithmetic. Typical uses are system identification,
channel equalisation, and noise or echo cancellation. In system identification
the filter learns the impulse response of an unknown system from that system's
input and output. The end-to-end testbench runs exactly this case.

## Dataflow of one step

```
 x_in ─────┐
           v
 +-------------------+   u[n] = {x[n], x[n-1], ..., x[n-TAPS+1]}
 | fir_filter        |───────────────────────────────┐
 |  delay line       |                               v
 |  TAPS Vedic mults |  y[n]  +-----------+  e[n]  +----------------------+
 |  128-bit adders   |──────> | lms_error | ─────> | lms_weight_update    |
 +-------------------+  d_in─>| d - y,    |   mu ─>|  mu*e  (1 Vedic mult)|
           ^                  | saturate  |        |  u_k*(mu*e) (TAPS)   |
           |                  +-----------+        |  weight registers    |
           |                                       +----------------------+
           |               weights w[n]                       |
           └──────────────────────────────────────────────────┘
```

The loop has no registers inside it except the delay line and the weights.
The filter output, the error and every weight correction are combinational
functions of the new sample, the delay line and the current weights. At the
clock edge with `in_valid` high, three things happen. The delay line shifts.
All weights take their new values. `y[n]` and `e[n]` are registered onto
`y_out` and `e_out`. So the filter takes one sample per clock, and its outputs
appear one clock later with `out_valid`. A clock with `in_valid` low changes
nothing and clears `out_valid`.

The price of doing one step per clock is a long combinational path. It runs
through three multipliers in series: `w*x` in the filter, then `mu*e`, then
`u*(mu*e)`. It also passes the adder chain, the error subtractor and the
weight adder. No pipelining is done. Pipelining the loop would change the
algorithm into delayed LMS, which is a different filter.

## Number format

All quantities are two's-complement fixed-point numbers of `DATA_W` bits.
This covers samples, desired response, weights, error and step size. `FRAC_W`
of those bits are fractional. The defaults are `DATA_W = 64` and
`FRAC_W = 32` (Q32.32), so `1.0` is `64'sh1_0000_0000`.

- A product of two such numbers is kept at its full 128 bits (Q64.64).
- The filter adds its `TAPS` full products with 128-bit adders. The sum is
  rescaled only once: arithmetic shift right by `FRAC_W`, then the low
  `DATA_W` bits are kept.
- `mu*e` and each `u_k*(mu*e)` are rescaled the same way before use.
- Weight additions and the rescaled filter output wrap on overflow.
- The error alone saturates. `d - y` is formed with one extra bit and clipped
  to the 64-bit range, and the output `e_sat_out` reports each clip. A wrapped
  error would have the wrong sign, which would push the weights away from the
  solution. A clipped error still points the right way.

The data are real-valued. The conjugates of the complex form of LMS therefore
drop out.

## The Vedic multiplier

`vedic_mul` is an unsigned `N x N` multiplier, where `N` is a power of two.
The default is `N = 64`. It is built in levels:

1. **Leaf, 2 x 2 (`vedic_mul_2x2`).** Bit 0 is the vertical product `a0&b0`.
   Bit 1 is the sum of the two crosswise products `a1&b0` and `a0&b1`, made by
   a half adder. The second vertical product `a1&b1` is added to that carry by
   a second half adder, giving bits 2 and 3. The cell has four AND gates and
   two half adders.
2. **Combining level.** Cut both operands into digits of `s` bits. The
   product of two `2s`-bit digits `(ah:al) x (bh:bl)` comes from four products
   of the level below:

   ```
   al*bl  +  (ah*bl + al*bh) << s  +  ah*bh << 2s
   vertical      crosswise            vertical
   ```

   These are added by three adders of width `4s` or less.
3. Level `l` holds `(N/2^(l+1))^2` digit products, each `2^(l+2)` bits wide.
   After `log2(N)` levels one `N x N` product remains. For `N = 64` this means
   1024 leaf cells, then 256 4x4, 64 8x8, 16 16x16 and 4 32x32 partial
   products, and finally the 64x64 result.

In the RTL the levels are a `for` generate over `l`. Each level reads the
`prod` array of the level below (`g_lvl[l-1].prod`), so there is no recursive
module instantiation. All digit products of a level are formed in parallel,
and the whole multiplier is combinational.

`vedic_mul_signed` makes the core usable for signed numbers. It takes the
magnitudes of both operands, multiplies them in `vedic_mul`, and negates the
product when exactly one operand was negative. The magnitude of the most
negative number, `2^(W-1)`, still fits in `W` unsigned bits. Every input pair
therefore gives the exact 2W-bit product.

At the defaults the filter has `2*TAPS + 1 = 9` of these 64-bit multipliers:
four in the filter, one for `mu*e` and four for the corrections.

## Interface of `lms_filter` (top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers use the rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears delay line, weights and outputs |
| `in_valid` | in | 1 | `x_in`/`d_in` hold a new sample pair; one LMS step is taken at this edge |
| `x_in` | in | `DATA_W` | input sample `x[n]` |
| `d_in` | in | `DATA_W` | desired response `d[n]` |
| `mu` | in | `DATA_W` | step size, same fixed-point format |
| `out_valid` | out | 1 | `in_valid` delayed by one clock |
| `y_out` | out | `DATA_W` | filter output `y[n]` of the sample taken at the last valid edge |
| `e_out` | out | `DATA_W` | error `e[n]` of that sample |
| `e_sat_out` | out | 1 | `e_out` was clipped |
| `weights` | out | `DATA_W` x `TAPS` | current weights; after convergence, the identified impulse response |

Parameters: `DATA_W` (64), `FRAC_W` (32) and `TAPS` (4). Their defaults come
from the package `lms_pkg`. `TAPS` can take any value of 1 or more. `DATA_W`
must be a power of two, because the Vedic core requires it.

**Choosing `mu`.** LMS stays stable for `0 < mu < 2/(TAPS*Smax)`, where `Smax`
is the largest power-spectral density of the input. Within that range, a
larger `mu` converges faster but leaves more excess error. With white input
uniform in [-1, 1) and 4 taps, `mu = 0.25` (`64'sh4000_0000`) converges to the
plant within a few hundred samples. Setting `mu = 0` freezes the weights, and
the design then acts as a fixed FIR filter.

Weights start at zero after reset. There is no port for loading weights.

## Files

| file | content |
|---|---|
| `rtl/lms_pkg.sv` | default width, binary point and tap count |
| `rtl/vedic_mul_2x2.sv` | 2 x 2 Vedic cell |
| `rtl/vedic_mul.sv` | unsigned N x N hierarchical Vedic multiplier |
| `rtl/vedic_mul_signed.sv` | sign-magnitude wrapper for two's-complement operands |
| `rtl/fir_filter.sv` | delay line, one multiplier per tap, 128-bit adder chain |
| `rtl/lms_error.sv` | saturating `d - y` |
| `rtl/lms_weight_update.sv` | `mu*e`, per-tap corrections, weight registers |
| `rtl/lms_filter.sv` | top: the three parts wired into the LMS loop |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/lms_pkg.sv tb/lms_filter_tb.sv \
          --top-module lms_filter_tb -o sim
./obj_dir/sim
```

To run another testbench, replace `lms_filter_tb` with its name.

What the testbenches check:

- `vedic_mul_tb` checks the 64-bit multiplier on corner and random operands.
  It also checks an 8-bit instance on all 65,536 operand pairs. The expected
  products come from the simulator's own multiplication.
- `vedic_mul_signed_tb` does the same for signed operands, with all sign
  combinations and the most negative value.
- `fir_filter_tb` checks the impulse response, which must return the
  coefficients in order. It then feeds random data with idle clocks, checking
  against a reference delay line, and finally checks reset.
- `lms_error_tb` checks random differences and all four overflow corners.
  Both saturation directions must occur.
- `lms_weight_update_tb` checks a single exact update, which must be visible
  one clock later. It then runs 3000 random updates against a reference of
  the fixed-point recursion, and checks that `mu = 0` holds the weights and
  that reset clears them.
- `lms_filter_tb` runs at the full default size and takes under a second.
  It does system identification of a 4-tap plant, with idle clocks mixed in.
  Then the plant changes and the filter must track it. Next, `mu = 0` freezes
  the weights while `d` is driven to full scale, which saturates the error
  both ways. Last comes a reset during operation. Every clock is compared
  bit-exactly against a reference model of the same fixed-point algorithm.
  After each adaptation phase the weights must be within 2^-16 of the plant.
  The testbench counts each of these mechanisms and fails if any of them
  never happened.

## Design choices and limits

What comes from the underlying design: the LMS recursion and its three
parts, the transversal filter structure, the use of a Vedic multiplier for
the products, and the 64-bit data and 128-bit product width. That width is
inferred from the 64-bit registers and 128-bit adder in its synthesis
statistics. The following are choices made here:

- **Tap count and binary point.** No tap count or fixed-point format was
  specified. Four taps and Q32.32 are used. Both are parameters.
- **Multiplier structure.** Only the Vedic multiplier's name was given. The
  hierarchy above is the usual Urdhva Tiryagbhyam construction, and the
  signed wrapper was added here.
- **Parallel update.** All weights are updated in parallel, each with its
  own multiplier, rather than one coefficient after another.
- **`mu` handling.** `mu` is a run-time input. `mu*e` is computed once and
  shared by all taps, which saves `TAPS - 1` multipliers compared with
  scaling every tap's product separately.
- **Saturation.** The error saturates. The filter output and the weights wrap.
- **Registers.** The reference synthesis statistics also list 128-bit
  registers. This design registers nothing at 128 bits: only the 64-bit
  delay line, the weights and the outputs.
- **Timing.** The design runs one step per clock with a single `in_valid`
  strobe. There is no back-pressure and no pipelining, so the clock rate is
  set by the three-multiplier loop described above.
- **Not included.** A variable-length FIR built on a data-reuse structure and
  a recurrent-coefficient scheme is sometimes paired with such filters. It is
  not included, because how it works was not specified.
