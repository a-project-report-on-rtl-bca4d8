# Lookup-table sine and cosine generator with tangent/cotangent divider

This design makes digital sine and cosine waves at a programmable frequency.
It uses a phase accumulator and a table that holds only half a period of the
sine function. The cosine is read from a second copy of the same table at a
phase a quarter period ahead. The negative half of each wave comes from an
adder that negates the table sample. A sequential shift-and-subtract divider
turns a sine/cosine pair into the tangent and cotangent.

A "combined scheme" is also built. A second, fine-frequency generator is mixed
with the main one through the angle-sum identities, so a small frequency
offset can be added to the main one.

Three more generators sit beside it, each with its own ports:

* a polynomial evaluator for sine and cosine;
* a recursive single-frequency oscillator;
* a rotating multiple-frequency oscillator.

Together with the table generator they make up the schemes that the combined
generator is meant to superimpose. Only the two-generator mixing is specified
as a connection, so these three are not wired to the others.

All sizes are parameters. The defaults are a 32-bit phase and frequency word,
16-entry x 16-bit tables, and 32-bit outputs.

## Block diagram

```
            f (32)                                     f_fine (32)
              |                                            |
  +-----------v-----------------------------+    +---------v---------+
  | sin_gen (main / coarse)                 |    | sin_gen (fine)    |
  |  SMP+RgP  phase_accumulator  --> P      |    |  same structure   |
  |  P[30:27] -> ROM S1 -> SMS (neg if P31) |    +----+---------+----+
  |  P[31:30]+1 = t2 (SM1)                  |         |sin y    |cos y
  |  {t2[0],P[29:27]} -> ROM S2 -> SMC      |         |         |
  |              (neg if t2[1])             |         |         |
  |  RgS -> sin_o      RgC -> cos_o         |         |         |
  +-------+----------------+----------------+         |         |
          |                |                          |         |
          |      +---------+---------------------+----+---------+--+
          |      |                               | combined_mixer  |
          +------+---------------------------+   | sin(x+y),cos(x+y)|
          |      |                           |   +--------+--------+
  +-------v------v---------------------+     |            |
  | tan_cot_unit                       |     +------------+--> sin_mix, cos_mix
  |  restoring_divider: |sin|<<16/|cos||
  |  restoring_divider: |cos|<<16/|sin||
  +-------------+----------------------+
                |
        tan_o, cot_o, tc_valid, tan_inf, cot_inf

  standing apart, with their own ports:
    tp_x -> taylor_sincos -> tp_sin, tp_cos
    rs_*  -> resonator_oscillator -> rs_y
    ro_*  -> rotation_oscillator  -> ro_sin, ro_cos
```

## How the generator addresses a half-period table

This is the part that takes the most care. The phase register RgP is
`PHASE_W` bits wide (32 by default). The output frequency is
`f * fclk / 2**PHASE_W`. Only the top five bits of the phase choose a sample,
so one period has 32 distinct samples.

| phase bits      | use                                                       |
|-----------------|-----------------------------------------------------------|
| `P[31]`         | which half of the period: 1 means negate the sine sample  |
| `P[30:27]`      | sine table (ROM S1) address, 0..15 within the half period |
| `P[31:30]`      | quadrant, input to the 2-bit adder SM1                    |
| `P[29:27]`      | low three bits of the cosine table (ROM S2) address       |
| `P[26:0]`       | fractional phase, sets the frequency resolution only      |

Table entry `i` holds `round(32767 * sin(pi * i / 16))`. The values run 0,
6393, 12539, ... up to 32767 at `i = 8`, then back down to 6393 at `i = 15`.
The first half of a period reads the table directly. The second half reads the
same entries and negates them.

The cosine uses `cos(x) = sin(x + pi/2)`. A quarter period is exactly one step
of the two top phase bits. SM1 therefore adds 1 to `P[31:30]`, and its 2-bit
result is called `t2`:

* `t2[1]` is the top phase bit of the shifted phase. It tells SMC to negate.
* `{t2[0], P[29:27]}` is the shifted address inside the half period.

No other arithmetic on the phase is needed.

In the configuration `sincos_top`, `sin_gen` has:

* one 32-bit accumulator;
* two 16 x 16-bit ROMs;
* one 2-bit adder;
* two 32-bit sign adders;
* the sine and cosine output registers.

## Output number format

`sin_o` and `cos_o` are 32-bit two's complement numbers. Their range is
-32767 to +32767, with a peak of `2**15 - 1`. Bits 31..15 are therefore all
copies of the sign. The sign adder zero-extends the unsigned table sample and
computes either `0 + u` or `0 - u`. As an unsigned number, a negative sample
reads as a value near `2**32`.

The peak of 32767 rather than 32768 keeps the negated value inside 16 signed
bits. A narrower consumer can take `sin_o[15:0]`.

## Timing

* **Generator:** a new sine and cosine sample on every clock. The ROMs are
  combinational, and RgS/RgC are the only stage after the phase register.
  On a given clock, `sin_o`/`cos_o` belong to the phase that RgP held one
  clock earlier.
* **Mixer:** one register stage, so `sin_mix`/`cos_mix` follow
  `sin_o`/`cos_o` by one clock.
* **Divider unit:** `valid` rises `W + FRAC + 1` clocks after a start is
  accepted, which is 49 clocks at the defaults. In `sincos_top` the unit
  restarts as soon as it is idle. It always divides the sample pair that was
  on `sin_o`/`cos_o` at the clock edge where it restarted. `tc_valid` pulses
  once per result, every 49 clocks.
* **Reset:** `rst` is asynchronous and active high. It clears every register.

## Divider: tangent and cotangent

`restoring_divider` is an unsigned N-bit divider using the textbook restoring
algorithm:

* the accumulator A is cleared and Q is loaded with the dividend;
* each clock, A and Q shift left together;
* M is subtracted from the shifted A by an (N+1)-bit adder;
* if the result is negative, the shifted A is kept (the "restore") and the
  new quotient bit is 0;
* otherwise the difference replaces A and the quotient bit is 1.

After N clocks Q holds the quotient and A the remainder. The subtract and the
restore happen in the same clock: the adder's result is simply not taken when
it is negative. This gives the same numbers as subtracting and then adding M
back. A start request while busy is ignored. A zero divisor returns an
all-ones quotient and sets `div_by_zero`.

`tan_cot_unit` runs two such dividers side by side, one for tan and one for
cot:

1. It takes the magnitudes of the sine and cosine.
2. It shifts the numerator left by `FRAC` bits (16 by default).
3. It divides at `W + FRAC` = 48 bits, so the shifted numerator cannot
   overflow.
4. It negates the quotient when the signs of sine and cosine differ.

Results are signed fixed point with 16 fraction bits, so 65536 means 1.0.
tan(45 degrees) comes out as exactly 65536, because the sine and cosine
samples are equal there. A result that does not fit in 32 signed bits
saturates to +/-(2**31 - 1). Division by zero does the same and also sets
`tan_inf` or `cot_inf`. With generator samples this happens when the cosine
or sine sample is 0, at 0, 90, 180 and 270 degrees.

## Combined scheme: mixing two generators

`combined_mixer` takes sin x, cos x from the main generator and sin y, cos y
from the fine generator. It forms:

```
sin(x+y) = sin x * cos y + cos x * sin y
cos(x+y) = cos x * cos y - sin x * sin y
```

Each product is a 16 x 16-bit signed multiply, using the low 16 bits of each
input. The two products are added or subtracted at full width, shifted right
arithmetically by 15, and registered.

The phase of the result advances by `f + f_fine` per clock. The fine word
therefore tunes the main frequency without changing the main generator.
Because both inputs are quantised samples, the mixed output is within about
2 LSB of `32767 * sin(x + y)`. The testbench checks this to 3 LSB.

## The other three schemes

**Polynomial sine/cosine (`taylor_sincos`).** For an angle of `pi*x/2`
with |x| < 1 it evaluates two fitted polynomials:

```
sin(pi*x/2) = 1.57063 x - 0.64323 x^3 + 0.07271 x^5
cos(pi*x/2) = 0.9994 - 1.22279 x^2 + 0.22399 x^4
```

It uses Horner form: `x2 = x*x`, then
`sin = x*(C1 + x2*(-C3 + x2*C5))` and `cos = C0 + x2*(-C2 + x2*C4)`. That is
six multipliers in all. The formats are:

* `x` is a signed 16-bit fraction, so -32768 means -90 degrees;
* coefficients have 16 fraction bits;
* results have 15 fraction bits, so 32768 means 1.0;
* every product is truncated.

The logic is combinational, followed by one register. The worst error against
the true functions is about 20 LSB, or 0.06 % of full scale. That comes from
the polynomials, not the arithmetic. The range is a quarter turn each side of
zero; other angles need quadrant folding that this block does not do.

**Recursive oscillator (`resonator_oscillator`).** This block computes
`y(i) = 2cos(b) * y(i-1) - y(i-2)`, a second-order recursive filter that
neither grows nor decays. It produces `sin(i*b)` from the start values
`y(-1) = -sin b`, `y(-2) = -sin 2b`, or `cos(i*b)` from `y(-1) = cos b`,
`y(-2) = cos 2b`.

The frequency is `b * fclk / (2*pi)`. Coefficient and samples are signed
32-bit numbers with 30 fraction bits. The user computes them; they should be
rounded so that a sine starts exactly at 0. One sample is produced per clock
after `load`.

Every frequency needs its own coefficient and start values. Very low and very
high frequencies lose accuracy, as for any such resonator.

**Rotating oscillator (`rotation_oscillator`).** Every clock, this block
rotates the pair (sin x, cos x) by a step angle y, given as sin y and cos y.
It uses the same identities as the mixer, in 32-bit words with 30 fraction
bits. Any step can be loaded together with a start pair.

Rounding makes `sin^2 + cos^2` drift slowly away from 1. No amplitude
correction is applied, because none is specified. In a 300-step test the
error stays below 1e-6 of full scale.

In `sincos_top` both oscillators step on every clock in which their `load`
input is low.

## Files

| file                        | contents                                         |
|-----------------------------|--------------------------------------------------|
| `rtl/sincos_pkg.sv`         | default word sizes                               |
| `rtl/phase_accumulator.sv`  | SMP + RgP                                        |
| `rtl/sine_half_rom.sv`      | half-period sine table, computed at elaboration  |
| `rtl/quarter_shift_adder.sv`| SM1, the +90 degree 2-bit adder                  |
| `rtl/sign_adder_reg.sv`     | SMS/SMC with RgS/RgC                             |
| `rtl/sin_gen.sv`            | the complete generator                           |
| `rtl/restoring_divider.sv`  | sequential restoring divider                     |
| `rtl/tan_cot_unit.sv`       | signed fixed-point tan and cot                   |
| `rtl/combined_mixer.sv`     | angle-sum mixer                                  |
| `rtl/taylor_sincos.sv`      | polynomial sine/cosine                           |
| `rtl/resonator_oscillator.sv`| recursive single-frequency oscillator           |
| `rtl/rotation_oscillator.sv`| rotating multiple-frequency oscillator           |
| `rtl/sincos_top.sv`         | top level                                        |
| `tb/tb_ref_pkg.sv`          | reference table and tan/cot model for the tests  |
| `tb/tb_<module>.sv`         | one self-checking testbench per module           |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
The RTL package and the testbench reference package are listed explicitly.
The other modules are found through the library path:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv \
  rtl/sincos_pkg.sv tb/tb_ref_pkg.sv tb/tb_sincos_top.sv \
  --top-module tb_sincos_top -o sim
./obj_dir/sim
```

Replace `tb_sincos_top` with any other `tb_*` to test one block. Each test
compares against an independent model:

* listed table values;
* the `/` and `%` operators;
* 64-bit integer fixed-point arithmetic;
* real `$sin`/`$cos`/`$tan`.

Each test also checks the latencies given above. `tb_sincos_top` runs the
whole design at its default sizes for about 2700 clocks. It counts these
events and fails if any of them never happens:

* negative sine and cosine half waves;
* phase wrap in both generators;
* tangent/cotangent refreshes;
* cosine = 0 and sine = 0 at the divider;
* mixing with a non-zero fine sine;
* a new polynomial angle on every clock;
* a sine load and a cosine load of the recursive oscillator;
* a reload of the rotating oscillator.

The oscillators are checked every clock against their recurrences computed
in 64-bit integers.

To change a size, override the parameters of `sincos_top` (`PHASE_W`,
`ADDR_W`, `DATA_W`, `OUT_W`, `FRAC`). The oscillators keep `OUT_W - 2`
fraction bits. The tables are recomputed, but the
testbenches' reference values assume the default sizes.

## How far it follows the original circuit, and where it departs

These parts follow the original circuit:

* a 32-bit phase accumulator with the frequency word as increment;
* two ROMs of 16 x 16 bits each holding half a sine period, addressed by the
  four phase bits below the top one;
* sign adders with one input at zero;
* the 2-bit +90 degree adder;
* three registers: phase, sine, cosine;
* 32-bit outputs;
* the port names `f`, `clk`, `rst`, `sin_o`, `cos_o`;
* tangent and cotangent obtained by dividing the sine and cosine registers,
  using the restoring shift/subtract division algorithm;
* the combined scheme, which mixes a high-frequency and a low-frequency
  generator by the angle-sum identities;
* the polynomial coefficients, the resonator recurrence with its two sets of
  start values, and the rotating recurrence.

These are this design's own choices, not given by the original:

* **Sign bit.** The original text names "bit 15" as the sine sign control.
  With a 32-bit accumulator and the table addressed by bits 30..27, the sign
  is bit 31, and that is what is used.
* **Table amplitude.** The stored amplitude is 32767. It fits the original's
  16-bit ROM width and its 32-bit outputs whose bits 31..15 are sign copies.
* **Divider handshake.** `start`/`busy`/`done` and one iteration per clock.
* **Divider format.** The tan/cot fixed-point format (16 fraction bits),
  magnitude division with sign correction, saturation and the
  undefined-result flags.
* **Refresh policy.** The divider unit restarts as soon as it is idle, so
  tangent and cotangent are refreshed every 49 clocks, not every sample.
* **Combined-scheme wiring.** The main generator doubles as the coarse
  generator. Multiplier width, scaling by 2**-15 and the output register are
  also this design's choice.
* **Reset.** Asynchronous, active high.
* **Extra output.** `sin_gen` brings out its phase register as an extra port.
* **Other schemes.** Number formats and load/enable interfaces of the
  polynomial evaluator and the two oscillators. They are not connected to the
  table-based generator.
* **Amplitude correction.** The rotating oscillator has none. The non-linear
  correction that would hold its amplitude is left out because it is not
  specified.

Not built:

* a CORDIC unit for tangent, cotangent, secant and cosecant. It is only named
  as a future extension, with no architecture.
* a 64-bit version. It is also only a future plan, but the phase and output
  widths are parameters.

## Size

With the default sizes, `sin_gen` alone has 96 register bits. Only 64 of them
are distinct, since bits 31..16 of each output copy bit 15. It also has two
256-bit ROMs.

The whole `sincos_top` has 804 register bits, most of them in the two 48-bit
dividers and the two oscillators. It has four 256-bit ROMs. Its multipliers
are:

* four 16 x 16 multipliers in the mixer;
* six in the polynomial evaluator;
* one 32 x 32 multiplier in the recursive oscillator;
* four 32 x 32 multipliers in the rotating oscillator.
