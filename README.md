# Reconfigurable interpolation filter (up-sampling by 2, 4 or 8)

A multi-standard software-defined radio needs interpolators with different
up-sampling factors and different coefficient vectors. Building one
interpolator per standard costs a lot of area. This design is one FIR
interpolation filter that covers up-sampling by 2, 4 and 8. A 4-bit select
picks the factor, and with it the coefficient vector. The datapath does not
change between factors. Only the data history and the coefficients fed to it
change.

The filter is built from three units:

* the **vector generation unit (VGU)** keeps the recent input samples;
* the **coefficient selection unit (CSU)** is a ROM with one coefficient vector
  per factor;
* the **arithmetic unit (AU)** uses eight multiplier-less shift-and-add
  multipliers and an adder tree.

A decimation filter (down-sampling by 2, 4 or 8) built from the same parts
sits next to the interpolator in the top level.

## How up-sampling by L is computed

Up-sampling by L inserts L-1 zeros between input samples and then low-pass
filters the result with a 16-tap filter h. Most products would be with those
inserted zeros, so the filter is computed in polyphase form instead. For the
input sample x(n), the L output samples are

    y(nL + p) = sum over k of h(kL + p) * x(n - k),   p = 0 .. L-1,  k = 0 .. 16/L - 1

Each output phase p is a short sub-filter:

| factor L | sub-filters | taps per sub-filter | multipliers busy |
|---------:|------------:|--------------------:|-----------------:|
| 2        | 2           | 8                   | 8 of 8           |
| 4        | 4           | 4                   | 4 of 8           |
| 8        | 8           | 2                   | 2 of 8           |

The longest sub-filter (8 taps at L = 2) sets the hardware size: eight data
vectors and eight multipliers. The clock is the **output** sample clock. One
input sample is taken every L clocks and one output sample leaves every clock,
so the output rate rises with the clock, not with the factor.

### Where each operand comes from, phase by phase

* **Data.** The VGU presents dg[k] = x(n-k), k = 0..7, which stays constant for
  the L clocks of one input period.
* **Coefficients.** A PISO (parallel-in, serial-out) register inside the AU
  loads all 16 coefficients in parallel at the end of every input period. It
  then rotates them by one position per clock. Multiplier k reads register
  position k*L. After p rotations that position holds h(kL + p), which is
  exactly the coefficient that sub-filter p needs. Positions with k*L >= 16
  give zero. So one parallel load serves the L sub-filters in turn, one per
  clock.
* **Sum.** Multiplier k forms dg[k] * cs[k], the adder tree adds the eight
  products, and the sum is registered into y.

### Timing (factor L)

```
clock         | ... | c0 (strobe) | c0+1  | c0+2  | ... | c0+L (strobe) | c0+L+1 |
in_strobe     |     |      1      |   0   |   0   |     |       1       |   0    |
in sampled    |     |   x(n) at end of c0                |  x(n+1) at end of c0+L |
VGU dg[0]     |     |   x(n-1)    | x(n)  | x(n)  |     |     x(n)      | x(n+1) |
phase         |     |     L-1     |   0   |   1   |     |      L-1      |   0    |
y             |     |             |       |y(nL+0)|     | y(nL+L-2)     |y(nL+L-1)|
```

* `in` is sampled on the rising edge that ends a cycle with `in_strobe` high.
  `in_strobe` is high every L-th clock.
* `y` takes the L outputs of x(n) on the 1st to L-th rising edge after that
  edge, one per clock.
* `y_phase` gives p for the sample on `y`.
* `y_valid` rises with the first output after reset. Outputs stay valid from
  then on, because the delay lines start from zero.

### Changing the factor

`intp_sel` takes effect in three steps:

1. The VGU multiplexer and the phase counter switch at once.
2. The CSU registers the new coefficient vector one clock later.
3. The PISO picks the new vector up at its next load.

Outputs are correct again from the second input strobe under the new factor.
Before that, the outputs in between mix old coefficients with new phases. The
testbenches leave them out of the comparison.

## Vector generation unit

The VGU has three delay chains of eight 16-bit registers, one chain per input
rate: clk/2, clk/4 and clk/8. A chain shifts on its own strobe (ce2, ce4,
ce8). Register 0 takes the input and register i takes register i-1. All
three chains run all the time. A 3:1 multiplexer steered by `intp_sel` passes
the chain of the selected factor to dg[0..7].

The three divided clocks of the original description become clock enables
here. `rate_gen` makes them from one free-running 3-bit counter, so the three
rates stay phase-aligned with each other and with the output phase.

## Coefficient selection unit and the coefficient tables

The CSU is a ROM of three 16 x 17-bit words. Its registered output changes one
clock after the select does. The coefficients are 17-bit two's complement
integers: a sign and a 16-bit magnitude. The tables live in `rif_pkg`.

| factor | taps (tap 0 first) | origin |
|-------:|--------------------|--------|
| 2 | 15, -25, -30, 10, 79, 114, 79, 10, -30, -25, 15, 0, 0, 0, 0, 0 | order-10 polyphase interpolator design (0.0594, -0.0981, -0.1173, 0.0371, 0.3079, 0.4461, mirrored), quantised as round(h * 256), zero-padded |
| 4 | -12, 8, 16, 4, -19, -10, 47, 106, 106, 47, -10, -19, 4, 16, 8, -12 | the published 16-tap vector, copied as is |
| 8 | 4, 8, 12, 16, 20, 24, 28, 32, 28, 24, 20, 16, 12, 8, 4, 0 | this design's own: a linear interpolator, h(k) = 4 * (8 - abs(k - 7)) |

No factor-8 coefficients were published, and the factor-2 design was given only
in floating point. The quantisation scale (256) and the whole factor-8 vector
are therefore choices made here. Replace them with the filters your
application needs.

When you change a table, keep the sum of |h| over every sub-filter times
2^15 below 2^23. That keeps the 24-bit output free of overflow. With the
current tables the worst case is 248, from the even taps of the factor-2
vector. Assertions in `arith_unit` and `decim_filter` report a violation in
simulation.

## Shift-and-add multiplier

There are no hardware multipliers. Each product is built from shifted copies
of the data sample (`shift_add_mult`):

1. The coefficient is coded as a sign and a 16-bit magnitude. The most
   negative value, -65536, has no 16-bit magnitude and is clamped to -65535.
2. The magnitude is cut into eight 2-bit digits. Multiplexer M_i picks 0, a,
   2a or 3a, where a = x * 4^i. M7 covers the two most significant powers of
   two and M0 the two least.
3. A three-level adder tree (8 -> 4 -> 2 -> 1) adds the eight multiplexer
   outputs.
4. A final multiplexer, steered by the sign, passes the sum or its two's
   complement.

The product is exact: 32 bits for 16-bit data and a 17-bit coefficient.

In the original description, each multiplexer has two shifted inputs and the
shifted data is weighed as fractions (x/2, x/4, ...) with a final halving. Two
things differ here:

* The zero and 3a inputs are added, so that every magnitude can be
  represented.
* Integer weights are used. This moves the binary point and changes nothing
  else: `y` is in units of one coefficient LSB times one input LSB.

## Decimation filter

`decim_filter` takes one 16-bit sample every clock into a 16-register delay
line. `dec_sel` sets the factor M, coded like `intp_sel`. On every M-th clock
it registers the full 16-tap sum

    dout = sum over k of h(k) * x(m-k)

into `dout` (26 bits) and raises `dout_valid` for that clock. x(m) is the
sample taken on the previous edge. It uses the CSU vector of the same factor,
the same registers and 16 shift-and-add multipliers.

Only the existence of a decimation filter and the fact that its output comes
more slowly are known from the original description. Its structure is this
design's.

## Top level and interface

`rif_top` places the two filters side by side. They share only `clk` and
`rst`. Reset is synchronous and active high.

| port | dir | width | meaning |
|------|-----|------:|---------|
| clk | in | 1 | clock: interpolator output rate, decimator input rate |
| rst | in | 1 | synchronous reset, clears every register |
| intp_sel | in | 4 | interpolation factor: 4'b0010 = 2, 4'b0100 = 4, 4'b1000 = 8; other codes act as 2 |
| in | in | 16 | interpolator input, signed |
| in_strobe | out | 1 | `in` is taken at the end of this clock |
| y | out | 24 | interpolated output, signed |
| y_phase | out | 3 | phase p of the sample on `y` |
| y_valid | out | 1 | `y` carries filter output |
| dec_sel | in | 4 | decimation factor, same coding |
| din | in | 16 | decimator input, one sample per clock |
| dout | out | 26 | decimated output, signed |
| dout_valid | out | 1 | `dout` was updated on this clock |

Size after coarse synthesis: about 1,570 word-level cells and 1,518
flip-flop bits, most of them in the three VGU chains, the PISO and the
decimator's 16 multipliers.

## Departures from the original architecture

* **Block formulation.** The architecture claims something this design does
  not do. The claim is that outputs for factor 8 are summed into those of
  factor 4, and those into factor 2, so that all factors come out at once from
  shared partial results. The derivation of those shared sums was not
  available. This design follows the published block diagrams instead: a 3:1
  multiplexer in the VGU, one coefficient vector per factor, and outputs of
  one factor at a time.
* **Clocks.** Divided clocks are replaced by clock enables on one clock.
* **PISO.** The PISO's role, serialising the polyphase sub-filters, is this
  design's reading of a block that was only named.
* **Handshake and reset.** The strobe, valid and phase outputs, and the reset
  behaviour, are this design's.
* **Coefficients.** See the table above: only the factor-4 vector is the
  published one.
* **Widths.** Coefficients are 17 bits: 16 bits of magnitude plus a sign.
* **Not supported.** Filter lengths above 16 and factors above 8 are not
  supported. For example, the 25-, 49- and 97-tap interpolators by 4, 8 and 16
  used for UMTS do not fit.

## Files

| file | contents |
|------|----------|
| rtl/rif_pkg.sv | widths, factor coding, coefficient tables |
| rtl/dff.sv | register with enable and synchronous clear |
| rtl/rate_gen.sv | phase counter and CLK2/CLK4/CLK8 strobes |
| rtl/vgu.sv | vector generation unit |
| rtl/csu.sv | coefficient ROM |
| rtl/piso.sv | coefficient PISO |
| rtl/shift_add_mult.sv | coded-coefficient shift-and-add multiplier |
| rtl/arith_unit.sv | PISO, 8 multipliers, adder tree, output register |
| rtl/interp_filter.sv | the interpolation filter |
| rtl/decim_filter.sv | the decimation filter |
| rtl/rif_top.sv | top level |
| tb/*_tb.sv | one self-checking testbench per module, plus `audio_workload_tb` |

## Simulating

Every testbench checks the block against values it computes on its own. It
prints `TB_RESULT checks=N failures=M` and stops itself, with a watchdog in
case of a hang. With Verilator 5:

```
verilator --binary --timing --assert -Mdir obj -o sim --top-module rif_top_tb \
    -y rtl -y tb +libext+.sv rtl/rif_pkg.sv tb/rif_top_tb.sv
./obj/sim
```

Replace `rif_top_tb` with any other testbench name.

* `rif_top_tb` runs the whole design at its default sizes. It steps both
  factor selects through 2, 4 and 8, checks every output value and its
  timing, and reports how often each mechanism occurred: outputs per factor,
  factor switches, and positive and negative results. A mechanism that never
  happened counts as a failure.
* `audio_workload_tb` runs the interpolator at factors 4 and 2 on a 1 kHz
  tone sampled at 48 kHz. The tone is preceded by five real audio samples.
* The block testbenches (`dff_tb`, `rate_gen_tb`, `vgu_tb`, `csu_tb`,
  `piso_tb`, `shift_add_mult_tb`, `arith_unit_tb`, `interp_filter_tb`,
  `decim_filter_tb`) each test one module in isolation.

All of them finish in well under a second.
