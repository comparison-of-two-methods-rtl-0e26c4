# Multiplierless elliptic IIR lowpass filters: cascade vs. parallel allpass

Fixed-coefficient IIR filters become cheap in hardware when no coefficient
needs a multiplier: each constant is built from a few binary shifts and
additions or subtractions, so the size of the filter is simply its number of
adders. This RTL builds eight elliptic lowpass filters that way, using two
competing structures, so that they can be compared directly:

* **Cascade realisation.** First- and second-order sections in transposed
  direct form I. In that form all five coefficients of a section multiply the
  same internal node, so the five constants form one *multiplier block*: a
  group of constant multipliers sharing an input.
* **Parallel connection of two allpass branches** of an EMQF (elliptic
  minimal Q-factor) filter: `H(z) = (A0(z) + A1(z)) / 2`. An odd order-n
  filter needs only n constants. (n+1)/2 of them (the "alphas") depend only on
  the 3 dB frequency and are 0 for a halfband filter. The other (n-1)/2 (the
  "betas") fix the pole radii.

All eight filters sit side by side in `multiplierless_iir_top`, driven by the
same input stream.

## The eight filters

Frequencies are given as fractions of the sample rate. Ap is the passband
ripple and Aa the minimum stopband attenuation.

| out | example | specification | method | order | coefficient bits |
|---|---|---|---|---|---|
| 0 | 1a | Fp=0.135, Fa=0.2, Ap=0.2 dB, Aa=30 dB | classical elliptic, cascade | 4 | 8 |
| 1 | 1b | same | EMQF, cascade | 5 | 8 |
| 2 | 1c | same | EMQF, two allpass branches | 5 | 8 |
| 3 | 2a | halfband, Fa=0.28, Aa=28 dB | EMQF, cascade | 5 | 8 |
| 4 | 2b | same | EMQF, two allpass branches | 5 | 8 |
| 5 | 3a | halfband, Fa=0.28, Aa=46 dB | EMQF, cascade | 9 | 8 |
| 6 | 3b | same | EMQF, two allpass branches | 9 | 8 |
| 7 | 3c | same | EMQF, two allpass branches | 9 | 12 |

Measured in simulation on the RTL:

| example | worst stopband (dB) | adders + 0.2·delays | normalised round-off noise variance |
|---|---|---|---|
| 1a | 29.9 | 17 + 8 → 18.6 | 9.3 |
| 1b | 31.8 | 22 + 10 → 24.0 | 10.6 |
| 1c | 31.7 | 22 + 10 → 24.0 | 5.7 |
| 2a | 29.1 | 20 + 10 → 22.0 | 9.3 |
| 2b | 28.9 | 9 + 9 → 10.8 | 1.7 |
| 3a | 56.5 | 36 + 18 → 39.6 | 33.9 |
| 3b | **42.9** | 17 + 17 → 20.4 | 2.8 |
| 3c | 56.1 | 22 + 17 → 25.4 | 2.7 |

The worst stopband values come from the quantised transfer functions. The
noise variances come from `tb_roundoff_noise`: the variance of the output
error against a double-precision model, divided by q²/12 (q = one output LSB).
Costs count a delay as 0.2 adder. A multiplier block costs the adders of its
shared graph, and a lone constant costs its number of non-zero CSD digits
minus one.

The comparison comes out as follows:

* For the halfband filters the allpass structure is much cheaper and
  quieter.
* For the general lowpass (example 1) the allpass structure is still
  quieter than the cascade.
* With 8-bit constants the ninth-order allpass filter (3b) misses the 46 dB
  stopband. Its stopband is more sensitive to coefficient rounding than the
  cascade's. 12-bit betas (3c) fix this for about five more adders.
* For example 1 the cheapest filter is the fourth-order classical cascade.
  It has the largest passband ripple, though, and the most noise of the
  three.

## Constants as shifts and adds (`csd_const_mult`, `mult_block`)

A coefficient is an integer `C` that stands for `C / 2^F`, where F is the
coefficient word length (8 or 12). Every product is `floor(x·C / 2^F)`: the
exact shift-add sum, shifted right by F, so truncation towards minus
infinity.

**Lone constants** (`csd_const_mult`) are used in the allpass sections, where
each constant multiplies a different signal. At elaboration time,
`iir_pkg::csd_digit` recodes C into canonic signed digits. These are digits
in {-1, 0, +1} with no two adjacent non-zero digits. Each non-zero digit
adds or subtracts `x << k`. A zero constant costs nothing, and a power of two
is just wiring.

**Multiplier blocks** (`mult_block`) are used in the cascades. There, all
five constants of a section multiply the same node, so they are built as one
adder graph:

* Node 0 is the input.
* Each adder forms `±(node_a << la) ± (node_b << lb)`. The result is an odd
  multiple of the input, called a fundamental.
* Each constant is one fundamental, shifted and possibly negated. Constants
  therefore reuse each other's partial sums. For example, 67 = 3 + 64 and
  261 = 5 + 256 need only the fundamentals 3 and 5, which are shared.

The graphs in `example_coef_pkg` come from a greedy reduced-adder-graph
search:

1. Add every constant that one adder can make from the fundamentals already
   built.
2. When none can be made, add the intermediate fundamental that brings the
   most remaining constants within one adder, and repeat.

The graph format is documented in `mult_block.sv`. At elaboration, the block
recomputes every constant from its graph and stops with an error on a
mismatch. Changing a coefficient without its graph therefore cannot go
unnoticed.

## Transposed direct form I sections (`tdf1_section`, `cascade_filter`)

```
w  = x + sa1            sa1' = fl(-A1·w) + sa2      sa2' = fl(-A2·w)
y  = fl(B0·w) + sb1     sb1' = fl(B1·w)  + sb2      sb2' = fl(B2·w)
```

The recursive part comes first. Its node `w` feeds the section's multiplier
block. A second-order section has four adders and four delays besides the
block; a first-order one has two of each.

`cascade_filter` chains `N_SEC` sections, whose coefficients are passed as
flat arrays: `B[3i..3i+2]`, `A[2i..2i+1]`, order `ORD[i]`. Each section pairs
a pole pair with its nearest zero pair and is scaled to unity gain at DC.

## EMQF allpass sections and the two-branch filter (`allpass1`, `allpass2`, `parallel_allpass_filter`)

The second-order section realises

```
A(z) = (β + γ z^-1 + z^-2) / (1 + γ z^-1 + β z^-2),   γ = -α(1+β)
```

It uses only the constants α and β:

```
t = x1 - y1;   p = fl(α·t);   q = fl(β·(x - y2 - p));   y = q + x2 - p
```

Expanding these lines gives exactly the transfer function above. With α = 0
(halfband) the section costs two adders plus the adders inside the β
constant.

The first-order section is `(-a + z^-1)/(1 - a z^-1)`, computed as
`y = fl(a·(y1 - x)) + x1`. With a = 0 it is a single delay.

`parallel_allpass_filter` numbers the second-order sections by increasing
pole angle. Branch A0 gets the first-order section and sections 1, 3, …;
branch A1 gets sections 0, 2, …. The output is `floor((A0 + A1)/2)`.

## How the coefficients were obtained

The EMQF filters are elliptic filters whose ripples satisfy
`(10^(Ap/10) - 1)(10^(Aa/10) - 1) = 1`. For the given order, the attenuation
is raised until the stopband edge lands on Fa; for the halfband filters,
Fp = 0.5 - Fa. The poles then give the allpass constants:

* a conjugate pair with denominator `1 + d1 z^-1 + d2 z^-2` gives `β = d2`
  and `α = -d1/(1+β)`;
* the real pole p gives `a = p`.

All the α of one filter come out equal, as EMQF theory predicts. Example 1a
is an ordinary elliptic design (order 4, 0.2 dB, 30 dB). Every constant is
`round(value · 2^F)`. The values, and the responses they give, are listed in
`rtl/example_coef_pkg.sv`.

## Arithmetic, interface and timing

* Input `x`: 16-bit signed. Internal words and outputs: 28-bit signed, in the
  same scale as the input. In the cascades, the worst-case (L1) gain from the
  input to any section node is at most 3.3, and the allpass nodes stay within
  a few times the input. The 12 guard bits are therefore far more than
  overflow needs. They can be cut (`iir_pkg::IW`) if area matters.
* One sample per clock at most. On a clock edge with `in_valid` high, every
  section takes its input. The filter output appears one clock later,
  registered, with `out_valid` high. Latency is 1 cycle and throughput is 1
  sample per cycle.
* Between samples (`in_valid` low) all state is held.
* `rst_n` is a synchronous, active-low reset that clears all state.
* The path from `x` through all sections to the output register is
  combinational. A high clock rate would need pipelining, which recursive
  sections only allow with look-ahead restructuring.

## Departures and limits

* **No dynamic range scaling.** The reference design scales internal nodes
  by the L2 norm to prevent overflow. Here wide internal words (12 guard
  bits) replace the scaling. This changes the noise figures of the cascades
  most.
* **Multiplier-block graphs from a simple greedy search.** A stronger search
  (optimal single-constant graphs, or sharing across sections) could save a
  few adders, especially in the halfband cascades.
* **Alphas are rounded like betas.** An EMQF design can choose the 3 dB
  frequency so that the alphas are short exact constants; here they are
  rounded to F bits. For the halfband filters they are exactly zero.
* **Own coefficient values.** The specifications, orders, structures and
  word lengths are those of the comparison. The coefficient values, section
  pairing and ordering, branch assignment and gain distribution are this
  design's. Example 1a, after rounding, reaches 29.9 dB rather than 30 dB.

## Files and simulation

| file | contents |
|---|---|
| `rtl/iir_pkg.sv` | widths, CSD recoding functions |
| `rtl/example_coef_pkg.sv` | coefficients of the eight filters |
| `rtl/csd_const_mult.sv` | lone shift-add constant |
| `rtl/mult_block.sv` | multiplier block as a shared adder graph |
| `rtl/tdf1_section.sv`, `rtl/cascade_filter.sv` | cascade realisation |
| `rtl/allpass1.sv`, `rtl/allpass2.sv`, `rtl/parallel_allpass_filter.sv` | allpass realisation |
| `rtl/multiplierless_iir_top.sv` | all eight filters |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_roundoff_noise.sv` | round-off noise of all eight filters |

What the testbenches check:

* The constant multipliers are compared with exact products.
* The TDF-I section and the cascade are compared bit for bit with a
  direct-form model.
* The allpass sections and the two-branch filter are compared with
  real-valued models, to within a few LSB. The sections are also checked to
  be lossless: an impulse's energy is preserved.
* `tb_multiplierless_iir_top` applies six sine tones and measures each
  filter's gain. The gain must be within 0.1 dB of the analytic gain of the
  quantised transfer function, or 1 dB below -40 dB. It also checks passband
  ripple, the stopband specifications, the 3b shortfall and the one-cycle
  latency, with idle cycles between samples.
* `tb_roundoff_noise` measures the normalised round-off noise of all eight
  filters. It checks that each two-allpass filter is quieter than the cascade
  of the same example.

Each testbench prints `TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing --assert -Irtl rtl/iir_pkg.sv rtl/example_coef_pkg.sv \
    tb/tb_multiplierless_iir_top.sv --top-module tb_multiplierless_iir_top -o sim
./obj_dir/sim
```

To change a filter:

1. Edit its constants in `example_coef_pkg.sv`.
2. For a cascade, also give a new adder graph for every changed section.
3. Set `F` to the new word length.
4. Update the expected-gain table in `tb_multiplierless_iir_top.sv`.
