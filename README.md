# Stochastic division and square root by exploiting bitstream correlation

In stochastic computing (SC) a number p in [0, 1] is carried by a bitstream
whose fraction of ones is p. Multiplication then costs one AND gate, but
division and square root need feedback and a few flip-flops. This RTL
implements a family of such circuits built around one idea: **correlation
between bitstreams is a design tool, not just a source of error.**

* The **divider** feeds its two operands as *maximally correlated* streams
  into an AND and an XOR gate. For correlated streams these gates compute
  MIN(x, y) and |x − y|, and a JK flip-flop turns them into
  MIN/(MIN + |x − y|) = **MIN(x, y) / MAX(x, y)**. The circuit therefore does
  not need to know which input is the divisor.
* Four **square-root** circuits (SSRC-A … SSRC-D) solve p_out² = p_in with a
  feedback loop of two or three gates. A **delay element** (DE), a short
  chain of D flip-flops in the loop, *removes* the correlation that would
  otherwise spoil the gates' arithmetic.
* Two image operations are built from these circuits. **Contrast stretching**
  computes f(x) = (x − m)/(n − m) with the divider. **Gamma correction** with
  γ = 0.5 is the square-root circuit used on its own.

The circuits follow the article "Highly Accurate Division and Square Root
Circuits by Exploiting Signal Correlation in Stochastic Computing" (Wang,
Xie, Han, Zhang). The number generator, the interface timing and the reset
values are this implementation's own choices. They are listed under
[Choices and departures](#choices-and-departures).

## Stochastic numbers in this design

A stochastic number generator (SNG) is an 8-bit LFSR (`lfsr_rng`) plus a
comparator (`sng_cmp`). The LFSR uses x⁸+x⁶+x⁵+x⁴+1 and visits every value
1…255 once in 255 cycles. The comparator emits `rnd <= x`, so a binary input
x produces a 255-bit stream with **exactly x ones**: x/255, with no
generation error. 0 gives an all-zero stream and 255 an all-one stream.

When several comparators share one LFSR, the ones of the smaller value are a
subset of the ones of the larger one. This is correlation +1, and for such
streams

| gate | independent inputs | correlated inputs (shared RNG) |
|------|--------------------|--------------------------------|
| AND  | p_a · p_b          | MIN(p_a, p_b)                  |
| OR   | p_a + p_b − p_a p_b | MAX(p_a, p_b)                 |
| XOR  | p_a + p_b − 2 p_a p_b | \|p_a − p_b\|                |
| A AND NOT B | p_a (1 − p_b) | max(p_a − p_b, 0)           |

The divider and contrast stretching use the right-hand column. The
square-root loops need the left-hand column, which is why they contain a
delay element.

## The divider (`sc_divider`, `sc_div_circuit`)

```
 X ──┬──────────── AND ── DE (2 DFF) ── J ┐
     │         ┌──                        JKFF ── Q = z
 Y ──┴─────────┴── XOR ────────────────── K ┘
```

Over a long stream a JK flip-flop is 1 for a fraction J/(J+K) of the time.
With J = MIN and K = |x − y|:

* x ≥ y: z = y / (y + x − y) = y/x
* x < y: z = x / (x + y − x) = x/y

For correlated inputs the AND and XOR outputs are never 1 in the same cycle
(their correlation is −1). That makes the JK flip-flop's J/(J+K) behaviour
inaccurate. Delaying the J input by two flip-flops decorrelates them. In
simulation this improves the mean squared error from 1.4·10⁻² (no DE) to
3.7·10⁻³. Deeper delay elements help little.

`sc_div_circuit` adds the shared-LFSR SNG. Its inputs are two 8-bit values
and its output is the quotient stream.

## The square-root circuits (`ssrc_a` … `ssrc_d`)

Each circuit has an output Out and an internal stream s. The gates enforce
two relations, and eliminating s leaves p_out = √p_in:

| circuit | gates | Out | s (before/after the DE) | relation for s |
|---------|-------|-----|-------------------------|----------------|
| SSRC-A | OR, JKFF (K = 1), DE | In OR DE(s) | s = Q of JKFF, J = Out | p_s = p_out (1 − p_s) |
| SSRC-B | OR, AND, NOT, DE | In OR DE(s) | s = Out AND NOT DE(s) | p_s = p_out (1 − p_s) |
| SSRC-C | MUX, NAND, DE | s ? In : 1 | s = DE(NAND(Out, s)) | p_s = 1 − p_out p_s |
| SSRC-D | MUX, AND, NOT, DE | s ? 1 : In | s = DE(Out AND NOT s) | p_s = p_out (1 − p_s) |

For A and B, p_out = p_in + p_s − p_in p_s, with p_s = p_out/(1 + p_out),
gives p_out² = p_in. C and D reach the same result through the MUX.

A JK flip-flop with K = 1 computes Q' = J AND NOT Q. That is why SSRC-A can
run with an empty DE: the flip-flop already breaks the loop. B, C and D need
at least one flip-flop in the DE, and the RTL stops elaboration with an
error if `DE_DEPTH` is 0. Deeper DEs reduce correlation and error. With six
flip-flops, SSRC-D has about half the error of its one-flip-flop version.

**What is hardest to see: B, C and D are the same machine.** Written out per
cycle k with a DE of d flip-flops, B, C and D all reduce to

    s_k = In_k AND NOT s_(k−d),      Out_k = In_k OR s_(k−d)

For C, take s as the inverted NAND output. C then differs from B only in the
very first bit after a clear. In simulation with this LFSR, the three
circuits therefore give almost the same accuracy at equal DE depth (MSE
about 1.0·10⁻² at one flip-flop). The article reports noticeably lower error
for C and D than for B. That gap does not show up here, and the reason is
not known. See [Choices and departures](#choices-and-departures).

`sc_sqrt_circuit` adds an SNG and selects the variant with a `VARIANT`
parameter (`sc_pkg::ssrc_variant_e`). Used on pixel values, it is the gamma
corrector for γ = 0.5.

## Contrast stretching (`contrast_stretch`)

```
          ┌─ CMP(x) ─────────────── AND ── num ┐
 LFSR ────┼─ CMP(m) ── NOT ──┬───── ┘          sc_divider ── f
          └─ CMP(n) ─────────┴───── AND ── den ┘
```

The three comparators share one LFSR. X AND NOT M therefore carries
max(x − m, 0) and N AND NOT M carries n − m. The divider returns their
MIN/MAX:

* x < m: the numerator stream is empty and f = 0 exactly.
* m ≤ x ≤ n: f = (x − m)/(n − m).
* x > n: f = (n − m)/(x − m), **not 1**. The divider always divides the
  smaller stream by the larger, so pixels above n get darker instead of
  saturating. This follows from the structure as drawn. No saturating logic
  is described for it, so none is added.

## Interface and timing

All blocks process one stream bit per clock. The top (`sc_top`) has these
ports, all synchronous to `clk`:

| port | width | meaning |
|------|-------|---------|
| `rst_n` | 1 | asynchronous reset, active low |
| `start` | 1 | one-cycle pulse: load all LFSR seeds and clear all DE and JK flip-flops |
| `seed_div`, `seed_cs` | 8 | LFSR seeds of divider and contrast stretching (0 is replaced by 1) |
| `seed_sqrt` | 4×8 | LFSR seeds of SSRC-A…D (index 0…3) |
| `div_x`, `div_y` | 8 | divider operands (value/255) |
| `sqrt_in` | 4×8 | inputs of SSRC-A…D |
| `cs_x`, `cs_m`, `cs_n` | 8 | pixel and bounds of contrast stretching |
| `div_z` | 1 | quotient stream |
| `sqrt_out` | 4 | square-root streams of SSRC-A…D |
| `cs_f` | 1 | contrast-stretching stream |

Count `start`'s clock edge as edge 0. Operands must stay stable for the
following 255 cycles.

* **Square-root outputs** are combinational from the current input bit.
  They are valid after edges 0 … 254, i.e. in the same cycle as their input
  bit.
* **Divider and contrast-stretching outputs** come from the JK flip-flop.
  They are valid one cycle later, after edges 1 … 255.

The result is the number of ones in these 255 bits, divided by 255. Nothing
in the RTL counts them: the circuits end in bitstreams, and the consumer
(here, the testbenches) decodes them. A new `start` may come at any time and
restarts every stream.

All circuits share this protocol. They sit side by side in `sc_top`, each
with its own SNG, as separate designs with separate ports.

Parameters of `sc_top`: `N` (SNG width, default 8, giving 255-bit streams;
the tap table covers 3…16), `DIV_DE` (2), and `SSRC_A_DE` … `SSRC_D_DE`
(0, 1, 1, 1). For a more accurate square root, raise a DE depth, for
example `SSRC_D_DE = 6`.

## Accuracy measured in simulation

These results use 8-bit SNGs (255-bit streams) and a random seed per run.
Errors are taken against the exact function, in units of 10⁻².

**Against delay-element depth** (`de_depth_sweep_tb`). The divider uses 2000
random pairs. The square-root circuits use 21 inputs from 0 to 1 in steps of
1/20, with 100 seeds each.

| MSE (×10⁻²) at DE depth | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|-------------------------|---|---|---|---|---|---|---|---|
| divider | 1.36 | 1.49 | 0.37 | 0.43 | 0.41 | 0.43 | 0.41 | 0.46 |
| SSRC-A  | 1.03 | 0.93 | 0.12 | 0.72 | 0.18 | 0.40 | 0.27 | 0.29 |
| SSRC-B  | – | 1.03 | 0.69 | 0.57 | 0.54 | 0.50 | 0.45 | 0.52 |
| SSRC-C  | – | 1.00 | 0.63 | 0.49 | 0.44 | 0.39 | 0.34 | 0.37 |
| SSRC-D  | – | 1.03 | 0.69 | 0.57 | 0.54 | 0.50 | 0.45 | 0.52 |

How this compares with the published evaluation:

* **Divider**: the published figures are 1.26, 1.44, 0.31 and 0.29 for
  depths 0 to 3, with a flat curve beyond. The same shape shows up here,
  including the dip in accuracy at one flip-flop. Two flip-flops are the
  sweet spot, which is why the default is 2.
* **SSRC-A and SSRC-B at their smallest depth**: the published value is 1.09.
  That matches the table above.
* **SSRC-C and SSRC-D**: the published figures are 0.60 and 0.57 at one
  flip-flop, falling to about 0.1 at six. These circuits do not reach that
  here, because they behave like SSRC-B (see above).
* **SSRC-A at depths ≥ 1**: the published row equals the SSRC-B row shifted by
  one flip-flop. This RTL keeps the JK flip-flop's own feedback undelayed, as
  the circuit is drawn. Its deeper settings therefore follow a different,
  irregular curve: the LFSR's structure interacts with the loop delay.

**Image applications** (`image_apps_tb`, through `sc_top`). The test image is
a synthetic 48×48 low-contrast image with values of about 0.25…0.85. Each
pixel is one 255-bit stream.

| application | circuit | MSE | PSNR |
|-------------|---------|-----|------|
| contrast stretching (m = 0.3, n = 0.8), pixels in [m, n] | divider, 2 DFF | 1.0·10⁻³ | 29.9 dB |
| gamma correction (γ = 0.5) | SSRC-A / B / D | 6.5·10⁻³ | 21.9 dB |
| gamma correction | SSRC-C | 6.3·10⁻³ | 22.0 dB |
| gamma correction | SSRC-D, 6 DFF | 2.6·10⁻³ | 25.8 dB |

## Choices and departures

* **LFSR polynomial and seeding**: not specified by the design. The RTL uses
  standard maximal-length taps, and the seed is a port.
* **Comparator sense** `rnd <= x`: chosen so that a 255-state LFSR encodes
  x/255 exactly.
* **Initial values**: the DE flip-flops and the JK flip-flops start at 0 after
  reset or `start`. These supply the first feedback bit of every loop.
* **`start` protocol, port layout, and bitstream outputs without counters**:
  this implementation's own choices.
* **SSRC-B**: "the AND gate's other input is its own inverted output" is
  implemented as the inverted DE output. A direct inversion would be a
  combinational loop.
* **SSRC-C and SSRC-D** are implemented exactly as their gate descriptions
  and equations state. They do not reach the published accuracy advantage
  over SSRC-B (see above).
* **Contrast stretching above n** returns (n − m)/(x − m) instead of 1.
* Not included: the baseline circuits the article compares against (CORDIV,
  SSDIV, BISQRT-S-JK), and anything tied to its standard-cell library
  results (area, power, delay).

## Files

`rtl/` holds one module or package per file:

* `sc_pkg` – shared constants: the width, the variant enum and the LFSR tap
  table.
* `lfsr_rng` and `sng_cmp` – the SNG.
* `delay_element` and `jk_ff` – the storage primitives.
* `sc_divider` and `ssrc_a` … `ssrc_d` – the kernels.
* `sc_div_circuit`, `sc_sqrt_circuit` and `contrast_stretch` – complete
  circuits with their SNGs.
* `sc_top` – everything side by side.

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`) and
`sc_ref_pkg.sv`, a bit-exact reference model: LFSR, comparator and the
per-cycle recurrences of every kernel. Each testbench compares every output
stream bit for bit with that model. It also checks the decoded accuracy
against bounds, and prints `TB_RESULT checks=N failures=M`. `sc_top_tb` runs
the whole design at its default parameters. It exercises both operand
orders of the divider, all four square-root variants, all three
contrast-stretching regions, a restart in mid-stream and a zero seed.
Two more testbenches produce the accuracy tables above:

* `de_depth_sweep_tb` sweeps the delay-element depth of every circuit.
* `image_apps_tb` runs the two image applications through `sc_top`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module sc_top_tb \
    -y rtl -y tb +libext+.sv rtl/sc_pkg.sv tb/sc_ref_pkg.sv tb/sc_top_tb.sv
./obj_dir/Vsc_top_tb
```

Replace `sc_top_tb` with any other testbench name. Each run takes well under
a second. To lint the RTL, run
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/sc_pkg.sv rtl/sc_top.sv`.
The remaining warnings are the unused clock/reset/clear ports of a
zero-depth delay element, and `rst_n` being used both as asynchronous reset
and in the LFSR's assertion.
