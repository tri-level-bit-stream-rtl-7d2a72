# Tri-level bit-stream signal processing in SystemVerilog

A sigma-delta modulator turns a signal into a fast stream of coarse samples whose
*average* is the signal. Usually that stream is decimated to multi-bit words before any
processing. Bit-stream signal processing skips the decimation: it adds, multiplies,
filters, divides and takes square roots directly on the over-sampled streams, with very
small circuits, and produces streams again.

This RTL implements the **tri-level** (2-bit) form of that idea. Every sample is -1, 0 or +1
instead of the usual ±1. The third level lowers the quantisation noise, and the circuits stay
almost as small as their 1-bit versions. The library consists of:

* arithmetic on streams: adder/subtractor, negation, windowed multiplier;
* converters between streams and multi-bit values: digital sigma-delta modulator (DSDM),
  up/hold/down counter;
* feedback circuits built from those parts: lowpass filter, quadrature NCO, divider,
  square root;
* two applications: a type-1 digital PLL, and a QPSK demodulator with a Costas-type carrier
  loop and magnitude normalisation.

The top level `tbssp_top` places the DPLL and the QPSK demodulator side by side.

## 1. Samples, values and timing

A sample is a `tbs_pkg::tri_t` (`logic [1:0]`), encoded in 2's complement:

| value | code |
|------:|:----:|
| -1 | `11` |
| 0 | `00` |
| +1 | `01` |

The code `10` is never produced. The adder, multiplier, counter, filter and NCO
assert (SVA) that it never arrives on their stream inputs.

The *value* a stream carries is its mean over many samples, so it lies in [-1, 1].
Everything runs at one sample per clock. All state has a synchronous active-low reset,
`rst_n`.

Latency is mostly irrelevant in these circuits: a value is spread over hundreds of samples.
It matters in one place. Every feedback loop must pass through a register.
In this RTL the registers sit here:

* the DSDM output is decoded from its accumulator register;
* the counter output is registered.

Adders and multipliers are combinational from their inputs to their output. Each one also
holds a few state bits.

## 2. Arithmetic on streams

### Adder (`bs_adder`)
Two tri-level samples can sum to ±2, which does not fit. The adder therefore outputs half the
sum, and it keeps the bit that halving would lose:

```
s = x + y + c          (3-bit, inputs sign-extended; c = bit kept from last cycle)
z = s >>> 1            (upper two bits, -1..+1)
c' = s & 1             (the one flip-flop)
```

In z-transform terms, `Z = (X + Y - (1 - z^-1)·LSB) / 2`. The dropped bit is added back one
cycle later. Over any stretch of samples, `2·Σz` therefore equals `Σx + Σy` to within one.
The error is first-order shaped, like sigma-delta noise.

Every "+" in the feedback circuits below is one of these adders. So every sum in them carries a
factor 1/2.

### Negation (`bs_neg`, `tbs_pkg::tri_neg`)
Negation is two gates: `z0 = x0` and `z1 = ~x1 & x0`. To subtract, negate one input of an
adder.

### Multiplier (`bs_multiplier`, window `L`, default 4)
The product of two streams is formed over a sliding window of L samples:

```
z[n] ≈ (1/L²) · Σ_{i=n-L+1..n} Σ_{j=n-L+1..n} x[i]·y[j]
```

The circuit has these parts:

* Each input feeds a chain of L-1 two-bit delays.
* Each of the L² pairs of taps meets in an exact tri-level product cell: the result is 0 if
  either operand is 0, and otherwise its sign is the XOR of the two sign bits.
* The L² products are summed by a balanced tree of L²-1 bit-stream adders. Each level halves,
  so the tree divides by exactly L². With L = 4 the tree has four quadrants of four products
  (2×2 tap blocks), two adders that join the quadrants in pairs, and a final adder.

L must be a power of two. The bit-accurate pairing of products inside the tree is this
design's choice. It does not change the mean of the output.

## 3. Between streams and numbers

### DSDM (`dsdm`)
The DSDM is a first-order modulator with a three-level quantiser. It turns a W-bit signed input
`x ∈ [-K, K]` into a stream whose mean is x/K:

```
u[n+1] = u[n] + x[n] - K·y[n]          (W+1-bit accumulator)
y[n]   = +1 if u ≥ α,  -1 if u < -α,  else 0     (α ≈ K/4)
```

The gain K is an input port, because the NCO changes it every cycle. All other users tie it to
a constant.

The worked size is K = 256, a 9-bit input, a 10-bit accumulator and α = 64. At that size the
quantiser is a decode of the top four accumulator bits:

| u[9:6] | y |
|:--|:--:|
| 0001 … 0111 | +1 |
| 0000, 1111 | 0 |
| 1000 … 1110 | -1 |

The accumulator stays within ±2K, so W+1 bits never overflow as long as K ≤ 2^(W-1). An
assertion checks this.

### Up/hold/down counter (`uhd_counter`)
The counter integrates a stream: it counts up on +1, holds on 0 and counts down on -1. It
saturates at ±A. Followed by a DSDM of gain K, it acts as an integrator with gain 1/K whose
output is again a stream.

## 4. Feedback circuits

These circuits are the heart of the library. Each one wraps an operation whose inverse is
easy (integration, multiplication, squaring) in a loop that drives an error to zero.

### Lowpass filter (`bs_lpf`)
```
w[n] = w[n-1] + a·x[n] - b·y[n],     y = DSDM_K(w)
```
Since y ≈ w/K, this is a leaky integrator whose leak is its own output. The result is a
one-pole lowpass with these properties:

* pole 1 - b/K;
* DC gain a/b;
* cut-off ≈ b/(2πK) cycles per sample;
* the modulator's noise is first-order shaped.

The default is a = b = 6 and K = 512, which gives a cut-off of 1.87·10⁻³. W = 11, so the state
holds ±K.

This RTL adds one thing of its own: w is clamped to [-K, K], the modulator's legal input range.
An overdriven filter therefore saturates instead of wrapping.

### Quadrature oscillator / NCO (`bs_nco`)
The NCO is built from two counters and two DSDMs:

```
wc[n+1] = wc[n] - Qs[n]     Qc = DSDM_K(wc)
ws[n+1] = ws[n] + Qc[n]     Qs = DSDM_K(ws)
```

This is a rotation by 1/K radian per sample. Qc and Qs are cosine and sine streams of
frequency 1/(2πK), and Qs lags Qc by a quarter period. The rotation slowly gains amplitude
until the counters hit ±A (1 ≪ A < K). That sets the amplitude to about A/K.

The tri-level control c moves the gain to `K = K0 - DK·c`. So c = +1 raises the frequency and
c = -1 lowers it, and the phase follows `θ[n] = n/K0 + (DK/K0²)·Σc`.

Defaults are A = 75, K0 = 79, DK = 4, W = 8 and α = 16. Reset starts the oscillator at
wc = A, ws = 0.

### Divider (`bs_divider`)
```
z[n+1] = z[n] + (x[n] - y[n]·z[n]) / (2K)
```

The loop has four stages:

1. A bit-stream multiplier forms y·z.
2. A negation and an adder form (x - y·z)/2.
3. A counter integrates that error.
4. A DSDM turns the count back into z.

At equilibrium mean(z) = mean(x)/mean(y). The quotient must lie within ±1, and the divisor must
be positive: a negative divisor turns the feedback positive. Defaults are K = 256, A = 255 and
L = 4. The time constant is 2K/mean(y) samples.

### Square root (`bs_sqrt`)
This is the divider's loop with both multiplier inputs taken from z:
`z[n+1] = z[n] + (x - z²)/(2K)`. It settles at +√mean(x).

For inputs below about 0.25 it settles *low*: about 30 % low at x = 0.04, and exact to about
1 % at 0.25 and above. The windowed squarer averages products of neighbouring samples, so the
modulation noise of a small-valued stream adds to the square. This is a property of the
circuit, not of this RTL. The published error curve shows the same shape.

## 5. Applications

### Type-1 DPLL (`dpll`)
The input is a complex sinusoid, given as two streams ic and is. The phase detector computes
`z = Im(i · conj(q)) = is·Qc - ic·Qs`. It uses two multipliers, a negation and an adder, so
`z ≈ sin(Δφ)/2`. z drives the NCO's control input directly, with no loop filter.

At lock the NCO runs at the input frequency. A static phase error remains, and it supplies the
control average that the frequency offset requires.

Defaults are A = 80, K0 = 82 and DK = 5, built for an input frequency of 1/512. The lock range
is roughly input periods of 500 to 530 samples. Note that here A is larger than K0 - DK. The
DSDMs see a slight overload at the peaks when c = +1. This causes no harm, and the overflow
assertion never fires.

### QPSK demodulator (`qpsk_demod` = `qpsk_sync` + `qpsk_detect`)

**Synchronisation (generalised Costas loop).** The steps are:

1. The carrier stream is mixed with the NCO's Qc and Qs.
2. Filters C and S (cut-off 1.87·10⁻³, gain 4/3) turn the mixer outputs into the baseband
   pair Zc, Zs.
3. Adders and multipliers form P = Zc(Zc+Zs)/2 and M = Zs(Zc-Zs)/2.
4. The product P·M ∝ Zc·Zs·(Zc² - Zs²) ∝ sin 4ψ is taken, where ψ is the carrier phase error.
5. Loop filter L (gain 16) smooths that product and drives the NCO (A = 75, K0 = 79, DK = 4).

The error is blind to the four QPSK phases, so the loop stays locked across symbol phase jumps.
It settles with the symbols on the diagonals, |Zc| = |Zs|.

**Detection (normalisation).** The steps are:

1. `(P - M)/2 = (Zc² + Zs²)/4`.
2. A square root and filter R (gain 3) give R ≈ 1.5·|Z|.
3. Two dividers compute Zc/R and Zs/R.
4. Filters X and Y (cut-off 3.11·10⁻⁴, gain 1) give I and Q.

The outputs therefore do not depend on the received amplitude. Because of the square root's low
bias at small inputs, |I| and |Q| sit between about 0.40 and 0.55 rather than at 0.47 (1/(1.5·√2), the value for an exact root).

All six filters use K = 512. The filter table specifies each one by cut-off and gain. With
cut-off = b/(2πK) and gain = a/b, the resulting (a, b) pairs are:

| filter | a | b | cut-off | gain |
|:--|--:|--:|--:|--:|
| C, S | 8 | 6 | 1.87e-3 | 1.33 |
| L | 96 | 6 | 1.87e-3 | 16 |
| R | 18 | 6 | 1.87e-3 | 3 |
| X, Y | 1 | 1 | 3.11e-4 | 1 |

The symbol decision (slicing I and Q) is left to the user.

## 6. Top level (`tbssp_top`)

| port | dir | width | meaning |
|:--|:--|:--|:--|
| clk, rst_n | in | 1 | clock (one sample per cycle), synchronous active-low reset |
| ic, is | in | 2 | DPLL input cosine / sine streams |
| pll_err | out | 2 | DPLL phase-detector output (= NCO control) |
| pll_qc, pll_qs | out | 2 | DPLL NCO cosine / sine streams |
| pll_wc, pll_ws | out | 8 | DPLL NCO counters (multi-bit view of the recovered cosine/sine) |
| qpsk_in | in | 2 | QPSK carrier stream |
| qpsk_i, qpsk_q | out | 2 | demodulated symbol streams |
| qpsk_zc, qpsk_zs | out | 2 | baseband streams before normalisation |
| qpsk_ctrl | out | 2 | carrier-loop NCO control |

The input streams come from a tri-level sigma-delta A/D converter, which is not part of this RTL.
`tb/tri_sdm_model.sv` is a behavioural stand-in. It is a first-order modulator on a `real`
input with threshold 1/4.

After synthesis the whole design is about 1,300 word-level cells and 522 flip-flops. The
divider (47 flip-flops) and the square root (41) match the flip-flop counts published for the
FPGA version.

## 7. What follows the source and what is chosen here

The following come from the source description:

* the encoding;
* the adder structure and its equation;
* the negation equations;
* the multiplier structure for L = 4;
* the DSDM structure and its worked size and quantiser table;
* every loop structure: filter, NCO, divider, square root, DPLL, both QPSK parts;
* the NCO/DPLL/QPSK numbers (A, K0, DK);
* filter a = b = 6, K = 512;
* the filter table's cut-offs and gains.

The following are choices made in this RTL:

* **Reset:** synchronous active-low. The NCO starts at (A, 0).
* **Widths:** all counter and state widths.
* **Quantiser thresholds:** α = 16 in the NCOs and 128 in the filters. This follows the rule
  "a power of two near K/4".
* **Divider and square root:** K = 256, A = 255, L = 4. None of these sizes is published; the
  flip-flop counts support them.
* **Multiplier window:** L = 4 in every circuit.
* **Multiplier tree pairing:** the pairing of products inside the tree.
* **Filter a and b values:** derived from the filter table's cut-offs and gains as shown above.
* **Filter state clamp:** the filter state is clamped to ±K.
* **Quantiser boundary:** the quantiser puts u = α at +1. This follows the top-bit table; the
  quantiser's inequality would put u = α at 0.
* **NCO control sign:** K = K0 - DK·c. This is fixed by the phase law and by the published
  spectra, where the control +1 gives the highest frequency.

Not reproduced:

* the FPGA resource tables (device results);
* the 1-bit (bi-level) designs, which the source only compares against.

The SNDR figures are measured (§8) but depend on the input modulator, which here is a
behavioural stand-in.

## 8. Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|:--|:--|
| `tb_bs_neg` | all codes |
| `tb_bs_adder` | cycle-accurate integer model; running-sum identity |
| `tb_bs_multiplier` | cycle-accurate model of the L = 4 tree; windowed-product identity; mean of 0.5 × -0.3 |
| `tb_dsdm` | cycle-accurate model using the top-bit table; mean tracking; all three levels |
| `tb_uhd_counter` | saturating model; both limits reached |
| `tb_bs_lpf` | cycle-accurate model; DC gain; amplitude at the cut-off against the one-pole response |
| `tb_bs_nco` | period 2πK for c = 0, ±1 (within 2 %; measured 497, 472, 522 against 496, 471, 522); quadrature; limit |
| `tb_bs_divider` | x/y for five (x, y) pairs including x = 0.037 (within 0.01 + 5 %) |
| `tb_bs_sqrt` | √x within 5 % for x ≥ 0.25; the known low bias below that |
| `tb_dpll` | lock at input periods 512, 505, 525; static phase error against the type-1 formula |
| `tb_qpsk_sync` | lock to a 0.002 carrier, diagonal constellation, baseband magnitude, control sign |
| `tb_qpsk_detect` | direction kept and magnitude normalised for constant baseband inputs |
| `tb_qpsk_demod` | 16 symbols with random π/2 phase steps every 5000 samples, all in the predicted quadrant |
| `tb_div_sqrt_sweep` | divider with x = 0.037 over y = 0.05..0.95 (worst relative error 0.4 %, limit 3 %); square root over x = 0.01..0.91 (within 2 % above 0.25; 60 %, 24 % and 13 % low at 0.01, 0.06 and 0.11, as in the published error curve) |
| `tb_sndr_workloads` | SNDR over an over-sampling ratio of 128 (band 0..1/256). Measured: LPF 62.3 dB (published 62.5), NCO 44.4 dB (48.2), locked DPLL 45.1 dB (46.7). Each must beat the published 1-bit figure (53.6, 42.2, 35.5 dB) |
| `tb_tbssp_top` | both applications at the default sizes at once; counts NCO control at ±1, counter limits, quantiser levels, phase steps of every size |

`tb_tbssp_top` is the full-size end-to-end test. It runs 90,000 cycles in well under a second.

The NCO and DPLL noise figures depend on the quantiser threshold α. With α between 8 and 32,
the NCO measures 43 to 46 dB and the DPLL 43 to 45 dB, with no setting best for both. α = 16
is kept.

Register counts give a second check on the chosen sizes. A generic Yosys synthesis of the
defaults (assertions ignored) gives the flip-flop counts below. They are compared with the
published FPGA counts for the tri-level modules. LUT counts depend on the device and are not
compared.

| module | flip-flops here | published |
|:--|--:|--:|
| `dsdm` | 10 | 11 |
| `bs_lpf` | 23 | 21 |
| `bs_nco` | 34 | 36 |
| `bs_divider` | 47 | 47 |
| `bs_sqrt` | 41 | 41 |
| `dpll` | 89 | 91 |
| `qpsk_demod` | 433 | 419 |

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_tbssp_top \
    -y rtl -y tb +libext+.sv rtl/tbs_pkg.sv tb/tb_tbssp_top.sv
./obj_dir/Vtb_tbssp_top
```

Swap in any other testbench name. To lint a module:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/tbs_pkg.sv rtl/<module>.sv
```

## 9. Using and changing it

* **Values are means.** To read a value off a stream, average it over a window much longer
  than the circuit's time constant:
  * filters: K/b;
  * divider: 2K/mean(y);
  * square root: K/mean(z).
* **Keep every multi-bit input of a DSDM within ±K.** The filters clamp their state for you.
  The counters do so if A ≤ K.
* **K must fit the width:** K ≤ 2^(W-1) in every DSDM user.
* **Changing the multiplier window:** change `L`, keeping it a power of two. A larger window
  lowers the multiplier's noise and adds L²-1 adders. It also adds delay inside the divider and
  square-root loops.
