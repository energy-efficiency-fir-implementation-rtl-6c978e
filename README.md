# JRR-protected RNS FIR filter

The supply voltage of a digital filter can be lowered below its critical
value to save power. This is voltage overscaling (VOS). The catch is timing
errors on the longest paths. This design pairs two ways of living with that:

* **Residue number system (RNS).** The filter runs in four small, independent
  modular channels instead of one wide binary datapath. The carry chains are
  short, so the channels can take an overscaled supply. Only the converters
  into and out of the RNS need the full (critical) supply voltage.
* **Joint RNS / reduced-precision redundancy (JRR).** A small binary replica
  of the filter runs on the top bits of the input. Its result is coarse but
  free of timing errors. The coarse value fixes the *high part* of the
  result and the RNS supplies the *low part*. When this reconstruction
  disagrees with the RNS result, it replaces that result.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The design follows
a published block diagram of such a filter. Where the description leaves
something open, the choice made here is stated in the header comment of the
file concerned and summarised under "Design choices and departures" below.

## Number system

The moduli are

| channel | modulus         | n = 7 | residue bits |
|---------|-----------------|-------|--------------|
| 1       | 2^n − 1         | 127   | n            |
| 2       | 2^n             | 128   | n            |
| 3       | 2^n + 1         | 129   | n + 1        |
| 4       | 2^(n+1) + 1     | 257   | n + 2        |

The dynamic range is M = 127·128·129·257 = 538 935 168, just above 2^29. The
first three moduli form a first-level set with range
M1 = 2^n(2^2n − 1) = 2 097 024. The fourth modulus is added in a second level.

The four moduli need to be pairwise prime. 2^(n+1)+1 satisfies this for odd n.
The alternative fourth modulus 2^(n+1)−1 (parameter `M4_PLUS = 0`) works only
for even n, for example n = 8 with {255, 256, 257, 511}. An invalid
combination stops elaboration with an error.

All values are unsigned. The filter output must stay inside the dynamic range:
`sum(COEF) * (2^XW − 1) < M`, which is also checked at elaboration. With the
defaults (26-bit input, coefficients {1, 2, 2, 1}) the largest output is
402 653 178.

## Data path and timing

```
            +-----------+   r1..r4   +---------+ x4 +-----------+ Z   +----------+
 x_i ------>| fwd_conv  |----------->| mod_fir |--->| rev_conv  |---->|          |--> y_o
 (26 b)     +-----------+            +---------+ ^  |           | R   |jrr_select|--> corr_o
   |                                  err_m*_i --+  +-----------+--+  |          |
   |  6 MSBs  +---------+ 14 b  +-----+                            |  |          |
   +--------->| rpr_fir |------>| reg |---------> jrr_unit <-------+  |          |
              +---------+       +-----+              |  Zjrr -------->|          |
                                                                      +----------+
```

| clock edge after `valid_i` | what is registered |
|---|---|
| 1 | channel outputs (`mod_fir`), reduced-precision estimate (`rpr_fir`) |
| 2 | Z and R = Z mod M1 (`rev_conv`); estimate delayed to line up with R |
| 3 | `y_o`, `corr_o`, `z_rns_o`; `valid_o` high |

A new sample is accepted every clock that `valid_i` is high. Idle clocks
freeze the delay lines. Reset (`rst_ni`, active low, synchronous) clears the
delay lines and every output.

## Forward conversion (`fwd_conv`)

* **Mod 2^n:** the low n bits.
* **Mod 2^k − 1** (`fc_mod2km1`): 2^k ≡ 1, so the k-bit slices of the input
  add up to the residue. They go through a chain of carry-save adders whose
  carry vector is rotated by one bit (end-around carry). A final k-bit adder
  with end-around carry follows, and the all-ones code (a second zero) is
  mapped to 0.
* **Mod 2^k + 1** (`fc_mod2kp1`): 2^k ≡ −1, so the slices alternate in sign.
  Odd slices are added complemented. Since ~s = −s − 2, each one needs a
  correction of +2, and these are folded into one constant. The short sum is
  then reduced by a constant modulo.

With `M4_PLUS = 1` the fourth channel uses `fc_mod2kp1` with k = n+1.
Otherwise it uses `fc_mod2km1`.

## Residue channels (`mod_fir`)

Each channel is a direct-form FIR filter, built from:

* a delay line of residues;
* one multiplier per tap, using the coefficient residue h_k mod m computed at
  elaboration. Each product is a small binary number of about 2k bits.
* a single multi-operand modulo reduction of the sum of the products.

The reduction is `mod_reduce`, which selects the circuit that fits the
modulus:

* 2^k: truncation.
* 2^k − 1: the end-around-carry CSA chain of `fc_mod2km1`.
* 2^k + 1: the alternating-slice adder with correction of `fc_mod2kp1`.

This is the part of the design meant to run overscaled.

## Reverse conversion (`rev_conv`)

The conversion works in two levels of mixed-radix steps:

```
X12 = r2 + 2^n · |(r1 − r2)·|2^n|^-1_m1|_m1
X1  = X12 + m1·m2 · |(r3 − X12)·|m1·m2|^-1_m3|_m3      (= Z mod M1)
Z   = X1 + M1 · |(r4 − X1)·|M1|^-1_m4|_m4
```

All inverses are constants. Every |·|_m uses the same slice-and-add
reducers (`mod_reduce`):

* a modulo subtraction a − b is the reduction of a + (m − b);
* a multiplication by a constant inverse is the reduction of the shifted
  partial products, which amounts to adding rotated copies of the operand
  with a correction constant;
* the wide intermediate X1 is reduced modulo m4 by adding its (n+1)-bit
  slices with alternating signs.

X1 is brought out as R for the JRR unit. Each input residue is reduced modulo
its modulus first. A channel word that a timing error has pushed out of range
therefore still decodes to a defined value.

## JRR reconstruction (`rpr_fir`, `jrr_unit`, `jrr_select`)

This is the part that needs the most care.

**The estimate.** The top RB bits of each sample are rounded to nearest with
the next lower bit. The rounded value lies in 0 .. 2^RB, so it needs RB + 1
bits. `rpr_fir` filters these rounded values. Let SH = XW − RB. Each rounded
sample, shifted left by SH, differs from the true sample by at most 2^(SH−1)
either way, so:

```
est = Z_rpr·2^SH,    |est − Z| ≤ sum(h)·2^(SH−1)  (= Nr)
```

Rounding keeps this noise centred on zero. A small input such as 500 gives
est = 0 and an exact reconstruction.

**The reconstruction.** Write Z = U·M1 + R. The RNS first level gives R. A
timing error in channel 4 leaves R untouched but corrupts U. The estimate
cannot give R, but it gives U whenever Nr < M1/2, because U is a division by
the large M1. The unit picks the value congruent to R mod M1 that lies
nearest to the estimate:

```
U    = floor((est − R + M1/2) / M1), clamped to 0 .. m4 − 1
Zjrr = U·M1 + R
```

**The decision.** `jrr_select` forms |Z − Zjrr|. When that exceeds TH
(default 0) it outputs Zjrr and raises `corr_o`. Otherwise it outputs Z.

**What it covers.**

| situation | Nr < M1/2 | result |
|---|---|---|
| no error | yes | Zjrr = Z, Z passed, `corr_o = 0` |
| error in channel 4 | yes | Zjrr = true Z, replaces the corrupted Z |
| error in channel 1, 2 or 3 | – | R is wrong too. The output is usually flagged (`corr_o = 1`) but not repaired. |
| any | no | Zjrr may be one M1 step off. With TH = 0 it then replaces even a correct Z. |

**Choosing RB.** The default RB = n − 1 = 6 comes from the reference block
diagram. With the default gain of 6 the bound is Nr = 6·2^19 ≈ 3.1·10^6,
which is larger than M1/2 ≈ 1.05·10^6. The reconstruction is therefore only
probabilistic. In simulation, about 30 % of error-free full-range random
samples were replaced by a wrong value. Samples whose rounding errors stay
small, such as small inputs, are handled correctly. RB = n + 1 = 8 gives
Nr = 6·2^17 < M1/2, which makes correction of channel-4 errors exact and
leaves error-free results untouched. This is the recommended setting for a
filter with gain above 1:

```
jrr_rns_fir #(.RB(8)) u_filt (...);
```

Raising TH trades coverage for safety. With TH ≥ M1, a one-step
misreconstruction no longer replaces a good result, but errors that move Z by
exactly ±M1 are then missed too.

## Emulating overscaling errors

RTL cannot express a lowered supply voltage. The top level has four inputs,
`err_m1_i` .. `err_m4_i`, which are XORed onto the four channel outputs in the
clock between the channel register and the reverse converter. For a sample
accepted at edge t, a mask present between edges t and t+1 corrupts that
sample. Tie these inputs to zero in normal use.

## Parameters of `jrr_rns_fir`

| parameter | default | meaning |
|---|---|---|
| `N` | 7 | modulus exponent n |
| `M4_PLUS` | 1 | fourth modulus 2^(n+1)+1 (0: 2^(n+1)−1) |
| `XW` | 4N − 2 = 26 | input width |
| `TAPS` | 4 | filter length |
| `COEF` | {1, 2, 2, 1} | unsigned coefficients, tap 0 first. The array has `TAPS` entries. |
| `RB` | N − 1 = 6 | input MSBs used by the reduced-precision filter. They are rounded, so the filter takes RB + 1 bits. |
| `ZRW` | 2N = 14 | output width of the reduced-precision filter |
| `TH` | 0 | threshold on the size of the disagreement |

The output width is ceil(log2 M) = 30 bits. The reference diagram labels the
output 4n − 2 bits, which cannot hold a 4-tap sum of 4n − 2-bit samples, so
the output was widened.

## Design choices and departures

* **Fourth modulus.** n = 7 and the fourth modulus 2^(n+1)+1 = 257 follow the
  residues of a reference simulation ({119, 116, 113, 243} for input 500) and
  the reverse-converter drawing. The verbal description names 2^(n+1)−1
  instead, which is available as `M4_PLUS = 0`. That set is not pairwise prime
  for n = 7.
* **Channel widths.** The channel widths are those the residues need: n, n,
  n+1 and n+2 bits.
* **Reverse converter.** It uses mixed-radix conversion built from the same
  slice-and-add reducers. It mirrors the published second-level circuit of
  carry-save adders and rotated words, but not its exact grouping.
* **Mod 2^k + 1 reduction.** A plain sum plus a small constant modulo
  replaces a modulo 2^k + 1 carry-save tree.
* **Own choices.** The taps, coefficients, threshold, rounding rule,
  pipeline registers and reset behaviour are this design's own. The
  reference simulation settles at its input value, so its coefficients have
  unit DC gain. The defaults here have a gain of 6.
* **Rounding of the estimate's input.** The n − 1 MSBs that feed the
  reduced-precision filter are rounded, not truncated. The filter therefore
  takes one extra input bit.
* **R for the JRR unit.** R is taken as the first-level result Z mod M1, so
  the correction protects the fourth (widest) channel.
* **Not modelled.** Separate supply domains, voltage overscaling itself and
  the power and area figures reported for an FPGA implementation are not
  modelled.

## Files

| file | content |
|---|---|
| `rtl/jrr_pkg.sv` | moduli, ranges, modular inverse (elaboration-time functions) |
| `rtl/fc_mod2km1.sv`, `rtl/fc_mod2kp1.sv` | residue of a binary word mod 2^k ∓ 1 |
| `rtl/mod_reduce.sv` | reduction by any constant modulus, dispatching to the two above |
| `rtl/fwd_conv.sv` | binary-to-residue converter |
| `rtl/mod_fir.sv` | one modular FIR channel |
| `rtl/rev_conv.sv` | two-level residue-to-binary converter |
| `rtl/rpr_fir.sv` | reduced-precision binary FIR |
| `rtl/jrr_unit.sv` | quotient-from-estimate / remainder-from-RNS reconstruction |
| `rtl/jrr_select.sv` | disagreement test and output mux |
| `rtl/jrr_rns_fir.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_jrr_rns_fir_rb` (RB = 8), `tb_jrr_rns_fir_n8` (n = 8 set) and `tb_const_500` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/jrr_pkg.sv tb/tb_jrr_rns_fir.sv --top-module tb_jrr_rns_fir
./obj_dir/Vtb_jrr_rns_fir
```

Replace the testbench name for the others.

* **Unit testbenches.** The converters are checked against direct `%`
  arithmetic and a brute-force search, at n = 7 and at n = 8 with
  `M4_PLUS = 0`. The channels and the reduced-precision filter are checked
  against integer models with random idle clocks.
* **`tb_jrr_rns_fir`.** It streams 3000 samples through the default
  configuration with emulated errors in all four channels. It checks the
  3-clock latency, every output against an integer model of the filter, and
  that each mechanism occurs: clean pass, corrected error, error beyond the
  estimate, first-level error flagged, idle clock.
* **`tb_const_500`.** It holds the input at 500. It checks the residues
  {119, 116, 113, 243}, the outputs 500, 1500, 2500 and 3000 as the delay
  line fills, and that no correction is made.
* **`tb_jrr_rns_fir_n8`.** It runs the same checks on the set
  {255, 256, 257, 511} (n = 8, `M4_PLUS = 0`, 30-bit input, RB = 9).
* **`tb_jrr_rns_fir_rb`.** It repeats the test with RB = 8 and requires every
  channel-4 error to be corrected and no clean result to be replaced.
