# Folded eighth-order digital gammatone filter

A cochlear-implant speech processor splits sound into frequency channels
the way the cochlea does. The usual model for one channel is the gammatone
filter. Its fourth-order analog form becomes, by impulse-invariant
transformation, an eighth-order digital IIR filter: four second-order
sections (biquads) in cascade. Built directly, each biquad needs five
multipliers and three adders, so one channel needs twenty multipliers and
twelve adders.

This RTL follows the folded architecture of the article "Folded Architecture
for Digital Gammatone Filter Used in Speech Processor of Cochlear Implant".
Audio sample rates are tiny compared with a logic clock. So each biquad runs
its five multiplications and all its additions one after another, on **one
multiplier and one adder**, repeating the same five-step schedule for every
sample. This is the folding transformation with folding factor K = 5. The
channel is then four multipliers, four adders and twenty data registers. It
takes one sample every five clock cycles.

## The filter being folded

Each section computes the transposed direct-form biquad

```
y(n)  = b0*x(n) + s1(n-1)
s1(n) = b1*x(n) + s2(n-1) + a1*y(n)
s2(n) = b2*x(n) + a2*y(n)
```

The names follow the products of the unfolded graph: M0 = b0*x, M1 = b1*x,
M2 = b2*x, M3 = a1*y, M4 = a2*y. **`a1` and `a2` are the constants the
feedback multipliers apply.** In the usual transfer function
G(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 + a1' z^-1 + a2' z^-2) they are
a1 = -a1' and a2 = -a2'. For a gammatone section b2 = 0, because each
section has a single zero. The multiply by b2 is still scheduled, so the
section is a general biquad.

## The five-step schedule (the hard part)

A controller counts the time step m = 0..4. Each iteration l covers the
clock cycles 5l+m. Every switch in a section is a multiplexer selected by m.
Two timing rules fix the schedule:

* **Multiplier (`booth_mult`): two pipeline stages.** A product issued in
  step m is available in step m+2.
* **Adder (`rca_adder`): followed by one register, D.** A sum computed in
  step m is in D in step m+1.

The node that produces s1 has three inputs. With a two-input adder it costs
two additions, so the adder is busy four steps out of five. The registers R1
to R5 are the section's five data registers.

| m | multiplier issues | adder computes (into D) | registers loaded at the end of the step |
|---|---|---|---|
| 0 | M0 = b0·R1 | S1 = D + M3 (D holds T) | – |
| 1 | M1 = b1·R1 | S2 = R4 + M4 (R4 holds M2) | R2 ← D (S1) |
| 2 | M2 = b2·R1 | Y = M0 + R2 | R3 ← D (S2) |
| 3 | M3 = a1·D (D holds Y) | T = M1 + R3 | R5 ← D (Y) |
| 4 | M4 = a2·R5 | idle, D keeps T | R4 ← M2, R1 ← next sample |

The multiplier result column is the issue column shifted by two steps: M0
arrives in step 2, M1 in 3, M2 in 4, M3 in 0 and M4 in 1. Steps 0 and 1
finish the previous sample's states: S1 = s1(n-1) and S2 = s2(n-1). Step 2
uses S1 to form the output, and step 3 starts the next s1 with T = M1 + S2.

The critical loop runs from y through M3 (2 steps), then S1 (1 step), then
the next y (1 step). That is 4 steps, which fits in the 5-step iteration, so
the schedule is causal with no extra retiming.

Register use per section:

| register | holds | written | read |
|---|---|---|---|
| R1 | input sample x(n) | end of step 4 | steps 0, 1, 2 |
| R2 | S1 = s1(n-1) | end of step 1 | step 2 |
| R3 | S2 = s2(n-1) | end of step 2 | step 3 |
| R4 | product M2 | end of step 4 | step 1 of the next iteration |
| R5 | output y(n) | end of step 3 | step 4 (M4), and as the section output |

## Cascade, handshake and timing

`gtf8_folded_top` holds one `fold_ctrl` and four `gtf_biquad_folded`
instances. All four sections share the step counter. At the edge that
closes step 4, section 1 loads the new input sample. At the same edge,
section k+1 loads section k's R5. So section k works on sample n during
iteration n+k-1.

* **Input.** `x_ready` is high in step 4. A sample is taken when `x_valid`
  and `x_ready` are both high. If no sample is offered, the controller
  drops its enable. Every register in the datapath then holds, and the
  filter waits in step 4. This makes the filter easy to clock far faster
  than the sample rate. It is this design's own handshake.
* **Output.** `y` changes at the edge that closes step 3. `y_valid` pulses
  for one cycle right after that edge.
* **Latency.** The output of a sample appears 19 enabled cycles after the
  sample was taken: three iterations of 5 cycles, plus 4. The pipeline only
  moves when samples arrive, so the last three outputs of a burst appear
  only after three more samples. Feed zeros to flush it.
* **Start-up.** After reset the first three output pulses would carry only
  the reset state of the later sections, so they are suppressed.
* **Throughput.** One sample per 5 cycles. A 16 kHz channel needs a clock of
  at least 80 kHz.
* **Coefficients.** The `coef[s][c]` port holds section s (0 is first) and
  coefficient c in the order b0, b1, b2, a1, a2. Keep it constant while
  filtering. Changing it between samples is safe in the sense that each
  sample is then computed with the new set.
* **Reset.** `rst_n` is synchronous and active low, and clears every
  register.

## Number format

* Data is 16-bit two's complement (`DATA_W`).
* Coefficients are 8-bit two's complement (`COEF_W`) with 6 fraction bits
  (`COEF_FRAC`), a range of −2 to +1.98. Eight bits is the coefficient width
  of the source. The split into integer and fraction bits is this design's
  own. It is forced by the feedback constant near 1.75 that a 1 kHz channel
  needs at 16 kHz sampling.
* Each product is (c·x) shifted right arithmetically by 6 bits (truncation),
  then saturated to 16 bits.
* Each two-operand sum is saturated to 16 bits. The adder is one bit wider
  than the data, and its top two bits show overflow.
* The three-input node is summed in a fixed order: (b1·x + s2) + a1·y.

With 8-bit coefficients the filter response is coarse, but it stays clearly
band-pass. In simulation a 1 kHz sine of amplitude 4000 leaves the filter at
a peak of 3898, and a 3 kHz sine at 69.

### Computing coefficients

The testbench package `tb/gtf_ref_pkg.sv` (function `gtf_coefs`) derives a
channel from its centre frequency fc and sample rate fs. With T = 1/fs,
ERB = 24.7 (4.37 fc/1000 + 1), B = 2π·1.019·ERB and ω = 2π·fc:

* The denominator is the same for every section. The feedback constants are
  a1 = 2 cos(ωT)/e^{BT} and a2 = −e^{−2BT}.
* The numerator of section k is b0 = T, b2 = 0 and
  b1 = −(T cos ωT ± sqrt(3 ± 2^1.5) T sin ωT)/e^{BT}. The four sign
  combinations give the four sections.
* Each section's numerator is scaled to unit gain at fc.
* Every coefficient is then rounded to 6 fraction bits.

For fc = 1 kHz and fs = 16 kHz this gives, per section (b0, b1, b2, a1, a2):

```
(3, -5, 0, 112, -58)  (2, 0, 0, 112, -58)  (6, -6, 0, 112, -58)  (6, -4, 0, 112, -58)
```

## The folding example

`fold_add3` is the textbook illustration of folding that the architecture
is introduced with: y = x1 + x2 + x3 on one adder plus register in two
cycles. In cycle 2l+0 it computes x1 + x2. In cycle 2l+1 it adds x3 to that
partial sum. It is not part of the filter. It is wired beside the filter in
the top level on its own `ex_*` ports, so it can be simulated and
synthesized from the same top.

## Where this RTL departs from, or adds to, the published architecture

* **Register allocation.** The five registers and the multiplier order
  M0..M4 in steps 0..4 follow the published folding sets. Which value lives
  in which register, and the adder's time steps, are worked out here. They
  do not reproduce the published allocation table or lifetime chart.
* **Switch labels.** The published folded section diagram labels its
  coefficient switch b2{0}, a2{1}, b1{2}, a1{4}, b0{4}. That order is not
  the one of its multiplier folding set. This RTL follows the folding set.
* **Adder steps.** The adder folding set lists three additions and two idle
  steps. The three-input node needs a fourth addition, so here the adder is
  idle in one step only. The switch labels of the published diagram agree
  with four busy steps.
* **Added by this design.** Saturation, the rounding mode, the data width,
  the fraction bits, the handshake and stall, the shared controller, reset
  and `y_valid` are all choices made here; the source does not specify them.
* **Booth multiplier.** It is a standard radix-4 design. Stage 1 recodes and
  registers the partial products; stage 2 adds them. The source names a
  modified Booth multiplier with a "regular partial product array"; that
  array's layout is not reproduced.
* **Not included.** The unfolded baseline filter is not included, and
  neither is the 0.13 µm synthesis. Area, power and delay figures are not
  reproduced.

## Files

| file | contents |
|---|---|
| `rtl/gtf_pkg.sv` | folding factor, section count, coefficient indices, step type |
| `rtl/rca_adder.sv` | ripple carry adder |
| `rtl/booth_mult.sv` | two-stage radix-4 Booth multiplier with rescale and saturation |
| `rtl/fold_ctrl.sv` | step counter, sample handshake, stall |
| `rtl/gtf_biquad_folded.sv` | one folded second-order section |
| `rtl/fold_add3.sv` | two-cycle folded three-input adder example |
| `rtl/gtf8_folded_top.sv` | top: controller, four-section cascade, example |
| `tb/gtf_ref_pkg.sv` | unfolded bit-exact reference model and coefficient design |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_gtf8_response` (frequency sweep) |

## Verification

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog.

* `tb_gtf8_folded_top` runs the whole filter at its default sizes, in three
  runs:
  * a 1 kHz sine with back-to-back samples;
  * a 3 kHz sine with random gaps, which makes the datapath stall;
  * random coefficients with full-scale input, which drives saturation.

  It compares every output with a cascade of four unfolded reference
  sections. It also checks:
  * the 19-cycle latency once stall cycles are subtracted;
  * the suppressed start-up pulses;
  * band-pass selectivity;
  * that each of these mechanisms happened at least once.
* `tb_gtf8_response` sweeps the 1 kHz channel from 125 Hz to 7.5 kHz, with
  a sine of amplitude 16000 at each frequency. It checks the shape of the
  response and every output value. The measured gains (peak output over
  input amplitude) are:

  | Hz | 125 | 250 | 500 | 750 | 875 | 1000 | 1125 | 1250 | 1500 | 2000 | 3000 | 7500 |
  |---|---|---|---|---|---|---|---|---|---|---|---|---|
  | dB | −54.8 | −53.2 | −46.5 | −30.0 | −15.4 | −0.3 | −7.0 | −23.4 | −44.6 | −56.8 | −57.2 | −54.5 |

  Below about −55 dB the output is the datapath's truncation noise, a few
  tens of LSBs, not the filter's stop band.
* `tb_gtf_biquad_folded` checks one section against the reference model. It
  also checks the exact cycle at which the new output appears, and that the
  output holds during stalls.
* `tb_booth_mult`, `tb_rca_adder`, `tb_fold_ctrl` and `tb_fold_add3` check
  their modules against integer arithmetic and a cycle model.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/gtf_pkg.sv tb/gtf_ref_pkg.sv tb/tb_gtf8_folded_top.sv \
  --top-module tb_gtf8_folded_top -o sim
./obj_dir/sim
```

The packages must come first on the command line. The other modules are
found through `-y`. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/gtf_pkg.sv rtl/gtf8_folded_top.sv`.
The only remaining warnings are package constants that a given module does
not use, and the adder's unused carry out.
