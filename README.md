# A-SAR: a successive-approximation ADC that moves both bounds per cycle

A conventional N-bit SAR ADC runs a binary search. Each cycle it compares
the input with one trial level D. Then it moves either the lower bound (LB) or
the upper bound (UB) of the search interval to D, so it always needs N cycles.

The accelerated SAR (A-SAR) adds two cheap, imprecise comparisons to the
precise one. Each cycle asks three questions:

* **P_M**: is the input at or above D?
* **P_A+**: is the input more than about A codes above D?
* **P_A−**: is the input more than about A codes below D? (P_A− = 0 means yes.)

The answers give a bracket on both sides of the input. The logic can move both
bounds in one cycle, or move a single bound much further than halfway. The
conversion ends as soon as LB = UB, often in fewer than N cycles. The clock
period and the frame stay fixed, so fewer cycles means fewer DAC switching
events and less energy per sample.

This repository holds a 10-bit, 0.5 V, rail-to-rail differential version:

* synthesizable SystemVerilog for all of its digital logic;
* behavioural models of its analog front end. The front end is a split
  capacitor DAC, two voltage-controlled delay lines and three phase detectors.

## Converting voltage into time

A 0.5 V supply leaves too little headroom for a voltage comparator. Instead,
the DAC output pair (V_DAC+, V_DAC−) controls two 10-stage current-starved
delay lines (VCDLs):

* The *top* line speeds up when V_in − V_D is positive.
* The *bottom* line speeds up when V_in − V_D is negative.

Both lines start together at each falling clock edge. Three binary phase
detectors then report which edge arrives first:

| detector | + input                 | − input                  | output 1 means          |
|----------|-------------------------|--------------------------|-------------------------|
| P_M      | end of top line         | end of bottom line       | V_in ≥ V_D              |
| P_A+     | end of top line         | bottom line after 2 stages | V_in − V_D > +T       |
| P_A−     | top line after 2 stages | end of bottom line       | V_in − V_D > −T         |

The auxiliary detectors compare a full 10-stage line against 2 stages of the
other line. So they switch only when one line is about five times faster than
the other, which happens at a differential input T.

T is not well controlled. The original circuit measured it at 63 to 93 LSB
across process and temperature corners:

|    | 0 °C | 25 °C | 85 °C |
|----|------|-------|-------|
| TT | 64   | 70    | 86    |
| FF | 68   | 74    | 93    |
| SS | 63   | 68    | 82    |

## The enforced band: why A = 62 and B = 34

The logic never relies on the exact value of T. It only assumes that T lies
between A+1 and A+B LSB, where:

* A = 62;
* B = 34;
* so the band A+1..A+B = 63..96 LSB holds every corner above, with margin.

With k the final code and D the trial code, only four detector patterns can
occur:

| {P_A+, P_M, P_A−} | {S1,S2} | what is known         | new LB                          | new UB                          |
|-------------------|---------|-----------------------|---------------------------------|---------------------------------|
| 1 1 1             | 11      | k ≥ D + A             | D + A, or D if D + A ≥ UB       | unchanged                       |
| 0 0 0             | 00      | k ≤ D − A − 1         | unchanged                       | D − A − 1, or D − 1 if D − A < LB |
| 0 1 1             | 01      | D ≤ k < D + A + B     | D                               | D + A + B − 1, unless that is not below UB |
| 0 0 1             | 10      | D − A − B ≤ k < D     | D − A − B, unless that is below LB | D − 1                        |

The control signals are:

* S1 = P_A− · (¬P_M + P_A+)
* S2 = P_M · P_A−

Cases 01 and 10 move both bounds at once. Cases 11 and 00 move one bound by
at least A codes. The fallbacks matter only near the ends of the interval. The
"or D" and "or D − 1" fallbacks are rare with consistent detectors, and none of
the top-level tests happens to reach them. The unit tests drive them
directly.

Any other detector pattern would mean the delay lines are inconsistent. The
case decoder flags it on a debug output (`pd_invalid`), and the bounds are
still updated from S1/S2.

## Bound-update datapath

Each bound is computed by a small datapath: one adder, one 12-bit comparator
and two multiplexers, driven by S1, S2 and the comparator result.

**LB (`asar_lb_update`):**

* X = D + (S2 ? A : −(A+B));
* g1 = X < (S2 ? UB : LB);
* SELECT1 = ¬S1·S2 + S1·S2·¬g1 chooses D over X;
* SELECT2 = ¬S1·¬S2 + S1·¬S2·g1 keeps the old LB.

**UB (`asar_ub_update`):**

* X = D + (S2 ? A+B : −A);
* g2 = X < (S2 ? UB : LB);
* SELECT3 = S1·¬S2 + ¬S1·¬S2·g2 chooses D over X;
* a −1 stage follows;
* SELECT4 = S1·S2 + ¬S1·S2·¬g2 keeps the old UB.

X can be negative, so the comparator (`asar_value_compare`) works one bit
wider than the 12-bit operands and takes the sign of X − Y.

## Choosing the next trial code

`asar_code_update` is a chain of N identical cells running from the MSB
down:

* C_i = (UB_i ⊕ LB_i) + C_{i+1}
* D_i = UB_i where C_i = 0 (the common prefix of LB and UB);
* D_i = 1 at the first bit where LB and UB differ;
* D_i = 0 below that bit.

So D is the midpoint of the smallest aligned power-of-two block that holds
[LB, UB]. While one bound moves at a time, this is exactly the conventional
binary search. C_0 = 0 means LB = UB, and its inverse is DONE.

## Frame timing

An 11-bit one-hot ring (`asar_phase_sr`) divides time into frames of N+1 = 11
clock periods.

* **S0, sampling:** the capacitor arrays track the inputs and the equalizing
  switch holds both DAC nodes at the input common mode. The result of the
  previous frame is still visible.
* **Edge leaving S0:** LB := 0 and UB := 1023. D becomes 512.
* **Each conversion cycle S1..S10:** in the first half, the DAC settles on D.
  At the falling edge, the delay lines launch and the detectors decide. At
  the next rising edge, LB/UB load their new values. The bounds freeze once
  LB = UB.
* **DONE** rises in the cycle after the deciding edge. **O_EN** is a
  one-cycle strobe in that cycle, and `dout` loads LB at its end. The ring
  keeps turning, so every frame is 11 clocks whatever the cycle count.

Example: 0.28 V / 0.22 V (60 mV differential) gives 1000111100 (572). It
takes 8 conversion cycles with trial codes 512, 576, 544, 560, 568, 572, 574
and 573. A conventional SAR needs 10 cycles.

The output code is floor(V_diff / V_LSB + 511.5), clipped to 0..1023, where
V_LSB = 2·VDD/1023 and V_diff = vin_p − vin_n ranges from −VDD to +VDD.

## The analog models

These are plain behavioural models (`real` signals and delays). They exist to
exercise the digital logic with realistic decisions. They do not predict
circuit performance.

* **`asar_split_cap_dac`** holds two arrays of 5+5 binary-weighted capacitors
  joined by a unit attenuation capacitor. The model computes the top-plate
  voltage from charge conservation: V = V_CM − V_in + VDD·w/1023. Here w is
  the weight of the bottom plates switched to VDD: the code D on the V_in+
  array and ¬D on the V_in− array. The test reproduces the hand-calculated
  node voltages of a conventional 10-cycle conversion of the 60 mV example,
  and its comparator decisions, to within 2 mV. The model leaves out settling,
  mismatch and switch leakage.
* **`asar_vcdl`** is a chain of 10 stages. Odd stages are NMOS-starved and
  even stages PMOS-starved. Each stage delay is T0·exp(∓(V − VDD/2)/VS), with
  the exponent clamped. The delay law is this model's own. VS is chosen so
  that VS·ln 5 = 70 LSB, the typical corner. The model uses a 1 fs time
  precision so that decisions are exact to better than 0.001 LSB.
* **`asar_phase_detector`** is an ideal edge-order latch: it outputs 1 if the
  + input rises first, and holds its decision while both inputs are low.

## Where this design departs from, or fills in, the original description

* **Sign convention.** Two statements disagree. One says P_M = 1 means
  V_DAC+ > V_DAC−. The other says V_DAC+ goes to the *negative* comparator
  input, and the DAC equations make V_DAC+ rise with D. This design keeps the
  algorithm's meaning (P_M = 1 ⇔ input ≥ D). The top level therefore routes
  the DAC node that falls with the input to the delay-line "+" inputs.
* **B = 34.** One sentence gives B = 62 LSB. The band width V_Δ = 34 LSB and
  the sum A + B = 96 LSB both require B = 34, so B = 34 is used.
* **Own choices:**
  * the ring wraps S10 → S0 to give back-to-back frames;
  * bounds are initialised at the edge leaving S0;
  * the bound registers are frozen once LB = UB;
  * O_EN is a one-cycle strobe and DONE is a level;
  * the invalid-pattern flag;
  * the delay law and its constants;
  * the reset value 0 of the phase detectors.

  The original gives none of these.
* **Cycle statistics differ.** For 1024 samples of a full-scale sine, this
  model finishes in 10/9/8/7 cycles 69.4/20.3/9.6/0.8 % of the time. The
  original transistor-level simulation reported 67.6/0/10.6/21.8 %. The share
  depends on where T really lies for each conversion and on the circuit's
  non-idealities. This model uses ideal, noise-free detectors at one fixed T
  per corner.
* **Linearity and noise.** The original reports SNDR 43 dB, an INL of up to
  3 LSB, and a DNL of ±0.11 LSB. The ramp test here gets the same DNL of
  ±0.11 LSB, which is only the granularity of nine samples per code. Its INL
  is 0.06 LSB, and the sine test gives 62.4 dB SNDR: the ideal 10-bit limit.
* **Power.** Power is not modelled, and neither is the conventional SAR
  baseline it was compared with.

## Files

| file | what it is |
|------|------------|
| `rtl/asar_pkg.sv` | N = 10, A = 62, B = 34; the bound-case enum |
| `rtl/asar_adc.sv` | top level: digital core plus analog models (simulation only) |
| `rtl/asar_digital.sv` | all synthesizable logic |
| `rtl/asar_phase_sr.sv` | S0..S10 one-hot ring |
| `rtl/asar_dac_switch_ctrl.sv` | gate signals of the DAC and sampling switches |
| `rtl/asar_case_decode.sv` | {P_A+, P_M, P_A−} → S1, S2 |
| `rtl/asar_value_compare.sv` | signed X < Y comparator |
| `rtl/asar_lb_update.sv`, `rtl/asar_ub_update.sv` | bound datapaths and registers |
| `rtl/asar_code_update.sv` | next trial code and the LB = UB chain |
| `rtl/asar_output_reg.sv` | DONE, O_EN, output register |
| `rtl/asar_split_cap_dac.sv`, `rtl/asar_vcdl.sv`, `rtl/asar_phase_detector.sv` | behavioural analog models |
| `tb/asar_ref_pkg.sv` | independent reference: ideal code, bit-true A-SAR search |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workloads below |

The top-level tests are:

* `tb_asar_adc`, at default parameters, covers:
  * the 60 mV example with its trial sequence;
  * both rails;
  * 200 random inputs;
  * the 1024-point sine, with its cycle histogram and SNDR.

  It also counts each bound case, each hold path, and early and full-length
  conversions, and fails if any of them never occurs.
* `tb_asar_adc_corners` runs nine converters, one per corner in the table
  above.
* `tb_asar_adc_ramp` runs the 9 × 1024-conversion ramp and computes INL and
  DNL.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5 (`--timing` is needed for the analog models):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/asar_pkg.sv tb/asar_ref_pkg.sv tb/tb_asar_adc.sv \
    --top-module tb_asar_adc -Mdir obj_adc -o sim
./obj_adc/sim
```

`-Wno-fatal` keeps lint warnings, such as the run-time delays of the
delay-line model, from stopping the build. Replace `tb_asar_adc` with any
other testbench name. Each run takes well under a second.

To change the design:

* Resolution and band are the parameters `N`, `A_CODE` and `B_CODE` on
  `asar_adc` and `asar_digital`. `tb_asar_digital` shows a 4-bit instance
  with A = 1 and B = 2.
* To move the auxiliary-detector threshold to T LSB, set
  `DELAY_VS = T · (2·VDD/1023) / ln 5`.
* For a correct result, keep A+1 ≤ T ≤ A+B.
