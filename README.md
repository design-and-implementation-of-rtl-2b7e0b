# Digital controller for a four-phase interleaved buck VRM

A voltage regulator module (VRM) feeding a processor core must hold about 2 V
while the load current jumps by tens of amperes in a few microseconds. This
design is an all-digital controller for such a regulator: a four-phase
synchronous buck (5 V in, 2 V / 100 W out, 50 nH per phase, 1 mF output
capacitance), switched at 200 kHz per phase with the phases 90° apart. The
controller is written in synthesizable SystemVerilog. It has no processor in
the loop. The arithmetic is done by small finite-state machines that each
share one adder and one multiplier. The main idea is a two-loop structure:

* a slow **voltage loop**: a PI compensator, optionally followed by a
  first-order lead stage. It turns the output-voltage error into a current
  command;
* a fast **deadbeat current loop** in each phase. It forces that phase's
  inductor current to the command within about one switching period. It has
  two feed-forward paths:
  * the load's current demand is added to the command, so a load step is
    answered before the output voltage has moved;
  * the output voltage is added to the duty, which removes the output voltage
    from the current loop's dynamics.

The current loop works only if it sees the period-average inductor current,
not a value somewhere on the ripple. The sampling generator therefore triggers
each phase's ADC in the middle of the on-time and in the middle of the
off-time. The two samples are averaged before they are used.

## Block structure

```
            serial port ──► coef_regs ──► gains, limits, FS, DT, SET
                                │
 CMD, FBV ──► pi_ctrl ──► lead_iir ──► v_com ─┐
                                              ▼
 FBC[k] ──► sample_avg[k] ──► current_ctrl[k] (+ idem, + FBV) ──► duty[k]
                                                                   │
                      ┌───────────────── dpwm ─────────────────────┘
                      │ phase_shifter ─► carrier_gen[k] ─► pwm_deadtime[k] ─► PH[k], PHC[k]
                      └─► sync_sampling ─► ADC[k] triggers
```

| Module | Role |
|---|---|
| `vrm_pkg` | Widths (12-bit words, Q10 gains, 7-bit dead-time), register addresses, `set_t` mode register, reset defaults |
| `coef_regs` | Serial write port and all coefficient/mode registers |
| `mul_q` | Signed fixed-point multiplier. It drops the fraction bits of the product and saturates |
| `pi_ctrl` | Voltage-loop PI with integrator and output limiters; FSM with one adder and one multiplier |
| `lead_iir` | Lead compensator K(z+A)/(z−B); FSM with one adder and one multiplier; can be bypassed |
| `current_ctrl` | Per-phase deadbeat current loop with both feed-forward paths and both limiters |
| `sample_avg` | Average of the mid-on-time and mid-off-time current samples |
| `carrier_gen` | Triangle carrier, or an up or down sawtooth |
| `phase_shifter` | Computes the phase offsets and starts each phase's carrier after its offset |
| `pwm_deadtime` | Comparator and dead-time generator for one upper/lower switch pair |
| `dpwm` | Phase shifter, plus one carrier and one comparator per phase |
| `sync_sampling` | ADC trigger generator, locked to the carriers |
| `vrm_ctrl_top` | Wires the blocks together |

## Arithmetic and scaling

All data words are unsigned 12-bit ADC codes. Gains are Q10 fixed point:

* Kp, Ki, K (lead), Kc and Kvf are unsigned, 0 to 3.999.
* The lead zero A and pole B are two's complement, −2 to 1.999.

A product keeps its 10 fraction bits until the last addition of a state
machine. The result is then shifted right by 10 and clamped to 0…4095. `mul_q`
is a generic signed multiply → arithmetic shift → saturate. Its defaults are
a Q9 10-bit operand times a 14-bit integer with a 10-bit signed result. The
current loop reuses it at 13 × 14 bits, Q10.

**PI (`pi_ctrl`).** A low level on `cs_n` starts one update. States idle and
S1…S5:

| State | Work |
|---|---|
| S1 | Error e = cmd − fb |
| S2 | Ki·e |
| S3 | Integrate and clamp; Kp·e |
| S4 | Sum, shift, clamp; `done` |
| S5 | Wait for `cs_n` to return high |

The integrator holds the full Q10 value. It is clamped to the output range, so
it cannot wind up. The output appears 4 clocks after the start edge.

**Lead (`lead_iir`).** It computes y(n) = K·(x(n) + A·x(n−1)) + B·y(n−1),
which is exactly K(z+A)/(z−B). It takes five states: A·x₁, numerator, K·u,
B·y₁, then sum and clamp. The output is ready 5 clocks after `start`. With
`SET.lead_en = 0` the stage passes its input through after one clock, and its
delay registers keep tracking.

**Current loop (`current_ctrl`).** In order:

1. i_cmd = v_com + (ff_en ? idem : 0).
2. i_cmd is limited to IL_lmt.
3. duty = Kc·(i_cmd − i_L) + Kvf·V_o, clamped to [0, D_lmt].

It takes four clocks. Each limiter raises a status flag when it acts.

For a deadbeat response, Kc should be about L/(T_s·V_in), expressed in duty
counts per ADC code. Kvf should be N/V_in in codes, so that Kvf·V_o is the
steady-state duty. Example scaling: 20 A full scale per phase and N = 500.
One duty count changes the phase current by about 1 A (205 codes) per period,
so Kc ≈ 5/1024 and Kvf ≈ 125/1024.

## DPWM: carriers, interleaving and dead-time

`FS` sets the carrier count N, with 12 bits (2…4095).

* **Triangle** (`SET.syms = 0`, symmetric, dual-edge modulation). It counts
  0→N→1, so the period is 2N clocks and f_sw = f_clk/(2N). N = 500 gives
  200 kHz at 200 MHz.
* **Sawtooth** (`SET.syms = 1`). It counts up 0→N−1 (leading edge) or down
  N−1→0 (trailing edge, `SET.saw_down`). The period is N clocks.

`phase_shifter` computes the offset of phase k from the carrier period
(`SET.phn` + 1 phases):

* four phases: a quarter period by a shift, times k;
* three phases: period·k/3;
* two phases: half a period.

A delay counter starts each phase's carrier when it reaches that phase's
offset. Phases beyond the selected count stay idle with their gates off. With
`SET.phsh = 0` all carriers start together. Changing FS, the carrier type or
the phase settings restarts all carriers in step.

**Comparator and dead-time.** `pwm_deadtime` latches the duty command at the
start of each carrier period, so the reference never changes inside a period.
Dead-time is made by lowering the upper switch's reference instead of
delaying edges:

```
upper (PH)  on while  carrier <  ref − DT
lower (PHC) on while  carrier >= ref
```

Both switches are off while ref − DT ≤ carrier < ref.

* With a triangle this band is crossed twice per period, so each edge gets a
  gap of DT clocks. The upper on-time is 2(ref − DT) − 1 clocks, because the
  triangle holds its count-0 value for only one clock.
* With a sawtooth the band is crossed once. The lower switch is also turned
  off DT counts before the wrap, so the edge at the wrap has a gap too.

The gap therefore always comes out of the upper switch's on-time. Near
100 % duty this keeps the lower switch from turning off early. An
assertion checks that PH and PHC are never on together. The gates are
registered and forced off while `SET.pwm_en = 0` or during reset.

## Synchronous sampling

`sync_sampling` raises a one-clock trigger per phase (active level set by
`SET.act`) at the middle of the on-time and at the middle of the off-time:

* **Triangle carrier.** These points are the carrier's valley (count 0) and
  peak (count N). No computation is needed and the samples are exactly half a
  period apart.
* **Sawtooth carrier.** The points are count ref/2 and count (ref+N)/2,
  computed from the latched reference.

`SET.samp` selects which triggers are raised:

| `SET.samp` | Triggers |
|---|---|
| 01 | Mid-on only |
| 10 | Mid-off only |
| 11 | Both; the current word then updates at 2·f_sw |

In mode 11, `sample_avg` outputs the mean of the latest two samples after each
new sample. This is the period-average current whatever the ripple. Each phase
controller runs as soon as its averaged sample arrives. The new duty is taken
at the next carrier period. So from sample to gate there is at most one
carrier period, plus the ADC conversion time.

## Register map and serial port

A write frame is 16 bits, MSB first, sampled on rising SCLK while SELECT is
high:

* `addr[3:0]`
* `data[11:0]`

The write takes effect when SELECT falls after exactly 16 bits with R/W = 0.
Frames of any other length, and frames with R/W = 1, are ignored; there is no
read-back. The pins are synchronised into the clock domain, so SCLK must be
slower than f_clk/4. The write lands on the third clock edge after SELECT
falls.

| Addr | Name | Meaning | Reset |
|---|---|---|---|
| 0 | KP | Voltage-loop Kp, Q10 | 0 |
| 1 | KI | Voltage-loop Ki, Q10 | 0 |
| 2 | KLA | Lead zero A, signed Q10 | 0 |
| 3 | KLB | Lead pole B, signed Q10 | 0 |
| 4 | KLK | Lead gain K, Q10 | 1024 |
| 5 | CKI | Current-loop gain Kc, Q10 | 0 |
| 6 | CKD | Duty limit D_lmt | 4095 |
| 7 | FS | Carrier count N | 500 |
| 8 | DT | Dead-time in clocks (0…127) | 80 |
| 9 | SET | Mode bits, below | see below |
| 10 | ILLMT | Current-command limit IL_lmt | 4095 |
| 11 | KVF | Output-voltage feed-forward gain, Q10 | 0 |

SET bits. The reset value of each field is in brackets.

| Bits | Field | Meaning |
|---|---|---|
| 0 | pwm_en [1] | Gate outputs enabled |
| 1 | syms [0] | 0 = triangle, 1 = sawtooth |
| 2 | phsh [1] | Phase shift enabled |
| 5:3 | phn [3] | Number of phases − 1 |
| 6 | act [1] | ADC trigger active high |
| 8:7 | samp [11] | Sampling mode |
| 9 | saw_down [0] | Decreasing sawtooth |
| 10 | lead_en [0] | Lead stage in the loop |
| 11 | ff_en [1] | Current-demand feed-forward on |

## Top-level interface

* **Registers:** `rw_n`, `select`, `sclk`, `sdata`.
* **Commands:** `cmd` (voltage reference) and `idem`, the current-demand
  feed-forward, in per-phase current codes.
* **ADC results:** `fbv` with `fbv_valid`, and `fbc[k]` with `fbc_valid[k]`.
  Each valid is a one-clock strobe. A voltage strobe starts a voltage-loop
  update.
* **Outputs:**
  * the gate drives `p[k]` and `pc[k]`;
  * the ADC triggers `adc[k]` and their OR `adc_any`;
  * status: `duty[k]`, `vcom`, and the limiter flags `v_sat`,
    `ilim_hit[k]` and `dlim_hit[k]`.

`PHASES` (default 4) is the only top-level parameter.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against an independent model and checks latencies. Each prints
`TB_RESULT checks=N failures=M`.

The end-to-end bench `tb_vrm_ctrl_top` runs the top at its default size,
200 MHz and 200 kHz per phase. It has two parts.

**Part A** drives the ADC words directly. It checks every update bit-exactly
against an integer model: v_com with and without the lead stage, and every
phase duty with and without feed-forward, including the limiters. It also
measures on the gates:

* the on-time for a given duty;
* sawtooth operation;
* two-phase operation.

**Part B** closes the loop around `buck4_plant`, a real-valued model of the
four-phase buck and its ADCs (0…5 V, 0…20 A per phase, 12 bits). The load
steps from 0.2 A to 50 A at 10 A/µs. After 300 µs it is released back to
0.2 A at the same rate. The run is done once with current-demand
feed-forward and once without:

| | With feed-forward | Without |
|---|---|---|
| Voltage dip at the step | ≈118 mV | ≈541 mV |
| Output 300 µs after the step | 1.997 V | 2.034 V |
| Overshoot at the release | ≈152 mV | ≈498 mV |
| Output 1 ms after the release | 1.995 V | 2.005 V |

The bench requires the output to settle within 2 % of 2 V after each step.
It also requires the dip with feed-forward to be no larger than the dip
without it.

**Part C** repeats the closed loop at 100 kHz per phase (FS = 1000) with a
10 A load. It settles at 2.000 V with about 60 mV peak-to-peak ripple. The
bench requires the mean to be within 2 % of 2 V.

At 100 kHz, Kvf must not exceed N/V_in in codes (1024·1000/4095 ≈ 250).
Above that value, the output-voltage feed-forward becomes a net positive
feedback. The voltage loop cannot pull it back, because v_com is clamped
at 0.

The bench counts each mechanism and fails if any of them never occurs:

* serial writes;
* each limiter;
* lead stage;
* feed-forward off;
* averaging;
* sawtooth;
* phase count;
* ADC triggers;
* load steps;
* the 100 kHz run.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/vrm_pkg.sv tb/tb_vrm_ctrl_top.sv --top-module tb_vrm_ctrl_top
./obj_dir/Vtb_vrm_ctrl_top
```

Part B's gains can be overridden with the plusargs `+KP=`, `+KI=`, `+KC=`,
`+KVF=` and `+DT=`. Part C's Kvf is set with `+KVFC=`.

## Limits and departures

* **The closed-loop run uses a 40 ns dead-time, not the default 0.4 µs.**
  With the scaling above, a purely proportional current loop can add only
  about 20 duty counts before the current error saturates. A 0.4 µs
  dead-time removes 80 counts from a 500-count triangle, so the loop cannot
  make up for it. In a real design, either:
  * add the dead-time to the Kvf feed-forward term; or
  * raise Kc together with a finer current scale.

  The dips above are larger than a well-tuned regulator would give. The
  gains were picked for stability, not tuned.
* **One reference per phase.** Each phase's comparator has its own
  reference, so every phase follows its own current loop; there is no single
  shared PWM command.
* **Lead stage schedule.** The lead stage takes five states instead of four,
  so that K scales only the numerator.
* **Extra registers.** The current-command limit (ILLMT) and the output-voltage
  feed-forward gain (KVF) have their own registers.
* **SET register.** Its layout, the serial frame and all reset values are
  choices of this design.
* **Carrier-type bit.** The bit is 0 for triangle in the register and the
  DPWM, while the sampler's own `syms` input is 1 for symmetric. The top
  inverts the bit between them.
* **Dead-time unit.** Dead-time is counted in system clocks. No separate
  clock divider is used.
* **Sawtooth wrap.** The sawtooth gap at the wrap is an addition of this
  design.
* **Not part of the RTL:** the ADCs, the power stage, and the host that
  writes the registers. The plant model exists only for simulation.
* **Clock speed not verified.** Timing closure at 200 MHz on an FPGA has not
  been checked.
