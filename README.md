# Digitally controlled modulo ADC: folding controller RTL

An ordinary ADC clips when the input leaves its range. A modulo ADC avoids this
by folding the input before it is quantised. An analog summing node adds a
feedback voltage `v_f = 2*lambda*C_f` to the input `g(t)`, and the integer fold
count `C_f` is chosen so that the result `y = g + v_f` stays inside the window
`[-lambda, +lambda]`. The ADC then only ever sees a small signal. Because `C_f`
is known, the large input can be rebuilt exactly as `g = y - 2*lambda*C_f`.
With `lambda = 100 mV`, inputs of about ±10 V (ρ = |g|max/λ ≈ 100) are
acquired through an ADC whose linear range is only a few hundred millivolts.

This repository holds the synthesizable FPGA half of such a converter: the
digital loop that decides `C_f` from a window comparator, drives the feedback
DAC, and rebuilds and records the high-dynamic-range signal. The analog half
(input buffer, adder, threshold generator, comparators, DAC with gain stage,
ADC) is represented by ports. A behavioural model of it in `tb/` closes the
loop in simulation.

Design point: controller and DAC run at 200 MHz. The sampling ADC is an 8-bit,
100 MS/s part. The loop DAC is 14 bits with one bit used for sign, which leaves
13 magnitude bits. λ = 100 mV corresponds to 25 ADC codes.

## The loop

```
 g(t) ─► buffer ─► (+) ──── y(t) ───────┬──────────────► ADC ── y^[k] ──┐
                    ▲                   │                               │
                    │ v_f          window comparator                    ▼
             gain stage            cmp_pos (y>+λ), cmp_neg (y<-λ)  direct_recovery ─► g~[k]
                    ▲                   │                               │      │
                 DAC ◄── dac_code ──┐   ▼                               │      ▼
                                    │ flag_sync ─► [B1 B0]              │ capture_buffer
                                    │                 │                 │
                              dac_code_gen ◄── C_f ── fold_fsm ◄── B2 ── settle_timer
 ───────── analog (outside RTL) ─────────┼──────────── modulo_adc_ctrl (RTL) ───────────
```

| module | role |
|---|---|
| `modulo_adc_ctrl` | top: wires the blocks below; all analog signals and settings are ports |
| `flag_sync` | two-flop synchroniser for each comparator output, giving `[B1 B0]` |
| `fold_fsm` | KEEP / INCREASE / DECREASE / WAIT state machine that owns `C_f` |
| `settle_timer` | programmable down-counter producing the settling flag `B2` |
| `dac_code_gen` | `C_f * 2^q` plus the calibration offset, clamped, offset-binary |
| `direct_recovery` | `g~[k] = y^[k] - 2λ·C_f[n_k - d]` |
| `capture_buffer` | 50,000-word single-shot record of `{y^[k], g~[k]}` |
| `modadc_pkg` | widths, the `flags_t` / `fold_state_t` / `cfg_t` types, `cf_limit()` |

## The folding state machine

The comparator outputs are encoded as `B1 = (y < -λ)` and `B0 = (y > +λ)`:

| state | action on `C_f` | leaves for |
|---|---|---|
| KEEP | hold | DECREASE on `[B1 B0] = 01`, INCREASE on `10`; `00` and `11` stay; `B2` ignored |
| INCREASE | `C_f + 1` at the end of this one-cycle state | WAIT |
| DECREASE | `C_f - 1` at the end of this one-cycle state | WAIT |
| WAIT | hold | KEEP when `B2 = 0`, else stay |

A positive over-range lowers `C_f`, because `y = g + 2λC_f`. INCREASE and
DECREASE also start the settling timer, and WAIT lasts until that timer runs
out. `C_f` therefore moves by at most one level per decision, which an
assertion in `fold_fsm` checks. To track correctly, the input must not change
by more than one folding step (2λ) between two decisions. In practice this
bounds the product of input bandwidth and amplitude. The tighter limit in this
RTL comes from the FSM's own pace. It makes at most one fold every
`wait_cycles + 3` clocks, so it can follow a slope of at most
2λ / ((wait_cycles + 3) · 5 ns). That is 5.7 V/µs at λ = 100 mV with
`wait_cycles = 4`, or a 9.2 V sine up to about 99 kHz. At λ = 360 mV another
limit comes first: the 8-bit ADC has only 150 mV of range above λ, and the
overshoot after a crossing clips it.

At `±C_f,max = floor(8191 / 2^q)` the FSM refuses a further fold. It stays in
KEEP, pulses `sat_o` and sets the sticky `sat_flag_o`, which `sat_clr_i`
clears.

### Why WAIT exists, and how long it must be

This is the part most easily misconfigured. Count the clocks from a decision
to the moment the comparator flags show its effect:

```
cycle t     KEEP sees over-range flags
cycle t+1   INCREASE/DECREASE; C_f register updates at the end
cycle t+2   dac_code_o register updates at the end        (WAIT begins)
cycle t+3   DAC latches the new word; y moves after this edge
t+4, t+5    new comparator levels pass the two synchroniser flops
cycle t+6   first flags that reflect the fold
```

WAIT lasts `wait_cycles + 1` clocks, so the FSM is back in KEEP at cycle
`t + 3 + wait_cycles`. If it gets there before `t + 6`, it sees stale flags and
folds a second time: the limit cycle (repeated back-and-forth folding) that
WAIT is there to prevent. Hence **`wait_cycles` ≥ 3** with this RTL, plus the
real analog settling time of the DAC and amplifiers. The closed-loop testbench
over-folds with 2 and works with 4, which is the value used throughout. Each
extra synchroniser stage adds one more cycle.

## Multi-bit update: the DAC word

Each fold moves the DAC by `2^q` codes. The analog gain after the DAC is
trimmed so that `G_total · 2^q · V_LSB = 2λ`, with `V_LSB = 1 V / 2^13`.
Choosing `q` trades folding depth against the analog gain needed:

| q | codes per fold | `C_f,max` | DAC step |
|---|---|---|---|
| 7 | 128 | 63 | 15.6 mV |
| 9 | 512 | 15 | 62.5 mV |
| 11 | 2048 | 3 | 250 mV |

To reach ρ, the design needs `C_f,max > ρ/2`. ρ ≈ 100 therefore needs `q ≤ 7`.
The word on `dac_code_o` is offset binary: 8192 is 0 V, and the signed value is
clamped to ±8191 (`dac_clamp_o`). It is registered and follows `C_f` by one
clock.

## Under-compensation calibration

In hardware, fold steps are never exactly 2λ. Loop latency and DAC mismatch
push the signal past the opposite threshold right after a fold, and the
mismatch grows with `|C_f|`, so deep folding tends to start the back-and-forth
limit cycle. The remedy is to make every fold deliberately a little *short*,
by an amount proportional to the depth:

```
offset = -sgn(ΔC_f) · |C_f(before the fold)| · dV
```

`ΔC_f = -1` for a crossing of `+λ` and `+1` for a crossing of `-λ`. The offset
is latched at each fold, held until the next one, and added to `C_f·2^q`. It is
applied only when `cfg.cal_en = 1`. `dV` is given in DAC LSBs with 4 fraction
bits. For λ = 100 mV and q = 7, one LSB is 1.5625 mV at the summing node, so a
10 mV offset is `dv = 102` (6.375 LSB).

This RTL chooses to *replace* the offset at each fold rather than accumulate
it. As a result the feedback never departs from `2λ·C_f` by more than
`|C_f|·dV`. The reconstruction ignores the offset, so with calibration on the
rebuilt signal carries that bounded residual.

The closed-loop test shows the effect with a simple mismatch model. Each fold
step overshoots in its own direction by 9.5 mV per unit of `|C_f|` before the
fold, and the error is held until the next fold. One period of a sine at
ρ = 22.2 needs 44 folds. Without calibration the loop makes 388: each fold
beyond depth 0 lands outside the window, and the count rattles between
neighbours. With `dv = 102` (about 10 mV per unit of depth) it makes exactly
44, and the rebuilt samples stay within 2 codes. This model is this design's
own stand-in: a real board's mismatch varies with time and polarity, so `dv`
has to be measured on the board, not computed.

## Reconstruction and the delay `d`

`direct_recovery` keeps the last 32 values of `C_f`, one per 200 MHz clock.
For each ADC sample it picks the value from `d` clocks before the sample
reaches it, and computes `g~ = y^ - two_lambda · C_f` in ADC codes. `d` must
equal the delay from a change of `C_f` to its effect on the sampled `y`. In
this RTL that delay is the DAC word register, the DAC latch and the ADC output
register, so `d = 3` when the ADC samples mid-cycle as in the model. A real
board adds the ADC's own pipeline latency. The ADC is treated as a sample
strobe (`adc_valid_i`, every other clock) in the 200 MHz domain. This is valid
because both clocks come from one PLL with a fixed phase.

`capture_buffer` records 50,000 consecutive `{y^ (8 bits), g~ (24 bits)}`
words after a pulse on `cap_arm_i`, raises `cap_done_o`, and is read through
`cap_rd_addr_i` / `cap_rd_data_o` with one clock of latency.

## Top-level interface (`modulo_adc_ctrl`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | 200 MHz clock; asynchronous active-low reset (`C_f = 0`, KEEP) |
| `cmp_pos_i`, `cmp_neg_i` | in | 1 | comparator outputs, asynchronous |
| `dac_code_o` | out | 14 | loop DAC word, offset binary |
| `adc_valid_i`, `adc_data_i` | in | 1, 8 | ADC sample strobe and two's-complement code |
| `cfg_i` | in | `cfg_t` | run-time settings, below |
| `sat_clr_i` | in | 1 | clear `sat_flag_o` |
| `cap_arm_i`, `cap_busy_o`, `cap_done_o` | | 1 | capture control |
| `cap_rd_addr_i`, `cap_rd_data_o` | | 16, 32 | capture read port |
| `cf_o`, `state_o`, `flags_o`, `b2_o` | out | 14, 2, 2, 1 | loop state for monitoring |
| `sat_o`, `sat_flag_o`, `dac_clamp_o` | out | 1 | limit events |
| `rec_valid_o`, `rec_o`, `folded_o`, `cf_used_o` | out | 1, 24, 8, 14 | reconstruction stream |

`cfg_t` fields: `q` (4 bits, 0–13), `cal_en`, `dv` (12 bits, Q8.4 DAC LSBs),
`wait_cycles` (8 bits), `delay_d` (5 bits), `two_lambda` (8 bits: 2λ in ADC
codes; 50 for λ = 100 mV, 180 for λ = 360 mV).

Parameters: `SYNC_STAGES` (2) and `CAP_DEPTH` (50,000). After coarse synthesis
the top comes to about 150 word-level cells and 590 flip-flop bits, plus the
1.6 Mbit capture memory.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/modadc_pkg.sv \
          tb/tb_modulo_adc_ctrl.sv --top-module tb_modulo_adc_ctrl -Mdir obj
./obj/Vtb_modulo_adc_ctrl
```

Replace the testbench name to run the others. Each takes about a second.

* `tb_modulo_adc_ctrl` runs the closed loop with `afe_model` at the top's
  default parameters, in eight phases from reset:
  * sines at ρ = 2.84 (100 kHz), 22.2 (10 kHz, q = 9) and 102 (1 kHz, with a
    full 50,000-sample capture read back);
  * saturation with q = 11;
  * calibration on;
  * a non-ideal front end: 4 ns comparator delay, 3.5 mV hysteresis,
    0.5 ns settling, and `wait_cycles = 6`;
  * `wait_cycles = 2`, where over-folding is expected;
  * the fold-mismatch case above, first uncalibrated, then calibrated.

  It checks every rebuilt sample to within one ADC code (1.5 codes with the
  non-ideal front end, 2 codes when calibrated), and that folded samples stay
  near the window. It also checks the fold depth each phase should reach. It
  counts, and requires at least once, each of: increase, decrease, WAIT held
  by B2, saturation, calibration, the q switch, capture, the mismatch limit
  cycle, and its removal by calibration.
* `tb_workloads` runs the same loop on periodic sinc, bandlimited, QAM, BPSK
  and FSK inputs (ρ from 3 to 30), and on a noisy sine at λ = 360 mV. It checks
  reconstruction to one code and the required fold depth. The waveform shapes
  are this testbench's own.
* `tb_bandwidth` drives 610 kHz triangles at λ = 360 mV to find where the loop
  stops following. Two limits of this RTL set that point. First, the FSM makes
  at most one fold every `wait_cycles + 3` clocks (35 ns), which caps the slope
  it can follow at 2λ/35 ns. Second, y keeps moving for about seven clocks
  after a crossing, and the 8-bit ADC has only 150 mV of range beyond λ.
  The testbench checks four amplitudes:
  * 0.38 V: a fold that lands after the peak is undone at once, and the
    reconstruction stays exact;
  * 1.2 V: the reconstruction is exact;
  * 4 V: the fold count still tracks, but the ADC clips;
  * 12 V: the loop under-folds.

  The last two cases expect the failure.
* `tb_flag_sync`, `tb_settle_timer`, `tb_fold_fsm`, `tb_dac_code_gen`,
  `tb_direct_recovery`, `tb_capture_buffer` compare each block with an
  independent model, using random stimulus plus directed cases.

`afe_model` is ideal by default: exact fold steps, no comparator hysteresis or
delay, no settling, and no mismatch. Its inputs `hyst_v`, `cmp_delay_ns`,
`settle_tau_ns` and `fold_mis_v` switch those effects on, and `gain_err` sets a
constant gain error. Only the non-ideal and mismatch phases of the closed-loop test use them.
These are first-order models with assumed values. They show how the loop
reacts to each effect, but they do not predict what a particular board will
do.

## Where this design makes its own choices

* **Synchroniser depth** (2 flops) and the **WAIT minimum** that follows from it.
* **`C_f` saturation** at `floor(8191/2^q)` with a sticky flag. Without it, the
  count would wrap the DAC word.
* **Moore-style update**: `C_f` changes when the FSM leaves INCREASE/DECREASE,
  not on entry. This costs one clock of latency.
* **`B2` polarity**: `B2 = 1` means "still settling" (hold WAIT), and `B2` is
  not looked at in KEEP.
* **Calibration applied in the DAC word** as a held, not accumulated, offset,
  with `dV` in fractional DAC LSBs.
* **DAC word format** offset binary; **ADC data** two's complement; a single
  clock domain with a sample strobe.
* **Capture memory** arm/done handshake, word layout and read port. How a host
  reads the record out is not designed here.
* **Run-time settings** are plain input ports. The register interface to the
  board's embedded controller is not part of this RTL.

Not in the RTL: the analog front end, the PLL that makes the 200 MHz and
phase-advanced 100 MHz clocks, the on-chip logic analyzer, and the offline
reconstruction algorithms used when no fold count is recorded.
