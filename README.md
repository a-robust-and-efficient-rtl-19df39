# Radiation-tolerant all-digital PLL (FDLC ADPLL), 20 MHz → 2.4 GHz

This is an all-digital phase-locked loop that synthesises a 2.4 GHz clock from a
20 MHz reference. It follows the RHBD-AL ADPLL architecture of V. Prasad and
S. Sandya, "A Robust and Efficient Fault-Resilient Rad Hard ADPLL". Nothing in
the loop is analog except the oscillator itself and two delay lines. The loop has
no feedback divider. The phase of the oscillator is *counted*: a counter of
oscillator edges gives the integer part, and a short time-to-digital converter
(TDC) gives the fraction. That phase is compared with an ideal phase that grows
by FCW = 120 every reference cycle. The difference, a number in oscillator
periods, drives a digital loop filter. The filter writes three banks of
oscillator tuning capacitors, from coarse to fine.

Three ideas make the loop robust, and the code is built around them:

* **Gear shifting over three tuning banks.** The oscillator (DCO) has a PVT bank
  (8 bits, 1.95 MHz per step), an acquisition bank ACQ (8 bits, 390.6 kHz) and a
  tracking bank TRK (6 bits, 31.25 kHz). The loop visits them in that order. Each
  step narrows the loop bandwidth, and each bank freezes when the next one takes
  over. Lock takes about half a microsecond, whatever the starting frequency
  error.
* **Phase prediction.** FCW is known, so the point inside an oscillator period
  where the next reference edge will fall is known too. A digital-to-time
  converter (DTC) delays the reference by exactly the amount that puts that edge
  at a fixed point of the oscillator period. The TDC then only has to measure the
  small remaining error.
* **Spike rejection.** In tracking, the phase error goes through four cascaded
  first-order IIR stages before the proportional-integral (PI) gains. A
  single-event transient that moves one reference edge by 1 ns (2.4 oscillator
  periods) then disturbs the frequency by about 1 MHz for less than a
  microsecond. It does not knock the loop out of lock.

## Block map

```
            +-----------+ fref_d  +--------------------------------------------------+
 fref ----->| dtc_model |-------->|                  adpll_core                      |
  20 MHz    +-----------+         |  ref_retimer ---- ckr (loop clock) -------------+ |
                 ^  dtc_code      |      | cap                                      | |
                 +----------------|  ckv_counter -- cnt_cap --+                     | |
                                  |                           v                     | |
            +----------------+    |  tdc_encoder -- eps --> phase_detector -> pe ---+ |
  ckv ----->| tdc_delay_line |--->|  (taps)                   ^      |              | |
     |      +----------------+    |  ref_phase_acc -- phase_r-+      v              | |
     |                            |  phase_predictor (dtc_code)   mode_ctrl  dlf <--+ |
     |                            +------------------------------------|------|------+
     |      +-----------+  otw_p / otw_a / otw_t  <--------------------+------+
     +------| dco_model |<---------------------------------------------------------
            +-----------+
```

`adpll_top` is the closed loop. It holds the synthesizable `adpll_core` and
behavioural models of the three analog parts: `dtc_model`, `tdc_delay_line` and
`dco_model`. `adpll_core` can be synthesised on its own. Its ports are the exact
interface to the analog parts.

| Module | Role |
|---|---|
| `adpll_pkg` | widths, fixed-point formats, `mode_t` (PVT/ACQ/TRK), defaults |
| `ref_phase_acc` | ideal phase: adds FCW once per reference cycle; phase restart |
| `phase_predictor` | DTC code for the next reference edge |
| `ref_retimer` | samples the delayed reference with the DCO clock: loop clock `ckr` and a capture strobe |
| `ckv_counter` | counts DCO edges; captures the count at each reference edge |
| `tdc_encoder` | delay-line samples → fraction of a DCO period (1/32 UI) |
| `phase_detector` | phase error, full (integer + fraction) and fine (fraction only) |
| `mode_ctrl` | PVT → ACQ → TRK sequencing |
| `dlf` | combiner, per-mode zero, `iir_filter4`, `pi_controller`, `dco_gain_norm`, bank registers |
| `iir_filter4`, `iir_stage` | four first-order low-pass stages |
| `pi_controller` | proportional gain per mode; integral path in tracking |
| `dco_gain_norm` | UI per reference cycle → bank codes; rounding, saturation |
| `dtc_model`, `tdc_delay_line`, `dco_model` | behavioural models of the analog parts |

## Phase arithmetic

This is the part that takes the most care to follow. All phases are in UI, where
one UI is one DCO period (416.7 ps at 2.4 GHz). They carry 5 fractional bits, so
one LSB is 1/32 UI, or 13 ps. That is also the TDC resolution.

* **Reference phase.** `phase_r` is a 16.5-bit accumulator. It grows by FCW (Q8.5,
  so 120 is `120 << 5`) on every `ckr` edge and wraps modulo 2^16 UI. Only its
  difference to the DCO phase is used.
* **DCO phase.** `cnt_cap` (16 bits) is the DCO edge count, captured one DCO
  period after the delayed reference edge. `eps` is the time from the most recent
  DCO rising edge to the delayed reference edge, in 1/32 UI.
* **Delay prediction.** Let f be the fraction of the next reference phase. The
  DTC then delays the reference by `dtc_code = (0.5 − f) mod 1` UI. Once locked,
  every delayed edge lands half a DCO period after a DCO rising edge. There it
  never races a DCO edge, neither in the retimer flops nor in the TDC. The delay
  is digital and known, so it is added back to the reference side of the
  comparison.
* **Phase error.**

  `PE = (phase_r + dtc_code) − (cnt_cap + eps)`

  The unit is UI. A positive PE means the DCO lags and must speed up. The full
  error `pe_full` is this difference as a signed Q10.5 number. The fine error
  `pe_fine` keeps only the fraction, read as a signed 5-bit value in the range
  [−0.5, 0.5) UI.
* **Constant offsets do not matter.** The captured count is one edge "late", and
  the DTC target is half a UI. Both give constant offsets. So does the phase
  restart: on the first `ckr` edge after reset, the accumulator is loaded from
  the captured count plus FCW, which leaves PE near zero. The loop filter also
  takes the error at the start of each mode as that mode's zero (see below).
* **Turning off the integer part.** In tracking, the integer operands of the
  detector are forced to zero (operand isolation), and `pe_full` equals
  `pe_fine`. This keeps the integer part from switching while locked. The
  tracking loop then sees only the fraction. A phase step larger than half a UI
  wraps. That is how a 1 ns transient (2.4 UI) reaches the filter as a 0.4 UI
  kick.

## Gear shifting (`mode_ctrl`, `dlf`)

The loop filter output is a frequency correction in UI per reference cycle. One
UI per cycle is 20 MHz. `dco_gain_norm` turns it into codes of the active bank,
multiplying by f_R/K_bank. K_bank is the bank's frequency range divided by
2^bits:

| Bank | Range | Bits | Step K | f_R/K | Loop in this mode |
|---|---|---|---|---|---|
| PVT | 2.15–2.65 GHz | 8 | 1.953 MHz | 10.24 | type I, α = 1.0, full error |
| ACQ | ±50 MHz | 8 | 390.6 kHz | 51.2 | type I, α = 0.75, full error |
| TRK | ±1 MHz | 6 | 31.25 kHz | 640 | type II, IIR + α = 0.6283, ρ = 0.0986, fine error |

A run-time input `norm` (Q2.16, 65536 = 1.0) scales the normalisation. The code
is rounded to the nearest step and saturated to the bank's signed range. Bank
codes are two's complement around the 2.4 GHz centre.

On the first cycle of a mode (`mode_entry`), the DLF stores the current error as
the zero point of that mode. The new bank therefore starts at code 0, and the
bank just left keeps its last code. A gear shift thus leaves the frequency where
it was. The new bank only removes what the coarser bank could not resolve.

`mode_ctrl` watches d = PE[t] − PE[t−1], the residual frequency error in UI per
cycle. It leaves a mode when both of these hold:

* the mode has lasted at least 2 cycles;
* |d| ≤ `THR` (4/32 UI in PVT, about 2.5 MHz; 1/32 UI in ACQ, about 0.6 MHz) on
  two cycles in a row.

It also leaves a mode after 16 cycles in any case. TRK is final until reset. With
a DCO that starts 137 MHz off, PVT takes about 4 reference cycles, ACQ about 4,
and the frequency is within 250 kHz after about 0.54 µs.

## Tracking filter (`iir_filter4`, `pi_controller`)

Each IIR stage computes `q[t] = q[t−1] + φ·(p[t] − q[t−1])`, with φ = 0.75 for
all four stages. The output is combinational from the input and the stored
state, so the filter adds no clock of latency. Outside tracking the filter is
bypassed and its state held at zero. The PI controller computes
`y = α·u + ρ·Σu`. The sum includes the current sample and is kept only in
tracking. All loop-filter arithmetic is signed Q16.16, and the gains are Q16
integers.

A one-cycle unit impulse comes out of the cascade with a peak of 0.32. The
impulse response is 0.316, 0.316, 0.198, … .

## Clocks and timing

* `ckv`, the DCO clock at 2.4 GHz, drives the three retimer flops and the edge
  counter.
* `ckr` is the delayed reference sampled three times by `ckv`. It has the
  reference's period and duty cycle and comes 2–3 DCO periods after the delayed
  reference edge. All other registers use it.
* The captured count changes one DCO period before the `ckr` edge that reads it.
  The TDC taps change at the delayed reference edge, at least two DCO periods
  before that `ckr` edge.
* The phase detector, IIR, PI and normalisation are combinational between `ckr`
  edges. The bank codes change once per reference cycle, at the `ckr` edge that
  follows the measured reference edge.
* The DTC code for the next edge is registered at that same `ckr` edge, about
  50 ns before it is needed.
* Reset (`rst_n`, active low) is asynchronous. All registers reset to zero, the
  bank codes to the centre, and the DTC code to half a UI. The first `ckr` edge
  after reset only restarts the reference phase. The mode controller and loop
  filter start on the second edge (`started`).

## Analog parts as behavioural models

These files use delays and `real` arithmetic. They are for simulation only.

* `dco_model`: f = 2.4 GHz + `F_OFF_HZ` + p·1.953125 MHz + a·390.625 kHz +
  t·31.25 kHz. Edge times are accumulated in `real`, so time-precision rounding
  does not become a frequency error. The 22-bit `bias` input only gates
  oscillation: zero means stopped. Phase noise and jitter are not modelled.
* `dtc_model`: an ideal delay of code · T_nom/32, with T_nom = 1/2.4 GHz.
* `tdc_delay_line`: `taps[j]` is the DCO level at t_ref − j·13.02 ps, for 48 taps
  (1.5 nominal periods). `tdc_encoder` finds the first 1→0 step going back in
  time. It normalises to the nominal 32 taps per period, not to a measured
  period.

## Where this RTL departs from the source, or fills gaps

* **TDC resolution.** The source quotes 10–20 ps for the fine TDC, and elsewhere
  a "TDC resolution" of 416 ps, which is one DCO period. Here the counter
  resolves whole periods and the TDC 13 ps.
* **Error combiner.** The source describes the combiner both as an adder of the
  integer and fractional parts, and as a multiplexer that selects the integer
  error during acquisition and the fractional error once locked. Here the adder
  forms the error used in PVT and ACQ, and the multiplexer switches to the
  fraction alone in TRK. An integer-only error cannot steer the ACQ bank finer
  than about 12 MHz.
* **Filter order.** The source puts the IIR before the PI controller in one
  place, and applies the normalisation "on the IIR output" in another. The order
  here is IIR → PI → normalisation.
* **Two operating modes.** The source speaks of a frequency-acquisition mode and
  a phase-acquisition mode. Here PVT and ACQ together are frequency acquisition
  (full error, proportional only), and TRK is phase acquisition and tracking
  (fine error, IIR and PI).
* **Tuning-word examples.** The source lists example bank codes for a range of
  frequency differences. Only its PVT column follows a simple rule (about two
  codes per sample step, in two's complement). The codes here are whatever the
  loop filter produces, in two's complement, and are not matched to that list.
* **Values the source does not give.** φ1–φ4 = 0.75, α = 1.0 (PVT), α = 0.75
  (ACQ), the switching thresholds, the 16-cycle time-out, all widths and Q
  formats, the half-UI DTC target, the phase restart and the per-mode zero
  capture are all choices made here. The source gives α = 0.6283 and ρ = 0.0986
  for the settled loop, FCW = 120, the 20 MHz reference, and the bank widths and
  steps.
* **Single-event transients.** These are modelled two ways: as one reference
  edge arriving 1 ns late, and as a spurious 1 ns pulse added to the reference
  (one extra reference edge).
* **Not built.** The source's jitter-estimation block is part of its simulation
  environment, not of the circuit, and is not built. The testbenches measure
  frequency from DCO time stamps instead. The jitter and phase-noise figures of
  the source cannot be reproduced with noise-free models.

## Measured behaviour (simulation)

| Case | Result |
|---|---|
| FCW 120, DCO 137 MHz fast | in TRK and within 250 kHz after 0.54 µs; 2400 edges per 20 reference cycles; residual wander < 140 kHz |
| 1 ns late reference edge while locked | peak frequency excursion 1.1 MHz; back within 250 kHz and ±2/32 UI after 0.91 µs |
| 1 ns spurious pulse on the reference while locked | exactly one extra loop clock edge; peak excursion 1.09 MHz; recovered after 0.99 µs |
| FCW 108 and 132 (2.16 / 2.64 GHz, lock-range ends) | both lock; within 80 kHz of target; FCW×20 ±1 edges per 20 cycles |
| 15 MHz reference, FCW 160, `norm` = 0.75; 25 MHz, FCW 96, `norm` = 1.25 | both lock at 2400.000 MHz |
| FCW 120 + 17/32, DCO 180 MHz slow, `norm` = 0.875 | locks to 2410.625 MHz; 3857 edges per 32 cycles; DTC code changes every cycle |
| Default top, FCW 125 | tracking after 0.53 µs at 2500.000 MHz |

The source reports 0.6 µs settling, and 1.2 µs with a 1 ns transient.

## Simulating

Every testbench in `tb/` checks itself. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. The package must be compiled
first. For example:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/adpll_pkg.sv $(ls rtl/*.sv | grep -v adpll_pkg) \
    tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

* `tb_adpll_top` is the end-to-end test. It uses two loops with different DCO
  offsets, FCW values and gain normalisation, plus the transient. It also counts
  the mechanisms it exercised: phase restart, both gear shifts, integer part off,
  IIR active, integral active, DTC codes changing, and recovery.
* `tb_adpll_full` runs the top at its default parameters and synthesises 2.5 GHz.
* `tb_adpll_workloads` runs the default top at the two ends of the lock range
  and of the reference range, with a reset between cases.
* Each block has its own `tb_<module>.sv`.

A whole loop simulates a few microseconds in well under a second.

## Changing it

* **Output frequency.** Set `fcw`. It is Q8.5, so fractional ratios work, and
  the DTC prediction handles the fractional phase.
* **Another reference frequency.** Either set `norm` to f_ref / 20 MHz at run
  time, or change `F_REF_HZ` in `dco_gain_norm`. Change the DCO step parameters
  if the oscillator changes.
* **Loop dynamics.** The gains are `pi_controller` parameters (Q16). The IIR
  coefficients are `iir_filter4` parameters (Q16). The switching rule is set by
  the `mode_ctrl` parameters.
* **TDC resolution.** The fraction width is `FRAC_W` in `adpll_pkg`. The TDC
  normalisation assumes 2^`FRAC_W` taps per DCO period, so `TDC_PER_UI` and the
  delay-line tap spacing must change with it.
