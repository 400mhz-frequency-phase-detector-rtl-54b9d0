# Frequency/phase detector and counter for an RF control system

This is the FPGA logic of a small board in the low-level RF (LLRF) control of
a superconducting accelerator cavity. The cavity runs in a self-excited loop.
To bring that loop onto the machine's reference frequency and hold it there, the
control system needs three measurements:

* **Tuning phase error**: the phase between the cavity drive and the cavity
  pickup. It tells the tuner how far the cavity is from resonance.
* **Loop phase/frequency error**: the phase between the loop signal and the
  reference. Far from lock, this output must show which way the frequency is
  off, so that the phase loop can pull itself in.
* **Frequency error**: the loop and reference frequencies, measured to about
  1 Hz. Software reads them during start-up, before the phase loop is closed.
  The phase loop is closed once the two are within 10 Hz.

All three work directly on the RF signals. Comparators on the board turn each
RF input into a square wave, and the FPGA sees those edges. The phase detectors
are clocked by the RF edges themselves. That is why they reach hundreds of MHz:
the target is a 400 MHz bandwidth for the loop detector and about 200 MHz for
the tuning detector. The frequency counters use the equal-precision
(reciprocal) method. Their resolution depends on the gate time, not on the
input frequency.

```
 rf_in[3] drive  ──┐
 rf_in[2] pickup ──┴─► tuning_pd ──up/dn──┬──────────────► pd_out[1:0]  (to filters)
                                           └─► phase_err_meter ─► tune_phase_err (16 b)
 rf_in[0] reference ┬─► loop_fpd ──pd_out─┬──────────────► pd_out[3:2]  (to filters)
 rf_in[1] loop ─────┤                     └─► phase_err_meter ─► loop_phase_err (16 b)
                    └─► freq_discriminator ─► f_ref_hz, f_loop_hz, f_err_hz
                          ├ freq_counter (reference) ─► freq_calc
                          └ freq_counter (loop)      ─► freq_calc
 clk_tb (100 MHz time base) ─► counters, dividers, meters
```

The four `pd_out` bits are intended for external op-amp low-pass filters,
which turn them into analog phase errors. The frequency and digital phase
results are plain ports, meant for a soft processor that serves the host
computer. Neither the processor, its memories nor the filters are part of this
RTL.

## The loop frequency/phase detector (`loop_fpd`)

A phase loop that starts far from the reference frequency needs a detector
whose average output says which way to go. A plain phase detector's average is
zero while the two signals slip past each other. This detector behaves as a
phase detector near lock and as a frequency discriminator away from it. Away
from lock, its output is held high or held low.

It keeps one number, `d` = (reference edges − loop edges), limited to the
range −1 … 2:

| state `d` | `pd_out` | meaning |
|-----------|----------|---------|
| −1 (`sat_lo`) | 0 | loop at least a full cycle ahead: hold low |
| 0 | 0 | loop edge came last |
| 1 | 1 | reference edge came last, waiting for the loop edge |
| 2 (`sat_hi`) | 1 | reference at least a full cycle ahead: hold high |

A reference edge moves `d` up and a loop edge moves it down. A reference edge
in state 2 is ignored, and so is a loop edge in state −1.

* **Locked, same frequency.** `d` alternates 0 ↔ 1. The reference edge sets
  the output and the loop edge clears it. The duty cycle is then φ/2π, where φ
  is how far the reference is ahead of the loop. The linear range is 0 … 2π,
  and lock sits at mid-range.
* **Loop slower.** The reference gains edges, so `d` reaches 2 and from then
  on alternates 1 ↔ 2. The output stays high, which pushes the loop frequency
  up.
* **Loop faster.** `d` alternates −1 ↔ 0. The output stays low.

The held states are memory, not just saturation. Suppose a pull has ended and
the frequencies are equal again. The detector stays held until the loop has
made up the missing cycle. This is what makes the average output one-signed
during pull-in.

There is one side effect that a user should know about. After an abrupt phase
jump, the detector can sit in a held state at equal frequency. It leaves that
state only after a small frequency offset in the right direction, and a PLL
driven by this output produces that offset by itself. The testbenches re-centre
the detector with single edges when they jump the phase on purpose.

In hardware, each input clocks a 2-bit Gray counter of its own edges, and `d`
is the difference of the two counters. A Gray counter changes only one bit per
edge, so the state decode never sees two bits change at once. Each counter
reads the other counter across clock domains. If two edges arrive almost
together, the result is a race, as in any edge-triggered phase detector.

## The tuning phase detector (`tuning_pd`, `reset_delay`)

This is a standard two-flip-flop phase-frequency detector, also called a
type-4 detector:

1. The drive edge sets `up` and the pickup edge sets `dn`.
2. When both are set, their AND goes through a short delay and clears both.

The mean of (`up` − `dn`) is φ/2π, and the curve is symmetric through zero.
The delay in the clear path keeps both outputs pulsing for at least the delay
(300 ps by default), even at φ = 0. That removes the dead zone around the
tuned point, where a detector whose pulses shrink to nothing loses gain.

The delay is a physical element: a chain of logic cells or a routed net that
the FPGA tools must keep. It cannot be expressed as synthesizable logic, so
`reset_delay` is a behavioural model with a `#` delay. For synthesis, replace
it with the target's keep-buffer chain. The loop through the flip-flops, the
AND gate and the delay back to the clears is intended, and lint tools report
it as a combinational loop.

The tuning detector's range is specified as −π … π with gain 1/π. The
digital tuning phase error applies that scaling, so that ±π reads full scale.

## Equal-precision frequency counting (`freq_counter`, `freq_calc`, `freq_discriminator`)

A direct counter counts input edges in a fixed gate, so its error is ±1 input
cycle. At a fixed gate time, that error is worse for low input frequencies.
The equal-precision method runs two counters over the same gate:

* **Ns** counts the 100 MHz time base.
* **Nx** counts the input.

The gate is opened and closed on input edges, so Nx is exact. Then
fx = Nx · fs / Ns, and only Ns can be wrong, by at most one count. The
relative error is therefore below 1/Ns = 1/(fs·T), whatever the input
frequency.

How one measurement runs:

1. `start` opens a preset gate of `GATE_CYCLES` time-base cycles.
2. The preset gate is re-timed into the input's domain (two synchroniser
   flip-flops, then the gate flip-flop clocked by the input). This gives the
   actual gate, which enables Nx.
3. The actual gate is synchronised back into the time-base domain (two more
   flip-flops) and enables Ns. These stages delay the opening and the closing
   of the gate by the same amount, so they cancel.
4. When the gate has closed in both domains, Nx is static. It is copied across
   and `done` pulses.
5. If no input edge opens the gate within two gate times, the round ends with
   `no_signal`.

`freq_calc` evaluates fx with a restoring divider: 64-bit dividend, 32-bit
divisor, one quotient bit per clock. `done` comes 66 cycles after `start`. The
result is in whole Hz, truncated.

`freq_discriminator` starts both counters on the same cycle. It waits for
both, divides both, and publishes `f_ref_hz`, `f_loop_hz` and
`f_err_hz = f_ref_hz − f_loop_hz`. While `enable` is high it repeats
immediately.

With the default 1 s gate and 100 MHz time base, Ns ≈ 10⁸. That gives about
1 Hz per 100 MHz of input, plus up to 1 Hz from truncation. A 1 Hz difference
between two inputs near 1–120 MHz therefore reads 0, 1 or 2 Hz.

## Digital phase error (`phase_err_meter`)

This block produces a 16-bit digital phase error. It samples `up` and `dn`
with the 100 MHz clock through two synchroniser flip-flops and sums
(`up` − `dn`) over 2¹⁵ samples. The sum is scaled by `2**SHIFT` and saturated
to a signed 16-bit word, and a new value comes every 327.68 µs. The two
instances give:

* **Tuning** (`SHIFT = 1`): `tune_phase_err` = φ/π · 32768, range ±π.
* **Loop** (`dn` tied low): `loop_phase_err` = φ/2π · 32768, range 0 … 2π.
  When the detector is held, it reads 32767 or 0.

The reading is a duty-cycle estimate, so it needs the RF not to be locked to
the sampling clock. For example, a 200.000 MHz input against a 100.000 MHz
clock samples the same point of every period. A slight offset, as any real
pair of oscillators has, spreads the samples.

## Top level (`fpd_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_tb` | in | 1 | time base and sampling clock, 100 MHz by default |
| `rst_n` | in | 1 | asynchronous reset, active low, for every block |
| `rf_in` | in | 4 | [0] reference, [1] loop, [2] cavity pickup, [3] cavity drive |
| `freq_enable` | in | 1 | run frequency rounds back to back |
| `pd_out` | out | 4 | to the filters: {~loop, loop, tune_dn, tune_up} |
| `loop_sat_hi`, `loop_sat_lo` | out | 1 | loop detector held high / low |
| `tune_phase_valid`, `tune_phase_err` | out | 1, 16 | tuning phase error, φ/π · 32768 |
| `loop_phase_valid`, `loop_phase_err` | out | 1, 16 | loop phase error, φ/2π · 32768 |
| `freq_valid`, `freq_no_signal` | out | 1 | new round; an input was missing |
| `f_ref_hz`, `f_loop_hz` | out | 32 | frequencies in Hz |
| `f_err_hz` | out | 33 | signed `f_ref_hz − f_loop_hz` |

| parameter | default | meaning |
|-----------|---------|---------|
| `FS_HZ` | 100 000 000 | time-base frequency used in fx = Nx·fs/Ns |
| `GATE_CYCLES` | 100 000 000 | preset gate in time-base cycles (1 s) |
| `RST_DELAY_PS` | 300 | tuning detector reset delay |
| `WIN_LOG2` | 15 | phase-error averaging window, 2^WIN_LOG2 samples |

Clock domains: `clk_tb`, plus one domain per RF input. The RF-clocked flops are
the two detectors, and the input side of each frequency counter. A real
implementation needs timing constraints for those RF clocks. It also needs
matched routing from the pins to the detector flip-flops, since any skew there
is a phase offset.

## What comes from the published design and what is chosen here

These parts follow the published design:

* the split into a tuning detector, a loop frequency/phase detector and two
  equal-precision frequency counters feeding a frequency-error result;
* the type-4 tuning detector with a delay in its clear path, and its −π … π
  range with gain 1/π;
* a loop detector that holds its output high or low away from lock;
* the two-counter, input-synchronised gate and Eq. fx = Nx·fs/Ns;
* a 1 Hz resolution target and a 16-bit digital phase error.

These parts are this design's own choices:

* the loop detector's internal state machine, since its circuit is not given;
* the 100 MHz time base and 1 s gate, chosen to reach 1 Hz;
* 32-bit counters and the synchroniser depths;
* doing the division in logic rather than in software;
* the averaging method behind the digital phase error, and producing it for
  both detectors;
* the mapping of the inputs and the fourth filter output (inverted loop
  output);
* the reset scheme, the handshakes and the 300 ps delay.

The published design has a NiosII processor with SDRAM and serial flash, a
host bus interface, comparators with LVPECL-to-LVDS translators, and op-amp
filters. None of these is modelled here. The top level stops at the ports
where they would connect.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -Irtl rtl/fpd_pkg.sv tb/tb_fpd_top.sv --top-module tb_fpd_top
./obj_dir/Vtb_fpd_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_reset_delay` | the delay model's edges arrive after exactly the set delay |
| `tb_tuning_pd` | pulse widths \|Δt\|+D and D at 200 MHz; mean(up−dn) = Δt/T from −0.36T to +0.36T; no dead zone at 0 |
| `tb_loop_fpd` | cycle-by-cycle match with an edge-count model at 400 MHz; duty = φ/2π; held high for a slower loop, held low for a faster one, recovery into phase detection |
| `tb_freq_counter` | \|Ns·Ts − Nx·Tx\| ≤ Ts from 1 MHz to 400 MHz; gate length; `done` timing; missing input |
| `tb_freq_calc` | divider against 64-bit arithmetic; 66-cycle latency; divide-by-zero and overflow |
| `tb_freq_discriminator` | both frequencies within f/Ns + 1 Hz; exact error; round spacing; lost and recovered input |
| `tb_phase_err_meter` | reading = (duty_up − duty_dn)·32768 within 0.5 %; saturation; window spacing |
| `tb_fpd_top` | the whole board with a 200 µs gate: both detectors in lead, lag, held-high and held-low situations, frequency rounds, lost input |
| `tb_fpd_full` | the whole board at full size (1 s gate): 1 MHz reference and a loop 1 Hz lower give a 1 Hz error; both 16-bit phase errors |
| `tb_fpd_bench` | full size, bench-test conditions: both detectors' 16-bit readings at 5, 50, 200 and 220 MHz, the loop detector also at 400 MHz; two 10 MHz inputs 1 Hz apart read a 1 Hz error |

`tb_fpd_full` and `tb_fpd_bench` each simulate a little over one second of
board time and take about two minutes each. The others take seconds.

Simulation is two-state. All state is reset, and the RF-clocked detectors need
an actual `rst` edge to leave their power-up state.
