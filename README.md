# FSK detector built from two digital phase-lock loops

A binary frequency-shift-keyed (FSK) signal sends a 1 as one carrier frequency and a 0 as another. The
best receiver for it is the coherent correlation detector. It multiplies the input by an exact local
copy of each carrier, integrates each product over the bit, and picks the larger result. Its weak
point is that copy. The local carriers must match the received ones in frequency and phase. If the
received frequencies move, for example by a Doppler shift, the detector stops working.

This design replaces each correlator with a phase-lock loop. A loop tuned to one carrier makes its
own reference: while its carrier is present, it locks onto it and tracks it. The loop's phase
comparator multiplies the input by that reference, so its output carries the correlation. Each
branch is low-pass filtered, and the two filtered levels are compared at the end of every bit.

The loops are all-digital first-order loops. Each has an exclusive-or gate, a two-way clock
selector and a binary counter, and nothing analogue. The whole detector is therefore a small piece
of synchronous logic that needs only:

- the signal, limited to two levels;
- a timing signal that marks the bit boundaries.

Default configuration:

| Branch | Carrier | Lock range | Counter |
|---|---|---|---|
| Mark, binary 1 | 1220 Hz | 745–1270 Hz | eight-stage |
| Space, binary 0 | 1490 Hz | 1000–1560 Hz | eight-stage |

The bit rate is 120 baud, and all logic runs from one 10 MHz system clock.

## The first-order digital phase-lock loop

The loop (`dpll_first_order`) is the core of the design and the part that takes the most thought.
It has four parts:

| Part | Module | What it does |
|---|---|---|
| Phase comparator | `phase_comparator` | An exclusive-or of the two-level input and the loop's feedback square wave. Its output is called *gating*. |
| Loop clocks | `clock_tick_gen` | Two fixed clocks: a fast one, f1, and a slow one, g1. |
| Transmission gate | `transmission_gate` | Passes f1 pulses to the counter while gating is 1, and g1 pulses while it is 0. |
| Counter | `binary_counter` | An N-stage binary counter. Its most significant bit is the feedback square wave. |

The feedback toggles every M = 2^(N-1) counted pulses. With N = 8, M = 128.

**How it locks.** The loop is a voltage-controlled oscillator without the voltage. The counter's
output frequency depends on how long it counts fast clocks and how long it counts slow ones. That in
turn depends on how long input and feedback disagree. If the feedback lags, the disagreement lasts
longer, the counter spends more time on f1, and the feedback speeds up. If it leads, the reverse
happens.

**Lock range and static line.** In lock, the feedback has the input's frequency f. Each half cycle,
1/(2f) long, must hold exactly M counted pulses. Let v be the fraction of the time gating is 1.
Then M = (v·f1 + (1−v)·g1)/(2f), which gives

    v = (2·M·f − g1) / (f1 − g1)

This is the loop's static characteristic. The mean of the gating waveform is a straight line in
the input frequency. The phase difference between input and feedback is v·180°.

Lock needs 0 ≤ v ≤ 1, so the lock range runs from g1/(2M) to f1/(2M). To build a loop for a given
range [f_lo, f_hi], set g1 = 2·M·f_lo and f1 = 2·M·f_hi. The package `fsk_pkg` does this for both
branches:

| Branch | g1 | f1 |
|---|---|---|
| Mark | 2·128·745 = 190,720 Hz | 2·128·1270 = 325,120 Hz |
| Space | 2·128·1000 = 256,000 Hz | 2·128·1560 = 399,360 Hz |

**Other properties:**

- **Free running.** With no input, gating equals the feedback. The loop then runs at
  f1·g1/(M·(f1+g1)). That is 939 Hz for the mark loop and 1219 Hz for the space loop.
- **Time constant.** After a frequency step from f_a to f_b, the mean gating settles exponentially
  to the new static value. Its distance from that value starts at 2M(f_b−f_a)/(f1−g1), and the
  time constant is 1/(2·f_b·ln(f1/g1)). That is about 0.77 ms for either detector loop at its own
  carrier. The stand-alone loop test checks this transient period by period, to within 0.08.
- **Measured lock-in.** A stand-alone loop was built with f1 = 363.5 kHz and g1 = 262.5 kHz, giving
  a lock range of 1025–1420 Hz. Its input was switched every 1/120 s between 1100 and 1350 Hz. It
  re-locks in about 2.9 ms, against an estimate of about 1/360 s for the original hardware. When the
  other frequency is out of range (1600 Hz), the counter starts each in-range interval at an
  arbitrary phase. Sometimes the loop first slips a cycle: 5 of 8 such re-locks finished within the
  interval, taking 3.3 ms on average.
- **Out-of-range input.** The feedback runs at a different frequency. The gating waveform becomes a
  beat note whose mean is not on the static line. Its frequency is the difference between the input
  and feedback frequencies: at 950 Hz, 100 input cycles against 122 feedback cycles give 22 swings
  of the gating average.

**A detail that matters when checking numbers.** The loop clocks free-run against the input, so
the first pulse after each switch of the gate lands at a random phase. On average a half cycle
therefore ends about half a pulse early. The measured mean gating sits about 0.01 below the static
line: 0.895 instead of 0.905 at 1220 Hz in the mark loop. How far below depends on how the clock
phases fall, anywhere from none to one whole pulse. One pulse is 2f/(f1 − g1) in gating terms,
about 0.025 at 1250 Hz in the stand-alone loop. The testbenches allow 0.02 at the detector's
frequencies. The stand-alone loop test expects the line minus up to one pulse, with 0.01 of margin either way.

## Two loops as a detector

The detector (`fsk_pll_detector`) has this data path:

    rx_sample ─ limiter ─┬─ mark loop  ─ low-pass ─ u_mark  ─┐
                         └─ space loop ─ low-pass ─ u_space ─┴─ compare at end of bit ─ hold ─ bit_out
    bit_timing ─ sampling-pulse generator ─────────────────────┘
    src_bit, bit_out ─ error counter ─ errors, bits

Each carrier sits in the **upper part** of its own loop's range, where the mean gating is high:

| Carrier sent | Mark loop | Space loop |
|---|---|---|
| 1220 Hz | Locked at 0.905 | Also inside its range; locked low at 0.39 |
| 1490 Hz | Out of lock; gating averages about 0.55 | Locked at 0.875 |

The detector does not depend on the other loop losing lock. It depends only on the loop whose
carrier is present giving the clearly higher level. The lock ranges overlap, and that is allowed as long as they do not coincide.
Keeping each carrier near the top of its range also gives a large level. Going closer to the top
would leave no margin for noise-induced phase jitter before the loop slips.

Other settings work the same way. Three detectors with other clocks and carriers have been
checked side by side, noise-free, and each decided every bit correctly:

- ranges of 900–1300 and 1150–1600 Hz with carriers at 1250 and 1550 Hz;
- ranges of 800–1100 and 1200–1700 Hz, which do not overlap at all, with carriers at 1050 and 1600 Hz;
- the default ranges with seven-stage counters.

The remaining blocks:

- **Limiter** (`limiter`). Outputs 1 when the signed input sample is above zero. The loops need a
  two-level signal.
- **Low-pass filters** (`lowpass_filter`). One first-order recursive filter per branch, with a
  time constant of 2^14 clocks, 1.64 ms. The output is 16 bits, with full scale meaning a gating
  mean of 1. The filters are never cleared. At the end of a bit, each level mostly reflects the
  last few milliseconds, after the new loop has locked.
- **Sampling-pulse generator** (`sample_pulse_gen`). `bit_timing` must change level at every bit
  boundary, for example a square wave at half the bit rate. It is synchronized and
  edge-detected into a one-clock strobe at the end of each bit.
- **Comparator and hold** (`decision_hold`). At the strobe, bit_out becomes 1 if u_mark > u_space
  and 0 otherwise, so a tie decides 0. The bit is held until the next strobe, and `bit_valid`
  pulses once per decision.
- **Error counter** (`error_counter`). Part of the test arrangement rather than of the receiver. It
  latches the transmitted bit (`src_bit`) at each strobe and compares it with the next decision.
  A mismatch gives an `error_pulse` and increments `errors`. `bits` counts decisions, and both
  32-bit counters saturate.

## The general n-th order loop

The first-order loop is the simplest case of a more general structure (`dpll_nth_order`). The
counter is replaced by ORDER count registers. Register i has its own clock pair, f_i and g_i,
steered by the same gating signal. When the last register reaches M:

- every count moves one register on;
- register 1 starts a new count from zero;
- a flip-flop toggles the feedback.

A count thus collects pulses over ORDER half cycles before it can end one, and a new count starts
every half cycle. The length of each half cycle therefore depends on the gating of several past
half cycles. The loop follows an ORDER-th order difference equation in the gating intervals τ(k):

    f_n·τ(k+n) + … + f_2·τ(k+2) + f_1·τ(k+1) − g_1·τ(k) = excitation    (g_i = 0 for i ≥ 2)

With g_i = 0 beyond the first register (the low-pass setting), the static line becomes
v = (2·M·f − g1)/(f1 + … + fn − g1), and the lock range is g1/2M … (f1+…+fn)/2M. The loop only
settles if all roots of f_n·zⁿ + … + f_1·z − g_1 lie inside the unit circle. For ORDER = 2 that means
f2 > f1 + g1.

The default is ORDER = 2 with f1 = 0, f2 = 325.12 kHz and g1 = 190.72 kHz. It has the mark loop's
lock range, and its roots sit at ±0.77. Splitting the same total equally, f1 = f2 = 162.56 kHz,
puts a root at −1.69, and that loop never locks. The testbench checks both cases. It also checks
that ORDER = 1 behaves cycle for cycle like the first-order loop.

The detector does not use this loop. It sits beside the detector in the top level with its own
input `nth_sig_in` (synchronized) and outputs `nth_feedback` and `nth_gating`. The clock values and
the details of the shift are this design's own:

- a pulse that arrives in the shift cycle moves with its count;
- registers saturate at 4M − 1.

## Timing

| Item | Value |
|---|---|
| System clock | 10 MHz by default, set by `CLK_HZ` |
| One bit at 120 baud | 83,333 clocks |
| Limiter | 1 register stage |
| Loops | Combinational from limiter output to gating |
| Filters | 1 register stage |
| Decision | 4 clocks after the bit-boundary transition arrives on `bit_timing` (2 synchronizer flip-flops, edge detector, hold register) |
| Error count | Updates 1 clock after the decision, for the bit just decided |

`src_bit` goes through a synchronizer of the same depth plus one extra register. It should
change together with `bit_timing`, at the bit boundary. The error counter then stores the bit
that has just ended at the strobe.

## How far it can be trusted

What was checked without noise:

- Each block has its own self-checking testbench.
- The loops match the static line, lock ranges, free-running frequency and lock behaviour described
  above.
- The full detector at its default parameters decodes with no errors:
  - alternating data and random data;
  - carriers shifted by ±10 to ±40 Hz, where both stay inside their lock ranges and every bit is
    decoded.

Under noise, the design does not reproduce the original laboratory results. The noise workload uses:

- square-wave carriers of RMS value S;
- Gaussian noise in a 20 kHz band, added before the limiter;
- the ratio E/N0 = (S/N)²·W/B, with W = 20 kHz and B = 120 per second;
- 400 alternating bits per point (80 at the noise-free and Doppler points).

It gives these rates:

| E/N0 | Errors (this design) | Original hardware |
|---|---|---|
| 1000 | 0 of 80 | — |
| 300 | 0 of 400 | — |
| 100 | 68 of 400 (0.17) | — |
| 24 | 103 of 400 (0.26) | 0 errors in a scope capture |
| 10.6 | 116 of 400 (0.29) | 3 errors in a capture |
| 7.4 | 139 of 400 (0.35) | 3 errors in a capture |

Shifted carriers under noise were run at E/N0 = 100 only, with 80 bits each. A shift of +40 Hz
gave 20 errors (0.25) and −40 Hz gave 8 (0.10), against 0.17 with the nominal carriers. With so
few bits the standard error is about 0.04. A likely reason for the worse +40 Hz figure is that the
space carrier then sits at 1530 Hz, close to the 1560 Hz top of its loop's range, where noise
makes the loop slip more easily. The original found its error-rate curves moved by only about 1 dB over ±40 Hz.

The original system reached an error rate of 10⁻³ only about 1.6 dB worse than its own correlation
detector. This model is many dB worse than that. The mean filter levels at the decision instants
(40 alternating bits per point, full scale 1) show where it goes wrong:

| E/N0 | 1 sent: u_mark / u_space | 0 sent: u_mark / u_space | Wrong 1s / 0s |
|---|---|---|---|
| 1000 | 0.88 / 0.39 | 0.54 / 0.82 | 0 / 0 |
| 300 | 0.70 / 0.39 | 0.55 / 0.84 | 0 / 0 |
| 100 | 0.60 / 0.39 | 0.51 / 0.57 | 0 / 7 of 21 |
| 24 | 0.51 / 0.42 | 0.51 / 0.52 | 3 / 11 of 21 |

Noise pulls each locked loop's level towards 0.5. The space loop, locked near the top of its range
on its own carrier, loses its lead first. The mark loop, unlocked on that carrier, already sits
near 0.5. Most errors are therefore zeros decided as ones. While a 1 is sent, the space loop stays
near 0.4, so ones survive longer.

Likely causes, none of which can be settled from the available description:

- the bandwidths of the original limiter and summing amplifier;
- the real noise spectrum;
- the unknown filter cut-off;
- the exact definition of the measured S and N.

Filter time constants from 2^12 to 2^16 clocks were tried without a clear improvement. **Treat the
noise performance as unverified.** The noise-free logic, the loop behaviour and the Doppler
tolerance are what the tests support.

## Where this design departs from the original

- **Loop clocks.** The original loops used free-running RC oscillators. Here each loop clock is a
  32-bit phase accumulator that emits one-clock enable pulses inside the system clock domain
  (`clock_tick_gen`). Mean frequencies are exact to within 0.003 Hz. Individual pulse spacing
  jitters by one system clock, 0.1 µs.
- **Limiter.** The original was an analogue comparator. Here the input is already a signed sample
  (12 bits by default), and the limiter takes its sign. The analogue-to-digital conversion is
  outside this design.
- **Low-pass filter.** The original circuit and cut-off are not known. The recursive filter and its
  time constant are this design's choice.
- **Sampling pulse.** The original differentiated the data waveform and triggered a monostable at
  the end of each bit. Here a separate `bit_timing` signal with one transition per boundary is
  edge-detected.
- **Comparator and hold.** These are a digital magnitude compare and a register, where the
  original used an analogue comparator and a hold circuit.
- **Bit mapping.** The 1220 Hz carrier is taken as the mark (binary 1), handled by the mark loop.
  The space (binary 0) is at 1490 Hz.
- **Not built as hardware:** the two-oscillator FSK transmitter and the noise generator with its
  summing amplifier. A behavioural model of them is in `tb/fsk_source.sv`.
- **General loop.** The original describes the general loop only in principle. Its clock values,
  its shift timing and its placement next to the detector are choices made here.

## Changing it

- **Lock ranges.** Parameters `A_F_HZ`, `A_G_HZ`, `B_F_HZ` and `B_G_HZ` on `fsk_pll_detector` are
  the loop clocks in Hz. Use f1 = 2·M·(top of range) and g1 = 2·M·(bottom of range). Each must be
  below `CLK_HZ`.
- **Counter length.** `N` sets the counter length; keep the clocks consistent with M = 2^(N-1).
- **Filter.** `LPF_SHIFT` sets the filter time constant, 2^LPF_SHIFT clocks.
- **Bit rate.** No parameter is needed; it follows `bit_timing`.

## Files

`rtl/`:

| File | Contents |
|---|---|
| `fsk_pkg.sv` | Shared constants: system clock, counter size, default loop clocks, widths |
| `fsk_pll_detector.sv` | Top level: limiter, two loops, two filters, sampling, decision, error counter; the general loop beside them |
| `dpll_first_order.sv` | One first-order digital phase-lock loop |
| `dpll_nth_order.sv` | General n-th order digital phase-lock loop |
| `clock_tick_gen.sv` | Phase-accumulator loop clock |
| `phase_comparator.sv` | Exclusive-or phase comparator |
| `transmission_gate.sv` | Clock selector |
| `binary_counter.sv` | N-stage counter |
| `limiter.sv` | Two-level limiter |
| `lowpass_filter.sv` | Branch filter |
| `sample_pulse_gen.sv` | End-of-bit strobe from `bit_timing` |
| `decision_hold.sv` | Comparator and hold |
| `error_counter.sv` | Error counter |
| `sync2.sv` | Two-flip-flop synchronizer |

`tb/`:

| File | What it does |
|---|---|
| `tb_<block>.sv` | One self-checking testbench per block |
| `tb_fsk_pll_detector.sv` | End to end at default parameters: alternating and random data, ±40 Hz shifted carriers, a heavy-noise stretch. It compares the detector's error count with its own and requires every mechanism to occur: each loop locked and unlocked, both decisions, shifted carriers, error pulses, and the general loop locked and unlocked. Runs in a few seconds. |
| `tb_fsk_noise_workload.sv` | The error-rate measurement from the table above, plus Doppler shifts with and without noise. Runs in a little over 2 minutes. |
| `tb_dpll_loop_test.sv` | The stand-alone 1025–1420 Hz loop: static sweep, beat note out of lock, step response, 120 Hz switching between in-range frequencies, and switching to an out-of-range frequency |
| `tb_fsk_detector_variants.sv` | Three detectors with other loop clocks, carriers and counter lengths, noise-free; every decision must be right |
| `tb_dpll_nth_order.sv` | General loop: order 1 against the first-order loop; orders 2 and 3 on the static line; an unstable setting |
| `fsk_source.sv` | Behavioural FSK transmitter plus band-limited Gaussian noise, used by the detector testbenches. Not synthesizable. |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each also has a
watchdog.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/fsk_pkg.sv tb/tb_fsk_pll_detector.sv \
        --top-module tb_fsk_pll_detector
    ./obj_dir/Vtb_fsk_pll_detector

Replace the testbench name to run any other. The package must be listed first, and the other
modules are found through `-I` by file name. The simulator has two states, so every register is
reset. Apply `rst` for a few clocks before use.
