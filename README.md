# Mobile terminal for mixed voice and data packets — digital core

In an 800 MHz mobile voice channel, the talker is silent much of the time.
This terminal sends short data packets in those silent gaps of the
conversation. Two conditions make that work:

1. **The receiving side locks fast.** A packet receiver must regain the carrier
   and the bit clock within a few milliseconds of each burst. A **Costas loop
   aided by a digital frequency comparator** recovers the carrier. An
   **all-digital early/late-gate bit synchronizer** recovers the clock.
2. **A voice terminal keys its carrier only while someone talks.** An
   **adaptive speech detector** tracks the background noise and turns the
   carrier on only for speech. A data terminal that senses the channel free
   can then send its packet.

This repository holds synthesizable SystemVerilog for the digital parts of
such a terminal. Each part has a self-checking testbench. The analog front
end stays outside the design: the VCO's analog core, the DAC, the IF hard
limiter, the TFM modem, the voice codec and the RF stages. Their signals are
ports of the top module.

```
            +--------------------- mobile_terminal ----------------------+
 if_in ---->| carrier_recovery   (Costas loop + AFC, 4x-carrier DCO)      |--> cr_u1/cr_u2, cr_afc_code, cr_i_sign ...
 rx_data -->| bit_synchronizer   (/5, /10+k, /12 DVCO; ELG discriminator) |--> rx_clk, rx_strobe, rx_bit ...
 spk_x ---->| speech_detector    (HPF, p(n), constancy, CNLE/CT, N + H)   |--> speech
            |        speech --> tx_access_ctrl (IDLE / VOICE / DATA)      |--> carrier_on, data_grant
            +-------------------------------------------------------------+
```

Everything runs on one 9.6 MHz clock with a synchronous, active-high `rst`.
Clock enables stand in for the slower clocks: the 4x carrier clock, 1.92 MHz,
16 kHz and the 8 kHz sample strobe.

## Carrier recovery: Costas loop with a rotational frequency comparator

`carrier_recovery` contains two loops that steer one oscillator.

* **Phase shifter (`phase_shifter_90`).** Two D flip-flops form a twisted
  ring. They are clocked at four times the carrier, so each output stays in
  a state for a quarter period. The ring gives the carrier `u1` and a copy
  `u2` that lags it by exactly 90 degrees.
* **Costas detector (`costas_detector`).** Each arm compares the
  hard-limited IF with its reference (I arm: `u2`; Q arm: inverted `u1`, see
  below) over a window of 256 clocks, a 37.5 kHz update rate. The agreement count of a square wave
  against a square wave is a triangle in phase. The error is Q multiplied by
  the sign of I. It is a saw-tooth of period pi, with stable points at 0 and
  pi. A BPSK-like Costas loop needs exactly this phase ambiguity.
* **Loop filter (`costas_loop_filter`).** A proportional-plus-integral filter
  with two gain sets:
  * `acq = 1`: natural frequency 400 Hz, for acquisition.
  * `acq = 0`: natural frequency 75 Hz, for tracking.

  Both sets have damping 0.707. The integral is kept when the set is
  switched, so the acquired frequency is not disturbed. The integral and the
  output saturate rather than wrap.
* **Frequency comparator (`rot_freq_comparator`).** Far from lock, the Costas
  error averages to zero, so this block does the pull-in. At every rising IF
  edge it samples the pair (u1, u2), which tells which quadrant of the local
  carrier the IF edge fell in. It keeps the previous pair in a second pair of
  flip-flops.
  * If the IF runs faster than the oscillator, the sampled phasor rotates one
    way. Each turn passes the quadrant step (0,1)→(1,1) once, which gives an
    `fd_up` pulse.
  * If the IF runs slower, the phasor rotates the other way. The step
    (1,1)→(0,1) gives an `fd_dn` pulse.

  The pulse rate equals the beat frequency, so the average output is
  proportional to the frequency error. It is zero at lock.
* **AFC filter (`afc_filter`).** An 8-bit up/down counter integrates the
  pulses. Its reading would drive a DAC. The counter starts at mid-scale
  (128). It jumps back to 128 whenever it reaches 0 or 255. This keeps the
  loop from settling at a false lock on a data sideband far from the carrier.
  `afc_en = 0` freezes it.
* **Oscillator (`dco`).** A 24-bit phase accumulator stands in for the VCO
  and its summing amplifier. Its step is the sum of three terms:
  * the nominal word for 4 × 455 kHz;
  * (AFC code − 128) × 3000, about 430 Hz per count, giving ±55 kHz of pull
    range;
  * the Costas filter output.

  The carry of the accumulator is the 4x tick for the phase shifter.

**Which oscillator output is "in phase".** The comparator only fires on
steps across an edge of `u1` while `u2` is high. The Costas arms therefore
take `u2` as their in-phase reference and the inverted `u1` as quadrature.
Both Costas lock points (0 and pi) then put the IF edges on edges of `u2`,
a quarter period away from the comparator's decision boundaries. With `u1`
as the in-phase reference, the lock point at pi would sit exactly on such a
boundary. Sampling jitter would then produce pairs of up and down pulses,
each kicking the AFC by 430 Hz. In simulation this tripled the acquisition
time.

Measured in simulation: the IF is re-acquired to within 100 Hz in 1.4 to
7.8 ms for offsets from 1 kHz to 15 kHz on either side, for example 6 ms
for +10 kHz. An IF 80 kHz off, beyond the AFC range, makes the
counter run to its end and preset, as intended. With Gaussian noise
added to the IF ahead of the limiter at a carrier-to-noise ratio of 10 dB,
a +20 kHz step is acquired in about 8 ms, close to the 8 ms reported for a
noisy carrier. With a TFM-modulated IF (random 16 kb/s data) the biphase
arms cannot hold a phase lock, but the frequency loop still brings the
oscillator to the carrier: 10 kHz away at the start, its mean over the next
10 ms lies within about 700 Hz of the carrier, with excursions of about
±2 kHz.

## Bit synchronizer: modified absolute-value early/late gate

`bit_synchronizer` recovers the 16 kb/s data clock with counters only.

* **Digital VCO (`bs_dvco`).** The divider chain is 9.6 MHz ÷5 = 1.92 MHz,
  then a presettable 4-bit counter dividing by 10 (192 kHz), then ÷12, which
  gives 16 kHz. One bit is 120 periods of 1.92 MHz. A correction `k` reloads
  the 4-bit counter so that it divides once by 10+k. This moves the clock
  phase by k × 3 degrees; positive k delays it.
  * k is limited to −9..+6 by the 4-bit counter.
  * Only one correction is applied per command.

  From the ÷12 state the block derives three clocks:
  * the in-phase clock `ck_i`, whose rising edge samples mid-bit;
  * the mid-phase clock `ck_q`, a quarter period later;
  * a reference tick at 24 times the bit rate.
* **Transition detector (`transition_detector`).** A flip-flop clocked at
  1.92 MHz delays the data. An XOR with the undelayed data marks each
  transition. A set/reset flip-flop stretches that mark until the next
  in-phase edge.
* **Discriminator (`elg_discriminator`).** This is the central idea. The
  early and late integrators of a classical early/late gate are replaced by
  one up/down counter. The counter is preset to K−1 = 15 at each in-phase
  edge. While `ck_q` is high (12 reference ticks centred on the expected
  transition):
  * it counts **down** before the data transition (the early gate);
  * it counts **up** after it (the late gate).

  Reading minus 15 is (late − early) ticks. This is a timing error with 12
  quantization levels per side that saturates at ±12 outside the window: the
  "modified absolute value" characteristic. A bit period with no transition
  produces no error sample.
* **Loop filter (`bs_loop_filter`).** The errors of N = 2 transitions are
  averaged. An integrator (gain 2^−4) can be added through a multiplexer
  (`int_en`). This selects a first- or second-order loop. The negated result
  is the correction k, saturated to 6 bits.

Measured in simulation:
* A 180-degree phase step (0011 pattern) is pulled into the ±1-tick dead
  zone after 19 transitions; the original circuit needed 20. A 90-degree
  step takes 11.
* With random data 0.195 %, 0.273 % and 0.35 % off frequency, the
  first-order loop stays within 9, 16 and 22 of 600 clocks of mid-bit. The
  ripple grows with the offset.

## Speech detector

`speech_detector` works on 10-bit linear samples, one per `in_valid`
(8 kHz). Every multiplier is a power of two.

* **High-pass (`sd_highpass`).** Subtracts a running DC estimate with time
  constant 2^5 samples, a corner near 40 Hz. It outputs the sample magnitude.
* **Level (`shift_lpf` as p(n)).** p(n) = β·p(n−1) + (1−β)·|x(n)| with
  β = 1 − 2^−7. It saturates at p_max = 64 so that loud speech cannot drag it
  far.
* **Constancy test (`sd_constancy`).** Two more one-pole filters give:
  * a long-term level of p (2^11 samples, about 0.26 s);
  * the mean absolute deviation of p from it (2^10 samples).

  The output c = 1 when p − 8·dev > 0, that is when p has been steady for
  several hundred milliseconds.
* **Noise level and threshold (`sd_noise_level`).** When c = 1 and p ≤ CNLE
  (current noise level estimate), the segment is taken as "almost surely
  noise" (ASN). CNLE then takes the value p. The threshold becomes
  CT = 3.75·CNLE, which approximates 3·√(π/2)·CNLE: three standard deviations
  of Gaussian noise whose mean magnitude is CNLE. Otherwise CNLE creeps up by
  δ = 1/256 per sample, so it can follow a rising noise floor. CT holds
  between ASN events.
* **Decision (`sd_decision`).** Speech is declared once N = 3 consecutive
  magnitudes exceed CT. It is held for H = 1600 samples (200 ms) after the
  last such run.

Choices made here and why:
* N = 3 comes from the tried range 1–4. With N = 1, single noise peaks above
  CT (about 2.7 σ) keep restarting the hangover, and the detector never
  releases.
* p_max = 64 and δ are this design's values.
* The constancy rule (k = 8, the two time constants) is this design's
  reading of the test.

## Transmitter keying (`tx_access_ctrl`)

A three-state machine decides when the carrier is on.

* **IDLE.** The carrier is off.
* **VOICE.** In voice mode (`voice_mode`), the carrier is on while the speech
  detector declares speech.
* **DATA.** A data request (`data_req`) is granted only from IDLE, and only
  while `chan_busy` is low. The state lasts until `pkt_done`.

Speech has priority over data when both arrive in IDLE. An assertion checks
that no packet starts on a busy channel.

## Where this RTL departs from the original hardware

* **Oscillators.** The analog VCO and the AFC DAC are a numeric oscillator,
  and the AFC gain of 3000 (430 Hz per count) is chosen here. The
  Costas-filter gains were computed for 400 Hz and 75 Hz. The original filter
  was analog.
* **Clocking.** The IF is sampled by the 9.6 MHz clock; the original
  flip-flops were clocked by the IF itself. The edge detection adds up to one
  clock (0.1 µs) of delay.
* **AFC counter width.** The AFC integrator is described both as a 16-bit
  counter and as an 8-bit one that presets to 128. It is 8 bits here.
* **1.92 MHz versus 1.96 MHz.** The reference after ÷5 is 1.92 MHz, which is
  9.6 MHz / 5. The value 1.96 MHz, which also appears in the original, does
  not divide out.
* **Constants chosen here:** K = 16, N = 2, the integrator gain, the
  discriminator window placement, and all speech-detector time constants
  except β.
* **Interface signals.** Channel busy, end of packet, the AFC enable and the
  bandwidth switch are inputs. When they change is left to the surrounding
  system.

## Files

| file | contents |
|---|---|
| `rtl/mt_pkg.sv` | shared constants (clock, IF, bit rate, sample width) and the keying state type |
| `rtl/mobile_terminal.sv` | top level |
| `rtl/carrier_recovery.sv`, `phase_shifter_90`, `rot_freq_comparator`, `afc_filter`, `costas_detector`, `costas_loop_filter`, `dco` | carrier recovery |
| `rtl/bit_synchronizer.sv`, `bs_dvco`, `transition_detector`, `elg_discriminator`, `bs_loop_filter` | bit synchronizer |
| `rtl/speech_detector.sv`, `sd_highpass`, `shift_lpf`, `sd_constancy`, `sd_noise_level`, `sd_decision` | speech detector |
| `rtl/tx_access_ctrl.sv` | transmitter keying |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
Each has a watchdog. The package goes first and `-y rtl` finds the
modules. For example:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl rtl/mt_pkg.sv \
          tb/tb_bit_synchronizer.sv --top-module tb_bit_synchronizer -o sim
./obj_dir/sim
```

The unit testbenches compare each block with a reference model written in
the testbench. They drive random stimulus and add directed cases: preset
ends, saturation, clamping, hangover length and bit-period lengths in
clocks.

The closed-loop testbenches (`tb_carrier_recovery`, `tb_bit_synchronizer`,
`tb_speech_detector`) check acquisition and tracking against values derived
from the stimulus. The carrier test also runs a noisy IF and a TFM-modulated IF.

`tb_mobile_terminal` runs the whole terminal at its default parameters for
3.2 s of real time, which takes about 20 s of simulation. It covers:
* IF acquisition, the bandwidth switch, the AFC hold, re-acquisition and an
  AFC preset;
* bit-clock pull-in from half a bit off and tracking with the integrator;
* a noise / talk-spurt / noise sequence that keys and releases the carrier;
* a 1000-bit packet that waits for a busy channel and then takes 600000
  clocks (16 kb/s).

It counts every mechanism and fails if one never occurs.
