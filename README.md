# Eight-channel digital I/Q rf phase detector

This is the FPGA logic of a phase detector for a linac rf system. Eight rf signals are
down-converted to 20 MHz and sampled by 14-bit ADCs at 80 MHz, exactly four samples per rf
period. Each group of four samples gives the signal's in-phase (I) and quadrature (Q)
components directly, with no mixer and no filter. From I and Q a CORDIC computes phase and
amplitude. Each channel's phase is then taken relative to a reference channel. A trigger from
the accelerator timing starts the acquisition. Waveform recorders keep every intermediate
stream for inspection, and a boxcar average over a chosen window of the rf pulse gives one phase
and one amplitude per channel per pulse.

The architecture follows the published description of the APS linac phase detector prototype
(A. F. Pietryla, A. E. Grelick, W. E. Norum, Argonne National Laboratory). That description
fixes these points:

- 8 channels of 14-bit data;
- an 80 MHz clock made by a PLL from a 20 MHz reference;
- two banks with their references on channels 0 and 4;
- an external trigger and an event-system trigger, each synchronized to 80 MHz;
- recorders for the ADC, I/Q and phase/magnitude streams;
- a multiplexer that chooses absolute or relative phase for the last recorder;
- a boxcar average over a user-chosen region.

It gives no widths, encodings, bus or algorithms. Every such detail below is this design's own
choice. Each module's header comment says which parts are which.

## Block diagram

```
 20 MHz ref --PLL (outside)--> clk (80 MHz), ref20 (20 MHz, -30 deg)
                                   |
                       pd_iq_sample_ctrl --iq_phase--+
                                                     v
 adc_data[8] --+----------------------------> pd_iq_sampler --> pd_phase_mag --> pd_delta_phase --+
               |                                  |               |   (CORDIC x8)       |          |
               |                                  |               +--> pd_pm_mux <-----+          |
               v                                  v                        v                      v
        pd_wave_rec (ADC)                 pd_wave_rec (I/Q)      pd_wave_rec (phase&mag)    pd_average
               ^                                  ^                        ^                      ^
               +------------------ rec_start -----+------------------------+----------------------+
                                                  |                                   roi_gate, roi_done
 ext_trig ---------------------> pd_sync --+      |
 evt_code -> pd_event_rx (evt_clk) -> pd_sync --+-> pd_trig_select -> pd_rec_ctrl
                                                                                  pd_host_regs <-> control system bus
```

`phdet_top` wires these blocks together. `phdet_pkg` holds the shared types and widths.

## Quadrature sampling (the central idea)

The ADC clock is locked at four times the down-converted rf, so successive samples of
`x(t) = A cos(wt + phi)` are taken 90 degrees apart:

| position | sample          | used as |
|----------|-----------------|---------|
| 0        | `A cos(phi)`    | `I = +x` |
| 1        | `-A sin(phi)`   | `Q = -x` |
| 2        | `-A cos(phi)`   | `I = -x` |
| 3        | `A sin(phi)`    | `Q = +x` |

`pd_iq_sampler` negates samples at positions 1 and 2 and stores each one as I or Q. After every
Q sample (positions 1 and 3) it outputs a complete pair, so I/Q pairs come at 40 MHz. Then
`atan2(Q, I) = phi`. Each pair is built from two samples a quarter period apart. The design
does not average over a full period, so an amplitude change within 12.5 ns shows up as a small
error.

All channels must agree on which sample is position 0. `pd_iq_sample_ctrl` samples the PLL's
20 MHz output in the 80 MHz domain. That output is shifted by -30 degrees, which keeps its edges
clear of the 80 MHz edges. The block re-aligns a 2-bit counter on each rising edge. A 2-bit
offset (`CTRL[5:4]`) shifts the assignment to absorb ADC pipeline and board delays. `locked`
(STATUS bit 0) rises after 8 consecutive edges that arrive exactly where expected, and falls on
any missing or misplaced edge. A wrong offset rotates every channel by the same multiple of
90 degrees. The relative phases (below) do not change.

## Phase, magnitude and the reference banks

`pd_phase_mag` contains one pipelined CORDIC (`pd_cordic`) per channel, working in vectoring
mode:

1. A first stage folds the left half-plane onto the right one by negating the vector and
   adding 180 degrees.
2. Sixteen shift-and-add micro-rotations follow. I and Q carry 4 extra fraction bits, and the
   angle is kept at 20 bits.
3. A last stage rounds the angle and multiplies by 0.607253 to remove the CORDIC gain.

Output formats:

- **Phase** is a 16-bit binary angle: 65536 counts per turn, 0.0055 degrees per count, range
  [-180, 180).
- **Magnitude** is 16 bits unsigned, in ADC counts: a full-scale cosine reads about 8191.

Accuracy is within 3 counts of the exact `atan2`, plus about 2000/magnitude counts for very
small vectors. The magnitude is within 2 counts plus 0.05 %. The latency is 18 clocks, and the
pipeline accepts one pair per clock.

`pd_delta_phase` subtracts channel 0's phase from channels 1-3 and channel 4's from channels
5-7. Binary-angle subtraction wraps correctly. This removes what the channels of a bank have in
common: drift of the reference, of the sampling clock and of the I/Q alignment. The reference
slots (channels 0 and 4) keep their absolute phase. Magnitudes pass unchanged.

## Acquisition: triggers, region of interest, average

- **Triggers.** `pd_sync` brings the external trigger (asynchronous, at least 2 clocks wide)
  into the 80 MHz domain through two flip-flops and turns its rising edge into a one-clock
  pulse. `pd_event_rx` runs on the recovered event clock. It compares each received 8-bit
  event code with `EVT_CODE`; code 0 is the null code and never matches. On a match it holds
  a trigger level for 4 event clocks, and a second `pd_sync` takes that level to 80 MHz.
  `pd_trig_select` passes each pulse through its enable bit (`CTRL[0]` external, `CTRL[1]`
  event) and ORs them. The control system normally enables one of the two.
- **Recorder sample control** (`pd_rec_ctrl`).
  1. A trigger starts a delay of `TRIG_DELAY` clocks, then one `rec_start` pulse.
  2. From the `rec_start` cycle it counts samples of the delta-phase stream.
  3. It raises `roi_gate` for samples `ROI_START` to `ROI_START + 2^AVG_LOG2 - 1`. `AVG_LOG2`
     is limited to 10, so at most 1024 samples, or 25.6 us of pulse.
  4. `roi_done` marks the end of the region.

  A trigger that arrives before the region ends is ignored and counted in `IGN_COUNT`.
- **Average.** `pd_average` sums the delta phase (signed) and the magnitude of every gated
  sample. It then divides by the sample count with a rounding shift, and publishes the result
  in `AVG_PHASE[ch]` and `AVG_MAG[ch]` two clocks after `roi_done`. The phase is averaged as a
  signed number, so a relative phase near ±180 degrees averages incorrectly. Keep the bank
  references near the other channels in phase.

Latency from an external trigger edge to `rec_start` is 3 to 4 synchronizer clocks, plus 1 for
the trigger select, plus `TRIG_DELAY + 1`.

## Waveform recorders

There are three `pd_wave_rec` instances, each 512 words deep:

- ADC samples: 8 x 14 bits, one word every clock, 6.4 us;
- I/Q pairs: 8 x 2 x 16 bits, one word every second clock, 12.8 us;
- the phase-and-magnitude stream: 8 x (16 + 16) bits, one word every second clock, 12.8 us.

The `CTRL[2]` multiplexer (`pd_pm_mux`) chooses what the third recorder stores: 0 for absolute
phase, 1 for delta phase. At 512 words it holds a 512-sample noise measurement of relative
phase. `rec_start` restarts all three at address 0. Each one stops when full and sets its
`done` bit. All start on the same clock, so each recorder's stream is shifted by its own
pipeline latency:

| stream              | latency after the ADC pins |
|---------------------|----------------------------|
| I/Q                 | 2 clocks                   |
| phase & magnitude   | 20 to 22 clocks            |

## Register map

The bus is synchronous to the 80 MHz clock and carries 32-bit words. A write takes effect at
the next edge. A read returns `host_rdata` with `host_rvalid` two clocks after `host_rd`. Do
not issue a read and a write in the same cycle; an assertion checks this.

The top two bits of the 16-bit word address select the region: 0 registers, 1 ADC recorder,
2 I/Q recorder, 3 phase & magnitude recorder.

| addr | name | access | contents |
|------|------|--------|----------|
| 0x00 | CTRL | rw | [0] external trigger enable (reset 1), [1] event trigger enable, [2] recorder shows delta phase (reset 1), [5:4] I/Q offset |
| 0x01 | EVT_CODE | rw | [7:0] triggering event code |
| 0x02 | TRIG_DELAY | rw | [15:0] clocks from trigger to recording |
| 0x03 | ROI_START | rw | [15:0] first averaged sample |
| 0x04 | AVG_LOG2 | rw | [3:0] log2 of averaged samples (0..10) |
| 0x05 | STATUS | ro | [0] locked, [1] busy, [4:2] recorders done (ADC, I/Q, phase), [7:5] recorders running |
| 0x06 | TRIG_COUNT | ro | accepted triggers |
| 0x07 | AVG_COUNT | ro | completed averages |
| 0x08 | IGN_COUNT | ro | ignored triggers |
| 0x10+ch | AVG_PHASE | ro | averaged phase, sign-extended |
| 0x18+ch | AVG_MAG | ro | averaged magnitude |

In the recorder regions the address is `{region[1:0], 0, ch[2:0], field, sample[8:0]}`:

- ADC recorder: the word is the sample, sign-extended.
- I/Q recorder: field 0 reads I, field 1 reads Q.
- Phase & magnitude recorder: field 0 reads the phase (sign-extended), field 1 the magnitude.

## Clocks and reset

- `clk`: the 80 MHz PLL output. The ADCs must be clocked by the same PLL output.
- `evt_clk`: the recovered event clock. Only `pd_event_rx` runs on it, with its own reset
  `evt_rst_n`. `EVT_CODE` crosses into it unsynchronized, so change it only when no triggering
  event is expected.
- Resets are asynchronous and active low. Memories are not reset.

## What is not here

- **Off-FPGA and vendor parts.** The PLL, the ADCs, the analog front end, the fiber
  transceiver and clock/data recovery, and the I/O controller are board parts and have no RTL.
  The top's ports stand in for them. The testbenches use behavioural models of the PLL
  (`tb/pd_pll_model.sv`) and the ADCs (`tb/pd_adc_model.sv`).
- **ADC clock output.** The 80 MHz ADC clock output of the FPGA is not a port. Take the ADC
  clock from the PLL directly.
- **Event-link format.** The real format is not specified. The receiver assumes a parallel
  8-bit code with a valid strobe.
- **Later upgrades.** A 14-tap low-pass FIR filter in place of the boxcar average, and DACs
  for a full low-level rf controller, were planned upgrades of the prototype. They are not
  built.

## Simulation

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
`tb_phdet_top` runs the whole design at its default sizes. A behavioural PLL and ADCs produce
eight carriers of known amplitude and phase with ±2 counts of noise, and the testbench makes
three acquisitions:

- external trigger, delta-phase recording, with a second trigger ignored;
- event trigger, absolute-phase recording, with a masked external trigger and a non-matching
  event code;
- pulsed rf, with the region of interest inside the pulse.

After each one it checks the averages, the I/Q and phase recordings and the recorded ADC words.
`tb_noise_floor` records 512 samples of relative phase without averaging and checks their
scatter against the value the noise model predicts.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb -Irtl \
    rtl/phdet_pkg.sv tb/tb_phdet_top.sv --top-module tb_phdet_top -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the block tests, for example
`tb_pd_phase_mag`. The simulator has two states, so every register that is read is reset. The
block testbenches override parameters only where a smaller memory keeps them short
(`tb_pd_wave_rec` uses 16 words).
