# Brain-spinal interface SoC: closed-loop intraspinal stimulation core

This is the digital core of a brain-spinal interface SoC. Neural spikes are
recorded in motor cortex, and each time a chosen pattern of activity is
detected, a train of current pulses is delivered to the spinal cord. The chip
has two identical modules. Each module has four recording channels and four
stimulating channels. Every channel's data is processed in real time by a
small, fixed-schedule DSP pipeline:

1. highpass filter;
2. spike discriminator with amplitude thresholds and two time-amplitude windows;
3. per-channel spike counter and delay;
4. a programmable logic combination of channels;
5. optionally, a sequencer that fires the four stimulators one after another;
6. a stimulator controller that times the current pulses.

Around this loop are:
- **Blanking**, which stops stimulation artifacts from being detected as spikes
  and retriggering the loop.
- **A serial telemetry stream**, which carries raw or filtered data, the spike
  flags, or the trigger flags off chip.
- **One long parameter register**, which holds every setting.

The analog parts of the chip are not in this RTL: amplifiers, filters, SAR
ADCs, clock oscillator, bias, FSK transmitter, current DAC and electrode
drivers. Their digital signals are ports of the top module `bsi_top`.

## The time-slot plan

The whole core runs on one clock, nominally 1 MHz. The recording front-end
supplies each module with a 5-bit ADC timer that counts 0..27. One ADC
conversion cycle is therefore 28 µs. Every channel gets a new 10-bit sample per
cycle, which is 35.7 kSa/s.

Each module's DSP unit serves its four channels in turn, using one shared
filter and one shared discriminator:

| ADC timer | channel | cycle 1 (`hpf_en`)        | cycle 2 (`sd_en`)               | cycle 3 |
|-----------|---------|---------------------------|---------------------------------|---------|
| 1–3       | 1       | 4:1 mux + filter step     | discriminator step on output    | gap     |
| 4–6       | 2       | "                         | "                               | "       |
| 7–9       | 3       | "                         | "                               | "       |
| 10–12     | 4       | "                         | "                               | "       |

Each channel's "internal clock" (`int_clk`) is high for the first two cycles
of its slot. In this RTL these internal clocks are clock enables, not gated
clocks, and every flip-flop is on the one system clock.

The decision maker runs on two slower ticks:
- `frame_tick`: once per ADC cycle, at timer 13 (28 µs).
- `bin_tick`: every second frame (56 µs).

During sequential blanking, `dsp_control_unit` turns all enables off. This
saves power and freezes the filter state.

The placement of the slots in the cycle, and the positions of the two ticks,
are this design's reading of the timing chart. The three-cycle slot and the
two-cycle internal clock are as the chip specifies.

## Highpass filter (`digital_hpf`)

The filter is a first-order IIR highpass with only a shift and adds:

```
w[n] = x[n] + w[n-1] - (w[n-1] >> s)        s = 4 (K = 1/16) or 3 (K = 1/8)
y[n] = sat10( w[n] - w[n-1] + 512 )
```

This gives H(z) = (1 − z⁻¹)/(1 − (1 − K)z⁻¹). The accumulator is 14 bits wide
and there is one accumulator state per channel. The output is offset to
mid-scale 512 and clamps at 0 and 1023 on underflow and overflow.

The cut-off is K·fs/2π. At 35.7 kSa/s this is about 355 Hz for K = 1/16 and
about 710 Hz for K = 1/8. The chip quotes the two settings as nominally
366 Hz and 756 Hz.

## Spike discriminator (`spike_discriminator`)

Each channel has a 10-bit timer, counting in 28 µs steps. The control state
of the channel is just a range of that timer. The comparator and level
multiplexers are shared by the four channels, and `select` chooses which
levels are compared:

| timer                | select | test on filtered sample y                  |
|----------------------|--------|--------------------------------------------|
| 0 (idle)             | 0      | y ≥ L0 **or** y ≤ L1 → start the timer     |
| 0 < t < T1           | –      | wait                                       |
| T1 ≤ t ≤ T2          | 1      | L2 ≤ y ≤ L3 must hold at every sample      |
| T2 < t < T3          | –      | wait                                       |
| T3 ≤ t ≤ T4          | 2      | L4 ≤ y ≤ L5 must hold at every sample      |
| T5 < t < T6          | –      | SDO = 1 (both windows passed)              |
| t ≥ T7               | –      | back to idle                               |

- **Thresholds.** L0 is the positive threshold. L1 is the negative threshold,
  for spikes of reverse polarity.
- **Rejecting a candidate.** A sample outside the window while the window is
  open sends the channel back to idle at once. So the waveform must pass
  through each box from its left edge to its right edge. Such an event
  counts as rejected.
- **Resolution.** T1..T4 are 8 bits, which reaches 7.1 ms. T5..T7 are
  10 bits, which reaches 28.6 ms.
- **Shared settings.** One set of L0..L5 and T1..T7 is shared by the four
  channels of a module. Four separate sets would not fit the 874-bit
  register, so this sharing is an inference.
- **Blanking.** ADB and SDB force a channel's timer to 0 in every cycle they
  are high. SEQ_BLK holds the discriminator input at 512 and clears all SDO
  outputs.

## Counter & delay (`counter_delay`), one per recording channel

This block turns spike flags into a trigger condition for one channel. It
counts rising edges of SDO:

1. The first spike starts a bin of length T_Bin, counted in 56 µs steps.
2. If N spikes arrive before the bin expires, the criterion is met.
3. When the criterion is met, ADB goes high at once. PASS rises T_D frames
   after the last spike and stays high for T_pass frames. ADB stays high
   until PASS falls.
4. A bin that expires before N spikes drops its count. The next spike starts
   a new bin.

Parameters:
- N is 1..15; N = 0 disables the channel.
- T_Bin is 13 bits, which is 0.46 s.
- T_D and T_pass are 10 bits, which is 28.6 ms.
- T_D = 0 and T_pass = 0 act as one frame.

## Triggering: combiner, pattern generator, 8:4 mux (`decision_maker`)

`channel_combiner`: each stimulating channel X has a 16-bit combination code.
The code is a truth table over the four PASS signals, indexed by
`{PASS4,PASS3,PASS2,PASS1}`. For example, 0xAAAA is "PASS1", 0x8000 is
"all four", 0x8200 is "PASS1 and PASS4", and 0xFFFE is "any".

`pattern_generator`: in sequential mode (`pg_enable` = 1), a rising edge of
combiner output 4 arms the sequencer. It starts at the next 56 µs tick:
- **Sequential:** Trigger k is a one-step pulse at (k − 1)·T_D_Stim, for
  k = 1..4.
- **Paired:** Triggers 1 and 2 fire together at 0, and Triggers 3 and 4 at
  3·T_D_Stim.
- **Simultaneous:** T_D_Stim = 0 fires all four at once.

`seq_trig` is high from arming to the last trigger. An 8:4 mux chooses between
the combiner outputs (individual mode) and the sequencer outputs as the
trigger to the stimulator controller.

## Blanking (`blanking_control_unit`)

There are three kinds of blanking:

- **Activity-dependent (ADB).** A channel whose criterion has been met ignores
  new spikes until its PASS ends.
- **Stimulus-dependent (SDB), individual mode.** `Blank[X][Y]` is 1 when the
  code of stimulating channel X depends on PASS_Y. The rule is
  `SDB_Y = OR over X of (Blank[X][Y] AND Stim_X)`. So while stimulator X runs
  its train, every recording channel that can trigger it is blanked. This
  breaks the loop from a stimulus artifact to a new trigger. The table is
  computed from the codes, so it needs no settings of its own.
- **Sequential (SEQ_BLK).** `SEQ_BLK = pg_enable AND (seq_trig OR Stim4)`. All
  four recording channels are blanked from the start of a sequence to the end
  of the last train. SDB is held low in this mode.

## Stimulus trains (`stimulator_controller`)

Each trigger rising edge starts a train of 1..31 pulses, one pulse every 8192
clocks (122 Hz at 1 MHz). A re-trigger during a train is ignored.

Each pulse has these phases:
- **Biphasic:** `anodic` for t_anodic clocks, then `cathodic` for t_cathodic
  clocks, then `discharge` for t_discharge clocks.
- **Monophasic:** `anodic`, then `discharge` (passive).

`stim` is high for the whole train, and blanking uses it. Pulse amplitude,
current adjust and the discharge resistor are static settings. They leave the
top on `stim_an` for the analog back-end, which has one shared 6-bit DAC per
module. Overlapping trains on several channels are not arbitrated here.

## Telemetry frames (`data_serializer`)

The serial clock is ADC timer bit 0, i.e. 500 kHz, with the bit changing on
the low half. One frame of 14 bits is sent per 28 µs ADC cycle. The frame is
latched at timer 27 and sent during the next cycle, bit k at timers 2k and
2k+1. The order on the wire, first bit first:

| mode      | bits 0 … 13                                                |
|-----------|------------------------------------------------------------|
| `TX_DATA` | D8 D7 D2 D6 D5 D3 D4 PA2 PA1 PA0 D0 SDO D9 D1              |
| `TX_SDO`  | SDO7 SDO6 … SDO1 PA5 … PA0 SDO8                            |
| `TX_TRIG` | Trig7 … Trig1 PA5 … PA0 Trig8                              |
| `TX_OFF`  | zeros                                                      |

- D is the 10-bit raw or filtered sample of the selected channel (1..8) with
  that channel's SDO.
- Flags 1..4 come from module 1, and 5..8 from module 2.
- Flags are sticky over a frame, so a pulse shorter than a frame is still
  sent.
- The preambles are parameters: PA3 = 101, PA6 = 110100. Their values are this
  design's choice.

## Parameter register (`parameter_register`, layout in `bsi_pkg`)

All 874 bits are shifted in MSB first. The shift uses `prog_din` on every
clock with `prog_shift` high. A one-clock `prog_load` then copies the shift
chain into the working copy, so a half-loaded word is never in use. `prog_dout`
is the end of the chain.

Layout of the working copy `q`:

| bits      | field                                                                 |
|-----------|-----------------------------------------------------------------------|
| 873:811   | `fe_ctrl` (63 bits): front-end gain / cut-off controls, passed out    |
| 810:806   | `clk_trim`                                                            |
| 805:804   | `tx_mode` (0 data, 1 SDO, 2 trigger, 3 off)                           |
| 803:801   | `tx_ch` (bit 2 = module)                                              |
| 800       | `tx_filtered`                                                         |
| 799:400   | module 2 `dsp_params_t`                                               |
| 399:0     | module 1 `dsp_params_t`                                               |

Within `dsp_params_t` (400 bits, MSB first):

| field         | bits | contents                                              |
|---------------|------|-------------------------------------------------------|
| `hpf_k16`     | 1    | filter K                                              |
| `sd`          | 122  | L0..L5, T1..T4, T5..T7                                |
| `cd[3:0]`     | 148  | per-channel N, T_Bin, T_D, T_pass                     |
| `dm`          | 80   | pg_enable, paired, T_D_Stim, four 16-bit codes        |
| `stim`        | 36   | biphasic, n_pulses, three phase durations             |
| `stim_an`     | 13   | DAC code, current adjust, discharge resistor, power enable |

Use the packed structs in `bsi_pkg` instead of counting bits by hand (see
`load_params` in `tb/tb_bsi_top.sv`).

## Departures and choices to be aware of

- The 874-bit total is the chip's figure. The field layout, the 63 front-end
  bits and the programming protocol are this design's own.
- These widths are chosen to reach the quoted ranges: T_Bin 13 b (0.46 s
  against a quoted ~0.5 s), T_D_Stim 14 b (0.92 s against ~1 s), T_pass 10 b,
  and phase durations 10 b in µs.
- These behaviours are this design's rules:
  - the bin restart;
  - trigger pulse width (one 56 µs step);
  - the sequencer starting on the next 56 µs tick;
  - the sticky telemetry flags;
  - the treatment of timer = T5 in the discriminator (wait);
  - the shared, not per-channel, discriminator settings.
- One serializer serves both modules, aligned to module 1's ADC timer. Both
  modules' timers are assumed to run in step.
- The combination code encoding (truth table) and the blanking lookup rule
  ("depends on") are inferred from what the codes must express.

## Files

- `rtl/bsi_pkg.sv` – constants, settings structs, `tx_mode_e`.
- `rtl/bsi_top.sv` – parameter register, two `dsp_unit`s, the serializer.
- `rtl/dsp_unit.sv` – one module:
  - `dsp_control_unit`, the 4:1 input mux, `digital_hpf`,
    `spike_discriminator`;
  - `decision_maker`, which contains four `counter_delay`,
    `channel_combiner`, `pattern_generator`, the 8:4 mux and
    `blanking_control_unit`;
  - `stimulator_controller`.
- `rtl/data_serializer.sv`, `rtl/parameter_register.sv`.
- `tb/tb_<module>.sv` – one self-checking testbench per module.
- `tb/frontend_model.sv` – behavioural stand-in for the recording front-end
  and ADC. It produces the ADC timer and noisy samples, and can inject a
  spike of good shape or of bad shape on any channel.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
It also has a watchdog. Example with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/bsi_pkg.sv tb/frontend_model.sv rtl/*.sv tb/tb_bsi_top.sv \
    --top-module tb_bsi_top -o sim && ./obj_dir/sim
```

For the other testbenches, replace the testbench file and `--top-module`.
`bsi_pkg.sv` must come first.

`tb_bsi_top` runs the full design at its default parameters. It programs the
register serially and takes the loop through three closed-loop experiments:
- individual triggering on one channel;
- paired sequential triggering;
- sequential triggering on an AND of two channels;
- simultaneous triggering (T_D_Stim = 0), with the filter at K = 1/8.

It also runs the three telemetry modes, with real time constants (hundreds of
milliseconds of chip time, a few seconds to simulate). At the end it reports
how often each mechanism occurred:
- spikes, rejected candidates and bin expiries;
- ADB, SDB, SEQ_BLK and blanked spikes;
- individual, sequential, paired and simultaneous triggers;
- monophasic and biphasic trains, and multi-pulse trains;
- filter saturation;
- the three telemetry modes.

A mechanism that never occurs counts as a failure.
