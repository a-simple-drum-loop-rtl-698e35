# Drum loop recorder and sequencer

This machine is a small drum machine and loop station in one. Six buttons each
play a synthesized drum sound. Any sequence of hits can be recorded into one of
three storage channels and played back as an endless loop. The synthesizer
makes each sound from a stored waveform, here a sine tone, and shapes it with
an attack-decay-sustain-release (ADSR) envelope. It mixes up to six sounds at
44100 samples per second into a 12-bit word for a parallel DAC.

The RTL has two halves:

* **The sequencer** (`sequencer`) is the control side. It reads the buttons,
  records and replays drum commands, and drives six trigger lines.
* **The sound controller** (`controller`) is the synthesizer. It turns each
  rising trigger into one sound on that drum's channel, mixes the channels and
  feeds the DAC.

`drum_machine` joins the two halves. The DAC, its 6 kHz analog low-pass
filter, the power amplifier, the speakers and the buttons' pulldown resistors
are outside the RTL, and their signals are the top's ports.

```
 buttons ──► sequencer ──triggers[5:0]──► controller ──dac_out[11:0]──► DAC ► filter ► amp
            ├ button_sync x4                ├ clockdiv (44.1 kHz strobe)
            ├ seq_timer                     ├ 6 x { sample_generator ─► synth (adsr_envelope) }
            └ sequence_store                └ signal_combiner ─► DAC register
```

The whole design runs on one 20 MHz clock with a synchronous, active-high
reset. The audio logic advances only on a one-clock strobe, once every 453 or
454 clocks (44100.0 Hz on average).

## Using the machine

| Control | Effect |
|---|---|
| `play_mode_sw` | 1 = play mode, 0 = record mode. Changing it stops whatever is running. |
| `ch_up_btn`, `ch_down_btn` | Select channel 0, 1 or 2, wrapping around. This stops whatever is running and restarts the timer. |
| `start_stop_btn` | Starts or stops recording (record mode) or looped playback (play mode) on the selected channel. |
| `drum_btn[5:0]` | In Idle, each press sounds at once. While recording, presses are recorded (and sound). |
| `led_record` | Red LED: record mode. |
| `led_active` | Green LED: recording or playing. |
| `channel` | The selected channel number. |

## The sequencer

### Commands and channels

A recording is a list of **commands**. Each command (`seq_cmd_t` in `drum_pkg`)
holds two fields:

* a 6-bit drum mask: the drums struck together;
* a 16-bit wait: the timer ticks since the previous command, or since
  start/stop for the first command.

The timer (`seq_timer`) counts once every 1024 clocks, which is 51.2 µs at
20 MHz. A 16-bit wait therefore covers up to 3.36 s. The store
(`sequence_store`) holds `NUM_CH x CH_LEN = 3 x 25` commands. Channel `c` owns
words `c*25` to `c*25+24`.

### State machine

| State | What happens |
|---|---|
| Init | After reset, the whole store is cleared, one word per clock (75 clocks). |
| Idle | The synchronized drum buttons drive `triggers` directly. |
| Clear | Start/stop in record mode first zeroes the 25 words of the channel. |
| Record | A new press (all buttons were up, now one is down) moves to Gather. When the buttons are released, the triggers drop. |
| Gather | Waits `HOLD_CYCLES` (2 ms), so that drums struck a little apart count as one hit. It then samples the buttons and stores {mask, timer}. It restarts the timer, drives the mask on `triggers` until the buttons are released, and steps to the next word. |
| Play | Waits until the timer reaches the current command's wait. |
| Play hold | Drives the command's mask for `HOLD_CYCLES` after it fires, then steps to the next word. |

Record also has these rules:

* If the timer overflows while recording, an empty command with wait 0xFFFF
  is stored. Pauses longer than 3.36 s therefore survive as chains of filler
  commands.
* Recording stops by itself when the channel's 25 words are used.

Play also has these rules:

* When the command fires, the timer restarts.
* After word 24, playback goes back to word 0, so it loops until stopped.

Unused words are empty: wait 0, no drums. They fire at once, each costing only
its 2 ms hold. A short recording therefore loops right after its last hit. Its
loop period is the sum of its waits plus 2 ms per unused word.

Priorities within one clock are as follows:

1. A channel button.
2. A change of the mode switch.
3. Start/stop.
4. The state's own action.

Button conditioning (`button_sync`) has three steps for each input:

* a two-flop synchronizer;
* a debouncer that accepts a new level only after 40000 stable clocks
  (2 ms);
* a press pulse on the accepted rising edge.

The mode switch uses only the debounced level. The drum buttons are
synchronized but not debounced, because the 2 ms gather window covers that.

## The synthesizer

### Sample generators

Each channel has a ROM holding one period of a sine wave. The table length and
contents are computed during elaboration from `FREQ_HZ` and `SAMPLE_HZ`:

```
LEN     = SAMPLE_HZ / FREQ_HZ            (integer division; the table has LEN+1 entries)
rom[n]  = trunc( trunc(2048 * sin(2*pi*n*FREQ_HZ/SAMPLE_HZ)) * 0.999 )
```

Entries are signed 12-bit numbers, with a peak of ±2045. The address steps on
every sample strobe and wraps after entry `LEN`. The six channels use 220,
120, 80, 330, 400 and 60 Hz, so the tables are 201, 368, 552, 134, 111 and
736 entries long. Because the period is rounded to whole samples, the pitch is
slightly off: for example, 80 Hz plays at 44100/552 = 79.9 Hz. To use a real
drum recording instead, replace the contents of `ROM`.

### ADSR envelope

`adsr_envelope` is a numerically controlled amplitude. A 24-bit signed
accumulator changes by a fixed rate each sample, and its top 12 bits are the
coefficient, where 0x7FF is the largest. The phases are:

| Phase | Step per sample | Leaves when the level | Length at default rates |
|---|---|---|---|
| Trigger | load 0x2FF000 | (always) | 1 sample |
| Attack | + 0x500 | is above 0x7FF000 | 4098 samples, 93 ms |
| Decay | − 0x300 | is below 0x3FF000 | 5466 samples, 124 ms |
| Sustain | − 0x100 | is below 0x1FF000 | 8190 samples, 186 ms |
| Release | − 0x400 | is below 0 | 2045 samples, 46 ms |
| Idle | hold 0x2FF000 | — | — |

A sound therefore starts at about three quarters of full scale and rises to
full scale. It then falls to half, drifts slowly to a quarter and dies out.
The whole sound is about 19800 samples, or 0.45 s.

A restart pulse (`play_ctl`) in any phase jumps back to Trigger. The phase
changes one sample after its condition is seen, so the level overshoots each
turning point by one step. While the level is negative (the last one or two
samples of Release), the coefficient is held at 0.

### Synth channel

`synth` keeps a three-state machine: Stopped, Trig and Playing.

* A trigger seen on a strobe enters Trig.
* Trig restarts the envelope and then moves to Playing.
* A new trigger while playing restarts the sound.
* `mute`, or the envelope reaching Idle, returns to Stopped.

While sounding, each output sample is:

```
out = ((sample >>> 1) * coeff)[23:12] + 0x7FF      // offset binary
```

While stopped, the output is 0x7FF, which is silence. With the peak
coefficient the output swings about ±511 around 0x7FF. At coefficient 0x3FF
(the decay turning point) it swings about ±255.

### Trigger handoff

A synth channel acts on a trigger only on a sample strobe, and it must see one
trigger per hit. The sequencer holds its lines high for 2 ms or more (about 88
samples). In `controller`, each line therefore passes through these stages:

1. A two-flop synchronizer.
2. A rising-edge detector.
3. A *pending* bit that holds the edge until the next strobe delivers it.

A sound thus starts within one sample period of its trigger's rising edge. A
line held high starts exactly one sound.

### Mix and DAC word

`signal_combiner` adds the six offset-binary channel outputs without clipping;
six 12-bit words need 15 bits. The top 12 bits of the sum are registered into
`dac_out` on each strobe. The DAC word therefore lags the channels by one
sample.

| Condition | `dac_out` |
|---|---|
| Silence | 6 × 0x7FF >> 3 = **1535** |
| One channel at full envelope | 1535 ± 64 |
| All six at once | 1535 ± 383 at most |

The DAC expects a straight binary word, with 0 as its lowest output voltage.

## Ports of `drum_machine`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 20 MHz clock; synchronous reset, active high |
| `drum_btn` | in | 6 | drum buttons, active high, asynchronous |
| `start_stop_btn`, `ch_up_btn`, `ch_down_btn` | in | 1 | pushbuttons, active high, asynchronous |
| `play_mode_sw` | in | 1 | 1 = play, 0 = record |
| `mute` | in | 6 | stops a channel's sound at the next strobe; the sequencer never uses it |
| `dac_out` | out | 12 | DAC word, changes once per sample |
| `dac_strobe` | out | 1 | high in the clock before `dac_out` changes |
| `led_record`, `led_active` | out | 1 | red and green status LEDs |
| `channel` | out | 2 | selected channel |
| `leds` | out | 8 | `{2'b00, triggers}`, a display of the trigger lines |
| `triggers` | out | 6 | sequencer to synthesizer |
| `playing` | out | 6 | channels sounding |

Parameters of the top are `CLK_HZ` (20 MHz), `NUM_CH` (3), `CH_LEN` (25),
`TIMER_PRESCALE` (1024), `HOLD_CYCLES` (40000) and `DEBOUNCE_CYCLES` (40000).
The controller's parameters set the sample rate, the six tone frequencies and
the four envelope rates.

## Design choices

These points follow the original machine:

* the split of work between the two halves;
* the command format and the three channels of 25 commands;
* the 1024-clock timer tick;
* clearing a channel when recording starts;
* the overflow filler command and the looping;
* the phase-accumulator sample clock;
* the sine table formula and the six tones;
* the envelope's phases, rates and turning points;
* the channel state machine and its multiply;
* the 15-bit mix and the DAC register.

These points are this design's own:

* **Sequencer in hardware.** The original ran the sequencer as firmware on a
  microcontroller. Here it is a state machine with the same branches, and with
  debouncers in place of interrupt routines and software delays.
* **Channel count.** The original aimed at 99 storage channels but was built
  with three. `NUM_CH = 99` gives the larger store (2475 commands, 54 kbit)
  with no other change.
* **Hold time.** The trigger hold time and the gather window are 40000 clocks
  (2 ms). This is what the original's delay of 10,000 instruction cycles comes
  to at 20 MHz, although its comment called it about 8 ms.
* **Overflows.** A timer overflow is acted on only while recording or playing,
  and never past the end of the channel. The original also wrote filler
  commands while stopped.
* **Power-up clear.** The store is cleared after reset.
* **One clock.** The audio logic uses a clock enable, not a divided clock.
* **Trigger edges.** Edge detection and the pending latch on the trigger lines
  are added, as are the per-channel `mute` ports. In the original, the
  FPGA reset doubled as mute.
* **Clamped coefficient.** The envelope coefficient is clamped at zero, so the
  multiplier never sees a negative coefficient.
* **Sample rate.** The sample rate is set to 44100.0 Hz directly
  (`frequency = 441000` tenths of a hertz, accumulator modulo 200,000,000).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference models are in
`tb/drum_ref_pkg.sv`: a sine entry and a channel model with its envelope.

The RTL also carries a few concurrent assertions. They are active when a
simulator runs assertions, for example with Verilator's `--assert`:

* store addresses stay in range;
* the sequencer never steps past a channel's end;
* the envelope coefficient is never negative;
* the requested sample frequency is below half the clock;
* a pending trigger is always delivered on the next sample strobe.

| Testbench | What it checks |
|---|---|
| `tb_clockdiv` | 10000 ± 1 strobes in 4,535,100 clocks; spacing of 453 or 454 clocks; duty of `freq_out`; exact division at 1 MHz |
| `tb_sample_generator` | every entry of the 80 and 400 Hz tables, including known entries of the original 80 Hz ROM (0, 22, 45, 92, ..., −74, −51, −28, −4); wrap point; no motion without `step` |
| `tb_adsr_envelope` | coefficient, idle flag and phase on every strobe against a reference; phase lengths 4098/5466/8190/2045 worked out from the rates; restart from Decay |
| `tb_synth` | every output sample against the channel model through full sounds, a restart and a mute |
| `tb_signal_combiner` | random and extreme sums |
| `tb_controller` | at full size, every DAC word of about 32000 samples against a model of all six channels; sample rate; a trigger held for 8 ms gives one sound; simultaneous triggers, all six drums at once, restart, mute, natural end |
| `tb_button_sync` | bounces are rejected; press latency is `DEBOUNCE_CYCLES`+2; one pulse per press |
| `tb_seq_timer` | count after every clear; a single overflow pulse after 65536 ticks |
| `tb_sequence_store` | random writes and reads |
| `tb_sequencer` | with shortened timing: store clear, pass-through, recorded words and waits, simultaneous hits, channel-full stop, playback gaps and loop, channel wrap, timer restart on channel change, abort by the mode switch, overflow filler |
| `tb_drum_machine` | end to end with a 2 MHz clock and shortened timing: a whole session of live play, recording, three playback loops, mute, stop, channel wrap and mode abort; checks that each trigger starts its channels, DAC silence and motion, and that every mechanism occurred |
| `tb_drum_machine_full` | the same session with the top at its default parameters (about 14 million clocks, under 10 s of simulation) |
| `tb_drum_machine_channels` | all three channels in use, with shortened timing: different patterns in each, one channel filled to 25 commands, each played for two loops; checks the fired masks come back in order with no leaks between channels |

To run a testbench with Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/drum_pkg.sv tb/drum_ref_pkg.sv tb/tb_controller.sv --top-module tb_controller
./obj_dir/Vtb_controller
```

Use the same command with another `tb_*` file and its top module name.
`tb_drum_machine` and `tb_drum_machine_full` share their body,
`tb/tb_drum_machine_run.sv`, and select shortened or default timing through its
`FULL` parameter.

## Limits

These points have not been verified:

* The design has been linted, elaborated and synthesized generically
  (Verilator, and Yosys with its slang front end). It has not been run on an
  FPGA, and no timing has been closed for a particular device.
* The 20 MHz clock is slow for the six small 12 x 12 multipliers.
* The DAC levels were checked in simulation only. How they sound after the
  external filter and amplifier has not been checked.
