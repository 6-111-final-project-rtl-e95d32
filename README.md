# Digital effects box for guitar

This design changes the pitch of the individual notes in an instrument
signal. A guitar is sampled at 48 kHz. Eight FFTs, one per octave, find
which of the twelve notes of each octave are sounding and how loud they
are. An effect (pitch bend, vibrato or arpeggio) moves the frequency of
every detected note over time. A bank of direct digital synthesizers
(DDS) then plays the moved notes as sine waves at the detected loudness.
In effect the instrument is turned into a set of notes and resynthesized,
so the effect applies to each note on its own. That cannot be done with
one filter on the whole signal.

Everything is on one clock (49.85 MHz in the reference system) and is
paced by the 48 kHz audio sample strobe. The whole analysis and
resynthesis pipeline runs once per audio sample, 1039 clocks apart. The
user picks the effect and its settings with five push buttons on an
800 × 600 screen. The screen also shows the input and output note
spectra as two bar graphs.

```
audio_in (8 bit, 48 kHz) ──┬──> octave set 0 ──┐  sine, magnitude
audio_ready ─> frame_sync ─┤──> octave set 1 ──┤
                           │        ...        ├──> synthesizer ──> sound_out (20 bit)
                           └──> octave set 7 ──┘
                                   ^ fx, speed, intensity
buttons ─> debounce ─> gui ────────┘          set 0 notes ─> graphs ─> vga_rgb
```

Each octave set (`octave_chain`) is the same chain:

```
antialias_lpf -> frame_buffer (128 x 8) -> fft128 -> note_array
   -> speed_counter -> fx -> dds (12 channels) + mag_memory
```

## Octave sets: why there are eight FFTs

Musical pitch is logarithmic. Each octave doubles in frequency, so the
gap between neighbouring notes doubles too. An FFT resolves bins of
`f_sample / N`. One 128-point FFT fast enough for high notes could not
separate low ones. The design therefore uses eight 128-point FFTs.

- Set *i* samples at `280 · 2^i Hz`. The rates are 280, 560, 1120, … up to
  35 840 Hz.
- Each set covers the twelve notes D to C♯ of octave 2 + *i*. Set 0 covers
  D2 (73.42 Hz) to C♯3 (138.59 Hz), and set 7 covers D9 to C♯10.
- Rates and notes double together, so **every note lands on the same FFT
  bin in every set**. One bin table (`fxbox_pkg::NOTE_BIN_LO/HI`) serves all
  eight sets.
- Bin *b* is centred on `b · 2.1875 · 2^i Hz`. A note between two bins
  takes both. A note close to a bin centre takes one bin: E (42) and C♯ (63).

| note | D | D♯ | E | F | F♯ | G | G♯ | A | A♯ | B | C | C♯ |
|------|---|----|---|---|----|---|----|---|----|---|---|----|
| bins | 33–34 | 35–36 | 37–38 | 39–40 | 42 | 44–45 | 47–48 | 50–51 | 53–54 | 56–57 | 59–60 | 63 |

The frame buffers take their samples from a clock divider.
`frame_buffer` counts `DIV = 178036 >> i` system clocks per sample, and
49.85 MHz / 178036 = 280.0 Hz. Samples go into a 128 × 8 two-port RAM
(`frame_buffer_ram`). The write pointer always points at the oldest
sample, so a frame read from there is in time order.

A buffer that samples below 48 kHz aliases whatever lies above its own
Nyquist rate. Each set therefore has a low-pass filter (`antialias_lpf`)
on the 48 kHz stream ahead of its buffer:

- two cascaded one-pole sections, `y += (x − y) >> SHIFT`;
- `SHIFT = 6 − i`, clamped at 0;
- this gives a corner of about 120 Hz for set 0, rising one octave per set.

This filter is the simplest one that does the job. It is not a designed
response. Aliasing is reduced, not removed.

## One audio sample: the 1039-clock schedule

This timing is the core of the design. Every stage is sized to finish
between two audio samples.

`frame_sync` passes `audio_ready` through three flops and makes
`frame_pulse`, a one-clock pulse on each 48 kHz sample. On that pulse
every set does the following, in parallel and in lock step:

| clocks after pulse | what happens |
|---|---|
| 1 … 128   | frame buffer streams its 128 samples, oldest first, into the FFT |
| 129 … 576 | FFT computes: 7 stages × 64 butterflies, one butterfly per clock |
| 577 … 704 | FFT unloads the 128 bins in bit-reversed order; the note array adds each note's bins as they pass |
| 705 … 716 | note array sweeps the twelve notes, one per clock, each with magnitude, frequency word and timer |
| +1 each   | speed counter, then FX, each one register stage; FX writes the DDS frequency word and the magnitude memory |

About 720 of the 1038 clocks are used. The synthesizer runs on the same
pulse. For 12 clocks it sums `sine × magnitude` over every DDS channel
and then outputs one sample (see below). It therefore plays the notes
found one sample earlier.

At 49.85 MHz the divider of the 280 Hz buffer runs 178 036 clocks. Set 0
therefore gets a new sample only every ~171 audio samples. Its FFT still
runs on every audio sample, over a window that moves by one sample now
and then. A new note takes a full buffer (128 samples at the set's rate)
to reach full strength. That is 0.46 s in set 0 and 3.6 ms in set 7.

## The FFT (`fft128`)

This is a radix-2 decimation-in-frequency FFT that works in place on a
16-bit complex working memory. It does one butterfly per clock.

- **Load:** samples enter as `re = x << 7`, `im = 0`.
- **Butterfly:** each one writes `(a + b)/2` and `(a − b)·W/2`. W comes from a
  Q1.14 cosine/sine table computed at elaboration.
- **Scaling:** the transform is scaled by 1/128 and cannot overflow.
- **Unload:** the memory is read in address order, which is bit-reversed
  bin order. Each output carries its bin index (`xk_index`), 8-bit
  `xk_re`/`xk_im`, and the magnitude estimate `mag = |re| + |im|` (9 bits).
- **Strobes:** `done` pulses as computing ends, and `last` marks the final bin.

Only the top five bits of `mag` go on to the note array. A full-scale sine
(amplitude ±120) gives a note magnitude of about 4–5 out of 31. Lower
bits are dropped so that the noise floor and the remaining aliasing read
as zero. The price is coarse loudness. The output behaves more like
"which notes, roughly how loud" than like a faithful spectrum.

## Notes and their timers (`note_array`, `speed_counter`)

**Note array.** For each note the note array sums the magnitude of its
bins, saturating at 5 bits. After the last bin it sweeps notes 0 (D) to
11 (C♯), one per clock. For each note it outputs:

- `we` for one clock;
- `index_out`, which is also the DDS channel;
- `freq_out`, the note's 26-bit DDS word shifted left by the set number;
- `mag_out`;
- `t_out`, a 20-bit count of audio samples since the note's last onset.

An onset is a rise of more than `mag_tolerance` over the previous
sample's magnitude. The timer then returns to 0; otherwise it counts up.
The base words are `word = f · 2^26 · 12 / 49.85 MHz` for D2 … C♯3:
1186, 1257, 1331, 1410, 1494, 1583, 1677, 1777, 1883, 1995, 2113, 2239.

**Speed counter.** This turns that fast timer into the slow time base of
the effects. Per note it keeps a low counter, a high counter and the last
`t_in`. The low counter counts note updates up to
`count_max = (32 − speed) << 8`. That is 256 to 8192 samples, or 5 ms to
0.17 s per step. Each wrap steps the high counter, the 8-bit `t_out`,
which saturates at 255. A note restart (`t_in` is 0 or smaller than
before) clears both counters, so every effect starts again from the
note's own pitch.

## Effects (`fx`)

With `f` as the note's word and `t` as the speed-counter time:

- **Pitch bend:** `f + (f >> 7)·t`. The pitch rises by about 0.8 % per
  step, so an equal-tempered semitone takes about 7.5 steps.
- **Vibrato:** four steps on `t mod 4`: `f`, `f + d`, `f`, `f − d`.
  - `d = f >> (11 − intensity/4)`;
  - plus `f >> (18 − intensity/2)` when `intensity mod 4` is 2 or 3;
  - the intensity slider's 32 settings therefore span d from f/2048
    (0.05 %) at 0 to f/16 + f/8 (19 %) at 30 and 31. The steps are
    uneven: the second term makes settings 2 and 3 of each group of four
    larger than the next group's first.
- **Arpeggio:** a major chord up and down on `t mod 8`: root, third
  (`f + f/4`), fifth (`f + f/2`), octave (`2f`), tenth (`2f + f/2`), octave,
  fifth, third.

Results above 26 bits saturate. The effect select value 3 passes
frequencies through unchanged, but the GUI never selects it. Every note
update writes its DDS channel, whether or not the note is sounding. The
magnitude decides whether it is heard.

## Resynthesis (`dds`, `mag_memory`, `synthesizer`)

**DDS.** Each set has one 12-channel DDS. A channel counter visits one
channel per clock. On its turn a channel's 26-bit phase accumulator
advances by its frequency word, so

    f_out = (49.85 MHz / 12) · word / 2^26      (0.062 Hz per step)

The top 10 phase bits address a 1024-entry, 17-bit sine table computed
at elaboration. `sine_out` and `channel_out` leave together.

**Magnitude memory.** `mag_memory` holds each channel's latest magnitude.
It is written by the FX stage and read combinationally with
`channel_out`. The synthesizer therefore always sees the sine and the
magnitude of the same note.

**Synthesizer.** On `frame_pulse` the synthesizer adds `sine[d] · mag[d]`
over all eight DDSs for 12 clocks, which covers all 96 notes. It shifts
the sum right by 9, the smallest shift that fits the worst case into 20
bits. It then updates `sound_out` with a one-clock `sound_valid`.

## Screen and controls (`gui`, `graph`, `wet_graph_data`, `xvga`, `blob`, `debounce`)

`xvga` makes 800 × 600 at 72 Hz timing:

- 1040 × 666 totals, which the 50 MHz-class system clock drives directly;
- active-low syncs;
- `hcount`/`vcount`.

`debounce` accepts a button level after it has been stable for
`DEBOUNCE_CYCLES` (10 ms).

The GUI has six sliders, each holding 0–31:

| control | slider |
|---|---|
| 0 | bend speed |
| 1 | vibrato speed |
| 2 | vibrato intensity |
| 3 | arpeggio speed |
| 4 | delay time |
| 5 | delay intensity |

- Left and right move between the sliders, with wrap-around.
- Up and down step the current slider.
- Select on slider 0, 1/2 or 3 makes bend, vibrato or arpeggio the
  active effect. Reset starts in bend mode.
- `speed` is the speed slider of the active effect.

The GUI draws the following with the rectangle sprite `blob`:

- a border and the dividing lines;
- each slider as a bar with a knob 4 pixels per step, red for the current
  control;
- a red marker under the active effect.

Two `graph`s draw 12-bar spectra of set 0:

- **dry (left):** the note-array magnitudes.
- **wet (right):** the output of the effect. `wet_graph_data` maps each
  moved frequency back to the highest note whose word is not above it. A
  note pushed above C♯ of its octave (an arpeggio octave, say) therefore
  shows on the last bar.

## Top level (`effects_box`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | system clock; synchronous active-high reset |
| `audio_in` | in | 8 | signed sample from the codec interface (top bits of its word) |
| `audio_ready` | in | 1 | 48 kHz sample strobe, may be asynchronous |
| `sound_out`, `sound_valid` | out | 20, 1 | synthesized sample and its strobe |
| `btn_up/down/left/right/select` | in | 1 | raw buttons |
| `mag_tolerance` | in | 4 | onset threshold for all note arrays |
| `vga_rgb`, `vga_hsync`, `vga_vsync`, `vga_blank` | out | 3, 1, 1, 1 | registered display outputs |
| `delay_speed`, `delay_int` | out | 5 | delay settings from the GUI |

The parameters are:

- `NUM_SETS = 8`;
- `BASE_DIV = 178036`, the 280 Hz divider;
- `DEBOUNCE_CYCLES = 500000`.

Synthesis of the full design gives about 3.8 k cells, 2 k flip-flop bits
and 215 k memory bits. Most of the memory is the eight DDS sine tables and
the FFT working memories.

## What is not here, and what is this design's own

Not included. These are outside the module, and their signals are ports:

- the AC97 codec interface;
- the FPGA clock manager and power-on reset;
- the delay effect, of which only the GUI settings exist;
- a fourth effect slot, which passes notes through;
- the on-screen text labels.

Choices made where the source gives the function but not the circuit:

- **FFT:** the radix-2 core, its 1/N scaling and the Q1.14 twiddles. The
  reference used a vendor FFT core.
- **DDS:** its structure and its 1024-entry table. The reference used a
  vendor core.
- **Anti-alias filter:** the two-pole filter.
- **Note array:** it collects a whole frame before emitting. Because the
  bins come out bit-reversed, notes are sent as one 12-clock burst and
  not as each bin passes.
- **Pipeline hand-offs:** the streaming hand-off from buffer to FFT, and
  the register stages between note array, speed counter and FX.
- **Saturation:** the saturating slider, timer and frequency arithmetic.
- **Synthesizer:** it scales by the full 5-bit magnitude, not on/off, and
  holds its output between samples.
- **Timebase:** the speed counter's maximum is taken as
  `(32 − speed) << 8`, and the bend step as `f >> 7`.
- **Octave sets:** the eighth set (35.84 kHz, D9–C♯10) continues the doubling
  of the other seven.
- **Graphs:** both graphs show set 0.

Known limits:

- Loudness resolution is coarse, as described above.
- The low sets react slowly, because a new note must fill the buffer.
- An onset is seen only when the magnitude rises by more than
  `mag_tolerance` within one audio sample. The lower sets fill their
  buffers slowly, so a plucked note often rises too gradually to count.
  Its timer then keeps running from the last onset.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. To
build and run one with Verilator 5:

    verilator --binary --timing -Irtl -y rtl +libext+.sv \
        rtl/fxbox_pkg.sv tb/tb_fft128.sv --top-module tb_fft128 -o sim
    ./obj_dir/sim

Replace `tb_fft128` with any testbench name. The simulator has no X
state, so every register that is read is reset.
Two assertions guard the hand-offs. The DDS accepts frequency writes
only to channels 0–11. The note array must not receive FFT bins while it
is sweeping its notes. Verilator checks both when built with `--assert`. Whole-design benches:

- `tb_effects_box`, about 12 s for 4.9 M clocks:
  - plays an A9 tone;
  - presses the buttons through bend, vibrato and arpeggio;
  - stops the tone and plays it again.

  It checks every FX output of set 7 against a model of the effect, and
  checks the wet-graph indices and the GUI state. It counts each
  mechanism, from frame-buffer writes and FFT frames to onsets,
  speed-counter steps and restarts, each effect, DDS writes, synthesizer
  output, the wet-graph clamp, GUI moves and effect switches. It fails if
  any of them never happened. Its debouncers are shortened to 4 clocks;
  everything else is at default.
- `tb_effects_box_full`, under 1 s, with all defaults: an A9 tone until
  the top set's buffer fills. It checks that set 7 reports A as its
  strongest note, that the DDS holds A9's word, and that the output is
  non-zero, moves like a tone, and comes once per audio sample. It also
  checks the 1040-clock VGA line.
- `tb_octave_sets`, about 50 s for 46 M clocks, with all defaults. It
  plays one note in each of the eight octave sets in turn and checks, per
  set:
  - the sample period `178036 >> i`;
  - that the note is detected as the strongest;
  - the DDS word.

Block benches that depend on a size override it to stay short. For
example, `tb_frame_buffer` uses `DIV = 7`, and `tb_synthesizer` uses two
DDS inputs. To change the design, start from `fxbox_pkg.sv`. It holds
the widths, the effect encoding, the note words and the bin table. The
bin table must be recomputed if the FFT size or the 280 Hz base rate
changes.

## Files

- `rtl/fxbox_pkg.sv`: shared widths, types and note tables.
- `rtl/effects_box.sv`: the top.
- `rtl/octave_chain.sv`: one octave set.
- One file per block, named after its module: `frame_sync`, `antialias_lpf`,
  `frame_buffer`, `frame_buffer_ram`, `fft128`, `note_array`,
  `speed_counter`, `fx`, `mag_memory`, `dds`, `synthesizer`, `gui`, `blob`,
  `graph`, `wet_graph_data`, `xvga`, `debounce`.
- `tb/tb_<block>.sv`: one testbench per block, plus the three whole-design
  benches above.
