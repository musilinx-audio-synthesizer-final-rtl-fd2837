# MusiLinx: a 32-voice FPGA subtractive synthesizer

MusiLinx generates audio in FPGA fabric instead of in software. It has 32
independent voices. Each voice is an oscillator (triangle, sawtooth or square),
an ADSR envelope and an amplifier. The 32 voices are tuned one semitone apart,
from C3 (130.81 Hz) to G5 (783.99 Hz). A balanced tree of mixers combines them
into one 16-bit sample stream. That stream is framed as AES3 sub-frames on an
AXI Stream Audio link to an I2S transmitter, which drives the board's audio
codec.

A soft processor sits outside this RTL. It sets every voice's parameters over
AXI-Lite and plays notes by writing one GPIO trigger bit per voice. A tempo
generator and a step sequencer can also trigger notes without the processor.

The central idea is **one sample pulse, many consumers**. Everything runs on
the fast system clock (up to 100 MHz). The slow 96 kHz audio clock is only
sampled: each of its rising edges becomes a single-cycle pulse on the system
clock. That pulse steps every oscillator and envelope, advances the tempo
counter, and sends the previously mixed sample to the codec. Between two pulses
(about 1040 system clocks) the datapath has plenty of time to compute the next
sample. That is why the oscillator can use a slow bit-serial divider.

## Signal chain and timing

```
aud_clk ─► audio_pulse_gen ──pulse──┬─────────────┬──────────────────┬────────────┐
                                    ▼             ▼                  ▼            │
gpio_trigger[i] ─┐           tempo_generator ─► sequencer ─trig─┐    │            │
seq_route[i] ────┴──────── OR ◄─────────────────────────────────┘    │            │
                           ▼                                         ▼            ▼
                 audio_voice[i] (oscillator → VCA ← ADSR)  x32 ─► mixer_tree ─► audio_sample_to_axis_audio ─► AXIS
AXI-Lite ─► axil_decoder ─► voice / sequencer / tempo registers
```

Latency after a sample pulse, in system clocks:

| stage | clocks | notes |
|---|---|---|
| audio clock edge → pulse | 4–5 | 4-flop synchronizer + edge detector |
| oscillator | 34 | 33-step restoring divider scales the phase to 16 bits |
| ADSR | 1 | the envelope updates on the clock after the pulse |
| VCA | 2 | two registered multipliers |
| mixer tree | 5 | one registered mixer per level, log2(32) levels |
| stream | next pulse | a frame carries the sample computed in the previous period |

The sample clock period must therefore exceed about 45 system clocks. At
100 MHz / 96 kHz it is about 1042. The oscillator asserts that sample pulses
never arrive while its divider is busy.

## The voice (`audio_voice`)

**Oscillator.** A two-state machine (RISE, FALL) spends `half_period` samples in
each state, so `half_period = f_sample / (2 f)`. A phase counter `p` counts the
samples within a state. Each waveform's value at phase `p`:

| wave | RISE | FALL |
|---|---|---|
| triangle (`00`) | `p·65535/hp` | `(hp−p)·65535/hp` |
| sawtooth (`01`) | `p·65535/(2hp)` | `(hp+p)·65535/(2hp)` |
| square (`10`) | `0` | `0xFFFF` |

The sawtooth keeps rising through FALL and returns to 0 when RISE begins. The
ramps use the full 16-bit range, and `half_period = 0` silences the
oscillator. The ramp formula, the divider and the full-scale square are this
implementation's choices; the source design specifies only the state machine
and what each wave does in each state.

**ADSR.** The envelope level is a 16-bit counter driven by five states:

- WAIT holds 0. A high trigger starts ATTACK.
- ATTACK adds `attack` on each sample until the level reaches 0xFFFF.
- DECAY subtracts `decay` until the level reaches `sustain`.
- SUSTAIN holds the level. It moves to RELEASE only when at least
  `sustain_duration` samples have passed *and* the trigger is low.
- RELEASE subtracts `release` until the level reaches 0, then returns to WAIT.

The step values are per-sample increments. For a segment that should last
`t` seconds, use `step = (2^16−1)/(t·f_sample)`; for the sustain, use
`sustain_duration = t·f_sample`. A step of 0 holds the level forever. Two
choices are this implementation's own:

- A rising trigger during RELEASE restarts ATTACK from the current level.
- A trigger dropped during attack or decay does not shorten the note (it
  behaves like a plucked string).

**VCA.** The VCA computes `out = ((wave · env) >> 16) · volume >> 16` with
two registered multipliers. Here `wave` is U(16,0), and `env` and `volume`
are U(0,16) fractions, so each multiplier keeps the integer half of its
product.

## Mixing (`mixer`, `mixer_tree`)

A mixer adds two unsigned samples in one of two modes:

- **Clipping** (`MODE=0`): a sum above 0xFFFF saturates to 0xFFFF.
- **Averaging** (`MODE=1`): the output is `(a+b)>>1`, which never overflows.

In averaging mode, every input of a tree must sit at the same depth. Otherwise
the inputs nearer the root weigh more. `mixer_tree` therefore pads N inputs
with zero leaves up to a power of two. For 32 voices each voice contributes
exactly 1/32. The top uses averaging (`MIX_MODE=1`), so 32 simultaneous voices
cannot clip.

## Output framing (`audio_sample_to_axis_audio`)

Each sample pulse sends one frame of two sub-frames. Both carry the same mono
sample. `TID` is the channel number (0, then 1). `TDATA` is laid out as:

| bits | content |
|---|---|
| 3:0 | preamble: `0001` BSYNC (channel 0 of frame 0), `0010` SF1SYNC (other channel 0), `0011` SF2SYNC (channel 1) |
| 11:4 | zero (a 16-bit word in a 24-bit field) |
| 27:12 | the sample |
| 28, 29 | validity and user bits, always 0 |
| 30 | channel-status bit `CHANNEL_STATUS[frame]` |
| 31 | parity, always 0 |

The frame number runs from 0 to 191, one channel-status block. The I2S
transmitter that receives the stream ignores the parity and channel-status
bits. The `CHANNEL_STATUS` default is a placeholder; set it as your receiver
requires.

There is deliberately no FIFO, so latency stays at one sample. `TVALID` is
held until `TREADY`. A sample pulse that arrives while a frame is still
pending is dropped and flagged on `dropped` (`frame_dropped` at the top).

## Rhythm (`tempo_generator`, `sequencer`)

- **Tempo generator.** Counts sample pulses and emits a one-clock beat every
  `tempo_rate + 1` samples. Use `tempo_rate = 60·f_sample/bpm − 1`; for
  example, 120 bpm at 96 kHz gives 47999.
- **Sequencer.** Steps through bits 0 to `sequence_length−1` of a 32-bit
  `sequence`, one step per beat. Its trigger is the current bit. A run of ones
  is a held note. A `1` after a `0` strikes the note again.

In the top, the sequencer trigger is ORed into every voice whose `seq_route`
bit is set.

## Register map (AXI-Lite, 32-bit words)

The top decodes one AXI-Lite port into 32-byte windows. An unmapped address
returns DECERR.

| address | block | registers (offset: name) |
|---|---|---|
| `0x20·i` (i = 0..31) | voice i | 0x00 wave_select, 0x04 half_period, 0x08 attack, 0x0C decay, 0x10 sustain, 0x14 sustain_duration, 0x18 release, 0x1C volume |
| `0x400` | sequencer | 0x0 sequence, 0x4 sequence_length |
| `0x420` | tempo generator | 0x0 tempo_rate |

All registers reset to 0, which means silent voices, no sequence and one beat
per sample. They can be read back. Each slave takes one write and one read at
a time. A write needs AWVALID and WVALID high together, and the response is
always OKAY.

## What is outside this RTL

These parts are vendor IP or software. Their connections are the top-level
ports:

- the soft processor and its keyboard and interrupt handling;
- the GPIO register (`gpio_trigger`, `seq_route`);
- the I2S transmitter (`aud_clk` and the `m_axis_*` stream);
- the I2C bridge and the codec.

The keyboard modes (single notes, chords, piano layout, preset songs) are
processor software that writes the trigger bits. The hardware allows any
combination of the 32 voices to play at once.

## Departures and limits

- **Tuning.** With an integer `half_period` at 96 kHz, 25 of the 32 notes are
  within ±5 cents of equal temperament. The worst note is C#5, at −8.2 cents
  (`half_period` 87). The source design claims ±5 cents for every voice.
  Reaching that would need a fractional phase step, which this design (like
  its source) does not have.
- **Assumed elsewhere.** These details were chosen here:
  - how the sequencer is wired to the voices (`seq_route`);
  - the address map and interconnect;
  - the mixer mode used in the system;
  - the synchronizer depth (4);
  - register widths of 32 bits for `sequence` and `tempo_rate`;
  - reset values;
  - the channel-status word.
- **Plain flip-flops.** The clock-domain synchronizer is written as ordinary
  flip-flops. On an FPGA, mark them as a synchronizer for timing analysis, for
  example with the vendor's CDC macro or an `ASYNC_REG` attribute.
- **Reset lint warning.** Verilator reports `rst_n` as used both
  synchronously and asynchronously. The synchronous use is only the
  `disable iff` of the assertions.

## Files

- `rtl/musilinx_pkg.sv`: the shared package. It defines the sample type,
  waveform and envelope enums, the AXI-Lite request and response structs,
  and the AES3 constants.
- `rtl/musilinx_top.sv`: the top level.
- The blocks:
  - `audio_pulse_gen`
  - `audio_voice`, with `oscillator`, `adsr` and `vca`
  - `mixer` and `mixer_tree`
  - `audio_sample_to_axis_audio`
  - `tempo_generator` and `sequencer`
- Helpers: `axil_regs` (register file), `axil_decoder` (interconnect) and
  `udiv_seq` (divider).
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_musilinx_top.sv`: the end-to-end test, described below.
- `tb/tb_musilinx_top_clip.sv`: the same end-to-end flow with 8 voices and
  the mixer tree in clipping mode. It requires at least one saturated sum.
- `tb/tb_tuning_workload.sv`: the tuning measurement. It plays the 32 notes
  one at a time through the whole design and measures each pitch from the
  output stream. It prints the error in cents for every note and checks the
  count of notes within ±5 cents (25).

### End-to-end test

`tb_musilinx_top` runs the top at its default parameters (32 voices, with
100 MHz / 96 kHz clocks) for 420 sample periods. In that time it:

- configures all voices over AXI-Lite;
- plays a single note, a chord, a retrigger, random notes and a sequencer
  rhythm;
- checks every stream sub-frame against a model of the voices, the mixer
  tree, the tempo generator and the sequencer.

It also requires each of these to happen at least once: every waveform,
every envelope state, a retrigger, a tempo beat, a sequencer note, stream
back-pressure, the 192-frame wrap and a DECERR.

## Simulating

With Verilator 5, pass the package first:

```
verilator --binary --timing --assert -Irtl rtl/musilinx_pkg.sv tb/tb_musilinx_top.sv --top-module tb_musilinx_top
./obj_dir/Vtb_musilinx_top
```

The same command works for any `tb/tb_<block>.sv` with its module name. The
end-to-end test takes a few seconds. To change the number of voices, override
`NUM_VOICES` on `musilinx_top`; the address map and the mixer tree follow it.
