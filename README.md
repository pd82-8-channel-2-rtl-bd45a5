# PD82: an 8-channel, 2-operator phase distortion synthesizer

PD82 is a small sound chip for a microcomputer. It makes eight stereo voices. Each voice
is a pair of sine oscillators, and the first oscillator's output bends the phase of the
second. This "phase distortion" turns one table lookup per oscillator into a tone that
can be bright, hollow or buzzing, depending on how hard the first oscillator pushes.
A host CPU sets pitches, volumes, waveforms and stereo positions by writing to sixteen
write-only byte registers. The chip gives out two 15-bit words, left and right. A plain
binary-weighted DAC can turn them into sound. There is no envelope generator; the host
changes volumes itself to shape notes.

The whole chip has one arithmetic engine, which serves all eight channels in turn. A
channel's slot is 26 clocks, so one round of eight channels takes 208 clocks. At 50 MHz
that gives a new stereo sample about every 4.16 µs (240.4 kHz).

## The operator

An operator is one oscillator. Each time it is used, it does this:

```
phase  = phase + frequency                    (18 bits, wraps)
index  = bits 17:8 of (phase + feedin * 128)  (10 bits, 1024 steps per period)
amp    = volume * sine(index)                 (18-bit signed)
```

- **Number formats.**
  - `frequency` is the 16-bit phase increment, with 8 fraction bits. Written as 8.8, it is
    measured in table steps per sample.
  - The phase has 10 integer bits and 8 fraction bits.
  - `volume` is unsigned, 8 bits.
  - `sine` is signed, 9 bits, in −255…+255.
- **Pitch.** The tone frequency is `frequency / 2^18 × f_sample`. At 50 MHz,
  `frequency = 1` is about 0.92 Hz, and the top value gives about 60 kHz.
- **Feedin.** The feedin is 11 bits, signed. It is shifted left by 7, so one feedin step
  is half a table step. Its range of ±256 covers ±1/8 of a period.
- **Stateless.** The operator keeps no state between uses. It is handed its stored phase
  and gives back the advanced phase, so one instance can serve all sixteen operators.
- **Pipeline.** After the start cycle come these steps: phase calculation, ROM strobe,
  ROM read, multiply, and store. The result is valid five clocks after `start`.
  (`rtl/pd82_operator.sv`)

### Sine table and wave modes

`rtl/pd82_sine_rom.sv` holds a quarter of a sine wave: 256 unsigned 8-bit entries,
`T[i] = floor(255·sin(iπ/510))`. These are computed while the design is elaborated, not
loaded from a file.

The top two index bits choose the quadrant:
- The second and fourth quadrants read the table backwards.
- The third and fourth quadrants negate the sample.

The 4-bit wave mode turns each quadrant on or off. Bit 3 is the first quadrant (index
0–255) and bit 0 is the last. A quadrant that is off reads 0. Some useful settings:
- `1111`: a full sine.
- `1100`: a positive half-wave followed by silence.
- `1010`: a quarter-wave rising from zero, silence, a quarter-wave falling from zero,
  silence.
- `1000`: one rising quarter-wave per period, then silence.

Wave modes apply to operator 0 as well. There they shape the modulating signal, not the
output.

## A channel: modulation, then panning

`rtl/pd82_channel.sv` runs the two operators of one channel, one after the other, on a
single shared `pd82_operator`:

1. **Operator 0** runs with feedin 0.
2. **Feedback.** The top 9 bits of operator 0's 18-bit amplitude (bits 17:9, in
   −256…+255) become the feedin of operator 1. Operator 0's volume therefore sets the
   modulation depth: at volume 0 operator 1 is a pure sine.
3. **Operator 1** runs. The top 9 bits of its amplitude are the channel value, so
   operator 1's volume is the channel's loudness.
4. **Panning.** The channel value is multiplied by the unsigned 8-bit left and right
   pannings. Bits 18:8 of each product are kept, giving two 11-bit signed outputs
   (`rtl/pd82_panning.sv`). Panning `$00` is silent and `$FF` is almost full level.

Because the modulation is a phase offset, not a frequency offset, it is bounded. Operator
0 at full volume moves operator 1's phase by at most ±1/8 of a period.

## The 26-clock slot

`rtl/pd82_sequencer.sv` counts the slot cycle (0–25) and the channel (0–7). Everything
else is keyed to those two counters. This schedule is the key to the design, because
several channels' work overlaps in one slot:

| cycle | chip | channel engine (current channel *c*) |
|---|---|---|
| 0–1 | *c*'s configuration and phases presented; captured at 1 | start |
| 2 | previous channel's panned output added to accumulators | operator 0 started (3) |
| 3 | in channel 0's slot: accumulators asserted on the pins | |
| 4 | in channel 0's slot: accumulators cleared | operator 0: phase |
| 5–22 | host bus sampled for a write | operator 0 result at 8; operator 1 started at 16, result at 21 |
| 23 | captured host write applied | left/right panning computed |
| 24 | key on / key off requests applied | channel done |
| 25 | *c*'s new phases stored; *c*'s output fetched for the mixer | |

Three consequences are easy to miss:

- **Output timing.** A channel's output is added to the sum during the *next* slot. So
  channel 7 of a frame reaches the sum in cycle 2 of channel 0's slot. In cycle 3 that
  sum goes to the pins, and in cycle 4 the sum is cleared. The output pins change exactly
  once every 208 clocks. Each output word holds channels 0–7 from the same round.
  (`rtl/pd82_mixer.sv`)
- **Register writes.** A write to a channel register takes effect in cycle 23. The
  engine took its copy of the configuration in cycle 1, so the write is heard the next
  time that channel comes round.
- **Key on.** A key on in cycle 24 clears the channel's phases. If that channel is the
  one whose slot it is, the store in cycle 25 is skipped. Otherwise the engine's advanced
  phases would overwrite the cleared ones.

## Host interface and registers

The pins are:
- `data[7:0]` and `address[3:0]`;
- `ce_n` and `we_n`, both active low.

The interface is sampled, not edge-triggered (`rtl/pd82_host_if.sv`):
- In slot cycles 5–22, each clock with `ce_n` and `we_n` both low records the address
  and the data. The last such sample wins.
- In cycle 23 the recorded write is applied.
- A write strobe outside cycles 5–22 is lost.
- At most one write per 26-clock slot is accepted.

So a host must hold each write for longer than 8 clocks (cycles 23–4), or pace its writes
to the slot. The inputs are not synchronized; an asynchronous host should add a
synchronizer in front of the chip.

| addr | register | bits |
|---|---|---|
| $0 | channel select for $6–$F | `xxxxxCCC` |
| $1 | key on, one bit per channel | `76543210` |
| $2 | key off, one bit per channel | `76543210` |
| $3–$5 | unused | |
| $6 / $7 | left / right panning | 8 bits |
| $8 / $9 | operator 0 frequency low / high byte | 16 bits |
| $A | operator 0 volume (modulation depth) | 8 bits |
| $B | operator 0 wave mode | `xxxxMMMM` |
| $C–$F | the same for operator 1 (volume = loudness) | |

How the registers behave (`rtl/pd82_regfile.sv`):
- **Write-only.** Nothing can be read back.
- **Key on / key off.** Writing $1 or $2 replaces the whole pending byte, so a second
  write before cycle 24 overrides the first. A pending key on resets both phases of its
  channel. It wins over a pending key off of the same channel; that off stays pending and
  takes effect one slot later.
- **Channel off.** A channel that is off still runs through the engine, but the mixer
  adds zero for it.

## Self test

The `test_n` pin is active low (`rtl/pd82_bist.sv`).
- **While `test_n` is low:**
  - The engine, the sequencer and the mixer are frozen.
  - Every channel is loaded with a preset: operator 1 wave mode `1111`, both pannings
    `$FF`, and a pending key on.
  - Operator 1 of each channel also gets a fixed frequency and volume:

    | channel | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
    |---|---|---|---|---|---|---|---|---|
    | operator 1 frequency | 10 | 40 | 80 | 120 | 160 | 200 | 240 | 280 |
    | operator 1 volume | $FF | $55 | $24 | $1C | $17 | $11 | $0F | $0D |

  - Operator 0 keeps whatever it had.
- **When `test_n` goes high:** the chip plays this chord. After the first output frame,
  `pass_n` is driven low as long as neither output reaches 2^14 (bit 14 set).
- **Why this works as a test.** Each channel is bounded by ±128, so eight channels sum to
  at most 1024. An output at 2^14 therefore means broken arithmetic.
- **Leaving test mode.** Test mode lasts until `reset_n`.
- **Reset.** `reset_n` is asynchronous and active low. It clears all registers, phases
  and outputs.

## Where this design departs from the original description

- **Negative half of the sine.** The original implementation forms the negative half-wave
  as the sample minus 256 and mirrors the third quadrant. That is not a negated sine.
  This design negates the sample, which gives the sine that the operator formula
  describes.
- **Phases and settings are stored separately.** In the original, a host write in a slot
  made the engine's phase update for that slot be thrown away, which made the channel
  skip a step. Here, host settings and phases are stored apart. The only skipped phase
  store is the key-on case above.
- **Pass polarity.** The description defines Pass as an active-low pin that signals a
  good result. The original logic drives it low on *failure*, checking only the left
  output. This design follows the description, checks both outputs, and waits for one
  output frame before driving Pass.
- **Reset and test priority.** In the original, the test input overrides reset. Here,
  reset wins, and `test_n` is sampled on the clock.
- **Channel-select reset.** The channel-select register resets to 0; the original leaves
  it unset.
- **Handshakes.** The operator and the channel engine use start/done handshakes, not
  free-running counters aligned by reset. The cycle numbers of the schedule are
  unchanged. The two-clock feed and fetch windows of the original schedule are one clock
  here.
- **Not built.** Improvements the original description only suggests are not built: a
  log-domain sine table, synchronized bus capture, and serial audio output.

## Files

- **`rtl/pd82_pkg.sv`** holds the shared constants, the slot cycle numbers, the
  configuration structs and the self-test preset.
- **`rtl/pd82.sv`** is the top. It wires together:
  - `pd82_sequencer`;
  - `pd82_host_if`;
  - `pd82_regfile`;
  - `pd82_channel`, which contains `pd82_operator`, which contains `pd82_sine_rom`, and
    also uses `pd82_panning`;
  - `pd82_mixer`;
  - `pd82_bist`.
- **Synthesis size.** The design synthesizes to about 475 cells and 1300 flip-flop bits.
  It also has 2 kbit of table ROM.

## Testbenches

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each compares the block
with integer reference arithmetic from `tb/pd82_ref_pkg.sv`, which works straight from the
formulas above. Each prints `TB_RESULT checks=… failures=…`.

- **`tb/tb_pd82.sv`** tests the whole chip through its pins.
  - A host process programs channels, keys them on and off, and makes writes the chip
    must miss. It also runs the self test.
  - A cycle-level model of the chip, written from the schedule and the register map,
    predicts both outputs and Pass on every clock.
  - It also checks the 208-clock output period.
  - It counts each behaviour and fails if one never occurred. The behaviours are: key
    on/off, re-key during a store, missed writes, modulation, gated quadrants, uneven
    panning, negative sums, test hold, and Pass.
- **`tb/tb_pd82_selftest.sv`** runs the self-test chord for 26,215 frames. That is one
  full period of channel 0. Each frame is compared with a closed-form sum of the eight
  tones. Pass must stay low throughout, and the largest output seen is 200.

To simulate with Verilator 5, for example the full-chip test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/pd82_pkg.sv tb/pd82_ref_pkg.sv tb/tb_pd82.sv --top-module tb_pd82
./obj_dir/Vtb_pd82
```

For another test, replace `tb_pd82` with that testbench's name. `verilator --lint-only -Wall -Wno-fatal
-Irtl -y rtl rtl/pd82_pkg.sv rtl/pd82.sv` lints the design. The design has no
parameters to set: the channel count and the slot length are package constants in
`pd82_pkg`, and the schedule depends on them.
