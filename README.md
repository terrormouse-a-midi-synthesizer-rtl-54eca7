# TerrorMouse synthesizer peripheral

TerrorMouse is a polyphonic MIDI synthesizer for an FPGA board. A soft
processor reads MIDI bytes from a UART, works out which notes are sounding,
and writes note commands into a memory-mapped peripheral. The peripheral
generates the sound in hardware. This repository holds that peripheral,
`opb_synth`, in synthesizable SystemVerilog.

The peripheral contains two independent sound engines, each with six voices.
Only one is heard at a time:

* **Waveguide bank**: six Karplus-Strong plucked-string voices. Each voice is
  a delay line closed into a loop through a two-tap low-pass filter, and is
  started by filling the line with noise.
* **FM synthesizer**: six voices of two-operator frequency modulation. A
  cosine modulator bends the phase of a cosine carrier. Ten carrier-to-modulator
  ratios give ten different timbres.

Every engine makes one 16-bit sample per 2048 cycles of the 50 MHz clock,
which is 24.414 kHz. A register chooses the engine. The chosen sample is then
serialised to an AK4565 audio codec.

```
             OPB bus
                |
          +-----v------+   en/rst/len x6   +-------------+
          | synth_regs |------------------>| waveguide x6|--+ 16 bit x6
          |            |   en/theta x6     +-------------+  |
          |            |------------------>|  fm_synth   |--|--+ 16 bit
          |            |   FM_MOD          | (cosine_rom)|  |  |
          |            |------------------>+-------------+  |  |
          |            |   SYNTH_SEL     +-----------------v--v--+
          |            |---------------->| sample_mixer          |
          +------------+                 | 19-bit adder + mux    |
                                         +-----------+-----------+
                                                     | 16 bit
                                               +-----v-----+
                                               | audio_out |--> AK4565 pins
                                               +-----------+
```

## Programming model

The peripheral decodes a 256-byte window at `C_BASEADDR` (default
`0xFEFF0300`). Offsets are the low address byte. Voices are numbered v = 0..5.

| Offset      | Name      | Bits | Meaning                                         |
|-------------|-----------|------|-------------------------------------------------|
| `0x10+16v`  | WG_EN     | 0    | waveguide v enable                              |
| `0x11+16v`  | WG_RST    | 0    | waveguide v: reinitialise the delay line        |
| `0x12+16v`  | WG_LEN    | 7:0  | waveguide v delay-line length N (1..255)        |
| `0x70+16v`  | FM_EN     | 0    | FM voice v enable                               |
| `0x72+16v`  | FM_THETA  | 31:0 | FM voice v carrier phase increment              |
| `0xF0`      | FM_MOD    | 3:0  | FM ratio code, shared by all six FM voices      |
| `0xFF`      | SYNTH_SEL | 0    | 0 = FM synthesizer, 1 = waveguide bank          |

All registers are write-only. Reads are acknowledged and return zero. The
byte-wide registers take the bus's first byte lane (OPB bits 0-7, `[31:24]`
here). The master must therefore replicate a byte store on all four lanes.
FM_THETA takes the whole word. Each access is acknowledged on the clock
after the peripheral sees `OPB_select`. Every register clears on `OPB_Rst`.

To play a plucked note on voice v:

1. Write N to WG_LEN.
2. Write 1 to WG_EN.
3. Write 1 to WG_RST, then 0.

The line is refilled with noise, starting when WG_RST falls. The note then
sounds and dies away by itself. Writing 0 to WG_EN silences the voice at once.

To play an FM note on voice v, write its increment to FM_THETA and 1 to
FM_EN. Write 0 to FM_EN to stop it. The tone frequency is
`FM_THETA * 24414 Hz / 2^20`.

The controlling software handles the rest. It allocates voices, ignores a
note when all six voices of the engine are busy, and turns every voice off on
a program change. It is not part of this RTL. The end-to-end testbench
contains a model of it.

## The waveguide voice (`waveguide`, `delayline`)

The waveguide is the part that needs the most explanation.

### The recurrence

Each voice computes

```
y[n] = -0.5 * ( y[n-N] + y[n-N-1] )
```

This is a delay of N samples fed back through `H(z) = -0.5 (1 + z^-1)`. The
filter averages two neighbouring samples, so it damps high frequencies more
than low ones. Harmonics therefore decay faster than the fundamental, and
short (high) strings decay faster than long ones. At low frequencies the loop
gain is close to 1, so low notes ring for a long time.

The minus sign makes the signal invert on every trip round the loop. A
waveform then repeats after two trips, 2N+1 samples, and only odd harmonics
survive. The note sounds at about fs/(2N+1), an octave below fs/N. Any table
that maps keys to N should allow for this.

The sign is a parameter. `NEG_LOOP = 1` (the default) gives the -0.5 filter
above. `NEG_LOOP = 0` gives the textbook +0.5 filter,
`y[n] = 0.5 * (y[n-N] + y[n-N-1])`. Its period is N+0.5 samples, so
N = fs / f. The original description gives both forms in different places;
the default follows the hardware section. N is an integer, so high notes, which need
short lines, land slightly out of tune. No fractional-delay interpolation is
built.

### Storage and schedule

The line is one 256 x 16 single-port RAM (`delayline`), the size of one FPGA
block RAM. It is used as a real shift register rather than as a circular
buffer. Word k holds `y[n-1-k]` for k = 0..N, so N+1 words are used and N can
be at most 255. Once per 2048-clock period the state machine does three
things:

1. It reads words N-1 and N (`y[n-N]` and `y[n-N-1]`) and forms the new
   sample. The one overflowing case, `-(-32768)`, saturates to 32767.
2. It walks k from N-1 down to 0 and copies word k into word k+1. Each word
   takes a read, a cycle of RAM latency and a write: three clocks.
3. It writes the new sample into word 0 and puts it on `sample_out`.

`busy` is high for 3N+4 clocks. That is 769 clocks at N = 255, well inside
the 2048-clock period. The output then holds until the next period.

The RAM control signals are registered. Whatever a state sets, the RAM does
on the next clock, and read data come one clock after that. The state names
in the source say which word is in flight.

### Excitation, enable and reset

The excitation is white noise from a 16-bit LFSR (`x^16+x^14+x^13+x^11+1`),
halved in amplitude. The LFSR restarts from the same seed (`NOISE_SEED`) on
every reset, so every pluck starts from the same waveform, like a stored
excitation table. When WG_RST falls, words 0..N are written at one per clock.
This takes at most 256 clocks, after which the voice runs.

`reset` only acts while `enable` is high. While `enable` is low the output is
0, no work is done, and the line keeps its contents, so re-enabling resumes
the old note. After a system reset the line counts as unloaded and the voice
stays silent until it is reset once.

## The FM voices (`fm_synth`, `cosine_rom`)

Each voice computes `cos(theta_c + I*cos(theta_m))` with two 32-bit phase
accumulators. Accumulator bits [19:12] index a 256-word table that holds one
cosine period (`round(32767*cos(2*pi*i/256))`, stored in `cosine_rom.hex`).
The 12 bits below them are the fraction. Every period the carrier phase
advances by FM_THETA (`w_c`). The modulator phase advances by `w_m`, which
FM_MOD derives from `w_c`:

| FM_MOD | w_m              | Program / timbre    |
|--------|------------------|---------------------|
| 0      | 0 (pure sine)    | 1 Sine              |
| 1      | 0xF00 (89 Hz)    | 2 Weird             |
| 2      | w_c / 256        | 3 Too Much Vibrato   |
| 3      | w_c              | 4 Trumpet           |
| 4      | 1.5 w_c          | 5 Electric Guitar I |
| 5      | 2 w_c            | 6 Clarinet          |
| 6      | 2.5 w_c          | 7 Electric Guitar II|
| 7      | 3 w_c            | 8 Cello             |
| 8      | 3.5 w_c          | 9 Metallic Organ    |
| 9      | 4 w_c            | 10 Carnival         |
| 10-15  | 0                |                     |

The modulation depth I is fixed. The modulator's cosine is a signed value,
and its upper byte (-128..127 table steps, about ±π radians) is added to the
carrier's table index.

One ROM serves all voices. A pass starts at the beginning of each period and
gives each voice six clocks:

1. look up the modulator;
2. latch the result;
3. advance the modulator phase;
4. look up the carrier at the offset index;
5. latch the voice sample, or 0 if the voice is disabled;
6. advance the carrier phase.

After 36 clocks the six samples are summed in 19 bits. Bits [18:3] appear on
`sample_out` 39 clocks into the period. Disabled voices keep advancing their
phases.

## Mixing and audio output (`sample_mixer`, `audio_out`)

`sample_mixer` adds the six waveguide samples in 19 bits, so even six
full-scale samples cannot overflow, and keeps bits [18:3]. The FM engine
mixes its own voices. SYNTH_SEL picks one of the two, and the result is
registered.

`audio_out` derives the codec clocks from the 50 MHz clock with a 5-bit
counter:

* MCLK is 12.5 MHz (counter bit 1).
* BCLK is 1.5625 MHz (inverted counter bit 4).
* LRCK toggles every 16 bits, which is 48.828 kHz.

Once per bit, on the clock edge where BCLK falls, the next data bit goes out
on SDTI. The first bit of each word captures the current sample, and the word
is sent MSB first. LRCK changes together with that first bit. The codec
expects stereo at 48.8 kHz, but the design runs at 24.4 kHz mono, so each
sample goes out in four consecutive words: left, right, left, right. Chip
select is held high, because the codec's control registers are never
written.

## Timing summary

| Event (clocks from the start of a 2048-clock period) | Clock |
|------------------------------------------------------|-------|
| FM pass                                              | 0-36  |
| FM `sample_out` valid                                | 39    |
| waveguide `sample_out` valid (N = 255 worst case)    | ≤ 771 |
| codec words loaded                                   | 15, 527, 1039, 1551 |

All counters clear on `OPB_Rst`, so every engine uses the same period. The
words loaded at 1039 and 1551 always carry the current period's sample. The
words at 15 and 527 may still carry the previous one.

## Where this RTL makes its own choices

These points are this implementation's decisions, not fixed by the original
design:

* **Excitation:** the noise comes from an LFSR with a fixed seed.
* **Waveguide schedule:** the three-clock-per-word sequence gives a 769-clock
  worst case. The original reports about 1200.
* **Loop sign:** the -0.5 loop filter is the default and +0.5 is a
  parameter option (see above).
* **Overflow:** the loop filter saturates its one overflowing case.
* **RAM behaviour:** the delay-line RAM reads before it writes.
* **FM:** the modulation depth is fixed at about ±π. Ratio codes above 9 give
  no modulation. There is no amplitude envelope.
* **Cosine table:** the exact rounding formula is this design's.
* **Clocking and reset:** one clock runs the bus and the engines, and
  `OPB_Rst` resets everything.
* **Bus:** registers cannot be read back, and byte registers take the first
  byte lane only. FM_MOD is 4 bits wide, as in the register table; the
  FM engine's ratio input is 8 bits and is zero-extended.
* **Audio:** `audio_out` works in the system clock domain with a clock enable
  rather than on a divided clock.

`OPB_BE` and `OPB_seqAddr` are unused. `Sl_DBus`, `Sl_errAck`, `Sl_retry` and
`Sl_toutSup` are tied low.

## Files

* `rtl/synth_pkg.sv`: shared constants, the register offsets, the
  SYNTH_SEL/FM_MOD encodings and the ratio function.
* `rtl/opb_synth.sv`: top level.
* `rtl/synth_regs.sv`, `rtl/waveguide.sv`, `rtl/delayline.sv`,
  `rtl/fm_synth.sv`, `rtl/cosine_rom.sv` (+ `cosine_rom.hex`),
  `rtl/sample_mixer.sv`, `rtl/audio_out.sv`: the blocks described above.
* `tb/tb_<block>.sv`: one self-checking testbench per block.
  `tb/synth_ref_pkg.sv` holds the reference models. These are a `$cos`
  cosine, an array model of the string recurrence and a phase-accumulator FM
  model.

`cosine_rom` loads `rtl/cosine_rom.hex` by a path relative to the repository
root, so run simulations from there.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A
watchdog ends it if it hangs. With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/synth_pkg.sv tb/synth_ref_pkg.sv \
    rtl/*.sv tb/tb_opb_synth.sv --top-module tb_opb_synth -o sim
./obj_dir/sim
```

Substitute another `tb_*.sv` to test a single block. The testbenches check
the following:

* `tb_opb_synth`: the whole peripheral at its default parameters.
  * Stimulus: a MIDI stream of about 40 messages goes through a behavioural
    model of the control software, which writes over OPB.
  * Checks: the codec pins are decoded and compared, sample for sample, with
    the reference models over about 290 sample periods. The notes cover
    both ends of each engine's key range: waveguide keys 44 and 94, FM keys
    36 and 96.
  * It also counts, and requires at least once, each of these: note on/off
    on both engines, Note On with velocity 0, a note dropped because all
    voices were busy, a key outside the waveguide range, every FM ratio code,
    switches of the engine select both ways, and all-notes-off on a program
    change.
* `tb_waveguide`: every sample for N = 1, 5, 56 and 255 against the
  recurrence, for both loop signs. It also checks the exact 2048-clock output
  period, the 3N+4 busy time, and disable and resume.
* `tb_fm_synth`: all ratio codes and an unused one, with random increments
  and enables. It also checks that the output changes at only one point of
  the period.
* `tb_audio_out`: clock periods, word alignment, MSB-first order and four
  words per sample.
* `tb_synth_regs`: every register, acknowledge timing, addresses outside the
  window, reads, and reset.
* `tb_sample_mixer`, `tb_delayline`, `tb_cosine_rom`: arithmetic, RAM
  behaviour and table contents.

Every testbench uses the real 2048-clock sample period.
