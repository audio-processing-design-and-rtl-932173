# CIS speech processor: 8-point FFT channel selector

A cochlear implant stimulates the auditory nerve through a row of electrodes,
each one standing for a band of frequencies. In continuous interleaved
sampling (CIS) the electrodes are driven one at a time, never together, so the
current from one electrode does not blur into its neighbour's.

This RTL is a small digital processor that follows that scheme with eight
channels. Audio samples come in one per clock. Each frame of eight samples
goes through an 8-point FFT. The strongest of the eight frequency bins picks
an electrode channel. The incoming audio, amplified by two, is then sent to
that channel alone, and the other seven stay at zero. A final adder sums the
eight channels into one signal for a speaker or a display.

```
 DIR/DII ──► fft8 ──serial bins──► freq_separator ──8 parallel bins──► max_encoder
  ED, START      │ RDY ───────────────► start                              │ sel (0..7)
                 ▼                                                         ▼
                RDY            DIR ─────────────────────────────► channel_amplifier ──► dout[0..7]
                                                                           │
                                                                   channel_adder ──► audio_out
```

The spectrum only steers the signal: what reaches the electrode is the time
signal itself, not a bin value. The amplifier's data input is wired to the
same input as the FFT, and the FFT path only supplies the 3-bit channel
number.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/cis_pkg.sv` | package | `NCH = 8` channels / FFT points, `SEL_W = 3` |
| `rtl/fft8.sv` | `fft8` | 8-point radix-2 FFT, serial in, serial out |
| `rtl/freq_separator.sv` | `freq_separator` | serial-to-parallel, counts 0..8 |
| `rtl/max_encoder.sv` | `max_encoder` | position of the strongest bin |
| `rtl/channel_amplifier.sv` | `channel_amplifier` | ×2 onto the selected channel |
| `rtl/channel_adder.sv` | `channel_adder` | sum of the eight channels |
| `rtl/cis_processor.sv` | `cis_processor` | top level |

Each file opens with a comment giving its interface and timing.

## Top-level interface (`cis_processor`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i` | in | 1 | clock, single domain |
| `rst_i` | in | 1 | synchronous, active-high reset |
| `DIR` | in | 16 | audio sample (real part); also the amplifier's input |
| `DII` | in | 16 | imaginary part of the sample, 0 for audio |
| `ED` | in | 1 | sample valid |
| `START` | in | 1 | marks sample 0 of a frame |
| `RDY` | out | 1 | FFT bin 0 of a frame is being delivered |
| `sel` | out | 3 | channel chosen by the encoder, 0..7 |
| `dout[0:7]` | out | 8 × 17 | electrode channels; `dout[k]` is channel k+1 |
| `audio_out` | out | 20 | sum of the channels |

The only parameter is `IN_W` (sample width, default 16). The FFT bins are
`IN_W+3` bits wide, a channel is `IN_W+1` bits and `audio_out` is `IN_W+4` bits.

Microphone capture, the audio output stage and the VGA display belong to the
FPGA board and are not part of this RTL. Samples enter on `DIR`/`ED`/`START`,
and the result leaves on `dout` and `audio_out`.

## The FFT (`fft8`)

This block is the one that takes the most study.

**Input.** A sample is taken on every clock with `ed` high. `start`
resets the sample counter, and a sample given together with `start` is
sample 0. The first seven samples go into a small register file. When the
eighth arrives, all eight are copied at once into the butterfly registers in
bit-reversed order (index 1 goes to 4, 3 to 6, and so on).

**Butterflies.** Three radix-2 decimation-in-time stages follow, one per
clock. Stage *s* pairs elements `j` and `j + 2^s`. The lower element of each
pair is multiplied by the twiddle factor `W8^e`, `W8 = exp(-j·2π/8)`, with
`e = (j mod 2^s) · 4 / 2^s`:

- `W^0 = 1` and `W^2 = -j` are a pass-through and a swap with negation;
- `W^1 = c(1 - j)` and `W^3 = -c(1 + j)`, with `c = cos(π/4)`, use one sum
  or difference of re and im. That is multiplied by `c` in Q15
  (23170 / 2^15), with rounding.

So the only real multiplications are by one constant. The output is the
unscaled DFT `X[k] = Σ x[n]·exp(-j2πnk/8)`. A frame of eight 15s gives
`X[0] = 120` and zero elsewhere.

**Width.** Inside the FFT, words carry 5 bits above the input width: 3 for
butterfly growth and 2 of guard for the twiddle sums. The output is `IN_W+3`
bits. That is exact for any real input frame: `|X[k]| ≤ 8·max|x|`. A full-scale
complex frame can exceed it by up to √2 and is saturated. Because of the Q15
twiddles, bins that pass through `W^1` or `W^3` can differ from the exact
DFT by about 1 LSB.

**Output.** After the third stage the eight bins are loaded into an output
shift register. They leave in natural order (0..7), one per clock. `rdy` is
high while bin 0 is on `dor`/`doi`.

**Timing.** Let the eighth sample be taken at edge *c*. Then `rdy` is high in
the cycle after edge *c+3*, and bin *k* follows *k* cycles later. Frames can
arrive back to back with `ed` high on every clock. The last bin of one frame
leaves in the cycle before the next frame's bin 0, and an assertion guards
against frames overrunning the butterfly stages.

## Serial-to-parallel conversion (`freq_separator`)

`start` is driven by the FFT's `RDY`. It stores bin 0 and starts a count. Each
following clock stores the next bin, until the count reaches 8. In the
count-8 cycle, all eight bins are copied to the outputs, where they stay
until the next frame replaces them. If `start` comes again in that cycle (the
back-to-back case), that bin becomes bin 0 of the next frame, so no frame is
dropped. A `start` in the middle of a frame is ignored. `valid` pulses once
per update. The top does not need it, because the encoder samples its inputs
on every clock.

## Channel choice (`max_encoder`) and amplification (`channel_amplifier`)

**Bin size.** The encoder measures each bin as `|re| + |im|` and registers the
position of the largest. On a tie, the lowest position wins.

For real audio, bins *k* and *8−k* are mirror images and have the same ideal
size. Which of the two wins is then decided by the tie rule, or by the
rounding in the FFT, which is less than one LSB. In effect, a real signal
drives one of five frequency bands: DC, 1/7, 2/6, 3/5 and 4. Channels 6..8
come into play when one of them comes out larger by rounding, or when the
imaginary input is used.

**Amplifier.** On every clock, the amplifier writes `2 · DIR` to channel
`sel` and zero to the others. The gain is a parameter (`GAIN`, default 2).
Only one channel is ever non-zero, which is the non-overlap property CIS
needs, and an assertion checks it. Because the gain is 2, bit 0 of every
channel is always 0.

**Adder.** `channel_adder` is a full registered 8-input adder. Given the
one-hot channels, its output equals the active channel.

## End-to-end timing

With `ED` high on every clock:

| Event | Cycle |
|---|---|
| 8th sample of frame taken | edge *c* |
| `RDY` (bin 0) | *c+3* |
| separator outputs updated | *c+12* |
| `sel` updated | *c+13* |
| `dout` on the new channel | *c+14* |
| `audio_out` follows | *c+15* |

Within one channel assignment, `dout` follows `DIR` by one clock and
`audio_out` by two. The channel chosen from frame *n* is in force while the
samples of frame *n+2* come in.

## Choices made here

The source describes the blocks, their names and wiring, and a few worked
values. The points below were decided in this design.

- **Insides left open.** The FFT's internal organisation (one stage per clock,
  natural-order serial output, the Q15 twiddles) is this design's. So is the
  meaning of `START`/`ED`/`RDY` (only their names are given), and so are the
  widths of the FFT output and the channels.
- **Worked values followed.** The sample width of 16 bits, the unscaled FFT
  (15 → 120) and the count of 0..8 in the separator follow the source. So do
  the encoder's 3-bit select with input 8 giving select 7, and the gain of 2
  (11 → 22).
- **Encoder measure.** The measure `|re| + |im|` and the lowest-index tie rule
  are choices. The source only says "the maximum".
- **Amplifier input.** The amplifier amplifies the raw input sample, as the
  block wiring shows. A prose description could be read as amplifying "the
  encoded data", but the encoder's output is only a 3-bit position.
- **Adder.** The adder after the amplifier is described in prose but does not
  appear in the block wiring. It is included here.
- **Reset and clocking.** All resets are synchronous and active high. There
  is one clock, and no sample rate is assumed.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_fft8` | bins against a floating-point DFT (±3 LSB); exact 15 → 120; `rdy` latency; back-to-back frames and frames with gaps |
| `tb_freq_separator` | bin order, release in the count-8 cycle, hold, back-to-back frames, stray `start` |
| `tb_max_encoder` | argmax by \|re\|+\|im\|, ties, the 13-at-input-8 → 7 case, latency |
| `tb_channel_amplifier` | 11 → 22 on channel 6 with `sel` 5; every channel; latency |
| `tb_channel_adder` | sums, extremes, latency |
| `tb_cis_processor` | whole chain at default size: per-frame bins, `RDY` timing and `sel`; per-clock channel and adder values; non-overlap; every channel selected at least once |
| `tb_cis_audio_stream` | 400 back-to-back frames of a synthetic voiced signal with a pitch glide; `sel` must name the strongest mirror pair |

To run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cis_processor \
    -y rtl -y tb +libext+.sv rtl/cis_pkg.sv tb/tb_cis_processor.sv
./obj_dir/Vtb_cis_processor
```

The package file must come first on the command line. Each testbench runs in
well under a second.

## Limits

- The design has exactly eight points and channels. A larger FFT would need
  more stages, a twiddle table and a wider `sel`. That is the natural way to
  add channels, but it is not built here.
- There is no stimulation pulse shaping, envelope detection or compression:
  a channel carries the amplified waveform itself.
- The microphone, audio output and VGA paths are outside this RTL.
