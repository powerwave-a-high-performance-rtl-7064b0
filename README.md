# PowerWave: a 16-voice interpolating wavetable synthesizer in one chip

This is synthesizable SystemVerilog for a polyphonic wavetable synthesizer.
All sound generation runs in dedicated logic at a fixed 96 kHz sample rate.
An external control processor only writes parameters into memory-mapped
registers, once per millisecond.

Each of the 16 voices plays four wavetable oscillators. Their sum goes through
the voice's own nonlinear Moog ladder filter and is panned into a stereo mix.
The mix then passes a six-band parametric EQ, a feedback delay and a main
gain. It leaves the chip as a 24-bit serial stream for a stereo audio DAC.

Classic wavetable synths click when the waveform changes and alias at high
pitches. This design avoids both with *double interpolation*:

- Each waveform is stored as a set of **mip tables**: the same period sampled
  at 2048, 1024, … 16 points, so shorter tables carry fewer harmonics.
- Each output sample blends the two tables whose pitch range brackets the
  oscillator's speed.
- Within each table, it blends the two samples around the current phase.

So the harmonic content follows the pitch smoothly, with no table switch
that can be heard.

```
          +--------+   +--------+   +--------+   +--------+
 bus ---> | OSC 2  |   | OSC 4  |   | OSC 1  |   | OSC 3  |   four wt_osc units,
          +---+----+   +---+----+   +---^----+   +---^----+   each with its own
              |  FM / sync |---------------|----------+        wave_ram copy
              +------------|---------------+
              v            v            v            v
              +------------+-----(+)----+------------+
                                  | x 1/4
                           +------v------+
                           | Moog ladder |  per-voice state kept in the engine
                           +------+------+
                                  |  pan L / pan R
                           +------v------+
                           | stereo mix  |  accumulates the 16 voices
                           +------+------+
                                  v
                 6-band EQ -> feedback delay -> main gain -> I2S to DAC
```

## Time-multiplexing: one voice datapath for 16 voices

The master clock is 98.304 MHz. That is 1024 clocks per 96 kHz sample, and
eight times the 12.288 MHz DAC master clock. `frame_timer` splits each sample
frame into 16 slots of 64 clocks. In each slot, `voice_engine` computes one
complete voice:

| clocks after slot start | action |
|---|---|
| 0 | the voice's register set is latched from `ctrl_regs` |
| 1–8 | oscillators 2 and 4 run in parallel (7 clocks each) |
| 9–16 | oscillators 1 and 3 run, using 2 and 4 for FM or sync |
| 17–23 | the Moog filter runs for this voice (6 clocks) |
| 24 | the filter output is panned into the stereo accumulators. The phases, speed + delta_speed and amp + delta_amp are written back |

A voice therefore needs 25 of its 64 clocks. After the last voice:

1. The finished mix goes through the EQ (9 clocks) and the delay (2 clocks).
2. It is scaled by the main gain and appears on `out_l/out_r` with
   `out_valid`.
3. It is shifted out to the DAC during the next frame.

Every 96 frames (1 ms), `irq` rises and stays high until the processor
writes the interrupt register. The processor uses this interrupt to load the
next parameter set.

## The oscillator (`wt_osc`)

Phase and speed are 24-bit unsigned fractions of one waveform period. The
speed is the phase increment per sample, so f = speed · 96 kHz / 2^24.

**Mip levels.** Each waveform has 12 levels, stored one after another in
`wave_ram` (6176 16-bit words, about 12 kB per waveform). Level *l* holds
max(16, min(2048, 4096 >> *l*)) samples:

| level | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9–11 |
|---|---|---|---|---|---|---|---|---|---|---|
| samples | 2048 | 2048 | 1024 | 512 | 256 | 128 | 64 | 32 | 16 | 16 |
| speeds from | 0 | 2^12 | 2^13 | 2^14 | 2^15 | 2^16 | 2^17 | 2^18 | 2^19 | 2^20, 2^21, 2^22 |
| pitch from | 0 | 23 Hz | 47 Hz | 94 Hz | 188 Hz | 375 Hz | 750 Hz | 1.5 kHz | 3 kHz | 6, 12, 24 kHz |

**The three steps for one output sample:**

1. *Choose the levels.* Let *p* be the position of the speed's leading one.
   Level *l* = *p* − 11, clamped to 0..11. Its neighbour is *l*+1 (at
   *l* = 11, level 11 is used twice). The blend weight between the two levels
   is the 16 bits of the speed just below its leading one. That weight is 0
   at the bottom of the octave and approaches 1 at the top, where level *l*+1
   takes over. The output is therefore continuous as the pitch sweeps across
   octave boundaries.
2. *Interpolate in phase, in each level.* The top log2(size) phase bits give
   the sample index, and the next 16 bits give the fraction. Both RAM ports
   read the sample and its neighbour in the same clock, wrapping at the end
   of the table.
3. *Interpolate between the two levels, then scale.* The two level values are
   blended with the weight from step 1. The result is multiplied by the
   amplitude (signed Q1.17).

One multiplier is reused for all four multiplications. `start` → `done`
takes 7 clocks. The unit also returns the advanced phase (`phase + speed`,
or 0 if `sync_rst`) and a wrap flag.

**Modulation** is set by the per-voice mode register:

- **FM:** oscillator 2 (4) adds its output, shifted left by 6, to the speed
  of oscillator 1 (3). The modulator's amplitude sets the depth.
- **Hard sync:** oscillator 1 (3) restarts at phase 0 in any sample where
  oscillator 2 (4) wrapped.

The modulators always stay in the audio sum as well.

## The Moog ladder (`moog_filter`, `moog_stage`, `tanh_lut`)

This is a digital model of the transistor ladder: four one-pole stages with
a tanh saturation in each. Each stage computes

    y_k[n] = y_k[n-1] + g · ( tanh(in_k) − tanh(y_k[n-1]) )

The stage input is the tanh of the previous stage's output, which that stage
has already computed. Five interpolated tanh tables are used in all: one at
the ladder input and one per stage output. Each table has 257 points over
[−4, 4] and interpolates linearly between them (error below 1e-4).

Resonance is fed back from the fourth stage's previous output, through an
average over two samples that adds half a sample of delay:

    s[n] = fb · y_4[n-1],   u[n] = x[n] − (s[n] + s[n-1]) / 2

The filter output mixes the four stage outputs with four gain registers. The
mix {0,0,0,1} is the classic 24 dB/oct low-pass. Other mixes give high-pass,
band-pass and in-between responses.

The hardware takes `g` and `fb` ready-made. Software derives them from the
cutoff f_c and resonance res (0..1) at f_s = 96 kHz:

    w   = 2 f_c / f_s
    g   = 1 − exp(−2π w (1.873 w³ + 0.496 w² − 0.649 w + 0.999))
    fb  = 4 res (−3.936 w² + 1.841 w + 0.997)

The filter serves all voices. The engine keeps each voice's state
(y_k, tanh(y_k), s[n-1]) and passes it in and out. One stage is evaluated
per clock, so `start` → `done` takes 6 clocks.

## Stereo output path

- **`stereo_mixer`:** x·pan_l and x·pan_r are accumulated over the 16 voices
  and cleared at each frame start.
- **`param_eq`:** six `biquad` sections in series (direct form I,
  y = b0 x + b1 x1 + b2 x2 − a1 y1 − a2 y2, coefficients in Q3.20). The left
  and right samples follow one another through the same sections, and each
  section keeps separate histories for the two channels. Software turns each
  band's gain, centre frequency and bandwidth into the five coefficients.
- **`delay_fb`:** a feedback comb per channel, y[n] = x[n] + fb·y[n−D], with
  D from 1 to 4095 samples (0 selects 4096, i.e. up to 42.7 ms).
- **`master_gain`:** a left and right gain with rounding and saturation.
- **`dac_if`:** I2S output. mclk = clk/8 (12.288 MHz), bclk = clk/16
  (64 fs), lrck = fs (low = left). Words are sent MSB first, starting one
  bit clock after the lrck edge.

## Number formats

| signal | format |
|---|---|
| phase, speed | 24-bit unsigned fraction of a period |
| wavetable samples | 16-bit signed |
| oscillator outputs, amplitudes, pan, delay feedback, main gain | signed Q1.17 (18 bits) |
| filter, mix, EQ signals; g, fb, stage gains, EQ coefficients | signed Q3.20 (24 bits, range ±8) |

All adders that can overflow saturate. The EQ works in the ±8 range of Q3.20, so a
full-scale mix boosted by +20 dB will clip.

Each oscillator unit uses one multiplier four times per sample, and the
ladder uses one multiplier per stage plus those of its tanh tables. A
version with more parallel multipliers would shorten the 25-clock voice
schedule, but the 64-clock slot does not need that.

## Register map (`ctrl_regs`)

The bus has 16-bit word addresses. A write takes one clock (`bus_we`). A read
returns `bus_rdata` one clock after the address.

| address | register |
|---|---|
| `1xxx_xxxx_xxxx_xxxx` | wavetable word `addr[14:0]` (write only; loads all oscillator RAM copies) |
| `v*32 + 5*o + 0..4` | oscillator o (0..3) of voice v (0..15): phase, speed, amp, delta_speed, delta_amp |
| `v*32 + 20` | mode: [7:0] waveform of osc 1..4 (2 bits each), [8] FM 2→1, [9] FM 4→3, [10] sync 2→1, [11] sync 4→3 |
| `v*32 + 21, 22` | Moog g, feedback |
| `v*32 + 23..26` | stage output gains 1..4 |
| `v*32 + 27, 28` | pan left, pan right |
| `1024 + 5*b + 0..4` | EQ band b (0..5): b0, b1, b2, a1, a2 |
| `1024 + 32, 33` | delay length, delay feedback |
| `1024 + 34, 35` | main gain left, right |
| `1024 + 36` | interrupt: reads 1 while pending, any write clears it |

Speed and amplitude move every sample by delta_speed and delta_amp. The
processor can therefore set a glide or envelope segment once per millisecond,
and the hardware ramps between updates without steps.

## What follows the original design and what is this implementation's own

These parts follow the original design:

- 16 voices of four oscillators and one filter each.
- The 98.304 MHz clock, 96 kHz rate and 1 ms update interrupt.
- The mip-mapped tables, from 2048 points per period at the lowest pitches
  down to 16.
- The three interpolation steps.
- FM and hard sync from oscillators 2 and 4 to 1 and 3.
- The ladder structure with its tanh tables, averaged resonance feedback and
  four-way stage mix.
- Panning into a stereo mix.
- A six-band biquad EQ, a feedback delay and a main gain on the stereo path.
- A 24-bit stereo DAC.

These are this implementation's own choices:

- All word widths and fixed-point formats.
- The mip level sizes and the level-selection rule.
- The register map and the simple bus in place of the original on-chip
  peripheral bus.
- The mode-register bits and the FM scaling.
- The 1/4 scaling into the filter.
- The 25-clock voice schedule.
- The order EQ → delay → gain.
- The delay's structure and depth.
- I2S as the serial format.
- Giving every oscillator unit its own wavetable RAM copy.

Not included:

- The control processor and its software, which covers the serial or MIDI
  protocol and the coefficient formulas above.
- The on-chip bus fabric.
- The external DAC and amplifier.

Blending between *different* waveforms (wavetable position morphing) is not
built. Waveform selection is per oscillator.

## Processor updates and the engine's write-back

The engine reads a voice's phase, speed and amplitude at the start of the
voice's slot. At the end of the slot it writes back the advanced values. If
the processor writes one of those words during that window, `ctrl_regs`
marks the word, and the write-back leaves it alone. Register updates can
therefore be made at any time.

After reset, the delay unit spends its first 4096 clocks writing zeros into
its buffers, so the delay starts out silent.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the floating-point
reference models (oscillator, ladder, whole voice) and the test waveforms.
For example, with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/pw_pkg.sv tb/tb_ref_pkg.sv tb/tb_powerwave_top.sv \
        --top-module tb_powerwave_top -o sim && obj_dir/sim

`tb_powerwave_top` runs the whole chip at its real sizes, in about 10 s of
host time:

- It loads the wavetables and all registers over the bus.
- It plays 110 samples and serves the millisecond interrupt.
- It compares every output sample with the model chain (tolerance 3e-3 of
  full scale).
- It decodes the I2S stream bit by bit.
- It fails if FM, sync, the interrupt, the delay feedback or the EQ never
  acted.

`tb_voice_engine` checks all 16 voices over 40 samples, including exact
phase, speed and amplitude write-back.

`tb_mip_sweep` sweeps one oscillator's pitch from below 23 Hz up to the
Nyquist limit in steps of 0.2 %. It crosses all 11 table boundaries on a
waveform whose levels differ, and it bounds every step of the output, so a
jump at a boundary fails the test.

The block testbenches compare against integer models (mixer, biquad, EQ,
delay, gain, registers, DAC) or the floating-point models (oscillator,
tanh, ladder). Where a block has a latency (oscillator 7, filter 6, EQ 9
clocks, frame 1024, interrupt 96 frames), the testbench checks it.
