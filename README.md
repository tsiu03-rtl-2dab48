# Audio codec driver for the WM8731 (with a demo sound application)

An FPGA application that processes stereo sound wants 16-bit parallel
samples, one channel at a time, with a simple "here is a sample / here is the
answer" handshake. The WM8731 audio codec instead moves samples bit-serially
and expects the FPGA to supply every clock it runs on. `snd_driver` sits
between the two. It translates the parallel **SndBus** into the codec's
serial port and back. Everything it needs, from the codec's master clock to
the handshake pulses, comes from one free-running 10-bit counter.

The main idea is time sharing. A stereo frame is 1024 cycles of the 50 MHz
system clock, which gives f_s = 50 MHz / 1024 ≈ 48.83 kSps per channel. Each
frame has two halves of 512 cycles. In one half, the left channel talks to the
application while the right channel shifts bits to and from the codec. In the
other half the roles swap. A single channel module, instantiated twice, does
both jobs for its channel.

Around the driver sits `my_fancy_application`, a small demo of sound
processing:

- it forwards the input to the output;
- it adds 440 + 660 Hz tones on the right channel (SW6);
- it adds 440 + 550 Hz tones on the left channel (SW7);
- it mutes the output (SW5);
- it shows the output level on 18 red LEDs;
- it puts white noise on the DAC channel that is currently not in use.

A correct driver must never let that noise reach the codec. The top level
`sound` joins the two blocks.

```
             SndBus                                   serial port
 SW ──►┌─────────────┐ LADC,RADC ◄─ ┌──────────────┐ ── mclk, bclk ──►┌────────┐
       │ my_fancy_   │ LDAC,RDAC ─► │  snd_driver  │ ── adclrc ──────►│ WM8731 │
LEDR ◄─│ application │ lrsel,ADC_en◄│ ctrl + 2 ×   │ ◄─ adcdat ───────│ (off   │
       │             │ DAC_en ────► │ channel_mod  │ ── daclrc ──────►│  chip) │
       └─────────────┘              └──────────────┘ ── dacdat ──────►└────────┘
```

## The frame counter (`ctrl`)

`ctrl` is a 10-bit counter, `cntr`, that wraps once per frame. Each output is
a plain decode of the counter bits, so all of them change on the same clock
edge and keep a fixed phase to each other:

| signal           | decode              | meaning                                                     |
|------------------|---------------------|-------------------------------------------------------------|
| `mclk`           | `~cntr[1]`          | 12.5 MHz codec master clock; rises when `cntr[1:0]` wraps to 0 |
| `bclk`           | `cntr[3]`           | 3.125 MHz bit clock: low for 8 cycles, then high for 8       |
| `men`            | `cntr[1:0] == 3`    | one cycle just before each rising `mclk`                     |
| `sccnt`          | `cntr[3:2]`         | which of the 4 `mclk` periods of the `bclk` period           |
| `bitcnt`         | `cntr[8:4]`         | bit slot 0..31 within the channel half                       |
| `adclrc`,`daclrc`| `cntr[9]`           | '1' while the **left** channel is on the serial side         |
| `lrsel`          | `~cntr[9]`          | '1' while the **left** channel is on the SndBus side         |
| `adc_en`         | `cntr[8:0] == 0`    | one-cycle pulse each time `lrsel` changes                    |

So in cycles 0..511 of a frame, `lrsel` = 1. The left channel is on the bus,
and the right channel is on the serial link (`adclrc` = 0). In cycles
512..1023 it is the other way round. Right after each `adclrc` edge,
`mclk` = 1 and `bclk` = 0.

`men` works as a clock enable. Logic clocked by `clk` that acts when
`men` = 1 behaves as if it were clocked by the rising edge of `mclk`. Adding
`sccnt` to the condition picks out one particular `mclk` edge within a bit.

## One channel (`channel_mod`)

Each channel has two 16-bit shift registers. Its only control input is `sel`:
'1' means "on the bus side" and '0' means "on the serial side". The left
instance gets `sel = lrsel` and the right instance gets `sel = ~lrsel`. The
module does not know which channel it serves.

**Receive (RXReg).** While `sel` = 0, RXReg shifts `adcdat` in from the right
on the cycle where `men` = 1 and `sccnt` = 01. That is the cycle just before
`bclk` rises, the middle of the bit slot. RXReg shifts only in slots 0..15.
The codec sends the MSB first, so after slot 15 the sample sits aligned in the
register. It then stays still, and the 16 don't-care slots that follow cannot
push it out. Shifting more or fewer than 16 bits is the classic bug here. The
ADC bus always shows RXReg. The application reads it only on `adc_en`, which
comes right after the channel's serial half ends.

**Transmit (TXReg).** While `sel` = 1, a `dac_en` pulse loads TXReg from the
DAC bus. While `sel` = 0, TXReg shifts left on `men` = 1 and `sccnt` = 11, the
cycle just before `bclk` falls, which is where one slot ends. It keeps
shifting through the don't-care slots, which does no harm. `dacdat` is wired
to the MSB of TXReg with no flip-flop in between. The first bit is therefore
on the line in the very cycle `daclrc` switches, not one bit later. An extra
register here would put every sample one bit late, and the result is loud
noise.

**Merging `dacdat`.** Both instances drive a `dacdat`, but the codec has one
pin. Each channel_mod forces its output to 0 while `sel` = 1. Exactly one
channel has `sel` = 0 at any time, so the driver simply ORs the two outputs.

## SndBus timing seen from the application

```
cycle      0 ........................ 511 512 ....................... 1023
lrsel      1 (left on bus) ............. 0 (right on bus) ..............
ADC_en     ^ (LADC valid)                ^ (RADC valid)
DAC_en       ^ LDAC (any time < 512)       ^ RDAC (any time < 512)
adclrc     0 (right bits on adcdat/dacdat) 1 (left bits) ................
```

The application must answer each `ADC_en` with one `DAC_en` pulse and the new
sample on the active DAC bus. It must do so before `lrsel` changes again. An
assertion in `snd_driver` checks this rule in simulation. Each sample takes
exactly one frame (1024 cycles) from the codec's ADC side to its DAC side.
For example, a left sample travels like this:

1. It is shifted in during cycles 512..1023.
2. It appears on LADC with `ADC_en` at the next cycle 0.
3. The application processes it and loads it into the left TXReg a few cycles
   later.
4. It is shifted out during cycles 512..1023 of that frame.

## The application (`my_fancy_application`, `tone_gen`, `sound_analyser`, `noise_lfsr`)

A four-state sequencer starts on `adc_en`:

- **IDLE:** latch the input sample of the active channel.
- **TONE_A:** evaluate the 440 Hz tone.
- **TONE_B:** evaluate the 550 Hz (left) or 660 Hz (right) tone and add it.
- **OUT:** add the input, saturate to 16 bits, apply mute, write LDAC or RDAC
  and pulse `dac_en`.

`dac_en` therefore comes 4 cycles after `adc_en`.

Each tone has its own 24-bit phase accumulator. All three advance once per
frame, after the right channel, by round(f · 2^24 · 1024 / 50 MHz): 151183
for 440 Hz, 188979 for 550 Hz and 226774 for 660 Hz. One combinational
`tone_gen` serves all three tones. It approximates a sine by one parabola per
half period: ±4x(1−x)·8192, with x the position in the half period. The
error is below 6 % of the amplitude. Each tone has amplitude 8192, so the two
tones together use at most half of full scale.

`sound_analyser` squares each output sample. It then smooths the square with a
first-order low-pass filter, `filt += (x² − filt) / 256`. LED *i* lights when
`filt ≥ 2^(12+i)`, so each LED is one more bit of power, about 3 dB. The
lit LEDs always form a solid bar (a thermometer code).

`noise_lfsr` is a 16-bit maximal-length LFSR (x^16+x^14+x^13+x^11+1) that
steps every cycle. The DAC bus of the channel not selected by `lrsel` shows
the LFSR state. The driver only loads TXReg on `dac_en` while that channel is
selected, so the noise is never sent to the codec.

## Where this design makes its own choices

The driver follows a precise description. Its bit assignment and polarities
are fixed, and the following points were resolved as noted:

- **Left/right polarity.** '1' on `lrsel`, `adclrc` and `daclrc` means left.
  A reference timing diagram of this interface has the same waveforms, but its
  left/right labels are swapped. The labels here follow the written
  definition.
- **Shift edges.** One general description of the serial format says the
  transmitter changes data on rising `bclk` and the receiver samples on
  falling `bclk`. The detailed driver description says the opposite, and the
  timing diagram agrees with it. This design follows the detailed description:
  RXReg samples at rising `bclk`, and `dacdat` changes at falling `bclk` and
  at the `*lrc` edge. That is also the codec's left-justified format.
- **Reset.** `rstn` is an asynchronous active-low reset. It clears every
  register; the LFSR goes to its seed. Only "active-low reset" is specified.
- **`dacdat` merge.** An OR gate is used, with gating in `channel_mod`,
  rather than a multiplexer. The fill bit shifted into TXReg is 0.

The application is the part least tied to a specification. Only its functions
are given: which switch does what, that the tones come from a piecewise
polynomial with one phase accumulator per frequency, that the level meter is
squarer + first-order LPF + thermometer dB bits, and that the noise comes
from an LFSR. Everything else is this design's choice: the tone amplitude,
the saturation, the 24-bit phase, the filter constant, the LED threshold, the
LFSR polynomial, the 4-cycle sequencer and the 18 switches and LEDs of a
DE2-115 board.

Not included:

- the WM8731 itself;
- its I2C register setup, which the board does at power-up (R5 = 0x06,
  R7 = 0x01, R8 = 0x00);
- any group-number display on the board's HEX digits.

## Files

`rtl/` holds one unit per file:

- `snd_pkg.sv`: shared widths, the sample type and the `sccnt` codes;
- `ctrl.sv`, `channel_mod.sv`, `snd_driver.sv`: the driver;
- `tone_gen.sv`, `noise_lfsr.sv`, `sound_analyser.sv`,
  `my_fancy_application.sv`: the application;
- `sound.sv`: the top level.

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if
it hangs.

| testbench                  | what it shows |
|----------------------------|---------------|
| `tb_ctrl`                  | every output on every cycle against the decode table; the `mclk`, `bclk` and `adclrc` periods; `mclk`=1, `bclk`=0 after each `adclrc` edge |
| `tb_channel_mod`           | random samples in both directions; exactly 16 bits received although the filler bits are random; MSB on `dacdat` in the first serial cycle; `dacdat` = 0 on the bus side |
| `tb_snd_driver`            | 1 ms run: 3 kHz tones into the DAC path at random answer delays, with noise on the inactive bus; 1.5 kHz tones through a serial ADC stimulus; clock periods and `adclrc = daclrc ≠ lrsel` |
| `tb_tone_gen`              | the whole phase circle against a floating-point sine, odd symmetry, exact zeros and peaks |
| `tb_noise_lfsr`            | period 65535, no zero state, balanced sign |
| `tb_sound_analyser`        | settled LED bars for eight amplitudes, smoothing, decay, no update without `valid` |
| `tb_my_fancy_application`  | forward (exact), right and left tones (against floating-point sines), saturation, mute, noise on the inactive DAC, LED bar, the 4-cycle latency |
| `tb_sound`                 | the full system at default parameters against `wm8731_model` (a behavioural model of the codec's serial port, in `tb/`): every decoded DAC word is checked against the ADC input one frame earlier, for each switch setting |

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb rtl/snd_pkg.sv tb/tb_sound.sv --top-module tb_sound -o sim
./obj_dir/sim
```

Use the same command for the other testbenches; only the testbench file and
the top module name change. Some testbenches set their own `timescale`, so
`--timescale` gives the design files the same units. `-Wno-fatal` keeps lint
warnings, such as unused package constants, from stopping the build. All
testbenches finish within seconds.

To change the design, note where its values live:

- The frame layout (16 clk per bit, 32 slots per channel, 10-bit counter) is
  fixed by the codec's clocking and the bit decodes in `ctrl`.
- The application's tone frequencies are computed from the `F_CLK`
  parameter.
- The LED count and thresholds are parameters of `sound_analyser`.
