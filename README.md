# A digital modular synthesizer on an audio ring

An analog modular synthesizer is a rack of independent modules (oscillators,
filters, mixers, sequencers) joined by patch cables. This design does the
same in one FPGA. Each module is an **audio processing unit (APU)**. The patch
cables are replaced by a **ring of registers** that carries the output of
every APU past every other APU once per audio sample. Each APU input is a
small **control register** that you tell, over a serial terminal, either to
hold a fixed value or to pick up the ring word of a chosen APU. Re-patching is
therefore a register write: nothing in the hardware changes when the sound
routing changes.

The audio standard throughout is 16-bit signed PCM at 48 kHz. The system
clock is 64.8 MHz, so one audio frame is 1350 clocks. The codec that supplies
the 48 kHz frame pulse (SYNC) and the samples sits outside this RTL. So do
the clock generator and the video timing generator.

The top module is `modular_synth`. It holds eight APUs on the ring:

| ring address | APU | registers (register address: meaning) |
|---|---|---|
| 0x00 | codec | 0: sample sent to the codec output |
| 0x01 | oscillator | 0: frequency in Hz, 1: wave type, 2: pulse width (frames) |
| 0x02 | filter | 0: input, 1: cutoff in Hz, 2: type, 3: q |
| 0x03 | sequencer | 0: data to write, 1: {write[15], end mode[14:13], last step[7:4], write index[3:0]}, 2: speed |
| 0x04 | mixer | 0: in1, 1: in2, 2: level1, 3: level2 (levels have 14 fraction bits) |
| 0x05 | delay | 0: input, 1: delay in samples, 2: wet/dry, 3: gain, 4: feedback |
| 0x06 | sampler | 0: input, 1: mode |
| 0x1F | display | 0: input |

The codec APU puts the codec's input sample on the ring. Its register 0 goes
to the codec's output. The display APU puts nothing (0) on the ring.

## The ring and the audio frame

Each APU owns one ring stage (`network_flow_controller`). A stage is two
registers, one for a 16-bit data word and one for a 5-bit address, plus a mux
in front of each:

- in the clock where SYNC is high, the stage loads its own APU's latest output
  and its own address;
- in every other clock, it copies the stage upstream of it.

After SYNC the words therefore rotate around the ring, one stage per clock. An
APU sees the words of all N APUs within N clocks, and they keep circling until
the next SYNC. For the 8-APU top, every input is available 8 clocks after SYNC.

A result computed during frame k is put on the ring at the SYNC that starts
frame k+1, and read by its consumers during frame k+1. Every APU on a signal
path therefore adds one frame (about 21 µs) of latency. The end-to-end test
measures codec → mixer → codec as exactly 2 frames.

The 5-bit address limits one ring to 32 APUs.

## Control registers: where an input comes from

Every APU input is a `control_register`. It holds four things:

- **external value**: a 16-bit number written by the user;
- **valid address**: the ring address whose word this input should take;
- **internal value**: the ring word captured at that address this frame;
- **input selector**: whether the output is the external value (1) or the
  internal value (0).

At SYNC the register drops `input_valid`. It then watches the ring. The first
time the ring address equals its valid address, it captures the data word and
raises `input_valid` again.

A new selector written over the bus is first held in a temporary copy. It
becomes active at the next SYNC, so a source never changes in the middle of a
frame. The end-to-end test checks this.

An `apu_wrapper` bundles a core's control registers with its ring stage. Once
per frame it issues `core_ready`: a one-clock start pulse given as soon as
every register is either external or has captured its ring word. Each core
starts its computation on `core_ready` and has until the next SYNC to finish.

At reset every register selects its external value, and every external value
is 0.

## The control bus and the serial terminal

One master drives a 31-bit control bus that reaches every control register.
Bit 30 is the most significant bit.

| bits | field | meaning |
|---|---|---|
| 30:29 | `loc_sel` | 0 = external value, 1 = valid address (from data[4:0]), 2 = input selector (from data[0]), 3 = nothing |
| 28:21 | `reg_addr` | register number inside the APU |
| 20:16 | `mod_addr` | ring address of the APU |
| 15:0 | `data` | the value |

A register acts when both `mod_addr` and `reg_addr` match its own. The bus
holds the last command. Its reset value uses register address 0xFF, which no
register has.

The master is `control_module`: a 9600 baud 8N1 receiver, the
`command_parser`, and a transmitter that echoes each accepted character. You
type eight hexadecimal digits, most significant first. The parser counts
them down from 8. On the eighth it places the low 31 bits on the bus. Any
other character is ignored and does not disturb the count. A character
that arrives while the transmitter is still sending the previous echo waits
in a one-character holding register, so characters typed back to back are
all echoed.

Example: play a 440 Hz sine on the codec output.

```
000101B8   oscillator (0x01) register 0, external value = 0x01B8 = 440 Hz
20000001   codec (0x00) register 0 reads ring address 0x01
40000000   codec register 0 selector = ring (takes effect at next SYNC)
```

At 9600 baud a command takes 8.3 ms (540,000 clocks).

## Sharing one divider

The oscillator and the filter each need a division per frame. They share one
radix-2 divider, `shared_divider`, by time slots called *levels*:

- client i's level begins `LEVEL_OFFSET + i·SLOT` clocks after SYNC
  (64 and 50 by default) and lasts `SLOT` clocks;
- during its own level a client drives its dividend and divisor;
- at every other time a client drives zeros;
- the divider ORs all clients' arguments together, so only the active one
  matters;
- the quotient arrives `DW+1` = 49 clocks into the level, with `q_valid`;
- division by zero returns all ones.

The offset gives each core's inputs time to arrive before its level starts.
Both levels end by clock 164 of the 1350-clock frame.

## Oscillator

Two direct digital synthesis units (`dds`) each hold a 32-bit phase. The phase
advances by `increment = f·2^32/48000` on every frame, and its top 11 bits
address a 2048-point waveform. The increment is computed by the shared
divider whenever the frequency register is read.

- **Sine** comes from `sine_rom`. It stores a 512-entry quarter wave,
  `T[i] = round(32767·sin(π/2·(i+0.5)/512))`, in `rtl/sine_quarter.hex`, and
  mirrors it in time and amplitude to form the full 2048 points.
- **Ramp** comes from `ramp_source`, which computes `((addr−1024)·45)>>>1`
  instead of storing a table.

The six wave types are all derived from these two:

| code | wave | how it is made |
|---|---|---|
| 0 | sine | the table, scaled to a 23170 peak |
| 1 | square | the sign of the sine, ±23170 |
| 2 | pulse | the square, forced low once `width` frames have passed since its rising edge |
| 3 | ramp | the ramp |
| 4 | saw | the negative of the ramp |
| 5 | triangle | the absolute value of the ramp, shifted and scaled |

Every wave peaks near 23170, which is −3 dB of full scale.

## Filter

The filter is a second-order IIR section (a biquad). It is split into three
blocks.

### `filter_coefficients`

1. Get `w0 = f·65536/48000`, a 16-bit fraction of a turn, from the shared
   divider.
2. Read `sin(w0)` and `cos(w0)` from the sine table. The cosine is read a
   quarter turn ahead.
3. Form `alpha = sin(w0) >>> q`. The `q` input is a shift, so q = 2 gives
   alpha = sin/4, which is Q = 2 in the usual `sin/(2Q)` form. q = 0 is
   treated as 1.

   Mind the headroom at higher q. With q = 2 and a 4800 Hz cutoff, a
   full-scale (±23170) square wave rings up to about 43,000 in an ideal
   filter. The output and the filter's own history then saturate at 16-bit
   full scale. Halve the input, or use q = 1, which peaks at about 31,000.
4. Form the six coefficients below.

| type | b0 | b1 | b2 |
|---|---|---|---|
| 0 low-pass | (1−cos)/2 | 1−cos | (1−cos)/2 |
| 1 high-pass | (1+cos)/2 | −(1+cos) | (1+cos)/2 |
| 2 band-pass | alpha | 0 | −alpha |
| 3 notch | 1 | −2cos | 1 |

For every type, `a0 = 1+alpha`, `a1 = −2cos` and `a2 = 1−alpha`.
Coefficients are 18-bit signed numbers with 16 fraction bits (1.0 = 65536).

### `filter_scale`

A fully pipelined 18-stage restoring divider. It divides b0, b1, b2, a1 and a2
by a0, issuing one division per clock. All five results update together once
the last is done, so the accumulator never uses a mix of two coefficient sets.

### `filter_accumulator`

It computes

`y = b0·x0 + b1·x1 + b2·x2 − a1·y1 − a2·y2`

as five sequential products on one 18×18 multiplier, summed in a 40-bit
accumulator.

- Samples enter as Q15.2: the 16-bit value with two zero fraction bits.
- The sum is shifted down 16 bits and saturated to 18 bits. That 18-bit value
  is the y1/y2 history.
- The output is its integer part.
- The result appears 7 clocks after `core_ready`.

Coefficients are recomputed every frame, so changing the cutoff or type takes
effect within about 100 clocks of the next SYNC.

## Sequencer

The sequencer is a small memory of `DEPTH` (16) values.

- On each step it outputs the next value.
- `speed` sets how many frames pass between steps, plus one.
- `last` is the final index.
- At the end, the sequencer stops, loops to 0, or reverses direction. In
  reverse it bounces between the two ends without repeating an end value.
- A write (value, index) can happen at any clock.

In the top, setting bit 15 of register 1 writes register 0 into the index in
bits 3:0, once per frame. Clear bit 15 before changing register 0 again.
Routing the sequencer (0x03) into the oscillator frequency plays a melody.
The package `synth_pkg` holds the integer frequencies of A3..A6 for this use.

## Mixer

`out = clip((in1·level1 + in2·level2) >>> DECIMAL)`

- Levels are signed with `DECIMAL` fraction bits. The module default is 15
  (levels below 1.0). The top uses 14, so a level can reach 2.0.
- The two products are summed in 34 bits.
- The result is kept only if every bit above bit 15 of the shifted sum is a
  copy of the sign. Otherwise the output saturates to +32767 or −32768.
- The output appears 3 clocks after `core_ready`.

## Delay (echo)

The delay is two mixers around a sample memory:

```
stored  = (1−feedback)·in + feedback·out_prev     written to memory
wet     = memory[delay samples ago] · wetdry
out     = gain·wet + (1−gain)·stored
```

- All levels have 15 fraction bits, and "1−x" means 32767−x.
- `gain` and `feedback` are meant to be 0..32767. `wetdry` may be negative,
  which inverts the echo.
- The memory (`MAX_DELAY` = 8192 samples, 171 ms) has separate read and write
  addresses.
- Until `delay` samples have been written, the delayed sample reads as 0.
- The output appears 6 clocks after `core_ready`.

## Sampler

The sampler has three modes:

| mode | behaviour |
|---|---|
| 0 | silence |
| 1 | record: store the top `WIDTH` bits of each sample until the memory is full |
| 2 | play back: loop over the recorded length |

Changing mode resets the pointer. Entering record also clears the length.

The default is 32768 × 8 bits, which holds 0.68 s. A 16-bit sampler is the
same module with `WIDTH = 16` and a larger `DEPTH`.

## Display

The display draws a scrolling waveform on a monitor turned on its side. Every
32 frames the top 10 bits of the input are written into a 768-entry array.
Scan line r shows entry r:

- the value is offset by 512;
- pixels whose horizontal count lies between 512 and the offset value are
  lit, which draws a bar from the centre line to the sample;
- the bar's colour is the top 8 bits of the offset value, as 3-3-2 RGB
  (`pixel`) and repeated to 24 bits (`rgb`).

Outputs lag `hcount`/`vcount` by 2 clocks.

## Reset

`reset_gen` synchronises the reset button with two flip-flops. It holds reset
for 16 clocks after the button is released, and also at power-up through its
initial values.

## What differs from the original description

The original report describes the same architecture. This RTL follows it in:

- the ring with SYNC loading and the control registers with input_valid;
- the 31-bit control bus, its four fields and the 8-digit hex entry;
- the shared divider with OR-combined arguments;
- DDS with a quarter-wave table and a computed ramp;
- the way the six waves are derived;
- the biquad with a coefficient generator, a pipelined scale divider and an
  18×18 multiplier;
- the sequencer end modes;
- the mixer clip test;
- the two-mixer delay, the 32K×8 sampler and the 10×768 display.

Where it departs, or fills gaps:

- **Coefficient format**: 18-bit words with 16 fraction bits rather than
  "Q1.15". The original's own reference numbers need 16 fraction bits.
- **Low-pass b1** is `1−cos`, which is the standard form and agrees with the
  original's reference script. One printed equation has `(1−cos)/2`.
- **Resonance** is a shift `q`, so alpha = sin/2^q, rather than a general
  `1/(2Q)`.
- **Band-pass and notch** use standard biquad forms, which the original does
  not spell out.
- **The scale divider** performs five divisions, not four: every coefficient
  except a0 must be divided.
- **Each shared-divider client** uses one division per frame. The other
  divisions the original mentions are done by shifts or by the filter's own
  divider.
- **The ring address is 5 bits.** One figure of the original draws a 6-bit
  register.
- **Left to this design**: the field order and the 8-bit register-address
  width of the control bus, and the selector encoding (1 = external).
- **The echo of typed characters** is an addition.
- **The serial receiver and transmitter** are this design's own. The original
  used third-party files.
- **The delay** was left unfinished in the original. Its mix equations here
  are this design's reading of the described routing.
- **Other choices of this design**: the register maps of the APUs and which
  cores sit at which ring addresses, the sequencer depth (16), the delay
  length (8192), the sampler's mode encoding and end-of-memory behaviour, and
  the reset behaviour.
- **Ring size**: the original suggests a ring of over a hundred APUs. A 5-bit
  address holds 32.

## Files

| file | contents |
|---|---|
| `rtl/synth_pkg.sv` | widths, control-bus struct, enums, constants |
| `rtl/network_flow_controller.sv`, `control_register.sv`, `apu_wrapper.sv` | the ring and the APU shell |
| `rtl/uart_rx.sv`, `uart_tx.sv`, `command_parser.sv`, `control_module.sv` | the serial control path |
| `rtl/shared_divider.sv` | the time-shared divider |
| `rtl/dds.sv`, `sine_rom.sv` (+ `sine_quarter.hex`), `ramp_source.sv`, `oscillator.sv` | the oscillator |
| `rtl/filter_coefficients.sv`, `filter_scale.sv`, `filter_accumulator.sv`, `filter.sv` | the filter |
| `rtl/sequencer.sv`, `mixer.sv`, `delay.sv`, `sampler.sv`, `display.sv` | the other cores |
| `rtl/reset_gen.sv` | the reset generator |
| `rtl/modular_synth.sv` | the top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_modular_synth_full.sv` | the whole design at full size |

## Simulating

Run from the repository root. The sine table is loaded by the relative path
`rtl/sine_quarter.hex`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/synth_pkg.sv tb/tb_modular_synth.sv --top-module tb_modular_synth
./obj_dir/Vtb_modular_synth
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`, and each has a
watchdog. Expected values are computed independently inside the testbench,
from a reference model written in the testbench or from the mathematical
definition: the ideal biquad coefficients from `$sin`/`$cos`, exact integer
divisions, or a software copy of the recurrence.

### `tb_modular_synth`

This is the end-to-end test. It runs at a 1 MHz clock, 100 kbaud and
400-clock frames, with a 64-sample delay, a 256-sample sampler and an 8-line
display. Everything is programmed by typing commands into the serial input.
It checks:

- an exact mixer loopback, and clipping at level 2.0;
- that a selector switches only at SYNC;
- a 4800 Hz sine;
- the sequencer driving the oscillator in loop, reverse and stop modes;
- low-pass and high-pass responses to DC;
- a 5-sample echo;
- sampler record, looped playback and silence;
- the display bars.

It counts each mechanism and fails if any never occurred. The mechanisms are:

- ring reload;
- each bus location;
- selector switch;
- both divider levels;
- clipping;
- sequencer wrap, turn, stop and speed;
- sampler modes;
- display bars;
- echo.

### `tb_filter_square`

This feeds a 440 Hz square wave through the filter with a 4800 Hz cutoff,
first as a high-pass and then as a low-pass. Every output is compared with
two real-valued models:

- the same recurrence using the design's own coefficients, which agrees
  within 1 LSB;
- the ideal filter, which agrees within about 50 LSB of an 11585 peak.

### `tb_modular_synth_full`

This runs the top with no parameter changes: 64.8 MHz, 9600 baud and
1350-clock frames. It types the three commands of the example above and
checks:

- a 440 Hz tone, 10 periods in 1091 frames;
- the −3 dB peak;
- that every core starts exactly once per frame.

It then types six more commands. These switch the oscillator to a square wave
and patch it through the filter, set as a 4800 Hz low-pass with q = 1, to the
codec. The test compares 330 output samples with an ideal biquad computed
from the filter's recorded input. They agree within 58 LSB, one frame later.

It simulates about 8 million clocks.

## Size

The full top synthesises, before technology mapping, to:

- about 1400 word-level cells;
- 3400 flip-flop bits;
- 401,440 memory bits, almost all in the sampler (262,144), the delay
  (131,072) and the display (7,680).

Its clock-domain assumptions are simple: everything runs on one clock, and
only the reset button and the serial input are synchronised.
