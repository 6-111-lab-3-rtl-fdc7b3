# Voice recorder on an AC97 codec

A push-to-record voice recorder for an FPGA board with an AC97 audio codec.
The codec delivers a microphone sample and takes a headphone sample 48,000
times a second. While the record button is held, the recorder keeps every
eighth incoming sample. That 6 kHz stream goes into a 64K x 8 block RAM,
which holds about 10.9 seconds. On release, the recording plays back in an
endless loop.

Playback must make a 48 kHz stream out of 6 kHz samples. There are two ways to
do that, chosen by a switch:

* **replication**: each stored sample is sent eight times. This is simple, but
  the steps between samples add a lot of high-frequency noise;
* **8-step linear interpolation**: the eight outputs between stored samples S1
  (older) and S2 (newer) are `((8-i)*S1 + i*S2) >>> 3` for i = 0..7. The
  output follows a straight line from S1 towards S2.

Two more modes are built in:

* **instant replay**: recording runs continuously and playback gives the last
  10.9 s;
* **test mode**: a 750 Hz tone on playback and a microphone loop-back on
  record, for checking the audio path.

All RTL is SystemVerilog (IEEE 1800-2017). It passes Verilator lint and
yosys' slang front end.

## Signal path

```
            lab3 (top)
 codec pins ┌────────────────────────────┐        ┌─────────────────────────┐
 SDATA_IN ─►│ audio                      │ ready  │ recorder                │ addr 16, we, din 8
 SDATA_OUT◄─│  ac97 (BIT_CLK domain)     ├───────►│  interpolator           ├──────────────► bram_64kx8
 SYNC     ◄─│  ac97commands              │ mic 8  │  tone750hz (test mode)  │◄────────────── dout 8
 BIT_CLK  ─►│  2-flop crossing to 27 MHz ├───────►│                         │
 RESET#   ◄─│                            │◄───────┤                         │◄── playback ── debounce ◄── ENTER
            └────────────────────────────┘ hp 8   └─────────────────────────┘◄── switch[2:0]
```

| module         | role |
|----------------|------|
| `lab3`         | top level: wires the blocks to the codec pins, the button and the switches |
| `audio`        | codec interface seen from the 27 MHz side: `ready`, 8-bit mic sample in, 8-bit headphone sample out |
| `ac97`         | AC-link serial controller: sends and receives 256-bit frames on the codec's 12.288 MHz bit clock |
| `ac97commands` | sends codec register writes in an endless cycle: input select, gains, volumes |
| `recorder`     | record/playback control, memory addressing, replication or interpolation |
| `interpolator` | combinational `((8-i)*S1 + i*S2) >>> 3` |
| `bram_64kx8`   | single-port synchronous RAM, read-first, one clock of read latency |
| `tone750hz`    | 20-bit sine, 64 samples per period (750 Hz at 48 kHz) |
| `debounce`     | two-flop synchronizer plus a stable-for-DELAY-clocks filter |
| `reset_sync`   | asynchronous-assert, synchronous-release reset for the bit-clock domain |
| `voice_pkg`    | sample type, AC97 frame geometry, codec register addresses |

## The group of eight: what happens on each `ready`

The recorder's whole timing turns on `ready`. It rises once per 48 kHz frame,
which is every 562.5 clocks of the 27 MHz system clock. A 3-bit phase counter
counts the rises from 0 to 7. It is cleared whenever the mode changes, so a
group always starts with the first `ready` after entering a mode.
`to_ac97_data` is registered on the clock edge after the one where `ready` is
first seen high.

**Record mode** (button held, `playback = 0`):

```
ready rise   0        1    2    3    4    5    6    7    0 ...
memory       write    -    -    -    -    -    -    -    write
             mem[a]=x0                                   mem[a+1]=x8
address      a -> a+1                                    a+1 -> a+2
to_ac97_data x0       x1   x2   x3   x4   x5   x6   x7   x8      (loop-back)
```

The write happens in the same clock as the `ready` rise, using the sample
present then. The address written is saved as the highest address written.

**Playback mode** (button released, `playback = 1`), with the interpolator on:

```
ready rise   0    1          2           ...  7           0
to_ac97_data S1   (7S1+S2)>>3 (6S1+2S2)>>3 ... (S1+7S2)>>3  S2 ...
after rise 7:  S1 <- S2, then S2 <- next stored sample (2 clocks)
```

With the interpolator off, the output is S1 on all eight rises. On entering
playback, the recorder first reads the oldest two stored samples into S1 and
S2. This takes four clocks. Each later fetch sets the address in one clock and
captures the read data in the next. It finishes more than 500 clocks before
the next `ready`. After the highest address written, the address goes back to
the oldest sample. The recording therefore loops, and the interpolator also
runs across the seam, from the last sample to the first.

## Interpolation arithmetic

Samples are 8-bit two's complement (-128..+127) everywhere. The weighted sum
`(8-i)*S1 + i*S2` lies between -1024 and +1016, so it is formed in 12 signed
bits. `>>> 3` is an arithmetic shift, so division by 8 rounds towards minus
infinity. For example, S1 = -3, S2 = 0, i = 1 gives -21 >>> 3 = -3. The result
always lies between S1 and S2, so it fits back into 8 bits. An unsigned
implementation would be wrong for every negative sample. This is why the
operands are declared `signed` (the `sample_t` type).

## Memory full, instant replay and test mode

* **Memory full, replay off** (`switch[1] = 0`): recording stops once the last
  address has been written. Playback then loops over all 65,536 samples from
  address 0.
* **Instant replay** (`switch[1] = 1`): the write address wraps, overwriting
  the oldest samples. On entering playback, the address is set to the slot
  after the newest sample, which holds the oldest one. Playback runs from
  there around to the newest, giving the last 2^ADDR_W / 6 kHz = 10.9 s.
  Without a wrap, it behaves as normal recording.
* **Test mode** (`switch[2] = 1`): playback sends the upper 8 bits of the
  750 Hz tone. Record mode loops the microphone back. Nothing is written, so
  the stored recording survives. The tone generator steps on every `ready` in
  all modes, so its phase is arbitrary.

## The AC-link

`ac97` runs entirely on the codec's BIT_CLK. A frame is 256 bits, MSB first:

| bits    | slot | content |
|---------|------|---------|
| 0..15   | tag  | bit 15 frame valid, bits 14..11 slot 1..4 valid |
| 16..35  | 1    | bit 19 = 0 (write), bits 18..12 register index |
| 36..55  | 2    | register data in bits 19..4 |
| 56..75  | 3    | left PCM, 18 bits in bits 19..2 |
| 76..95  | 4    | right PCM |
| 96..255 | 5-12 | zeros |

* The controller changes SYNC and SDATA_OUT on the rising edge of BIT_CLK and
  holds SYNC high during the 16 tag bits. The codec samples on the falling
  edge.
* Input runs one bit behind output: input bit n is sampled on the falling edge
  within output bit n+1.
* When input bits 56..95 are in, the two 18-bit input words are published and
  `ready` goes high for 32 bit clocks.
* The output fields are captured at the next frame start, about 160 bit clocks
  later.

`audio` carries `ready` into the 27 MHz domain through two flip-flops. The
input word is stable for a whole frame around that edge. The outgoing 8-bit
sample changes a few system clocks after the `ready` rise, long before the
controller captures it. So no multi-bit value is ever sampled while it
changes. The mic sample is the upper 8 of the 18 left-channel bits. The
microphone is mono, so the right channel carries the same data. The outgoing
sample fills the upper 8 bits of both channels.

RESET# is held low during `reset` and for 64 system clocks after it. The
controller and command sequencer stay in reset for as long as the codec does.
Their reset is asserted asynchronously (BIT_CLK is stopped during a codec
reset) and released on BIT_CLK.

## Codec configuration

`ac97commands` steps to the next entry of a six-entry table on each frame and
then starts over. Because it never stops, the codec is set up again after any
reset.

| register | name          | value | meaning |
|----------|---------------|-------|---------|
| 02h      | master volume | 0000h | 0 dB, unmuted |
| 04h      | headphone     | 0000h | 0 dB, unmuted |
| 0Eh      | microphone    | 0048h | +20 dB boost (bit 6), 0 dB gain, unmuted |
| 18h      | PCM out       | 0808h | 0 dB, unmuted |
| 1Ah      | record select | 0000h | microphone on both ADC channels |
| 1Ch      | record gain   | 0000h | 0 dB, unmuted |

## Controls and parameters

| input            | use |
|------------------|-----|
| `button_enter`   | active low. Pressed = record, released = playback. Debounced over 10 ms |
| `switch[0]`      | 1 = interpolate on playback |
| `switch[1]`      | 1 = instant replay |
| `switch[2]`      | 1 = test mode (tone / loop-back) |
| `reset`          | active high, synchronous to `clock_27mhz`. Also resets the codec |

Three 16-bit logic-analyzer outputs are brought out for debugging on the board:
* pod 1 is clocked by `ready` and carries `{from_ac97_data, to_ac97_data}`.
  Capture on the falling edge of `ready` to see the playback waveform one
  sample per point. With interpolation it shows straight segments of eight
  points;
* pod 2 carries the memory address;
* pod 3 carries `{we, playback, 6'b0, read data}`.

| parameter | module | default | meaning |
|-----------|--------|---------|---------|
| `ADDR_W`  | `lab3`, `recorder`, `bram_64kx8` | 16 | memory depth 2^ADDR_W samples |
| `DEBOUNCE_DELAY` / `DELAY` | `lab3` / `debounce` | 270000 | clocks the button must be steady |
| `RESET_HOLD` | `audio` | 64 | system clocks of codec reset after `reset` |
| `READY_BITS` | `ac97` | 32 | length of `ready` in bit clocks |

At the defaults, synthesis gives one 524,288-bit memory and about 320
flip-flops.

## Provenance and deviations

These parts follow the original lab specification:
* the recorder's ports and its record/playback rules;
* 6 kHz storage of every eighth sample;
* the 64K x 8 single-port memory;
* the replication and interpolation formulas;
* the interpolator switch;
* the optional instant replay;
* the block structure;
* the frame size and rates;
* the codec register addresses and the +20 dB microphone boost.

These are choices made here where the specification is silent:
* the AC-link slot layout and edge timing, which follow the AC'97 standard;
* the register data values and the record-select register 1Ah;
* the 8-bit truncation of the 18-bit PCM;
* the clock-domain crossing;
* the `ready` window;
* the reset and debounce timing;
* the button polarity and switch assignments;
* stopping when the memory is full;
* the microphone loop-back while recording;
* keeping the tone/loop-back behaviour as a test mode;
* the tone table;
* the block-RAM read mode;
* the grouping of the logic-analyzer signals into pods.

Not included: the codec chip itself, which is external. The testbenches use a
behavioural model of its serial link.

## Simulation

Testbenches are self-checking. Each ends with
`TB_RESULT checks=N failures=M`. Build any of them with Verilator 5, for
example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv -Irtl \
    rtl/voice_pkg.sv tb/ac97_codec_model.sv tb/tb_lab3.sv --top-module tb_lab3
obj_dir/Vtb_lab3
```

| testbench | what it covers |
|-----------|----------------|
| `tb_lab3` | end to end through the codec model, with a 32-word memory and a 16-clock debounce. Covers record, loop-back, replicated and interpolated looping playback, memory full, instant-replay wrap, test-mode tone and loop-back, button bounce, and the analyzer outputs. Each mechanism is counted and must occur |
| `tb_lab3_full` | default parameters: one full record/playback operation (about 5 s of CPU time) |
| `tb_lab3_fill` | default parameters: records past the end of the 64K memory (10.9 s of audio) and checks every word. This is the longest run, a few minutes |
| `tb_recorder` | recorder with a 16-word behavioural RAM and direct `ready` pulses. Checks every mode against a reference model, including the one-clock output latency |
| `tb_interpolator` | exhaustive: all 2^16 sample pairs x 8 steps |
| `tb_bram_64kx8` | random writes and reads, read latency, read-first |
| `tb_ac97` | frame format, 256-bit-clock frame period, SYNC length, command and PCM slots both ways |
| `tb_audio` | `ready` period (562-563 clocks), sample widths, RESET# timing, all six codec writes |
| `tb_ac97commands`, `tb_tone750hz`, `tb_debounce` | the command table and its repetition; the sine values against `$sin`; glitch rejection and latency |

`tb/ac97_codec_model.sv` models the codec's serial side:
* runs BIT_CLK once RESET# is high;
* sends a microphone word chosen by the testbench in each frame;
* decodes the tag, command and PCM slots it receives.

The simulation is two-state: every register that is read is reset.

Limits of the verification: the AC-link timing has been checked only against
this design's own codec model, not against a real LM4550 or its datasheet
timing. Synthesis has been checked with yosys' generic flow, not an FPGA
vendor flow.
