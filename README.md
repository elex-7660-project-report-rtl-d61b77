# Audio spectrum visualizer: FPGA logic

A small audio spectrum analyser built around a Cyclone IV FPGA board with an
on-board serial ADC and a 96x64 RGB OLED panel. Audio comes from a phone's
line output. It is level-shifted and amplified off-chip, sampled at about
49 kHz per channel, and cut into blocks of 16 samples. A soft processor runs a
16-point FFT on each block and draws one coloured bar per frequency bin. The
frame is then sent to the panel over SPI.

The work is split between custom hardware and software on the processor.
The hardware collects samples at a fixed rate and delivers them with a
position number attached. It also sends bytes to the display. The FFT and the
drawing are software. This repository holds the custom hardware, written as
synthesizable SystemVerilog, plus testbenches that model the parts around it:
the converter chip, the panel and the processor.

```
 audio ─► level shift ─► ADC chip ──SPI──► adc_spi ──ready/valid──► sample_fifo ──stream──► processor
          + amplifier    (IN0, IN1)        (1024 clk                 (16 x 20 bit,            (FFT, bars,
          (analog)                          per pair)                 tagged)                  frame buffer)
                                                                                                  │ Avalon-MM
 OLED panel ◄──────────────────────SPI (sclk, din, cs, dc, res)──── oled_spi_master ◄─────────────┘
```

## Files

| file | what it is |
|---|---|
| `rtl/av_pkg.sv` | shared constants and packed types (sample pair, FIFO entry, display write word) |
| `rtl/adc_spi.sv` | free-running SPI master for the 8-channel 12-bit converter |
| `rtl/sample_fifo.sv` | 16-entry FIFO that tags each sample with its sample number |
| `rtl/oled_spi_master.sv` | bus-driven byte sender for the OLED panel |
| `rtl/audio_visualizer_top.sv` | the three blocks wired together, plus the reset synchroniser and debug LEDs |
| `tb/adc128s022_model.sv` | behavioural model of the converter chip |
| `tb/oled_panel_model.sv` | behavioural model of the panel's serial input and frame memory |
| `tb/tb_*.sv` | one self-checking testbench per block, and one for the whole design |

## The converter link (`adc_spi`)

This is the least obvious part of the design. The converter is an
ADC128S022-type part with a 16-clock serial frame. While chip select is low it
runs frame after frame. In each frame it does two things at once:

* it shifts out, MSB first, four zero bits and then the 12-bit result of the
  channel chosen in the **previous** frame;
* it reads a 3-bit channel number from bits 13:11 of the word shifted in, and
  converts that channel in the **next** frame.

So the channel request always runs one frame ahead of the data. `adc_spi`
reads two channels alternately by sending "next is channel 1" in frame 0 and
"next is channel 0" in frame 1. After chip select falls, the first frame
converts channel 0. From then on frame 0 of every pair carries channel 0 and
frame 1 carries channel 1:

| frame of the pair | channel number sent on mosi | result returned on miso |
|---|---|---|
| 0 | 1 | channel 0 (requested in frame 1 of the previous pair) |
| 1 | 0 | channel 1 (requested in frame 0) |

In general, frame *w* requests channel (*w*+1) mod `CHANNELS`.

**Clocking.** A divider toggles sclk every `HALF_PERIOD` = 16 system clocks,
so one bit takes 32 clocks. sclk is 1.5625 MHz from 50 MHz, inside the
converter's 0.8–3.2 MHz range. New command bits go onto mosi on falling sclk
edges, and miso is sampled on rising edges. Both are the converter's
conventions. One frame is 16 bits × 32 = 512 clocks (10.24 µs), and a pair is
1024 clocks (20.48 µs). That gives 97.7 ksps in total, or 48.8 kHz per
channel. Chip select is simply the registered reset. It stays low the whole
time the design runs, with no gaps between frames.

**Output.** After the last falling edge of frame 1, the 32 received bits are
copied to `data` and `valid` is raised. Channel 0's frame is in bits 31:16 and
channel 1's frame is in bits 15:0, each as `{4'b0, result[11:0]}`. The
converter never waits for the consumer. If the word has not been taken by the
time the next pair is done, the word is overwritten and `valid` stays high.
So a slow consumer loses pairs, but it is never offered stale data.

## The sample FIFO (`sample_fifo`)

The FIFO is a circular buffer of 16 entries, each 20 bits wide. The input
handshake is ready/valid. The output is an Avalon-ST style source
(`ovalid`/`oready`/`odata`). Only the low 16 bits of the input word are kept:
the channel-1 frame. Channel 0 reaches only the debug LEDs.

Each entry also stores its own address as a 4-bit **sample number** in bits
19:16. The address advances by one for every accepted word, so the sample
numbers count 0, 1, …, 15, 0, … in arrival order. The processor uses them to
tell where each sample falls in a 16-sample FFT block, and to place the
matching bar on the screen. The output word is `{12'b0, number[3:0],
{4'b0, result[11:0]}}`.

The buffer is full when advancing the write pointer would make it equal to
the read pointer. So at most 15 words are held and `iready` falls on the
16th. The oldest entry is shown on `odata` whenever `ovalid` is high. A word
written into an empty buffer is offered on the next clock. One word can go in
and one come out on every clock.

## The display link (`oled_spi_master`)

This block is a memory-mapped slave on the processor's Avalon-MM bus. Each
bus write sends one byte to the panel:

| `writedata` bit | meaning |
|---|---|
| 7:0 | the byte, sent MSB first |
| 8 | 1 = command byte (`dcn` low), 0 = data/pixel byte (`dcn` high) |

Reading returns a status word. Its bit 0 is 1 when the master is idle, and
the processor polls it before every write. A transfer pulls `csn` low for
exactly 8·`N` = 128 clocks. Each bit is `N` clocks long: sclk is low for the
first half and high for the second, and the panel latches data on the rising
edge. sclk rests low between bytes. A write that arrives during a transfer
abandons the transfer and starts the new byte. The panel's reset line
`resetn` is the inverse of the system reset.

A full 96×64 frame of RGB565 pixels is 12 288 bytes. At 129 clocks per byte
that is about 31.7 ms, so the link allows at most about 31 frames per second
before any software time.

## The top level (`audio_visualizer_top`)

The top instantiates the three blocks on one 50 MHz clock. The processor
system of the original board is not part of this RTL: the Nios II CPU, its
SDRAM controller, the PLL, the vendor stream-to-memory FIFO, the JTAG UART,
the timer and the bus fabric. Its two connection points are top-level ports
instead:

* `st_ready` / `st_valid` / `st_data`: the FIFO's stream output. It goes to
  whatever the processor reads samples through.
* `spi_write` / `spi_read` / `spi_writedata` / `spi_readdata`: the display
  master's slave port. It goes to a bus master.

`key[0]` is the active-low reset button. It passes through a two-flop
synchroniser, so all three blocks leave reset on the same edge. `led[7:4]`
and `led[3:0]` show the top four result bits of the latest channel-0 and
channel-1 conversions.

| rate | value at the defaults |
|---|---|
| converter sclk | 50 MHz / 32 = 1.5625 MHz |
| conversions | one per 512 clocks = 10.24 µs (97.7 ksps total) |
| sample pairs into the FIFO | one per 1024 clocks = 20.48 µs (48.8 kHz per channel) |
| FFT blocks | 16 samples = 327.7 µs of audio |
| display bytes | one per 128 clocks plus one bus write (3.125 MHz sclk) |

## Simulating

Every testbench ends with a line of the form `TB_RESULT checks=N failures=M`.
Each one also has a watchdog that counts a failure if the run hangs. To build
and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_audio_visualizer_top \
  rtl/av_pkg.sv rtl/adc_spi.sv rtl/sample_fifo.sv rtl/oled_spi_master.sv \
  rtl/audio_visualizer_top.sv tb/adc128s022_model.sv tb/oled_panel_model.sv \
  tb/tb_audio_visualizer_top.sv -o sim && obj_dir/sim
```

The other testbenches need only the package, their block and the model they
use:

* `tb_adc_spi` (with `adc128s022_model`) sets random levels on channels 0
  and 1. It checks that each pair arrives as `{4'b0, level0, 4'b0, level1}`,
  words come exactly 1024 clocks apart, and sclk has a 32-clock period. It
  also checks that an untaken word stays offered and is replaced by newer
  data.
* `tb_sample_fifo` drives random traffic at several densities against a
  reference queue. It checks every output word, including its sample number,
  and checks that `iready` and `ovalid` match the fill level on every clock.
* `tb_oled_spi_master` (with `oled_panel_model`) sends 200 random
  command/data bytes with status polling. It checks each received byte, the
  D/C line, the 128-clock chip-select window and eight sclk pulses per byte.
* `tb_audio_visualizer_top` runs the whole design at its default parameters
  through one display update. Channel 1 carries two tones, in FFT bins 3
  and 6. The processor model takes 16 samples and checks their numbers and
  values against the converter model. It computes the spectrum and checks
  that bin 3 is strongest. It then draws 16 bars into a 96×64 frame, sends
  6 command bytes and 12 288 pixel bytes, and compares the panel's memory
  pixel for pixel. While it draws, it stops reading samples, so the FIFO
  fills and the converter overwrites words. Afterwards the testbench checks
  that exactly 15 + 1 words are waiting, with unbroken sample numbers. It
  counts each of these mechanisms and fails if one never happened. The run
  takes about 1.6 M clocks, a second or two of simulation.

The models and testbenches use only two-state values, `$urandom` and real
arithmetic, so they run on any simulator that handles SystemVerilog timing
controls.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `adc_spi` | `HALF_PERIOD` | 16 | clocks per sclk half period; keep sclk within the converter's range |
| `adc_spi` | `FRAME_BITS` | 16 | the converter's frame length |
| `adc_spi` | `CHANNELS` | 2 | channels 0 … `CHANNELS`-1 are read in turn; `data` is `CHANNELS`×16 bits wide |
| `sample_fifo` | `DEPTH` | 16 | power of two; the sample number is log2(`DEPTH`) bits wide |
| `sample_fifo` | `DATA_BITS` | 16 | low bits of the input word that are stored |
| `oled_spi_master` | `N` | 16 | clocks per sclk period (even) |

The top uses every default. The 32-bit `st_data` word fits `DEPTH` ≤ 65 536.

## How far to trust it, and where it differs from the original

The behaviour of all three blocks matches the original board design where it
is known: frame format, channel order, rates, FIFO size and tag layout,
full/empty rule, byte format, D/C polarity and status bit. Simulation covers
every block on its own and the whole chain end to end. The converter and
panel models are written from the devices' published serial protocols, not
from vendor models. The RTL has not been run on hardware.

Choices made here that the original does not dictate, or does differently:

* **Resets.** Every register that is read is reset. This includes the
  converter's shift registers and output word, which the original left
  unreset. The top adds a two-flop reset synchroniser, standing in for the
  platform's reset controller.
* **FIFO output.** The oldest entry is read combinationally instead of
  through a look-ahead register. The timing at the ports is the same. The
  sample number is written together with each sample instead of being preset
  in the array.
* **Only channel 1 is buffered.** This is as in the original: the FIFO keeps
  the low half of each pair. Channel 0 is read but only shown on the LEDs.
* **Display sclk** is held low between bytes, instead of running freely with
  chip select high. The first data bit is on mosi from the first clock of a
  transfer.
* **Rates.** The original quotes 10.2 µs per conversion and 20.4 µs per
  pair. The exact values at 50 MHz are 10.24 µs and 20.48 µs.
* **Not included.** The processor system is out of scope: CPU, SDRAM
  controller, PLL, stream-to-memory FIFO, bus fabric and the two small
  wrapper modules that made the FIFO and the display master into platform
  components. So are the FFT and drawing software and the analog input
  stage. The end-to-end testbench stands in for the software with a
  straightforward DFT and bar-drawing routine. The colour table and the
  5-pixels-plus-gap bar layout are that testbench's own choice.
