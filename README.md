# Gesture-controlled music player

A music player you drive by tilting your wrist. An accelerometer on one FPGA board
watches the hand; a tilt along one axis becomes a command (play, pause, next song,
previous song, volume up, volume down). The command is sent as one serial byte over a
pair of Bluetooth serial modules to a second FPGA board. That board streams 8-bit mono
audio from an SD card to a PWM speaker output. It also draws a 640x480 VGA screen with
a live spectrum of the music, a play/pause button, the elapsed time, a progress bar,
and the speed and volume settings.

All of the logic of both boards is here as synthesizable SystemVerilog. The top is
`gesture_music_player`. It holds both boards side by side: the transmitter runs on
`clk_25`, and the player runs on `clk_25` plus `clk_100` for the transform. Four
off-chip or vendor parts stay outside, and their signals are top-level ports:

- the accelerometer's SPI controller (`accel_*`);
- the Bluetooth link (`bt_tx` leaves the transmitter, `bt_rx` enters the player);
- the SD card controller (`sd_*`);
- the clock generator.

## Signal path

```
accel_x/y/z ─► accel_conditioner ─► gestures ─► serial_tx ─► bt_tx ···radio··· bt_rx
              (|a|, sign, IIR /8)   (FSM)       (8N1, 38400)
bt_rx ─► uart_receiver ─► command_decoder ─► ctrl pulses ─┬─► audio ─► aud_pwm
                                                          │     │ card bytes
                                                          │     ▼
                                                          │  ft_engine (100 MHz) ─► magnitudes
                                                          ▼                             │
                                                       display ◄────────────────────────┘
                                                          └─► vga_r/g/b, vga_hs, vga_vs
```

The package `gmp_pkg` holds the shared types:

- the control byte, `{2'b00, play, pause, next, prev, vol_up, vol_down}`;
- the one-clock command pulses;
- the speed code: `00` = 1.0x, `01` = 2.0x, `10` = 0.5x;
- the five volume levels;
- the 12-bit colour type.

## Gesture side

**Conditioning** (`accel_conditioner`, `iir_filter`). Each sample set is handled in
four steps:

1. It is latched on the rising edge of `data_ready`.
2. Each axis is split into an absolute value and a sign bit (1 = negative).
3. Each magnitude feeds a first-order IIR filter: `sum <= sum - sum/8 + x`.
4. The filter output is `sum/16`. This is half the running average, which is why the
   thresholds below look small.

**Recognition** (`gestures`) is a three-state machine:

- **IDLE** waits for a filtered magnitude to reach its threshold: `0x0A0` for X and Y,
  `0x245` for Z. If several axes reach it in the same clock, Z wins, then Y.
- **RECORD** remembers the axis and the sign seen at that moment. It waits until the
  magnitude falls back below the threshold, so that one tilt gives one command.
- **ANALYZE** packs the byte and pulses `done`.

Each axis maps to a pair of commands:

| Axis | Positive tilt | Negative tilt |
|------|---------------|---------------|
| X | volume up | volume down |
| Y | next song | previous song |
| Z | play | pause |

**Serial link** (`serial_tx`, `uart_receiver`). The link is 8N1 at 38400 baud, with a
divisor of 651 clocks at 25 MHz. The receiver:

- synchronises the line with two flip-flops;
- finds the start edge and samples each bit in its middle;
- drops a frame whose stop bit is low.

`command_decoder` turns each received byte into one-clock pulses.

## Player side: the audio path

`audio` wires together five blocks:

- `playlist_controller`: holds the song start addresses;
- `playback_speed`: makes the sample tick;
- `sd_card_reader`: fills a 1024-byte FIFO from the card;
- `volume_control`: shifts the sample right;
- `pwm`: drives the speaker.

The reader is the part with the most rules:

- **Block reads.** The SD controller delivers 512 bytes per read. A read starts only
  when the controller is ready and the FIFO has at least 512 free places, so a block
  always fits.
- **Song boundaries.** Each song is read from its start address up to the next song's
  start address. The songs start at `0x200`, `0xBB8200` and `0x11FEC00`, and the last
  one ends at `0x1F68200`. Reading stops at the end of a song.
- **Skip.** A skip command clears the FIFO and restarts reading at the new song's
  address. If a block read is still delivering bytes, those bytes are thrown away:
  they belong to the old song. After a skip the player is paused until the next play.
- **Playback.** While playing, one byte leaves the FIFO per sample tick. The tick comes
  every 520 clocks at 1.0x (48.1 kHz), 260 clocks at 2.0x and 1040 clocks at 0.5x.
  The speed comes from two switches (`speed_sel`), because the gesture byte carries
  no speed.
- **Volume.** The five levels shift the unsigned sample right by 0, 1, 3, 5 or 7 bits.
  The player shows them as 100, 75, 50, 25 and 0.
- **PWM.** The output is high while a free-running 8-bit counter is below the sample.
- **Transform feed.** Every byte written into the FIFO is also sent to the spectrum
  path (`byte_available_out`, `music_byte`). The spectrum therefore follows the card
  data, not the playback rate.

## Spectrum path (`ft_engine`)

The chain is:

```
bytes (25 MHz) ─► toggle synchroniser ─► dft_engine ─► square_and_sum ─► sync_fifo
               ─► sqrt_unit ─► magnitude_bram (written at 100 MHz, read at 25 MHz)
```

**Crossing into the 100 MHz domain.** On each byte, the byte is held in a 25 MHz
register and a flag is toggled. The flag crosses to 100 MHz through two flip-flops,
and each change of the flag captures the held byte. This is safe because bytes are at
least four 100 MHz clocks apart. The reset crosses through its own two-flop
synchroniser.

**`dft_engine`** is a direct discrete Fourier transform of N = 1024 points:

- It collects N bytes and subtracts 128 from each.
- It then computes each bin k with one multiply-accumulate per clock:
  `Re += x[n]·cos(2πnk/N)` and `Im −= x[n]·sin(2πnk/N)`.
- The twiddle index is kept as a running sum modulo N.
- The cosine table is 16-bit. It is computed at elaboration with `$cos`; sine is the
  same table read a quarter period earlier.
- Each bin is scaled by 2^(log2 N + 7), saturated to 16 bits per part and offered on
  a valid/ready handshake.

A frame takes N·(N+1) ≈ 1.05 M clocks, which is 10.5 ms at 100 MHz. That is less than
the 21 ms that 1024 bytes take to arrive at the playback rate. Bytes that arrive during
the computation are not used, so each frame is a fresh window.

**The rest of the chain:**

- `square_and_sum` forms re² + im² in two pipeline stages.
- A FIFO decouples it from `sqrt_unit`, which produces one result bit per clock. The
  result is the truncated integer root, ready 17 clocks after the input is accepted.
- The magnitudes are written at their bin index into a 1024 x 32 two-clock memory. The
  display reads it on its 25 MHz clock with one clock of latency.
- `frame_done` pulses when the last bin has been written.

## Screen (`display`, `music_player_display`)

`vga` produces 640x480 timing from 25 MHz:

| | Visible | Front porch | Sync | Back porch | Total |
|---|---|---|---|---|---|
| Horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| Vertical (lines) | 480 | 11 | 2 | 31 | 524 |

Sync is active low at the pins. `music_player_display` composes each pixel from these
layers:

| Element | Place (x, y) | Driven by |
|---|---|---|
| spectrum bars | x 26..619, y 21..264 | `fft_bars`: bin = hcount/32 (lowest 20 bins on screen), height = magnitude >> 7, eight colour bands |
| play / pause button | (20, 300), 48x48 | `play_pause_button`: play after reset, pause symbol while playing, play again on pause or skip |
| elapsed time m:ss | digits at x 87, 110, 126, y 335 | `time_elapsed`: counts seconds of song time while playing (twice as fast at 2.0x, half as fast at 0.5x), stops at the song length, clears on skip |
| progress bar | (64, 360), 512x5 | `music_bar`: one more white pixel every 48,828 × song-length clocks, so the bar fills exactly at the end of the song; it follows the playback speed like the clock |
| speed "d.d" | (555, 450), (575, 450) | `speed_display`: 1.0, 2.0 or 0.5 |
| volume | x 540, 556, 572, y 405 | `volume_display`: 100/75/50/25/0 with leading zeros hidden |

The songs are 255, 137 and 292 seconds long; `song_select` tracks the current song and
its length. Digits come from `digit_rom`, which has ten 16x16 one-bit glyphs at address
`digit*256 + row*16 + col`. The colour and the delayed sync signals leave two clocks
after the beam position: one clock for the memory and ROM reads, one for the output
register.

## Where this design makes its own choices

These points are not fixed by the original description, or depart from it:

- **Transform.** The original used a vendor FFT core and a CORDIC square root. Here a
  direct DFT and a bit-serial square root do the same job with one multiplier and no
  vendor IP. The output scaling and saturation are this design's.
- **Pictures.** The original drew the title, instructions, labels and button art from
  picture ROMs, and the digits from drawn images. Neither set of pictures is available.
  Here the digits are computed seven-segment glyphs and the button is computed shapes.
  The title, instruction and label pictures are absent.
- **Volume display.** The volume digits were never placed on the original screen, so
  their position is chosen here.
- **Bar height.** The spectrum uses a fixed shift for the bar height, not scaling to a
  running maximum.
- **Gesture timing.** The sign of a gesture is taken when the threshold is crossed.
  Axis priority is Z > Y > X.
- **Control details.** Skip pauses playback. A block read still in progress at a skip
  is drained and discarded. Resets are synchronous, one per board.
- **Song time.** The block diagram feeds the playback speed into the elapsed-time and
  progress-bar blocks, but the text only describes a fixed one-second count. Here both
  count song time: two steps per clock at 2.0x, one step every other clock at 0.5x.
- **Link speed.** The link runs at 38400 baud (divisor 651). One original note mentions
  9600 baud as a fallback, but the printed divisor is the 38400-baud value.
- **Unused outputs.** Status outputs with no pin (playing, volume, frame done, and so
  on) are left open in the top. Tests read them inside the instances.

## Parameters

All defaults are the real sizes:

| Parameter | Default |
|---|---|
| `UART_DIV` | 651 |
| `FIFO_DEPTH` | 1024 |
| `BLOCK_BYTES` | 512 |
| `BASE_PERIOD` | 520 |
| `FT_POINTS` | 1024 |
| `TICKS_PER_SEC` | 25,000,000 |
| `BAR_K` | 48,828 |

Every block also takes its own sizes as parameters, for faster simulation. At default
size, synthesis gives about 1.1 k cells, about 1 k flip-flops and 104 kbit of memory:
the FIFOs, the transform frame, the magnitude memory and the tables.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The references are computed
independently in the testbench. Some examples:

- an integer DFT with the same quantised cosines;
- an exact integer square root;
- cycle-by-cycle VGA counters;
- a queue model of the FIFO;
- a model of the SD data for the reader;
- a reference model of the accelerometer filter;
- a model of volume step, song number and play state under random commands.

Besides the directed cases, most testbenches drive random stimulus with `$urandom`:
random bytes on the link, random tick spacing, random PWM levels and random
accelerometer samples.

`tb/fake_sd.sv` is a behavioural model of the SD controller's read interface. Byte i of
the block at address a is (i + a/512) mod 256, with start and byte delays.

There are two system-level tests:

- `tb_gesture_music_player` runs the whole system at reduced sizes: 16-clock bits,
  64-byte FIFO, 16-byte blocks and a 16-point transform. It loops `bt_tx` back to
  `bt_rx`, performs all six gestures and changes speed. It counts each mechanism:
  - each gesture type;
  - bytes over the link;
  - SD block reads;
  - FIFO hold-off, and that no read starts without room;
  - samples and PWM activity;
  - speed change;
  - transform frames;
  - time and progress-bar steps;
  - a full VGA frame and lit pixels.
  A mechanism that never happens counts as a failure.
- `tb_gesture_music_player_full` runs the top with every default. It covers:
  - a play gesture at 38400 baud;
  - 512-byte block reads into the 1024-byte FIFO with hold-off;
  - the 520-clock sample period;
  - a volume change;
  - a complete 1024-point transform frame;
  - a full VGA frame;
  - a pause.

  The seconds and progress-bar steps need 25 M and 12 M clocks at this size, so they
  are covered by the reduced test.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gmp_pkg.sv tb/tb_audio.sv --top-module tb_audio
./obj_dir/Vtb_audio
```

Linting each module with `-Wall` shows only these, each explained in the module's
header comment:

- unused package constants in modules that import the package;
- status signals kept for tests;
- the two reserved bits of the control byte;
- open status outputs in the top.
