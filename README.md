# UART piano with synchronous and clock-crossing FIFOs

A small FPGA synthesiser you play from a serial terminal. Each key you type is
received by a UART, queued, echoed back to the terminal and played as a square
wave for a fixed note length. The sound goes out two ways: as a one-bit PWM
signal for a mono audio jack, and as 20-bit PCM samples over I2S to an audio
codec. Most of the design is glue between parts that run at very different
rates: characters arrive every 87 µs at 115200 baud, notes last 200 ms, and
samples leave at 48 kHz. FIFOs absorb those differences. One FIFO also carries
the samples from the 125 MHz system clock into the codec's own clock domain.
That one is an asynchronous FIFO with Gray-coded pointers.

The design follows a university FPGA lab exercise on FIFOs and clock crossing.
The lab fixes the structure, the interfaces and the main numbers. Parts the lab
only names, such as the UART, the debouncer, the tone generator and the scale
table, are this design's own simple versions. "Own choices" below lists every
such decision.

## Data flow

```
 FPGA_SERIAL_RX ─► sync ─► uart_receiver ─rv─► [RX fifo 8x8] ─► piano_fsm ─► [TX fifo 8x8] ─► fifo_rv_source ─rv─► uart_transmitter ─► FPGA_SERIAL_TX
                                                                   │  ▲
                                              piano_scale_rom ─────┘  │ note_length up/down, reset
                                              tone_generator ──► AUD_PWM (gated by SWITCHES[1])
                                                                   │
                                                    20-bit PCM, one per 1/48 kHz
                                                                   ▼
                         125 MHz domain  ───────────  [async_fifo 20x8]  ───────────  AUDIO_CLK domain
                                                                   ▼
                                                            i2s_controller ─► MCLK SCLK LRCK SDIN
 BUTTONS ─► button_parser (synchronizer ► debouncer ► edge_detector) ─► reset / up / down pulses
```

"rv" marks a ready/valid handshake: a word moves on a clock edge where both
`valid` and `ready` are high. The FIFOs have a different port style: `wr_en`
and `full` on the write side, `rd_en`, `dout` and `empty` on the read side. Two
small adapters join the two styles:

* **Receiver into RX FIFO.** `wr_en = valid & !full` and `ready = !full`. This
  is written directly in `z1top`.
* **TX FIFO into transmitter** (`fifo_rv_source`). FIFO read data arrive one
  cycle after `rd_en`, so `valid` is a register that is set by a read. The
  FIFO is read again only when that register is empty or is being emptied in
  the same cycle. This gives one word per cycle under full load, and no word
  is lost or repeated.

## FIFO timing (both FIFOs)

* `wr_en` high on a rising edge with `full` low stores `din`. A write while
  `full` is ignored.
* `rd_en` high on a rising edge with `empty` low advances the read pointer. The
  word appears on `dout` after that same edge and stays there until the next
  read. A read while `empty` is ignored, and `dout` keeps its value.
* A read and a write may happen on the same edge.
* Each pointer has one more bit than the address. The FIFO is empty when the
  two pointers are equal. It is full when the addresses match and the extra
  wrap bits differ. `DEPTH` must be a power of two, and an elaboration-time
  assertion checks this.

The synchronous `fifo` has a synchronous `rst` that clears both pointers.

## The asynchronous FIFO

This block needs the most care. Its write side runs on `wr_clk` and its read
side on `rd_clk`, and the two clocks have no known relation. The RAM itself is
simple: each port uses only its own clock. The difficulty is the flags. `full`
is computed in the write domain, so it needs the read pointer. `empty` is
computed in the read domain, so it needs the write pointer. A multi-bit
counter sampled by a foreign clock while it changes can be captured as any
mixture of old and new bits.

Each side therefore exports its pointer in Gray code. The binary counter
`wr_bin` and its Gray copy `wr_gray` are updated together:
`wr_gray <= bin2gray(wr_bin + 1)`. In Gray code successive values differ in
exactly one bit. A capture in the middle of a change can only give the old
value or the new value, never a third one. The Gray pointer passes through two
flip-flops clocked by the other domain. This is the same two-stage synchroniser
used for buttons, only as wide as the pointer. It is then converted back to
binary (`gray2bin`) and compared:

```
write domain:  full  = (wr_bin - sync(rd_bin)) == DEPTH
read domain:   empty =  rd_bin == sync(wr_bin)
```

A pointer seen through the synchroniser is always a past value, two to three
destination-clock edges old. The flags are therefore pessimistic, never
optimistic:

* `full` may stay high for a few write clocks after a read has made room.
* `empty` may stay high for a few read clocks after a write.
* A flag is never lowered too early, so there is no overflow or underflow.

In the testbench `full` and `empty` settle within about three cycles of the
destination clock once the other side stops.

**Reset.** The asynchronous FIFO has no reset port. A reset generated in one
domain is not a clean reset in the other. Instead every register has a
declared initial value, which an FPGA loads at configuration. The FIFO
therefore comes up empty, with both pointers at zero, and is never cleared
afterwards. Verilator reports these registers as `PROCASSINIT` warnings, and
the warnings are expected. The same style is used for the synchronisers,
debouncer, edge detector and power-on reset counter. Those must work before
any reset exists.

`bin2gray` and `gray2bin` default to 16 bits, which is enough for any pointer
this design is expected to use. The FIFO instantiates them at its pointer width
(4 bits for depth 8). Read data are registered, as in the synchronous FIFO.
There is no first-word-fall-through mode.

## Piano controller (`piano_fsm`)

The controller has four states:

| state | action |
|---|---|
| IDLE | if enabled (`SWITCHES[0]`) and the RX FIFO is not empty, pulse `rd_en` |
| FETCH | latch the character from the FIFO's `dout` |
| ECHO | write the character into the TX FIFO, waiting while it is full; latch the note's `tone_switch_period` from the ROM |
| PLAY | run the tone generator for `note_length` cycles, then go back to IDLE |

**Sample stream.** Sampling runs on its own, independent of the states. Every
`CLOCK_FREQ / SAMPLE_RATE` cycles (2604 at 125 MHz and 48 kHz) the square wave
is sampled. The sample value depends on the state:

* In PLAY, a high wave gives `0x7FFFF` and a low wave gives `0x80000`. These
  are the largest and smallest 20-bit two's-complement values, so the I2S
  output is the PWM waveform at full scale.
* A key that has no note plays `0`.
* While IDLE and enabled, the sample is `0`.

A sample waits in a one-entry buffer until the sample FIFO has room. If it is
still waiting at the next sample tick, the newer sample replaces it. The note
timer never waits for a FIFO, so a note always lasts `note_length`.

**Note length.** `note_length` starts at 1/5 s (`CLOCK_FREQ/5`). Each pulse from
BUTTONS[1] adds one step (1/50 s) and each pulse from BUTTONS[2] subtracts one.
The value never goes below one step and never overflows its 32 bits. A change
applies from the next note.

**Audio PWM.** `AUD_PWM` is the tone generator's square wave gated by
`SWITCHES[1]`. It is low whenever no note plays.

**Reset.** While `rst` is high the controller drives no FIFO strobe. This
matters because the sample FIFO it writes has no reset of its own.

Two consequences are worth knowing:

* A burst of typing is buffered rather than played at once. Up to ten
  back-to-back characters are kept: eight in the RX FIFO, one in the
  receiver's holding register and one being played. They drain one per note.
  If more arrive, each new byte overwrites the receiver's holding register.
* The echo of a character is sent when that character's note starts, not when
  it arrives.

## Scale ROM (`piano_scale_rom`)

The ROM has 256 entries of 24 bits, indexed by ASCII code. Two chromatic
octaves are laid out on the keyboard rows, in either letter case:

```
z s x d c v g b h n j m ,     C4 … C5
q 2 w 3 e r 5 t 6 y 7 u i     C5 … C6
```

For semitone `n` above C4 the frequency is `f = 440 Hz · 2^((n-9)/12)`. The ROM
stores `tone_switch_period = round(CLOCK_FREQ / (2f))`, for example
142045 for A4 (`n`) at 125 MHz. All other codes store 0, which means silence.
The table is computed at elaboration from `CLOCK_FREQ`, so the notes stay in
tune when the clock parameter changes. `tone_generator` flips its output every
`tone_switch_period` cycles.

## I2S output (`i2s_controller`)

The controller runs entirely on `AUDIO_CLK`. It divides that clock by fixed
ratios:

* MCLK = AUDIO_CLK / 2
* SCLK = MCLK / 4
* 64 SCLK periods per LRCK frame, 32 bit slots per channel

With a 24.576 MHz AUDIO_CLK this gives MCLK 12.288 MHz, SCLK 3.072 MHz and
48 kHz frames. The ratios are parameters (`CLK_PER_MCLK`, `MCLK_PER_SCLK`,
`SCLK_PER_FRAME`).

**Signal timing.**

* LRCK is low for the left channel and high for the right.
* SDIN and LRCK change on falling SCLK edges and are stable at rising ones.
* The sample goes out MSB first in slots 1–20 of each half frame. That is, it
  starts in the second SCLK period after the LRCK edge, as I2S requires.
* The other slots carry 0.
* Both channels carry the same mono sample.
* All four outputs are registered.

**Sample fetch.** One sample is taken per frame. In the first cycle of the
frame's last bit slot the controller raises `pcm_data_ready` (the FIFO's
`rd_en`) if the FIFO is not empty. One cycle later it loads `pcm_data`, and
that sample goes out in the following frame. If the FIFO was empty, the
previous sample is sent again. After reset the sample is 0.

## Top level (`z1top`)

| port | dir | use |
|---|---|---|
| `CLK_125MHZ_FPGA` | in | system clock |
| `AUDIO_CLK` | in | I2S domain clock (24.576 MHz for 48 kHz; may be tied to the system clock, the frame rate then scales) |
| `BUTTONS[3:0]` | in | 0 reset, 1 note longer, 2 note shorter, 3 unused |
| `SWITCHES[1:0]` | in | 0 piano on, 1 AUD_PWM on |
| `FPGA_SERIAL_RX` / `FPGA_SERIAL_TX` | in/out | UART, 8N1, 115200 baud |
| `AUD_PWM` | out | mono square wave |
| `MCLK`, `SCLK`, `LRCK`, `SDIN` | out | I2S to the codec |

| parameter | default | meaning |
|---|---|---|
| `CLOCK_FREQ` | 125 000 000 | system clock in Hz (UART timing, sample pacing, note lengths, ROM) |
| `BAUD_RATE` | 115 200 | UART |
| `FIFO_DEPTH` | 8 | all three FIFOs (power of two) |
| `SAMPLE_RATE` | 48 000 | samples written per second |
| `NOTE_LENGTH_DEFAULT` / `NOTE_LENGTH_STEP` | CLOCK_FREQ/5, CLOCK_FREQ/50 | in cycles |
| `DEBOUNCE_SAMPLE_CNT` / `DEBOUNCE_PULSE_CNT` | 25 000 / 150 | a press must be seen on 150 samples 200 µs apart (30 ms) |
| `CLK_PER_MCLK` / `MCLK_PER_SCLK` / `SCLK_PER_FRAME` | 2 / 4 / 64 | I2S ratios |
| `RESET_CYCLES` | 64 | length of the internal reset pulse |

**Reset.** A power-on counter and the reset button each start a reset of
`RESET_CYCLES` system cycles. The reset is synchronous in the system domain,
and a two-flip-flop synchroniser carries it into the audio domain. The
asynchronous FIFO is not reset (see above).

**Input synchronisers.** The serial input and the switches each pass through a
two-flip-flop synchroniser. The buttons go through the button parser:
synchroniser, then a debouncer (a press must be seen on
`DEBOUNCE_PULSE_CNT` consecutive samples taken every `DEBOUNCE_SAMPLE_CNT`
cycles), then a rising-edge detector. Each press gives exactly one
one-cycle pulse.

The other sample rates the design targets are 44.1 kHz and 88.2 kHz. For
those, set `SAMPLE_RATE` to 44 100 or 88 200. Run `AUDIO_CLK` at 512 times the
rate: 22.5792 MHz or 45.1584 MHz.

## Own choices and departures

The lab description fixes the following:

* the block structure and signal names;
* the FIFO behaviour;
* the Gray-code crossing through two flip-flops, and the initial-value reset of
  the asynchronous FIFO;
* the PCM full-scale values;
* one sample per I2S frame, starting at the second bit clock, with the last
  sample repeated when the FIFO is empty;
* the echo, the note length of 1/5 s with a button-adjustable step, and
  waiting on full FIFOs;
* 125 MHz, 115200 baud and a 48 kHz sample rate;
* a FIFO depth of 8.

Everything else is this design's own:

* **Audio clock.** The separate `AUDIO_CLK` input and its 24.576 MHz value.
* **I2S details.** The MCLK/SCLK/LRCK ratios, mono duplication, the moment of
  the sample pull, and LRCK low for the left channel.
* **UART.** Built from scratch: 8N1, mid-bit sampling, and a one-byte holding
  register in the receiver.
* **Button handling.** The debouncer algorithm and its counts, and the
  button and switch assignments.
* **Scale.** The keyboard layout and the equal-tempered scale in the ROM.
* **Controller details.**
  * The state sequence.
  * The note-length step of 1/50 s and its limits.
  * Zero samples while idle. The lab allows zeros or no samples at all.
  * Silence for non-note keys.
  * Dropping a stale sample when a new one is due.
* **Reset.** The power-on reset counter and the reset stretching.
* **Read address of the synchronous FIFO.** One sentence of the lab says a
  read presents the data "indexed by the write pointer". Another says the data
  at the read pointer are sent out. The FIFO reads at the read pointer.

Not built:

* the optional extras of the lab: other waveforms, keypad control, and an
  attack/release envelope;
* the ALMOST_FULL, WR_ACK, OVERFLOW, VALID, UNDERFLOW, ALMOST_EMPTY,
  programmable and data-count outputs of a full-featured FIFO;
* first-word-fall-through reads.

## Simulation

All files are SystemVerilog 2017. `rtl/piano_pkg.sv` must be read first. Each
testbench in `tb/` prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/piano_pkg.sv tb/z1top_tb.sv --top-module z1top_tb
./obj_dir/Vz1top_tb
```

| testbench | what it shows |
|---|---|
| `fifo_tb` | reset state, fill/overflow/drain/underflow, write-then-read, 3000 cycles of random simultaneous traffic against a queue model |
| `async_fifo_tb` | power-up state without reset, random traffic with write clock faster then slower than read clock, order and no loss, flags never early and settling after traffic stops |
| `bin2gray_tb`, `gray2bin_tb` | all 65 536 codes |
| `i2s_controller_tb` | clock periods, bit alignment, one FIFO read per frame, repetition on empty |
| `piano_fsm_tb` | echo, note length and its buttons, 20-cycle sample spacing, square-wave run lengths, idle zeros, waiting on full TX and sample FIFOs |
| `piano_scale_rom_tb` | all 256 entries against the formula |
| `tone_generator_tb`, `uart_*_tb`, `fifo_rv_source_tb`, `synchronizer_tb`, `debouncer_tb`, `edge_detector_tb`, `button_parser_tb` | the small blocks |
| `z1top_tb` | whole design at reduced rates: echo, notes on I2S and PWM, RX FIFO filling, sample FIFO running empty and full (the audio clock is varied), note-length buttons, reset button, enable switch |
| `z1top_full_tb` | whole design at default parameters: one 0.2 s A4 note (about 18 s of simulation) |
| `z1top_rates_tb` | 44.1 kHz and 88.2 kHz configurations at full clock rates, shortened notes |

**Limits of the verification.** The simulator has only two logic states, so
clock-domain crossing is checked for logic only. Metastability and the
Gray-code guarantee are argued above, not simulated. The design has not been
run on an FPGA or a real codec.
