# ALCOR-64 digital core

ALCOR-64 reads out 64 SiPM pixels, arranged as 8 columns of 8, at a 394.1 MHz clock. That is four times the 98.5 MHz EIC bunch clock. Every discriminator edge a pixel sees becomes a 32-bit word. The word holds the pixel's column and number, the TDC that timed the edge, a 15-bit coarse time and a 9-bit fine time. Each column has its own readout:

- The End of Column (EoC) logic scans the pixels and sorts the words into frames.
- A frame is the data between two Start, New Orbit or rollover events.
- Each frame is wrapped in 8b/10b control words and protected by a CRC-32.
- Each column sends its frames on its own double-data-rate serial line at 788 Mb/s.

One SPI port sets up the chip. One reset line, whose pulse width selects one of three commands, keeps all columns on a common time frame.

This repository holds synthesizable SystemVerilog for the whole digital core. Two parts are behavioural models instead: the shutter delay chains and, in the testbenches only, the analogue TDC interpolators. Each block has a self-checking testbench, and one chip-level testbench runs at full size.

## Hierarchy

```
alcor_top
├── alcor_frame_ctrl          reset-line decoder, frame timing (TMR)
├── alcor_spi                 SPI slave, Pointer/Data/Status/Rad error/EoC status, 16 EoC registers (TMR)
└── g_col[0..7]               one per column
    ├── alcor_shutter_delay   column skew correction of the test pulse (100 ps steps, model)
    ├── g_pix[0..7]
    │   ├── alcor_shutter_delay   per-pixel shutter delay (350 ps steps, model)
    │   └── alcor_pixel           hit FSM, 4 TDC controls, 4-word buffer, column bus, 4 TMR registers
    ├── alcor_eoc_column      FSM1 scan, FIFO IN LSB/MSB, FSM2 framing + CRC, FIFO OUT
    └── alcor_ddr_serializer  word register, byte select, enc_8b10b, odd/even shift registers
```

Shared pieces:

- `alcor_pkg` holds the sizes, word layouts, K-code values and the CRC step function.
- `tmr_reg` is a triplicated register with voting.
- `hamming_state_reg` is an FSM state register with single-error correction.
- `sync_fifo` is a first-word-fall-through FIFO.

Everything runs on one clock, `clk`. The two DDR shift registers also use its falling edge.

## Pixel

Each pixel receives two discriminator outputs, `disc1` and `disc2`, synchronous to `clk`. Its configuration register 0 selects one of four modes:

| mode | edges timed | words per hit |
|------|-------------|---------------|
| LE   | rising edge of disc1 | 1 |
| TOT  | rising and falling edge of disc1 | 2 |
| TOT2 | rising edge of disc1, falling edge of disc2 | 2 |
| SR   | rising edge of disc1, rising edge of disc2 | 2 |

The hit FSM decides which edges to time. In two-edge modes it accepts a first edge, then waits for the second. Its one state bit is Hamming-protected.

Every timed edge takes the next of four TDCs in turn:

- The pixel latches its free-running coarse counter and pulses `tdc_start`.
- The fine counter counts the clocks during which the interpolator holds `tdc_busy`.
- When the conversion ends, the word {frame parity, pixel, TDC, coarse, fine} goes into a 4-word buffer.
- If the TDC whose turn it is is still busy, the edge is lost and that TDC's *Lost TDC* counter counts. The turn moves on anyway.
- A word that finds the buffer full is lost and counted in *Lost Ev*.

With the shutter enabled, a first edge counts only while the delayed test pulse (`shutter_win`) is high.

### Frame parity bit

The pixel keeps one bit above its 15-bit coarse counter. The bit toggles on each Start or New Orbit, and when the coarse counter wraps. Each word therefore carries the parity of the frame it belongs to. The End of Column uses this bit to sort words. The bit occupies word bit 29, which the End of Column later replaces with the column number.

### Column bus and snapshot readout

The eight pixels of a column form a chain. Pixel 0 is at the top and pixel 7 sits next to the End of Column. Each pixel forwards three signals from the pixel above unless it drives them itself:

- **busy:** some pixel holds data.
- **DVAL:** some pixel still has to send in this scan.
- **data/strobe:** the word on the bus and its write strobe.

A scan goes as follows:

1. *Freeze* sets DVAL in exactly the pixels whose buffer is not empty.
2. During *Read* the highest pixel with DVAL set owns the bus. It puts its oldest word on the bus, pops it on the clock edge and clears its DVAL.
3. The next pixel down then takes the bus.

One scan moves at most one word per pixel. A word written after the freeze waits for the next scan.

## End of Column

Each column runs two FSMs. Both state registers are Hamming-protected.

**FSM1** handles the scan. It goes IDLE → FREEZE (one clock) → READ, and stays in READ until the DVAL chain is released. Then it returns to IDLE and starts again as long as the column reports busy.

Each word read is steered by its parity bit into one of two 64 × 32 input FIFOs:

- FIFO IN LSB takes words with parity 0.
- FIFO IN MSB takes words with parity 1.

On the way in, the column number replaces the parity bit. This splitting lets words of a new frame arrive while the old frame is still being closed.

**FSM2** builds the frames. It starts when the EoC run bit is set, then repeats:

```
K28.0 header (1C1C1C1C)
frame number (16 bit)
events from the input FIFO of this frame ...
   ... until the chip's frame parity has changed, then a timeout of
       2^9 ticks of clk/2 (1024 clocks) during which late words still
       pass, and until that FIFO is empty
K28.2 end of frame
[K28.3 status header + 8 pixel status words, pixel 7 first]   if stat_en
EoC status word
K28.4 CRC header
CRC-32
```

Then the other input FIFO supplies the next frame.

The frame number in the header is the one the chip's frame counter held while its parity matched the input FIFO being sent, so a frame that opens during the previous frame's timeout still carries its own number.

With only two input FIFOs, a frame must last longer than the timeout. If two frame boundaries come less than 1024 clocks apart, the words of the short frame's successor land in the same FIFO as those of the frame still closing. EIC orbits of about 5000 clocks are far above that limit.

The CRC is computed as follows:

- It covers every non-K word from the frame number through the EoC status word.
- It uses polynomial 0x04C11DB7, shifted in MSB first.
- The register starts at all ones and the result is not inverted.

The EoC status word is built as follows:

- Bits 31:24 count events lost at the output FIFO.
- Bits 23:16 count words lost at the input FIFOs.
- Bits 15:0 are 0x7FFF if the frame ended by coarse rollover. They are the last coarse value if it ended by Start or New Orbit.

Both loss counters saturate at 255 and clear once written. Writing the EoC status word also clears the pixels' status counters, so each status block covers one frame.

A pixel status word is {column, pixel, Lost Ev[6], Lost TDC1..4[4 each], SEU count[4]}.

### Overflow behaviour

The design drops data in two places, counts each drop, and never stalls the pixels:

- **Input FIFO full:** a word arriving at a full input FIFO is dropped and counted as IN loss.
- **Output FIFO full:** when FSM2 meets a full 128 × 33 output FIFO, it drops the event and counts it as OUT loss. Control words, however, wait for room, so a frame is always complete and its CRC always matches.

In practice IN loss happens when a frame's trailer waits for a slow link while the next frame's words keep coming.

## Serial link

The DDR serializer works on 20-clock cycles:

1. Every 20 clocks it loads one 33-bit word {K flag, data} from the output FIFO.
2. It sends the bytes in order byte 0 (bits 7:0) to byte 3.
3. Each byte is 8b/10b encoded with running disparity.
4. Each 10-bit symbol is split between two registers. The rising-edge register shifts bits 9, 7, 5, 3, 1 and the falling-edge register shifts bits 8, 6, 4, 2, 0.
5. The clock itself selects which register drives the output. Symbol bit 9 goes out first.

At 394.1 MHz this gives 788 Mb/s, which is 19.7 million 32-bit words per second per column.

The serializer sends other words in two cases:

- **FIFO empty:** it sends idle words of four K28.5 commas.
- **`force_align` set:** it sends K28.1 align words and leaves the FIFO alone.

With `en_code` cleared, the encoder passes each byte through as {00, byte}.

K words carry the same K28.y code in all four bytes. The codes used are:

| K code | use |
|--------|-----|
| K28.0 | frame header |
| K28.1 | align |
| K28.2 | end of frame |
| K28.3 | status header |
| K28.4 | CRC header |
| K28.5 | idle |

## Reset line and frame timing

`alcor_frame_ctrl` measures each high pulse on `rst_line` after a two-flop synchroniser and acts on the pulse's falling edge:

| width (clocks) | command |
|----------------|---------|
| 8–15 | New Orbit: frame number + 1, coarse counters to 0 |
| 16–23 | Start: frame number 0, coarse counters to 0 |
| 24–31 | Hard reset of the core, configuration included |

Pulses shorter than 8 or longer than 31 clocks are ignored.

The decoder's state and width counter are TMR registers. Start and New Orbit are delayed so that the coarse counters in every pixel and in the End of Column clear on the 12th clock edge after the line falls (`RST_LATENCY`).

The same block keeps the End of Column's copy of the time base:

- the coarse counter;
- the frame number, which a coarse rollover also advances, since a rollover opens a new frame;
- the frame parity;
- whether the last frame ended by rollover, or the coarse value at which it was ended.

## SPI and configuration

An SPI word is 24 bits, sent MSB first in mode 0: a 4-bit command, 4 unused bits, then a 16-bit payload. The command MSB selects read. A read returns the register during the payload bits of the same word.

| command | register |
|---------|----------|
| x000 | Pointer |
| x001 | Data (the register the Pointer addresses) |
| x010 | SPI status |
| 0110 / 1110 | Rad error reset / read |
| 0111 / 1111 | EoC status reset / read |

Pointer bit 15 turns on auto increment: the address advances after every Data access, so the whole chip can be set up with one Pointer write followed by 272 Data writes.

Address map:

| address | contents |
|---------|----------|
| 0..255 | pixel registers, address = (column·8 + pixel)·4 + register |
| 256 | EoC register 0 = {…, en_code[3], force_align[2], stat_en[1], run[0]} |
| 257, 258 | 4-bit column shutter delays of columns 0–3 and 4–7 |
| 259..271 | stored, no function |

Pixel register 0 is {…, shutter delay[6:3], shutter enable[2], mode[1:0]}. Pixel registers 1–3 are stored only.

Two registers report errors:

- **Rad error** counts corrected upsets in the reset decoder and the EoC FSMs.
- **EoC status** holds sticky flags. Bits 7:0 are IN loss and bits 15:8 are OUT loss, one bit per column.

SCK is sampled with the chip clock, so it must stay below clk/4. The specified 20 MHz is far below that.

## Radiation tolerance

The protection follows one scheme throughout:

- **Configuration and control registers** are triplicated, with a majority vote. Every copy reloads the voted value each clock, so a single upset disappears after one clock. This covers the pixel registers, the EoC registers, the SPI Pointer and SPI status registers, and the reset decoder.
- **FSM state registers** hold Hamming codewords. The corrected state feeds both the logic and the next write. This covers the pixel hit FSM, FSM1 and FSM2.
- **The SPI shift register** is not protected.

Corrected upsets are counted in the pixel SEU counters and in the Rad error register.

## Shutter

The external test pulse opens a timing window that suppresses dark-count hits outside the bunch crossing. The pulse passes through two programmable delays:

- a column delay of 16 steps of about 100 ps, which corrects skew between columns;
- a per-pixel delay of 16 steps of about 350 ps.

The result gates the pixel's first edges. `alcor_shutter_delay` is a behavioural transport-delay model of these delay-cell chains and is not synthesizable logic. For synthesis the delay is replaced by the real cell chain.

## How far to trust it, and where it is this design's own

These parts follow the published description of the chip:

- the word and status formats;
- the K codes and frame sequence;
- the FIFO sizes;
- the 9-bit clk/2 timeout;
- the reset widths and the 12-clock latency;
- the SPI word and commands;
- the 272 registers and auto increment;
- the 4 TDCs and 4-word pixel buffer;
- freeze/DVAL scanning top to bottom;
- the odd/even DDR structure;
- the placement of TMR and Hamming protection.

These are choices made here, where that description gives no detail:

- **CRC:** the polynomial, preset and coverage.
- **Register map:** the meaning of the register bits.
- **Dropping policy:** the rules at the FIFOs, including control words that wait.
- **Mode edges:** which edges TOT2 and SR time.
- **TDC handshake:** the interpolator start/busy handshake, with the fine time counted in clocks of busy.
- **Hard reset:** it lasts 4 clocks and also clears the configuration.
- **SPI timing:** mode 0 and oversampling.
- **Idle word:** four K28.5s.
- **Serializer clocking:** strobes are derived from one clock by counters, instead of separate byte and load clocks.

Not included, because they are analogue, physical or unspecified:

- the SiPM front end and discriminators;
- the TDC interpolators;
- the buffer chain that carries clock, test pulse and reset up the columns;
- the LVDS pads;
- the programmable clock output.

## Simulating

Each block has a testbench `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Build any of them with Verilator 5, putting packages first. `-Wno-fatal` is needed because the shutter delay model uses a variable delay, which Verilator warns about. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Mdir obj \
  rtl/alcor_pkg.sv tb/tb_8b10b_pkg.sv tb/tb_alcor_stim_pkg.sv \
  rtl/tmr_reg.sv rtl/hamming_state_reg.sv rtl/sync_fifo.sv rtl/enc_8b10b.sv \
  rtl/alcor_ddr_serializer.sv rtl/alcor_frame_ctrl.sv rtl/alcor_spi.sv \
  rtl/alcor_pixel.sv rtl/alcor_eoc_column.sv rtl/alcor_shutter_delay.sv rtl/alcor_top.sv \
  tb/alcor_tdc_model.sv tb/alcor_link_monitor.sv tb/tb_alcor_top.sv --top-module tb_alcor_top
obj/Vtb_alcor_top
```

The chip-level testbench `tb_alcor_top` runs the core with every parameter at its default, for about 0.9 ms of simulated time. That takes a couple of seconds of wall time. Its sequence:

1. A hard reset.
2. Full configuration through SPI.
3. Align commas.
4. Start, then five New Orbits.
5. A frame ended by rollover.
6. Low-rate hits in all four modes.
7. Hits inside and outside the shutter window.
8. A flood that loses hits on busy TDCs, on full pixel buffers, and at both EoC FIFOs.
9. Status register reads and an injected upset.

Every mechanism is counted, and one that never happened fails the test.

`alcor_link_monitor` decodes each serial line independently and checks every frame:

- format;
- CRC, recomputed bit by bit;
- frame numbering;
- column and fine time of each event.

The words received from the loss-free columns must match the number of edges generated.

`tb_alcor_rate` also runs at full size and checks the rated load:

- all 64 pixels are in leading-edge mode;
- each pixel receives 2 MHz of hits, so each column carries 16 MHz;
- a New Orbit comes every 12.8 µs and no status words are sent.

It checks that every hit arrives and no FIFO reports a loss. It also checks that the measured rate of each column lies between 15.5 and 16.5 MHz, and that each frame carries its own number even when the last two orbits come 400 clocks apart.

The other testbenches work at block level:

- `tb_alcor_eoc_column` uses small FIFOs and a short timeout to reach every branch quickly.
- `tb_alcor_pixel` checks each mode against a reference word model.
- `tb_enc_8b10b` checks decoding, disparity, run length and comma-freedom over random data.
