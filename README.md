# ALCOR digital readout: 32-pixel SiPM time-stamping in SystemVerilog

ALCOR is a readout chip for silicon photomultipliers (SiPMs) that work at
cryogenic temperature. The sensor is split into 32 small cells, so that each
cell sees only a few photons. Each cell then needs only a binary "a photon
arrived" signal and an accurate time for it, instead of an ADC per channel.
Every pixel turns its discriminator edges into 32-bit time stamps: a 15-bit
clock-period count plus a 9-bit fine time from an analogue interpolating TDC.
The periphery gathers the words of each column. It cuts them into frames
with a CRC and sends them off chip on four 8b/10b serial links.

This repository holds the digital part of that chip as synthesizable
SystemVerilog:

- the pixel logic;
- the column read-out chain;
- the three-layer End-of-Column (EoC) periphery;
- the serial links;
- the SPI configuration path.

The TDC's analogue interpolator is a behavioural simulation model. The
analogue front end, discriminators, pads and LVDS drivers are outside the
logic. Their signals are ports of the top level.

## Overview

```
 trig1/trig2 (32 + 32, from the discriminators)
      |
 +----v---------------- column c (x8) ---------------------+
 | pixel 0 (top)  : 4 TDCs, TDC control, coarse counter,   |
 | pixel 1          event word builder, 4x32 FIFO,         |
 | pixel 2          configuration register                 |
 | pixel 3 (bottom): daisy chain: req, freeze, wen, tok,   |
 |                  32-bit data bus                        |
 +----+----------------------------------------------------+
      |
 EoC layer 1 (per column) : sync_cell + handshake controller
                            -> 16x32 FIFO -> framer (+CRC-32)
 EoC layer 2 (per 2 cols) : word merge -> 32x33 FIFO
 EoC layer 3 (per 2 cols) : 8b/10b serialiser -> ddr[l][1:0]
                            (640 Mb/s at 320 MHz)
 SPI (sclk, cs_n, mosi, miso) -> one configuration chain
                                 through all 32 pixels
```

Module hierarchy, all in `rtl/`:

| Module | Role |
|---|---|
| `alcor_pkg` | Word format, configuration fields, frame constants |
| `alcor_top` | The whole chip: 8 columns, EoC, 4 links, SPI |
| `column` | 4 `pixel`s chained from pixel 0 (top) to pixel 3 (bottom) |
| `pixel` | `pixel_config`, `coarse_counter`, 4 x `tdc_analog`, `tdc_ctrl`, `pixel_data_ctrl` |
| `pixel_data_ctrl` | Event word, 4-deep `sync_fifo`, pixel side of the column protocol |
| `eoc_col_ctrl` | EoC side of the column protocol (uses `sync_cell`) |
| `eoc_framer` | Frames one column's words (uses `crc32`) |
| `eoc_merge` | Merges two framed streams into a 32x33 `sync_fifo` |
| `serializer` | 8b/10b (`enc8b10b`) serialiser, two bits per clock |
| `spi_config` | SPI slave driving the configuration chain |
| `tdc_analog` | Behavioural model of one TDC (not synthesizable) |

There is one clock for the whole chip. The design aims at 320 MHz; 80 MHz
is the low-power end of the range. All flops reset asynchronously on
`rst_n` low.

## Event word

A pixel emits one 32-bit word per measured edge:

| Bits | Field | Meaning |
|---|---|---|
| 31:29 | column | 0..7 |
| 28:26 | pixel | 0..3, 0 at the top of the column |
| 25:24 | TDC | which of the pixel's four TDCs measured it |
| 23:9 | coarse | 15-bit clock count taken at the TDC's stop edge |
| 8:0 | fine | run-down count of the TDC, in 50 ps bins |

An idle column bus carries `32'h1FFFFFFF`.

Decoding the arrival time needs both parts of the stamp. The TDC measures
from the photon edge forward to a clock rising edge (the stop edge).
`coarse` is the counter value just after that edge. So, counting time from
the rising edge that first advances the counter after reset, the time of the
photon edge is

    t = (coarse - 1) * T_clk - fine * 50 ps

taken modulo the 2^15-cycle counter period. Because of how the stop edge is
picked (next section), `fine` is always between 0.5 and 1.5 clock periods.

## Time measurement in the pixel

### TDC model (`tdc_analog`)

Each TDC is armed by the pixel's TDC controller. The first `start` edge
while armed raises `hit` at once (asynchronously) and records the time.

The measurement stops on the first rising clock edge that follows the next
falling edge. The measured interval is therefore 0.5 to 1.5 clock periods:

- an edge just before a falling edge stops at the following rising edge;
- an edge just after a falling edge waits one more period.

This rule keeps the interpolator away from very short intervals.

From the stop edge the model holds `rundown` high for
`floor(interval / 50 ps)` clock cycles. That is the Wilkinson conversion:
its length is proportional to the interval. At 320 MHz this is 31 to 93
cycles.

After the run-down `hit` stays high, and further edges are ignored, until
`clr` is seen on a clock edge.

### TDC control (`tdc_ctrl`)

**Single-photon mode.** Exactly one TDC is armed at a time. Once its hit
has been synchronised (`sync_cell`, 1.5 to 2.5 cycles), the arm moves
round-robin to the next TDC that is idle and enabled in `tdc_mask`. Two
edges closer together than about 2 cycles therefore land in the same TDC.
The second one is not measured.

**Time-over-Threshold (ToT) mode.** The TDCs work in pairs {0,1} and
{2,3}:

- The even TDC takes the leading edge of the trigger.
- The odd TDC is armed by the even TDC's raw hit and starts on the falling
  trigger edge, so it measures the trailing edge.
- Each ToT event gives two words, with TDC addresses 2k and 2k+1.
- The pixel can hold two ToT events in flight, so its rate capability
  halves.

**Fine counters.** Each TDC has a 9-bit counter that counts the cycles in
which its `rundown` is high. The coarse counter value is latched on the
first run-down cycle, which is the stop edge plus one cycle.

**Hand-out.** A finished result waits in the controller and is passed to
the data controller over valid/ready, lowest TDC number first. Only after
hand-out is the TDC cleared. A ToT pair is cleared only when both halves
have left. The TDC becomes armable again once its `hit` is seen low.

A full pixel FIFO therefore does not lose data. It keeps TDCs busy, and a
pixel whose four TDCs are all busy misses photons. That is the chip's dead
time.

## Column read-out protocol

This is the part that needs the most care.

The four pixels of a column and the EoC share one column bus. The bus runs
from pixel 0 (top) through pixels 1 and 2 to pixel 3, which sits next to
the EoC. Five signals make up the chain:

| Signal | Direction | Combination |
|---|---|---|
| `req` (write request) | down to the EoC | OR of every pixel holding a word |
| `freeze` | from the EoC to all pixels | broadcast |
| `wen` (write enable) | enters at pixel 3 and goes up | each pixel either keeps it or passes it on |
| `tok` (pixel write enable) | down to the EoC | OR of "I am driving the bus" |
| `data[31:0]` | down | each pixel drives its own word or passes the upper one |

A read-out round goes like this (`eoc_col_ctrl` and `pixel_data_ctrl`):

1. **Request.** A pixel with a non-empty FIFO raises its request. The EoC
   synchronises the OR'd request with a `sync_cell`, a falling-edge flop
   followed by two rising-edge flops, adding 1.5 to 2.5 cycles.
2. **Freeze.** The EoC raises `freeze`. On its rising edge every pixel
   latches `selected = FIFO not empty`. Only selected pixels take part in
   this round, and each sends exactly one word. A word that arrives later
   waits for the next round, so the round has a bounded length.
3. **Slots.** After `FREEZE_LEAD` = 2 cycles the EoC gives write-enable
   slots: `wen` high for 4 cycles, then low for 3. That is one word per
   7 cycles.
   - `wen` enters at the bottom and each non-selected pixel passes it up.
     The first selected pixel from the bottom keeps it. **The pixel nearest
     the EoC therefore always goes first.**
   - The owner drives its FIFO head on `data` for the 4 cycles of the slot
     and raises `tok`, which the pixels below pass down.
   - On the slot's last cycle the EoC samples `data`, provided `tok` has
     arrived, and writes it into the column FIFO. The pixel pops its FIFO,
     clears `selected` and drops its request.
   - The next slot's `wen` then passes it and reaches the next selected
     pixel up.
4. **End of round.** At the end of each 3-cycle gap the EoC looks at the
   request again. If it is still high, another slot follows. If not,
   `freeze` falls and the EoC waits for the next request.
5. **Backpressure.** If the 16-word column FIFO is full, no slot starts. The
   pixels keep their words until one does.

`wen`, `tok`, `req` and `data` pass through the pixels without flops. A
slot therefore works in any cycle, but the column's combinational path
covers all four pixels. The 4-cycle hold of each word gives that path
several cycles to settle.

Example: in a round where pixels 0 and 2 both hold a word, the
column carries pixel 2's word for 4 cycles, idles for 3, and then carries
pixel 0's word. A round is 2 + 7n cycles for n words, plus the
synchroniser delay before it.

## End-of-Column

### Layer 1: framing (`eoc_framer`)

Each column's words go into a 16x32 FIFO. The framer reads them out
wrapped in frames, one frame per time window of 2^15 cycles. The window is
kept by a 15-bit counter in the EoC that starts at reset together with the
pixels' coarse counters, so a frame holds the words read during one coarse
period. A frame is:

| Word | Content |
|---|---|
| HEADER | `{8'hA5, 5'b0, column[2:0], 16'h0000}` |
| FRAMENO | 32-bit frame number, 0 after reset |
| data | every event word the column delivered in that window |
| STATUS | `{word count[15:0], FIFO level at close[7:0], 5'b0, column[2:0]}` |
| CRC | CRC-32 over HEADER..STATUS |

The CRC uses polynomial 0x04C11DB7, is fed MSB first one 32-bit word per
clock, starts at 0xFFFFFFFF and has no final XOR.

Data words stream out while the window is open. So a window may hold any
number of words, not just 16.

At the end of a window (`frame_tick`) the framer notes how many words are
in the FIFO. Those words close the frame. Then it sends STATUS, CRC, and the
next frame's HEADER and FRAMENO back to back.

Words leave the framer 33 bits wide. Bit 32 marks the four control words.

### Layer 2: merge (`eoc_merge`)

Each pair of columns (0-1, 2-3, 4-5, 6-7) shares a 32x33 FIFO. Words
from the two framers are taken in word-level round robin. The framer raises
`out_hold` across its STATUS-CRC-HEADER burst, and the merge stays with that
column until the burst is complete.

A receiver separates the two columns by the column field. The field is in
every event word and in every HEADER and STATUS. A receiver can also track
the last HEADER seen for each column.

### Layer 3: serial link (`serializer`, `enc8b10b`)

Each 33-bit word goes out as four 8b/10b data symbols, most significant
byte first:

- a control word (bit 32 set) is preceded by K28.1;
- when the FIFO is empty the link sends K28.5 commas;
- the encoder is the standard Widmer-Franaszek code with running disparity.

Symbols are sent bit `a` first, two bits per clock on `ddr[l][1:0]`:

- `[1]` is for the high clock phase;
- `[0]` is for the low phase of a DDR output cell.

A symbol takes 5 cycles, so the line rate is 640 Mb/s at 320 MHz.

## Configuration (`spi_config`, `pixel_config`)

The SPI port works in mode 0:

- `sclk`, `cs_n` and `mosi` are synchronised into the system clock, so each
  SCLK phase must last at least 3 system clock cycles;
- each rising SCLK edge with `cs_n` low shifts one bit into the
  configuration chain;
- `cs_n` rising copies every pixel's shift register into its active
  register.

There is no command layer: a transfer is the chain's content.

The chain runs up column 0 (pixel 3 to pixel 0), then up column 1, and so
on to column 7 pixel 0. Its far end comes back on `miso`, so the old
content can be read out while new content is shifted in. A full load is
32 x 8 = 256 bits. Send column 7 pixel 0's byte first and column 0 pixel 3's
byte last, each byte MSB first.

Per-pixel byte:

| Bit | Field | Reset value |
|---|---|---|
| 7 | `fe_enable`, brought out to the analogue front end | 1 |
| 6:3 | `tdc_mask`, TDCs allowed for use | 1111 |
| 2 | `trig_sel`: 0 = discriminator 1, 1 = discriminator 2 | 0 |
| 1 | `tot_mode` | 0 |
| 0 | `enable` (pixel takes triggers) | 1 |

The reset value is `8'hF9`: pixel on, single-photon mode, discriminator 1,
all TDCs.

## Rates at the default configuration

| Stage | Capacity |
|---|---|
| TDC dead time | up to ~100 cycles (~310 ns) per TDC at 320 MHz |
| Four TDCs per pixel, single-photon mode | about 13 Mhits/s instantaneous |
| Column | up to 45 Mwords/s (one word per 7 cycles), about 39 Mwords/s with round overhead |
| One link | 16 Mwords/s, shared by two columns |

The stated average rate of 5 MHz per pixel is 20 Mwords/s per column, and
pixel and column handle it. In `tb_column_rate`, random pulses at 5 MHz hit
all four pixels of a column. The column FIFO never holds more than one word.
About 6 % of the pulses find the armed TDC still busy and are missed. That
figure scales with the TDC run-down time (see the departures below).

A link does not keep up: two columns at 5 MHz per pixel give 40 Mwords/s
against the link's 16. Sustained, a link carries about 2 MHz per pixel when
every pixel fires. Higher rates are absorbed only as bursts by the 4-, 16-
and 32-word FIFOs. After that, backpressure keeps TDCs busy and photons are
missed. `tb_link_load` drives both columns of one link at 5 MHz per pixel:

- the link runs flat out at 500 words per 10,000 cycles;
- all three FIFO stages fill;
- about 56 % of the pulses are missed at the TDCs;
- every frame still arrives well formed, with a correct CRC.

## Where this RTL departs from, or adds to, the original chip

What comes from the chip's published description:

- 32 pixels in 8 columns of 4, four TDCs per pixel, and single-photon and
  ToT modes;
- the 15-bit coarse and 9-bit fine stamps and the field order of the event
  word;
- the idle bus word;
- the 4-deep pixel FIFO and the daisy chain with write request, freeze,
  EoC write enable and pixel write enable;
- the 4-cycle word hold plus 3 idle cycles, and priority to the pixel
  nearest the EoC;
- the 16x32 column FIFOs and the frames with header, frame number, status
  and CRC-32;
- two columns per 32x33 FIFO, four links, 8b/10b at 640 Mb/s DDR;
- SPI configuration;
- the synchroniser's 1.5 to 2.5 cycle delay.

Choices made here where the description is silent:

- the selection latch and wiring of the chain, and the 2-cycle freeze lead;
- backpressure instead of data loss at every FIFO;
- the window length (one coarse period);
- the frame word formats and order, and the CRC parameters;
- streaming frames instead of holding a whole window;
- word-level merge and the use of the 33rd bit;
- byte order, K28.1 and K28.5 use;
- the SPI protocol details and the chain order;
- the configuration byte layout and reset value;
- TDC pairing and round-robin order.

Known difference: the TDC model runs down one count per clock cycle. At
320 MHz that is 31 to 93 cycles, about 100 to 290 ns. The chip is quoted at
150 ns dead time at 320 MHz, so the real run-down is faster than this model.
Only the fine-count scale and the dead time depend on this. The ratio is a
parameter of the analogue design, not of the logic.

Not modelled: the input stage, amplifiers, discriminators, thresholds, pads,
DDR output cell and LVDS drivers.

## Synthesis

All modules except `tdc_analog` are synthesizable. `tdc_analog` uses
`real` time arithmetic and delays. `pixel`, `column` and `alcor_top`
instantiate it, so for a netlist replace it with the TDC macro (same ports:
`clk`, `arm`, `start`, `clr`, `hit`, `rundown`).

Assertions check the handshakes:

- a pixel drives the bus only while it holds a word;
- `wen` appears only inside a freeze round;
- the pixel write enable reaches the EoC only during a slot;
- the framer's tick spacing is respected.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The
testbenches use `timeprecision 1fs`, so that the 3.125 ns period is exact.
Shared helpers are in `tb/tb_util.svh` and `tb/tb_tdc_model.svh`, an
independent reference for the expected fine count.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl +libext+.sv -Irtl -Itb --top-module tb_alcor_top \
  rtl/alcor_pkg.sv tb/tb_alcor_top.sv
./obj_dir/Vtb_alcor_top
```

Replace `tb_alcor_top` with any other testbench name.

`tb_alcor_top` runs the full 32-pixel chip at its default parameters at
320 MHz for three windows, 2^15 cycles each. It takes a few seconds of
simulation after about two minutes of compilation. It:

- loads and reads back the configuration chain over SPI;
- fires random pulses on all pixels, using one ToT pixel, one pixel on
  discriminator 2, and one pixel hit with a burst that exceeds its four
  TDCs;
- decodes the four serial links back into symbols, words and frames;
- checks every frame's header, frame number, count and CRC;
- checks that each expected event word arrives exactly once, with its
  coarse and fine time worked out from the pulse time;
- fails if any of these never happened: ToT pairs, discriminator-2 words,
  use of each TDC, multi-word freeze rounds, frames closed on every column,
  control and comma symbols.

`tb_column_rate` runs one column at the rated load (Poisson pulses, 5 MHz
per pixel, 60 us) against a real EoC controller. It checks that every word
read belongs to a pulse, that words are at least 7 cycles apart and that the
read-out keeps up, and it reports the fraction lost to TDC dead time.

`tb_link_load` runs the full chip with columns 0 and 1 overloaded. It
decodes all links and checks the frames, the event words, the link's full
rate and the backpressure at every stage.

`tb_column_80mhz` runs one column at 80 MHz. There the fine counts span
125 to 375, so the whole 9-bit counter is needed.
