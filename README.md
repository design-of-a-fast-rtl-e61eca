# TaichuPix3 readout: fast digital readout of a 1024 x 512 CMOS pixel sensor

TaichuPix3 is a monolithic pixel sensor for a vertex detector at a circular
electron-positron collider. It has 1024 x 512 pixels with a 25 um pitch. It must
accept up to about 120 million hit pixels per second per chip, with a 25 ns bunch
spacing. This RTL is the digital part of that chip: the per-pixel priority logic,
the end-of-column readers with on-the-fly compression, the shared FIFO trees,
trigger matching, the hierarchical multiplexers and FIFOs that merge 512 double
columns into one stream, the serializer and the SPI configuration port.

The main idea is to keep every level busy. A double column hands out one hit
address every 50 ns. Neighbouring hits of a cluster are folded into a single word
as they are read. 32 columns share one pool of FIFO memory, organised as a tree,
instead of owning one FIFO each. Above the trees, 2:1 token arbiters merge the
streams without ever leaving a clock idle while data are waiting.

## Data path at a glance

```
 hit[511:0][1023:0]                                            (40 MHz domain)
   |
 pixel_dcol x512 -- FASTOR/ADDR/READ --> dcol_reader x512
                                              | FIFO1_WR, 22-bit word
                             fifo_tree32 x16 (32 columns each, 280 words)
                                              |
                             trigger_match x16 (window check or pass-through)
                                              | wr_req / en
                     hier_mux 4:1 (per 128 columns) --> fifo2 x4 (256 words)
 ------------------------------------------------------------- clock crossing
                     hier_mux 4:1 (top, clk_out)   (output domain, 1 bit/clk_out)
                           |                          |
                      serializer -> sout        spi_shift_reg -> spi_do (TEST=11)
 spi_config: mode, COMPRESS_EN, TEST, TRIGGER_LATENCY, TRIGGER_UNCERTAIN, pixel mask/pulse
```

The hit word grows as it climbs the hierarchy, because each level puts its group
index in front of the column index:

| level | width | fields (MSB to LSB) |
|---|---|---|
| Dcol reader | 22 | ts[7:0], pattern[3:0], addr[9:0] |
| FIFO1 tree (32 columns) | 27 | dcol[4:0], ts, pattern, addr |
| FIFO2 (128 columns) | 29 | dcol[6:0], ts, pattern, addr |
| output (512 columns) | 31 | dcol[8:0], ts, pattern, addr |
| serial / SPI word | 32 | check, then the 31 bits above |

The pixel address is 19 bits (9-bit double column, 10-bit pixel) and the
timestamp is 8 bits of 25 ns. `check` is odd parity over bits 30:0, so a data
word is never all zeros. The all-zero word is the idle word on both outputs.
The field order is this design's own choice.

## Inside a double column (`pixel_dcol`)

Each pixel has a state register. A rising edge of its discriminator output sets
it. If the pixel's test-pulse enable is set, a rising edge of the digital test
pulse `dpulse` sets it too. A masked pixel never sets. The set pixels form a
priority chain, lowest address first. The encoder shows the winning pixel on
`addr`, and `FASTOR` is high while anything is pending. While `READ` is high,
FASTOR already leaves out the pixel being read, so it falls during the read of
the last pixel. The pixel is cleared at the clock edge that ends the READ cycle.
The address map is `{row[8:0], column-in-pair}`.

In the chip the pixel latch and the priority chain are asynchronous. Here, hit
edges are sampled on the 40 MHz clock.

## End-of-column reader and compression (`dcol_reader`)

This block is the hardest to follow and the one with the most behaviour.

- **Timestamp.** FASTOR passes a 2-flop synchronizer. When the synchronized
  FASTOR rises, the reader latches the system time, delayed by the same two
  clocks. The timestamp is therefore the time at which the column first became
  non-empty. All pixels read during one FASTOR period share it. That is why
  trigger matching needs a tolerance window.
- **Read cycle.** READ is high for one clock and low for one: one address per
  50 ns at 40 MHz. The address is captured at the end of the high clock. Because
  of the synchronizer, the reader issues one READ too many at the end of every
  burst. That READ finds the column empty (`addr_valid` low) and is ignored.
  It costs 50 ns per burst.
- **Compression.** The first address of a word is kept. Addresses arrive in
  ascending order. A following address 1 to 4 above the first only sets pattern
  bit (offset - 1). Any other address closes the word and opens a new one. The
  open word is also written when the column empties. One word thus covers five
  adjacent addresses. With `COMPRESS_EN` low, every address becomes its own word
  with a zero pattern. Addresses from two different timestamps are never merged.
- **Back-pressure.** `busy` is FIFO1's full flag for this column. A READ is
  started only while it is low. Each READ can produce at most one word, so a
  word never meets a full FIFO. The flush of the open word waits for room as
  well.

Compression adds no time. The two clocks of a read cycle are enough to compare
and merge.

## Shared FIFO tree (`fifo_tree32`, `data_router`, `sync_fifo`)

FIFO1 for 32 columns is a six-level tree. There is one 4-word child FIFO per
column (L1). Data routers move one word per clock from one of two FIFOs into the
4-word child FIFO below (L2 to L5). A last router (L6) fills the 32-word root.
That makes 280 words in total. A single column can use up to 52 of them, and on
average there are 8.75 per column. Routers serve their two inputs round robin.

The pairing is crossed, so that the columns of one cluster, which fire together,
do not meet at the first router:

| level | pairs |
|---|---|
| L2 | columns k and k+4 in each group of 8 (0-4, 1-5, ..., 27-31) |
| L3 | 0_4 with 8_12, 1_5 with 9_13, ..., 19_23 with 27_31 |
| L4 | 0_4_8_12 with 16_20_24_28, ... |
| L5 | "even" (L4 outputs 0 and 2), "odd" (1 and 3) |
| L6 | even with odd, into the root |

## Trigger matching (`trigger_match`)

In triggerless mode every word goes on. In trigger mode a trigger at system time
T selects the timestamps from T - TRIGGER_LATENCY to T - TRIGGER_LATENCY +
TRIGGER_UNCERTAIN, in 25 ns steps. For example, a trigger at 6 us with LATENCY =
123 and UNCERTAIN = 6 selects 2.925 us to 3.075 us. All comparisons are made on
ages (now - timestamp, modulo 256), so the 8-bit time may wrap.

With no trigger pending, words older than LATENCY are dropped, because no later
trigger can want them. FIFO1 therefore holds at most the last LATENCY x 25 ns of
data. With a trigger pending:

- words older than the window are dropped;
- words inside it are offered upward;
- the first word newer than the window retires the trigger.

A trigger is also retired when its window would leave the 8-bit range. Only one
trigger is held per 32-column group. A trigger that arrives while one is pending
pulses `trig_lost`.

## Merging and the output side (`hier_mux`, `rr_mux2`, `fifo2`, `serializer`, `spi_shift_reg`)

`hier_mux` is a binary tree of `rr_mux2` cells. Requests are ORed upward, and the
enable from above travels down. Each cell holds a two-state token that passes
the enable to one requesting child, alternating when both request. The granted
leaf's word is selected and popped in the same clock, so a word moves on every
enabled clock while anyone is requesting.

Each 128-column quarter merges its four trigger-match outputs into its FIFO2
(256 words) at 40 MHz. FIFO2 is a dual-clock FIFO with Gray-coded pointers. The
top MUX, in the `clk_out` domain, merges the four FIFO2s. Its enable is the word
slot of the active consumer:

- the serializer, every 32 `clk_out` clocks, MSB first, with `frame` marking bit 31;
- or, when TEST = 2'b11, `spi_shift_reg`, one bit per falling `spi_clk` edge.

At a 4.48 GHz `clk_out` the link carries 140 M words/s. That is above the
120 M hits/s of the highest-rate running condition.

## Configuration (`spi_config`)

SPI mode 0, oversampled by the 40 MHz clock, so SCLK must be at most 10 MHz. A
frame is 24 bits, `{rw, addr[6:0], data[15:0]}`. A write takes effect when
`cs_n` rises after exactly 24 bits.

| addr | register |
|---|---|
| 0x00 | [0] trigger mode, [1] COMPRESS_EN (reset 1), [3:2] TEST |
| 0x01 | TRIGGER_LATENCY[7:0] |
| 0x02 | TRIGGER_UNCERTAIN[2:0] |
| 0x03 | pixel column for pixel writes [8:0] |
| 0x04 | pixel address for pixel writes [9:0] |
| 0x05 | [0] mask, [1] test-pulse enable; writing it configures that pixel |

The frame format, the register map and the reset values are this design's own.
Only the two trigger register names and widths come from the sensor.

## Where this RTL departs from the chip, or fills gaps

- **Not modelled:**
  - the analog front end: its discriminator outputs are the `hit` inputs;
  - the bias DAC and the LDOs;
  - the PLL: `clk_out` is an input;
  - the CML/LVDS drivers;
  - 8b10b coding and the 64-bit packing used with it ("data distribution");
  - the scan chain and memory BIST.
- **FIFO2 width.** FIFO2 stores the 29 bits in use, not a 32-bit SRAM macro. It
  is written as an array that a macro can replace.
- **Pattern width.** The compression pattern is 4 bits, which gives five
  addresses per word. One drawing of the reader shows a 3-bit pattern; the
  5-address rule and the 4-bit field of the data-format drawing were followed.
- **Quarter-level word width.** The 128-column word is 29 bits. This is needed
  to reach a 31-bit word at the top, although one drawing labels that bus 27 bits.
- **Design choices where the sensor gives none:**
  - the router and token arbitration rules;
  - the one-trigger limit and the trigger retire rules;
  - the READ timing details;
  - the idle and check-bit framing;
  - the SPI protocol.
- **Clocks and resets.** `rst_n` resets both clock domains asynchronously. TEST
  crosses to `clk_out` through a 2-flop synchronizer; the other configuration
  bits are quasi-static.
- **Synchronizer warnings.** Verilator's SYNCASYNCNET warnings come from
  assertions that use `rst_n` in `disable iff`, not from the logic.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/taichu_pkg.sv tb/tb_dcol_reader.sv --top-module tb_dcol_reader -o sim
./obj_dir/sim
```

`tb_taichupix3_top` runs the whole chip at full size, with no parameter
overrides: 512 x 1024 pixels and 256-word FIFO2s. It builds in about two
minutes and runs in about 15 seconds. Every word is predicted from the injected
clusters and compared as a multiset with what comes out of the serial line or
SPI_DO. It goes through five phases:

- triggerless mode with compression on;
- triggerless mode with compression off, including a fully loaded 32-column group;
- mask and test pulse;
- trigger mode, with clusters before, inside and after the window and a lost trigger;
- slow control readout.

It also counts that compression, FIFO1 back-pressure, MUX conflicts, FIFO2 full,
dropped words, lost triggers and SPI output all happened.

The sustained rate at the highest running condition was not simulated at full
size, and the link margin above comes from arithmetic only. Setting new pixels
on every clock makes the full 512 x 1024 model slow in Verilator: a 100 us run
took longer than ten minutes.

The top's parameters are `NPIX` (pixels per double column, 1024) and
`FIFO2_DEPTH` (256). The FIFO tree depths are parameters of `fifo_tree32`
(`CHILD_DEPTH` 4, `ROOT_DEPTH` 32). Shared widths and types are in
`rtl/taichu_pkg.sv`.
