# Optical mouse scanner

An ordinary optical mouse is a tiny camera. Its sensor, the ADNS-2051,
takes 16x16-pixel grayscale pictures of the surface under it and works out
how far the mouse has moved between pictures. This design reads both from
the sensor's serial port and turns the mouse into a low-resolution
hand-held scanner. Each time the mouse moves, the design captures one
picture together with the motion. It adds the motion to a running
position and pastes the picture into a 128x128 image centred on that
position. Run the mouse over a page and the image fills in.

A VGA monitor shows the scan as it grows. The most recent picture is
enlarged to 64x64 in a small inset, and a red box marks where the mouse
is on the scan. Holding the left button scans. The right button clears
the scan and starts again.

Everything is synchronous SystemVerilog on one 50 MHz clock. It was
written for an FPGA board that has a VGA DAC and a general-purpose pin
header (the layout suits an Altera DE2). It needs about 108 kbit of
on-chip RAM and no processor.

```
 mouse pins ── gpio ── adns_serial ── polling_fsm ──► sample_queue (5 samples)
                │                                         │
                └─► click_fsm ─► mode                     ▼
                                                      aggregator
                                                   │            │
                                       frame_buffer 128x128   frame_buffer 16x16
                                          (aggregate)            (inset)
                                                   └─► vga_raster ─► VGA DAC
```

## Talking to the sensor

The sensor has a two-wire port: SCLK, driven by the FPGA, and SDIO, one
bidirectional data line. There is no chip select. The scanner uses five
of the sensor's registers:

| register           | addr | use                                                        |
|--------------------|------|------------------------------------------------------------|
| Motion             | 0x02 | bit 7 MOT: the mouse moved since the last read             |
| Delta_X            | 0x03 | X motion since the last read, two's complement; read clears it |
| Delta_Y            | 0x04 | Y motion, likewise                                         |
| Configuration_bits | 0x0a | bit 0 Sleep (1 = always awake), bit 3 PixDump (start a pixel dump) |
| Data_Out_Lower     | 0x0c | during a dump: the next pixel in bits 5:0; bit 7 = 1 means not ready |

**`adns_serial`** carries out one register access per request. The
address byte goes out MSB first, with bit 7 set to 1 for a write. A write
continues straight on with the data byte. For a read, the master lets go
of SDIO, waits `T_SRAD` clocks (100 µs) while the sensor fetches the
register, and then clocks in eight bits driven by the sensor.

SCLK idles high. Whichever side drives SDIO changes it after a falling
edge, and the other side samples it on the rising edge. The master lets
go of SDIO one clock after its last rising edge, never on that edge. If
it let go on the edge, the last address bit would reach the sensor as the
pull-up level.

After each access the port rests before `done` pulses: 100 µs after a
write, 250 ns after a read. SCLK runs at 50 MHz / 12 = 4.17 MHz. That is
the fastest whole divider not above the 4.5 MHz the sensor is meant to
run at. A read takes 5208 clocks (104 µs), nearly all of it the
address-to-data wait, and a write takes 5194 clocks.

**`polling_fsm`** runs the acquisition loop:

1. Once after reset: write Configuration_bits = 0x01 (Sleep = 1, so the
   sensor never sleeps).
2. Wait until the mode is Scan and the queue has a free slot.
3. Read Motion. If MOT = 0, go back to step 2.
4. Read Delta_X, then Delta_Y.
5. Write Configuration_bits = 0x09 (PixDump = 1).
6. Read Data_Out_Lower. A value with bit 7 set is not ready and is read
   again. Otherwise pixel `n` (n = 0x00 … 0xFF, in arrival order) goes to
   address `n` of the sample being built.
7. After pixel 0xFF, write Configuration_bits = 0x01 (PixDump = 0). Then
   push the sample and its motion into the queue and go back to step 2.

If Reset is pressed while a sample is being built, the sensor sequence
still finishes, so PixDump is left cleared, but the sample is thrown
away. A full queue holds the loop at step 2. Nothing is lost while it
waits, because the sensor keeps adding up motion until Delta_X and
Delta_Y are read.

One sample costs 259 reads and 2 writes on the serial port, about 27 ms.
The sensor can therefore deliver roughly 37 samples per second.

## Where a sample lands

The sensor sends pixels in column order. Address 0x00 is the bottom-right
pixel, addresses rise upwards within a column, and 0xFF is the top-left
pixel:

```
  FF EF DF ... 1F 0F      <- top row
  FE EE DE ... 1E 0E
  ..
  F0 E0 D0 ... 10 00      <- bottom row (00 = first pixel)
```

So `a[3:0]` is the row counted from the bottom and `a[7:4]` is the
column counted from the right. The **`aggregator`** converts this to
column `c = 15 - a[7:4]` from the left and row `r = 15 - a[3:0]` from the
top.

For each sample it first updates the position:
`pos_x += Delta_X`, `pos_y -= Delta_Y`. +Y is away from the user, which
is up on the screen. The result is clamped to 0…127. It then writes each
pixel to aggregate `(pos_x - 8 + c, pos_y - 8 + r)`, so the sample is
centred on the position. Pixels that fall outside the 128x128 image are
dropped and counted in `clipped_pixels`. The same 256 pixels overwrite
the inset memory, row-major (`r*16 + c`).

One motion count is one aggregate pixel. That is roughly right, because
each sensor pixel covers about as much of the page as one count of mouse
motion at the sensor's 400 counts-per-inch setting. The position starts
at (64, 64).

The copy runs one pixel per clock (259 clocks per sample), so the
aggregator empties the queue about 5,000 times faster than the sensor
can fill it. In this design the five-sample queue therefore only shows a
depth of one in practice, and the full-queue stall cannot happen in the
assembled scanner. The queue keeps its full size and its stall logic
anyway, in case the consumer is ever made slower, for example moved to
software.

## Modes

**`click_fsm`** decodes the two buttons (active low) into three modes,
with one clock of latency:

| right | left | mode  | what happens                                              |
|-------|------|-------|-----------------------------------------------------------|
| 1     | x    | Reset | queue flushed; both images cleared, position back to centre |
| 0     | 1    | Scan  | the sensor is polled and samples are captured               |
| 0     | 0    | Idle  | the sensor is not polled; queued samples are still placed  |

(1 = pressed.) Right takes precedence over left. Entering Reset starts
one clearing pass of 16,384 clocks (0.33 ms). The same pass runs after
`rst_n`. **`gpio`** brings the buttons and the SDIO read-back in through
two-flop synchronisers and holds PD high. The buttons are not debounced:
a bounce only flips between neighbouring modes for microseconds.

## Memories

| memory         | module / instance            | size                   |
|----------------|------------------------------|------------------------|
| aggregate      | `frame_buffer` `u_agg_mem`   | 16,384 x 6 bit         |
| inset          | `frame_buffer` `u_ins_mem`   | 256 x 6 bit            |
| sample queue   | `sample_queue`               | 5 x 256 x 6 bit + 5 x 16 bit motion |
| serial byte    | shift register in `adns_serial` | 8 bit               |

That totals 13,441 bytes of image data plus 10 bytes of motion. All
memories have one write port and one registered read port, and should
map to block RAM. `sample_queue` is first in, first out. The producer
fills the tail slot by pixel address and then pushes it. The consumer
reads the head slot by address and then pops it.

## Screen

**`vga_raster`** (with **`vga_timing`**) produces a standard 640x480
picture at 60 Hz:

* 800 x 525 raster: front porch 16, sync 96, back porch 48 pixels;
  10 / 2 / 33 lines.
* Pixel rate is clk/2 (25 MHz). `vga_clk` rises in the middle of each
  pixel.
* Inset: top-left corner at (64, 64), each sample pixel shown as a 4x4
  block.
* Aggregate: top-left corner at (256, 176), shown 1:1.
* Mouse position: a red 16x16 outline centred on (`pos_x`, `pos_y`).
* Gray level `g` (6 bits) is sent as `{g, g[5:2]}` on all three 10-bit
  channels.
* `vga_sync_n` is held low (no sync-on-green).

All outputs leave one register stage together, so syncs, blank and colour
stay aligned. They run one pixel behind the counters.

## Top-level ports (`omscan_top`)

| group  | ports |
|--------|-------|
| clock  | `clk` (50 MHz), `rst_n` (asynchronous, active low) |
| mouse  | `mouse_pd`, `mouse_sclk`, `mouse_sdio_o`, `mouse_sdio_oe`, `mouse_sdio_i`, `mouse_l_n`, `mouse_r_n`. Join the three SDIO signals in a tristate pad. The sensor needs a pull-up on SDIO. |
| VGA    | `vga_clk`, `vga_hs`, `vga_vs`, `vga_blank_n`, `vga_sync_n`, `vga_r/g/b[9:0]` |
| status | `mode`, `pos_x`, `pos_y`, `queue_count`, `queue_stall`, `samples_captured`, `samples_placed`, `motion_status` (last Motion value, including the overflow and LED-fault bits), `clearing`, `serial_busy`, `clipped_pixels`, `frame_start` |

The status outputs are for a host processor or for LEDs. Nothing inside
depends on them.

| parameter     | default | meaning |
|---------------|---------|---------|
| `SCLK_HALF`   | 6       | SCLK half period in clocks (keep ≥ 4: the SDIO read-back path is 3 clocks long) |
| `T_SRAD`      | 5000    | address-to-data wait of a read, clocks (100 µs) |
| `T_WGAP`      | 5000    | rest after a write, clocks (100 µs) |
| `T_RGAP`      | 13      | rest after a read, clocks (250 ns) |
| `QUEUE_DEPTH` | 5       | samples the queue holds |

If the clock is not 50 MHz, scale the four timing parameters with it.

## How this relates to the original project description

The project this implements was laid out as a processor system. A soft
CPU was to read samples from the board's external SRAM, aggregate them
in software and drive a VGA controller over the on-chip bus, with a PLL
making the serial clock. This RTL keeps the blocks, sizes, register
sequence, address map, modes and screen layout of that plan, but:

* the aggregation loop is the `aggregator` hardware engine, not software;
* all image memory is on chip instead of in the external SRAM;
* blocks are wired directly, with no bus fabric or memory-mapped
  registers;
* SCLK comes from a clock-enable divider (4.17 MHz), not a PLL.

Not included: the processor, its host link, the bus fabric, the external
SRAM and the sensor itself. The original plan gives no details for them.

Choices of this design where the plan gives nothing: the serial timing
(taken from the sensor's published serial-port timing); the VGA porches;
placement of the two images on screen; the marker shape; the motion
scale, axis signs, start position and clamping; the gray-to-RGB rule;
dropping a sample interrupted by Reset; synchronisers; reset values.

The plan describes the sample buffer both as a queue (new samples on
top, old ones taken from the bottom) and, in one sentence, as a stack.
It is built as a queue.

## Testbenches

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/adns2051_model.sv` is a behavioural model of the sensor's serial
port and registers. It checks the 100 µs address-to-data wait and
returns a known image (`pixval` in `tb/oms_tb_pkg.sv`) with not-ready
reads mixed in.

| testbench         | what it shows |
|-------------------|---------------|
| `click_fsm_tb`    | every transition of the mode FSM, plus a random button sequence |
| `gpio_tb`         | two-clock input and one-clock output latency; PD high |
| `adns_serial_tb`  | register reads and writes against the model; SCLK period; exact clock counts of a read and a write |
| `polling_fsm_tb`  | configuration at reset, no polling in Idle, sample contents and motion, retried not-ready reads, stall on a full queue, sample dropped on Reset mid-dump |
| `sample_queue_tb` | FIFO order of headers and all pixels, full/empty/count, flush |
| `aggregator_tb`   | placement against an independent reference, clipping, clamping, clear after reset and on Reset, 259-clock copy |
| `frame_buffer_tb` | every word of the 128x128 memory, read-during-write |
| `vga_timing_tb`   | line, frame, sync widths and positions, active pixel count |
| `vga_raster_tb`   | a whole frame compared pixel by pixel with the expected picture |
| `omscan_top_tb`   | whole scanner, serial waits shortened to 50 clocks, 14 samples |
| `omscan_full_tb`  | whole scanner with every parameter at its default, 5 samples (234 ms of simulated time, about 10 s to run) |

Both whole-scanner tests (scenario in `tb/omscan_checker.sv`) check the
screen end to end. They capture entire VGA frames from the DAC outputs
after scanning, after a Reset and after a rescan, and compare them with a
reference picture built from the motion and images the sensor model
reported. They count each mechanism (Idle silence, samples placed,
not-ready retries, clipping, clamping, Reset clear, dropped sample,
queued sample, checked frames), and one that never happens counts as a
failure. The full-queue stall is covered only by `polling_fsm_tb`,
because it cannot occur in the assembled scanner (see above).

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/oms_pkg.sv tb/oms_tb_pkg.sv tb/omscan_top_tb.sv \
    --top-module omscan_top_tb -o sim
./obj_dir/sim
```

Replace `omscan_top_tb` with any other testbench name. Verilator only
simulates 0 and 1, so every register read by the logic is reset; the
tests pass with random initial values (`+verilator+rand+reset+2`).
