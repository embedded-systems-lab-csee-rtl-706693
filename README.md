# Imagic: an SD-card JPEG slideshow with a shared-SRAM VGA frame store

Imagic shows the JPEG pictures on an SD card as a slideshow on a 640x480 VGA
monitor. A soft CPU does the heavy work in software: it reads the FAT file
system off the card, decodes each JPEG and down-samples it if needed. The
hardware in this repository handles the rest:

* a **VGA peripheral** that owns a single external 256K x 16 asynchronous SRAM.
  The SRAM is both the frame store the display scans out and the memory the
  CPU writes new pictures into. The peripheral centres the picture on the
  screen and fills the border with a background colour taken from the
  picture's first pixel, so the border matches the picture;
* an **SD card controller** made of four one-bit bus peripherals, through which
  software bit-bangs the card's SPI protocol;
* a small **Avalon-MM fabric** connecting the CPU's data master to those
  peripherals, a **PLL model** for the SDRAM clock, and the top level.

The CPU, its SDRAM controller and all external chips are not part of this RTL.
The CPU's data master is a port of the top level, so a testbench (or your own
CPU) plays the software's role.

## The central trick: one SRAM, two users, 40 ns per pixel

The display needs a new pixel every 40 ns (25 MHz). The SRAM has one port,
and the CPU also has to write pictures into it. Everything runs on the 50 MHz
bus clock, so each pixel period holds two bus cycles. A phase bit `ph`
toggles every cycle and gives each cycle one job:

```
 bus clock   _|‾|_|‾|_|‾|_|‾|_|‾|_
 ph          ‾‾‾|___|‾‾‾|___|‾‾‾     (ph = 1: the next edge is a read edge)
 edge type      R   W   R   W   R
 SRAM addr      rdA | wrA | rdB | rdB ...  (wrA only if the CPU wrote a pixel)
 WE_n           ‾‾‾‾|___|‾‾‾‾‾‾‾‾‾‾
 waitrequest    ‾‾‾|___|‾‾‾|___|‾‾‾     (= ph)
```

* **Read edge (R):** `WE_n` goes high, which also completes any write started
  half a period earlier. The next pixel's read address goes onto the SRAM. The
  word that the previous read address has produced is latched as the current
  pixel.
* **Write edge (W):** if the CPU is writing a pixel, the write address and data
  go onto the SRAM and `WE_n` goes low for one bus cycle. Register writes
  (address, width, height) are also accepted here.
* **waitrequest** equals `ph`: high in every cycle that ends on a read edge. A
  bus write can therefore only complete on a write edge, and a master waits at
  most one cycle per transfer.
* **Lost fetch:** if a pixel write used the SRAM between two read edges, the
  data bus held the CPU's data and not the pixel. The next read edge then keeps
  the previous pixel (`read_skipped` pulses). While a picture loads, the screen
  shows only the background colour (see below), so a repeated pixel is never
  visible in practice.

The SRAM is always enabled, its outputs are always on (`OE_n = CE_n = UB_n =
LB_n = 0`), and every access is a full 16-bit word. The controller drives the
data bus (`sram_dq_oe`) only while `WE_n` is low. A pad outside the design
joins `sram_dq_o`/`sram_dq_oe`/`sram_dq_i` into the bidirectional pins.

Timing margins, assuming a 10 ns SRAM: the read address is stable for 40 ns
before it is sampled. On a write, address and data are stable for the whole
20 ns low time of `WE_n` and change only as `WE_n` rises.

## Loading a picture: the register protocol

The VGA peripheral is slave 0 and has five write-only word registers:

| offset | register | bits used |
|-------:|----------|-----------|
| 0 | pixel: written to the SRAM at the current write address | 15:0 (RGB 5-5-5 in 14:0) |
| 1 | write address, low | 15:0 → address 15:0 |
| 2 | write address, high | 1:0 → address 17:16 |
| 3 | width | 8:0 |
| 4 | height | 8:0 |

A width of 1 is a signal: "a new picture is being loaded". The software
sequence is:

1. write width = 1 and height = 1. While the width is 1, the whole visible
   screen shows the background colour, so the half-written SRAM is never seen.
   Writing width = 1 also arms a capture: the next pixel written becomes the
   new background colour;
2. for every pixel i in raster order, write address `2*i` (low, then high) and
   then the pixel. The write address does not auto-increment;
3. write the real width and height. From the next frame on, the picture is
   shown.

Pixels are 15-bit RGB: red 14:10, green 9:5, blue 4:0. Reading any register
returns 0.

## Putting the picture on the screen

**Raster** (`vga_timing`): 800 slots x 525 lines at 25 MHz. A line is 96 slots
of sync, 48 of back porch, 640 visible and 16 of front porch. A frame is 2
lines of sync, 33 of back porch, 480 visible and 10 of front porch. The visible
area is columns 144..783 and lines 35..514.

**Window** (`image_window`): the picture's top-left corner sits at
(320 - width/2, 240 - height/2) in visible-area coordinates, so the picture is
centred. The window compare uses signed arithmetic, so a picture larger than
the screen is clipped rather than wrapped. The SRAM read address starts at 0,
advances by 2 after every slot spent inside the picture and returns to 0 after
the last slot of the frame. The picture is therefore read in raster order from
address 0, each frame again.

**Pipeline** (`vga_raster`): the read for raster slot k is issued at the end
of slot k. Its data is latched one pixel period later, and the DAC registers
are loaded one period after that. The sync, blank and window flags of slot k
pass through two registers, so they leave together with the pixel. All DAC
outputs therefore lag the raster counters by a fixed two pixel periods, and
within a frame a pixel never appears next to the wrong sync.

**Colour** (per channel): the 5-bit value goes to DAC bits 8:4, its upper four
bits are repeated in bits 3:0, and bit 9 is 0. Inside the picture the output is
the fetched pixel (the background while the width is 1). Elsewhere in the
visible area it is the background, and outside the visible area it is black.
`vga_hs_n`/`vga_vs_n` are active-low syncs. `vga_blank_n` is low only during
the sync pulses, `vga_sync_n` is held at 0, and `vga_clk` is the 25 MHz phase
toggle, whose rising edge falls in the middle of each output pixel.

## Capacity

* Width and height are 9-bit registers: at most 511 x 511.
* Pixels sit at every other SRAM word (byte-style addresses 0, 2, 4, ... go to
  the 18-bit word address unchanged), so the 262,144-word SRAM holds 131,072
  pixels. A 546 x 408 picture (222,768 pixels) therefore does not fit, for
  either reason. The largest full-width picture is 511 x 256. The end-to-end
  testbench loads and displays exactly that picture.
* `ADDR_STEP` (on `vga_raster` and `image_window`) set to 1 packs pixels
  densely and doubles the capacity to 262,144. The CPU must then write
  addresses 0, 1, 2, ...
* Down-sampling a larger picture to fit is the software's job.

## SD card access

The card runs in SPI mode and the hardware only provides pins. `sd_card_ctrl`
holds four single-bit slaves: SD_CLK, SD_CMD (data to the card) and SD_DAT3
(chip select, active low) are set from `writedata[0]` on a write. SD_DAT (data
from the card) is sampled every clock and returned in `readdata[0]` on a read.
Everything else is software, one pin access at a time:

* 80 clocks with the card deselected;
* CMD0 (`40 00 00 00 00 95`; the CRC byte 95h is required because the card
  starts in MMC mode);
* CMD1 repeated until R1 reads 00h;
* SET_BLOCKLEN, single-block reads waiting for the FEh data token, and bit
  alignment of the received bytes.

Each byte costs 24 bus writes to send or 24 accesses to receive, so SD
throughput is set by the CPU, not by this hardware. Reset levels: clock low,
command and chip select high.

## Bus and address map

`avalon_fabric` decodes the master's 8-bit word address. Bits 7:5 select a
slave and bits 4:0 go to the slave as its register offset. Only the selected
slave sees `chipselect`, and its `readdata` and `waitrequest` go back to the
master. Unmapped windows read 0 and never stall.

| window (`avm_address[7:5]`) | slave |
|---:|---|
| 0 | VGA peripheral |
| 1 | SD_CLK |
| 2 | SD_CMD |
| 3 | SD_DAT (read) |
| 4 | SD_DAT3 (chip select) |

## SDRAM clock

The CPU runs from SDRAM (not included). Board delays skew the clock at the
SDRAM chip, so the chip gets a copy of the 50 MHz clock that leads the system
clock by 3 ns. `sdram_pll` is a behavioural model of that PLL output: each
input edge schedules the same edge on `c0` one period minus 3 ns later. It is
not synthesizable. On an FPGA, replace it with the vendor PLL set to a -3 ns
phase shift.

## Where this RTL departs from the original design

The original peripheral was written for a specific board and toolflow. These
points differ on purpose:

* **Single clock edge.** The original latches SRAM read data on a falling
  edge, 10 ns after the address settles. Here it is latched on the next rising
  edge, 40 ns after the address. The original also clocks the raster from a
  divided clock; here the raster runs on the bus clock with a 25 MHz enable.
* **waitrequest from the phase.** It is high in every cycle before a read
  edge. One version of the original raised it only after a write. That lets a
  write that arrives in an idle period complete on a read edge, where it is
  silently dropped.
* **Background from the bus.** The background is captured from the pixel as
  it is written, not read back from the SRAM.
* **Aligned outputs and black borders.** Sync, blank and colour are delayed
  together. Outside the visible area the colour is 0 rather than the last
  pixel.
* **Window edges.** The visible window and the picture window are decoded
  combinationally from the counters. Registered set/reset flags would start
  each window one slot later.
* **SD_DAT sampling.** The pin is sampled every cycle, so a zero-wait read
  returns a fresh value.
* **Reset and bus.** Every block has an asynchronous active-low reset, which
  is a top-level port. Width and height reset to 1 and the background to 0.
  The fabric and its address map are this design's own.

## Not included

The soft CPU and its software (FAT reader, JPEG decoder with Huffman decoding,
dequantisation, zig-zag reordering and IDCT, down-sampling), the SDRAM
controller, and the external SDRAM, SRAM, SD card and video DAC. The
testbench folder has simple behavioural models of the SRAM (`sram_model`) and
of an SPI-mode card (`spi_card_model`).

## Files

| file | contents |
|---|---|
| `rtl/imagic_pkg.sv` | shared types (Avalon request/response structs, RGB 5-5-5 pixel), register offsets, VGA timing constants, colour widening |
| `rtl/imagic_top.sv` | top level |
| `rtl/vga_raster.sv` | VGA peripheral: clock phase, output pipeline, colour select |
| `rtl/sram_ctrl.sv` | SRAM sharing and the peripheral's registers |
| `rtl/vga_timing.sv` | raster counters, sync and visible-area decode |
| `rtl/image_window.sv` | centring and SRAM read address |
| `rtl/sd_card_ctrl.sv`, `rtl/mmc_out_pin.sv`, `rtl/mmc_in_pin.sv` | SD card pin peripherals |
| `rtl/avalon_fabric.sv` | address decoder and response multiplexer |
| `rtl/sdram_pll.sv` | behavioural PLL model |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/sram_model.sv`, `tb/spi_card_model.sv` | simulation models |

## Simulating

Each testbench checks its block against values it computes on its own. It
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog. With
Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/imagic_pkg.sv tb/tb_imagic_top.sv \
  --top-module tb_imagic_top -o sim
./obj_dir/sim
```

Replace `tb_imagic_top` with any other testbench name. `tb_imagic_top` runs
the whole system at its default sizes, in about 15 s of wall time
(100 ms simulated). The steps are:

1. SD card bring-up: CMD0, CMD1 twice, CMD16;
2. loading a 40 x 30 picture, with one frame checked while loading;
3. loading a 511 x 256 picture;
4. comparing three complete frames slot by slot.

It also counts bus stalls, lost fetches, background captures, loading-mode
frames, high-address writes, frame wrap-arounds and SD exchanges, and fails if
any of them never happened. `tb_vga_raster` does the same image checks on the
VGA peripheral alone. `tb_sram_ctrl` predicts every fetch and every lost
fetch against the SRAM model.

## How far to trust it

* Every module passes its testbench.
* For every module, a deliberately broken copy (for example: a sync pulse one
  slot too long, a fetch latched despite a write, swapped SD pin wiring, a
  waitrequest that is not forwarded) makes its testbench fail.
* The frame checks compare every output slot of whole frames.
* The timing has only been simulated with ideal zero-delay models. Real SRAM
  and DAC setup/hold margins on a board have not been verified.
