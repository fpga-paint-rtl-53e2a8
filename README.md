# FPGA Paint: a 640x480 display fed one row at a time

A paint program for a small FPGA board: the user draws with a PS/2 mouse and
the picture appears on a VGA monitor at 640x480, 60 Hz, 16 colours. The
program itself runs on a soft processor. The hardware problem is the picture:
640 x 480 pixels at 4 bits is 150 KB, which does not fit in the FPGA's block
RAM. The picture therefore lives in external SDRAM, and the chip holds only
**one row** of it. After each displayed row, the VGA controller interrupts the
processor. The processor then has a DMA engine copy the next row from SDRAM
into the row buffer before the beam starts that row.

This repository holds the RTL of the custom part of that system: the VGA
controller, the row buffer and the interrupt controller that joins them to the
processor. The processor, its bus, the DMA engine, the SDRAM controller and
the PS/2 receiver are standard library parts. They sit outside the top module
and connect through its ports.

```
            processor bus (32 bit)
   ──────┬──────────────┬───────────────────────────┬───────────
         │ bram_*       │ intc_*                    │
         │ (DMA writes  │ (registers)               │  ps2_irq (from the
         │  next row)   │                           │  PS/2 receiver)
   ┌─────▼──────┐  ┌────▼─────────────────────┐     │
   │ row_buffer │  │ intc                     │◄────┘  src0  highest
   │ 1024 x 32  │  │ src0 PS/2, src1 frame,   │◄─── v_irq  src1
   │ dual port  │  │ src2 row                 │◄─── h_irq  src2  lowest
   └─────┬──────┘  └────┬─────────────────────┘        │
         │ video port   └── irq to the processor       │
   ┌─────▼─────────────────────────────────────────────┴──┐
   │ vga_controller = vga_signal_gen + vga_pixel_gen      │
   └─────┬────────────────────────────────────────────────┘
         └── vga_hsync_n, vga_vsync_n, vga_red[2:0], vga_green[2:0], vga_blue[1:0]
```

## The row-refill budget

This is the part that makes or breaks the design.

The system clock runs at 50 MHz and the pixel rate is 25 MHz, so each pixel
lasts two clocks. A line is 800 pixels: 640 visible, then 160 of blanking. The
blanking is 320 system clocks. That is the time between "row *r* has been
shown" and "row *r+1* begins". The processor's interrupt latency and the whole
DMA copy must fit into it, or at least the copy must stay ahead of the beam.

Timing of the RTL, counted in system clocks:

| event | clock |
|---|---|
| last pixel (column 639) of row *r* read from the buffer | the two clocks of pixel 639 |
| `h_irq` pulse (one clock) | the clock after that |
| `intc` latches the edge, `irq` rises | one clock after the pulse |
| first read of row *r+1*, word 0 | 320 clocks after the `h_irq` clock |
| read of word *w* of row *r+1* | 320 + 16·*w* clocks after `h_irq` (4-bit pixels, 8 per word) |

After `h_irq`, the buffer may be overwritten at once. No pixel of row *r* is
still waiting to be read.

A 4-bit row is 80 words. A copy at one word per clock needs 80 clocks. A copy
at one word per 4 clocks exactly fills the blanking. A slower copy still
produces a correct picture if every word arrives before the beam reads it.
The beam reads a new word only every 16 clocks. So even a copy at 10 clocks
per word, about what a non-burst bus transfer gives, keeps ahead of the beam.
At 8 bits per pixel the row doubles to 160 words, and the beam reads a word
every 8 clocks. The same slow copy then takes 1600 clocks, a whole line, and
falls behind for good. This is why the design uses 4-bit colour.
`tb/tb_dma_rate_workload.sv` shows all three cases (see below).

### Frame start

`v_irq` pulses in the same clock as the `h_irq` of the last visible row
(row 479), which is also the start of vertical blanking. Both are latched
together. The interrupt controller serves the frame interrupt first, because
it has the higher priority. Its handler should:

1. acknowledge both the frame and the row interrupt (write `3'b110` to IAR);
2. reset its row pointer to 0;
3. copy row 0 of the next picture.

The handler has all of vertical blanking (45 lines) to do this. A row handler
copies row *pointer+1* and advances the pointer. This protocol is what the
end-to-end testbench implements.

## Display timing (`vga_signal_gen`)

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

- Both syncs are active low.
- A divider makes `pix_en` in the second clock of every pixel. The counters
  `h_cnt` and `v_cnt` step on `pix_en`.
- `active`, `hsync_n` and `vsync_n` are decoded directly from the counters.
- All widths are parameters. The visible size, the 800-pixel line and the
  factor of two come from the original system. The porch and sync widths are
  the usual 640x480@60 figures.

## Pixels, words and colours (`vga_pixel_gen`)

A 32-bit word holds 8 pixels. The leftmost pixel is in bits 31:28 (big-endian
order, as the processor stores bytes), and pixel *x* of the row is in word
*x*/8. The row always starts at word 0.

The pixel generator works as a short pipeline:

1. It addresses the word in the first clock of a pixel.
2. It receives the data in the second clock.
3. On `pix_en` it registers the colour together with the syncs of that pixel.

Outputs are therefore one pixel (two clocks) behind the counters, and colour
and syncs stay aligned. Blanking is black. The pipeline needs at least two
clocks per pixel, and elaboration stops with an error otherwise.

The 16 colour codes are IRGB: bit 3 is intensity, bits 2..0 are red, green
and blue. They map to the board's 8-bit RRRGGGBB resistor DAC:

| colour bit | intensity | 3-bit component (red, green) | 2-bit component (blue) |
|---|---|---|---|
| 1 | 1 | 7 | 3 |
| 1 | 0 | 5 | 2 |
| 0 | 1 | 2 | 1 |
| 0 | 0 | 0 | 0 |

With `BPP_P = 8` the stored byte is RRRGGGBB itself, 4 pixels per word. This
is the deeper colour mode, which needs a burst-speed copy.

## Row buffer (`row_buffer`)

The row buffer is a true dual-port RAM, 1024 x 32 bits (32 Kbit), on one
clock.

- **Port A** faces the bus: byte write enables, and a synchronous read that
  returns the old contents (read-first).
- **Port B** is the video port and is read-only. Its data appears one clock
  after the address.

A 4-bit row uses words 0..79 and an 8-bit row words 0..159. The rest is
unused but kept, so the buffer is the 32 Kbit that the original system
allotted to it.

## Interrupt controller (`intc`)

The controller has three sources. A lower number means a higher priority:

| source | bit | from |
|---|---|---|
| PS/2 mouse | 0 | `ps2_irq` |
| frame (vertical) | 1 | `v_irq` |
| row (horizontal) | 2 | `h_irq` |

A rising edge latches the source's bit in ISR. The `irq` output is
`MER & |(ISR & IER)`. If an edge arrives in the same clock as its
acknowledge, the edge wins.

Registers (32-bit words, indexed by `intc_addr`). Reads are combinational and
writes take effect at the clock edge:

| idx | name | access | meaning |
|---|---|---|---|
| 0 | ISR | r | latched sources |
| 1 | IPR | r | ISR & IER |
| 2 | IER | rw | enable mask (reset 0) |
| 3 | IAR | w | write 1 to clear ISR bits |
| 4 | IVR | r | number of the highest-priority pending source, all ones if none |
| 5 | MER | rw | bit 0: master enable (reset 0) |

The PS/2 handler should only note that a packet arrived and return, leaving
the packet processing to the main loop. A long mouse handler delays the row
handler and eats into the 320-clock budget.

## What follows the original system and what is chosen here

Taken from the original system:
- 640x480 at 60 Hz;
- 4-bit colour;
- the 800-clock line with two clocks per pixel and the 320-clock window;
- a one-row on-chip buffer refilled by DMA from SDRAM;
- the controller split into a signal generator and a pixel generator;
- a row interrupt after each row and a frame interrupt per frame;
- three interrupt sources in the order PS/2, frame, row.

Chosen here, where the original leaves it open:
- porch and sync widths and polarities;
- the exact clock in which each interrupt fires, and that both are one-clock
  pulses;
- edge capture in the interrupt controller and its register map;
- pixel packing order and the 16-colour palette;
- the 1024 x 32 buffer size (the original's "32K" without a unit, read as
  bits);
- read-first behaviour of the row buffer;
- a synchronous active-high reset on everything except the RAM contents;
- the simple register port in place of the real bus attachment.

Not included: the processor, bus, DMA engine, SDRAM and its controller, the
bus-to-BRAM bridge, the PS/2 receiver and clock generation. They are library
parts and appear only as ports or as testbench models.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. To build one with
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_fpga_paint_top \
  -y rtl -y tb +libext+.sv rtl/vga_pkg.sv tb/tb_fpga_paint_top.sv
./obj_dir/Vtb_fpga_paint_top
```

| testbench | what it shows |
|---|---|
| `tb_fpga_paint_top` | Three full frames at full size, with default parameters. A processor model serves the interrupts and copies rows at 2 clocks per word. A PS/2 interrupt is injected one clock before a row interrupt, and once in blanking. Checks every pixel and sync against the pictures. Checks that every row copy ends before its row is shown. Checks that the frame interrupt wins over the row interrupt and that PS/2 wins over both. Checks a bus read-back. |
| `tb_dma_rate_workload` | The colour-depth/copy-speed study. 4 bit at 10 clocks/word gives a correct picture although the copy takes 800 clocks. 8 bit at 10 clocks/word (1600 clocks per row) tears. 8 bit at 1 clock/word is correct. Uses `tb/paint_host_model.sv`. |
| `tb_vga_controller` | One full frame from a fixed row, with every output pixel and sync checked. 480 row interrupts and 1 frame interrupt per frame. Reads stay within words 0..79. |
| `tb_vga_signal_gen` | Counters, syncs, `pix_en` and interrupts checked every clock for one frame. Every refill window measured at exactly 320 clocks. |
| `tb_vga_pixel_gen` | Word unpacking and colour mapping at 4 and 8 bits per pixel, with the one-pixel output delay. |
| `tb_row_buffer` | Random byte-masked traffic on both ports against a reference array. |
| `tb_intc` | Latching, masking, master enable, edge sensitivity, ack/edge collision and priority order; then random traffic against a model. |

The full-size end-to-end run simulates 2.5 million clocks in a few seconds.

## Files

- `rtl/vga_pkg.sv`: timing constants, `rgb332_t`, palette.
- `rtl/vga_signal_gen.sv`, `rtl/vga_pixel_gen.sv`, `rtl/vga_controller.sv`:
  the display path.
- `rtl/row_buffer.sv`: the line buffer.
- `rtl/intc.sv`: the interrupt controller.
- `rtl/fpga_paint_top.sv`: the top module.
- `tb/`: the testbenches above, plus `paint_host_model.sv`, a processor-and-DMA
  model that wraps one top instance.
