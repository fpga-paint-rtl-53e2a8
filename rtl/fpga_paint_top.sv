// fpga_paint_top: custom display and interrupt hardware of the paint system.
//
// The paint program runs on a soft processor; the picture (640x480, 4 bits
// per pixel) is kept in external SDRAM. This top holds the parts between
// the processor bus and the monitor:
//   - vga_controller: 640x480@60 timing and pixel output, with a row
//     interrupt after every displayed row and a frame interrupt after the
//     last row;
//   - row_buffer: on-chip dual-port RAM holding the one row being shown;
//     the bus side (bram_* ports, driven by the bus's BRAM controller) is
//     where DMA copies the next row from SDRAM;
//   - intc: interrupt controller with PS/2 (highest), frame and row
//     interrupts, register port intc_* on the bus, irq to the processor.
// The processor, bus, DMA engine, SDRAM controller and PS/2 interface are
// outside; their connections are the ports below.
//
// Timing: after each row interrupt the next row (80 words of 8 pixels) must
// be in the row buffer within 320 system clocks, when the next visible row
// begins. All ports are synchronous to clk (50 MHz; 25 MHz pixel rate).
module fpga_paint_top
  import vga_pkg::*;
#(
  parameter int unsigned BPP_P  = BPP,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst,
  // row buffer, bus side (from the BRAM controller)
  input  logic              bram_en,
  input  logic [3:0]        bram_we,
  input  logic [ADDR_W-1:0] bram_addr,
  input  logic [31:0]       bram_wdata,
  output logic [31:0]       bram_rdata,
  // interrupt controller registers (from the bus)
  input  logic [2:0]        intc_addr,
  input  logic              intc_wr,
  input  logic [31:0]       intc_wdata,
  output logic [31:0]       intc_rdata,
  // interrupt from the PS/2 interface, interrupt to the processor
  input  logic              ps2_irq,
  output logic              irq,
  // VGA connector
  output logic              vga_hsync_n,
  output logic              vga_vsync_n,
  output logic [2:0]        vga_red,
  output logic [2:0]        vga_green,
  output logic [1:0]        vga_blue
);

  logic              v_en, h_irq, v_irq, de;
  logic [ADDR_W-1:0] v_addr;
  logic [31:0]       v_data;
  rgb332_t           rgb;

  vga_controller #(.BPP_P(BPP_P), .ADDR_W(ADDR_W)) u_vga (
    .clk, .rst,
    .mem_en(v_en), .mem_addr(v_addr), .mem_rdata(v_data),
    .rgb, .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .de,
    .h_irq, .v_irq
  );

  row_buffer #(.ADDR_W(ADDR_W), .DATA_W(32)) u_row (
    .clk,
    .a_en(bram_en), .a_we(bram_we), .a_addr(bram_addr),
    .a_wdata(bram_wdata), .a_rdata(bram_rdata),
    .b_en(v_en), .b_addr(v_addr), .b_rdata(v_data)
  );

  intc #(.N_SRC(3)) u_intc (
    .clk, .rst,
    .src({h_irq, v_irq, ps2_irq}),
    .addr(intc_addr), .wr(intc_wr), .wdata(intc_wdata), .rdata(intc_rdata),
    .irq
  );

  assign vga_red   = rgb.r;
  assign vga_green = rgb.g;
  assign vga_blue  = rgb.b;

  logic unused;
  assign unused = de;

endmodule
