// vga_controller: VGA display controller (signal generator + pixel generator).
//
// The signal generator produces the 640x480@60 timing from the system clock
// (two system clocks per pixel) and pulses h_irq after each displayed row
// and v_irq after the last row of a frame. The pixel generator reads each
// pixel's colour code from the one-row buffer through the mem_* port (one
// clock read latency) and drives the colour and sync outputs, which lag the
// internal counters by one pixel period. The processor must refill the row
// buffer with the next row between h_irq and the start of the next visible
// row (320 system clocks including the pulse clock).
//
// Splitting the controller into a signal generator and a pixel generator
// that reads a row buffer follows the design description.
module vga_controller
  import vga_pkg::*;
#(
  parameter int unsigned BPP_P           = BPP,
  parameter int unsigned CLK_PER_PIXEL_P = CLK_PER_PIXEL,
  parameter int unsigned ADDR_W          = 10,
  parameter int unsigned H_VISIBLE_P     = H_VISIBLE,
  parameter int unsigned H_FRONT_P       = H_FRONT,
  parameter int unsigned H_SYNC_P        = H_SYNC,
  parameter int unsigned H_BACK_P        = H_BACK,
  parameter int unsigned V_VISIBLE_P     = V_VISIBLE,
  parameter int unsigned V_FRONT_P       = V_FRONT,
  parameter int unsigned V_SYNC_P        = V_SYNC,
  parameter int unsigned V_BACK_P        = V_BACK
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic                 mem_en,
  output logic [ADDR_W-1:0]    mem_addr,
  input  logic [WORD_BITS-1:0] mem_rdata,
  output rgb332_t              rgb,
  output logic                 hsync_n,
  output logic                 vsync_n,
  output logic                 de,
  output logic                 h_irq,
  output logic                 v_irq
);

  localparam int unsigned HW = $clog2(H_VISIBLE_P + H_FRONT_P + H_SYNC_P + H_BACK_P);
  localparam int unsigned VW = $clog2(V_VISIBLE_P + V_FRONT_P + V_SYNC_P + V_BACK_P);

  logic          pix_en, active, hs_n, vs_n;
  logic [HW-1:0] h_cnt;
  logic [VW-1:0] v_cnt;

  vga_signal_gen #(
    .CLK_PER_PIXEL_P(CLK_PER_PIXEL_P),
    .H_VISIBLE_P(H_VISIBLE_P), .H_FRONT_P(H_FRONT_P), .H_SYNC_P(H_SYNC_P), .H_BACK_P(H_BACK_P),
    .V_VISIBLE_P(V_VISIBLE_P), .V_FRONT_P(V_FRONT_P), .V_SYNC_P(V_SYNC_P), .V_BACK_P(V_BACK_P)
  ) u_sig (
    .clk, .rst, .pix_en, .h_cnt, .v_cnt, .active,
    .hsync_n(hs_n), .vsync_n(vs_n), .h_irq, .v_irq
  );

  vga_pixel_gen #(
    .BPP_P(BPP_P), .CLK_PER_PIXEL_P(CLK_PER_PIXEL_P),
    .ADDR_W(ADDR_W), .HW(HW), .VW(VW)
  ) u_pix (
    .clk, .rst, .pix_en, .h_cnt, .v_cnt, .active,
    .hsync_n(hs_n), .vsync_n(vs_n),
    .rd_en(mem_en), .rd_addr(mem_addr), .rd_data(mem_rdata),
    .rgb, .hsync_n_o(hsync_n), .vsync_n_o(vsync_n), .de_o(de)
  );

endmodule
