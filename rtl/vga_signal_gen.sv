// vga_signal_gen: VGA timing generator with row and frame interrupts.
//
// A clock divider produces pix_en, a one-cycle strobe every CLK_PER_PIXEL
// system clocks; the horizontal counter h_cnt (0..H_TOTAL-1) and the line
// counter v_cnt (0..V_TOTAL-1) step on it. hsync_n, vsync_n and active are
// decoded from the counters and so change together with them; both syncs
// are active low. Counters 0..H_VISIBLE-1 / 0..V_VISIBLE-1 are the visible
// area, followed by front porch, sync pulse and back porch.
//
// Interrupts: h_irq is a one-clock pulse as soon as the last pixel of a
// visible row has been shown (the counters have just moved from H_VISIBLE-1
// to H_VISIBLE on a visible line), so the CPU/DMA knows the row buffer may
// be refilled with the next row. v_irq pulses in the same clock after the
// last visible row of a frame, marking the start of vertical blanking so
// software can restart its row pointer. From an h_irq pulse to the start of
// the next visible row there are (H_TOTAL - H_VISIBLE) * CLK_PER_PIXEL - 1
// further clocks, 319 at the defaults, i.e. a 320-clock refill window
// counting the pulse clock.
//
// The 640x480@60 format, the 800-clock line, the factor of two between
// system and pixel clock and the per-row/per-frame interrupts follow the
// design description; porch/sync widths, polarities and the exact cycle in
// which the interrupts fire are this design's choices.
module vga_signal_gen
  import vga_pkg::*;
#(
  parameter int unsigned CLK_PER_PIXEL_P = CLK_PER_PIXEL,
  parameter int unsigned H_VISIBLE_P     = H_VISIBLE,
  parameter int unsigned H_FRONT_P       = H_FRONT,
  parameter int unsigned H_SYNC_P        = H_SYNC,
  parameter int unsigned H_BACK_P        = H_BACK,
  parameter int unsigned V_VISIBLE_P     = V_VISIBLE,
  parameter int unsigned V_FRONT_P       = V_FRONT,
  parameter int unsigned V_SYNC_P        = V_SYNC,
  parameter int unsigned V_BACK_P        = V_BACK,
  localparam int unsigned H_TOTAL_P = H_VISIBLE_P + H_FRONT_P + H_SYNC_P + H_BACK_P,
  localparam int unsigned V_TOTAL_P = V_VISIBLE_P + V_FRONT_P + V_SYNC_P + V_BACK_P,
  localparam int unsigned HW = $clog2(H_TOTAL_P),
  localparam int unsigned VW = $clog2(V_TOTAL_P),
  localparam int unsigned DW = (CLK_PER_PIXEL_P > 1) ? $clog2(CLK_PER_PIXEL_P) : 1
) (
  input  logic          clk,
  input  logic          rst,      // synchronous, active high
  output logic          pix_en,   // last system clock of each pixel period
  output logic [HW-1:0] h_cnt,
  output logic [VW-1:0] v_cnt,
  output logic          active,   // counters are inside the visible area
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          h_irq,    // row displayed (one clock)
  output logic          v_irq     // frame displayed (one clock)
);

  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else if (pix_en) div <= '0;
    else div <= div + 1'b1;
  end

  assign pix_en = (div == DW'(CLK_PER_PIXEL_P - 1));

  logic last_pixel, last_line;
  assign last_pixel = (h_cnt == HW'(H_TOTAL_P - 1));
  assign last_line  = (v_cnt == VW'(V_TOTAL_P - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (pix_en) begin
      if (last_pixel) begin
        h_cnt <= '0;
        v_cnt <= last_line ? '0 : v_cnt + 1'b1;
      end else begin
        h_cnt <= h_cnt + 1'b1;
      end
    end
  end

  assign active  = (h_cnt < HW'(H_VISIBLE_P)) && (v_cnt < VW'(V_VISIBLE_P));
  assign hsync_n = !((h_cnt >= HW'(H_VISIBLE_P + H_FRONT_P)) &&
                     (h_cnt <  HW'(H_VISIBLE_P + H_FRONT_P + H_SYNC_P)));
  assign vsync_n = !((v_cnt >= VW'(V_VISIBLE_P + V_FRONT_P)) &&
                     (v_cnt <  VW'(V_VISIBLE_P + V_FRONT_P + V_SYNC_P)));

  logic row_done;
  assign row_done = pix_en && (h_cnt == HW'(H_VISIBLE_P - 1)) && (v_cnt < VW'(V_VISIBLE_P));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_irq <= 1'b0;
      v_irq <= 1'b0;
    end else begin
      h_irq <= row_done;
      v_irq <= row_done && (v_cnt == VW'(V_VISIBLE_P - 1));
    end
  end

  // A frame interrupt is always accompanied by a row interrupt.
  assert property (@(posedge clk) disable iff (rst) v_irq |-> h_irq);

endmodule
