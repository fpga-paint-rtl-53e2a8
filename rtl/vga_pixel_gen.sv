// vga_pixel_gen: turns row-buffer words into the VGA colour stream.
//
// For the pixel currently addressed by the timing counters it requests the
// row-buffer word that holds it (word h_cnt / (32/BPP), the buffer holds
// exactly one row starting at word 0). The buffer answers one clock later;
// on the next pix_en strobe the pixel's BPP-bit code is cut out of the word
// (leftmost pixel in the most significant bits), converted to RRRGGGBB and
// registered together with the delayed syncs. Outputs are therefore exactly
// one pixel period behind the counters, with colour and syncs aligned, and
// black outside the visible area. Because the read takes one clock the
// pixel period must be at least two system clocks.
//
// Fetching each pixel from the one-row buffer follows the design
// description, as does the 4-bit (16 colour) depth; the word packing order
// and the palette are this design's choices. BPP = 8 (RRRGGGBB stored
// directly) is accepted as well.
module vga_pixel_gen
  import vga_pkg::*;
#(
  parameter int unsigned BPP_P         = BPP,
  parameter int unsigned CLK_PER_PIXEL_P = CLK_PER_PIXEL,
  parameter int unsigned ADDR_W        = 10,
  parameter int unsigned HW            = 10,
  parameter int unsigned VW            = 10,
  localparam int unsigned PIX_PER_WORD = WORD_BITS / BPP_P,
  localparam int unsigned SEL_W        = (PIX_PER_WORD > 1) ? $clog2(PIX_PER_WORD) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // timing from the signal generator
  input  logic                 pix_en,
  input  logic [HW-1:0]        h_cnt,
  input  logic [VW-1:0]        v_cnt,
  input  logic                 active,
  input  logic                 hsync_n,
  input  logic                 vsync_n,
  // row-buffer read port (data one clock after address)
  output logic                 rd_en,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic [WORD_BITS-1:0] rd_data,
  // VGA output
  output rgb332_t              rgb,
  output logic                 hsync_n_o,
  output logic                 vsync_n_o,
  output logic                 de_o
);

  if (CLK_PER_PIXEL_P < 2) begin : g_check
    $error("vga_pixel_gen needs at least two system clocks per pixel");
  end
  if (WORD_BITS % BPP_P != 0) begin : g_check_bpp
    $error("BPP must divide the 32-bit word");
  end

  logic [SEL_W-1:0] sel;
  assign rd_en   = active;
  assign rd_addr = ADDR_W'(h_cnt / HW'(PIX_PER_WORD));
  assign sel     = SEL_W'(h_cnt % HW'(PIX_PER_WORD));

  logic [7:0] code;
  always_comb begin
    code = '0;
    code[BPP_P-1:0] = rd_data[WORD_BITS - 1 - int'(sel) * BPP_P -: BPP_P];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb       <= '0;
      hsync_n_o <= 1'b1;
      vsync_n_o <= 1'b1;
      de_o      <= 1'b0;
    end else if (pix_en) begin
      rgb       <= active ? pixel_colour(code, BPP_P) : '0;
      hsync_n_o <= hsync_n;
      vsync_n_o <= vsync_n;
      de_o      <= active;
    end
  end

  // The counters must not move between address and data.
  assert property (@(posedge clk) disable iff (rst) pix_en |=> !pix_en);

  logic unused;
  assign unused = ^v_cnt;

endmodule
