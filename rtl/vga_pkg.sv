// vga_pkg: constants and helpers shared by the VGA display path.
//
// The display is 640 x 480 pixels at 60 Hz with 4 bits of colour per pixel
// (16 colours). A line is 800 pixel clocks long, so 160 pixel clocks of
// horizontal blanking separate two visible rows; with the system clock at
// twice the pixel rate that gives 320 system clocks in which the next row
// must be copied into the row buffer. Porch and sync widths below are the
// standard 640x480@60 figures (16/96/48 horizontally, 10/2/33 vertically,
// both syncs active low); only the 640x480 visible area, the 800-clock line
// and the factor of two come from the design description itself.
//
// Pixels are packed into 32-bit row-buffer words with the leftmost pixel in
// the most significant bits (big-endian order, as a 32-bit bus master would
// store bytes). The 16-colour palette maps an IRGB code onto the board's
// 8-bit RRRGGGBB output; the palette is this design's own choice.
package vga_pkg;

  // Horizontal timing, in pixel clocks.
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned H_TOTAL   = H_VISIBLE + H_FRONT + H_SYNC + H_BACK; // 800

  // Vertical timing, in lines.
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned V_TOTAL   = V_VISIBLE + V_FRONT + V_SYNC + V_BACK; // 525

  // System clocks per pixel clock (50 MHz system clock, 25 MHz pixels).
  localparam int unsigned CLK_PER_PIXEL = 2;

  // Colour depth in bits per pixel and the resulting row size.
  localparam int unsigned BPP           = 4;
  localparam int unsigned WORD_BITS     = 32;

  // 8-bit VGA colour as driven to the board's resistor DAC.
  typedef struct packed {
    logic [2:0] r;
    logic [2:0] g;
    logic [1:0] b;
  } rgb332_t;

  // 16-colour palette. Code bits: [3] intensity, [2] red, [1] green,
  // [0] blue. A set colour bit gives a bright component, intensity raises
  // it further or lifts a clear component to a dim grey level.
  function automatic rgb332_t palette16(input logic [3:0] code);
    rgb332_t c;
    c.r = code[2] ? (code[3] ? 3'd7 : 3'd5) : (code[3] ? 3'd2 : 3'd0);
    c.g = code[1] ? (code[3] ? 3'd7 : 3'd5) : (code[3] ? 3'd2 : 3'd0);
    c.b = code[0] ? (code[3] ? 2'd3 : 2'd2) : (code[3] ? 2'd1 : 2'd0);
    return c;
  endfunction

  // Colour for a pixel code of a given depth: 4-bit codes go through the
  // palette, 8-bit codes are already RRRGGGBB.
  function automatic rgb332_t pixel_colour(input logic [7:0] code, input int unsigned bpp);
    rgb332_t c;
    if (bpp == 8) c = rgb332_t'(code);
    else          c = palette16(code[3:0]);
    return c;
  endfunction

endpackage
