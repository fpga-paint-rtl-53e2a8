// paint_host_model: one display system with a modelled processor and DMA.
//
// Instantiates fpga_paint_top at colour depth BPP and drives it the way the
// processor and DMA engine do: all interrupts enabled; a frame interrupt
// acknowledges frame and row, moves to the next picture and copies its
// row 0; a row interrupt copies the next row. The DMA writes one 32-bit
// word every DMA_CLKS clocks. Pictures are computed per frame from a hash.
// A monitor compares every visible pixel of frame 1 with the
// picture and counts mismatches, so a copy that falls behind the beam shows
// up as wrong pixels. Reports are valid when done is high.
module paint_host_model #(
  parameter int BPP      = 4,
  parameter int DMA_CLKS = 2,
  parameter int FRAMES   = 2
) (
  input  logic clk,
  output logic done,
  output int   pixels,
  output int   wrong,
  output int   rows_late,     // rows whose copy ended after the row began
  output int   max_copy_clks  // longest copy, clocks
);
  import vga_pkg::*;

  localparam int WORDS = 640 * BPP / 32;
  localparam int PPW   = 32 / BPP;

  logic        rst = 1;
  logic        bram_en = 0;
  logic [3:0]  bram_we = 0;
  logic [9:0]  bram_addr = 0;
  logic [31:0] bram_wdata = 0, bram_rdata;
  logic [2:0]  intc_addr = 0;
  logic        intc_wr = 0;
  logic [31:0] intc_wdata = 0, intc_rdata;
  logic        irq;
  logic        vga_hsync_n, vga_vsync_n;
  logic [2:0]  vga_red, vga_green;
  logic [1:0]  vga_blue;

  fpga_paint_top #(.BPP_P(BPP)) dut (.*, .ps2_irq(1'b0));

  longint cyc = 0;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  function automatic logic [31:0] img_word(input int f, input int r, input int w);
    logic [31:0] x;
    x = 32'(f) * 32'h9E37_79B1 ^ 32'(r) * 32'h85EB_CA6B ^ 32'(w) * 32'hC2B2_AE35;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    return x ^ (x >> 13);
  endfunction

  function automatic logic [7:0] colour(input logic [7:0] code);
    logic [3:0] n;
    if (BPP == 8) return code;
    n = code[3:0];
    return {n[2] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0),
            n[1] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0),
            n[0] ? (n[3] ? 2'd3 : 2'd2) : (n[3] ? 2'd1 : 2'd0)};
  endfunction

  task automatic intc_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); intc_addr = a; intc_wr = 1; intc_wdata = d;
    @(negedge clk); intc_wr = 0;
  endtask

  task automatic dma_row(input int f, input int r);
    longint start;
    start = cyc;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      bram_en = 1; bram_we = 4'hF; bram_addr = 10'(w); bram_wdata = img_word(f, r, w);
      repeat (DMA_CLKS - 1) begin
        @(negedge clk);
        bram_en = 0; bram_we = 0;
      end
    end
    @(negedge clk);
    bram_en = 0; bram_we = 0;
    if (int'(cyc - start) > max_copy_clks) max_copy_clks = int'(cyc - start);
    if (cyc > 2 * (longint'(f) * 420000 + longint'(r) * 800)) rows_late++;
  endtask

  int cpu_frame = 0, cpu_row = 0;

  initial begin
    logic [31:0] ivr;
    done = 0; pixels = 0; wrong = 0; rows_late = 0; max_copy_clks = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    intc_write(3'd2, 32'b110);
    intc_write(3'd5, 32'b1);
    forever begin
      @(negedge clk);
      if (!irq) continue;
      repeat (4) @(negedge clk);
      intc_addr = 3'd4;
      #1 ivr = intc_rdata;
      if (ivr == 1) begin
        intc_write(3'd3, 32'b110);
        cpu_frame++;
        cpu_row = 0;
        dma_row(cpu_frame, 0);
      end else begin
        intc_write(3'd3, 32'b100);
        cpu_row++;
        if (cpu_row < 480) dma_row(cpu_frame, cpu_row);
      end
    end
  end

  initial begin
    @(negedge clk);
    wait (!rst);
    while (cyc < longint'(FRAMES) * 840000 + 10) begin
      if (cyc >= 2 && cyc % 2 == 0) begin
        longint p;
        int f, h, v;
        p = cyc / 2 - 1;
        f = int'(p / 420000);
        h = int'(p % 800);
        v = int'((p / 800) % 525);
        if (f == 1 && h < 640 && v < 480) begin
          logic [31:0] w;
          logic [7:0]  code;
          w = img_word(f, v, h / PPW);
          code = '0;
          code[BPP-1:0] = w[31 - (h % PPW) * BPP -: BPP];
          pixels++;
          if ({vga_red, vga_green, vga_blue} != colour(code)) wrong++;
        end
      end
      @(negedge clk);
    end
    done = 1;
  end
endmodule
