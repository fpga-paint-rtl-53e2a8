// tb_fpga_paint_top: end-to-end run of the display path at full size.
//
// The testbench stands in for everything outside the top: the processor
// with its interrupt handlers, the DMA engine copying rows from the SDRAM
// frame buffer, the PS/2 interface and the monitor.
//   - Picture: each frame f has its own 640x480 4-bit picture, computed by
//     img_word(f, row, word) (a hash of the three numbers), standing for
//     the SDRAM contents.
//   - Processor: enables all three interrupts, and on irq (after a few
//     clocks of latency) reads the vector register, acknowledges and
//     handles the source. PS/2: counted. Frame: acknowledges frame and the
//     accompanying row interrupt, moves to the next picture and copies its
//     row 0. Row: copies the next row.
//   - DMA: writes the 80 words of a row over the bus port of the row
//     buffer, one word every DMA_CLKS clocks (no burst).
//   - PS/2: a mouse interrupt is raised one clock before a row interrupt
//     on line 100 of every frame, and once in vertical blanking.
//   - Monitor: from the count of clocks since reset (two per pixel, output
//     one pixel behind the timing counters) it knows which pixel is on the
//     screen and compares colour and syncs with the picture of that frame.
// Three frames are run. Each mechanism must occur: row and frame
// interrupts, frame-before-row priority, PS/2-before-display priority,
// every row copy finished before the row starts to be shown (within the
// 320-clock blanking window), blanking shown black, bus read-back.
module tb_fpga_paint_top;
  import vga_pkg::*;

  localparam int DMA_CLKS = 2;
  localparam int CPU_LAT  = 4;
  localparam int FRAMES   = 3;
  localparam longint FRAME_CLKS = 800 * 525 * 2;

  logic        clk = 0, rst = 1;
  logic        bram_en = 0;
  logic [3:0]  bram_we = 0;
  logic [9:0]  bram_addr = 0;
  logic [31:0] bram_wdata = 0, bram_rdata;
  logic [2:0]  intc_addr = 0;
  logic        intc_wr = 0;
  logic [31:0] intc_wdata = 0, intc_rdata;
  logic        ps2_irq = 0, irq;
  logic        vga_hsync_n, vga_vsync_n;
  logic [2:0]  vga_red, vga_green;
  logic [1:0]  vga_blue;

  fpga_paint_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at clock %0d", what, cyc);
    end
  endtask

  function automatic logic [31:0] img_word(input int f, input int r, input int w);
    logic [31:0] x;
    x = 32'(f) * 32'h9E37_79B1 ^ 32'(r) * 32'h85EB_CA6B ^ 32'(w) * 32'hC2B2_AE35;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    return x ^ (x >> 13);
  endfunction

  function automatic logic [7:0] colour(input logic [3:0] n);
    return {n[2] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0),
            n[1] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0),
            n[0] ? (n[3] ? 2'd3 : 2'd2) : (n[3] ? 2'd1 : 2'd0)};
  endfunction

  initial begin
    repeat (FRAMES * FRAME_CLKS + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- bus
  task automatic intc_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); intc_addr = a; intc_wr = 1; intc_wdata = d;
    @(negedge clk); intc_wr = 0;
  endtask

  task automatic intc_read(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); intc_addr = a; intc_wr = 0;
    #1 d = intc_rdata;
  endtask

  int rows_copied = 0, rows_in_time = 0, max_used = 0;

  // Copy row r of picture f; it must be complete before the video side
  // reads word 0 of that row, at clock 2 * (pixel index of its column 0).
  task automatic dma_row(input int f, input int r);
    longint deadline;
    for (int w = 0; w < 80; w++) begin
      @(negedge clk);
      bram_en = 1; bram_we = 4'hF; bram_addr = 10'(w); bram_wdata = img_word(f, r, w);
      repeat (DMA_CLKS - 1) begin
        @(negedge clk);
        bram_en = 0; bram_we = 0;
      end
    end
    @(negedge clk);
    bram_en = 0; bram_we = 0;
    deadline = 2 * (longint'(f) * 420000 + longint'(r) * 800);
    rows_copied++;
    check(cyc <= deadline, "row copied before it is shown");
    if (cyc <= deadline) rows_in_time++;
    if (r > 0 && int'(cyc - (deadline - 320)) > max_used) max_used = int'(cyc - (deadline - 320));
  endtask

  // ---------------------------------------------------------- processor
  int h_served = 0, v_served = 0, ps2_served = 0;
  int v_before_h = 0, ps2_first = 0, readbacks = 0;
  int cpu_frame = 0, cpu_row = 0;

  initial begin
    logic [31:0] ivr, isr;
    repeat (3) @(negedge clk);
    rst = 0;
    intc_write(3'd2, 32'b111);
    intc_write(3'd5, 32'b1);
    forever begin
      @(negedge clk);
      if (!irq) continue;
      repeat (CPU_LAT) @(negedge clk);
      intc_read(3'd0, isr);
      intc_read(3'd4, ivr);
      case (ivr)
        0: begin
          ps2_served++;
          if (isr[2] || isr[1]) ps2_first++;
          intc_write(3'd3, 32'b001);
        end
        1: begin
          v_served++;
          check(isr[2], "row interrupt accompanies frame interrupt");
          if (isr[2]) v_before_h++;
          intc_write(3'd3, 32'b110);
          cpu_frame++;
          cpu_row = 0;
          dma_row(cpu_frame, 0);
          // read back one word over the bus port
          @(negedge clk); bram_en = 1; bram_we = 0; bram_addr = 10'd5;
          @(negedge clk); bram_en = 0;
          check(bram_rdata == img_word(cpu_frame, 0, 5), "bus read-back");
          readbacks++;
        end
        2: begin
          h_served++;
          intc_write(3'd3, 32'b100);
          cpu_row++;
          if (cpu_row < 480) dma_row(cpu_frame, cpu_row);
        end
        default: check(0, "irq without a pending source");
      endcase
    end
  end

  // ---------------------------------------------------------- PS/2 mouse
  initial begin
    @(negedge clk);
    wait (!rst);
    for (int f = 0; f < FRAMES; f++) begin
      // row interrupt of line 100 is in clock 2*(pixel of column 639)+2
      longint t;
      t = 2 * (longint'(f) * 420000 + 100 * 800 + 639) + 2;
      while (cyc < t - 1) @(negedge clk);
      ps2_irq = 1;
      @(negedge clk) ps2_irq = 0;
      t = 2 * (longint'(f) * 420000 + 500 * 800);
      while (cyc < t) @(negedge clk);
      ps2_irq = 1;
      @(negedge clk) ps2_irq = 0;
    end
  end

  // ------------------------------------------------------------ monitor
  int pixels_ok = 0, blank_ok = 0, hsyncs = 0, vsyncs = 0;
  logic hs_q = 1, vs_q = 1;

  initial begin
    @(negedge clk);
    wait (!rst);
    forever begin
      longint p;
      int f, h, v;
      if (cyc >= 2 && cyc % 2 == 0) begin
        p = cyc / 2 - 1;
        f = int'(p / 420000);
        h = int'(p % 800);
        v = int'((p / 800) % 525);
        check(vga_hsync_n == !(h >= 656 && h < 752), "hsync");
        check(vga_vsync_n == !(v >= 490 && v < 492), "vsync");
        if (h < 640 && v < 480) begin
          if (f >= 1 || v >= 1) begin
            logic [31:0] w;
            w = img_word(f, v, h / 8);
            check({vga_red, vga_green, vga_blue} == colour(w[31 - (h % 8) * 4 -: 4]), "pixel");
            pixels_ok++;
          end
        end else begin
          check({vga_red, vga_green, vga_blue} == 8'h00, "blanking black");
          blank_ok++;
        end
      end
      if (hs_q && !vga_hsync_n) hsyncs++;
      if (vs_q && !vga_vsync_n) vsyncs++;
      hs_q = vga_hsync_n;
      vs_q = vga_vsync_n;
      @(negedge clk);
    end
  end

  // ------------------------------------------------------------- finish
  initial begin
    @(negedge clk);
    wait (!rst);
    while (cyc < FRAMES * FRAME_CLKS + 10) @(negedge clk);
    $display("row irqs %0d, frame irqs %0d, ps2 irqs %0d", h_served, v_served, ps2_served);
    $display("frame-before-row %0d, ps2-first %0d", v_before_h, ps2_first);
    $display("rows copied %0d, in time %0d, most clocks of the 320 window used %0d",
             rows_copied, rows_in_time, max_used);
    $display("pixels checked %0d, blank %0d, hsyncs %0d, vsyncs %0d, readbacks %0d",
             pixels_ok, blank_ok, hsyncs, vsyncs, readbacks);
    check(h_served == FRAMES * 479, "row interrupts served");
    check(v_served == FRAMES, "frame interrupts served");
    check(ps2_served == 2 * FRAMES, "mouse interrupts served");
    check(v_before_h > 0, "frame interrupt won over row interrupt");
    check(ps2_first > 0, "mouse interrupt won over display interrupt");
    check(rows_in_time > 0 && rows_in_time == rows_copied, "all rows in time");
    check(max_used > 0 && max_used <= 320, "refill used the blanking window");
    check(pixels_ok > 0 && blank_ok > 0, "visible and blank pixels seen");
    check(hsyncs == FRAMES * 525, "one hsync per line");
    check(vsyncs == FRAMES, "one vsync per frame");
    check(readbacks > 0, "bus read-back done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
