// tb_vga_controller: one full frame of the VGA controller at 640x480.
//
// A row-buffer model answers the controller's reads one clock late from a
// fixed random row. The testbench counts clocks since reset; the output at
// clock k shows pixel k/2 - 1 (one pixel period of pipeline), so it knows
// for every clock which line and column the monitor sees and checks the
// colour (palette of the stored 4-bit code, black in blanking), both syncs
// and the interrupt counts of a frame. It also checks that the controller
// reads only the 80 words of one row.
module tb_vga_controller;
  import vga_pkg::*;

  logic        clk = 0, rst = 1;
  logic        mem_en;
  logic [9:0]  mem_addr;
  logic [31:0] mem_rdata;
  rgb332_t     rgb;
  logic        hsync_n, vsync_n, de, h_irq, v_irq;

  logic [31:0] row [1024];
  int checks = 0, failures = 0;

  vga_controller dut (.*);

  always_ff @(posedge clk) if (mem_en) mem_rdata <= row[mem_addr];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [7:0] colour(input int h);
    logic [3:0] n;
    n = row[h / 8][31 - (h % 8) * 4 -: 4];
    return {n[2] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0),
            n[1] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0),
            n[0] ? (n[3] ? 2'd3 : 2'd2) : (n[3] ? 2'd1 : 2'd0)};
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h_irqs = 0, v_irqs = 0, max_addr = 0, vs_clocks = 0;

  initial begin
    for (int i = 0; i < 1024; i++) row[i] = $urandom;
    repeat (3) @(negedge clk);
    rst = 0;
    for (longint k = 0; k < 800*525*2 + 4; k++) begin
      longint p;
      int h, v;
      if (k > 0) @(negedge clk);
      if (h_irq) h_irqs++;
      if (v_irq) v_irqs++;
      if (mem_en && int'(mem_addr) > max_addr) max_addr = int'(mem_addr);
      if (!vsync_n) vs_clocks++;
      if (k < 2) continue;
      p = k / 2 - 1;
      h = int'(p % 800);
      v = int'((p / 800) % 525);
      if (k % 2 == 0) begin
        if (h < 640 && v < 480) check(rgb == rgb332_t'(colour(h)), "visible pixel");
        else                    check(rgb == '0, "blank is black");
        check(hsync_n == !(h >= 656 && h < 752), "hsync");
        check(vsync_n == !(v >= 490 && v < 492), "vsync");
        check(de == (h < 640 && v < 480), "data enable");
      end
    end
    check(h_irqs == 480, "480 row interrupts");
    check(v_irqs == 1, "1 frame interrupt");
    check(max_addr == 79, "reads stay within one 80-word row");
    check(vs_clocks == 2 * 800 * 2, "vsync two lines long");
    $display("row irqs=%0d frame irqs=%0d max addr=%0d", h_irqs, v_irqs, max_addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
