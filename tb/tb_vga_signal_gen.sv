// tb_vga_signal_gen: checks the 640x480@60 timing generator at full size.
//
// A reference count of system clocks since reset gives the expected pixel
// index (two clocks per pixel, 800 pixels per line, 525 lines per frame);
// from it the testbench derives the expected counters, syncs, active flag
// and interrupt pulses and compares them every clock for a little over one
// frame. It also measures the refill window: the clocks from each row
// interrupt to the first clock of the next visible row must be 320.
module tb_vga_signal_gen;
  import vga_pkg::*;

  logic clk = 0, rst = 1;
  logic pix_en, active, hsync_n, vsync_n, h_irq, v_irq;
  logic [9:0] h_cnt, v_cnt;

  int checks = 0, failures = 0;

  vga_signal_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint k;          // clocks since reset release
  int h_irqs = 0, v_irqs = 0, hs_clocks = 0;
  longint last_hirq = -1;
  int windows = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (k = 0; k < 800*525*2 + 5000; k++) begin
      longint p, pp;
      int h, v, hp, vp;
      bit exp_hirq, exp_virq;
      if (k > 0) @(negedge clk);
      // counters during clock k show pixel k/2
      p = k / 2;
      h = int'(p % 800);
      v = int'((p / 800) % 525);
      // interrupt in clock k if clock k-1 was the last clock of pixel 639
      exp_hirq = 0; exp_virq = 0;
      if (k >= 1 && ((k - 1) % 2 == 1)) begin
        pp = (k - 1) / 2;
        hp = int'(pp % 800);
        vp = int'((pp / 800) % 525);
        exp_hirq = (hp == 639) && (vp < 480);
        exp_virq = (hp == 639) && (vp == 479);
      end
      check(h_cnt == 10'(h) && v_cnt == 10'(v), "counters");
      check(pix_en == (k % 2 == 1), "pix_en");
      check(active == (h < 640 && v < 480), "active");
      check(hsync_n == !(h >= 656 && h < 752), "hsync");
      check(vsync_n == !(v >= 490 && v < 492), "vsync");
      check(h_irq == exp_hirq, "h_irq");
      check(v_irq == exp_virq, "v_irq");
      if (h_irq) begin h_irqs++; last_hirq = k; end
      if (v_irq) begin v_irqs++; last_hirq = -1; end
      if (!hsync_n) hs_clocks++;
      if (active && h == 0 && (k % 2 == 0) && last_hirq >= 0) begin
        check(k - last_hirq == 320, "refill window of 320 clocks");
        windows++;
        last_hirq = -1;
      end
    end
    check(h_irqs == 480 + 3, "row interrupts per frame");
    check(v_irqs == 1, "one frame interrupt");
    check(hs_clocks == (525 + 3) * 96 * 2, "hsync low 96 pixels per line");
    check(windows == 479 + 3, "refill windows measured");
    $display("row irqs=%0d frame irqs=%0d windows=%0d", h_irqs, v_irqs, windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
