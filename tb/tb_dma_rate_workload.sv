// tb_dma_rate_workload: 640x480 display at the two colour depths against
// the speed of the row copy.
//
// The row copy has the 320 clocks of horizontal blanking, and after that it
// only has to stay ahead of the beam, which reads a new word every 16
// clocks at 4 bits per pixel but every 8 clocks at 8 bits per pixel. Three
// systems run one checked frame each:
//   A  4 bit/pixel, 10 clocks per word (about 1600 clocks per 640-byte row,
//      the non-burst rate reported for the original system): 80 words take
//      800 clocks, longer than blanking, yet each word still lands before
//      the beam reaches it, so the picture is right.
//   B  8 bit/pixel, same rate: 160 words take 1600 clocks, as long as a
//      whole line. The copy falls behind the beam and every following row
//      interrupt is served later, so most of the picture comes out wrong.
//   C  8 bit/pixel, 1 clock per word (a burst copy): 160 clocks, correct.
module tb_dma_rate_workload;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int   pix_a, pix_b, pix_c, bad_a, bad_b, bad_c;
  int   late_a, late_b, late_c, copy_a, copy_b, copy_c;

  paint_host_model #(.BPP(4), .DMA_CLKS(10)) sys_a (
    .clk, .done(done_a), .pixels(pix_a), .wrong(bad_a), .rows_late(late_a), .max_copy_clks(copy_a));
  paint_host_model #(.BPP(8), .DMA_CLKS(10)) sys_b (
    .clk, .done(done_b), .pixels(pix_b), .wrong(bad_b), .rows_late(late_b), .max_copy_clks(copy_b));
  paint_host_model #(.BPP(8), .DMA_CLKS(1)) sys_c (
    .clk, .done(done_c), .pixels(pix_c), .wrong(bad_c), .rows_late(late_c), .max_copy_clks(copy_c));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2 * 840000 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done_a && done_b && done_c);
    $display("A 4bpp 10 clk/word: pixels %0d wrong %0d late rows %0d copy %0d clocks", pix_a, bad_a, late_a, copy_a);
    $display("B 8bpp 10 clk/word: pixels %0d wrong %0d late rows %0d copy %0d clocks", pix_b, bad_b, late_b, copy_b);
    $display("C 8bpp  1 clk/word: pixels %0d wrong %0d late rows %0d copy %0d clocks", pix_c, bad_c, late_c, copy_c);
    check(pix_a == 640 * 480 && pix_b == 640 * 480 && pix_c == 640 * 480, "one full frame checked in each system");
    check(copy_a > 320 && late_a > 0, "A: copy longer than blanking");
    check(bad_a == 0, "A: picture correct at 4 bit/pixel");
    check(copy_b >= 1600, "B: copy of an 8-bit row takes about 1600 clocks");
    check(bad_b > 0, "B: 8-bit picture torn at the slow rate");
    check(copy_c <= 320 && late_c == 0, "C: burst copy inside blanking");
    check(bad_c == 0, "C: 8-bit picture correct with a burst copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
