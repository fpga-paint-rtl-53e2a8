// tb_vga_pixel_gen: checks pixel fetch, unpacking and colour mapping.
//
// The testbench plays the signal generator (pix_en every second clock and a
// small sweep of counters with its own active/sync pattern) and the row
// buffer (a random word array answering one clock after the address). Two
// instances are checked, 4 bits per pixel (palette) and 8 bits per pixel
// (RRRGGGBB direct). After every pixel strobe the outputs must show the
// pixel the counters addressed during that period, with the syncs of that
// period, and black outside the active area.
module tb_vga_pixel_gen;
  import vga_pkg::*;

  logic clk = 0, rst = 1;
  logic pix_en = 0, active = 0, hsync_n = 1, vsync_n = 1;
  logic [9:0] h_cnt = 0, v_cnt = 0;

  logic        rd_en4, rd_en8;
  logic [9:0]  rd_addr4, rd_addr8;
  logic [31:0] rd_data4, rd_data8;
  rgb332_t     rgb4, rgb8;
  logic        hs4, vs4, de4, hs8, vs8, de8;

  logic [31:0] mem [1024];

  int checks = 0, failures = 0;

  vga_pixel_gen #(.BPP_P(4)) dut4 (
    .clk, .rst, .pix_en, .h_cnt, .v_cnt, .active, .hsync_n, .vsync_n,
    .rd_en(rd_en4), .rd_addr(rd_addr4), .rd_data(rd_data4),
    .rgb(rgb4), .hsync_n_o(hs4), .vsync_n_o(vs4), .de_o(de4));

  vga_pixel_gen #(.BPP_P(8)) dut8 (
    .clk, .rst, .pix_en, .h_cnt, .v_cnt, .active, .hsync_n, .vsync_n,
    .rd_en(rd_en8), .rd_addr(rd_addr8), .rd_data(rd_data8),
    .rgb(rgb8), .hsync_n_o(hs8), .vsync_n_o(vs8), .de_o(de8));

  // Row-buffer model: synchronous read.
  always_ff @(posedge clk) begin
    if (rd_en4) rd_data4 <= mem[rd_addr4];
    if (rd_en8) rd_data8 <= mem[rd_addr8];
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected colour, computed from first principles.
  function automatic logic [7:0] exp4(input int h);
    logic [3:0] n;
    logic [2:0] r, g;
    logic [1:0] b;
    n = mem[h / 8][31 - (h % 8) * 4 -: 4];
    // IRGB: bright component 5, with intensity 7; intensity alone 2
    r = n[2] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0);
    g = n[1] ? (n[3] ? 3'd7 : 3'd5) : (n[3] ? 3'd2 : 3'd0);
    b = n[0] ? (n[3] ? 2'd3 : 2'd2) : (n[3] ? 2'd1 : 2'd0);
    return {r, g, b};
  endfunction

  function automatic logic [7:0] exp8(input int h);
    return mem[h / 4][31 - (h % 4) * 8 -: 8];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nonblack = 0;

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    repeat (3) @(negedge clk);
    rst = 0;
    // Sweep 700 pixels of 3 lines; line 2 is outside the active area.
    for (int v = 0; v < 3; v++) begin
      for (int h = 0; h < 700; h++) begin
        bit act, hs, vs;
        act = (h < 640) && (v < 2);
        hs  = !(h >= 650 && h < 680);
        vs  = (v != 2);
        // first clock of the pixel period
        h_cnt = 10'(h); v_cnt = 10'(v); active = act; hsync_n = hs; vsync_n = vs;
        pix_en = 0;
        @(negedge clk);
        pix_en = 1;
        @(negedge clk);
        pix_en = 0;
        check(rgb4 == rgb332_t'(act ? exp4(h) : 8'h00), "4-bit colour");
        check(rgb8 == rgb332_t'(act ? exp8(h) : 8'h00), "8-bit colour");
        check(hs4 == hs && vs4 == vs && de4 == act, "4-bit syncs");
        check(hs8 == hs && vs8 == vs && de8 == act, "8-bit syncs");
        if (act && rgb4 != '0) nonblack++;
      end
    end
    check(nonblack > 1000, "pixels shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
