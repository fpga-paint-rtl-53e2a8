// tb_row_buffer: checks the dual-port line buffer against a reference array.
//
// Random byte-masked writes and reads on the bus port interleave with reads
// on the video port for a few thousand clocks, including reads of an
// address being written in the same clock (the bus port returns the old
// word, the video port too). Every read result is compared with a model
// array kept by the testbench, one clock after the address.
module tb_row_buffer;
  logic        clk = 0;
  logic        a_en = 0, b_en = 0;
  logic [3:0]  a_we = 0;
  logic [9:0]  a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;

  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  row_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill both the memory and the model through the bus port.
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = 10'(i); a_wdata = $urandom;
      model[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] exp_a, exp_b;
      bit rd_a, rd_b;
      @(negedge clk);
      a_en   = ($urandom % 4) != 0;
      a_we   = ($urandom % 2) ? 4'($urandom) : 4'h0;
      a_addr = 10'($urandom % 128);
      a_wdata = $urandom;
      b_en   = ($urandom % 3) != 0;
      b_addr = ($urandom % 4 == 0) ? a_addr : 10'($urandom % 128);
      rd_a = a_en; rd_b = b_en;
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      if (a_en)
        for (int l = 0; l < 4; l++)
          if (a_we[l]) model[a_addr][l*8 +: 8] = a_wdata[l*8 +: 8];
      @(posedge clk);
      #1;
      if (rd_a) check(a_rdata == exp_a, "bus port read");
      if (rd_b) check(b_rdata == exp_b, "video port read");
    end
    // Read everything back on the video port.
    a_en = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      b_en = 1; b_addr = 10'(i);
      @(posedge clk);
      #1 check(b_rdata == model[i], "final read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
