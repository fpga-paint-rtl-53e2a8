// tb_intc: checks latching, masking, acknowledge and fixed priority.
//
// Directed sequences: each source alone, all three at once (served in the
// order PS/2, frame, row), masked sources (latched but no irq), master
// enable off, edge sensitivity (a held-high input latches once) and an
// edge arriving together with its acknowledge. Then a random phase pulses
// the inputs and compares ISR, IPR, IVR and irq with a reference model
// every clock.
module tb_intc;
  logic        clk = 0, rst = 1;
  logic [2:0]  src = 0;
  logic [2:0]  addr = 0;
  logic        wr = 0;
  logic [31:0] wdata = 0, rdata;
  logic        irq;

  int checks = 0, failures = 0;

  intc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wr = 1; wdata = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic read(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; wr = 0;
    #1 d = rdata;
  endtask

  task automatic pulse(input logic [2:0] s);
    @(negedge clk); src = s;
    @(negedge clk); src = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] m_isr, m_ier, m_src_q;
  logic       m_mer;

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    read(3'd0, d); check(d == 0, "ISR clear after reset");
    check(irq == 0, "no irq after reset");
    // disabled: latched but no irq
    pulse(3'b100);
    read(3'd0, d); check(d == 32'b100, "row source latched");
    check(irq == 0, "no irq while disabled");
    read(3'd4, d); check(d == 32'hFFFF_FFFF, "IVR none while disabled");
    write(3'd2, 32'b111);
    check(irq == 0, "no irq without master enable");
    write(3'd5, 32'd1);
    #1 check(irq == 1, "irq with master enable");
    read(3'd4, d); check(d == 2, "IVR row");
    write(3'd3, 32'b100);
    #1 check(irq == 0, "irq cleared by ack");
    // all three at once: priority 0, 1, 2
    pulse(3'b111);
    read(3'd1, d); check(d == 32'b111, "IPR all");
    for (int i = 0; i < 3; i++) begin
      read(3'd4, d); check(d == i, "IVR priority order");
      write(3'd3, 32'(1 << i));
    end
    #1 check(irq == 0, "all served");
    // frame and row together: frame first
    pulse(3'b110);
    read(3'd4, d); check(d == 1, "frame before row");
    write(3'd3, 32'b010);
    read(3'd4, d); check(d == 2, "then row");
    write(3'd3, 32'b100);
    // masked source
    write(3'd2, 32'b011);
    pulse(3'b100);
    #1 check(irq == 0, "row masked");
    read(3'd0, d); check(d == 32'b100, "masked source still latched");
    read(3'd1, d); check(d == 0, "IPR masked");
    write(3'd2, 32'b111);
    #1 check(irq == 1, "unmask raises irq");
    write(3'd3, 32'b100);
    // level held high latches once
    @(negedge clk); src = 3'b001;
    repeat (3) @(negedge clk);
    write(3'd3, 32'b001);
    read(3'd0, d); check(d == 0, "held level does not relatch");
    @(negedge clk); src = 0;
    // edge together with its ack: stays pending
    @(negedge clk); src = 3'b010; addr = 3'd3; wr = 1; wdata = 32'b010;
    @(negedge clk); src = 0; wr = 0;
    read(3'd0, d); check(d == 32'b010, "new edge wins over ack");
    write(3'd3, 32'b010);
    // register read-back
    read(3'd2, d); check(d == 32'b111, "IER read");
    read(3'd5, d); check(d == 32'b1, "MER read");

    // random phase against a model
    m_isr = 0; m_ier = 3'b111; m_mer = 1; m_src_q = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [2:0] s, ack, exp_ivr_bits;
      int exp_ivr;
      @(negedge clk);
      s = 3'($urandom) & 3'($urandom);
      ack = ($urandom % 3 == 0) ? 3'($urandom) : 3'b000;
      src = s;
      addr = (ack != 0) ? 3'd3 : 3'($urandom % 3);
      wr = (ack != 0);
      wdata = 32'(ack);
      @(posedge clk);
      m_isr = (m_isr & ~ack) | (s & ~m_src_q);
      m_src_q = s;
      @(negedge clk);
      wr = 0;
      addr = 3'd4;
      #1;
      exp_ivr_bits = m_isr & m_ier;
      exp_ivr = exp_ivr_bits[0] ? 0 : exp_ivr_bits[1] ? 1 : exp_ivr_bits[2] ? 2 : -1;
      check(rdata == 32'(exp_ivr), "random IVR");
      check(irq == (exp_ivr_bits != 0), "random irq");
      addr = 3'd0;
      #1 check(rdata == 32'(m_isr), "random ISR");
      src = 0;
      @(posedge clk);
      m_src_q = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
