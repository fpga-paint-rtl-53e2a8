// intc: fixed-priority interrupt controller for the paint system.
//
// Three interrupt sources are connected, in falling priority: PS/2 mouse
// (source 0), VGA frame/vertical (source 1), VGA row/horizontal (source 2).
// A rising edge on a source input latches its bit in the status register
// ISR; the bit stays set until software acknowledges it by writing a 1 to
// that bit of IAR. The irq output to the processor is high while the
// master enable is set and any latched and enabled source is pending.
// IVR returns the number of the highest-priority (lowest-numbered) pending
// enabled source, or all ones when none is pending. An edge that arrives in
// the same clock as its acknowledge wins and stays pending.
//
// Register map (32-bit words, word index on addr; reads are combinational,
// writes take effect on the clock edge):
//   0 ISR  r   latched sources
//   1 IPR  r   ISR & IER
//   2 IER  rw  enable mask
//   3 IAR  w   write 1 to clear ISR bits
//   4 IVR  r   highest-priority pending source number
//   5 MER  rw  bit 0: master enable
//
// The three sources and their order of priority follow the design
// description; the register set, edge sensitivity and reset values (all
// disabled) are modelled on a common soft interrupt controller and are this
// design's choices.
module intc #(
  parameter int unsigned N_SRC = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_SRC-1:0] src,
  // register port
  input  logic [2:0]       addr,
  input  logic             wr,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  // to the processor
  output logic             irq
);

  typedef enum logic [2:0] {
    REG_ISR = 3'd0,
    REG_IPR = 3'd1,
    REG_IER = 3'd2,
    REG_IAR = 3'd3,
    REG_IVR = 3'd4,
    REG_MER = 3'd5
  } reg_e;

  logic [N_SRC-1:0] src_q, isr, ier, ipr, ack, edges;
  logic             mer;

  assign edges = src & ~src_q;
  assign ack   = (wr && addr == REG_IAR) ? wdata[N_SRC-1:0] : '0;
  assign ipr   = isr & ier;

  always_ff @(posedge clk) begin
    if (rst) begin
      src_q <= '0;
      isr   <= '0;
      ier   <= '0;
      mer   <= 1'b0;
    end else begin
      src_q <= src;
      isr   <= (isr & ~ack) | edges;
      if (wr && addr == REG_IER) ier <= wdata[N_SRC-1:0];
      if (wr && addr == REG_MER) mer <= wdata[0];
    end
  end

  // Priority encoder: lowest-numbered pending source wins.
  logic [31:0] ivr;
  always_comb begin
    ivr = '1;
    for (int i = N_SRC - 1; i >= 0; i--)
      if (ipr[i]) ivr = 32'(i);
  end

  always_comb begin
    unique case (reg_e'(addr))
      REG_ISR: rdata = 32'(isr);
      REG_IPR: rdata = 32'(ipr);
      REG_IER: rdata = 32'(ier);
      REG_IVR: rdata = ivr;
      REG_MER: rdata = {31'b0, mer};
      default: rdata = '0;
    endcase
  end

  assign irq = mer && (|ipr);

  assert property (@(posedge clk) disable iff (rst) irq |-> (ivr != '1));

endmodule
