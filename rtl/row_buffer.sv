// row_buffer: dual-port block RAM used as the one-row video line buffer.
//
// The full 640x480 picture lives in external SDRAM; this on-chip memory only
// needs to hold the row being displayed. Port A faces the processor bus (it
// is what the bus's BRAM controller drives): 32-bit words, four byte write
// enables, synchronous read returning the old contents (read-first). DMA
// writes the next row through it during horizontal blanking. Port B is the
// video side, read-only, used by the pixel generator; its data appears one
// clock after the address. Both ports are on the same clock.
//
// The default of 1024 words (32 Kbit) is how this design reads the buffer
// size "32K"; a 4-bit row of 640 pixels uses the first 80 words, an 8-bit
// row the first 160. The byte-lane layout (lane 3 = bits 31:24) and the
// read-first behaviour are this design's choices.
module row_buffer #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned LANES = DATA_W / 8
) (
  input  logic              clk,
  // port A: bus side
  input  logic              a_en,
  input  logic [LANES-1:0]  a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B: video side
  input  logic              b_en,
  input  logic [ADDR_W-1:0] b_addr,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < int'(LANES); i++)
        if (a_we[i]) mem[a_addr][i*8 +: 8] <= a_wdata[i*8 +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
