// tile_sram: one on-chip frame SRAM (SRAM0 or SRAM1) of the accelerator.
//
// It holds one tile per bank, BANKS banks side by side, each word a 24-bit
// pixel (16-bit data, 8-bit Ref). All banks are read at the same address in
// the same cycle, so the four pipelines of the PE array each get one pixel
// of their own tile per clock. Writes also share one address, with one
// enable per bank. Read data is registered (one cycle of latency) and holds
// its value while no read is issued. A read and a write in the same cycle to
// the same address return the old word.
//
// That the accelerator has two SRAMs, between which data moves from pass to
// pass, is the document's; the banking per tile, the word format and the
// timing are this design's.
module tile_sram
  import morph_pkg::*;
#(
  parameter int unsigned BANKS = 4,
  parameter int unsigned DEPTH = 106 * 240,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output pix_t             rd_data [BANKS],
  input  logic [BANKS-1:0] wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  pix_t             wr_data [BANKS]
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    pix_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (rd_en)    rd_data[b]    <= mem[rd_addr];
      if (wr_en[b]) mem[wr_addr]  <= wr_data[b];
    end
  end
endmodule
