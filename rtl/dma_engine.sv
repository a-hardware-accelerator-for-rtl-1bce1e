// dma_engine: moves blocks of pixels between the host bus and one SRAM bank.
//
// A transfer is started with start and the descriptor (dir, sram, bank, addr,
// len); busy stays high until len words have moved. Host to SRAM (dir = 0):
// the engine accepts one word per clock from the host stream (valid/ready) and
// writes it to consecutive addresses. SRAM to host (dir = 1): the engine reads
// one word, offers it on the output stream until the host takes it (valid/
// ready), then reads the next, so one word moves every two clocks. A start
// while busy is ignored.
//
// The document uses DMA to load frames into an SRAM and return results to the
// host; the descriptor format and the streams standing in for the system bus
// are this design's own.
//
// The pixel words themselves pass straight through: host input data drives
// the SRAM write data and the SRAM read data drives the host output. The
// engine's logic is the address counter, the length count and the
// handshakes.
//
// rst_n is the flip-flops' asynchronous reset and also the disable condition
// of the assertion below; a linter may report the reset as used both
// synchronously and asynchronously. The assertion is checking code only,
// so the circuit is unaffected.
module dma_engine
  import morph_pkg::*;
#(
  parameter int unsigned BANKS = 4,
  parameter int unsigned DEPTH = 106 * 240,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned LW   = $clog2(DEPTH + 1),
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // descriptor
  input  logic          start,
  input  logic          dir,     // 0: host -> SRAM, 1: SRAM -> host
  input  logic          sram,
  input  logic [BW-1:0] bank,
  input  logic [AW-1:0] addr,
  input  logic [LW-1:0] len,
  output logic          busy,
  // host side
  input  logic          h_in_valid,
  output logic          h_in_ready,
  input  pix_t          h_in_data,
  output logic          h_out_valid,
  input  logic          h_out_ready,
  output pix_t          h_out_data,
  // SRAM side
  output logic          m_sram,
  output logic [BW-1:0] m_bank,
  output logic          m_rd_en,
  output logic          m_wr_en,
  output logic [AW-1:0] m_addr,
  output pix_t          m_wr_data,
  input  pix_t          m_rd_data
);
  typedef enum logic [1:0] {D_IDLE, D_WRITE, D_READ, D_OFFER} dstate_e;
  dstate_e       st;
  logic [AW-1:0] a;
  logic [LW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= D_IDLE;
      a      <= '0;
      left   <= '0;
      m_sram <= 1'b0;
      m_bank <= '0;
    end else begin
      case (st)
        D_IDLE:
          if (start && len != '0) begin
            st     <= dir ? D_READ : D_WRITE;
            a      <= addr;
            left   <= len;
            m_sram <= sram;
            m_bank <= bank;
          end
        D_WRITE:
          if (h_in_valid) begin
            a    <= a + 1'b1;
            left <= left - 1'b1;
            if (left == LW'(1)) st <= D_IDLE;
          end
        D_READ:
          st <= D_OFFER;
        D_OFFER:
          if (h_out_ready) begin
            a    <= a + 1'b1;
            left <= left - 1'b1;
            st   <= (left == LW'(1)) ? D_IDLE : D_READ;
          end
        default: st <= D_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = st != D_IDLE;
    h_in_ready  = st == D_WRITE;
    m_wr_en     = (st == D_WRITE) && h_in_valid;
    m_wr_data   = h_in_data;
    m_rd_en     = st == D_READ;
    m_addr      = a;
    h_out_valid = st == D_OFFER;
    h_out_data  = m_rd_data;
  end

  // host stream rule: data offered to the host stays put until taken
  a_offer_stable: assert property (@(posedge clk) disable iff (!rst_n)
    h_out_valid && !h_out_ready |=> h_out_valid && $stable(h_out_data));
endmodule
