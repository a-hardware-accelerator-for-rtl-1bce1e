// seg_accel: video segmentation accelerator, top level.
//
// Segmentation algorithms are split between a host computer (software) and
// this accelerator, which runs their morphological core: dilations, erosions
// and their conditional and masked forms, chained and iterated. A frame is
// held as ROWS overlapping tiles. Work proceeds in three steps:
//  1. load: the host streams tiles through the DMA engine into SRAM0;
//  2. process: the control unit runs its program; each pass streams every tile
//     through the programmable PE array (ROWS pipelines of N MacroPEs) from
//     one SRAM into the other (or back in place), as often as the program
//     says, possibly until the result stops changing;
//  3. write back: the host reads the results out of an SRAM by DMA.
// The host must not start a DMA transfer while busy is high; while the
// control unit runs it owns both SRAMs.
//
// Host interface (standing in for the system bus): program and configuration
// writes, start/busy/done, a DMA descriptor and two pixel streams with
// valid/ready. Pixels are pix_t words (16-bit data, 8-bit Ref).
//
// Timing: one pixel per clock per pipeline. A pass takes W*H + ROWS-independent
// latency of N*(W+3)+4 cycles, plus one fetch cycle and one closing cycle.
//
// The structure (host, DMA, control unit, SRAM0, SRAM1, PE array) follows the
// document's system diagram and its four rows of nine MacroPEs; the sizes W
// and H of a tile, the host interface and all encodings are this design's.
//
// rst_n is the flip-flops' asynchronous reset and also the disable condition
// of the assertion below; a linter may report the reset as used both
// synchronously and asynchronously. The assertion is checking code only,
// so the circuit is unaffected.
module seg_accel
  import morph_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned N          = 9,
  parameter int unsigned W          = 106,
  parameter int unsigned H          = 240,
  parameter int unsigned PROG_DEPTH = 32,
  localparam int unsigned NPIX      = W * H,
  localparam int unsigned AW        = $clog2(NPIX),
  localparam int unsigned LW        = $clog2(NPIX + 1),
  localparam int unsigned PW        = $clog2(PROG_DEPTH),
  localparam int unsigned CW        = $clog2(ROWS * N),
  localparam int unsigned BW        = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // programming and control
  input  logic          prog_we,
  input  logic [PW-1:0] prog_addr,
  input  instr_t        prog_wdata,
  input  logic          cfg_we,
  input  logic [1:0]    cfg_set,
  input  logic [CW-1:0] cfg_idx,
  input  mpe_cfg_t      cfg_wdata,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          last_change,
  output logic [15:0]   pass_count,
  // DMA
  input  logic          dma_start,
  input  logic          dma_dir,
  input  logic          dma_sram,
  input  logic [BW-1:0] dma_bank,
  input  logic [AW-1:0] dma_addr,
  input  logic [LW-1:0] dma_len,
  output logic          dma_busy,
  input  logic          h_in_valid,
  output logic          h_in_ready,
  input  pix_t          h_in_data,
  output logic          h_out_valid,
  input  logic          h_out_ready,
  output pix_t          h_out_data
);
  // ---------------- control unit ----------------
  mpe_cfg_t        arr_cfg [ROWS][N];
  logic            cascade, arr_change, src, dst, rd_en, rd_sof;
  logic [7:0]      th_a, th_b;
  logic [AW-1:0]   rd_addr, wr_addr;
  logic [ROWS-1:0] arr_we;
  logic            arr_sof;
  pix_t            arr_out [ROWS];

  control_unit #(.ROWS(ROWS), .N(N), .W(W), .H(H), .PROG_DEPTH(PROG_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_wdata, .cfg_we, .cfg_set, .cfg_idx, .cfg_wdata,
    .start, .busy, .done, .last_change, .pass_count,
    .arr_cfg, .cascade, .th_a, .th_b, .arr_change, .arr_we(|arr_we),
    .src, .dst, .rd_en, .rd_sof, .rd_addr, .wr_addr);

  // ---------------- DMA ----------------
  logic          m_sram, m_rd_en, m_wr_en;
  logic [BW-1:0] m_bank;
  logic [AW-1:0] m_addr;
  pix_t          m_wr_data, m_rd_data;

  dma_engine #(.BANKS(ROWS), .DEPTH(NPIX)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .sram(dma_sram), .bank(dma_bank),
    .addr(dma_addr), .len(dma_len), .busy(dma_busy),
    .h_in_valid, .h_in_ready, .h_in_data, .h_out_valid, .h_out_ready, .h_out_data,
    .m_sram, .m_bank, .m_rd_en, .m_wr_en, .m_addr, .m_wr_data, .m_rd_data);

  // ---------------- SRAM0 / SRAM1 ----------------
  logic            s_rd_en   [2];
  logic [AW-1:0]   s_rd_addr [2];
  pix_t            s_rd_data [2][ROWS];
  logic [ROWS-1:0] s_wr_en   [2];
  logic [AW-1:0]   s_wr_addr [2];
  pix_t            s_wr_data [2][ROWS];

  for (genvar s = 0; s < 2; s++) begin : g_sram
    always_comb begin
      if (busy) begin
        s_rd_en[s]   = rd_en && (src == 1'(s));
        s_rd_addr[s] = rd_addr;
        s_wr_en[s]   = (dst == 1'(s)) ? arr_we : '0;
        s_wr_addr[s] = wr_addr;
        s_wr_data[s] = arr_out;
      end else begin
        s_rd_en[s]   = m_rd_en && (m_sram == 1'(s));
        s_rd_addr[s] = m_addr;
        s_wr_en[s]   = (m_wr_en && m_sram == 1'(s)) ? (ROWS)'(1) << m_bank : '0;
        s_wr_addr[s] = m_addr;
        for (int k = 0; k < ROWS; k++) s_wr_data[s][k] = m_wr_data;
      end
    end
    tile_sram #(.BANKS(ROWS), .DEPTH(NPIX)) u_sram (
      .clk, .rd_en(s_rd_en[s]), .rd_addr(s_rd_addr[s]), .rd_data(s_rd_data[s]),
      .wr_en(s_wr_en[s]), .wr_addr(s_wr_addr[s]), .wr_data(s_wr_data[s]));
  end

  assign m_rd_data = s_rd_data[m_sram][m_bank];

  // ---------------- PE array ----------------
  // read requests are delayed by the SRAM's one-cycle read latency
  logic rd_en_q, rd_sof_q, src_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en_q  <= 1'b0;
      rd_sof_q <= 1'b0;
      src_q    <= 1'b0;
    end else begin
      rd_en_q  <= rd_en;
      rd_sof_q <= rd_sof;
      src_q    <= src;
    end
  end

  pe_array #(.ROWS(ROWS), .N(N), .W(W), .H(H)) u_array (
    .clk, .rst_n, .cfg(arr_cfg), .cascade,
    .in_valid(rd_en_q), .in_sof(rd_sof_q), .in_pix(s_rd_data[src_q]),
    .th_a, .th_b,
    .out_we(arr_we), .out_sof(arr_sof), .out_pix(arr_out), .change(arr_change));

  // the first pixel written by a pass is the first pixel of the tile
  a_sof_first: assert property (@(posedge clk) disable iff (!rst_n)
    (|arr_we) && wr_addr == '0 |-> arr_sof);
endmodule
