// pe_array: the programmable PE array, ROWS pipelined PE arrays in parallel.
//
// A frame is cut into ROWS overlapping tiles, each held in its own SRAM bank;
// pipeline k processes tile k, so ROWS pixels are processed per clock. An
// input buffer registers the words read from the SRAM banks, and an input
// multiplexer in front of each pipeline chooses its source: its own tile, or
// (cascade mode) the output of the pipeline above it, which chains all rows
// into one pipeline of ROWS*N MacroPEs working on the tile of bank 0 (the
// thresholds then also continue from row to row). An
// output multiplexer and output buffer return the results towards the SRAM:
// bank k receives pipeline k, except in cascade mode, where bank 0 receives
// the last pipeline and the other banks are not written.
//
// Ports: cfg is indexed [row][stage]; the input flags and thresholds are
// common to all rows. out_we[k] is the write enable of bank k.
// Latency: 1 (input buffer) + N*(W+3) (one row) + 1 (output buffer); in
// cascade mode ROWS*N*(W+3) + 2.
//
// The four rows of nine MacroPEs, the buffers and the 24-bit multiplexers at
// both ends are drawn in the document's array diagram; what the
// multiplexers select is this design's reading of it.
module pe_array
  import morph_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 106,
  parameter int unsigned H    = 240
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mpe_cfg_t        cfg [ROWS][N],
  input  logic            cascade,
  input  logic            in_valid,
  input  logic            in_sof,
  input  pix_t            in_pix [ROWS],
  input  logic [7:0]      th_a,
  input  logic [7:0]      th_b,
  output logic [ROWS-1:0] out_we,
  output logic            out_sof,
  output pix_t            out_pix [ROWS],
  output logic            change
);
  // input buffer
  logic ib_valid, ib_sof;
  pix_t ib_pix [ROWS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib_valid <= 1'b0;
      ib_sof   <= 1'b0;
      for (int k = 0; k < ROWS; k++) ib_pix[k] <= '0;
    end else begin
      ib_valid <= in_valid;
      ib_sof   <= in_sof;
      for (int k = 0; k < ROWS; k++) ib_pix[k] <= in_pix[k];
    end
  end

  logic            rv [ROWS];
  logic [7:0]      rta [ROWS];
  logic [7:0]      rtb [ROWS];
  logic            rs [ROWS];
  pix_t            rp [ROWS];
  logic [ROWS-1:0] rch;

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    logic       mv, ms;
    pix_t       mp;
    logic [7:0] mta, mtb;
    // input multiplexer
    if (k == 0) begin : g_first
      assign mv = ib_valid;
      assign ms = ib_sof;
      assign mp = ib_pix[0];
      assign mta = th_a;
      assign mtb = th_b;
    end else begin : g_next
      assign mv = cascade ? rv[k-1] : ib_valid;
      assign ms = cascade ? rs[k-1] : ib_sof;
      assign mp = cascade ? rp[k-1] : ib_pix[k];
      assign mta = cascade ? rta[k-1] : th_a;
      assign mtb = cascade ? rtb[k-1] : th_b;
    end
    pe_pipeline #(.N(N), .W(W), .H(H)) u_pipe (
      .clk, .rst_n, .cfg(cfg[k]),
      .in_valid(mv), .in_sof(ms), .in_pix(mp), .th_a(mta), .th_b(mtb),
      .out_valid(rv[k]), .out_sof(rs[k]), .out_pix(rp[k]),
      .out_th_a(rta[k]), .out_th_b(rtb[k]), .change(rch[k]));
  end

  // output multiplexer and output buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_we  <= '0;
      out_sof <= 1'b0;
      for (int k = 0; k < ROWS; k++) out_pix[k] <= '0;
    end else begin
      for (int k = 0; k < ROWS; k++) begin
        if (cascade) begin
          out_we[k]  <= (k == 0) && rv[ROWS-1];
          out_pix[k] <= (k == 0) ? rp[ROWS-1] : '0;
        end else begin
          out_we[k]  <= rv[k];
          out_pix[k] <= rp[k];
        end
      end
      out_sof <= cascade ? rs[ROWS-1] : rs[0];
    end
  end

  assign change = |rch;
endmodule
