// macro_pe: one MacroPE, a morphology PE followed by its programmable
// interconnection unit.
//
// The stream (valid, start of frame, 16-bit data, 8-bit Ref) enters the PE;
// the PE result, the centre-aligned Ref and the PE's Mask go to the
// interconnection unit, which forms what the next MacroPE receives. The two
// thresholds enter both the PE's mask generator and the interconnection unit
// (which may pass them on incremented). A frame-wide threshold is constant
// during a pass, so it needs no alignment with the pixel stream.
//
// Latency: W+2 cycles in the PE plus 1 in the interconnection unit, W+3 in all.
// The pairing of PE and interconnection unit as one MacroPE is the document's.
module macro_pe
  import morph_pkg::*;
#(
  parameter int unsigned W = 106,
  parameter int unsigned H = 240
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mpe_cfg_t    cfg,
  input  logic        in_valid,
  input  logic        in_sof,
  input  pix_t        in_pix,
  input  logic [7:0]  in_th_a,
  input  logic [7:0]  in_th_b,
  output logic        out_valid,
  output logic        out_sof,
  output pix_t        out_pix,
  output logic [7:0]  out_th_a,
  output logic [7:0]  out_th_b,
  output logic        change
);
  logic        pe_valid, pe_sof, pe_mask;
  logic [15:0] pe_data;
  logic [7:0]  pe_ref;

  morph_pe #(.W(W), .H(H)) u_pe (
    .clk, .rst_n, .cfg(cfg.pe),
    .in_valid, .in_sof, .in_data(in_pix.data), .in_ref(in_pix.ref_px),
    .th_a(in_th_a), .th_b(in_th_b),
    .out_valid(pe_valid), .out_sof(pe_sof), .out_data(pe_data), .out_ref(pe_ref),
    .out_mask(pe_mask), .change);

  interconnect_unit u_ic (
    .clk, .rst_n, .cfg(cfg.ic),
    .in_valid(pe_valid), .in_sof(pe_sof), .in_data(pe_data), .in_ref(pe_ref),
    .in_mask(pe_mask), .in_th_a, .in_th_b,
    .out_valid, .out_sof, .out_data(out_pix.data), .out_ref(out_pix.ref_px),
    .out_th_a, .out_th_b);
endmodule
