// pe_pipeline: one pipelined PE array, a chain of N MacroPEs (one row of the
// PE array).
//
// A tile streams in raster order, one pixel per clock, and leaves after
// N*(W+3) cycles having passed through N programmable operations, one per
// MacroPE, each configured by its own entry of cfg. The threshold pair enters
// at the first MacroPE and is passed (or incremented) from unit to unit.
// The thresholds leaving the last MacroPE are brought out so that a following
// pipeline can continue the sequence. change is the OR of the MacroPEs' change flags: high when some MacroPE
// altered some pixel of the last frame.
//
// Nine MacroPEs per row follows the document's array (36 MacroPEs in four
// rows); the latency figure follows from the blocks below.
module pe_pipeline
  import morph_pkg::*;
#(
  parameter int unsigned N = 9,
  parameter int unsigned W = 106,
  parameter int unsigned H = 240
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mpe_cfg_t    cfg [N],
  input  logic        in_valid,
  input  logic        in_sof,
  input  pix_t        in_pix,
  input  logic [7:0]  th_a,
  input  logic [7:0]  th_b,
  output logic        out_valid,
  output logic        out_sof,
  output pix_t        out_pix,
  output logic [7:0]  out_th_a,
  output logic [7:0]  out_th_b,
  output logic        change
);
  logic       v  [N+1];
  logic       sf [N+1];
  pix_t       p  [N+1];
  logic [7:0] ta [N+1];
  logic [7:0] tb [N+1];
  logic [N-1:0] ch;

  assign v[0]  = in_valid;
  assign sf[0]  = in_sof;
  assign p[0]  = in_pix;
  assign ta[0] = th_a;
  assign tb[0] = th_b;

  for (genvar i = 0; i < N; i++) begin : g_stage
    macro_pe #(.W(W), .H(H)) u_mpe (
      .clk, .rst_n, .cfg(cfg[i]),
      .in_valid(v[i]), .in_sof(sf[i]), .in_pix(p[i]), .in_th_a(ta[i]), .in_th_b(tb[i]),
      .out_valid(v[i+1]), .out_sof(sf[i+1]), .out_pix(p[i+1]),
      .out_th_a(ta[i+1]), .out_th_b(tb[i+1]), .change(ch[i]));
  end

  assign out_valid = v[N];
  assign out_sof   = sf[N];
  assign out_pix   = p[N];
  assign out_th_a  = ta[N];
  assign out_th_b  = tb[N];
  assign change    = |ch;
endmodule
