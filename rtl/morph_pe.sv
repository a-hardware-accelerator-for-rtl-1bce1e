// morph_pe: one programmable morphology PE made of two 8-bit sub-PEs.
//
// The PE takes a raster-scan stream of 16-bit data words plus an 8-bit Ref
// (reference) byte, one pixel per clock, and applies a 3x3 neighbourhood
// operation. Each 8-bit sub-PE (MSB half, LSB half of the data word) runs its
// own operation: no operation, dilation (max), erosion (min), conditional
// dilation min(dilation, Ref), conditional erosion max(erosion, Ref), masked
// dilation and masked erosion (applied only where Mask is high, the centre
// pixel passes elsewhere). With cfg.mode16 the two sub-PEs are joined: every
// comparison uses the MSB sub-PE's byte result and falls back to the LSB
// sub-PE's on equality, so the pair acts as one 16-bit unit running op_hi.
// The structuring element is the 3x3 square (8-connected) or the cross
// (4-connected). Mask comes from mask_gen on the delayed Ref and Th_a/Th_b.
//
// Window: the input goes through two registers and a (W-2)-word delay line per
// image row, twice, giving the taps of three rows; the centre is the input
// delayed by W+1. The valid/start-of-frame flags and Ref travel through a
// (W+1)-word delay line so they stay aligned with the centre. Row and column
// counters on the centre stream replace neighbours outside the H x W tile by
// the identity of the operation (0 for max, all ones for min), so no pixel of
// one line or frame leaks into another and frames may follow back to back.
//
// Change is a sticky flag: high once any output pixel of the current frame
// differs from its input centre pixel, cleared at the next start of frame.
// It lets the control unit iterate an operation "until no change occurs".
//
// After reset the PE ignores the delay lines' contents until they have been
// filled once (W+1 cycles), so no stale word is taken for a valid pixel.
//
// Timing: every output is registered; out_* is the input W+2 cycles earlier.
// The window moves every cycle, so a frame must be streamed without gaps, and
// W+2 idle cycles after the last frame flush it out.
//
// From the document: the two 8-bit sub-PEs and 16-bit mode, the seven
// operations, both structuring elements, MAX/MIN units, decision logic, mask
// generator, Change output, line delays in internal memory. This design's own:
// the boundary handling, the Ref format of conditional operations in 16-bit
// mode (Ref zero-extended), the mask rule (see mask_gen) and the comparator
// arrangement (a chain over the neighbourhood rather than the document's
// partial-result-reuse comparator sharing, which is not described).
module morph_pe
  import morph_pkg::*;
#(
  parameter int unsigned W = 106,  // tile width in pixels (line delay length)
  parameter int unsigned H = 240   // tile height in lines
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pe_cfg_t     cfg,
  input  logic        in_valid,
  input  logic        in_sof,
  input  logic [15:0] in_data,
  input  logic [7:0]  in_ref,
  input  logic [7:0]  th_a,
  input  logic [7:0]  th_b,
  output logic        out_valid,
  output logic        out_sof,
  output logic [15:0] out_data,
  output logic [7:0]  out_ref,
  output logic        out_mask,
  output logic        change
);
  localparam int unsigned CW = $clog2(W);
  localparam int unsigned RW = $clog2(H);

  // ---------------- window generator ----------------
  // taps[dy][dx]: dy = 0 row above, 1 centre row, 2 row below;
  //               dx = 0 left, 1 centre, 2 right.
  logic [15:0] d1, d2, d3, d4, d5, d6, l1, l2;
  logic [15:0] taps [3][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {d1, d2, d3, d4, d5, d6} <= '0;
    end else begin
      d1 <= in_data; d2 <= d1;
      d3 <= l1;      d4 <= d3;
      d5 <= l2;      d6 <= d5;
    end
  end

  delay_line #(.WIDTH(16), .DEPTH(W - 2)) u_line1 (
    .clk, .rst_n, .en(1'b1), .din(d2), .dout(l1));
  delay_line #(.WIDTH(16), .DEPTH(W - 2)) u_line2 (
    .clk, .rst_n, .en(1'b1), .din(d4), .dout(l2));

  always_comb begin
    taps[2][2] = in_data; taps[2][1] = d1; taps[2][0] = d2;
    taps[1][2] = l1;      taps[1][1] = d3; taps[1][0] = d4;
    taps[0][2] = l2;      taps[0][1] = d5; taps[0][0] = d6;
  end

  // Flags and Ref aligned with the centre (delay W+1, the W+1 box of the PE).
  // The delay memory is not reset, so its flags count only once it has been
  // filled after reset ('primed').
  logic       d_valid, d_sof, c_valid, c_sof, primed;
  logic [7:0] c_ref;
  logic [CW:0] fill;
  delay_line #(.WIDTH(10), .DEPTH(W + 1)) u_ref_delay (
    .clk, .rst_n, .en(1'b1),
    .din({in_valid, in_valid & in_sof, in_ref}),
    .dout({d_valid, d_sof, c_ref}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       fill <= '0;
    else if (!primed) fill <= fill + 1'b1;
  end
  assign primed  = fill == (CW+1)'(W + 1);
  assign c_valid = d_valid && primed;
  assign c_sof   = d_sof && primed;

  // ---------------- position of the centre pixel ----------------
  logic [CW-1:0] nxt_col, cur_col;
  logic [RW-1:0] nxt_row, cur_row;

  always_comb begin
    cur_col = c_sof ? '0 : nxt_col;
    cur_row = c_sof ? '0 : nxt_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_col <= '0;
      nxt_row <= '0;
    end else if (c_valid) begin
      if (cur_col == CW'(W - 1)) begin
        nxt_col <= '0;
        nxt_row <= (cur_row == RW'(H - 1)) ? '0 : cur_row + 1'b1;
      end else begin
        nxt_col <= cur_col + 1'b1;
        nxt_row <= cur_row;
      end
    end
  end

  logic nb_ok [3][3];
  always_comb begin
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++)
        nb_ok[dy][dx] = !((dy == 0 && cur_row == '0) ||
                          (dy == 2 && cur_row == RW'(H - 1)) ||
                          (dx == 0 && cur_col == '0) ||
                          (dx == 2 && cur_col == CW'(W - 1)));
  end

  // ---------------- mask generator ----------------
  logic mask;
  mask_gen u_mask (.ref_px(c_ref), .th_a, .th_b, .mask);

  // ---------------- MAX/MIN units ----------------
  // One comparison of the joined sub-PEs: each sub-PE compares its byte
  // (greater, equal); in 16-bit mode the MSB decision is refined by the LSB one.
  // Returns a word whose two bytes are each the larger (take_max) or smaller
  // of a and b, per lane or as one 16-bit value.
  function automatic logic [15:0] pick(input logic [15:0] a, input logic [15:0] b,
                                       input logic m16, input logic max_hi,
                                       input logic max_lo);
    logic gt_hi, eq_hi, gt_lo, a_hi, a_lo;
    gt_hi = a[15:8] > b[15:8];
    eq_hi = a[15:8] == b[15:8];
    gt_lo = a[7:0] > b[7:0];
    if (m16) begin
      a_hi = (gt_hi || (eq_hi && gt_lo)) == max_hi;
      a_lo = a_hi;
    end else begin
      a_hi = gt_hi == max_hi;
      a_lo = gt_lo == max_lo;
    end
    return {a_hi ? a[15:8] : b[15:8], a_lo ? a[7:0] : b[7:0]};
  endfunction

  logic [15:0] centre, vmax, vmin, rref, cdil, cero, res;
  logic        sq_hi, sq_lo, in_hi, in_lo;
  morph_op_e   op_hi, op_lo;

  always_comb begin
    op_hi  = cfg.activated ? cfg.op_hi : OP_NOP;
    op_lo  = cfg.activated ? (cfg.mode16 ? cfg.op_hi : cfg.op_lo) : OP_NOP;
    sq_hi  = cfg.se_hi == SE_SQUARE;
    sq_lo  = cfg.mode16 ? sq_hi : (cfg.se_lo == SE_SQUARE);
    centre = taps[1][1];
    vmax   = centre;
    vmin   = centre;
    for (int dy = 0; dy < 3; dy++) begin
      for (int dx = 0; dx < 3; dx++) begin
        if (!(dy == 1 && dx == 1)) begin
          // a neighbour outside the element or the tile is replaced by
          // the identity of max (0) or min (all ones), per lane
          in_hi = nb_ok[dy][dx] && (sq_hi || dy == 1 || dx == 1);
          in_lo = nb_ok[dy][dx] && (sq_lo || dy == 1 || dx == 1);
          vmax = pick(vmax, {in_hi ? taps[dy][dx][15:8] : 8'h00,
                             in_lo ? taps[dy][dx][7:0]  : 8'h00},
                      cfg.mode16, 1'b1, 1'b1);
          vmin = pick(vmin, {in_hi ? taps[dy][dx][15:8] : 8'hFF,
                             in_lo ? taps[dy][dx][7:0]  : 8'hFF},
                      cfg.mode16, 1'b0, 1'b0);
        end
      end
    end
    // second MAX/MIN stage: conditional operations against Ref
    rref = cfg.mode16 ? {8'h00, c_ref} : {c_ref, c_ref};
    cdil = pick(vmax, rref, cfg.mode16, 1'b0, 1'b0);
    cero = pick(vmin, rref, cfg.mode16, 1'b1, 1'b1);
  end

  // ---------------- decision logic ----------------
  function automatic logic [7:0] decide(input morph_op_e op, input logic [7:0] c,
                                        input logic [7:0] mx, input logic [7:0] mn,
                                        input logic [7:0] cd, input logic [7:0] ce,
                                        input logic m);
    case (op)
      OP_DIL:  return mx;
      OP_ERO:  return mn;
      OP_CDIL: return cd;
      OP_CERO: return ce;
      OP_MDIL: return m ? mx : c;
      OP_MERO: return m ? mn : c;
      default: return c;
    endcase
  endfunction

  always_comb begin
    res[15:8] = decide(op_hi, centre[15:8], vmax[15:8], vmin[15:8], cdil[15:8], cero[15:8], mask);
    res[7:0]  = decide(op_lo, centre[7:0],  vmax[7:0],  vmin[7:0],  cdil[7:0],  cero[7:0],  mask);
  end

  // ---------------- output registers and change flag ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
      out_ref   <= '0;
      out_mask  <= 1'b0;
      change    <= 1'b0;
    end else begin
      out_valid <= c_valid;
      out_sof   <= c_sof;
      out_data  <= res;
      out_ref   <= c_ref;
      out_mask  <= mask;
      if (c_valid) change <= (c_sof ? 1'b0 : change) | (res != centre);
    end
  end

  initial assert (W >= 4 && H >= 2) else $error("morph_pe: tile must be at least 4 x 2");
endmodule
