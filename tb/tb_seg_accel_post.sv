// tb_seg_accel_post: the two binary post-processing workloads of the
// segmentation flow, run end to end through the accelerator (host DMA,
// configuration, program, passes, DMA back).
//
// 1. Small-region elimination, Eq. (3):
//      ((I (+) B_n) (-) B3 ; I) ... (-) B3 ; I      (l conditional erosions)
//    with B_n as (n-1)/2 steps of the 3x3 square and l = (n-1)/2 + 1.
//    The four rows run it in parallel mode on four copies of a tile, each
//    row with its own n = 3, 5, 7, 9 (row 3 uses all nine MacroPEs). The
//    tile is a rectangle with square holes of side 1..6: a hole is filled
//    exactly when its side is at most n-1, and every other pixel is kept.
// 2. Edge fitting, Eq. (6), with n = 5 and l = 2:
//      CDM (+) B5, 2 x conditional erosion with Edge, (-) B5,
//      2 x conditional dilation with NOT Edge, then closing (+) B3 (-) B3:
//    ten MacroPEs, so the pass runs in cascade mode across rows 0 and 1.
//    The pixel's data lane carries CDM and its Ref byte the edge map; the
//    interconnect of MacroPE 5 inverts Ref for the conditional dilations.
//
// Expected images come from a direct image-level implementation of the
// operations in this file (max/min over the in-tile part of the 3x3 square),
// not from the MacroPE reference model.
`timescale 1ns/1ps
module tb_seg_accel_post;
  import morph_pkg::*;
  localparam int ROWS = 4, N = 9, W = 40, H = 18;
  localparam int NPIX = W * H;
  `include "tb/morph_model.svh"
  `include "tb/accel_host.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we, cfg_we, start, busy, done, last_change;
  logic [4:0]  prog_addr;
  instr_t      prog_wdata;
  logic [1:0]  cfg_set;
  logic [5:0]  cfg_idx;
  mpe_cfg_t    cfg_wdata;
  logic [15:0] pass_count;
  logic        dma_start, dma_dir, dma_sram, dma_busy;
  logic [1:0]  dma_bank;
  logic [9:0]  dma_addr;
  logic [9:0]  dma_len;
  logic        h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  pix_t        h_in_data, h_out_data;

  seg_accel #(.ROWS(ROWS), .N(N), .W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0, out_stalls = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef int img_t[NPIX];

  // 3x3 square dilation (max) or erosion (min) over the in-tile neighbours.
  function automatic img_t nb(img_t a, bit is_max);
    img_t r;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v = a[y * W + x];
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (x + dx >= 0 && x + dx < W && y + dy >= 0 && y + dy < H) begin
              int q = a[(y + dy) * W + x + dx];
              if (is_max ? q > v : q < v) v = q;
            end
        r[y * W + x] = v;
      end
    return r;
  endfunction

  function automatic img_t cond(img_t a, img_t rf, bit is_dil);
    img_t r = nb(a, is_dil);
    foreach (r[i]) r[i] = is_dil ? ((r[i] < rf[i]) ? r[i] : rf[i])   // min with Ref
                                 : ((r[i] > rf[i]) ? r[i] : rf[i]);  // max with Ref
    return r;
  endfunction

  function automatic mpe_cfg_t lo_op(morph_op_e op, rsel_e rs = RSEL_REF);
    return '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_NOP, se_hi: SE_SQUARE,
                   op_lo: op, se_lo: SE_SQUARE},
             ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                   rsel: rs, inc_a: 1'b0, inc_b: 1'b0}};
  endfunction

  localparam mpe_cfg_t IDLE = '{pe: '{activated: 1'b0, mode16: 1'b0, op_hi: OP_NOP,
                                      se_hi: SE_SQUARE, op_lo: OP_NOP, se_lo: SE_SQUARE},
                                ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME,
                                      sub: 1'b0, rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};

  initial begin
    instr_t   p [$];
    pix_t     img[], got[];
    mpe_cfg_t cs[];
    img_t     src, exp_i, cdm, edg, nedg;
    int       hole_x [6], filled, kept, changed;
    prog_we = 0; cfg_we = 0; start = 0; prog_addr = 0; prog_wdata = '0; cfg_set = 0;
    cfg_idx = 0; cfg_wdata = '0; dma_start = 0; dma_dir = 0; dma_sram = 0; dma_bank = 0;
    dma_addr = 0; dma_len = 0; h_in_valid = 0; h_in_data = '0; h_out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- Eq. (3): small-region elimination ----------------
    // object: columns 5..32, rows 5..12; hole of side s at rows 6..5+s
    foreach (src[i]) src[i] = 0;
    for (int y = 5; y <= 12; y++)
      for (int x = 5; x <= 32; x++) src[y * W + x] = 255;
    begin
      int x0 = 6;
      for (int s = 1; s <= 6; s++) begin
        hole_x[s-1] = x0;
        for (int y = 6; y < 6 + s; y++)
          for (int x = x0; x < x0 + s; x++) src[y * W + x] = 0;
        x0 += s + 1;
      end
    end
    img = new[NPIX];
    foreach (img[i]) img[i] = '{data: {8'h00, 8'(src[i])}, ref_px: 8'(src[i])};
    for (int k = 0; k < ROWS; k++) host_dma_write(0, k, img);

    cs = new[ROWS * N];
    for (int r = 0; r < ROWS; r++) begin
      automatic int rad = r + 1;  // n = 2*rad + 1
      for (int st = 0; st < N; st++)
        cs[r * N + st] = (st < rad) ? lo_op(OP_DIL) : (st < 2 * rad + 1) ? lo_op(OP_CERO) : IDLE;
    end
    host_cfg(0, cs);
    p = '{mk_ins(I_PASS, 0, 0, 0), mk_ins(I_HALT)};
    host_program(p);
    host_run();
    check(pass_count == 16'd1, "eq3 pass count");

    filled = 0; kept = 0;
    for (int r = 0; r < ROWS; r++) begin
      automatic int rad = r + 1, n = 2 * rad + 1;
      automatic img_t ref_img;
      // image-level reference
      exp_i = src;
      for (int i = 0; i < rad; i++) exp_i = nb(exp_i, 1);
      for (int i = 0; i <= rad; i++) exp_i = cond(exp_i, src, 0);
      // by construction: holes of side <= n-1 filled, the rest unchanged
      ref_img = src;
      for (int s = 1; s <= 6; s++)
        if (s <= n - 1) begin
          for (int y = 6; y < 6 + s; y++)
            for (int x = hole_x[s-1]; x < hole_x[s-1] + s; x++) ref_img[y * W + x] = 255;
        end
      for (int s = 1; s <= 6; s++)
        if (s <= n - 1) filled++; else kept++;
      check(exp_i == ref_img, $sformatf("eq3 reference agrees with hole rule, n=%0d", n));
      host_dma_read(1, r, got, r == 2);
      for (int i = 0; i < NPIX; i++) begin
        automatic pix_t e = '{data: {8'h00, 8'(exp_i[i])}, ref_px: 8'(src[i])};
        checks++;
        if (got[i] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL eq3 n=%0d px (%0d,%0d): got %h exp %h",
                                      n, i % W, i / W, got[i], e);
        end
      end
    end

    // ---------------- Eq. (6): edge fitting ----------------
    // CDM: a coarse change mask; Edge: a 1-pixel outline of the true object
    foreach (cdm[i]) begin
      automatic int x = i % W, y = i / W;
      cdm[i]  = (x >= 12 && x <= 27 && y >= 5 && y <= 12) ? 255 : 0;
      if (x == 20 && y == 13) cdm[i] = 255;            // blob on the mask border
      if (x >= 15 && x <= 16 && y >= 8 && y <= 9) cdm[i] = 0;  // hole in the mask
      edg[i] = (((x == 9 || x == 30) && y >= 3 && y <= 14) ||
                 ((y == 3 || y == 14) && x >= 9 && x <= 30)) ? 255 : 0;
      nedg[i] = 255 - edg[i];
    end
    foreach (img[i]) img[i] = '{data: {8'h00, 8'(cdm[i])}, ref_px: 8'(edg[i])};
    host_dma_write(0, 0, img);

    foreach (cs[k]) cs[k] = IDLE;
    cs[0] = lo_op(OP_DIL);  cs[1] = lo_op(OP_DIL);              // (+) B5
    cs[2] = lo_op(OP_CERO); cs[3] = lo_op(OP_CERO);             // l x (-) B3 ; Edge
    cs[4] = lo_op(OP_ERO);  cs[5] = lo_op(OP_ERO, RSEL_NOT);    // (-) B5, Ref := NOT Edge
    cs[6] = lo_op(OP_CDIL); cs[7] = lo_op(OP_CDIL);             // l x (+) B3 ; NOT Edge
    cs[8] = lo_op(OP_DIL);  cs[9] = lo_op(OP_ERO);              // closing
    host_cfg(2, cs);
    p = '{mk_ins(I_PASS, 0, 1, 2), mk_ins(I_HALT)};
    host_program(p);
    host_run();
    check(pass_count == 16'd1, "eq6 pass count");

    exp_i = nb(nb(cdm, 1), 1);
    exp_i = cond(cond(exp_i, edg, 0), edg, 0);
    exp_i = nb(nb(exp_i, 0), 0);
    exp_i = cond(cond(exp_i, nedg, 1), nedg, 1);
    exp_i = nb(nb(exp_i, 1), 0);
    changed = 0;
    foreach (exp_i[i]) if (exp_i[i] != cdm[i]) changed++;
    // the fitted mask must differ from the coarse one
    check(changed > 20, $sformatf("eq6 changes the mask (%0d px)", changed));
    host_dma_read(1, 0, got, 0);
    for (int i = 0; i < NPIX; i++) begin
      automatic pix_t e = '{data: {8'h00, 8'(exp_i[i])}, ref_px: 8'(nedg[i])};
      checks++;
      if (got[i] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL eq6 px (%0d,%0d): got %h exp %h",
                                    i % W, i / W, got[i], e);
      end
    end

    check(filled == 18 && kept == 6, "eq3 hole mix");
    $display("COUNT holes_filled=%0d holes_kept=%0d eq6_changed=%0d out_stalls=%0d",
             filled, kept, changed, out_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
