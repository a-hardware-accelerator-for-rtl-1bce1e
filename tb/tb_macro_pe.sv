// tb_macro_pe: one MacroPE computing the morphological gradient.
//
// The same 8-bit image is fed to both sub-PEs ({p, p}); the MSB sub-PE
// dilates, the LSB sub-PE erodes, and the interconnection unit subtracts
// them, GRA = dilation - erosion. The MSB half of the output carries GRA, the
// LSB half the thresholded Ref (255 where th_a <= Ref <= th_b), the Ref
// output carries GRA for the next MacroPE and th_a leaves incremented.
// A second run uses a 16-bit conditional erosion with the data passed
// unchanged. Results and the W+3 cycle latency are checked against a model.
`timescale 1ns/1ps
module tb_macro_pe;
  import morph_pkg::*;
  localparam int W = 6;
  localparam int H = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mpe_cfg_t   cfg;
  logic       in_valid, in_sof, out_valid, out_sof, change;
  pix_t       in_pix, out_pix;
  logic [7:0] in_th_a, in_th_b, out_th_a, out_th_b;

  macro_pe #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, t_in = 0, t_out = 0, nout = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int   img [H][W];
  int   rf  [H][W];
  pix_t got [H * W];

  always @(posedge clk) begin
    if (out_valid) begin
      if (out_sof) begin nout = 0; t_out = cycle; end
      if (nout < H * W) got[nout] = out_pix;
      nout++;
    end
  end

  function automatic int nb(int y, int x, bit is_max, bit is_cross);
    int r = img[y][x];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        if (y + dy < 0 || y + dy >= H || x + dx < 0 || x + dx >= W) continue;
        if (is_cross && dy != 0 && dx != 0) continue;
        if (is_max ? img[y+dy][x+dx] > r : img[y+dy][x+dx] < r) r = img[y+dy][x+dx];
      end
    return r;
  endfunction

  task automatic stream(bit wide);
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      if (i == 0) t_in = cycle;
      in_valid = 1; in_sof = (i == 0);
      in_pix.data   = wide ? 16'(img[i / W][i % W]) : {2{8'(img[i / W][i % W])}};
      in_pix.ref_px = 8'(rf[i / W][i % W]);
    end
    @(negedge clk);
    in_valid = 0; in_sof = 0;
    repeat (W + 5) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_sof = 0; in_pix = '0; in_th_a = 8'd60; in_th_b = 8'd180;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // gradient and threshold
    cfg = '0;
    cfg.pe = '{activated: 1'b1, mode16: 1'b0, op_hi: OP_DIL, se_hi: SE_SQUARE,
               op_lo: OP_ERO, se_lo: SE_SQUARE};
    cfg.ic = '{pass16: 1'b0, hsel: DSEL_ARITH, lsel: DSEL_THR, sub: 1'b1,
               rsel: RSEL_ARITH, inc_a: 1'b1, inc_b: 1'b0};
    foreach (img[y, x]) begin img[y][x] = $urandom_range(0, 255); rf[y][x] = $urandom_range(0, 255); end
    stream(0);
    for (int i = 0; i < W * H; i++) begin
      automatic int y = i / W, x = i % W;
      automatic int gra = nb(y, x, 1, 0) - nb(y, x, 0, 0);
      automatic int thr = (rf[y][x] >= 60 && rf[y][x] <= 180) ? 255 : 0;
      checks++;
      if (got[i].data !== {8'(gra), 8'(thr)} || got[i].ref_px !== 8'(gra)) begin
        failures++;
        if (failures < 5) $display("FAIL grad %0d: got %h/%h exp %h/%h", i, got[i].data, got[i].ref_px, gra, thr);
      end
    end
    checks++;
    if (out_th_a !== 8'd61 || out_th_b !== 8'd180) begin failures++; $display("FAIL th"); end
    checks++;
    if (t_out - t_in != W + 3) begin failures++; $display("FAIL latency %0d", t_out - t_in); end

    // 16-bit conditional erosion, cross element, data passed unchanged
    cfg.pe = '{activated: 1'b1, mode16: 1'b1, op_hi: OP_CERO, se_hi: SE_CROSS,
               op_lo: OP_NOP, se_lo: SE_SQUARE};
    cfg.ic = '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
               rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0};
    foreach (img[y, x]) begin img[y][x] = $urandom_range(0, 400); rf[y][x] = $urandom_range(0, 255); end
    stream(1);
    for (int i = 0; i < W * H; i++) begin
      automatic int y = i / W, x = i % W;
      automatic int e = nb(y, x, 0, 1);
      if (rf[y][x] > e) e = rf[y][x];
      checks++;
      if (got[i].data !== 16'(e) || got[i].ref_px !== 8'(rf[y][x])) begin
        failures++;
        if (failures < 5) $display("FAIL cero %0d: got %h exp %h", i, got[i].data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
