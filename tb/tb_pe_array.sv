// tb_pe_array: a small PE array (2 rows of 2 MacroPEs) in both modes.
// Parallel mode: each row processes its own tile with its own random
// configuration, and bank k is written from row k. Cascade mode: row 0 feeds
// row 1, the tile of bank 0 passes through all four MacroPEs and only bank 0
// is written. Results, write enables, the change flag and the latency
// (2 + N*(W+3) parallel, 2 + ROWS*N*(W+3) cascade) are checked against the
// reference MacroPE model.
`timescale 1ns/1ps
module tb_pe_array;
  import morph_pkg::*;
  `include "tb/morph_model.svh"
  localparam int ROWS = 2;
  localparam int N = 2;
  localparam int W = 5;
  localparam int H = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mpe_cfg_t        cfg [ROWS][N];
  logic            cascade, in_valid, in_sof, out_sof, change;
  pix_t            in_pix [ROWS];
  pix_t            out_pix [ROWS];
  logic [7:0]      th_a, th_b;
  logic [ROWS-1:0] out_we;

  pe_array #(.ROWS(ROWS), .N(N), .W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, t_in = 0, t_out = 0;
  int nout [ROWS];
  int nwe_other = 0;
  always @(posedge clk) cycle <= cycle + 1;
  pix_t got [ROWS][W * H];

  always @(posedge clk) begin
    for (int k = 0; k < ROWS; k++)
      if (out_we[k]) begin
        if (k == 0 && out_sof) begin t_out = cycle; foreach (nout[j]) nout[j] = 0; end
        if (nout[k] < W * H) got[k][nout[k]] = out_pix[k];
        nout[k]++;
        if (cascade && k != 0) nwe_other++;
      end
  end

  initial begin
    pix_t img [ROWS][];
    pix_t cur[], nxt[];
    logic [7:0] ta, tb, ta2, tb2;
    bit ch, any_ch;
    int stages;
    in_valid = 0; in_sof = 0; cascade = 0; th_a = 0; th_b = 0;
    foreach (in_pix[k]) in_pix[k] = '0;
    foreach (cfg[r, s]) cfg[r][s] = '0;
    foreach (nout[k]) nout[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      cascade = trial % 2;
      foreach (cfg[r, s]) cfg[r][s] = mm_random_cfg();
      th_a = 8'($urandom_range(0, 200));
      th_b = th_a + 8'($urandom_range(0, 55));
      foreach (img[k]) begin
        img[k] = new[W * H];
        foreach (img[k][i]) img[k][i] = pix_t'($urandom);
      end
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        if (i == 0) t_in = cycle;
        in_valid = 1; in_sof = (i == 0);
        foreach (in_pix[k]) in_pix[k] = img[k][i];
      end
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      repeat (ROWS * N * (W + 3) + 4) @(negedge clk);
      any_ch = 0;
      for (int k = 0; k < (cascade ? 1 : ROWS); k++) begin
        cur = img[k]; ta = th_a; tb = th_b;
        for (int r = (cascade ? 0 : k); r <= (cascade ? ROWS - 1 : k); r++)
          for (int s = 0; s < N; s++) begin
            mm_macro_pe(cur, W, H, cfg[r][s], ta, tb, nxt, ta2, tb2, ch);
            cur = nxt; ta = ta2; tb = tb2; any_ch |= ch;
          end
        for (int i = 0; i < W * H; i++) begin
          checks++;
          if (got[k][i] !== cur[i]) begin
            failures++;
            if (failures < 5) $display("FAIL trial %0d row %0d px %0d: got %h exp %h", trial, k, i, got[k][i], cur[i]);
          end
        end
      end
      stages = cascade ? ROWS * N : N;
      checks++;
      if (t_out - t_in != 2 + stages * (W + 3)) begin
        failures++; $display("FAIL trial %0d latency %0d", trial, t_out - t_in);
      end
      if (cascade) begin
        checks++;
        if (change !== any_ch) begin failures++; $display("FAIL trial %0d change", trial); end
      end
      checks++;
      if (nwe_other != 0) begin failures++; $display("FAIL cascade wrote other banks"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
