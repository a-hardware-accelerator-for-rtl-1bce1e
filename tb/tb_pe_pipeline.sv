// tb_pe_pipeline: a short pipelined PE array (3 MacroPEs) with random
// configurations of every MacroPE (operations, lanes, 16-bit mode,
// interconnect selections, threshold increments) on random tiles. The
// expected tile is the reference MacroPE model applied stage after stage.
// Also checked: the thresholds leaving the last stage, the OR of the change flags and the latency N*(W+3).
`timescale 1ns/1ps
module tb_pe_pipeline;
  import morph_pkg::*;
  `include "tb/morph_model.svh"
  localparam int N = 3;
  localparam int W = 6;
  localparam int H = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mpe_cfg_t   cfg [N];
  logic       in_valid, in_sof, out_valid, out_sof, change;
  pix_t       in_pix, out_pix;
  logic [7:0] th_a, th_b, out_th_a, out_th_b;

  pe_pipeline #(.N(N), .W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, t_in = 0, t_out = 0, nout = 0;
  always @(posedge clk) cycle <= cycle + 1;
  pix_t got [W * H];

  always @(posedge clk) begin
    if (out_valid) begin
      if (out_sof) begin nout = 0; t_out = cycle; end
      if (nout < H * W) got[nout] = out_pix;
      nout++;
    end
  end

  initial begin
    pix_t img[], cur[], nxt[];
    logic [7:0] ta, tb, ta2, tb2;
    bit ch, any_ch;
    in_valid = 0; in_sof = 0; in_pix = '0; th_a = 0; th_b = 0;
    foreach (cfg[i]) cfg[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      foreach (cfg[i]) cfg[i] = mm_random_cfg();
      th_a = 8'($urandom_range(0, 200));
      th_b = th_a + 8'($urandom_range(0, 55));
      img = new[W * H];
      foreach (img[i]) img[i] = pix_t'($urandom);
      cur = img; ta = th_a; tb = th_b; any_ch = 0;
      for (int s = 0; s < N; s++) begin
        mm_macro_pe(cur, W, H, cfg[s], ta, tb, nxt, ta2, tb2, ch);
        cur = nxt; ta = ta2; tb = tb2; any_ch |= ch;
      end
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        if (i == 0) t_in = cycle;
        in_valid = 1; in_sof = (i == 0); in_pix = img[i];
      end
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      repeat (N * (W + 3) + 2) @(negedge clk);
      for (int i = 0; i < W * H; i++) begin
        checks++;
        if (got[i] !== cur[i]) begin
          failures++;
          if (failures < 5) $display("FAIL trial %0d px %0d: got %h exp %h", trial, i, got[i], cur[i]);
        end
      end
      checks++;
      if (out_th_a !== ta || out_th_b !== tb) begin failures++; $display("FAIL trial %0d thresholds", trial); end
      checks++;
      if (change !== any_ch) begin failures++; $display("FAIL trial %0d change", trial); end
      checks++;
      if (t_out - t_in != N * (W + 3)) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
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
