// tb_seg_accel_full: one complete operation of the accelerator at its
// default size (4 rows of 9 MacroPEs, 106 x 240 tiles, 36 MacroPEs).
//
// Four tiles of a synthetic gray frame (objects on a ramp, plus noise) are
// loaded into SRAM0 by DMA, one pass runs the morphological edge detector
//   Edge = Th(GRA) (-) B  -  Th(GRA) (-) B (-) B,   GRA = I (+) B5 - I (-) B5
// on the first five MacroPEs of every row (the rest inactive): two MacroPEs
// dilate (MSB lane) and erode (LSB lane) with the 3x3 element, which together
// use the 5x5 element B5, and subtract; one thresholds the gradient (255
// where GRA >= 30); two erode and subtract. The results
// land in SRAM1 and are read back by DMA. The expected tiles come from the
// MacroPE reference model; the pass length (W*H + 9*(W+3) + 3 cycles from
// first read to last write, i.e. one pixel per clock per row) is checked.
`timescale 1ns/1ps
module tb_seg_accel_full;
  import morph_pkg::*;
  localparam int ROWS = 4, N = 9, W = 106, H = 240;
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
  logic [14:0] dma_addr;
  logic [14:0] dma_len;
  logic        h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  pix_t        h_in_data, h_out_data;

  seg_accel dut (.*);

  int checks = 0, failures = 0, out_stalls = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t_first_rd = -1, pass_span = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.rd_en && dut.rd_sof && t_first_rd < 0) t_first_rd = cycle;
    if (t_first_rd >= 0 && pass_span < 0 && (|dut.arr_we) && dut.wr_addr == 15'(NPIX - 1))
      pass_span = cycle - t_first_rd + 1;
  end

  pix_t     mem [2][ROWS][];
  mpe_cfg_t cfgs [4][ROWS*N];

  initial begin
    instr_t p [$];
    pix_t got[];
    int exp_passes, edges;
    prog_we = 0; cfg_we = 0; start = 0; prog_addr = 0; prog_wdata = '0; cfg_set = 0;
    cfg_idx = 0; cfg_wdata = '0; dma_start = 0; dma_dir = 0; dma_sram = 0; dma_bank = 0;
    dma_addr = 0; dma_len = 0; h_in_valid = 0; h_in_data = '0; h_out_ready = 0;
    foreach (cfgs[s, k]) cfgs[s][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int s = 0; s < 2; s++)
      for (int k = 0; k < ROWS; k++) begin
        mem[s][k] = new[NPIX];
        foreach (mem[s][k][i]) mem[s][k][i] = '0;
      end
    for (int k = 0; k < ROWS; k++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic int g = (x + y) / 4 + $urandom_range(0, 6);
          if ((x - 30 - 10 * k) ** 2 + (y - 60) ** 2 < 400) g += 120;
          if (x > 60 && x < 90 && y > 140 && y < 200) g += 90;
          if (g > 255) g = 255;
          mem[0][k][y * W + x] = '{data: {8'(g), 8'(g)}, ref_px: 8'(g)};
        end
    for (int k = 0; k < ROWS; k++) host_dma_write(0, k, mem[0][k]);

    // edge detector on MacroPEs 0..3 of every row
    for (int r = 0; r < ROWS; r++) begin
      cfgs[1][r * N + 0] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_DIL, se_hi: SE_SQUARE,
                                   op_lo: OP_ERO, se_lo: SE_SQUARE},
                             ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                                   rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
      cfgs[1][r * N + 1] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_DIL, se_hi: SE_SQUARE,
                                   op_lo: OP_ERO, se_lo: SE_SQUARE},
                             ic: '{pass16: 1'b0, hsel: DSEL_ARITH, lsel: DSEL_ARITH, sub: 1'b1,
                                   rsel: RSEL_ARITH, inc_a: 1'b0, inc_b: 1'b0}};
      cfgs[1][r * N + 2] = '{pe: '{activated: 1'b0, mode16: 1'b0, op_hi: OP_NOP, se_hi: SE_SQUARE,
                                   op_lo: OP_NOP, se_lo: SE_SQUARE},
                             ic: '{pass16: 1'b0, hsel: DSEL_THR, lsel: DSEL_THR, sub: 1'b0,
                                   rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
      cfgs[1][r * N + 3] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_ERO, se_hi: SE_SQUARE,
                                   op_lo: OP_ERO, se_lo: SE_SQUARE},
                             ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                                   rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
      cfgs[1][r * N + 4] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_NOP, se_hi: SE_SQUARE,
                                   op_lo: OP_ERO, se_lo: SE_SQUARE},
                             ic: '{pass16: 1'b0, hsel: DSEL_ARITH, lsel: DSEL_SAME, sub: 1'b1,
                                   rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
      for (int s = 5; s < N; s++)
        cfgs[1][r * N + s] = '{pe: '{activated: 1'b0, mode16: 1'b0, op_hi: OP_NOP, se_hi: SE_SQUARE,
                                     op_lo: OP_NOP, se_lo: SE_SQUARE},
                               ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                                     rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
    end
    host_cfg(1, cfgs[1]);
    p = '{mk_ins(I_PASS, 0, 0, 1, 30, 255), mk_ins(I_HALT)};
    host_program(p);
    exp_passes = model_run(mem, cfgs, p);
    host_run();
    check(pass_count == 16'(exp_passes), "pass count");
    check(pass_span == NPIX + N * (W + 3) + 3, $sformatf("pass span %0d", pass_span));
    edges = 0;
    for (int k = 0; k < ROWS; k++) begin
      host_dma_read(1, k, got, 0);
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (got[i] !== mem[1][k][i]) begin
          failures++;
          if (failures < 8) $display("FAIL bank %0d px %0d: got %h exp %h", k, i, got[i], mem[1][k][i]);
        end
        if (mem[1][k][i].data[15:8] != 0) edges++;
      end
    end
    // the test image must actually contain edges
    check(edges > 100 && edges < ROWS * NPIX / 2, $sformatf("edge pixels %0d", edges));
    $display("COUNT edge_pixels=%0d pass_span=%0d cycles=%0d", edges, pass_span, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
