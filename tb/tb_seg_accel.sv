// tb_seg_accel: end-to-end test of the accelerator on a small configuration
// (4 rows of 3 MacroPEs, 5 x 5 tiles).
//
// Part 1, watershed flooding by masked erosion: tile 0 is the 5 x 5 example
// of gray levels with raster labels from the architecture description, the
// other tiles random images labelled the same way (labels given in order of
// gray level, then raster order). The program floods level by level: for
// g = 0..3, an "until no change" loop of in-place passes in which every
// MacroPE runs a 16-bit masked erosion (cross element) on the pixels of gray
// level g. Tile 0 must end with the two basins of the published result.
// Part 2: gradient + threshold pass (SRAM0 -> SRAM1), a zero-overhead loop of
// in-place passes of conditional dilation and erosion, a swap back to the
// original frame and a cascade pass through all 12 MacroPEs with random
// configurations. Data is loaded and read back by DMA, the reads with random
// back-pressure. All results are compared with a model of the program.
// Counted, each must happen at least once: DMA loads and reads, read stalls,
// ping-pong, in-place and cascade passes, loop repeats, an until-loop ending
// on "no change", swaps, 16-bit and 8-bit operations, masked, conditional
// and arithmetic (gradient) steps, threshold increments. The length of a
// plain pass (W*H + N*(W+3) + 3 cycles from first read to last write) is
// checked too.
`timescale 1ns/1ps
module tb_seg_accel;
  import morph_pkg::*;
  localparam int ROWS = 4, N = 3, W = 5, H = 5, PROG_DEPTH = 32;
  localparam int NPIX = W * H;
  `include "tb/morph_model.svh"
  `include "tb/accel_host.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we, cfg_we, start, busy, done, last_change;
  logic [4:0]  prog_addr;
  instr_t      prog_wdata;
  logic [1:0]  cfg_set;
  logic [3:0]  cfg_idx;
  mpe_cfg_t    cfg_wdata;
  logic [15:0] pass_count;
  logic        dma_start, dma_dir, dma_sram, dma_busy;
  logic [1:0]  dma_bank;
  logic [4:0]  dma_addr;
  logic [4:0]  dma_len;
  logic        h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  pix_t        h_in_data, h_out_data;

  seg_accel #(.ROWS(ROWS), .N(N), .W(W), .H(H), .PROG_DEPTH(PROG_DEPTH)) dut (.*);

  int checks = 0, failures = 0, out_stalls = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters (observed inside the design) ----------
  int n_dma_in = 0, n_dma_out = 0, n_pingpong = 0, n_inplace = 0, n_cascade = 0;
  int n_loop_back = 0, n_until_exit = 0, n_swap = 0, n_m16 = 0, n_m8 = 0;
  int n_masked = 0, n_cond = 0, n_arith = 0, n_thinc = 0;
  int t_first_rd = -1, pass_span = -1;
  always @(posedge clk) if (rst_n) begin
    if (h_in_valid && h_in_ready) n_dma_in++;
    if (h_out_valid && h_out_ready) n_dma_out++;
    if (dut.u_ctrl.st == 2'd3) begin
      if (dut.u_ctrl.in_place) n_inplace++; else n_pingpong++;
      if (dut.u_ctrl.cascade) n_cascade++;
    end
    if (dut.u_ctrl.st == 2'd1) begin
      if (dut.u_ctrl.ir.op == I_ENDL) begin
        if (!((dut.u_ctrl.loop_iter + 1 >= dut.u_ctrl.loop_lim) ||
              (dut.u_ctrl.loop_until && !dut.u_ctrl.last_change))) n_loop_back++;
        else if (dut.u_ctrl.loop_until && !dut.u_ctrl.last_change) n_until_exit++;
      end
      if (dut.u_ctrl.ir.op == I_SWAP) n_swap++;
    end
    // per active PE of row 0, stage 0, whose centre pixel is valid
    if (dut.u_array.g_row[0].u_pipe.g_stage[0].u_mpe.u_pe.c_valid) begin
      automatic pe_cfg_t pc = dut.u_array.g_row[0].u_pipe.g_stage[0].u_mpe.u_pe.cfg;
      if (pc.activated) begin
        if (pc.mode16) n_m16++; else n_m8++;
        if ((pc.op_hi == OP_MERO || pc.op_hi == OP_MDIL) &&
            dut.u_array.g_row[0].u_pipe.g_stage[0].u_mpe.u_pe.mask) n_masked++;
        if (pc.op_hi == OP_CERO || pc.op_hi == OP_CDIL || pc.op_lo == OP_CERO || pc.op_lo == OP_CDIL) n_cond++;
      end
    end
    if (dut.u_array.g_row[0].u_pipe.g_stage[0].u_mpe.u_ic.in_valid) begin
      automatic ic_cfg_t ic = dut.u_array.g_row[0].u_pipe.g_stage[0].u_mpe.cfg.ic;
      if (!ic.pass16 && (ic.hsel == DSEL_ARITH || ic.lsel == DSEL_ARITH)) n_arith++;
      if (ic.inc_a || ic.inc_b) n_thinc++;
    end
    // span of the first plain pass: first read to last write
    if (dut.rd_en && dut.rd_sof && t_first_rd < 0 && !dut.cascade) t_first_rd = cycle;
    if (t_first_rd >= 0 && pass_span < 0 && (|dut.arr_we) && dut.wr_addr == 5'(NPIX - 1))
      pass_span = cycle - t_first_rd + 1;
  end

  pix_t           mem [2][ROWS][];
  mpe_cfg_t       cfgs [4][ROWS*N];

  task automatic load_all(bit s);
    for (int k = 0; k < ROWS; k++) host_dma_write(s, k, mem[s][k]);
  endtask

  task automatic compare_all(bit s, string what);
    pix_t got[];
    for (int k = 0; k < ROWS; k++) begin
      host_dma_read(s, k, got, 1);
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (got[i] !== mem[s][k][i]) begin
          failures++;
          if (failures < 8) $display("FAIL %s bank %0d px %0d: got %h exp %h", what, k, i, got[i], mem[s][k][i]);
        end
      end
    end
  endtask

  // label pixels in order of gray level, then raster order
  function automatic void label_tile(ref pix_t t[]);
    int next = 0;
    for (int g = 0; g < 256; g++)
      for (int i = 0; i < NPIX; i++)
        if (int'(t[i].ref_px) == g) begin t[i].data = 16'(next); next++; end
  endfunction

  initial begin
    instr_t p [$];
    int exp_passes;
    int fig_gray [25] = '{2,2,1,0,0, 3,3,2,1,0, 1,2,3,2,1, 0,1,2,3,2, 0,0,1,2,3};
    int fig_lab  [25] = '{12,13,6,0,1, 20,21,14,7,2, 9,17,22,15,8, 3,10,18,23,16, 4,5,11,19,24};
    int fig_res  [25] = '{0,0,0,0,0, 0,0,0,0,0, 3,3,0,0,0, 3,3,3,0,0, 3,3,3,3,0};
    prog_we = 0; cfg_we = 0; start = 0; prog_addr = 0; prog_wdata = '0; cfg_set = 0;
    cfg_idx = 0; cfg_wdata = '0; dma_start = 0; dma_dir = 0; dma_sram = 0; dma_bank = 0;
    dma_addr = 0; dma_len = 0; h_in_valid = 0; h_in_data = '0; h_out_ready = 0;
    foreach (cfgs[s, k]) cfgs[s][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- part 1: watershed flooding ----------------
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < ROWS; k++) begin
        mem[s][k] = new[NPIX];
        foreach (mem[s][k][i]) mem[s][k][i] = '0;
      end
    for (int i = 0; i < NPIX; i++) begin
      mem[0][0][i].ref_px = 8'(fig_gray[i]);
      mem[0][0][i].data = 16'(fig_lab[i]);
    end
    for (int k = 1; k < ROWS; k++) begin
      foreach (mem[0][k][i]) mem[0][k][i].ref_px = 8'($urandom_range(0, 3));
      label_tile(mem[0][k]);
    end
    load_all(0);
    foreach (cfgs[0][k])
      cfgs[0][k] = '{pe: '{activated: 1'b1, mode16: 1'b1, op_hi: OP_MERO, se_hi: SE_CROSS,
                           op_lo: OP_NOP, se_lo: SE_CROSS},
                     ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                           rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
    host_cfg(0, cfgs[0]);
    p = {};
    for (int g = 0; g < 4; g++) begin
      p.push_back(mk_ins(I_UNTIL, 0, 0, 0, 0, 0, 50));
      p.push_back(mk_ins(I_PASS, 1, 0, 0, g, g));
      p.push_back(mk_ins(I_ENDL));
    end
    p.push_back(mk_ins(I_HALT));
    host_program(p);
    exp_passes = model_run(mem, cfgs, p);
    host_run();
    check(pass_count == 16'(exp_passes), $sformatf("watershed passes %0d exp %0d", pass_count, exp_passes));
    for (int i = 0; i < NPIX; i++)
      check(int'(mem[0][0][i].data) == fig_res[i], $sformatf("model vs published result px %0d", i));
    compare_all(0, "watershed");
    check(pass_span == NPIX + N * (W + 3) + 3, $sformatf("pass span %0d", pass_span));

    // ---------------- part 2: gradient, loops, swap, cascade ----------------
    for (int k = 0; k < ROWS; k++)
      foreach (mem[0][k][i]) begin
        automatic logic [7:0] g = 8'($urandom);
        mem[0][k][i] = '{data: {g, g}, ref_px: g};
      end
    load_all(0);
    // set 1: gradient, threshold, erosion of the binary edge map
    cfgs[1][0] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_DIL, se_hi: SE_SQUARE,
                         op_lo: OP_ERO, se_lo: SE_SQUARE},
                   ic: '{pass16: 1'b0, hsel: DSEL_ARITH, lsel: DSEL_SAME, sub: 1'b1,
                         rsel: RSEL_ARITH, inc_a: 1'b1, inc_b: 1'b0}};
    cfgs[1][1] = '{pe: '{activated: 1'b0, mode16: 1'b0, op_hi: OP_NOP, se_hi: SE_SQUARE,
                         op_lo: OP_NOP, se_lo: SE_SQUARE},
                   ic: '{pass16: 1'b0, hsel: DSEL_THR, lsel: DSEL_THR, sub: 1'b0,
                         rsel: RSEL_LO, inc_a: 1'b0, inc_b: 1'b0}};
    cfgs[1][2] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_ERO, se_hi: SE_SQUARE,
                         op_lo: OP_NOP, se_lo: SE_CROSS},
                   ic: '{pass16: 1'b0, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                         rsel: RSEL_NOT, inc_a: 1'b0, inc_b: 1'b0}};
    for (int r = 1; r < ROWS; r++)
      for (int s = 0; s < N; s++) cfgs[1][r * N + s] = cfgs[1][s];
    // set 2: conditional dilation and conditional erosion (8-bit lanes)
    foreach (cfgs[2][k])
      cfgs[2][k] = '{pe: '{activated: 1'b1, mode16: 1'b0, op_hi: OP_CDIL, se_hi: SE_CROSS,
                           op_lo: OP_CERO, se_lo: SE_SQUARE},
                     ic: '{pass16: 1'b1, hsel: DSEL_SAME, lsel: DSEL_SAME, sub: 1'b0,
                           rsel: RSEL_REF, inc_a: 1'b0, inc_b: 1'b0}};
    // set 3: random, for the 12-MacroPE cascade
    foreach (cfgs[3][k]) cfgs[3][k] = mm_random_cfg();
    for (int s = 1; s < 4; s++) host_cfg(s, cfgs[s]);
    p = '{mk_ins(I_PASS, 0, 0, 1, 40, 255),
          mk_ins(I_LOOP, 0, 0, 0, 0, 0, 2),
          mk_ins(I_PASS, 1, 0, 2, 0, 255),
          mk_ins(I_ENDL),
          mk_ins(I_SWAP),
          mk_ins(I_PASS, 0, 1, 3, 50, 120),
          mk_ins(I_HALT)};
    host_program(p);
    for (int k = 0; k < ROWS; k++) mem[1][k] = mem[1][k];
    exp_passes = model_run(mem, cfgs, p);
    host_run();
    check(pass_count == 16'(exp_passes), $sformatf("program 2 passes %0d exp %0d", pass_count, exp_passes));
    compare_all(1, "program 2 SRAM1");
    compare_all(0, "program 2 SRAM0");

    // ---------------- every mechanism happened ----------------
    check(n_dma_in > 0, "DMA load");
    check(n_dma_out > 0, "DMA read");
    check(out_stalls > 0, "DMA read stall");
    check(n_pingpong > 0, "ping-pong pass");
    check(n_inplace > 0, "in-place pass");
    check(n_cascade > 0, "cascade pass");
    check(n_loop_back > 0, "loop repeat");
    check(n_until_exit > 0, "until-loop exit on no change");
    check(n_swap > 0, "swap");
    check(n_m16 > 0, "16-bit operation");
    check(n_m8 > 0, "8-bit operation");
    check(n_masked > 0, "masked operation");
    check(n_cond > 0, "conditional operation");
    check(n_arith > 0, "gradient arithmetic");
    check(n_thinc > 0, "threshold increment");
    $display("COUNT dma_in=%0d dma_out=%0d stalls=%0d pingpong=%0d inplace=%0d cascade=%0d loop_back=%0d until_exit=%0d swap=%0d m16=%0d m8=%0d masked=%0d cond=%0d arith=%0d thinc=%0d",
             n_dma_in, n_dma_out, out_stalls, n_pingpong, n_inplace, n_cascade, n_loop_back,
             n_until_exit, n_swap, n_m16, n_m8, n_masked, n_cond, n_arith, n_thinc);
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
