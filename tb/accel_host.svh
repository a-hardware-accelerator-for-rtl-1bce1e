// accel_host.svh: host-side tasks for the accelerator testbenches: DMA
// transfers over the host streams, program and configuration writes, and a
// model of a whole program run (passes, loops, ping-pong and in-place SRAM
// use, cascade) built on the MacroPE model. Expects in the including module:
// clk, the seg_accel port signals, ROWS, N, W, H, NPIX, and an int
// out_stalls counter.

task automatic host_dma_write(bit s, int bank, input morph_pkg::pix_t img[]);
  @(negedge clk);
  dma_start = 1; dma_dir = 0; dma_sram = s; dma_bank = $bits(dma_bank)'(bank);
  dma_addr = '0; dma_len = $bits(dma_len)'(NPIX);
  @(negedge clk);
  dma_start = 0;
  for (int i = 0; i < NPIX; i++) begin
    h_in_valid = 1; h_in_data = img[i];
    @(posedge clk);
    while (!h_in_ready) @(posedge clk);
    @(negedge clk);
  end
  h_in_valid = 0;
  while (dma_busy) @(negedge clk);
endtask

task automatic host_dma_read(bit s, int bank, output morph_pkg::pix_t img[], input bit slow);
  img = new[NPIX];
  @(negedge clk);
  dma_start = 1; dma_dir = 1; dma_sram = s; dma_bank = $bits(dma_bank)'(bank);
  dma_addr = '0; dma_len = $bits(dma_len)'(NPIX);
  @(negedge clk);
  dma_start = 0;
  for (int i = 0; i < NPIX; i++) begin
    h_out_ready = !slow || ($urandom_range(0, 2) == 0);
    @(posedge clk);
    while (!(h_out_valid && h_out_ready)) begin
      if (h_out_valid) out_stalls++;
      @(negedge clk);
      h_out_ready = !slow || ($urandom_range(0, 2) == 0);
      @(posedge clk);
    end
    img[i] = h_out_data;
    @(negedge clk);
    h_out_ready = 0;
  end
  while (dma_busy) @(negedge clk);
endtask

task automatic host_program(input morph_pkg::instr_t p[$]);
  foreach (p[i]) begin
    @(negedge clk);
    prog_we = 1; prog_addr = $bits(prog_addr)'(i); prog_wdata = p[i];
  end
  @(negedge clk);
  prog_we = 0;
endtask

task automatic host_cfg(int set, input morph_pkg::mpe_cfg_t c[]);
  foreach (c[k]) begin
    @(negedge clk);
    cfg_we = 1; cfg_set = 2'(set); cfg_idx = $bits(cfg_idx)'(k); cfg_wdata = c[k];
  end
  @(negedge clk);
  cfg_we = 0;
endtask

task automatic host_run();
  @(negedge clk);
  start = 1;
  @(negedge clk);
  start = 0;
  while (!done) @(negedge clk);
endtask

function automatic morph_pkg::instr_t mk_ins(morph_pkg::iop_e op, bit inpl = 0, bit casc = 0,
                                             int set = 0, int ta = 0, int tb = 0, int cnt = 0);
  morph_pkg::instr_t i;
  i.op = op; i.in_place = inpl; i.cascade = casc; i.cfg_set = 2'(set);
  i.th_a = 8'(ta); i.th_b = 8'(tb); i.count = 10'(cnt);
  return i;
endfunction

// One pass of the array on the model memories mem[sram][bank].
function automatic bit model_pass(ref morph_pkg::pix_t mem[2][ROWS][], input bit s, input bit d,
                                  input morph_pkg::mpe_cfg_t cfgs[4][ROWS*N],
                                  input morph_pkg::instr_t ins);
  bit any = 0;
  morph_pkg::pix_t cur[], nxt[];
  logic [7:0] ta, tb, ta2, tb2;
  bit ch;
  for (int k = 0; k < (ins.cascade ? 1 : ROWS); k++) begin
    cur = mem[s][k]; ta = ins.th_a; tb = ins.th_b;
    for (int r = (ins.cascade ? 0 : k); r <= (ins.cascade ? ROWS - 1 : k); r++)
      for (int st = 0; st < N; st++) begin
        mm_macro_pe(cur, W, H, cfgs[ins.cfg_set][r * N + st], ta, tb, nxt, ta2, tb2, ch);
        cur = nxt; ta = ta2; tb = tb2; any |= ch;
      end
    mem[d][k] = cur;
  end
  return any;
endfunction

// Whole program on the model memories; returns the number of passes.
function automatic int model_run(ref morph_pkg::pix_t mem[2][ROWS][],
                                 input morph_pkg::mpe_cfg_t cfgs[4][ROWS*N],
                                 input morph_pkg::instr_t p[$]);
  int pc = 0, passes = 0, lpc = 0, lim = 0, it = 0;
  bit src = 0, dst, is_until = 0, last = 0;
  while (pc < p.size()) begin
    morph_pkg::instr_t i = p[pc];
    pc++;
    case (i.op)
      morph_pkg::I_PASS: begin
        dst = i.in_place ? src : !src;
        last = model_pass(mem, src, dst, cfgs, i);
        passes++;
        if (!i.in_place) src = dst;
      end
      morph_pkg::I_LOOP, morph_pkg::I_UNTIL: begin
        lpc = pc; lim = int'(i.count); it = 0; is_until = (i.op == morph_pkg::I_UNTIL);
      end
      morph_pkg::I_ENDL: begin
        it++;
        if (!(it >= lim || (is_until && !last))) pc = lpc;
      end
      morph_pkg::I_SWAP: src = !src;
      default: return passes;
    endcase
  end
  return passes;
endfunction
