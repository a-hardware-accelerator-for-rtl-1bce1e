// tb_morph_pe: self-checking test of one morphology PE on small tiles.
//
// Random tiles (16-bit data, 8-bit Ref) are streamed through the PE under
// every operation, both structuring elements, 8-bit lanes with different
// operations, the joined 16-bit mode and a de-activated PE. A behavioural
// model written directly from the operation definitions (max/min over the
// in-tile neighbours, conditional = min/max with Ref, masked = only where
// th_a <= Ref <= th_b) gives the expected tile. Also checked: the latency
// (W+2 cycles from a pixel in to its result out), the Ref and Mask outputs,
// the sticky change flag, and two frames streamed back to back.
`timescale 1ns/1ps
module tb_morph_pe;
  import morph_pkg::*;
  localparam int W = 7;
  localparam int H = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pe_cfg_t     cfg;
  logic        in_valid, in_sof, out_valid, out_sof, out_mask, change;
  logic [15:0] in_data, out_data;
  logic [7:0]  in_ref, out_ref, th_a, th_b;

  morph_pe #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [15:0] img [H][W];
  logic [7:0]  rf  [H][W];
  logic [15:0] got [H][W];
  logic [7:0]  gotr [H][W];
  logic        gotm [H][W];
  int          nout, t_in, t_out, frames_out;

  // collector
  always @(posedge clk) begin
    if (out_valid) begin
      if (out_sof) begin
        nout = 0;
        t_out = cycle;
        frames_out++;
      end
      if (nout < W * H) begin
        got[nout / W][nout % W]  = out_data;
        gotr[nout / W][nout % W] = out_ref;
        gotm[nout / W][nout % W] = out_mask;
      end
      nout++;
    end
  end

  function automatic logic [15:0] model(int y, int x, pe_cfg_t c, logic [7:0] ta, logic [7:0] tb);
    logic [15:0] r;
    for (int lane = 0; lane < 2; lane++) begin
      int mx, mn, ctr, rv, res, wmax;
      morph_op_e op;
      se_e se;
      logic m;
      if (c.mode16 && lane == 0) continue;
      op   = (lane == 1 || c.mode16) ? c.op_hi : c.op_lo;
      se   = (lane == 1 || c.mode16) ? c.se_hi : c.se_lo;
      if (!c.activated) op = OP_NOP;
      wmax = c.mode16 ? 16'hFFFF : 8'hFF;
      ctr  = c.mode16 ? int'(img[y][x]) : (lane ? int'(img[y][x][15:8]) : int'(img[y][x][7:0]));
      mx = ctr; mn = ctr;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++) begin
          int v;
          if (y + dy < 0 || y + dy >= H || x + dx < 0 || x + dx >= W) continue;
          if (se == SE_CROSS && dy != 0 && dx != 0) continue;
          v = c.mode16 ? int'(img[y+dy][x+dx]) :
              (lane ? int'(img[y+dy][x+dx][15:8]) : int'(img[y+dy][x+dx][7:0]));
          if (v > mx) mx = v;
          if (v < mn) mn = v;
        end
      rv = int'(rf[y][x]);
      m  = rf[y][x] >= ta && rf[y][x] <= tb;
      case (op)
        OP_DIL:  res = mx;
        OP_ERO:  res = mn;
        OP_CDIL: res = mx < rv ? mx : rv;
        OP_CERO: res = mn > rv ? mn : rv;
        OP_MDIL: res = m ? mx : ctr;
        OP_MERO: res = m ? mn : ctr;
        default: res = ctr;
      endcase
      if (res > wmax) res = wmax;
      if (c.mode16) r = 16'(res);
      else if (lane) r[15:8] = 8'(res);
      else r[7:0] = 8'(res);
    end
    return r;
  endfunction

  task automatic fill(int kind);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = (kind == 1) ? {8'($urandom_range(0, 3)), 8'($urandom)} : 16'($urandom);
        rf[y][x]  = (kind == 2) ? 8'($urandom_range(0, 1) * 255) : 8'($urandom);
      end
  endtask

  task automatic stream_frame();
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      if (i == 0) t_in = cycle;
      in_valid = 1; in_sof = (i == 0);
      in_data = img[i / W][i % W]; in_ref = rf[i / W][i % W];
    end
    @(negedge clk);
    in_valid = 0; in_sof = 0; in_data = 16'($urandom); in_ref = 8'($urandom);
  endtask

  task automatic check_frame(pe_cfg_t c, string what);
    logic any_change = 0;
    int bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [15:0] e = model(y, x, c, th_a, th_b);
        if (e != img[y][x]) any_change = 1;
        if (got[y][x] !== e || gotr[y][x] !== rf[y][x] ||
            gotm[y][x] !== (rf[y][x] >= th_a && rf[y][x] <= th_b)) begin
          if (bad < 3) $display("FAIL %s (%0d,%0d): got %h exp %h", what, y, x, got[y][x], e);
          bad++;
        end
      end
    checks++;
    if (bad) failures++;
    checks++;
    if (change !== any_change) begin
      failures++;
      $display("FAIL %s: change %b exp %b", what, change, any_change);
    end
    checks++;
    if (t_out - t_in != W + 2) begin
      failures++;
      $display("FAIL %s: latency %0d exp %0d", what, t_out - t_in, W + 2);
    end
  endtask

  task automatic run(pe_cfg_t c, int kind, string what);
    cfg = c;
    th_a = 8'($urandom); th_b = 8'($urandom);
    if (th_a > th_b) begin logic [7:0] t = th_a; th_a = th_b; th_b = t; end
    fill(kind);
    stream_frame();
    repeat (W + 4) @(negedge clk);
    check_frame(c, what);
  endtask

  initial begin
    pe_cfg_t c;
    in_valid = 0; in_sof = 0; in_data = 0; in_ref = 0; th_a = 0; th_b = 0;
    cfg = '0; frames_out = 0; nout = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // every operation, both elements, lanes, 16-bit mode
    for (int op = 0; op < 7; op++)
      for (int se = 0; se < 2; se++)
        for (int m16 = 0; m16 < 2; m16++) begin
          c = '{activated: 1'b1, mode16: 1'(m16), op_hi: morph_op_e'(op), se_hi: se_e'(se),
                op_lo: morph_op_e'((op + 3) % 7), se_lo: se_e'(1 - se)};
          run(c, m16 ? 1 : (op >= 3 ? 2 : 0), $sformatf("op%0d se%0d m16=%0d", op, se, m16));
        end
    // de-activated PE passes the centre, no change
    c = '{activated: 1'b0, mode16: 1'b0, op_hi: OP_DIL, se_hi: SE_SQUARE, op_lo: OP_ERO, se_lo: SE_SQUARE};
    run(c, 0, "inactive");
    // two frames back to back, same configuration
    c = '{activated: 1'b1, mode16: 1'b1, op_hi: OP_ERO, se_hi: SE_SQUARE, op_lo: OP_NOP, se_lo: SE_SQUARE};
    cfg = c;
    fill(0);
    stream_frame_keep();
    fill(0);
    stream_frame();
    repeat (W + 4) @(negedge clk);
    check_frame(c, "back-to-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first of two back-to-back frames: keep valid high into the next frame
  task automatic stream_frame_keep();
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      in_valid = 1; in_sof = (i == 0);
      in_data = img[i / W][i % W]; in_ref = rf[i / W][i % W];
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
