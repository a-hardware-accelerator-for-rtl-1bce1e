// tb_control_unit: runs a program on the control unit with a stand-in for the
// SRAMs and the PE array (each read request comes back as a write LAT cycles
// later; the change flag is set by the testbench per pass).
// Program: one ping-pong pass, a 3-times zero-overhead loop of in-place
// passes, an "until no change" loop that must stop after the 4th pass
// (change reported for the first three), a swap, a cascade pass with its own
// configuration set and thresholds, halt. Checked for every pass: source and
// destination SRAM, in-place, cascade, configuration set and thresholds, a
// full sweep of read and write addresses in order, and the pass length
// (W*H + LAT cycles plus 2 cycles of fetch/close). Also checked: the
// configuration driven to the array, pass_count, done and busy.
`timescale 1ns/1ps
module tb_control_unit;
  import morph_pkg::*;
  localparam int ROWS = 2, N = 2, W = 5, H = 3, LAT = 7;
  localparam int NPIX = W * H;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       prog_we, cfg_we, start, busy, done, last_change, cascade, arr_change, arr_we;
  logic [4:0] prog_addr;
  instr_t     prog_wdata;
  logic [1:0] cfg_set;
  logic [1:0] cfg_idx;
  mpe_cfg_t   cfg_wdata;
  logic [15:0] pass_count;
  mpe_cfg_t   arr_cfg [ROWS][N];
  logic [7:0] th_a, th_b;
  logic       src, dst, rd_en, rd_sof;
  logic [3:0] rd_addr, wr_addr;

  control_unit #(.ROWS(ROWS), .N(N), .W(W), .H(H), .PROG_DEPTH(32)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // stand-in array: read requests return as writes LAT cycles later
  logic [LAT-1:0] pipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pipe <= '0;
    else        pipe <= {pipe[LAT-2:0], rd_en};
  assign arr_we = pipe[LAT-1];

  // per-pass bookkeeping
  int npass = 0, exp_rd = 0, exp_wr = 0, t_start = 0;
  int pass_src [$], pass_dst [$], pass_casc [$], pass_tha [$], pass_len [$];
  int change_budget = 0;
  always @(posedge clk) begin
    if (rst_n && rd_en) begin
      if (rd_sof) begin
        exp_rd = 0; exp_wr = 0; t_start = cycle;
        pass_src.push_back(src); pass_dst.push_back(dst);
        pass_casc.push_back(cascade); pass_tha.push_back(th_a);
        if (arr_cfg[1][0] !== (cascade ? cfg_pat(2, 2) : cfg_pat(0, 2))) begin
          failures++; $display("FAIL configuration set at pass %0d", npass);
        end
        checks++;
      end
      if (rd_addr !== 4'(exp_rd)) begin failures++; $display("FAIL read order %0d %0d t=%0d", rd_addr, exp_rd, cycle); end
      exp_rd++;
    end
    if (rst_n && arr_we) begin
      if (wr_addr !== 4'(exp_wr)) begin failures++; $display("FAIL write order %0d %0d t=%0d", wr_addr, exp_wr, cycle); end
      exp_wr++;
      if (exp_wr == NPIX) begin
        pass_len.push_back(cycle - t_start + 1);
        npass++;
      end
    end
  end
  // change flag: high during the first passes of the until-loop
  assign arr_change = (npass >= 5 && npass < 8);

  function automatic mpe_cfg_t cfg_pat(int set, int idx);
    return mpe_cfg_t'(22'(set * 1000 + idx * 37 + 5));
  endfunction

  function automatic instr_t ins(iop_e op, bit inpl = 0, bit casc = 0, int set = 0,
                                 int ta = 0, int tb = 0, int cnt = 0);
    instr_t i;
    i.op = op; i.in_place = inpl; i.cascade = casc; i.cfg_set = 2'(set);
    i.th_a = 8'(ta); i.th_b = 8'(tb); i.count = 10'(cnt);
    return i;
  endfunction

  initial begin
    instr_t p [$];
    prog_we = 0; cfg_we = 0; start = 0; prog_addr = 0; prog_wdata = '0;
    cfg_set = 0; cfg_idx = 0; cfg_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    p = '{ins(I_PASS, 0, 0, 0, 10, 20),
          ins(I_LOOP, 0, 0, 0, 0, 0, 3),
          ins(I_PASS, 1, 0, 0, 11, 20),
          ins(I_ENDL),
          ins(I_UNTIL, 0, 0, 0, 0, 0, 10),
          ins(I_PASS, 0, 0, 0, 12, 20),
          ins(I_ENDL),
          ins(I_SWAP),
          ins(I_PASS, 0, 1, 2, 13, 30),
          ins(I_HALT)};
    foreach (p[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 5'(i); prog_wdata = p[i];
    end
    @(negedge clk);
    prog_we = 0;
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < ROWS * N; k++) begin
        @(negedge clk);
        cfg_we = 1; cfg_set = 2'(s); cfg_idx = 2'(k); cfg_wdata = cfg_pat(s, k);
      end
    @(negedge clk);
    cfg_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after halt");
    check(pass_count == 9, $sformatf("pass_count %0d", pass_count));
    check(pass_src.size() == 9, $sformatf("passes seen %0d", pass_src.size()));
    if (pass_src.size() == 9) begin
      int es [9] = '{0, 1, 1, 1, 1, 0, 1, 0, 0};
      int ed [9] = '{1, 1, 1, 1, 0, 1, 0, 1, 1};
      int ec [9] = '{0, 0, 0, 0, 0, 0, 0, 0, 1};
      int et [9] = '{10, 11, 11, 11, 12, 12, 12, 12, 13};
      for (int i = 0; i < 9; i++) begin
        check(pass_src[i] == es[i] && pass_dst[i] == ed[i], $sformatf("pass %0d src/dst %0d/%0d", i, pass_src[i], pass_dst[i]));
        check(pass_casc[i] == ec[i] && pass_tha[i] == et[i], $sformatf("pass %0d cascade/th", i));
        check(pass_len[i] == NPIX + LAT, $sformatf("pass %0d length %0d", i, pass_len[i]));
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
