// tb_dma_engine: DMA transfers between a host stream and a model SRAM.
// Host-to-SRAM bursts with random gaps on the host side must land at
// consecutive addresses of the chosen SRAM and bank; SRAM-to-host bursts with
// random back-pressure must return the stored words in order. Also checked:
// busy for exactly the transfer, one write per clock when the host streams
// without gaps, and that a zero-length descriptor does nothing.
`timescale 1ns/1ps
module tb_dma_engine;
  import morph_pkg::*;
  localparam int B = 4;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, dir, sram, busy, h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  logic [1:0] bank;
  logic [5:0] addr;
  logic [6:0] len;
  pix_t       h_in_data, h_out_data, m_wr_data, m_rd_data;
  logic       m_sram, m_rd_en, m_wr_en;
  logic [1:0] m_bank;
  logic [5:0] m_addr;

  dma_engine #(.BANKS(B), .DEPTH(D)) dut (.*);

  // model SRAM: 2 memories x B banks, one-cycle read latency
  pix_t mem [2][B][D];
  always @(posedge clk) begin
    if (m_wr_en) mem[m_sram][m_bank][m_addr] <= m_wr_data;
    if (m_rd_en) m_rd_data <= mem[m_sram][m_bank][m_addr];
  end

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic go(bit d, bit s, int bk, int a, int n);
    @(negedge clk);
    start = 1; dir = d; sram = s; bank = 2'(bk); addr = 6'(a); len = 7'(n);
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    pix_t words [];
    int t0;
    start = 0; dir = 0; sram = 0; bank = 0; addr = 0; len = 0;
    h_in_valid = 0; h_in_data = '0; h_out_ready = 0;
    foreach (mem[s, b, a]) mem[s][b][a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      automatic bit s = 1'($urandom);
      automatic int bk = $urandom_range(0, B - 1);
      automatic int a = $urandom_range(0, 20);
      automatic int n = $urandom_range(1, 40);
      automatic bit gaps = trial % 2;
      words = new[n];
      foreach (words[i]) words[i] = pix_t'($urandom);
      // host -> SRAM
      go(0, s, bk, a, n);
      t0 = cycle;
      for (int i = 0; i < n; i++) begin
        h_in_valid = !gaps || $urandom_range(0, 1);
        while (!h_in_valid) begin @(negedge clk); h_in_valid = $urandom_range(0, 1); end
        h_in_data = words[i];
        @(posedge clk);
        while (!h_in_ready) @(posedge clk);
        @(negedge clk);
        h_in_valid = 0;
      end
      if (!gaps) begin
        checks++;
        if (cycle - t0 != n) begin failures++; $display("FAIL write rate %0d for %0d", cycle - t0, n); end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after write"); end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (mem[s][bk][a + i] !== words[i]) begin
          failures++;
          if (failures < 5) $display("FAIL write trial %0d word %0d", trial, i);
        end
      end
      // SRAM -> host
      go(1, s, bk, a, n);
      for (int i = 0; i < n; i++) begin
        h_out_ready = $urandom_range(0, 1);
        @(posedge clk);
        while (!(h_out_valid && h_out_ready)) begin
          @(negedge clk);
          h_out_ready = $urandom_range(0, 1);
          @(posedge clk);
        end
        checks++;
        if (h_out_data !== words[i]) begin
          failures++;
          if (failures < 5) $display("FAIL read trial %0d word %0d got %h exp %h", trial, i, h_out_data, words[i]);
        end
        @(negedge clk);
        h_out_ready = 0;
      end
      repeat (2) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after read"); end
    end
    // zero length: nothing happens
    go(0, 0, 0, 0, 0);
    checks++;
    if (busy) begin failures++; $display("FAIL zero-length started"); end
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
