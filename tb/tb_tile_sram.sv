// tb_tile_sram: random reads and writes on a small 3-bank SRAM against a
// model memory. Checks the one-cycle read latency, that read data holds
// while no read is issued, per-bank write enables, and old-data return when a
// read and a write hit the same address in the same cycle.
`timescale 1ns/1ps
module tb_tile_sram;
  import morph_pkg::*;
  localparam int B = 3;
  localparam int D = 20;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rd_en;
  logic [4:0]    rd_addr, wr_addr;
  pix_t          rd_data [B];
  logic [B-1:0]  wr_en;
  pix_t          wr_data [B];

  tile_sram #(.BANKS(B), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  pix_t model [B][D];
  pix_t expq  [B];

  initial begin
    rd_en = 0; rd_addr = 0; wr_en = 0; wr_addr = 0;
    foreach (wr_data[b]) wr_data[b] = '0;
    // fill everything first
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = '1; wr_addr = 5'(a);
      foreach (wr_data[b]) begin wr_data[b] = pix_t'($urandom); model[b][a] = wr_data[b]; end
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rd_en = 1'($urandom); rd_addr = 5'($urandom_range(0, D - 1));
      wr_en = B'($urandom);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : 5'($urandom_range(0, D - 1));
      foreach (wr_data[b]) wr_data[b] = pix_t'($urandom);
      if (rd_en) foreach (expq[b]) expq[b] = model[b][rd_addr];
      foreach (wr_data[b]) if (wr_en[b]) model[b][wr_addr] = wr_data[b];
      @(posedge clk);
      #1;
      foreach (rd_data[b]) begin
        checks++;
        if (rd_data[b] !== expq[b]) begin
          failures++;
          if (failures < 5) $display("FAIL i=%0d bank %0d got %h exp %h", i, b, rd_data[b], expq[b]);
        end
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
