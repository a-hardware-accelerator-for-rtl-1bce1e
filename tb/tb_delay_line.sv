// tb_delay_line: checks that the delay line returns each word exactly DEPTH
// enabled cycles later, that a cycle without enable holds everything, and
// that a second instance of depth 2 (the smallest) works too.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int D = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en;
  logic [11:0] din, dout, dout2;
  delay_line #(.WIDTH(12), .DEPTH(D)) dut  (.clk, .rst_n, .en, .din, .dout);
  delay_line #(.WIDTH(12), .DEPTH(2)) dut2 (.clk, .rst_n, .en, .din, .dout(dout2));

  int checks = 0, failures = 0;
  logic [11:0] hist [$];

  initial begin
    en = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      // outputs reflect the words pushed DEPTH (and 2) enabled edges ago
      if (hist.size() >= D) begin
        checks++;
        if (dout !== hist[hist.size() - D]) begin
          failures++;
          if (failures < 5) $display("FAIL i=%0d dout=%h exp=%h", i, dout, hist[hist.size() - D]);
        end
      end
      if (hist.size() >= 2) begin
        checks++;
        if (dout2 !== hist[hist.size() - 2]) failures++;
      end
      en  = ($urandom_range(0, 4) != 0);
      din = 12'($urandom);
      if (en) hist.push_back(din);
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
