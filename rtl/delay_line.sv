// delay_line: delays a WIDTH-bit stream by exactly DEPTH clock-enable steps.
//
// The on-chip memory of the PE array is used as delay lines (line buffers that
// hold the rows above the current pixel, and the Ref delay that aligns the
// reference image with the window centre). This module builds one such delay
// from a circular memory of DEPTH-1 words and one output register: each enabled
// cycle the oldest word is read into the output register and the input word
// is written in its place, so out equals the input of DEPTH enabled cycles ago.
// The memory is one read and one write per cycle at the same address, which
// maps to a single-port SRAM with read-before-write.
//
// Interface: en advances the line, din is sampled on enabled edges, dout is
// registered. Reset clears the pointer and the output register; the memory
// itself is not cleared (the PE masks everything read before it is written).
module delay_line #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 104  // >= 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned N  = DEPTH - 1;
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;

  logic [WIDTH-1:0] mem [N];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      dout <= '0;
    end else if (en) begin
      dout <= mem[ptr];
      ptr  <= (ptr == AW'(N - 1)) ? '0 : ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2) else $error("delay_line: DEPTH must be at least 2");
endmodule
