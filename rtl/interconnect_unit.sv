// interconnect_unit: programmable interconnection unit between two PEs.
//
// It sits behind each PE and decides what the next PE receives:
//  * Data (16 bits): either the PE output unchanged, or two 8-bit halves each
//    chosen from the same half, the other half (swap or duplicate a lane), the
//    adder/subtractor result of the two halves, the threshold byte (255 where
//    Mask is high, else 0) or the Ref byte. With hi = dilation and lo = erosion
//    of the same image, "subtract" gives the morphological gradient.
//  * Ref (8 bits): Ref itself, inverted Ref (complement of a binary mask, for
//    conditional operations against the complement), the arithmetic result or
//    the LSB half of the data (so that a computed image becomes the reference
//    of the next PE, e.g. for thresholding it there).
//  * Th_a, Th_b: passed on or incremented by one (saturating), so consecutive
//    PEs can work on consecutive gray levels.
// Everything goes through one pipeline register, so the unit adds one cycle.
//
// From the document: the inputs and outputs (Data 16, Ref 8, Mask, Th_a,
// Th_b), the 8-bit split of Data, an adder/subtractor, the 0/255 selection by
// Mask, the inverter on Ref, the +1 on both thresholds and the pipeline
// register. The exact mux inputs, their encodings (see morph_pkg) and the
// saturation of the arithmetic are this design's own reading.
module interconnect_unit
  import morph_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ic_cfg_t     cfg,
  input  logic        in_valid,
  input  logic        in_sof,
  input  logic [15:0] in_data,
  input  logic [7:0]  in_ref,
  input  logic        in_mask,
  input  logic [7:0]  in_th_a,
  input  logic [7:0]  in_th_b,
  output logic        out_valid,
  output logic        out_sof,
  output logic [15:0] out_data,
  output logic [7:0]  out_ref,
  output logic [7:0]  out_th_a,
  output logic [7:0]  out_th_b
);
  logic [7:0] hi, lo, arith, thr, nhi, nlo, nref;
  logic [8:0] sum;

  always_comb begin
    hi    = in_data[15:8];
    lo    = in_data[7:0];
    sum   = {1'b0, hi} + {1'b0, lo};
    if (cfg.sub) arith = (hi > lo) ? hi - lo : 8'h00;
    else         arith = sum[8] ? 8'hFF : sum[7:0];
    thr   = in_mask ? 8'hFF : 8'h00;
  end

  function automatic logic [7:0] half(input dsel_e sel, input logic [7:0] same,
                                      input logic [7:0] other, input logic [7:0] a,
                                      input logic [7:0] t, input logic [7:0] r);
    case (sel)
      DSEL_OTHER: return other;
      DSEL_ARITH: return a;
      DSEL_THR:   return t;
      DSEL_REF:   return r;
      default:    return same;
    endcase
  endfunction

  always_comb begin
    nhi = half(cfg.hsel, hi, lo, arith, thr, in_ref);
    nlo = half(cfg.lsel, lo, hi, arith, thr, in_ref);
    case (cfg.rsel)
      RSEL_NOT:   nref = ~in_ref;
      RSEL_ARITH: nref = arith;
      RSEL_LO:    nref = lo;
      default:    nref = in_ref;
    endcase
  end

  // pipeline register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
      out_ref   <= '0;
      out_th_a  <= '0;
      out_th_b  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_sof;
      out_data  <= cfg.pass16 ? in_data : {nhi, nlo};
      out_ref   <= nref;
      out_th_a  <= (cfg.inc_a && in_th_a != 8'hFF) ? in_th_a + 1'b1 : in_th_a;
      out_th_b  <= (cfg.inc_b && in_th_b != 8'hFF) ? in_th_b + 1'b1 : in_th_b;
    end
  end
endmodule
