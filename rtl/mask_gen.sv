// mask_gen: mask generator of a PE.
//
// Mask is high when the reference pixel lies inside the window [th_a, th_b]
// (both ends included). With th_a = th_b = g it selects exactly the pixels of
// gray level g, which is what the masked dilation/erosion of the watershed
// flooding needs; with th_b = 255 it is a plain threshold "ref >= th_a".
// The existence of the block and its inputs (Th_a, Th_b and the delayed Ref)
// follow the PE diagram; the window comparison is this design's reading of it.
// Purely combinational.
module mask_gen (
  input  logic [7:0] ref_px,
  input  logic [7:0] th_a,
  input  logic [7:0] th_b,
  output logic       mask
);
  always_comb mask = (ref_px >= th_a) && (ref_px <= th_b);
endmodule
