// morph_pkg: types and constants shared by the programmable morphology PE array.
//
// A PE holds two 8-bit sub-PEs. Each sub-PE runs one of seven operations on a
// 3x3 neighbourhood: no operation, dilation, erosion, conditional dilation,
// conditional erosion, masked dilation and masked erosion. The neighbourhood is
// either the full 3x3 square (8-connected) or the cross (4-connected). The two
// sub-PEs either work on two independent 8-bit lanes or are joined into one
// 16-bit operation. The operation set, the two structuring elements and the
// 8/16-bit split follow the architecture description; the bit encodings, the
// interconnect selections and the instruction format are this design's own.
package morph_pkg;

  // Operation of one sub-PE.
  typedef enum logic [2:0] {
    OP_NOP    = 3'd0,  // pass the centre pixel
    OP_DIL    = 3'd1,  // max over the neighbourhood
    OP_ERO    = 3'd2,  // min over the neighbourhood
    OP_CDIL   = 3'd3,  // conditional dilation: min(dilation, Ref)
    OP_CERO   = 3'd4,  // conditional erosion:  max(erosion, Ref)
    OP_MDIL   = 3'd5,  // masked dilation: dilation where Mask, else centre
    OP_MERO   = 3'd6   // masked erosion:  erosion where Mask, else centre
  } morph_op_e;

  // Structuring element.
  typedef enum logic {
    SE_SQUARE = 1'b0,  // 3x3, 8-connected
    SE_CROSS  = 1'b1   // cross, 4-connected
  } se_e;

  // Configuration of one PE (both sub-PEs).
  typedef struct packed {
    logic      activated;  // 0: the PE passes the centre pixel of both lanes
    logic      mode16;     // 1: the two sub-PEs form one 16-bit operation
    morph_op_e op_hi;      // MSB sub-PE (the 16-bit operation in mode16)
    se_e       se_hi;
    morph_op_e op_lo;      // LSB sub-PE (ignored in mode16)
    se_e       se_lo;
  } pe_cfg_t;

  // Source of one 8-bit half of the interconnect's data output.
  typedef enum logic [2:0] {
    DSEL_SAME  = 3'd0,  // same half of the PE output
    DSEL_OTHER = 3'd1,  // other half (lane swap / duplicate)
    DSEL_ARITH = 3'd2,  // adder/subtractor result of the two halves
    DSEL_THR   = 3'd3,  // 255 where Mask, else 0 (threshold)
    DSEL_REF   = 3'd4   // the Ref byte
  } dsel_e;

  // Source of the Ref output of the interconnect.
  typedef enum logic [1:0] {
    RSEL_REF   = 2'd0,  // Ref passed on
    RSEL_NOT   = 2'd1,  // inverted Ref (complement of a binary mask)
    RSEL_ARITH = 2'd2,  // adder/subtractor result becomes the new Ref
    RSEL_LO    = 2'd3   // LSB half of the PE output becomes the new Ref
  } rsel_e;

  // Configuration of one programmable interconnection unit.
  typedef struct packed {
    logic  pass16;   // 1: 16-bit data passed unchanged (hsel/lsel ignored)
    dsel_e hsel;     // MSB half of the data output
    dsel_e lsel;     // LSB half of the data output
    logic  sub;      // arithmetic unit: 1 = hi - lo (clamped at 0), 0 = hi + lo (saturated)
    rsel_e rsel;
    logic  inc_a;    // Th_a + 1 to the next MacroPE
    logic  inc_b;    // Th_b + 1 to the next MacroPE
  } ic_cfg_t;

  // Configuration of one MacroPE (PE plus interconnection unit).
  typedef struct packed {
    pe_cfg_t pe;
    ic_cfg_t ic;
  } mpe_cfg_t;

  // Word carried between MacroPEs and stored in the SRAMs: 16-bit data, 8-bit Ref.
  typedef struct packed {
    logic [15:0] data;
    logic [7:0]  ref_px;
  } pix_t;

  // Control-unit instructions.
  typedef enum logic [2:0] {
    I_HALT   = 3'd0,  // stop, raise done
    I_PASS   = 3'd1,  // stream one frame through the PE array
    I_LOOP   = 3'd2,  // repeat the body up to the matching I_ENDL 'count' times
    I_ENDL   = 3'd3,  // end of loop body
    I_UNTIL  = 3'd4,  // repeat the body until a pass reports no change (max 'count')
    I_SWAP   = 3'd5   // exchange source and destination SRAM
  } iop_e;

  typedef struct packed {
    iop_e        op;
    logic        in_place;  // I_PASS: write back into the source SRAM
    logic        cascade;   // I_PASS: chain the four pipelines into one of 36 MacroPEs
    logic [1:0]  cfg_set;   // I_PASS: MacroPE configuration set
    logic [7:0]  th_a;      // I_PASS: Th_a fed into the first MacroPE
    logic [7:0]  th_b;      // I_PASS: Th_b fed into the first MacroPE
    logic [9:0]  count;     // I_LOOP / I_UNTIL: iteration count / limit
  } instr_t;

endpackage
