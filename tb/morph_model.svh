// morph_model.svh: behavioural reference of one MacroPE over a whole tile,
// shared by the array-level testbenches. Written from the operation
// definitions, not from the RTL structure: a neighbour counts when it lies in
// the tile and in the structuring element; dilation is the max and erosion the
// min over the counted neighbours and the centre; conditional dilation/erosion
// take min/max with Ref; masked operations apply only where
// th_a <= Ref <= th_b. The interconnect then selects halves, computes
// hi-lo (clamped) or hi+lo (saturated), thresholds by the mask, selects the
// next Ref and increments the thresholds. Images are flat arrays, index y*w+x.

function automatic int mm_val(morph_pkg::pix_t p, int lane, bit m16);
  if (m16) return int'(p.data);
  return lane ? int'(p.data[15:8]) : int'(p.data[7:0]);
endfunction

function automatic void mm_macro_pe(input morph_pkg::pix_t img[], input int w, input int h,
                                    input morph_pkg::mpe_cfg_t c,
                                    input logic [7:0] ta, input logic [7:0] tb,
                                    output morph_pkg::pix_t res[],
                                    output logic [7:0] ta_o, output logic [7:0] tb_o,
                                    output bit changed);
  res = new[w * h];
  changed = 0;
  for (int y = 0; y < h; y++)
    for (int x = 0; x < w; x++) begin
      morph_pkg::pix_t p = img[y * w + x];
      logic [15:0] pe_out;
      bit m = p.ref_px >= ta && p.ref_px <= tb;
      int hi, lo, ar, nhi, nlo;
      for (int lane = 0; lane < 2; lane++) begin
        bit m16 = c.pe.mode16;
        morph_pkg::morph_op_e op = (lane == 1 || m16) ? c.pe.op_hi : c.pe.op_lo;
        morph_pkg::se_e se = (lane == 1 || m16) ? c.pe.se_hi : c.pe.se_lo;
        int ctr, mx, mn, rv, r;
        if (m16 && lane == 0) continue;
        if (!c.pe.activated) op = morph_pkg::OP_NOP;
        ctr = mm_val(p, lane, m16);
        mx = ctr; mn = ctr;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            int v;
            if (y + dy < 0 || y + dy >= h || x + dx < 0 || x + dx >= w) continue;
            if (se == morph_pkg::SE_CROSS && dy != 0 && dx != 0) continue;
            v = mm_val(img[(y + dy) * w + x + dx], lane, m16);
            if (v > mx) mx = v;
            if (v < mn) mn = v;
          end
        rv = int'(p.ref_px);
        case (op)
          morph_pkg::OP_DIL:  r = mx;
          morph_pkg::OP_ERO:  r = mn;
          morph_pkg::OP_CDIL: r = mx < rv ? mx : rv;
          morph_pkg::OP_CERO: r = mn > rv ? mn : rv;
          morph_pkg::OP_MDIL: r = m ? mx : ctr;
          morph_pkg::OP_MERO: r = m ? mn : ctr;
          default:            r = ctr;
        endcase
        if (m16) pe_out = 16'(r);
        else if (lane) pe_out[15:8] = 8'(r);
        else pe_out[7:0] = 8'(r);
      end
      if (pe_out != p.data) changed = 1;
      hi = int'(pe_out[15:8]);
      lo = int'(pe_out[7:0]);
      ar = c.ic.sub ? (hi > lo ? hi - lo : 0) : (hi + lo > 255 ? 255 : hi + lo);
      case (c.ic.hsel)
        morph_pkg::DSEL_OTHER: nhi = lo;
        morph_pkg::DSEL_ARITH: nhi = ar;
        morph_pkg::DSEL_THR:   nhi = m ? 255 : 0;
        morph_pkg::DSEL_REF:   nhi = int'(p.ref_px);
        default:               nhi = hi;
      endcase
      case (c.ic.lsel)
        morph_pkg::DSEL_OTHER: nlo = hi;
        morph_pkg::DSEL_ARITH: nlo = ar;
        morph_pkg::DSEL_THR:   nlo = m ? 255 : 0;
        morph_pkg::DSEL_REF:   nlo = int'(p.ref_px);
        default:               nlo = lo;
      endcase
      res[y * w + x].data = c.ic.pass16 ? pe_out : {8'(nhi), 8'(nlo)};
      case (c.ic.rsel)
        morph_pkg::RSEL_NOT:   res[y * w + x].ref_px = ~p.ref_px;
        morph_pkg::RSEL_ARITH: res[y * w + x].ref_px = 8'(ar);
        morph_pkg::RSEL_LO:    res[y * w + x].ref_px = 8'(lo);
        default:               res[y * w + x].ref_px = p.ref_px;
      endcase
    end
  ta_o = (c.ic.inc_a && ta != 8'hFF) ? ta + 8'd1 : ta;
  tb_o = (c.ic.inc_b && tb != 8'hFF) ? tb + 8'd1 : tb;
endfunction

// A random but meaningful MacroPE configuration.
function automatic morph_pkg::mpe_cfg_t mm_random_cfg();
  morph_pkg::mpe_cfg_t c;
  c.pe.activated = ($urandom_range(0, 5) != 0);
  c.pe.mode16    = 1'($urandom);
  c.pe.op_hi     = morph_pkg::morph_op_e'($urandom_range(0, 6));
  c.pe.se_hi     = morph_pkg::se_e'($urandom_range(0, 1));
  c.pe.op_lo     = morph_pkg::morph_op_e'($urandom_range(0, 6));
  c.pe.se_lo     = morph_pkg::se_e'($urandom_range(0, 1));
  c.ic.pass16    = 1'($urandom);
  c.ic.hsel      = morph_pkg::dsel_e'($urandom_range(0, 4));
  c.ic.lsel      = morph_pkg::dsel_e'($urandom_range(0, 4));
  c.ic.sub       = 1'($urandom);
  c.ic.rsel      = morph_pkg::rsel_e'($urandom_range(0, 3));
  c.ic.inc_a     = 1'($urandom);
  c.ic.inc_b     = 1'($urandom);
  return c;
endfunction
