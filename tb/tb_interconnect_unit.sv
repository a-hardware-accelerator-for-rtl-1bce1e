// tb_interconnect_unit: drives random inputs and random configurations into
// the programmable interconnection unit and compares every output, one cycle
// later, with a model of the selections: data halves (same, other, hi-lo
// clamped / hi+lo saturated, 0/255 by Mask, Ref), 16-bit pass, Ref selection
// (Ref, inverted, arithmetic, low half) and the optional +1 on both
// thresholds (saturating at 255).
`timescale 1ns/1ps
module tb_interconnect_unit;
  import morph_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ic_cfg_t     cfg;
  logic        in_valid, in_sof, in_mask, out_valid, out_sof;
  logic [15:0] in_data, out_data;
  logic [7:0]  in_ref, in_th_a, in_th_b, out_ref, out_th_a, out_th_b;

  interconnect_unit dut (.*);

  int checks = 0, failures = 0;

  function automatic int half(int sel, int same, int other, int a, int t, int r);
    case (sel)
      1: return other;
      2: return a;
      3: return t;
      4: return r;
      default: return same;
    endcase
  endfunction

  initial begin
    int hi, lo, ar, ehi, elo, eref, eta, etb;
    logic [15:0] edata;
    cfg = '0; in_valid = 0; in_sof = 0; in_mask = 0; in_data = 0; in_ref = 0;
    in_th_a = 0; in_th_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg.pass16 = ($urandom_range(0, 4) == 0);
      cfg.hsel   = dsel_e'($urandom_range(0, 4));
      cfg.lsel   = dsel_e'($urandom_range(0, 4));
      cfg.sub    = 1'($urandom);
      cfg.rsel   = rsel_e'($urandom_range(0, 3));
      cfg.inc_a  = 1'($urandom);
      cfg.inc_b  = 1'($urandom);
      in_valid = 1'($urandom); in_sof = 1'($urandom); in_mask = 1'($urandom);
      in_data = 16'($urandom); in_ref = 8'($urandom);
      in_th_a = (i % 50 == 0) ? 8'hFF : 8'($urandom); in_th_b = 8'($urandom);
      hi = int'(in_data[15:8]); lo = int'(in_data[7:0]);
      ar = cfg.sub ? (hi > lo ? hi - lo : 0) : (hi + lo > 255 ? 255 : hi + lo);
      ehi = half(int'(cfg.hsel), hi, lo, ar, in_mask ? 255 : 0, int'(in_ref));
      elo = half(int'(cfg.lsel), lo, hi, ar, in_mask ? 255 : 0, int'(in_ref));
      edata = cfg.pass16 ? in_data : {8'(ehi), 8'(elo)};
      case (cfg.rsel)
        RSEL_NOT:   eref = 255 - int'(in_ref);
        RSEL_ARITH: eref = ar;
        RSEL_LO:    eref = lo;
        default:    eref = int'(in_ref);
      endcase
      eta = (cfg.inc_a && in_th_a != 255) ? int'(in_th_a) + 1 : int'(in_th_a);
      etb = (cfg.inc_b && in_th_b != 255) ? int'(in_th_b) + 1 : int'(in_th_b);
      @(posedge clk);
      #1;
      checks++;
      if (out_data !== edata || out_ref !== 8'(eref) || out_th_a !== 8'(eta) ||
          out_th_b !== 8'(etb) || out_valid !== in_valid || out_sof !== in_sof) begin
        failures++;
        if (failures < 5)
          $display("FAIL i=%0d cfg=%p data %h/%h ref %h/%h", i, cfg, out_data, edata, out_ref, 8'(eref));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
