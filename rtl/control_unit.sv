// control_unit: instruction sequencer of the accelerator.
//
// The host writes a short program (prog_*) and the MacroPE configuration sets
// (cfg_*), then pulses start. The unit then runs the program without the host:
//  * I_PASS streams the whole tile (W*H pixels, all banks in parallel) from
//    the source SRAM through the PE array into the destination SRAM, using
//    configuration set cfg_set and thresholds th_a/th_b. Without in_place the
//    destination is the other SRAM and becomes the source of the next pass
//    (ping-pong, SRAM0 -> SRAM1 -> SRAM0 ...). With in_place the result is
//    written back over the source: the write address trails the read address
//    by the array latency, and every pixel still needed sits in the PEs' line
//    delays, so no extra memory is used.
//  * I_LOOP count ... I_ENDL repeats the body count times with no host
//    involvement and no cycles spent on the jump beyond one fetch
//    (zero-overhead loop).
//  * I_UNTIL limit ... I_ENDL repeats the body until a pass leaves every pixel
//    unchanged, or limit times (self-control: iterate "until no change").
//  * I_SWAP exchanges source and destination; I_HALT ends the program.
// Loops do not nest. The program starts with SRAM0 as source.
//
// Array side: rd_en/rd_addr/rd_sof read the source SRAM (the caller delays
// them by the SRAM read latency); each cycle with arr_we the next write
// address wr_addr is used. last_change holds the change flag of the latest
// pass, pass_count counts passes since start, done pulses at I_HALT.
//
// The document gives the control unit's duties (instructions to the PE array,
// zero-overhead loop, in-place operation, self-control); the instruction set,
// program memory and configuration sets are this design's own.
//
// rst_n is the flip-flops' asynchronous reset and also the disable condition
// of the assertion below; a linter may report the reset as used both
// synchronously and asynchronously. The assertion is checking code only,
// so the circuit is unaffected.
module control_unit
  import morph_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned N          = 9,
  parameter int unsigned W          = 106,
  parameter int unsigned H          = 240,
  parameter int unsigned PROG_DEPTH = 32,
  localparam int unsigned NPIX      = W * H,
  localparam int unsigned AW        = $clog2(NPIX),
  localparam int unsigned PW        = $clog2(PROG_DEPTH),
  localparam int unsigned CW        = $clog2(ROWS * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host programming
  input  logic          prog_we,
  input  logic [PW-1:0] prog_addr,
  input  instr_t        prog_wdata,
  input  logic          cfg_we,
  input  logic [1:0]    cfg_set,
  input  logic [CW-1:0] cfg_idx,    // row * N + stage
  input  mpe_cfg_t      cfg_wdata,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          last_change,
  output logic [15:0]   pass_count,
  // PE array
  output mpe_cfg_t      arr_cfg [ROWS][N],
  output logic          cascade,
  output logic [7:0]    th_a,
  output logic [7:0]    th_b,
  input  logic          arr_change,
  input  logic          arr_we,
  // SRAM addressing
  output logic          src,
  output logic          dst,
  output logic          rd_en,
  output logic          rd_sof,
  output logic [AW-1:0] rd_addr,
  output logic [AW-1:0] wr_addr
);
  localparam int unsigned NCFG = ROWS * N;

  instr_t   prog    [PROG_DEPTH];
  mpe_cfg_t cfg_mem [4][NCFG];

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
    if (cfg_we)  cfg_mem[cfg_set][cfg_idx] <= cfg_wdata;
  end

  typedef enum logic [1:0] {C_IDLE, C_FETCH, C_PASS, C_CLOSE} cstate_e;
  cstate_e       st;
  logic [PW-1:0] pc, loop_pc;
  logic [9:0]    loop_lim, loop_iter;
  logic          loop_until, in_place;
  logic [1:0]    set_q;
  logic [AW:0]   rd_cnt, wr_cnt;
  instr_t        ir;

  assign ir = prog[pc];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= C_IDLE;
      pc          <= '0;
      loop_pc     <= '0;
      loop_lim    <= '0;
      loop_iter   <= '0;
      loop_until  <= 1'b0;
      in_place    <= 1'b0;
      set_q       <= '0;
      cascade     <= 1'b0;
      th_a        <= '0;
      th_b        <= '0;
      src         <= 1'b0;
      dst         <= 1'b1;
      rd_cnt      <= '0;
      wr_cnt      <= '0;
      done        <= 1'b0;
      last_change <= 1'b0;
      pass_count  <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        C_IDLE:
          if (start) begin
            st         <= C_FETCH;
            pc         <= '0;
            src        <= 1'b0;
            pass_count <= '0;
          end
        C_FETCH: begin
          pc <= pc + 1'b1;
          case (ir.op)
            I_HALT: begin
              st   <= C_IDLE;
              done <= 1'b1;
            end
            I_PASS: begin
              st       <= C_PASS;
              in_place <= ir.in_place;
              dst      <= ir.in_place ? src : !src;
              cascade  <= ir.cascade;
              set_q    <= ir.cfg_set;
              th_a     <= ir.th_a;
              th_b     <= ir.th_b;
              rd_cnt   <= '0;
              wr_cnt   <= '0;
            end
            I_LOOP, I_UNTIL: begin
              loop_pc    <= pc + 1'b1;
              loop_lim   <= ir.count;
              loop_iter  <= '0;
              loop_until <= ir.op == I_UNTIL;
            end
            I_ENDL: begin
              loop_iter <= loop_iter + 1'b1;
              if (!((loop_iter + 1'b1 >= loop_lim) || (loop_until && !last_change)))
                pc <= loop_pc;
            end
            I_SWAP: src <= !src;
            default: begin
              st   <= C_IDLE;
              done <= 1'b1;
            end
          endcase
        end
        C_PASS: begin
          if (rd_cnt != (AW+1)'(NPIX)) rd_cnt <= rd_cnt + 1'b1;
          if (arr_we) begin
            wr_cnt <= wr_cnt + 1'b1;
            if (wr_cnt == (AW+1)'(NPIX - 1)) st <= C_CLOSE;
          end
        end
        C_CLOSE: begin
          // the last pixel has left the array: every change flag is final
          last_change <= arr_change;
          pass_count  <= pass_count + 1'b1;
          if (!in_place) src <= dst;
          st <= C_FETCH;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    busy    = st != C_IDLE;
    rd_en   = (st == C_PASS) && (rd_cnt != (AW+1)'(NPIX));
    rd_sof  = rd_en && (rd_cnt == '0);
    rd_addr = rd_cnt[AW-1:0];
    wr_addr = wr_cnt[AW-1:0];
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < N; s++)
        arr_cfg[r][s] = cfg_mem[set_q][r * N + s];
  end

  // a pass's results all land in the destination before the next instruction
  a_no_stray_write: assert property (@(posedge clk) disable iff (!rst_n)
    arr_we |-> st == C_PASS);
endmodule
