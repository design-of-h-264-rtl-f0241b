// schedule_ctrl: schedule control unit of the intra codec (luma 4x4 path).
//
// A counter-driven state machine that walks the sixteen 4x4 luma blocks of a
// macroblock in Z-scan order, in encoding or decoding mode (dec_mode, the
// codec's mode switch, sampled at start).
//
// Encoding, per block (fixed latencies of the datapath, no handshakes):
//   SRC    4 cycles  read the block's four source rows from the source buffer
//   PRED   4/mode    request prediction rows for each usable 4x4 mode, back
//                    to back; the datapath turns them into residuals, the
//                    forward transform and the cost unit follow
//   DRAIN  6 cycles  the last candidate's cost reaches the mode decision
//   QUANT  4 cycles  best block rows go to the quantizer; the prediction of
//                    the best mode is generated again into the recon FIFO
//   RWAIT  7 cycles  levels pass de-quantization, inverse transform and
//                    reconstruction into the boundary buffer
// Decoding, per block:
//   DRD    4 cycles  read the block's four level rows from the coefficient
//                    buffer; prediction requests follow six cycles later so
//                    that prediction and residual meet in the adder
//   DWAIT  7 cycles  reconstruction completes
// A macroblock start (INIT) loads the boundary buffer, swaps the ping-pong
// coefficient buffer and clears the macroblock cost sums.
//
// With fast set, the candidates follow the modified three-step order of
// fast3step_md (at most seven modes) instead of all nine.
// Modes whose reference samples are missing are skipped (vertical, DDL, VL
// need the row above; horizontal, HU the left column; DDR, VR, HD both and
// the corner). The most probable mode is min(left mode, upper mode), or DC
// when either neighbour is missing. This simple sequential schedule (no early
// start of the next block, no 16x16 / chroma insertion) is this design's
// choice; the document's own schedule overlaps those steps.
module schedule_ctrl
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        dec_mode,
  input  logic        fast,           // modified three-step mode order (sampled at start)
  input  logic [3:0]  fast_next,      // next mode in that order after pg_mode
  input  logic        fast_decided,   // its vertical/horizontal decision is known
  output logic        busy,
  output logic        done,
  output logic        dec_q,          // mode of the macroblock in progress
  // macroblock set-up
  output logic        mb_init,        // one-cycle pulse at macroblock start
  // current block and its neighbourhood
  output logic [3:0]  blk,
  input  logic        avail_top,
  input  logic        avail_left,
  input  logic        avail_corner,
  input  logic        avail_top_mb,
  input  logic        avail_left_mb,
  input  logic [3:0]  top_mb_modes [4],
  input  logic [3:0]  left_mb_modes [4],
  input  logic [3:0]  dec_modes [16],
  input  pred_mode_e  best_mode,
  output logic [3:0]  blk_modes [16],
  output logic [3:0]  mpm,
  // encoder source read
  output logic        src_rd,
  output logic [1:0]  src_row,
  // prediction requests
  output logic        pg_valid,
  output pred_mode_e  pg_mode,
  output logic [1:0]  pg_row,
  output logic        pg_first,       // row belongs to the first candidate
  output logic        pg_best,        // request is the best-mode regeneration
  // quantizer feed and commit
  output logic        q_valid,
  output logic [1:0]  q_row,
  output logic        blk_commit,
  // decoder coefficient read
  output logic        cb_rd,
  output logic [1:0]  cb_row
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_SRC, S_PRED, S_DRAIN, S_QUANT, S_RWAIT, S_DRD, S_DWAIT, S_NEXT
  } state_e;
  state_e st;
  logic [3:0] cnt;
  logic [3:0] mode;       // current candidate mode 0..8
  logic       first_cand;
  logic       fast_q;
  logic [3:0] nmode;
  logic [5:0] dpg;        // decoder prediction-request delay line
  logic [1:0] dpg_row [6];

  function automatic logic usable(input logic [3:0] m, input logic t, input logic l, input logic c);
    unique case (m)
      4'd0, 4'd3, 4'd7: return t;
      4'd1, 4'd8:       return l;
      4'd2:             return 1'b1;
      default:          return t && l && c;
    endcase
  endfunction

  // next usable mode after m (9 = none)
  function automatic logic [3:0] next_mode(input logic [3:0] m, input logic t, input logic l, input logic c);
    logic [3:0] r;
    r = 4'd9;
    for (int k = 8; k >= 0; k--)
      if (4'(k) > m && usable(4'(k), t, l, c)) r = 4'(k);
    return r;
  endfunction

  // most probable mode of the current block
  logic [1:0] bx, by;
  logic       a_ok, b_ok;
  logic [3:0] ma, mb;
  always_comb begin
    bx = {blk[2], blk[0]};
    by = {blk[3], blk[1]};
    // left neighbour
    if (bx != 2'd0) begin a_ok = 1'b1; ma = blk_modes[{by[1], bx[1] ^ (bx[0] ? 1'b0 : 1'b1), by[0], ~bx[0]}]; end
    else begin a_ok = avail_left_mb; ma = left_mb_modes[by]; end
    // upper neighbour
    if (by != 2'd0) begin b_ok = 1'b1; mb = blk_modes[{by[1] ^ (by[0] ? 1'b0 : 1'b1), bx[1], ~by[0], bx[0]}]; end
    else begin b_ok = avail_top_mb; mb = top_mb_modes[bx]; end
    mpm = (a_ok && b_ok) ? ((ma < mb) ? ma : mb) : 4'd2;
  end

  // next candidate: all usable modes in order, or the fast order
  always_comb nmode = fast_q ? fast_next : next_mode(mode, avail_top, avail_left, avail_corner);

  // the fast order's pair must not be chosen before its decision is known
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_PRED && cnt[1:0] == 2'd3 && fast_q && nmode >= 4'd5 && nmode != 4'd9) |-> fast_decided)
    else $error("fast mode decision not ready");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; mode <= '0; first_cand <= 1'b0;
      blk <= '0; dec_q <= 1'b0; done <= 1'b0; fast_q <= 1'b0;
      blk_modes <= '{default: 4'd2};
      dpg <= '0; dpg_row <= '{default: '0};
    end else begin
      done <= 1'b0;
      dpg <= {dpg[4:0], cb_rd};
      dpg_row[0] <= cb_row;
      for (int k = 1; k < 6; k++) dpg_row[k] <= dpg_row[k-1];
      unique case (st)
        S_IDLE: if (start) begin st <= S_INIT; dec_q <= dec_mode; fast_q <= fast; end
        S_INIT: begin
          blk <= '0; cnt <= '0;
          st <= dec_q ? S_DRD : S_SRC;
        end
        S_SRC: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd3) begin
            cnt <= '0;
            mode <= usable(4'd0, avail_top, avail_left, avail_corner) ? 4'd0
                                                                      : next_mode(4'd0, avail_top, avail_left, avail_corner);
            first_cand <= 1'b1;
            st <= S_PRED;
          end
        end
        S_PRED: begin
          cnt <= cnt + 4'd1;
          if (cnt[1:0] == 2'd3) begin
            cnt <= '0;
            first_cand <= 1'b0;
            if (nmode == 4'd9) st <= S_DRAIN;
            else mode <= nmode;
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd5) begin cnt <= '0; st <= S_QUANT; end
        end
        S_QUANT: begin
          if (cnt == 4'd0) blk_modes[blk] <= 4'(best_mode);
          cnt <= cnt + 4'd1;
          if (cnt == 4'd3) begin cnt <= '0; st <= S_RWAIT; end
        end
        S_RWAIT: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd6) begin cnt <= '0; st <= S_NEXT; end
        end
        S_DRD: begin
          if (cnt == 4'd0) blk_modes[blk] <= dec_modes[blk];
          cnt <= cnt + 4'd1;
          if (cnt == 4'd3) begin cnt <= '0; st <= S_DWAIT; end
        end
        S_DWAIT: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd6) begin cnt <= '0; st <= S_NEXT; end
        end
        S_NEXT: begin
          if (blk == 4'd15) begin st <= S_IDLE; done <= 1'b1; end
          else begin
            blk <= blk + 4'd1;
            st <= dec_q ? S_DRD : S_SRC;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy     = (st != S_IDLE);
    mb_init  = (st == S_INIT);
    src_rd   = (st == S_SRC);
    src_row  = cnt[1:0];
    q_valid  = (st == S_QUANT);
    q_row    = cnt[1:0];
    blk_commit = (st == S_QUANT) && (cnt == 4'd0);
    cb_rd    = (st == S_DRD);
    cb_row   = cnt[1:0];
    pg_valid = 1'b0; pg_mode = I4_DC; pg_row = '0; pg_first = 1'b0; pg_best = 1'b0;
    if (st == S_PRED) begin
      pg_valid = 1'b1; pg_mode = pred_mode_e'(mode); pg_row = cnt[1:0]; pg_first = first_cand;
    end else if (st == S_QUANT) begin
      pg_valid = 1'b1; pg_mode = best_mode; pg_row = cnt[1:0]; pg_best = 1'b1;
    end else if (dpg[5]) begin
      pg_valid = 1'b1; pg_mode = pred_mode_e'(blk_modes[blk]); pg_row = dpg_row[5];
    end
  end

endmodule
