// h264_intra_codec: H.264/AVC baseline intra codec core, luma 4x4 path.
//
// One datapath serves as encoder or decoder, chosen per macroblock by
// dec_mode (the switch multiplexers of the architecture):
//
//   encode: source buffer -> residual (source - prediction) -> forward 4x4
//           integer transform -> enhanced-SATD cost and mode decision (best
//           block kept in registers) -> quantizer -> coefficient ping-pong
//           buffer (port A) and -> de-quantizer -> inverse transform ->
//           reconstruction (prediction queued in a FIFO) -> boundary buffer
//   decode: coefficient ping-pong buffer (port A) -> de-quantizer -> inverse
//           transform -> reconstruction (prediction generated in step) ->
//           boundary buffer and source buffer (decoded pixels out)
//
// The entropy stage sits on port B of the coefficient buffer (ent_*): in
// encoding it reads the levels of the previous macroblock while this one is
// predicted, in decoding it writes the next macroblock's levels. The banks
// swap at each macroblock start. Level word layout: address 4*blk + row
// (blk = Z-scan index), bits [16*j +: 16] = level (row, j).
// Source buffer layout: word 4*y + x/4 holds pixels x..x+3 of luma row y,
// pixel x+k in bits [8*k +: 8]. The external port (ext_src_*) reaches the
// source buffer while the core is idle.
//
// Interface per macroblock: load the source (encode) or the levels (decode,
// through ent_* then start, which swaps them in), present the neighbour
// pixels / availability / neighbour modes, pulse start, wait for done. In
// decoding, dec_modes gives the 4x4 modes of the sixteen blocks (the output
// of the mode-syntax decoder); in encoding blk_modes returns the chosen ones.
// rec_mb is the reconstructed luma macroblock.
//
// fast_md (sampled at start) switches the encoder from trying every usable
// 4x4 mode to the modified three-step order of fast3step_md: at most seven
// modes, 28 cycles of prediction per block instead of 36. fast_vert shows
// the last decision.
//
// The eight-input transform (fwd_transform8) and the eight-pixel
// prediction generator (fast_intra_pred8) of the eight-pixel encoder
// variant are not part of this four-pixel loop; they sit beside it with
// their own t8_* and p8_* ports.
//
// QP is captured at start. In encoding it is QP_DEFAULT or qp_in
// (qp_override) and qpd_code / qpd_len give the signed Exp-Golomb code of
// mb_qp_delta (QP minus the previous macroblock's QP) for the bitstream. In
// decoding with qpd_from_stream, the QP is the previous QP plus the se(v)
// value parsed from hdr_win (modulo 52); hdr_len tells the parser how many
// bits it used.
//
// Timing (luma 4x4): per block 4 cycles of source read, 4 cycles per usable
// prediction mode, 6 cycles of pipeline drain, 4 cycles of quantization and
// 7 cycles until the last reconstructed row is in the boundary buffer: at
// most 930 cycles per encoded macroblock, 194 per decoded one.
//
// The data path, the ping-pong entropy interface, the removal of plane
// prediction and the enhanced-SATD cost follow the document; the memory
// layouts, the block-serial schedule and the QP interface are this design's.
// Lint reports rst_n as both synchronous and asynchronous: the
// asynchronous use is the flip-flop reset, the other is the disable-iff of
// the handshake assertions in the buffers, not logic.
//
// Scope: the intra 4x4 luma path is complete end to end. The blocks needed
// for 16x16 luma and chroma (16x16 DC accumulator, Hadamard and DC modes of
// the transforms, DC quantization, 16x16 / chroma cost accumulation) exist
// and are tested on their own but are not yet sequenced by the schedule
// controller, so their control inputs are tied off here.
module h264_intra_codec
  import h264_pkg::*;
#(
  parameter logic [5:0] QP_DEFAULT = 6'd28   // QP used when qp_override is low
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dec_mode,
  input  logic        fast_md,          // encode with the modified three-step mode decision
  input  logic        qp_override,
  input  logic [5:0]  qp_in,
  input  logic        qpd_from_stream,  // decode: QP = previous QP + se(hdr_win)
  input  logic [32:0] hdr_win,          // next stream bits, first bit in the MSB
  output logic [5:0]  hdr_len,          // bits of hdr_win used by mb_qp_delta
  output logic [16:0] qpd_code,         // encode: se(mb_qp_delta) code, right-aligned
  output logic [5:0]  qpd_len,          // its length in bits
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        fast_vert,        // last fast decision: vertical side
  // external access to the source buffer (while idle)
  input  logic        ext_src_en,
  input  logic        ext_src_we,
  input  logic [6:0]  ext_src_addr,
  input  logic [31:0] ext_src_wdata,
  output logic [31:0] ext_src_rdata,
  // macroblock neighbourhood (from the frame line buffer / previous macroblock)
  input  pix_t        top_line_in [20],
  input  pix_t        corner_in,
  input  pix_t        left_in [16],
  input  logic        avail_top_mb,
  input  logic        avail_left_mb,
  input  logic        avail_tr_mb,
  input  logic        avail_tl_mb,
  input  logic        left_from_prev,
  input  logic [3:0]  top_mb_modes [4],
  input  logic [3:0]  left_mb_modes [4],
  // modes
  input  logic [3:0]  dec_modes [16],
  output logic [3:0]  blk_modes [16],
  // entropy side of the coefficient buffer
  input  logic        ent_en,
  input  logic        ent_we,
  input  logic [6:0]  ent_addr,
  input  logic [63:0] ent_wdata,
  output logic [63:0] ent_rdata,
  // reconstructed macroblock
  output pix_t        rec_mb [16][16],
  // eight-pixel-parallel transform of the fast encoder variant, own ports
  input  logic        t8_in_valid,
  input  logic        t8_in_pair,
  input  coef_t       t8_in_rows [2][4],
  output logic        t8_out_valid,
  output logic        t8_out_pair,
  output coef_t       t8_out_rows [2][4],
  // eight-pixel prediction generator of the fast encoder variant, own ports
  input  logic        p8_in_valid,
  input  pred_mode_e  p8_mode,
  input  logic        p8_pair,
  input  pix_t        p8_top [8],
  input  pix_t        p8_left [4],
  input  pix_t        p8_corner,
  input  logic        p8_avail_top,
  input  logic        p8_avail_left,
  input  logic        p8_avail_tr,
  output logic        p8_out_valid,
  output logic        p8_out_pair,
  output pix_t        p8_pred [2][4]
);

  // QP per macroblock, captured at start. mb_qp_delta = QP - QP of the
  // previous macroblock is Exp-Golomb coded (encode) or parsed (decode).
  logic [5:0]  qp, qp_prev, qp_sel;
  logic [15:0] qpd_val, qpd_dec;
  logic [16:0] qpd_enc;
  logic [5:0]  qpd_enc_len;
  logic        hdr_err;
  logic signed [7:0] qp_sum;
  expgolomb_codec #(.VAL_W(16)) u_eg (
    .enc_signed(1'b1), .enc_val(qpd_val), .enc_code(qpd_enc), .enc_len(qpd_enc_len),
    .dec_signed(1'b1), .dec_win(hdr_win), .dec_val(qpd_dec), .dec_len(hdr_len), .dec_err(hdr_err)
  );
  always_comb begin
    // QP wraps modulo 52 as the standard's QP update does
    qp_sum = 8'(signed'({2'b00, qp_prev})) + 8'(signed'(qpd_dec)) + 8'sd52;
    if (dec_mode && qpd_from_stream && !hdr_err)
      qp_sel = 6'(qp_sum >= 8'sd104 ? qp_sum - 8'sd104 : qp_sum >= 8'sd52 ? qp_sum - 8'sd52 : qp_sum);
    else
      qp_sel = qp_override ? qp_in : QP_DEFAULT;
    qpd_val = 16'(signed'({1'b0, qp_sel})) - 16'(signed'({1'b0, qp_prev}));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qp <= QP_DEFAULT; qp_prev <= QP_DEFAULT; qpd_code <= '0; qpd_len <= '0;
    end else if (start && !busy) begin
      qp <= qp_sel; qp_prev <= qp_sel;
      qpd_code <= qpd_enc; qpd_len <= qpd_enc_len;
    end
  end

  // ---------------- controller ----------------
  logic dec_q, mb_init, src_rd, pg_valid, pg_first, pg_best, q_valid, blk_commit, cb_rd;
  logic [3:0] blk, mpm;
  logic [1:0] src_row, pg_row, q_row, cb_row;
  pred_mode_e pg_mode, best_mode;
  logic bb_avail_top, bb_avail_left, bb_avail_tr, bb_avail_corner;
  logic [3:0] fast_next;
  logic       fast_decided;

  schedule_ctrl u_ctrl (
    .clk, .rst_n, .start, .dec_mode, .fast(fast_md), .fast_next, .fast_decided, .busy, .done, .dec_q, .mb_init, .blk,
    .avail_top(bb_avail_top), .avail_left(bb_avail_left), .avail_corner(bb_avail_corner),
    .avail_top_mb, .avail_left_mb, .top_mb_modes, .left_mb_modes, .dec_modes,
    .best_mode, .blk_modes, .mpm, .src_rd, .src_row,
    .pg_valid, .pg_mode, .pg_row, .pg_first, .pg_best,
    .q_valid, .q_row, .blk_commit, .cb_rd, .cb_row
  );

  logic [1:0] bx, by;
  assign bx = {blk[2], blk[0]};
  assign by = {blk[3], blk[1]};

  // ---------------- boundary buffer ----------------
  pix_t nb_top [8], nb_left [4], nb_corner, mb_top [16], mb_left [16];
  logic mb_avail_top, mb_avail_left;
  logic rec_valid;
  logic [1:0] rec_idx;
  pix_t rec_row [4];

  boundary_buffer u_bb (
    .clk, .rst_n, .mb_load(mb_init), .left_from_prev, .top_line_in, .corner_in, .left_in,
    .avail_top_mb, .avail_left_mb, .avail_tr_mb, .avail_tl_mb,
    .wr_valid(rec_valid), .wr_blk(blk), .wr_row(rec_idx), .wr_pix(rec_row),
    .rd_blk(blk), .top(nb_top), .left(nb_left), .corner(nb_corner),
    .avail_top(bb_avail_top), .avail_left(bb_avail_left), .avail_tr(bb_avail_tr),
    .avail_corner(bb_avail_corner), .mb_top, .mb_left, .mb_avail_top, .mb_avail_left, .rec_mb
  );

  // ---------------- source buffer ----------------
  logic        sb_en, sb_we;
  logic [6:0]  sb_addr;
  logic [31:0] sb_wdata, sb_rdata;
  always_comb begin
    if (busy) begin
      sb_en    = src_rd || (dec_q && rec_valid);
      sb_we    = dec_q && rec_valid;
      sb_addr  = src_rd ? {1'b0, by, src_row, bx} : {1'b0, by, rec_idx, bx};
      sb_wdata = {rec_row[3], rec_row[2], rec_row[1], rec_row[0]};
    end else begin
      sb_en = ext_src_en; sb_we = ext_src_we; sb_addr = ext_src_addr; sb_wdata = ext_src_wdata;
    end
  end
  source_buffer #(.DEPTH(96), .WIDTH(32)) u_src (
    .clk, .en(sb_en), .we(sb_we), .addr(sb_addr), .wdata(sb_wdata), .rdata(sb_rdata)
  );
  assign ext_src_rdata = sb_rdata;

  // current source block registers
  logic       src_rd_d;
  logic [1:0] src_row_d;
  pix_t       src_blk [4][4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_rd_d <= 1'b0; src_row_d <= '0; src_blk <= '{default: '0};
    end else begin
      src_rd_d <= src_rd; src_row_d <= src_row;
      if (src_rd_d) for (int k = 0; k < 4; k++) src_blk[src_row_d][k] <= sb_rdata[8*k +: 8];
    end
  end

  // ---------------- intra prediction ----------------
  pix_t pred [4];
  logic pred_valid;
  pix_t acc_zero [4];
  assign acc_zero = '{default: '0};
  intra_pred_gen u_pred (
    .clk, .rst_n, .in_valid(pg_valid), .mode(pg_mode), .row(pg_row),
    .top(nb_top), .left(nb_left), .corner(nb_corner),
    .avail_top(bb_avail_top), .avail_left(bb_avail_left), .avail_tr(bb_avail_tr),
    .chroma_blk(2'd0), .acc_clr(mb_init), .acc_en(1'b0), .acc_top(acc_zero), .acc_left(acc_zero),
    .out_valid(pred_valid), .pred
  );

  // request tags, delayed by the generator's one cycle
  logic       pg_best_d, pg_first_d;
  logic [1:0] pg_row_d;
  pred_mode_e pg_mode_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pg_best_d <= 1'b0; pg_first_d <= 1'b0; pg_row_d <= '0; pg_mode_d <= I4_DC;
    end else begin
      pg_best_d <= pg_best; pg_first_d <= pg_first; pg_row_d <= pg_row; pg_mode_d <= pg_mode;
    end
  end

  // ---------------- residual and forward transform ----------------
  logic  ft_in_valid, ft_out_valid;
  coef_t resid [4], ft_row [4], dc_unused [16];
  logic [1:0] ft_idx;
  tr_kind_e ft_kind;
  always_comb begin
    ft_in_valid = pred_valid && !dec_q && !pg_best_d;
    for (int k = 0; k < 4; k++)
      resid[k] = coef_t'($signed({1'b0, src_blk[pg_row_d][k]})) - coef_t'($signed({1'b0, pred[k]}));
  end
  fwd_transform u_ft (
    .clk, .rst_n, .in_valid(ft_in_valid), .in_kind(TR_DCT), .in_dc_cap(1'b0), .in_dc_idx(4'd0),
    .in_row(resid), .out_valid(ft_out_valid), .out_idx(ft_idx), .out_kind(ft_kind),
    .out_row(ft_row), .dc_reg(dc_unused)
  );

  // candidate tags follow the transform's row latency (five sampling edges)
  pred_mode_e tag_mode [5];
  logic       tag_first [5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_mode <= '{default: I4_DC}; tag_first <= '{default: 1'b0};
    end else begin
      tag_mode[0] <= pg_mode_d; tag_first[0] <= pg_first_d;
      for (int k = 1; k < 5; k++) begin tag_mode[k] <= tag_mode[k-1]; tag_first[k] <= tag_first[k-1]; end
    end
  end

  // ---------------- cost generation and mode decision ----------------
  coef_t best_block [4][4];
  cost_t cand_cost, best_cost, i4_total, best16_cost, bestc_cost;
  logic  cost_valid, use_i16;
  pred_mode_e best16_mode, bestc_mode;
  cost_mode_decision u_md (
    .clk, .rst_n, .lambda(lambda_of(qp)), .mb_clr(mb_init),
    .in_valid(ft_out_valid), .in_idx(ft_idx), .in_row(ft_row),
    .in_mode(tag_mode[4]), .in_first(tag_first[4]), .in_mpm(mpm), .blk_commit,
    .avail16({1'b1, mb_avail_left, mb_avail_top}), .availc(3'b111),
    .cost_valid, .cost(cand_cost), .best_mode, .best_cost, .best_block,
    .i4_total, .best16_mode, .best16_cost, .use_i16, .bestc_mode, .bestc_cost
  );

  // ---------------- modified three-step fast mode order ----------------
  // mode of the candidate whose cost the cost unit reports next cycle
  pred_mode_e cost_mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cost_mode_q <= I4_V;
    else if (ft_out_valid && ft_idx == 2'd3) cost_mode_q <= tag_mode[4];
  end
  fast3step_md u_fast (
    .clk, .rst_n, .blk_start(src_rd && src_row == 2'd0),
    .cost_valid, .cost_mode(cost_mode_q), .cost(cand_cost),
    .avail_top(bb_avail_top), .avail_left(bb_avail_left), .avail_corner(bb_avail_corner),
    .cur_mode(4'(pg_mode)), .next(fast_next), .decided(fast_decided), .vert(fast_vert)
  );

  // ---------------- quantization ----------------
  logic q_out_valid;
  logic [1:0] q_out_idx;
  lev_t lev [4];
  quantizer u_q (
    .clk, .rst_n, .qp, .in_valid(q_valid), .in_dc(1'b0), .in_idx(q_row),
    .in_row(best_block[q_row]), .out_valid(q_out_valid), .out_idx(q_out_idx), .out_lev(lev)
  );

  // ---------------- coefficient ping-pong buffer ----------------
  logic        cb_en, cb_we, bank_sel;
  logic [6:0]  cb_addr;
  logic [63:0] cb_wdata, cb_rdata;
  always_comb begin
    cb_en    = (q_out_valid && !dec_q) || cb_rd;
    cb_we    = q_out_valid && !dec_q;
    cb_addr  = cb_we ? {1'b0, blk, q_out_idx} : {1'b0, blk, cb_row};
    cb_wdata = {lev[3], lev[2], lev[1], lev[0]};
  end
  coef_buffer #(.DEPTH(104), .WIDTH(64)) u_cb (
    .clk, .rst_n, .swap(mb_init), .bank_sel,
    .a_en(cb_en), .a_we(cb_we), .a_addr(cb_addr), .a_wdata(cb_wdata), .a_rdata(cb_rdata),
    .b_en(ent_en), .b_we(ent_we), .b_addr(ent_addr), .b_wdata(ent_wdata), .b_rdata(ent_rdata)
  );

  logic       cb_rd_d;
  logic [1:0] cb_row_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin cb_rd_d <= 1'b0; cb_row_d <= '0; end
    else begin cb_rd_d <= cb_rd; cb_row_d <= cb_row; end
  end

  // ---------------- de-quantization and inverse transform ----------------
  logic  dq_in_valid, dq_out_valid, it_out_valid;
  logic [1:0] dq_in_idx, dq_out_idx, it_idx;
  coef_t dq_in [4], dq_out [4], it_row [4];
  tr_kind_e it_kind;
  always_comb begin
    dq_in_valid = dec_q ? cb_rd_d : q_out_valid;
    dq_in_idx   = dec_q ? cb_row_d : q_out_idx;
    for (int k = 0; k < 4; k++)
      dq_in[k] = dec_q ? coef_t'($signed(cb_rdata[16*k +: 16])) : coef_t'(lev[k]);
  end
  dequantizer u_dq (
    .clk, .rst_n, .qp, .in_valid(dq_in_valid), .in_kind(2'd0), .in_idx(dq_in_idx),
    .in_row(dq_in), .out_valid(dq_out_valid), .out_idx(dq_out_idx), .out_row(dq_out)
  );
  inv_transform u_it (
    .clk, .rst_n, .in_valid(dq_out_valid), .in_kind(TR_DCT), .in_row(dq_out),
    .out_valid(it_out_valid), .out_idx(it_idx), .out_kind(it_kind), .out_row(it_row)
  );

  // ---------------- reconstruction ----------------
  logic fifo_empty, fifo_full;
  recon_unit #(.DEPTH(8)) u_rec (
    .clk, .rst_n, .use_fifo(!dec_q), .pred_push(pred_valid && pg_best_d && !dec_q),
    .pred_in(pred), .pred_direct(pred),
    .res_valid(it_out_valid), .res_idx(it_idx), .res_row(it_row),
    .rec_valid, .rec_idx, .rec_row, .fifo_empty, .fifo_full
  );


  // ---------------- eight-pixel transform (fast encoder variant) ----------------
  fwd_transform8 u_t8 (
    .clk, .rst_n, .in_valid(t8_in_valid), .in_pair(t8_in_pair), .in_rows(t8_in_rows),
    .out_valid(t8_out_valid), .out_pair(t8_out_pair), .out_rows(t8_out_rows)
  );

  // ---------------- eight-pixel prediction (fast encoder variant) ----------------
  fast_intra_pred8 u_p8 (
    .clk, .rst_n, .in_valid(p8_in_valid), .mode(p8_mode), .pair(p8_pair),
    .top(p8_top), .left(p8_left), .corner(p8_corner),
    .avail_top(p8_avail_top), .avail_left(p8_avail_left), .avail_tr(p8_avail_tr),
    .out_valid(p8_out_valid), .out_pair(p8_out_pair), .pred(p8_pred)
  );

endmodule
