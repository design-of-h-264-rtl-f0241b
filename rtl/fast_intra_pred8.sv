// fast_intra_pred8: eight-pixel-parallel 4x4 intra prediction generator of
// the eight-pixel encoder variant.
//
// Two four-pixel prediction engines (intra_pred_gen) work side by side on
// the same reference samples: engine A produces row 2*pair, engine B row
// 2*pair+1, so a 4x4 block is predicted in two cycles (pair 0, then pair
// 1). DC prediction is the same value for every row, so only engine A's DC
// result is used and it is copied to both output rows; engine B's average
// path is never selected.
//
// Interface: in_valid, mode (4x4 luma modes 0-8), pair and the thirteen
// reference samples with their availability, as for intra_pred_gen; one
// cycle later out_valid, out_pair and pred[2][4] (pred[0] = even row,
// pred[1] = odd row). The 16x16 / chroma inputs of the engines are unused
// here and tied off.
//
// Two duplicated four-pixel engines with one shared DC datapath follow the
// document. The document keeps the odd-row DC path; engine A (rows 0 and 2,
// the odd rows when counting from 1) is taken to be that one.
module fast_intra_pred8
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,  // request for one row pair
  input  pred_mode_e  mode,
  input  logic        pair,
  input  pix_t        top [8],
  input  pix_t        left [4],
  input  pix_t        corner,
  input  logic        avail_top,
  input  logic        avail_left,
  input  logic        avail_tr,
  output logic        out_valid, // row pair valid, one cycle after the request
  output logic        out_pair,
  output pix_t        pred [2][4]  // two predicted rows: [0] even row, [1] odd row
);
  pix_t       pa [4], pb [4];
  logic       va, vb;
  pred_mode_e mode_q;
  pix_t       no_acc [4];
  assign no_acc = '{default: '0};

  intra_pred_gen u_a (
    .clk, .rst_n, .in_valid, .mode, .row({pair, 1'b0}), .top, .left, .corner,
    .avail_top, .avail_left, .avail_tr, .chroma_blk(2'd0),
    .acc_clr(1'b0), .acc_en(1'b0), .acc_top(no_acc), .acc_left(no_acc),
    .out_valid(va), .pred(pa)
  );
  intra_pred_gen u_b (
    .clk, .rst_n, .in_valid, .mode, .row({pair, 1'b1}), .top, .left, .corner,
    .avail_top, .avail_left, .avail_tr, .chroma_blk(2'd0),
    .acc_clr(1'b0), .acc_en(1'b0), .acc_top(no_acc), .acc_left(no_acc),
    .out_valid(vb), .pred(pb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin mode_q <= I4_V; out_pair <= 1'b0; end
    else if (in_valid) begin mode_q <= mode; out_pair <= pair; end
  end

  always_comb begin
    out_valid = va && vb;
    pred[0] = pa;
    pred[1] = (mode_q == I4_DC) ? pa : pb;
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> mode <= I4_HU)
    else $error("fast_intra_pred8: only 4x4 luma modes");
endmodule
