// fwd_transform8: eight-input forward 4x4 integer transform of the
// eight-pixel-parallel encoder variant.
//
// A block enters as two row pairs on consecutive cycles (rows 0-1, then
// rows 2-3, four residuals each). Two row-transform units work on the two
// incoming rows in parallel; the first pair is held for one cycle, so when
// the second pair arrives all four row-transformed rows are present and the
// two column-transform stages produce the four output rows. Output rows 0-1
// leave the cycle after the second pair is accepted, rows 2-3 one cycle
// later: a two-cycle transpose delay, and a new block may enter every two
// cycles without a gap (the held rows 2-3 and the incoming pair use
// separate registers).
//
// Interface: in_valid with in_pair (0: rows 0-1, 1: rows 2-3) and
// in_rows[2][4]; out_valid with out_pair and out_rows[2][4]. Coefficients
// are Y = C X C^T with the H.264 integer core matrix, not scaled.
//
// Eight-pixel parallelism, two row and two column transform units and the
// two-cycle delay of the transpose follow the document; the register
// arrangement (hold one pair, compute columns from four rows at once) is
// this design's equivalent of its 2x2x2x2 transpose array, and the unit
// handles the integer DCT only.
module fwd_transform8
  import h264_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_pair,
  input  coef_t in_rows [2][4],
  output logic  out_valid,
  output logic  out_pair,
  output coef_t out_rows [2][4]
);
  localparam int IW = COEF_W + 3;
  typedef logic signed [IW-1:0] wide_t;

  function automatic void dct4(input wide_t x [4], output wide_t y [4]);
    wide_t s0, s1, d0, d1;
    s0 = x[0] + x[3]; s1 = x[1] + x[2];
    d0 = x[0] - x[3]; d1 = x[1] - x[2];
    y[0] = s0 + s1; y[1] = (d0 <<< 1) + d1; y[2] = s0 - s1; y[3] = d0 - (d1 <<< 1);
  endfunction

  // two row-transform units
  wide_t rt [2][4];
  always_comb
    for (int r = 0; r < 2; r++) begin
      wide_t x [4];
      for (int k = 0; k < 4; k++) x[k] = wide_t'(in_rows[r][k]);
      dct4(x, rt[r]);
    end

  // two column-transform units: rows 0-1 held, rows 2-3 arriving
  wide_t held [2][4];
  wide_t col [4][4];     // col[row][column] of the result
  always_comb
    for (int j = 0; j < 4; j++) begin
      wide_t x [4], y [4];
      x[0] = held[0][j]; x[1] = held[1][j]; x[2] = rt[0][j]; x[3] = rt[1][j];
      dct4(x, y);
      for (int i = 0; i < 4; i++) col[i][j] = y[i];
    end

  wide_t late [2][4];    // result rows 2-3, out one cycle after rows 0-1
  logic  late_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '{default: '0}; late <= '{default: '0}; late_v <= 1'b0;
      out_valid <= 1'b0; out_pair <= 1'b0; out_rows <= '{default: '0};
    end else begin
      out_valid <= 1'b0;
      late_v    <= 1'b0;
      if (late_v) begin
        out_valid <= 1'b1; out_pair <= 1'b1;
        for (int r = 0; r < 2; r++) for (int k = 0; k < 4; k++) out_rows[r][k] <= coef_t'(late[r][k]);
      end
      if (in_valid && !in_pair) held <= rt;
      if (in_valid && in_pair) begin
        out_valid <= 1'b1; out_pair <= 1'b0;
        for (int r = 0; r < 2; r++) for (int k = 0; k < 4; k++) out_rows[r][k] <= coef_t'(col[r][k]);
        late   <= '{col[2], col[3]};
        late_v <= 1'b1;
      end
    end
  end

  // a second pair may not arrive while the late rows leave
  assert property (@(posedge clk) disable iff (!rst_n) !(late_v && in_valid && in_pair))
    else $error("fwd_transform8: blocks closer than two cycles");
endmodule
