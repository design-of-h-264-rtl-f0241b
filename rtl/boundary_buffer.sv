// boundary_buffer: boundary register buffer of the luma prediction loop.
//
// Holds the reconstructed pixels the intra predictor needs: the row above the
// macroblock (16 pixels plus 4 above-right and the above-left corner, loaded
// from the frame line buffer at mb_load), the column left of the macroblock
// and the reconstructed pixels of the current macroblock, written one row of
// a 4x4 block at a time as the reconstruction path produces them. For the
// 4x4 block with Z-scan index rd_blk it presents the thirteen reference
// samples A..H (top), I..L (left) and M (corner) combinationally, with their
// availability: the above / left flags from the macroblock neighbours, the
// above-right rule of the standard (blocks 3, 7, 11, 13 and 15 never have it,
// block 5 only with the above-right macroblock) and the corner flag. The
// full-macroblock top row and left column are also output for the 16x16 DC
// accumulation. At mb_load with left_from_prev, the right column of the
// macroblock just finished becomes the new left column.
// Keeping the whole reconstructed macroblock in registers (rather than only
// the boundary rows) is this design's simplification; the document gives
// the buffer's function, not its organisation.
module boundary_buffer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // macroblock neighbours
  input  logic       mb_load,
  input  logic       left_from_prev,
  input  pix_t       top_line_in [20],   // above row, 16 + 4 above-right
  input  pix_t       corner_in,
  input  pix_t       left_in [16],
  input  logic       avail_top_mb,
  input  logic       avail_left_mb,
  input  logic       avail_tr_mb,
  input  logic       avail_tl_mb,
  // reconstructed rows
  input  logic       wr_valid,
  input  logic [3:0] wr_blk,
  input  logic [1:0] wr_row,
  input  pix_t       wr_pix [4],
  // reference samples of one 4x4 block
  input  logic [3:0] rd_blk,
  output pix_t       top [8],
  output pix_t       left [4],
  output pix_t       corner,
  output logic       avail_top,
  output logic       avail_left,
  output logic       avail_tr,
  output logic       avail_corner,
  // macroblock boundary for 16x16 prediction, and the reconstructed macroblock
  output pix_t       mb_top [16],
  output pix_t       mb_left [16],
  output logic       mb_avail_top,
  output logic       mb_avail_left,
  output pix_t       rec_mb [16][16]
);

  pix_t top_line [20];
  pix_t left_col [16];
  pix_t tl;
  logic at, al, atr, atl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_line <= '{default: '0};
      left_col <= '{default: '0};
      tl <= '0;
      {at, al, atr, atl} <= '0;
      rec_mb <= '{default: '0};
    end else begin
      if (mb_load) begin
        top_line <= top_line_in;
        tl <= corner_in;
        for (int y = 0; y < 16; y++) left_col[y] <= left_from_prev ? rec_mb[y][15] : left_in[y];
        {at, al, atr, atl} <= {avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb};
      end
      if (wr_valid)
        for (int k = 0; k < 4; k++)
          rec_mb[{wr_blk[3], wr_blk[1], wr_row}][{wr_blk[2], wr_blk[0], 2'(k)}] <= wr_pix[k];
    end
  end

  always_comb begin
    logic [1:0] bx, by;
    logic [3:0] x0, y0;
    bx = {rd_blk[2], rd_blk[0]};
    by = {rd_blk[3], rd_blk[1]};
    x0 = {bx, 2'b00};
    y0 = {by, 2'b00};
    for (int k = 0; k < 8; k++) begin
      if (by == 2'd0)                 top[k] = top_line[int'(x0) + k];
      else if (int'(x0) + k < 16)     top[k] = rec_mb[y0 - 4'd1][int'(x0) + k];
      else                            top[k] = rec_mb[y0 - 4'd1][15];
    end
    for (int k = 0; k < 4; k++)
      left[k] = (bx == 2'd0) ? left_col[int'(y0) + k] : rec_mb[int'(y0) + k][x0 - 4'd1];
    if (bx == 2'd0 && by == 2'd0)   corner = tl;
    else if (by == 2'd0)            corner = top_line[5'(x0 - 4'd1)];
    else if (bx == 2'd0)            corner = left_col[y0 - 4'd1];
    else                            corner = rec_mb[y0 - 4'd1][x0 - 4'd1];

    avail_top  = (by != 2'd0) || at;
    avail_left = (bx != 2'd0) || al;
    if (bx != 2'd0 && by != 2'd0)   avail_corner = 1'b1;
    else if (by == 2'd0 && bx != 2'd0) avail_corner = at;
    else if (bx == 2'd0 && by != 2'd0) avail_corner = al;
    else                            avail_corner = atl;
    unique case (rd_blk)
      4'd3, 4'd7, 4'd11, 4'd13, 4'd15: avail_tr = 1'b0;
      4'd5:                            avail_tr = atr;
      4'd0, 4'd1, 4'd4:                avail_tr = at;
      default:                         avail_tr = 1'b1;
    endcase
    mb_top  = top_line[0:15];
    mb_left = left_col;
    mb_avail_top  = at;
    mb_avail_left = al;
  end

endmodule
