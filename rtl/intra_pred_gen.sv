// intra_pred_gen: four-pixel-parallel, reconfigurable intra prediction
// generator (no plane mode).
//
// Each accepted request produces one row (four pixels) of the predicted 4x4
// block for the requested mode, registered, one cycle later. The modes fall
// into the document's four types: bypass (vertical / horizontal: the boundary
// pixel is passed through), average (DC), linear (directional modes 3..8,
// built from first-level pair sums (a+b+1) and second-level three-tap sums
// (a+2b+c+2)) and bilinear (plane), which is removed. Luma 4x4 DC and chroma
// DC are computed in the same cycle from the eight neighbours; luma 16x16 DC
// needs 32 boundary pixels, accumulated by a separate adder pair and register
// over four cycles (acc_en with eight pixels per cycle), as the document
// describes. Chroma DC follows the H.264 per-4x4 rules (chroma_blk gives the
// position of the 4x4 block in the 8x8 block); that detail and the
// replication of pixel D into E..H when the top-right block is missing come
// from the standard, not from the document.
//
// Interface: top[0..7] = A..H, left[0..3] = I..L, corner = M. For 16x16 and
// chroma modes top/left are the four boundary pixels above / left of the
// current 4x4 sub-block. Timing: in_valid -> out_valid one cycle later.
module intra_pred_gen
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pred_mode_e  mode,
  input  logic [1:0]  row,
  input  pix_t        top [8],
  input  pix_t        left [4],
  input  pix_t        corner,
  input  logic        avail_top,
  input  logic        avail_left,
  input  logic        avail_tr,
  input  logic [1:0]  chroma_blk,
  // 16x16 DC accumulation
  input  logic        acc_clr,
  input  logic        acc_en,
  input  pix_t        acc_top [4],
  input  pix_t        acc_left [4],
  output logic        out_valid,
  output pix_t        pred [4]
);

  // ---------------- 16x16 DC accumulator (extra adders + register) --------
  logic [9:0] sum_t_r, sum_l_r;   // up to 16 * 255 = 4080 -> 12 bits
  logic [11:0] acc_t_q, acc_l_q;
  always_comb begin
    sum_t_r = 10'(acc_top[0]) + 10'(acc_top[1]) + 10'(acc_top[2]) + 10'(acc_top[3]);
    sum_l_r = 10'(acc_left[0]) + 10'(acc_left[1]) + 10'(acc_left[2]) + 10'(acc_left[3]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_t_q <= '0;
      acc_l_q <= '0;
    end else if (acc_clr) begin
      acc_t_q <= '0;
      acc_l_q <= '0;
    end else if (acc_en) begin
      acc_t_q <= acc_t_q + 12'(sum_t_r);
      acc_l_q <= acc_l_q + 12'(sum_l_r);
    end
  end

  pix_t dc16;
  always_comb begin
    if (avail_top && avail_left) dc16 = pix_t'((13'(acc_t_q) + 13'(acc_l_q) + 13'd16) >> 5);
    else if (avail_top)          dc16 = pix_t'((acc_t_q + 12'd8) >> 4);
    else if (avail_left)         dc16 = pix_t'((acc_l_q + 12'd8) >> 4);
    else                         dc16 = 8'd128;
  end

  // ---------------- 4-pixel DC (luma 4x4 and chroma) ----------------------
  logic [9:0] st4, sl4;
  pix_t dc_both, dc_top, dc_left, dc4;
  always_comb begin
    st4 = 10'(top[0]) + 10'(top[1]) + 10'(top[2]) + 10'(top[3]);
    sl4 = 10'(left[0]) + 10'(left[1]) + 10'(left[2]) + 10'(left[3]);
    dc_both = pix_t'((11'(st4) + 11'(sl4) + 11'd4) >> 3);
    dc_top  = pix_t'((st4 + 10'd2) >> 2);
    dc_left = pix_t'((sl4 + 10'd2) >> 2);
    // Luma 4x4 DC and chroma corner blocks: use both sides when present.
    if (avail_top && avail_left) dc4 = dc_both;
    else if (avail_top)          dc4 = dc_top;
    else if (avail_left)         dc4 = dc_left;
    else                         dc4 = 8'd128;
  end

  pix_t dcc;
  always_comb begin
    unique case (chroma_blk)
      2'd1:    dcc = avail_top  ? dc_top  : (avail_left ? dc_left : 8'd128);
      2'd2:    dcc = avail_left ? dc_left : (avail_top  ? dc_top  : 8'd128);
      default: dcc = dc4;
    endcase
  end

  // ---------------- edge array for directional modes ----------------------
  // e[0..3] = L,K,J,I ; e[4] = M ; e[5..12] = A..H
  pix_t e [13];
  always_comb begin
    for (int k = 0; k < 4; k++) e[k] = left[3-k];
    e[4] = corner;
    for (int k = 0; k < 4; k++) e[5+k] = top[k];
    for (int k = 4; k < 8; k++) e[5+k] = avail_tr ? top[k] : top[3];
  end

  function automatic pix_t avg2(input pix_t a, input pix_t b);
    return pix_t'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction
  function automatic pix_t avg3(input pix_t a, input pix_t b, input pix_t c);
    return pix_t'((10'(a) + {1'b0, b, 1'b0} + 10'(c) + 10'd2) >> 2);
  endfunction

  pix_t p [4];
  always_comb begin
    int y, z, i;
    y = int'(row);
    for (int x = 0; x < 4; x++) begin
      p[x] = 8'd0;
      z = 0;
      i = 0;
      unique case (mode)
        I4_V, I16_V, C8_V: p[x] = top[x];
        I4_H, I16_H, C8_H: p[x] = left[y];
        I4_DC:             p[x] = dc4;
        I16_DC:            p[x] = dc16;
        C8_DC:             p[x] = dcc;
        I4_DDL: begin
          if (x == 3 && y == 3) p[x] = avg3(e[11], e[12], e[12]);
          else                  p[x] = avg3(e[5+x+y], e[6+x+y], e[7+x+y]);
        end
        I4_DDR: begin
          i = 4 + x - y;
          p[x] = avg3(e[i-1], e[i], e[i+1]);
        end
        I4_VR: begin
          z = 2*x - y;
          i = 5 + x - (y >> 1);            // index of top[x - (y>>1)]
          if (z >= 0 && z[0] == 1'b0)      p[x] = avg2(e[i-1], e[i]);
          else if (z >= 0)                 p[x] = avg3(e[i-2], e[i-1], e[i]);
          else if (z == -1)                p[x] = avg3(e[3], e[4], e[5]);
          else                             p[x] = avg3(e[4-y], e[5-y], e[6-y]);
        end
        I4_HD: begin
          z = 2*y - x;
          i = 3 - y + (x >> 1);            // index of left[y - (x>>1)]
          if (z >= 0 && z[0] == 1'b0)      p[x] = avg2(e[i+1], e[i]);
          else if (z >= 0)                 p[x] = avg3(e[i+2], e[i+1], e[i]);
          else if (z == -1)                p[x] = avg3(e[3], e[4], e[5]);
          else                             p[x] = avg3(e[4+x], e[3+x], e[2+x]);
        end
        I4_VL: begin
          i = 5 + x + (y >> 1);
          if (y[0] == 1'b0) p[x] = avg2(e[i], e[i+1]);
          else              p[x] = avg3(e[i], e[i+1], e[i+2]);
        end
        I4_HU: begin
          z = x + 2*y;
          i = 3 - (y + (x >> 1));          // index of left[y + (x>>1)]
          if (z > 5)                       p[x] = e[0];
          else if (z == 5)                 p[x] = avg3(e[1], e[0], e[0]);
          else if (z[0] == 1'b0)           p[x] = avg2(e[i], e[i-1]);
          else                             p[x] = avg3(e[i], e[i-1], e[i-2]);
        end
        default: p[x] = 8'd128;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 4; k++) pred[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pred <= p;
    end
  end

endmodule
