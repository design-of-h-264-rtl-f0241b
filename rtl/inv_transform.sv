// inv_transform: four-pixel-parallel inverse 4x4 transform unit, merging the
// H.264 inverse integer DCT with the inverse 4x4 and 2x2 Hadamard transforms.
//
// A block enters as four rows of de-quantized coefficients, one per cycle
// (in_row[j] is coefficient (row, j)). Each row passes the horizontal 1-D
// butterfly and is stored in one of two transpose register banks; when a
// bank is full, one result row per cycle is formed by passing each stored
// column through the vertical butterfly and keeping the element of that
// row. This is the order (rows first, then columns) of the standard, which
// matters because of the half-weight shifts. A row of four residuals leaves
// every cycle, one cycle after the last input row, while the next block
// fills the other bank. For
// the DCT the result is scaled by (x + 32) >> 6, the final shift of the
// reconstruction path, so out_row holds pixel residuals. The Hadamard kinds
// are left unscaled; their scaling sits in the de-quantizer. The inverse DCT
// butterfly uses the half-weights of the standard (y1 >> 1, y3 >> 1).
// Banking and timing are this design's choices.
module inv_transform
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  tr_kind_e   in_kind,      // sampled with the first row
  input  coef_t      in_row [4],
  output logic       out_valid,
  output logic [1:0] out_idx,      // row index of out_row
  output tr_kind_e   out_kind,
  output coef_t      out_row [4]
);

  localparam int IW = COEF_W + 4;
  typedef logic signed [IW-1:0] wide_t;

  function automatic void ibfly(input tr_kind_e k, input wide_t y [4], output wide_t x [4]);
    wide_t e0, e1, e2, e3;
    unique case (k)
      TR_DCT: begin
        e0 = y[0] + y[2];          e1 = y[0] - y[2];
        e2 = (y[1] >>> 1) - y[3];  e3 = y[1] + (y[3] >>> 1);
      end
      TR_DHT4: begin
        e0 = y[0] + y[2];          e1 = y[0] - y[2];
        e2 = y[1] - y[3];          e3 = y[1] + y[3];
      end
      default: begin
        e0 = y[0]; e1 = y[0]; e2 = -y[1]; e3 = y[1];
      end
    endcase
    x[0] = e0 + e3; x[1] = e1 + e2; x[2] = e1 - e2; x[3] = e0 - e3;
    if (k == TR_DHT2) begin x[2] = '0; x[3] = '0; end
  endfunction

  wide_t    bank [2][4][4];       // [bank][row][col]
  tr_kind_e bank_kind [2];
  logic     wr_bank;
  logic [1:0] wr_col;             // index of the incoming row

  wide_t vx [4], vy [4];
  tr_kind_e cur_kind;
  always_comb begin
    cur_kind = (wr_col == 2'd0) ? in_kind : bank_kind[wr_bank];
    for (int k = 0; k < 4; k++) vx[k] = wide_t'(in_row[k]);
    ibfly(cur_kind, vx, vy);
  end

  logic       rd_active, rd_bank;
  logic [1:0] rd_row;
  wide_t hy [4];
  always_comb begin
    wide_t hx [4], hv [4];
    for (int j = 0; j < 4; j++) begin
      for (int k = 0; k < 4; k++) hx[k] = bank[rd_bank][k][j];
      ibfly(bank_kind[rd_bank], hx, hv);
      hy[j] = hv[rd_row];
      if (bank_kind[rd_bank] == TR_DCT) hy[j] = (hy[j] + wide_t'(32)) >>> 6;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_col  <= '0;
      bank <= '{default: '0};
      bank_kind <= '{default: TR_DCT};
      rd_active <= 1'b0;
      rd_bank <= 1'b0;
      rd_row <= '0;
      out_valid <= 1'b0;
      out_idx <= '0;
      out_kind <= TR_DCT;
      out_row <= '{default: '0};
    end else begin
      out_valid <= 1'b0;
      if (rd_active) begin
        out_valid <= 1'b1;
        out_idx   <= rd_row;
        out_kind  <= bank_kind[rd_bank];
        for (int k = 0; k < 4; k++) out_row[k] <= coef_t'(hy[k]);
        rd_row <= rd_row + 2'd1;
        if (rd_row == 2'd3) rd_active <= 1'b0;
      end
      if (in_valid) begin
        for (int k = 0; k < 4; k++) bank[wr_bank][wr_col][k] <= vy[k];
        if (wr_col == 2'd0) bank_kind[wr_bank] <= in_kind;
        wr_col <= wr_col + 2'd1;
        if (wr_col == 2'd3) begin
          wr_bank   <= ~wr_bank;
          rd_active <= 1'b1;
          rd_bank   <= wr_bank;
          rd_row    <= '0;
        end
      end
    end
  end

endmodule
