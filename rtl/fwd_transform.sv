// fwd_transform: four-pixel-parallel forward 4x4 transform unit, merging the
// integer DCT of H.264 with the 4x4 Hadamard (luma 16x16 DC) and the 2x2
// Hadamard (chroma DC), plus the DC register that gathers the DC terms of
// sixteen blocks.
//
// A block enters as four rows, one per cycle (in_valid). Each row passes the
// 1-D row butterfly and is written into one of two 4x4 transpose register
// banks. When a bank is full, the next four cycles read it out one result
// row per cycle: each of the four columns passes the 1-D column butterfly
// and the output lane keeps the element of the requested row. A result row
// leaves every cycle while the next block fills the other bank: throughput
// four pixels per cycle, latency from the last input row to the first
// output row one cycle. out_row[j] is coefficient (out_idx, j). Butterflies use only additions and shifts. The
// 4x4 Hadamard output is halved (arithmetic shift) as in the reference model;
// the 2x2 Hadamard uses the top-left 2x2 of the input rows. When a DCT block
// is started with in_dc_cap, its DC coefficient is also stored in dc_reg at
// in_dc_idx so the 16 (or 4) DC terms can be fed back as a Hadamard block.
// The two-bank organisation and the latency are this design's choices; the
// butterfly merge and DC registers follow the document.
module fwd_transform
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  tr_kind_e   in_kind,      // sampled with the first row of a block
  input  logic       in_dc_cap,    // sampled with the first row
  input  logic [3:0] in_dc_idx,    // sampled with the first row
  input  coef_t      in_row [4],
  output logic       out_valid,
  output logic [1:0] out_idx,      // row index of out_row
  output tr_kind_e   out_kind,
  output coef_t      out_row [4],
  output coef_t      dc_reg [16]
);

  localparam int IW = COEF_W + 3;
  typedef logic signed [IW-1:0] wide_t;

  function automatic void bfly(input tr_kind_e k, input wide_t x [4], output wide_t y [4]);
    wide_t s0, s1, d0, d1;
    s0 = x[0] + x[3]; s1 = x[1] + x[2];
    d0 = x[0] - x[3]; d1 = x[1] - x[2];
    unique case (k)
      TR_DCT:  begin y[0] = s0 + s1; y[1] = (d0 <<< 1) + d1; y[2] = s0 - s1; y[3] = d0 - (d1 <<< 1); end
      TR_DHT4: begin y[0] = s0 + s1; y[1] = d0 + d1;        y[2] = s0 - s1; y[3] = d0 - d1; end
      default: begin y[0] = x[0] + x[1]; y[1] = x[0] - x[1]; y[2] = '0; y[3] = '0; end
    endcase
  endfunction

  // ---------------- input side: row butterfly into a bank ----------------
  wide_t    bank [2][4][4];
  tr_kind_e bank_kind [2];
  logic     bank_cap [2];
  logic [3:0] bank_dcidx [2];
  logic     wr_bank;
  logic [1:0] wr_row;

  wide_t rx [4], ry [4];
  tr_kind_e cur_kind;
  always_comb begin
    cur_kind = (wr_row == 2'd0) ? in_kind : bank_kind[wr_bank];
    for (int k = 0; k < 4; k++) rx[k] = wide_t'(in_row[k]);
    bfly(cur_kind, rx, ry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_row  <= '0;
      bank <= '{default: '0};
      bank_kind <= '{default: TR_DCT};
      bank_cap <= '{default: 1'b0};
      bank_dcidx <= '{default: '0};
    end else begin
      if (in_valid) begin
        for (int k = 0; k < 4; k++) bank[wr_bank][wr_row][k] <= ry[k];
        if (wr_row == 2'd0) begin
          bank_kind[wr_bank]  <= in_kind;
          bank_cap[wr_bank]   <= in_dc_cap;
          bank_dcidx[wr_bank] <= in_dc_idx;
        end
        wr_row <= wr_row + 2'd1;
        if (wr_row == 2'd3) wr_bank <= ~wr_bank;
      end
    end
  end

  // ---------------- output side: column butterfly -------------------------
  logic       rd_active;
  logic       rd_bank;
  logic [1:0] rd_col;             // index of the output row
  wide_t cy [4];
  always_comb begin
    wide_t cx [4], cv [4];
    for (int j = 0; j < 4; j++) begin
      for (int k = 0; k < 4; k++) cx[k] = bank[rd_bank][k][j];
      bfly(bank_kind[rd_bank], cx, cv);
      cy[j] = cv[rd_col];
      if (bank_kind[rd_bank] == TR_DHT4) cy[j] = cy[j] >>> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      rd_col    <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_kind  <= TR_DCT;
      out_row   <= '{default: '0};
      dc_reg    <= '{default: '0};
    end else begin
      out_valid <= 1'b0;
      if (rd_active) begin
        out_valid <= 1'b1;
        out_idx   <= rd_col;
        out_kind  <= bank_kind[rd_bank];
        for (int k = 0; k < 4; k++) out_row[k] <= coef_t'(cy[k]);
        if (rd_col == 2'd0 && bank_cap[rd_bank] && bank_kind[rd_bank] == TR_DCT)
          dc_reg[bank_dcidx[rd_bank]] <= coef_t'(cy[0]);
        rd_col <= rd_col + 2'd1;
        if (rd_col == 2'd3) rd_active <= 1'b0;
      end
      // a bank completes: start reading it on the next cycle
      if (in_valid && wr_row == 2'd3) begin
        rd_active <= 1'b1;
        rd_bank   <= wr_bank;
        rd_col    <= '0;
      end
    end
  end

endmodule
