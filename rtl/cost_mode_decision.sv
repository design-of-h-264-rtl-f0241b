// cost_mode_decision: enhanced-SATD cost generation and mode decision.
//
// The unit receives, one row per cycle, the 4x4 integer-transform
// coefficients of the residual of one candidate mode (the forward transform
// output is reused, no separate Hadamard is computed). Stage one weights each
// |coefficient| by the scalar factor of its position, 32 (both indices even),
// 20 (both odd) or 25 (mixed), realised as shifts and adds (25 = 16+8+1,
// 20 = 16+4); stage two is an adder tree summing the row into the block
// accumulator. After the fourth row the block cost is sum / 32 (a shift),
// plus 4*lambda when a 4x4 mode is not the most probable mode, following
// C = SATD + 4 m lambda with m = 0 for the most probable mode.
//
// 4x4 modes: the rows are also kept in the current-block registers; if the
// cost is below the running minimum (or it is the first mode of the block,
// in_first) the cost, the mode and the current block move into the best
// registers. blk_commit adds the best 4x4 cost of the block to the
// macroblock sum, and 6*lambda more for every fourth block. 16x16 and chroma
// modes are accumulated per mode over the macroblock (mb_clr clears all).
// The decision outputs compare the 4x4 total with the best 16x16 mode
// (use_i16) and give the cheapest chroma mode; 16x16 and chroma modes whose
// boundary is missing (avail16, availc) are excluded, and ties among 16x16
// modes favour V, then DC, then H. Timing: cost_valid and the
// best registers update one cycle after the fourth row; the decision outputs
// are combinational on the accumulators.
module cost_mode_decision
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  lambda,
  input  logic        mb_clr,        // start of a macroblock
  input  logic        in_valid,
  input  logic [1:0]  in_idx,        // row index
  input  coef_t       in_row [4],
  input  pred_mode_e  in_mode,       // sampled with each row
  input  logic        in_first,      // first candidate of a 4x4 block (row 0)
  input  logic [3:0]  in_mpm,        // most probable 4x4 mode of the block
  input  logic        blk_commit,    // 4x4 block decided: add its best cost
  input  logic [2:0]  avail16,       // 16x16 V, H, DC usable in this macroblock
  input  logic [2:0]  availc,        // chroma DC, H, V usable
  output logic        cost_valid,
  output cost_t       cost,          // cost of the candidate just finished
  output pred_mode_e  best_mode,
  output cost_t       best_cost,
  output coef_t       best_block [4][4],
  output cost_t       i4_total,
  output pred_mode_e  best16_mode,
  output cost_t       best16_cost,
  output logic        use_i16,
  output pred_mode_e  bestc_mode,
  output cost_t       bestc_cost
);

  // ---- stage 1: weighted magnitudes; stage 2: adder tree ----
  logic [COST_W+4:0] row_sum;
  always_comb begin
    logic [COEF_W-1:0] a;
    logic [COST_W+4:0] w;
    row_sum = '0;
    for (int j = 0; j < 4; j++) begin
      a = in_row[j] < 0 ? COEF_W'(-in_row[j]) : COEF_W'(in_row[j]);
      unique case (pos_class(in_idx[0], 1'(j)))
        2'd0:    w = (COST_W+5)'(a) << 5;
        2'd1:    w = ((COST_W+5)'(a) << 4) + ((COST_W+5)'(a) << 2);
        default: w = ((COST_W+5)'(a) << 4) + ((COST_W+5)'(a) << 3) + (COST_W+5)'(a);
      endcase
      row_sum = row_sum + w;
    end
  end

  logic [COST_W+4:0] acc;
  coef_t cur_block [4][4];
  logic  first_q;
  logic [COST_W+4:0] blk_sum;
  cost_t cand_cost;
  always_comb begin
    blk_sum   = acc + row_sum;
    cand_cost = cost_t'(blk_sum >> 5);
    if (in_mode <= I4_HU && 4'(in_mode) != in_mpm)
      cand_cost = cand_cost + cost_t'({lambda, 2'b00});
  end

  cost_t acc16 [3];
  cost_t accc  [3];
  cost_t i4_sum;
  logic [4:0] n_commit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      cur_block <= '{default: '0};
      best_block <= '{default: '0};
      first_q <= 1'b0;
      cost_valid <= 1'b0;
      cost <= '0;
      best_mode <= I4_DC;
      best_cost <= '1;
      acc16 <= '{default: '0};
      accc  <= '{default: '0};
      i4_sum <= '0;
      n_commit <= '0;
    end else begin
      cost_valid <= 1'b0;
      if (mb_clr) begin
        acc16 <= '{default: '0};
        accc  <= '{default: '0};
        i4_sum <= '0;
        n_commit <= '0;
      end
      if (blk_commit) begin
        i4_sum <= i4_sum + best_cost + ((n_commit[1:0] == 2'd3) ? cost_t'(7'd6 * lambda) : '0);
        n_commit <= n_commit + 5'd1;
      end
      if (in_valid) begin
        cur_block[in_idx] <= in_row;
        if (in_idx == 2'd0) first_q <= in_first;
        if (in_idx == 2'd3) begin
          acc <= '0;
          cost_valid <= 1'b1;
          cost <= cand_cost;
          if (in_mode <= I4_HU) begin
            if (first_q || cand_cost < best_cost) begin
              best_cost <= cand_cost;
              best_mode <= in_mode;
              for (int r = 0; r < 3; r++) best_block[r] <= cur_block[r];
              best_block[3] <= in_row;
            end
          end else if (in_mode <= I16_DC) begin
            acc16[int'(in_mode) - int'(I16_V)] <= acc16[int'(in_mode) - int'(I16_V)] + cand_cost;
          end else begin
            accc[int'(in_mode) - int'(C8_DC)] <= accc[int'(in_mode) - int'(C8_DC)] + cand_cost;
          end
        end else begin
          acc <= blk_sum;
        end
      end
    end
  end

  // ---- macroblock decision ----
  always_comb begin
    i4_total = i4_sum;
    // DC is always usable; V and H only when their boundary exists
    best16_mode = I16_DC; best16_cost = acc16[2];
    if (avail16[0] && acc16[0] <= best16_cost) begin best16_mode = I16_V; best16_cost = acc16[0]; end
    if (avail16[1] && acc16[1] <  best16_cost) begin best16_mode = I16_H; best16_cost = acc16[1]; end
    use_i16 = best16_cost < i4_total;
    bestc_mode = C8_DC; bestc_cost = accc[0];
    if (availc[1] && accc[1] < bestc_cost) begin bestc_mode = C8_H; bestc_cost = accc[1]; end
    if (availc[2] && accc[2] < bestc_cost) begin bestc_mode = C8_V; bestc_cost = accc[2]; end
  end

endmodule
