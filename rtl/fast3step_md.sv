// fast3step_md: modified three-step fast 4x4 mode decision.
//
// Instead of all nine 4x4 modes, a block tries at most seven: vertical (0),
// horizontal (1) and DC (2), then diagonal-down-left (3) and
// diagonal-down-right (4), then one pair chosen by a single decision: if
// the cost of vertical is not above the cost of horizontal, the two modes
// next to vertical (vertical-right 5, vertical-left 7), otherwise the two
// next to horizontal (horizontal-down 6, horizontal-up 8). Modes 3 and 4 are
// tried unconditionally so that the pipeline stays busy while the costs of
// modes 0 and 1 are still on their way; by the time the pair is needed the
// decision is known. Modes whose reference samples are missing are skipped;
// if only one of modes 0 / 1 exists the decision follows it.
//
// Interface: blk_start clears the captured costs at the start of a block;
// cost_valid / cost_mode / cost report each finished candidate (cost
// including the lambda penalty, the same value the mode decision ranks).
// next is combinational: the mode to try after cur_mode (4'hF = before the
// first mode, 9 = no more), decided tells whether the decision inputs are
// complete, vert is the decision.
//
// The reduction from nine to seven modes, the move of modes 3 and 4 ahead
// of the decision and the single vertical/horizontal decision follow the
// document; which two modes form each side of the decision, and the
// handling of missing reference samples, are this design's reading.
module fast3step_md
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_start,
  input  logic       cost_valid,
  input  pred_mode_e cost_mode,
  input  cost_t      cost,
  input  logic       avail_top,
  input  logic       avail_left,
  input  logic       avail_corner,
  input  logic [3:0] cur_mode,
  output logic [3:0] next,
  output logic       decided,
  output logic       vert
);
  cost_t c0, c1;
  logic  have0, have1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= '0; c1 <= '0; have0 <= 1'b0; have1 <= 1'b0;
    end else if (blk_start) begin
      have0 <= 1'b0; have1 <= 1'b0;
    end else if (cost_valid) begin
      if (cost_mode == I4_V) begin c0 <= cost; have0 <= 1'b1; end
      if (cost_mode == I4_H) begin c1 <= cost; have1 <= 1'b1; end
    end
  end

  function automatic logic usable(input logic [3:0] m);
    unique case (m)
      4'd0, 4'd3, 4'd7: return avail_top;
      4'd1, 4'd8:       return avail_left;
      4'd2:             return 1'b1;
      default:          return avail_top && avail_left && avail_corner;
    endcase
  endfunction

  logic [3:0] seq [7];
  always_comb begin
    if (avail_top && avail_left) begin
      decided = have0 && have1;
      vert    = c0 <= c1;
    end else begin
      decided = 1'b1;
      vert    = avail_top;
    end
    seq = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd4, vert ? 4'd5 : 4'd6, vert ? 4'd7 : 4'd8};
    // position of cur_mode in the order, then the next usable entry
    next = 4'd9;
    begin
      int pos;
      pos = -1;
      for (int i = 0; i < 7; i++) if (seq[i] == cur_mode) pos = i;
      for (int i = 6; i >= 0; i--)
        if (i > pos && usable(seq[i])) next = seq[i];
    end
  end
endmodule
