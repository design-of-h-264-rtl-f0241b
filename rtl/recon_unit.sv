// recon_unit: reconstruction of four pixels per cycle.
//
// rec = clip(pred + residual, 0, 255). In the encoder the prediction of the
// chosen mode is produced long before its residual returns through
// quantization, de-quantization and the inverse transform, so predicted rows
// are queued in a small FIFO of registers (pred_push) and popped when each
// residual row arrives (use_fifo = 1). In the decoder the prediction is
// produced in step with the residual and enters directly on pred_direct
// (use_fifo = 0). Timing: res_valid -> rec_valid one cycle later. The FIFO
// depth (two 4x4 blocks) is this design's choice; pushing into a full FIFO or
// popping an empty one is a protocol error and is asserted against.
module recon_unit
  import h264_pkg::*;
#(
  parameter int unsigned DEPTH = 8
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       use_fifo,
  input  logic       pred_push,
  input  pix_t       pred_in [4],
  input  pix_t       pred_direct [4],
  input  logic       res_valid,
  input  logic [1:0] res_idx,
  input  coef_t      res_row [4],
  output logic       rec_valid,
  output logic [1:0] rec_idx,
  output pix_t       rec_row [4],
  output logic       fifo_empty,
  output logic       fifo_full
);

  localparam int AW = $clog2(DEPTH);
  pix_t fifo [DEPTH][4];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic pop;

  assign fifo_empty = (cnt == '0);
  assign fifo_full  = (cnt == (AW+1)'(DEPTH));
  assign pop = res_valid && use_fifo;

  pix_t pred_sel [4];
  always_comb begin
    for (int k = 0; k < 4; k++) pred_sel[k] = use_fifo ? fifo[rp][k] : pred_direct[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      fifo <= '{default: '0};
      rec_valid <= 1'b0;
      rec_idx <= '0;
      rec_row <= '{default: '0};
    end else begin
      if (pred_push) begin
        fifo[wp] <= pred_in;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(pred_push) - (AW+1)'(pop);
      rec_valid <= res_valid;
      if (res_valid) begin
        rec_idx <= res_idx;
        for (int k = 0; k < 4; k++)
          rec_row[k] <= clip_pix(12'(signed'({1'b0, pred_sel[k]})) + 12'(res_row[k]));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pred_push && fifo_full && !pop))
    else $error("recon_unit: push into full prediction FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && fifo_empty))
    else $error("recon_unit: pop from empty prediction FIFO");

endmodule
