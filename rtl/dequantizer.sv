// dequantizer: four-parallel de-quantization of one level row per cycle.
//
// 4x4 blocks (kind 0): c = (level * dequant_coef) << QP/6, with dequant_coef
// from the six-row table indexed by QP%6 and the position class of
// (row, j). Luma 16x16 DC terms (kind 1), which arrive after the inverse
// Hadamard: c = ((f * dequant_coef(0,0)) << QP/6 + 2) >> 2. Chroma DC terms
// (kind 2), also after the inverse Hadamard: c = ((f * dequant_coef(0,0)) <<
// QP/6) >> 1. These are a multiplication followed by rounding and a shift,
// as the document describes; the exact DC rounding is the reference model's,
// which equals the standard's scaling. A zero input is guarded (output zero,
// multiplier operand held). Timing: one row per cycle, registered one cycle
// later.
module dequantizer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] qp,
  input  logic       in_valid,
  input  logic [1:0] in_kind,     // 0 block, 1 luma DC, 2 chroma DC
  input  logic [1:0] in_idx,      // row index of the block
  input  coef_t      in_row [4],
  output logic       out_valid,
  output logic [1:0] out_idx,
  output coef_t      out_row [4]
);

  logic [2:0] qp_rem;
  logic [3:0] qp_per;
  always_comb begin
    qp_rem = qp_rem_of(qp);
    qp_per = qp_per_of(qp);
  end

  coef_t c [4];
  always_comb begin
    logic [4:0] dq;
    logic signed [31:0] prod, val;
    for (int j = 0; j < 4; j++) begin
      dq   = (in_kind == 2'd0) ? dequant_coef(qp_rem, pos_class(in_idx[0], 1'(j))) : dequant_coef(qp_rem, 2'd0);
      prod = (in_row[j] == '0) ? '0 : 32'(in_row[j]) * $signed({27'd0, dq});
      val  = prod <<< qp_per;
      unique case (in_kind)
        2'd1:    val = (val + 32'sd2) >>> 2;
        2'd2:    val = val >>> 1;
        default: ;
      endcase
      c[j] = coef_t'(val);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_row   <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        out_row <= c;
      end
    end
  end

endmodule
