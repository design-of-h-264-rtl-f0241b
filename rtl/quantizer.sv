// quantizer: four-parallel quantization of one coefficient row per cycle.
//
// Each lane computes level = sign(c) * ((|c| * quant_coef + qp_const) >>
// qp_shift), a multiplication, an addition and a shift, with quant_coef
// from the six-row table indexed by QP%6 and the position class of (row, j),
// qp_shift = 15 + QP/6 and qp_const = 2^qp_shift / 3 (the intra rounding of
// the reference model). For the DC blocks of luma 16x16 and chroma (dc = 1)
// the shift grows by one, the constant doubles and every lane uses the (0,0)
// factor. A zero input is guarded: the multiplier operand is held at zero and
// the lane outputs zero. Timing: one row in per cycle, the levels registered
// one cycle later. The constants are the document's tables; the rounding
// constant comes from the reference model.
module quantizer
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] qp,
  input  logic       in_valid,
  input  logic       in_dc,
  input  logic [1:0] in_idx,      // row index of the block
  input  coef_t      in_row [4],
  output logic       out_valid,
  output logic [1:0] out_idx,
  output lev_t       out_lev [4]
);

  logic [2:0] qp_rem;
  logic [3:0] qp_per;
  logic [4:0] qbits;
  logic [31:0] qconst;
  always_comb begin
    qp_rem = qp_rem_of(qp);
    qp_per = qp_per_of(qp);
    qbits  = 5'd15 + 5'(qp_per) + (in_dc ? 5'd1 : 5'd0);
    qconst = (32'd1 << qbits) / 32'd3;
    if (in_dc) qconst = ((32'd1 << (qbits - 5'd1)) / 32'd3) << 1;
  end

  lev_t lev [4];
  always_comb begin
    logic [COEF_W-1:0] mag;
    logic [13:0]       qc;
    logic [32:0]       prod;
    logic [32:0]       sh;
    for (int j = 0; j < 4; j++) begin
      qc   = in_dc ? quant_coef(qp_rem, 2'd0) : quant_coef(qp_rem, pos_class(in_idx[0], 1'(j)));
      // data guarding: a zero coefficient keeps the multiplier input at zero
      mag  = (in_row[j] == '0) ? '0 : (in_row[j] < 0 ? COEF_W'(-in_row[j]) : COEF_W'(in_row[j]));
      prod = 33'(mag) * 33'(qc) + 33'(qconst);
      sh   = prod >> qbits;
      if (in_row[j] == '0)     lev[j] = '0;
      else if (in_row[j] < 0)  lev[j] = -lev_t'(sh);
      else                     lev[j] = lev_t'(sh);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_lev   <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        out_lev <= lev;
      end
    end
  end

endmodule
