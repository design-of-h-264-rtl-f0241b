// h264_pkg: types, constants and table functions shared by the H.264/AVC
// intra codec datapath.
//
// Pixels are 8-bit unsigned, residuals 9-bit signed, transform coefficients
// are carried in COEF_W-bit signed words (wide enough for the 4x4 Hadamard of
// sixteen DC terms). The quantization and de-quantization factors are the
// six-row tables of the H.264 reference model indexed by QP%6 and by the
// position class of a coefficient in the 4x4 block; the step doubles every six
// QP values, which the datapath realises as a shift by QP/6. The lambda table
// used by the mode decision is the one of the H.264 reference software
// (lambda = QP2QUANT[max(0, QP-12)]); the document only says lambda follows an
// approximated exponential of QP.
package h264_pkg;

  localparam int PIX_W  = 8;
  localparam int RES_W  = 9;
  localparam int COEF_W = 18;
  localparam int LEV_W  = 16;   // quantized level width (16-bit in the codec)
  localparam int COST_W = 20;

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic signed [RES_W-1:0]   res_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [LEV_W-1:0]   lev_t;
  typedef logic [COST_W-1:0]         cost_t;

  // Prediction modes handled by the generator. Values 0..8 are the H.264
  // Intra4x4PredMode numbers; plane prediction is deliberately absent.
  typedef enum logic [3:0] {
    I4_V    = 4'd0, I4_H   = 4'd1, I4_DC  = 4'd2, I4_DDL = 4'd3,
    I4_DDR  = 4'd4, I4_VR  = 4'd5, I4_HD  = 4'd6, I4_VL  = 4'd7,
    I4_HU   = 4'd8,
    I16_V   = 4'd9, I16_H  = 4'd10, I16_DC = 4'd11,
    C8_DC   = 4'd12, C8_H  = 4'd13, C8_V   = 4'd14
  } pred_mode_e;

  // Transform kinds of the merged forward / inverse transform units.
  typedef enum logic [1:0] {
    TR_DCT  = 2'd0,   // 4x4 integer transform
    TR_DHT4 = 2'd1,   // 4x4 Hadamard of luma 16x16 DC terms
    TR_DHT2 = 2'd2    // 2x2 Hadamard of chroma DC terms
  } tr_kind_e;

  // Coefficient class of position (row i, column j) of a 4x4 block:
  // 0 = both even, 1 = both odd, 2 = other.
  // Only the parities of i and j matter: the arguments are i[0] and j[0].
  function automatic logic [1:0] pos_class(input logic i0, input logic j0);
    logic [1:0] par;
    par = {i0, j0};
    if (par == 2'b11) return 2'd1;
    if (par == 2'b00) return 2'd0;
    return 2'd2;
  endfunction

  // Quantization factors (Table 2 of the codec description).
  function automatic logic [13:0] quant_coef(input logic [2:0] qp_rem, input logic [1:0] cls);
    logic [13:0] t [6][3];
    t = '{'{14'd13107, 14'd5243, 14'd8066},
          '{14'd11916, 14'd4660, 14'd7490},
          '{14'd10082, 14'd4194, 14'd6554},
          '{14'd9362,  14'd3647, 14'd5825},
          '{14'd8192,  14'd3355, 14'd5243},
          '{14'd7282,  14'd2893, 14'd4559}};
    return t[qp_rem][cls];
  endfunction

  // De-quantization factors (Table 3 of the codec description).
  function automatic logic [4:0] dequant_coef(input logic [2:0] qp_rem, input logic [1:0] cls);
    logic [4:0] t [6][3];
    t = '{'{5'd10, 5'd16, 5'd13},
          '{5'd11, 5'd18, 5'd14},
          '{5'd13, 5'd20, 5'd16},
          '{5'd14, 5'd23, 5'd18},
          '{5'd16, 5'd25, 5'd20},
          '{5'd18, 5'd29, 5'd23}};
    return t[qp_rem][cls];
  endfunction

  function automatic logic [2:0] qp_rem_of(input logic [5:0] qp);
    return 3'(qp % 6);
  endfunction

  function automatic logic [3:0] qp_per_of(input logic [5:0] qp);
    return 4'(qp / 6);
  endfunction

  // Mode-decision lambda of the reference software.
  function automatic logic [6:0] lambda_of(input logic [5:0] qp);
    logic [6:0] t [40];
    logic [5:0] k;
    t = '{7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,7'd1,
          7'd1,7'd1,7'd2,7'd2,7'd2,7'd2,7'd3,7'd3,7'd3,7'd4,7'd4,7'd4,7'd5,7'd6,
          7'd6,7'd7,7'd8,7'd9,7'd10,7'd11,7'd13,7'd14,7'd16,7'd18,7'd20,7'd23};
    k = (qp > 6'd12) ? qp - 6'd12 : 6'd0;
    return t[k];
  endfunction

  function automatic pix_t clip_pix(input logic signed [11:0] v);
    if (v < 0)         return 8'd0;
    else if (v > 255)  return 8'd255;
    else               return pix_t'(v);
  endfunction

endpackage
