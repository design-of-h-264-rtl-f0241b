// expgolomb_codec: Exp-Golomb (UVLC) encoder and decoder for the unsigned
// ue(v) and signed se(v) syntax elements (mode, type and QP-delta fields).
//
// A code word is [M zeros][1][M info bits]: codeNum + 1 written in binary
// (M+1 bits) preceded by M zeros, length 2M+1. Signed values map to code
// numbers as v > 0 -> 2v-1, v <= 0 -> -2v.
//
// Encoder (combinational): enc_val (two's complement when enc_signed) ->
// enc_code, the code word right-aligned without its leading zeros (they are
// implied by enc_len; the rest is codeNum + 1, at most VAL_W+1 bits), and enc_len in bits. Decoder (combinational): dec_win is the
// next CODE_W bits of the stream, first bit in the MSB -> dec_val, dec_len
// (bits consumed) and dec_err when the prefix is longer than a VAL_W-bit
// value allows. Both halves are pure logic so a bitstream packer / parser
// can use them in its own cycle.
//
// The prefix/suffix structure and the signed mapping follow the standard's
// description of Exp-Golomb codes; the value width (VAL_W) and the
// combinational form are this design's choices.
module expgolomb_codec #(
  parameter int VAL_W  = 16,
  parameter int CODE_W = 2 * VAL_W + 1,
  parameter int LEN_W  = $clog2(CODE_W + 1)
)(
  input  logic              enc_signed,
  input  logic [VAL_W-1:0]  enc_val,
  output logic [VAL_W:0]    enc_code,   // code word without its leading zeros
  output logic [LEN_W-1:0]  enc_len,
  input  logic              dec_signed,
  input  logic [CODE_W-1:0] dec_win,
  output logic [VAL_W-1:0]  dec_val,
  output logic [LEN_W-1:0]  dec_len,
  output logic              dec_err
);
  // ---------------- encoder ----------------
  logic [VAL_W:0] cn, x;
  int m;
  always_comb begin
    if (!enc_signed)               cn = {1'b0, enc_val};
    else if (enc_val[VAL_W-1])     cn = (VAL_W+1)'(-$signed({enc_val[VAL_W-1], enc_val})) << 1;
    else if (enc_val == '0)        cn = '0;
    else                           cn = ({1'b0, enc_val} << 1) - 1'b1;
    x = cn + 1'b1;
    m = 0;
    for (int i = 0; i <= VAL_W; i++) if (x[i]) m = i;
    enc_code = x;
    enc_len  = LEN_W'(2 * m + 1);
  end

  // ---------------- decoder ----------------
  int z;
  logic found;
  logic [CODE_W-1:0] sh;   // only the low VAL_W+1 bits are the info field
  logic [VAL_W:0] dx, dcn;
  always_comb begin
    z = 0; found = 1'b0;
    for (int i = CODE_W - 1; i >= 0; i--)
      if (!found) begin
        if (dec_win[i]) found = 1'b1;
        else z = z + 1;
      end
    dec_err = !found || z > VAL_W;
    // the M+1 bits starting at the leading one, right-aligned
    sh  = dec_win >> (CODE_W - 2 * z - 1);
    dx  = dec_err ? (VAL_W+1)'(1) : sh[VAL_W:0];
    dcn = dx - 1'b1;
    if (!dec_signed)  dec_val = VAL_W'(dcn);
    else if (dcn[0])  dec_val = VAL_W'((dcn + 1'b1) >> 1);
    else              dec_val = VAL_W'(-(dcn >> 1));
    dec_len = dec_err ? '0 : LEN_W'(2 * z + 1);
  end
endmodule
