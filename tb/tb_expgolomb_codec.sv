// tb_expgolomb_codec: checks the Exp-Golomb encoder and decoder at the
// default 16-bit value width against a bit-by-bit model built in the
// testbench (prefix zeros, then codeNum+1 in binary). Covers all small
// values exhaustively, random full-range values, signed mapping, decoding
// with random trailing bits (the decoder must consume exactly the code
// length), encode/decode round trips and the error flag on an over-long
// prefix. The codec is combinational, so results are checked after a
// settle delay.
module tb_expgolomb_codec;
  localparam int VW = 16, CW = 2 * VW + 1;
  logic enc_signed, dec_signed, dec_err;
  logic [VW-1:0] enc_val, dec_val;
  logic [VW:0] enc_code;
  logic [CW-1:0] dec_win, ec;
  logic [5:0] enc_len, dec_len;
  expgolomb_codec dut(.*);

  int checks = 0, failures = 0;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // model: code word as a bit queue, first bit first
  function automatic void model(longint cn, ref bit q[$]);
    longint x = cn + 1;
    int m = 0;
    q.delete();
    while ((x >> (m + 1)) != 0) m++;
    repeat (m) q.push_back(0);
    for (int i = m; i >= 0; i--) q.push_back(bit'((x >> i) & 1));
  endfunction

  function automatic longint map_se(longint v);
    return v > 0 ? 2 * v - 1 : -2 * v;
  endfunction

  task automatic one(bit s, longint v);
    bit q[$];
    logic [CW-1:0] w;
    model(s ? map_se(v) : v, q);
    enc_signed = s; enc_val = VW'(v);
    #1;
    ec = CW'(enc_code);
    chk(int'(enc_len) == q.size(), $sformatf("enc len v=%0d s=%0d got %0d exp %0d", v, s, enc_len, q.size()));
    for (int i = 0; i < q.size(); i++)
      chk(ec[q.size() - 1 - i] === q[i], $sformatf("enc bit %0d of v=%0d", i, v));
    chk((ec >> q.size()) == '0, "enc code above its length not zero");
    // decode the model's bits followed by random tail bits
    w = {$urandom, $urandom};
    for (int i = 0; i < q.size(); i++) w[CW - 1 - i] = q[i];
    dec_signed = s; dec_win = w;
    #1;
    chk(!dec_err, $sformatf("dec err v=%0d", v));
    chk(int'(dec_len) == q.size(), $sformatf("dec len v=%0d got %0d", v, dec_len));
    chk(dec_val == VW'(v), $sformatf("dec val v=%0d s=%0d got %0d", v, s, $signed(dec_val)));
    // round trip through the encoder output
    dec_win = (CW'(enc_code) << (CW - enc_len)) | (CW'($urandom) & ((CW'(1) << (CW - enc_len)) - 1));
    #1;
    chk(dec_val == VW'(v) && dec_len == enc_len, $sformatf("round trip v=%0d", v));
  endtask

  int n_long = 0;
  initial begin
    for (int v = 0; v < 600; v++) one(0, v);
    for (int v = -300; v <= 300; v++) one(1, v);
    one(0, 65535); one(1, 32767); one(1, -32768); one(0, 0); one(1, 0);
    repeat (3000) begin
      longint v;
      v = longint'($urandom_range(0, 65535));
      one(0, v);
      v = longint'($signed(16'($urandom)));
      one(1, v);
      if (enc_len > 20) n_long++;
    end
    // error: prefix longer than a 16-bit value allows, and all zeros
    dec_signed = 0; dec_win = CW'(1) << (CW - 1 - (VW + 1)); #1;
    chk(dec_err, "17 leading zeros not flagged");
    dec_win = '0; #1;
    chk(dec_err, "all-zero window not flagged");
    chk(n_long > 0, "no long codes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
