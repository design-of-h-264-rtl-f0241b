// tb_h264_intra_codec: end-to-end test of the codec top at its default
// parameters. A behavioural reference encoder in the testbench (per-pixel
// H.264 prediction equations, matrix-product transform, enhanced-SATD cost,
// table quantization, standard inverse transform) processes the same
// macroblocks. Per macroblock the test checks the sixteen chosen 4x4 modes,
// every reconstructed pixel, the levels read back through the entropy port
// of the ping-pong buffer during the next macroblock, and the cycle count
// against the 1,080-cycle macroblock budget. Decoding macroblocks feed the
// reference levels through the entropy port and must reproduce the
// encoder's reconstruction exactly, also in the source buffer. It counts how
// often each mechanism occurs: encode and decode (mode switch), bank swap,
// most-probable-mode hit and miss, skipped unavailable modes, replacement of
// the best block, reconstruction clipping; one that never occurs is a
// failure. Half of the encoded macroblocks use the modified three-step fast
// mode order; the reference then tries modes 0-4 and the pair next to
// vertical or horizontal, and both sides of that decision must occur. The
// separate eight-pixel transform of the top is given two back-to-back
// blocks once, and the separate eight-pixel prediction generator predicts
// block 0 in all nine modes for several neighbour contexts.
module tb_h264_intra_codec;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fast_md, fast_vert;
  logic p8_in_valid, p8_pair, p8_avail_top, p8_avail_left, p8_avail_tr, p8_out_valid, p8_out_pair;
  pred_mode_e p8_mode;
  pix_t p8_top [8], p8_left [4], p8_corner, p8_pred [2][4];
  logic t8_in_valid, t8_in_pair, t8_out_valid, t8_out_pair;
  coef_t t8_in_rows [2][4], t8_out_rows [2][4];
  logic dec_mode, qp_override, start, busy, done, qpd_from_stream;
  logic [5:0] qp_in, hdr_len, qpd_len;
  logic [32:0] hdr_win;
  logic [16:0] qpd_code;
  logic ext_src_en, ext_src_we;
  logic [6:0] ext_src_addr;
  logic [31:0] ext_src_wdata, ext_src_rdata;
  pix_t top_line_in[20], corner_in, left_in[16];
  logic avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb, left_from_prev;
  logic [3:0] top_mb_modes[4], left_mb_modes[4], dec_modes[16], blk_modes[16];
  logic ent_en, ent_we;
  logic [6:0] ent_addr;
  logic [63:0] ent_wdata, ent_rdata;
  pix_t rec_mb[16][16];

  h264_intra_codec dut(.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_t8 = 0, n_p8 = 0;
  int n_qpd_nz = 0, n_fast_v = 0, n_fast_h = 0;
  bit FAST;
  int n_enc = 0, n_dec = 0, n_swap = 0, n_mpm_hit = 0, n_mpm_miss = 0, n_skip = 0, n_replace = 0, n_clip = 0;

  // ---------------- reference model ----------------
  int S [16][16];          // source
  int P [17][21];          // picture around the MB: P[y+1][x+1], y -1..15, x -1..19
  int refmode [16];
  int reflev [16][4][4];
  int RQP;
  int TOPM [4], LEFTM [4];
  bit AT, AL, ATR, ATL;

  function automatic int zx(int z); return (z & 1) + ((z >> 1) & 2); endfunction
  function automatic int zy(int z); return ((z >> 1) & 1) + ((z >> 2) & 2); endfunction
  function automatic int zidx(int x, int y); return (x & 1) | ((y & 1) << 1) | ((x & 2) << 1) | ((y & 2) << 2); endfunction

  int bx0, by0;
  bit at, al, atr, ac;
  function automatic int px(int x, int y);   // p[x,y] relative to the block
    if (y == -1 && x > 3 && !atr) x = 3;
    return P[4*by0 + y + 1][4*bx0 + x + 1];
  endfunction

  function automatic int pred_ref(int m, int x, int y);
    int z, st = 0, sl = 0;
    for (int k = 0; k < 4; k++) begin st += px(k, -1); sl += px(-1, k); end
    case (m)
      0: return px(x, -1);
      1: return px(-1, y);
      2: return (at && al) ? (st + sl + 4) / 8 : at ? (st + 2) / 4 : al ? (sl + 2) / 4 : 128;
      3: if (x == 3 && y == 3) return (px(6,-1) + 3*px(7,-1) + 2) / 4;
         else return (px(x+y,-1) + 2*px(x+y+1,-1) + px(x+y+2,-1) + 2) / 4;
      4: if (x > y) return (px(x-y-2,-1) + 2*px(x-y-1,-1) + px(x-y,-1) + 2) / 4;
         else if (x < y) return (px(-1,y-x-2) + 2*px(-1,y-x-1) + px(-1,y-x) + 2) / 4;
         else return (px(0,-1) + 2*px(-1,-1) + px(-1,0) + 2) / 4;
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return (px(x-(y>>1)-1,-1) + px(x-(y>>1),-1) + 1) / 2;
        if (z >= 0) return (px(x-(y>>1)-2,-1) + 2*px(x-(y>>1)-1,-1) + px(x-(y>>1),-1) + 2) / 4;
        if (z == -1) return (px(-1,0) + 2*px(-1,-1) + px(0,-1) + 2) / 4;
        return (px(-1,y-1) + 2*px(-1,y-2) + px(-1,y-3) + 2) / 4;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return (px(-1,y-(x>>1)-1) + px(-1,y-(x>>1)) + 1) / 2;
        if (z >= 0) return (px(-1,y-(x>>1)-2) + 2*px(-1,y-(x>>1)-1) + px(-1,y-(x>>1)) + 2) / 4;
        if (z == -1) return (px(-1,0) + 2*px(-1,-1) + px(0,-1) + 2) / 4;
        return (px(x-1,-1) + 2*px(x-2,-1) + px(x-3,-1) + 2) / 4;
      end
      7: if (y % 2 == 0) return (px(x+(y>>1),-1) + px(x+(y>>1)+1,-1) + 1) / 2;
         else return (px(x+(y>>1),-1) + 2*px(x+(y>>1)+1,-1) + px(x+(y>>1)+2,-1) + 2) / 4;
      default: begin
        z = x + 2*y;
        if (z > 5) return px(-1,3);
        if (z == 5) return (px(-1,2) + 3*px(-1,3) + 2) / 4;
        if (z % 2 == 0) return (px(-1,y+(x>>1)) + px(-1,y+(x>>1)+1) + 1) / 2;
        return (px(-1,y+(x>>1)) + 2*px(-1,y+(x>>1)+1) + px(-1,y+(x>>1)+2) + 2) / 4;
      end
    endcase
  endfunction

  function automatic bit usable(int m);
    case (m)
      0, 3, 7: return at;
      1, 8: return al;
      2: return 1;
      default: return at && al && ac;
    endcase
  endfunction

  int QT [6][3] = '{'{13107,5243,8066},'{11916,4660,7490},'{10082,4194,6554},
                    '{9362,3647,5825},'{8192,3355,5243},'{7282,2893,4559}};
  int DQ [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};
  int LAM [40] = '{1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23};
  function automatic int cls(int i, int j); return (i%2==0 && j%2==0) ? 0 : (i%2==1 && j%2==1) ? 1 : 2; endfunction

  task automatic ref_encode();
    int C [4][4] = '{'{1,1,1,1},'{2,1,-1,-2},'{1,-1,-1,1},'{1,-2,2,-1}};
    int W [3] = '{32, 20, 25};
    int lam, bestc, bestm, c, ma, mb, mpm, z, nm;
    int cm [9];
    bit fvert;
    int pr [4][4], X [4][4], Y [4][4], BY [4][4], d [4][4], f [4][4], e0, e1, e2, e3, s, qb, qc;
    lam = LAM[RQP > 12 ? RQP - 12 : 0];
    for (z = 0; z < 16; z++) begin
      bx0 = zx(z); by0 = zy(z);
      at = by0 > 0 || AT; al = bx0 > 0 || AL;
      ac = (bx0 > 0 && by0 > 0) || (by0 == 0 && bx0 > 0 && AT) || (bx0 == 0 && by0 > 0 && AL) || (bx0 == 0 && by0 == 0 && ATL);
      if (by0 == 0) atr = (bx0 < 3) ? AT : ATR;
      else atr = (bx0 == 3) ? 0 : (zidx(bx0 + 1, by0 - 1) < z);
      // most probable mode
      if (bx0 > 0) ma = refmode[zidx(bx0 - 1, by0)]; else ma = AL ? LEFTM[by0] : -1;
      if (by0 > 0) mb = refmode[zidx(bx0, by0 - 1)]; else mb = AT ? TOPM[bx0] : -1;
      mpm = (ma < 0 || mb < 0) ? 2 : (ma < mb ? ma : mb);
      bestc = -1; nm = 0;
      for (int m = 0; m < 9; m++) begin
        if (!usable(m)) continue;
        nm++;
        // modified three-step order: after modes 0..4 only one side's pair
        if (FAST && m == 5) begin
          fvert = (at && al) ? (cm[0] <= cm[1]) : at;
          if (fvert) n_fast_v++; else n_fast_h++;
        end
        if (FAST && m >= 5 && (fvert ? (m == 6 || m == 8) : (m == 5 || m == 7))) continue;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) X[y][x] = S[4*by0 + y][4*bx0 + x] - pred_ref(m, x, y);
        s = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          Y[i][j] = 0;
          for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) Y[i][j] += C[i][k] * X[k][l] * C[j][l];
          s += (Y[i][j] < 0 ? -Y[i][j] : Y[i][j]) * W[cls(i, j)];
        end
        c = s / 32 + ((m != mpm) ? 4 * lam : 0);
        cm[m] = c;
        if (bestc < 0 || c < bestc) begin
          if (bestc >= 0) n_replace++;
          bestc = c; bestm = m; BY = Y;
          for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) pr[y][x] = pred_ref(m, x, y);
        end
      end
      if (nm < 9) n_skip++;
      if (bestm == mpm) n_mpm_hit++; else n_mpm_miss++;
      refmode[z] = bestm;
      // quantization, de-quantization, inverse transform, reconstruction
      qb = 15 + RQP / 6;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        qc = QT[RQP % 6][cls(i, j)];
        s = ((BY[i][j] < 0 ? -BY[i][j] : BY[i][j]) * qc + (1 << qb) / 3) >> qb;
        reflev[z][i][j] = BY[i][j] < 0 ? -s : s;
        d[i][j] = (reflev[z][i][j] * DQ[RQP % 6][cls(i, j)]) << (RQP / 6);
      end
      for (int i = 0; i < 4; i++) begin
        e0 = d[i][0] + d[i][2]; e1 = d[i][0] - d[i][2];
        e2 = (d[i][1] >>> 1) - d[i][3]; e3 = d[i][1] + (d[i][3] >>> 1);
        f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
      end
      for (int j = 0; j < 4; j++) begin
        int h [4];
        e0 = f[0][j] + f[2][j]; e1 = f[0][j] - f[2][j];
        e2 = (f[1][j] >>> 1) - f[3][j]; e3 = f[1][j] + (f[3][j] >>> 1);
        h[0] = e0 + e3; h[1] = e1 + e2; h[2] = e1 - e2; h[3] = e0 - e3;
        for (int i = 0; i < 4; i++) begin
          s = pr[i][j] + ((h[i] + 32) >>> 6);
          if (s < 0 || s > 255) n_clip++;
          P[4*by0 + i + 1][4*bx0 + j + 1] = s < 0 ? 0 : (s > 255 ? 255 : s);
        end
      end
    end
  endtask

  // signed Exp-Golomb code of v: right-aligned code word and its length
  function automatic void se_code(int v, output logic [32:0] code, output int len);
    int cn = v > 0 ? 2 * v - 1 : -2 * v;
    int m = 0;
    while (((cn + 1) >> (m + 1)) != 0) m++;
    code = 33'(cn + 1); len = 2 * m + 1;
  endfunction
  int qp_prev_m = 28;

  // ---------------- stimulus helpers ----------------
  task automatic set_context(bit t, bit l, bit tr, bit tl);
    AT = t; AL = l; ATR = tr; ATL = tl;
    {avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb} = {t, l, tr, tl};
    for (int y = 0; y < 17; y++) for (int x = 0; x < 21; x++) P[y][x] = 0;
    for (int k = 0; k < 20; k++) begin P[0][k+1] = $urandom_range(40, 220); top_line_in[k] = pix_t'(P[0][k+1]); end
    P[0][0] = $urandom_range(40, 220); corner_in = pix_t'(P[0][0]);
    for (int k = 0; k < 16; k++) begin P[k+1][0] = $urandom_range(40, 220); left_in[k] = pix_t'(P[k+1][0]); end
    for (int k = 0; k < 4; k++) begin
      TOPM[k] = $urandom_range(0, 8); LEFTM[k] = $urandom_range(0, 8);
      top_mb_modes[k] = 4'(TOPM[k]); left_mb_modes[k] = 4'(LEFTM[k]);
    end
  endtask

  task automatic make_source(int kind);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      case (kind)
        0: S[y][x] = (x * 9 + y * 5 + $urandom_range(0, 12)) % 256;           // gradient
        1: S[y][x] = ((x / 4 + y / 4) % 2) ? 250 + $urandom_range(0, 5) : $urandom_range(0, 5); // edges, saturating
        2: S[y][x] = (y < 8) ? 60 + 10 * x : 200 - 5 * y;                     // directional
        default: S[y][x] = $urandom_range(0, 255);                            // noise
      endcase
  endtask

  task automatic load_source();
    for (int w = 0; w < 64; w++) begin
      @(negedge clk);
      ext_src_en = 1; ext_src_we = 1; ext_src_addr = 7'(w);
      for (int k = 0; k < 4; k++) ext_src_wdata[8*k +: 8] = 8'(S[w / 4][4 * (w % 4) + k]);
    end
    @(negedge clk); ext_src_en = 0; ext_src_we = 0;
  endtask

  task automatic run_mb(bit dec, output int cycles);
    int c0;
    bit bs;
    bs = dut.bank_sel;
    @(negedge clk);
    dec_mode = dec; start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
    if (dut.bank_sel != bs) n_swap++;
    if (dec) n_dec++; else n_enc++;
  endtask

  task automatic check_recon(string tag);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      chk(int'(rec_mb[y][x]) == P[y+1][x+1], $sformatf("%s recon (%0d,%0d) got %0d exp %0d", tag, x, y, rec_mb[y][x], P[y+1][x+1]));
  endtask

  // read the levels of the previous macroblock through the entropy port
  task automatic check_levels(int lv [16][4][4]);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      ent_en = 1; ent_we = 0; ent_addr = 7'(a);
      @(negedge clk);
      ent_en = 0;
      for (int j = 0; j < 4; j++)
        chk(int'($signed(ent_rdata[16*j +: 16])) == lv[a / 4][a % 4][j], $sformatf("level blk %0d row %0d col %0d got %0d exp %0d", a / 4, a % 4, j, int'($signed(ent_rdata[16*j +: 16])), lv[a / 4][a % 4][j]));
    end
  endtask

  task automatic write_levels(int lv [16][4][4]);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      ent_en = 1; ent_we = 1; ent_addr = 7'(a);
      for (int j = 0; j < 4; j++) ent_wdata[16*j +: 16] = 16'(lv[a / 4][a % 4][j]);
    end
    @(negedge clk); ent_en = 0; ent_we = 0;
  endtask

  // eight-pixel transform: two back-to-back blocks of source-minus-128
  // residuals, compared with the matrix product
  task automatic check_t8();
    int C [4][4] = '{'{1,1,1,1},'{2,1,-1,-2},'{1,-1,-1,1},'{1,-2,2,-1}};
    int X [2][4][4], Y [2][4][4];
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) X[b][i][j] = S[i][4*b + j] - 128;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        Y[b][i][j] = 0;
        for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) Y[b][i][j] += C[i][k] * X[b][k][l] * C[j][l];
      end
    end
    fork
      begin
        for (int b = 0; b < 2; b++) for (int p = 0; p < 2; p++) begin
          @(negedge clk);
          t8_in_valid = 1; t8_in_pair = 1'(p);
          for (int r = 0; r < 2; r++) for (int k = 0; k < 4; k++) t8_in_rows[r][k] = coef_t'(X[b][2*p + r][k]);
        end
        @(negedge clk); t8_in_valid = 0;
      end
      begin
        for (int n = 0; n < 4; n++) begin
          @(negedge clk);
          while (!t8_out_valid) @(negedge clk);
          chk(t8_out_pair == 1'(n % 2), "t8 pair order");
          for (int r = 0; r < 2; r++) for (int k = 0; k < 4; k++)
            chk(int'(t8_out_rows[r][k]) == Y[n / 2][2*(n % 2) + r][k], "t8 coefficient");
        end
        n_t8++;
      end
    join
  endtask

  // eight-pixel prediction of block 0 from the current neighbour context,
  // all nine modes, compared with the reference equations
  task automatic check_p8();
    bx0 = 0; by0 = 0; at = AT; al = AL; atr = AT;
    for (int k = 0; k < 8; k++) p8_top[k] = top_line_in[k];
    for (int k = 0; k < 4; k++) p8_left[k] = left_in[k];
    p8_corner = corner_in;
    {p8_avail_top, p8_avail_left, p8_avail_tr} = {AT, AL, AT};
    for (int m = 0; m < 9; m++)
      for (int p = 0; p < 2; p++) begin
        @(negedge clk);
        p8_in_valid = 1; p8_mode = pred_mode_e'(m); p8_pair = 1'(p);
        @(negedge clk);
        p8_in_valid = 0;
        chk(p8_out_valid && p8_out_pair == 1'(p), "p8 timing");
        for (int r = 0; r < 2; r++) for (int x = 0; x < 4; x++)
          chk(int'(p8_pred[r][x]) == pred_ref(m, x, 2*p + r), $sformatf("p8 mode %0d row %0d", m, 2*p + r));
      end
    n_p8++;
  endtask

  int prev_lev [16][4][4];
  int keep_lev [16][4][4];
  int keep_mode [16];
  int keep_P [17][21];
  int keep_qp;
  pix_t k_top [20], k_corner, k_left [16];
  logic [3:0] k_av;
  logic [3:0] k_tm [4], k_lm [4];
  initial begin
    int cycles, maxc, maxd, maxf;
    bit have_prev;
    p8_in_valid = 0; p8_pair = 0; p8_mode = I4_V; p8_top = '{default: '0}; p8_left = '{default: '0};
    p8_corner = '0; p8_avail_top = 0; p8_avail_left = 0; p8_avail_tr = 0;
    t8_in_valid = 0; t8_in_pair = 0; t8_in_rows = '{default: '0};
    fast_md = 0; dec_mode = 0; qp_override = 0; qp_in = 28; start = 0; qpd_from_stream = 0; hdr_win = '0;
    ext_src_en = 0; ext_src_we = 0; ext_src_addr = 0; ext_src_wdata = 0;
    ent_en = 0; ent_we = 0; ent_addr = 0; ent_wdata = 0; left_from_prev = 0;
    foreach (dec_modes[k]) dec_modes[k] = 2;
    set_context(0, 0, 0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    have_prev = 0; maxc = 0; maxd = 0; maxf = 0;
    for (int mb = 0; mb < 8; mb++) begin
      // ---- encode ----
      RQP = (mb % 3 == 2) ? 16 : 28;
      FAST = (mb % 4) >= 2; fast_md = FAST;
      qp_override = (RQP != 28); qp_in = 6'(RQP);
      make_source(mb % 4);
      load_source();
      if (mb == 3) check_t8();
      if (mb == 0) set_context(0, 0, 0, 0);
      else if (mb == 1) set_context(1, 0, 1, 0);
      else if (mb == 2) set_context(0, 1, 0, 0);
      else set_context(1, 1, mb % 2, 1);
      if (mb >= 3) check_p8();
      ref_encode();
      fork
        run_mb(0, cycles);
        if (have_prev) begin
          repeat (4) @(negedge clk);
          check_levels(prev_lev);
        end
      join
      if (cycles > maxc) maxc = cycles;
      begin
        logic [32:0] code;
        int len;
        se_code(RQP - qp_prev_m, code, len);
        chk(int'(qpd_len) == len && 33'(qpd_code) == code, $sformatf("mb %0d qp delta code len %0d exp %0d", mb, qpd_len, len));
        if (RQP != qp_prev_m) n_qpd_nz++;
        qp_prev_m = RQP;
      end
      chk(cycles <= 1080, $sformatf("encode cycles %0d", cycles));
      if (FAST) chk(cycles <= 16 * 50 + 2, $sformatf("fast encode cycles %0d", cycles));
      if (FAST && cycles > maxf) maxf = cycles;
      for (int z = 0; z < 16; z++) chk(int'(blk_modes[z]) == refmode[z], $sformatf("mb %0d blk %0d mode %0d exp %0d", mb, z, blk_modes[z], refmode[z]));
      check_recon("enc");
      prev_lev = reflev; have_prev = 1;
      if (mb % 2 == 0) begin
        // keep this macroblock to decode it after the next one is encoded
        keep_lev = reflev; keep_mode = refmode; keep_P = P; keep_qp = RQP;
        k_top = top_line_in; k_corner = corner_in; k_left = left_in;
        k_av = {avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb};
        k_tm = top_mb_modes; k_lm = left_mb_modes;
      end else begin
        // ---- decode the previous (even) macroblock from its levels ----
        // Its levels are in the entropy bank; clear it and write them again
        // through the entropy port, as a CAVLC decoder would.
        int zero_lev [16][4][4];
        logic [32:0] code;
        int len;
        foreach (zero_lev[a, b, c]) zero_lev[a][b][c] = 0;
        write_levels(zero_lev);
        write_levels(keep_lev);
        foreach (dec_modes[k]) dec_modes[k] = 4'(keep_mode[k]);
        top_line_in = k_top; corner_in = k_corner; left_in = k_left;
        {avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb} = k_av;
        top_mb_modes = k_tm; left_mb_modes = k_lm;
        // the QP comes from the stream: a wrong override must be ignored
        se_code(keep_qp - qp_prev_m, code, len);
        if (keep_qp != qp_prev_m) n_qpd_nz++;
        qpd_from_stream = 1; qp_override = 1; qp_in = 6'd45;
        hdr_win = {$urandom, $urandom};
        for (int i = 0; i < len; i++) hdr_win[32 - i] = code[len - 1 - i];
        #1;
        chk(int'(hdr_len) == len, $sformatf("mb_qp_delta length %0d exp %0d", hdr_len, len));
        // scramble the source buffer so the decoded output is really written
        for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) S[y][x] = 7;
        load_source();
        // during the decode the entropy side holds the odd macroblock's
        // levels; after the next swap it holds the levels just decoded
        fork
          run_mb(1, cycles);
          begin repeat (4) @(negedge clk); check_levels(prev_lev); end
        join
        prev_lev = keep_lev;
        qp_prev_m = keep_qp;
        qpd_from_stream = 0;
        chk(cycles <= 236, $sformatf("decode cycles %0d", cycles));
        if (cycles > maxd) maxd = cycles;
        P = keep_P;
        check_recon("dec");
        for (int w = 0; w < 64; w++) begin
          @(negedge clk); ext_src_en = 1; ext_src_we = 0; ext_src_addr = 7'(w);
          @(negedge clk); ext_src_en = 0;
          for (int k = 0; k < 4; k++)
            chk(int'(ext_src_rdata[8*k +: 8]) == P[w / 4 + 1][4 * (w % 4) + k + 1], "decoded pixel in source buffer");
        end
      end
    end
    $display("max cycles per macroblock: encode %0d fast encode %0d decode %0d", maxc, maxf, maxd);
    $display("mechanisms: p8=%0d t8=%0d fast_v=%0d fast_h=%0d qp_delta_nonzero=%0d enc=%0d dec=%0d swap=%0d mpm_hit=%0d mpm_miss=%0d skip=%0d replace=%0d clip=%0d",
             n_p8, n_t8, n_fast_v, n_fast_h, n_qpd_nz, n_enc, n_dec, n_swap, n_mpm_hit, n_mpm_miss, n_skip, n_replace, n_clip);
    chk(n_p8 > 0, "eight-pixel prediction never used");
    chk(n_t8 > 0, "eight-pixel transform never used");
    chk(n_fast_v > 0, "fast decision never took the vertical side");
    chk(n_fast_h > 0, "fast decision never took the horizontal side");
    chk(n_qpd_nz > 0, "QP never changed between macroblocks");
    chk(n_enc > 0, "encode never ran");
    chk(n_dec > 0, "decode never ran");
    chk(n_swap > 0, "bank swap never happened");
    chk(n_mpm_hit > 0, "most probable mode never chosen");
    chk(n_mpm_miss > 0, "non-most-probable mode never chosen");
    chk(n_skip > 0, "no unavailable mode skipped");
    chk(n_replace > 0, "best block never replaced");
    chk(n_clip > 0, "reconstruction never clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
