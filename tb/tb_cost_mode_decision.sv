// tb_cost_mode_decision: feeds macroblocks of random candidate coefficient
// blocks (a random subset of the nine 4x4 modes per block, then 16x16 and
// chroma candidates) and compares every candidate cost with
// floor(sum(|c| * w) / 32) + 4*lambda*(mode != mpm), w = 32/20/25, then the
// best 4x4 mode, cost and block registers after each block, the 4x4
// macroblock total (with 6*lambda per four blocks) and the 16x16 / chroma
// decisions.
module tb_cost_mode_decision;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] lambda;
  logic mb_clr, in_valid, in_first, blk_commit, cost_valid, use_i16;
  logic [1:0] in_idx;
  logic [2:0] avail16, availc;
  logic [3:0] in_mpm;
  coef_t in_row[4], best_block[4][4];
  pred_mode_e in_mode, best_mode, best16_mode, bestc_mode;
  cost_t cost, best_cost, i4_total, best16_cost, bestc_cost;
  int checks = 0, failures = 0;
  cost_mode_decision dut(.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int blk [4][4];
  function automatic int ref_cost(pred_mode_e m, int mpm);
    int s = 0, w;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      w = (i % 2 == 0 && j % 2 == 0) ? 32 : (i % 2 == 1 && j % 2 == 1) ? 20 : 25;
      s += (blk[i][j] < 0 ? -blk[i][j] : blk[i][j]) * w;
    end
    s = s / 32;
    if (m <= I4_HU && int'(m) != mpm) s += 4 * int'(lambda);
    return s;
  endfunction

  task automatic send(pred_mode_e m, bit first, int mpm, output int c);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) blk[i][j] = $signed($urandom_range(0, 400)) - 200;
    c = ref_cost(m, mpm);
    for (int r = 0; r < 4; r++) begin
      in_valid = 1; in_idx = 2'(r); in_mode = m; in_first = first; in_mpm = 4'(mpm);
      for (int j = 0; j < 4; j++) in_row[j] = coef_t'(blk[r][j]);
      @(negedge clk);
    end
    in_valid = 0;
    #1;
    chk(cost_valid && int'(cost) == c, $sformatf("cost mode %0d got %0d exp %0d", m, cost, c));
  endtask

  initial begin
    int c, bc, tot, a16[3], ac[3], mpm, bm, nm;
    int bb [4][4];
    pred_mode_e e16, ec;
    in_valid = 0; in_idx = 0; in_first = 0; in_mpm = 0; in_mode = I4_V; mb_clr = 0; blk_commit = 0;
    avail16 = 3'b111; availc = 3'b111; lambda = 7'd5;
    foreach (in_row[k]) in_row[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int mb = 0; mb < 20; mb++) begin
      lambda = 7'($urandom_range(1, 40));
      avail16 = {1'b1, 2'($urandom)}; availc = {2'($urandom), 1'b1};
      mb_clr = 1; @(negedge clk); mb_clr = 0;
      tot = 0;
      for (int b = 0; b < 16; b++) begin
        mpm = $urandom_range(0, 8);
        nm = $urandom_range(1, 9);
        for (int m = 0; m < nm; m++) begin
          send(pred_mode_e'(m), m == 0, mpm, c);
          @(negedge clk);
          if (m == 0 || c < bc) begin bc = c; bm = m; bb = blk; end
        end
        chk(int'(best_mode) == bm && int'(best_cost) == bc, "best 4x4");
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
          chk(int'(best_block[i][j]) == bb[i][j], "best block register");
        blk_commit = 1; @(negedge clk); blk_commit = 0;
        tot += bc + ((b % 4 == 3) ? 6 * int'(lambda) : 0);
      end
      a16 = '{0, 0, 0}; ac = '{0, 0, 0};
      for (int m = 0; m < 3; m++)
        for (int b = 0; b < 16; b++) begin
          send(pred_mode_e'(int'(I16_V) + m), 0, 0, c); a16[m] += c;
        end
      for (int m = 0; m < 3; m++)
        for (int b = 0; b < 8; b++) begin
          send(pred_mode_e'(int'(C8_DC) + m), 0, 0, c); ac[m] += c;
        end
      @(negedge clk);
      chk(int'(i4_total) == tot, $sformatf("i4 total %0d exp %0d", i4_total, tot));
      e16 = I16_DC; c = a16[2];
      if (avail16[0] && a16[0] <= c) begin e16 = I16_V; c = a16[0]; end
      if (avail16[1] && a16[1] < c) begin e16 = I16_H; c = a16[1]; end
      chk(best16_mode == e16 && int'(best16_cost) == c, "16x16 decision");
      chk(use_i16 == (c < tot), "4x4 vs 16x16");
      ec = C8_DC; c = ac[0];
      if (availc[1] && ac[1] < c) begin ec = C8_H; c = ac[1]; end
      if (availc[2] && ac[2] < c) begin ec = C8_V; c = ac[2]; end
      chk(bestc_mode == ec && int'(bestc_cost) == c, "chroma decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
