// tb_fwd_transform8: streams random residual blocks into the eight-input
// transform, two rows per cycle, back to back (a block every two cycles)
// and with random idle gaps, and compares each output row pair with the
// matrix product Y = C X C^T. Checks the timing: output rows 0-1 must be
// visible right after the edge that accepted rows 2-3, rows 2-3 one cycle
// later, i.e. a sustained rate of one 4x4 block per two cycles.
module tb_fwd_transform8;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_pair, out_valid, out_pair;
  coef_t in_rows [2][4], out_rows [2][4];
  fwd_transform8 dut(.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  int C [4][4] = '{'{1,1,1,1},'{2,1,-1,-2},'{1,-1,-1,1},'{1,-2,2,-1}};
  int expq [$];          // expected rows, 4 values each, in output order
  int cyc = 0, n_b2b = 0;
  int accept_cyc [$];    // cycle at which rows 2-3 were accepted

  always @(posedge clk) cyc <= cyc + 1;

  // output monitor, sampled at the negative edge
  int got_pair = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    chk(out_pair == 1'(got_pair), "output pair order");
    if (got_pair == 0) begin
      int a;
      a = accept_cyc.pop_front();
      chk(cyc == a + 1, $sformatf("rows 0-1 latency: visible at %0d, accepted at %0d", cyc, a));
    end
    for (int r = 0; r < 2; r++) for (int k = 0; k < 4; k++) begin
      int e;
      e = expq.pop_front();
      chk(int'(out_rows[r][k]) == e, $sformatf("row %0d col %0d got %0d exp %0d", 2*got_pair + r, k, out_rows[r][k], e));
    end
    got_pair ^= 1;
  end

  initial begin
    int X [4][4];
    in_valid = 0; in_pair = 0; in_rows = '{default: '0};
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (3000) begin
      int mx;
      mx = ($urandom_range(0, 3) == 0) ? 255 : $urandom_range(1, 255);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) X[i][j] = $urandom_range(0, 2 * mx) - mx;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        int y;
        y = 0;
        for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) y += C[i][k] * X[k][l] * C[j][l];
        expq.push_back(y);
      end
      for (int p = 0; p < 2; p++) begin
        in_valid = 1; in_pair = 1'(p);
        for (int r = 0; r < 2; r++) for (int k = 0; k < 4; k++) in_rows[r][k] = coef_t'(X[2*p + r][k]);
        @(posedge clk);
        if (p == 1) accept_cyc.push_back(cyc);
        @(negedge clk);
      end
      in_valid = 0;
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
      else n_b2b++;
    end
    repeat (5) @(negedge clk);
    chk(expq.size() == 0, "rows missing at the output");
    chk(n_b2b > 0, "no back-to-back blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
