// tb_inv_transform: streams back-to-back random coefficient blocks into the
// inverse transform and compares each output row with the standard's
// rows-then-columns inverse integer transform ((h + 32) >> 6), and with
// matrix-product references for the 4x4 and 2x2 inverse Hadamard. Checks
// the one-cycle latency after the last input row and the gap-free stream.
module tb_inv_transform;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  tr_kind_e in_kind, out_kind;
  logic [1:0] out_idx;
  coef_t in_row[4], out_row[4];
  int checks = 0, failures = 0;
  inv_transform dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 200;
  int D [NB][4][4];
  int R [NB][4][4];
  tr_kind_e K [NB];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic make_ref(int b);
    int f [4][4];
    int e0, e1, e2, e3, s;
    int H [4][4] = '{'{1,1,1,1},'{1,1,-1,-1},'{1,-1,-1,1},'{1,-1,1,-1}};
    if (K[b] == TR_DCT) begin
      for (int i = 0; i < 4; i++) begin
        e0 = D[b][i][0] + D[b][i][2]; e1 = D[b][i][0] - D[b][i][2];
        e2 = (D[b][i][1] >>> 1) - D[b][i][3]; e3 = D[b][i][1] + (D[b][i][3] >>> 1);
        f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
      end
      for (int j = 0; j < 4; j++) begin
        e0 = f[0][j] + f[2][j]; e1 = f[0][j] - f[2][j];
        e2 = (f[1][j] >>> 1) - f[3][j]; e3 = f[1][j] + (f[3][j] >>> 1);
        R[b][0][j] = (e0 + e3 + 32) >>> 6; R[b][1][j] = (e1 + e2 + 32) >>> 6;
        R[b][2][j] = (e1 - e2 + 32) >>> 6; R[b][3][j] = (e0 - e3 + 32) >>> 6;
      end
    end else begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        s = 0;
        if (K[b] == TR_DHT4) begin
          for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) s += H[i][k] * D[b][k][l] * H[l][j];
        end else if (i < 2 && j < 2) begin
          for (int k = 0; k < 2; k++) for (int l = 0; l < 2; l++)
            s += ((i == 1 && k == 1) ? -1 : 1) * D[b][k][l] * ((l == 1 && j == 1) ? -1 : 1);
        end
        R[b][i][j] = s;
      end
    end
  endtask

  int start_cyc;
  initial begin
    in_valid = 0; in_kind = TR_DCT;
    foreach (in_row[k]) in_row[k] = 0;
    for (int b = 0; b < NB; b++) begin
      K[b] = tr_kind_e'($urandom_range(0, 2));
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        D[b][i][j] = (K[b] == TR_DHT2 && (i > 1 || j > 1)) ? 0 : $signed($urandom_range(0, 4000)) - 2000;
      make_ref(b);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start_cyc = cyc;
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 4; r++) begin
        in_valid = 1; in_kind = K[b];
        for (int j = 0; j < 4; j++) in_row[j] = coef_t'(D[b][r][j]);
        @(negedge clk);
      end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (ob != NB) begin failures++; $display("only %0d blocks out", ob); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ob = 0, orow = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (cyc != start_cyc + 4*ob + 4 + orow + 1 || int'(out_idx) != orow) begin
        failures++;
        if (failures < 5) $display("timing: block %0d row %0d at cycle %0d", ob, orow, cyc - start_cyc);
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(out_row[j]) != R[ob][orow][j]) begin
          failures++;
          if (failures < 10) $display("blk %0d kind %0d (%0d,%0d) got %0d exp %0d", ob, K[ob], orow, j, out_row[j], R[ob][orow][j]);
        end
      end
      orow++;
      if (orow == 4) begin orow = 0; ob++; end
    end
  end
endmodule
