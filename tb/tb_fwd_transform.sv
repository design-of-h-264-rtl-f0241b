// tb_fwd_transform: streams back-to-back random blocks (DCT, 4x4 Hadamard,
// 2x2 Hadamard) into the forward transform and compares every output row
// with a matrix-product reference Y = C X C^T (Hadamard halved), checks the
// DC register and checks that output row 0 of a block appears one cycle
// after its last input row, with no gap between blocks.
module tb_fwd_transform;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_dc_cap, out_valid;
  tr_kind_e in_kind, out_kind;
  logic [3:0] in_dc_idx;
  logic [1:0] out_idx;
  coef_t in_row[4], out_row[4], dc_reg[16];
  int checks = 0, failures = 0;
  fwd_transform dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 200;
  int X [NB][4][4];
  tr_kind_e K [NB];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_y(int b, int i, int j);
    int C [4][4] = '{'{1,1,1,1},'{2,1,-1,-2},'{1,-1,-1,1},'{1,-2,2,-1}};
    int H [4][4] = '{'{1,1,1,1},'{1,1,-1,-1},'{1,-1,-1,1},'{1,-1,1,-1}};
    int s = 0;
    if (K[b] == TR_DHT2) begin
      if (i > 1 || j > 1) return 0;
      for (int k = 0; k < 2; k++) for (int l = 0; l < 2; l++)
        s += ((k == 1 && i == 1) ? -1 : 1) * X[b][k][l] * ((l == 1 && j == 1) ? -1 : 1);
      return s;
    end
    for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++)
      s += (K[b] == TR_DCT ? C[i][k] * X[b][k][l] * C[j][l] : H[i][k] * X[b][k][l] * H[j][l]);
    return (K[b] == TR_DHT4) ? (s >>> 1) : s;
  endfunction

  int start_cyc;
  initial begin
    in_valid = 0; in_dc_cap = 0; in_dc_idx = 0; in_kind = TR_DCT;
    foreach (in_row[k]) in_row[k] = 0;
    for (int b = 0; b < NB; b++) begin
      K[b] = (b < 16) ? TR_DCT : tr_kind_e'($urandom_range(0, 2));
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        X[b][i][j] = (K[b] == TR_DCT) ? $signed($urandom_range(0, 510)) - 255 : $signed($urandom_range(0, 8160)) - 4080;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start_cyc = cyc;
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < 4; r++) begin
        in_valid = 1; in_kind = K[b]; in_dc_cap = (b < 16); in_dc_idx = 4'(b);
        for (int j = 0; j < 4; j++) in_row[j] = coef_t'(X[b][r][j]);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    for (int b = 0; b < 16; b++) begin
      checks++;
      if (int'(dc_reg[b]) != ref_y(b, 0, 0)) begin failures++; $display("dc_reg %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ob = 0, orow = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      // row r of block b: inputs occupy cycles start+4b .. start+4b+3
      if (cyc != start_cyc + 4*ob + 4 + orow + 1 || int'(out_idx) != orow) begin
        failures++;
        if (failures < 5) $display("timing: block %0d row %0d at cycle %0d", ob, orow, cyc - start_cyc);
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(out_row[j]) != ref_y(ob, orow, j)) begin
          failures++;
          if (failures < 10) $display("blk %0d kind %0d (%0d,%0d) got %0d exp %0d", ob, K[ob], orow, j, out_row[j], ref_y(ob, orow, j));
        end
      end
      orow++;
      if (orow == 4) begin orow = 0; ob++; end
    end
  end
endmodule
