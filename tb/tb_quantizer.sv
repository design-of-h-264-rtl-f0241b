// tb_quantizer: random coefficient rows at random QP, 4x4 and DC modes,
// compared with level = sign * floor((|c| * Q + f) / 2^s) computed in
// 64-bit integer arithmetic from the factor table, s = 15 + QP/6 (+1 for DC)
// and f = 2^s / 3 (twice the 4x4 constant for DC). Checks one-cycle latency.
module tb_quantizer;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] qp;
  logic in_valid, in_dc, out_valid;
  logic [1:0] in_idx, out_idx;
  coef_t in_row[4];
  lev_t out_lev[4];
  int checks = 0, failures = 0;
  quantizer dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int QT [6][3] = '{'{13107,5243,8066},'{11916,4660,7490},'{10082,4194,6554},
                    '{9362,3647,5825},'{8192,3355,5243},'{7282,2893,4559}};

  function automatic longint qref(int c, int q, int i, int j, bit dc);
    longint s, f, m, a;
    int cls;
    cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
    if (dc) cls = 0;
    s = 15 + q / 6;
    f = (longint'(1) << s) / 3;
    if (dc) begin s = s + 1; f = 2 * f; end
    a = (c < 0) ? -c : c;
    m = (a * QT[q % 6][cls] + f) / (longint'(1) << s);
    return (c < 0) ? -m : m;
  endfunction

  initial begin
    int c [4];
    in_valid = 0; in_dc = 0; in_idx = 0; qp = 0;
    foreach (in_row[k]) in_row[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      qp = 6'($urandom_range(0, 51)); in_dc = (t % 4 == 3); in_idx = 2'($urandom);
      foreach (c[k]) begin
        c[k] = (t % 7 == 0 && k == 1) ? 0 : $signed($urandom_range(0, 60000)) - 30000;
        in_row[k] = coef_t'(c[k]);
      end
      in_valid = 1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_idx != in_idx) failures++;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (longint'(out_lev[j]) != qref(c[j], int'(qp), int'(in_idx), j, in_dc)) begin
          failures++;
          if (failures < 10) $display("qp %0d dc %0d c %0d got %0d exp %0d", qp, in_dc, c[j], out_lev[j], qref(c[j], int'(qp), int'(in_idx), j, in_dc));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
