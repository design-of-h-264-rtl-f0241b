// tb_dequantizer: random level rows at random QP for the 4x4, luma-DC and
// chroma-DC kinds, compared with the standard's scaling written with
// LevelScale = 16 * dequant factor: c = (l * LS * 2^(QP/6)) / 16 for 4x4,
// luma DC  (f * LS << (QP/6 - 6)) or (f * LS + 2^(5-QP/6)) >> (6 - QP/6),
// chroma DC ((f * LS) << (QP/6)) >> 5. Levels are bounded so results stay
// inside the 16-bit range of a conforming stream. Checks one-cycle latency.
module tb_dequantizer;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] qp;
  logic in_valid, out_valid;
  logic [1:0] in_kind, in_idx, out_idx;
  coef_t in_row[4], out_row[4];
  int checks = 0, failures = 0;
  dequantizer dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int DQ [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};

  function automatic longint dref(int l, int q, int i, int j, int kind);
    int cls;
    longint ls, p;
    cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
    if (kind != 0) cls = 0;
    ls = 16 * DQ[q % 6][cls];
    p = q / 6;
    if (kind == 0) return (longint'(l) * ls * (longint'(1) << p)) / 16;
    if (kind == 1) begin
      if (q >= 36) return (longint'(l) * ls) <<< (p - 6);
      return (longint'(l) * ls + (longint'(1) << (5 - p))) >>> (6 - p);
    end
    return ((longint'(l) * ls) <<< p) >>> 5;
  endfunction

  initial begin
    int l [4];
    int lmax;
    in_valid = 0; in_kind = 0; in_idx = 0; qp = 0;
    foreach (in_row[k]) in_row[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      qp = 6'($urandom_range(0, 51)); in_kind = 2'($urandom_range(0, 2)); in_idx = 2'($urandom);
      lmax = 32767 / (29 << (qp / 6));
      if (lmax > 200) lmax = 200;
      foreach (l[k]) begin
        // keep results inside the 16-bit range a conforming stream obeys
        l[k] = $signed($urandom_range(0, 2 * lmax)) - lmax;
        in_row[k] = coef_t'(l[k]);
      end
      in_valid = 1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_idx != in_idx) failures++;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (longint'(out_row[j]) != dref(l[j], int'(qp), int'(in_idx), j, int'(in_kind))) begin
          failures++;
          if (failures < 10) $display("qp %0d kind %0d l %0d got %0d exp %0d", qp, in_kind, l[j], out_row[j], dref(l[j], int'(qp), int'(in_idx), j, int'(in_kind)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
