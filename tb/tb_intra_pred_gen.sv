// tb_intra_pred_gen: checks every prediction mode of the four-pixel
// generator against a reference written directly from the H.264 equations
// (per-pixel formulas on p[x,-1] / p[-1,y]), for random neighbours and all
// availability combinations, plus the four-cycle 16x16 DC accumulation and
// the chroma DC rules. Also checks the one-cycle output latency.
module tb_intra_pred_gen;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, avail_top, avail_left, avail_tr, acc_clr, acc_en, out_valid;
  pred_mode_e mode;
  logic [1:0] row, chroma_blk;
  pix_t top[8], left[4], corner, acc_top[4], acc_left[4], pred[4];
  int checks = 0, failures = 0;

  intra_pred_gen dut(.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference sample access p[x,y] with x,y in -1..7
  function automatic int P(int x, int y);
    if (y == -1 && x == -1) return int'(corner);
    if (y == -1) return (x > 3 && !avail_tr) ? int'(top[3]) : int'(top[x]);
    return int'(left[y]);
  endfunction

  function automatic int ref_pix(pred_mode_e m, int x, int y, int dc16v);
    int z;
    int st = 0, sl = 0;
    for (int k = 0; k < 4; k++) begin st += top[k]; sl += left[k]; end
    case (m)
      I4_V, I16_V, C8_V: return P(x, -1);
      I4_H, I16_H, C8_H: return P(-1, y);
      I4_DC: return (avail_top && avail_left) ? (st + sl + 4) / 8 :
                    avail_top ? (st + 2) / 4 : avail_left ? (sl + 2) / 4 : 128;
      C8_DC: begin
        if (chroma_blk == 1) return avail_top ? (st + 2) / 4 : avail_left ? (sl + 2) / 4 : 128;
        if (chroma_blk == 2) return avail_left ? (sl + 2) / 4 : avail_top ? (st + 2) / 4 : 128;
        return (avail_top && avail_left) ? (st + sl + 4) / 8 :
               avail_top ? (st + 2) / 4 : avail_left ? (sl + 2) / 4 : 128;
      end
      I16_DC: return dc16v;
      I4_DDL: if (x == 3 && y == 3) return (P(6,-1) + 3*P(7,-1) + 2) / 4;
              else return (P(x+y,-1) + 2*P(x+y+1,-1) + P(x+y+2,-1) + 2) / 4;
      I4_DDR: if (x > y) return (P(x-y-2,-1) + 2*P(x-y-1,-1) + P(x-y,-1) + 2) / 4;
              else if (x < y) return (P(-1,y-x-2) + 2*P(-1,y-x-1) + P(-1,y-x) + 2) / 4;
              else return (P(0,-1) + 2*P(-1,-1) + P(-1,0) + 2) / 4;
      I4_VR: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return (P(x-(y>>1)-1,-1) + P(x-(y>>1),-1) + 1) / 2;
        if (z >= 0) return (P(x-(y>>1)-2,-1) + 2*P(x-(y>>1)-1,-1) + P(x-(y>>1),-1) + 2) / 4;
        if (z == -1) return (P(-1,0) + 2*P(-1,-1) + P(0,-1) + 2) / 4;
        return (P(-1,y-1) + 2*P(-1,y-2) + P(-1,y-3) + 2) / 4;
      end
      I4_HD: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return (P(-1,y-(x>>1)-1) + P(-1,y-(x>>1)) + 1) / 2;
        if (z >= 0) return (P(-1,y-(x>>1)-2) + 2*P(-1,y-(x>>1)-1) + P(-1,y-(x>>1)) + 2) / 4;
        if (z == -1) return (P(-1,0) + 2*P(-1,-1) + P(0,-1) + 2) / 4;
        return (P(x-1,-1) + 2*P(x-2,-1) + P(x-3,-1) + 2) / 4;
      end
      I4_VL: if (y % 2 == 0) return (P(x+(y>>1),-1) + P(x+(y>>1)+1,-1) + 1) / 2;
             else return (P(x+(y>>1),-1) + 2*P(x+(y>>1)+1,-1) + P(x+(y>>1)+2,-1) + 2) / 4;
      I4_HU: begin
        z = x + 2*y;
        if (z > 5) return P(-1,3);
        if (z == 5) return (P(-1,2) + 3*P(-1,3) + 2) / 4;
        if (z % 2 == 0) return (P(-1,y+(x>>1)) + P(-1,y+(x>>1)+1) + 1) / 2;
        return (P(-1,y+(x>>1)) + 2*P(-1,y+(x>>1)+1) + P(-1,y+(x>>1)+2) + 2) / 4;
      end
      default: return 128;
    endcase
  endfunction

  int dc16_ref;
  initial begin
    int t16, l16;
    in_valid = 0; acc_clr = 0; acc_en = 0; mode = I4_V; row = 0; chroma_blk = 0;
    avail_top = 1; avail_left = 1; avail_tr = 1; corner = 0;
    foreach (top[k]) top[k] = 0;
    foreach (left[k]) left[k] = 0;
    foreach (acc_top[k]) begin acc_top[k] = 0; acc_left[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      // 16x16 DC accumulation over four cycles
      @(negedge clk); acc_clr = 1; @(negedge clk); acc_clr = 0;
      t16 = 0; l16 = 0;
      for (int c = 0; c < 4; c++) begin
        foreach (acc_top[k]) begin
          acc_top[k] = pix_t'($urandom); acc_left[k] = pix_t'($urandom);
          t16 += acc_top[k]; l16 += acc_left[k];
        end
        acc_en = 1; @(negedge clk); acc_en = 0;
      end
      foreach (top[k]) top[k] = (trial % 3 == 0) ? pix_t'($urandom) : pix_t'(100 + $urandom_range(0, 30));
      foreach (left[k]) left[k] = pix_t'($urandom);
      corner = pix_t'($urandom);
      {avail_top, avail_left, avail_tr} = 3'($urandom);
      chroma_blk = 2'($urandom);
      dc16_ref = (avail_top && avail_left) ? (t16 + l16 + 16) / 32 :
                 avail_top ? (t16 + 8) / 16 : avail_left ? (l16 + 8) / 16 : 128;
      for (int m = 0; m < 15; m++) begin
        for (int r = 0; r < 4; r++) begin
          mode = pred_mode_e'(m); row = 2'(r); in_valid = 1;
          @(posedge clk); #1;
          checks++;
          if (!out_valid) begin failures++; $display("no out_valid"); end
          for (int x = 0; x < 4; x++) begin
            checks++;
            if (int'(pred[x]) != ref_pix(pred_mode_e'(m), x, r, dc16_ref)) begin
              failures++;
              if (failures < 10) $display("mode %0d row %0d x %0d got %0d exp %0d", m, r, x, pred[x], ref_pix(pred_mode_e'(m), x, r, dc16_ref));
            end
          end
          @(negedge clk); in_valid = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
