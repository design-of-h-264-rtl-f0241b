// tb_fast_intra_pred8: checks the eight-pixel prediction generator. For
// random reference samples, every availability combination and all nine
// 4x4 modes, both row pairs are requested back to back and the two output
// rows are compared with a reference written from the H.264 per-pixel
// equations; the output must follow each request by one cycle, i.e. a
// whole 4x4 block every two cycles. DC must be identical on both rows.
module tb_fast_intra_pred8;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, pair, avail_top, avail_left, avail_tr, out_valid, out_pair;
  pred_mode_e mode;
  pix_t top[8], left[4], corner, pred[2][4];
  int checks = 0, failures = 0;

  fast_intra_pred8 dut(.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // reference sample access p[x,y] with x,y in -1..7
  function automatic int P(int x, int y);
    if (y == -1 && x == -1) return int'(corner);
    if (y == -1) return (x > 3 && !avail_tr) ? int'(top[3]) : int'(top[x]);
    return int'(left[y]);
  endfunction

  function automatic int ref_pix(pred_mode_e m, int x, int y);
    int z;
    int st = 0, sl = 0;
    for (int k = 0; k < 4; k++) begin st += top[k]; sl += left[k]; end
    case (m)
      I4_V: return P(x, -1);
      I4_H: return P(-1, y);
      I4_DC: return (avail_top && avail_left) ? (st + sl + 4) / 8 :
                    avail_top ? (st + 2) / 4 : avail_left ? (sl + 2) / 4 : 128;
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


  int n_dc = 0;
  initial begin
    in_valid = 0; pair = 0; mode = I4_V; avail_top = 0; avail_left = 0; avail_tr = 0;
    top = '{default: '0}; left = '{default: '0}; corner = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (1500) begin
      for (int k = 0; k < 8; k++) top[k] = pix_t'($urandom);
      for (int k = 0; k < 4; k++) left[k] = pix_t'($urandom);
      corner = pix_t'($urandom);
      {avail_top, avail_left, avail_tr} = 3'($urandom);
      for (int m = 0; m <= 8; m++) begin
        mode = pred_mode_e'(m);
        for (int p = 0; p < 2; p++) begin
          in_valid = 1; pair = 1'(p);
          @(negedge clk);
          // one cycle after the request
          chk(out_valid && out_pair == 1'(p), "output not one cycle after the request");
          for (int r = 0; r < 2; r++) for (int x = 0; x < 4; x++)
            chk(int'(pred[r][x]) == ref_pix(mode, x, 2*p + r),
                $sformatf("mode %0d row %0d x %0d got %0d exp %0d", m, 2*p + r, x, pred[r][x], ref_pix(mode, x, 2*p + r)));
          if (mode == I4_DC) begin chk(pred[0] == pred[1], "DC rows differ"); n_dc++; end
        end
      end
      in_valid = 0;
      @(negedge clk);
      chk(!out_valid, "output valid without a request");
    end
    chk(n_dc > 0, "no DC prediction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
