// tb_fast3step_md: checks the modified three-step mode order. For random
// availability and random costs of vertical and horizontal (with frequent
// ties), the costs are reported in random order among reports of other
// modes; before both have arrived 'decided' must be low when both modes
// exist, afterwards the walk from 4'hF through 'next' must give exactly the
// usable modes of 0,1,2,3,4 followed by 5,7 (cost(V) <= cost(H)) or 6,8, the
// decision following the only usable one when just one of V / H exists.
// blk_start must clear the captured costs.
module tb_fast3step_md;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic blk_start, cost_valid, avail_top, avail_left, avail_corner, decided, vert;
  pred_mode_e cost_mode;
  cost_t cost;
  logic [3:0] cur_mode, next;
  fast3step_md dut(.*);

  int checks = 0, failures = 0;
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

  function automatic bit usable(int m, bit t, bit l, bit c);
    case (m)
      0, 3, 7: return t;
      1, 8: return l;
      2: return 1;
      default: return t && l && c;
    endcase
  endfunction

  task automatic report(pred_mode_e m, int c);
    @(negedge clk);
    cost_valid = 1; cost_mode = m; cost = cost_t'(c);
    @(negedge clk);
    cost_valid = 0;
  endtask

  int n_v = 0, n_h = 0, n_tie = 0;
  initial begin
    int c0, c1;
    bit t, l, c, ev;
    int exp_seq [$];
    blk_start = 0; cost_valid = 0; cost_mode = I4_DC; cost = '0;
    avail_top = 0; avail_left = 0; avail_corner = 0; cur_mode = 4'hF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      t = 1'($urandom); l = 1'($urandom); c = 1'($urandom);
      if ($urandom_range(0, 3) != 0) begin t = 1; l = 1; end
      c0 = $urandom_range(0, 300);
      c1 = ($urandom_range(0, 4) == 0) ? c0 : $urandom_range(0, 300);
      @(negedge clk);
      avail_top = t; avail_left = l; avail_corner = c;
      blk_start = 1;
      @(negedge clk);
      blk_start = 0;
      #1;
      if (t && l) chk(!decided, "decided right after blk_start");
      // other modes' costs do not count
      report(I4_DC, $urandom_range(0, 5));
      if ($urandom_range(0, 1)) begin
        if (t) report(I4_V, c0);
        #1; if (t && l) chk(!decided, "decided with one cost");
        if (l) report(I4_H, c1);
      end else begin
        if (l) report(I4_H, c1);
        #1; if (t && l) chk(!decided, "decided with one cost");
        if (t) report(I4_V, c0);
      end
      report(I4_DDL, $urandom_range(0, 5));
      #1;
      chk(decided, "not decided after both costs");
      ev = (t && l) ? (c0 <= c1) : t;
      chk(vert == ev, $sformatf("vert %0d exp %0d (c0 %0d c1 %0d t %0d l %0d)", vert, ev, c0, c1, t, l));
      if (t && l && c0 == c1) n_tie++;
      if (ev) n_v++; else n_h++;
      exp_seq.delete();
      for (int i = 0; i < 5; i++) if (usable(i, t, l, c)) exp_seq.push_back(i);
      if (ev) begin
        if (usable(5, t, l, c)) exp_seq.push_back(5);
        if (usable(7, t, l, c)) exp_seq.push_back(7);
      end else begin
        if (usable(6, t, l, c)) exp_seq.push_back(6);
        if (usable(8, t, l, c)) exp_seq.push_back(8);
      end
      exp_seq.push_back(9);
      cur_mode = 4'hF;
      foreach (exp_seq[i]) begin
        #1;
        chk(int'(next) == exp_seq[i], $sformatf("next after %0d = %0d exp %0d", cur_mode, next, exp_seq[i]));
        cur_mode = next;
        if (next == 4'd9) break;
      end
    end
    chk(n_v > 0 && n_h > 0 && n_tie > 0, "decision sides / ties not all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
