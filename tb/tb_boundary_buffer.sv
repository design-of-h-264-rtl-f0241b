// tb_boundary_buffer: loads random macroblock neighbours, writes a random
// reconstructed macroblock row by row in Z-scan order, and for every block
// compares the thirteen reference samples and availability flags with a
// reference that reads a padded 17x21 picture around the macroblock and
// applies the standard's neighbour rules. Then checks that left_from_prev
// turns the right column into the next left column.
module tb_boundary_buffer;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mb_load, left_from_prev, avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb, wr_valid;
  logic [3:0] wr_blk, rd_blk;
  logic [1:0] wr_row;
  pix_t top_line_in[20], corner_in, left_in[16], wr_pix[4];
  pix_t top[8], left[4], corner, mb_top[16], mb_left[16], rec_mb[16][16];
  logic avail_top, avail_left, avail_tr, avail_corner, mb_avail_top, mb_avail_left;
  int checks = 0, failures = 0;
  boundary_buffer dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // picture around the macroblock: pic[y+1][x+1], y in -1..15, x in -1..19
  int pic [17][21];
  function automatic int bx_of(int z); return (z & 1) + ((z >> 1) & 2); endfunction
  function automatic int zidx(int x, int y); return (x & 1) | ((y & 1) << 1) | ((x & 2) << 1) | ((y & 2) << 2); endfunction
  function automatic int by_of(int z); return ((z >> 1) & 1) + ((z >> 2) & 2); endfunction

  initial begin
    int bx, by, z;
    bit tr_exp;
    mb_load = 0; left_from_prev = 0; wr_valid = 0; wr_blk = 0; wr_row = 0; rd_blk = 0;
    {avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb} = 4'b1111;
    corner_in = 0;
    foreach (top_line_in[k]) top_line_in[k] = 0;
    foreach (left_in[k]) left_in[k] = 0;
    foreach (wr_pix[k]) wr_pix[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      for (int y = 0; y < 17; y++) for (int x = 0; x < 21; x++) pic[y][x] = $urandom_range(0, 255);
      foreach (top_line_in[k]) top_line_in[k] = pix_t'(pic[0][k+1]);
      corner_in = pix_t'(pic[0][0]);
      foreach (left_in[k]) left_in[k] = pix_t'(pic[k+1][0]);
      {avail_top_mb, avail_left_mb, avail_tr_mb, avail_tl_mb} = 4'($urandom);
      mb_load = 1; @(negedge clk); mb_load = 0;
      for (z = 0; z < 16; z++) begin
        bx = bx_of(z); by = by_of(z);
        rd_blk = 4'(z);
        #1;
        for (int k = 0; k < 8; k++)
          chk(int'(top[k]) == pic[4*by][4*bx + k + 1] || (k >= 4 && !avail_tr),
              $sformatf("top blk %0d k %0d", z, k));
        for (int k = 0; k < 4; k++) chk(int'(left[k]) == pic[4*by + k + 1][4*bx], "left");
        chk(int'(corner) == pic[4*by][4*bx], "corner");
        chk(avail_top == (by > 0 || avail_top_mb), "avail_top");
        chk(avail_left == (bx > 0 || avail_left_mb), "avail_left");
        chk(avail_corner == ((bx > 0 && by > 0) || (by == 0 && bx > 0 && avail_top_mb) ||
                             (bx == 0 && by > 0 && avail_left_mb) || (bx == 0 && by == 0 && avail_tl_mb)), "avail_corner");
        // above-right block must exist and precede this one in Z-scan order
        if (by == 0) tr_exp = (bx < 3) ? avail_top_mb : avail_tr_mb;
        else if (bx == 3) tr_exp = 0;
        else tr_exp = zidx(bx + 1, by - 1) < z;
        chk(avail_tr == tr_exp, $sformatf("avail_tr blk %0d", z));
        // write this block's reconstruction
        for (int r = 0; r < 4; r++) begin
          @(negedge clk);
          wr_valid = 1; wr_blk = 4'(z); wr_row = 2'(r);
          for (int k = 0; k < 4; k++) wr_pix[k] = pix_t'(pic[4*by + r + 1][4*bx + k + 1]);
        end
        @(negedge clk); wr_valid = 0;
      end
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) chk(int'(rec_mb[y][x]) == pic[y+1][x+1], "rec_mb");
      for (int k = 0; k < 16; k++) chk(int'(mb_top[k]) == pic[0][k+1] && int'(mb_left[k]) == pic[k+1][0], "mb boundary");
      left_from_prev = 1; mb_load = 1; @(negedge clk); mb_load = 0; left_from_prev = 0;
      for (int k = 0; k < 16; k++) chk(int'(mb_left[k]) == pic[k+1][16], "left_from_prev");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
