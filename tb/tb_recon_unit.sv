// tb_recon_unit: encoder mode queues predicted rows in the FIFO ahead of
// their residual rows (up to two blocks ahead) and checks
// clip(pred + res) in FIFO order; decoder mode feeds the prediction
// directly. Covers clipping at 0 and 255 and the one-cycle latency.
module tb_recon_unit;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic use_fifo, pred_push, res_valid, rec_valid, fifo_empty, fifo_full;
  logic [1:0] res_idx, rec_idx;
  pix_t pred_in[4], pred_direct[4], rec_row[4];
  coef_t res_row[4];
  int checks = 0, failures = 0;
  recon_unit dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q [$];   // queued prediction rows, four packed pixels
  int exp_row [4];
  function automatic int clipv(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction

  initial begin
    int p [4];
    int r [4];
    int n;
    use_fifo = 1; pred_push = 0; res_valid = 0; res_idx = 0;
    foreach (pred_in[k]) begin pred_in[k] = 0; pred_direct[k] = 0; res_row[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      use_fifo = (t < 300);
      n = use_fifo ? $urandom_range(0, 8 - q.size()) : 0;
      // push n predicted rows
      for (int i = 0; i < n; i++) begin
        foreach (p[k]) begin p[k] = $urandom_range(0, 255); pred_in[k] = pix_t'(p[k]); end
        q.push_back({8'(p[3]), 8'(p[2]), 8'(p[1]), 8'(p[0])});
        pred_push = 1; @(negedge clk); pred_push = 0;
      end
      checks++;
      if (fifo_full != (q.size() == 8)) failures++;
      if (!use_fifo || q.size() > 0) begin
        if (use_fifo) begin
          logic [31:0] w;
          w = q.pop_front();
          foreach (p[k]) p[k] = int'(w[8*k +: 8]);
        end
        else foreach (p[k]) begin p[k] = $urandom_range(0, 255); pred_direct[k] = pix_t'(p[k]); end
        foreach (r[k]) begin r[k] = $signed($urandom_range(0, 600)) - 300; res_row[k] = coef_t'(r[k]); end
        res_valid = 1; res_idx = 2'(t);
        @(posedge clk); #1;
        res_valid = 0;
        checks++;
        if (!rec_valid || rec_idx != 2'(t)) failures++;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(rec_row[k]) != clipv(p[k] + r[k])) begin
            failures++;
            if (failures < 10) $display("t %0d k %0d got %0d exp %0d", t, k, rec_row[k], clipv(p[k] + r[k]));
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
