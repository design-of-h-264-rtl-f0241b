// tb_coef_buffer: ping-pong operation over several macroblocks. Port A
// writes macroblock n into its bank while port B reads macroblock n-1 from
// the other bank in the same cycles; after each swap the data read on port
// B must be what port A wrote before the swap, and port A's fresh writes
// must never appear on port B before the swap.
module tb_coef_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap, bank_sel, a_en, a_we, b_en, b_we;
  logic [6:0] a_addr, b_addr;
  logic [63:0] a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;
  coef_buffer dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] mb_data [6][104];
  initial begin
    swap = 0; a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int m = 0; m < 6; m++) for (int i = 0; i < 104; i++) mb_data[m][i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < 6; m++) begin
      for (int i = 0; i < 104; i++) begin
        a_en = 1; a_we = 1; a_addr = 7'(i); a_wdata = mb_data[m][i];
        b_en = (m > 0); b_we = 0; b_addr = 7'(103 - i);
        @(negedge clk);
        if (m > 0) begin
          checks++;
          if (b_rdata != mb_data[m-1][103 - i]) begin
            failures++;
            if (failures < 5) $display("mb %0d addr %0d", m - 1, 103 - i);
          end
        end
      end
      // port A reads back its own bank
      a_we = 0; b_en = 0;
      for (int i = 0; i < 104; i += 13) begin
        a_addr = 7'(i); @(negedge clk);
        checks++;
        if (a_rdata != mb_data[m][i]) failures++;
      end
      a_en = 0;
      checks++;
      if (bank_sel != 1'(m % 2)) failures++;
      swap = 1; @(negedge clk); swap = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
