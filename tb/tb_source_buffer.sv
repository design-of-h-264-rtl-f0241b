// tb_source_buffer: fills all 96 words with random data, reads them back in
// random order (data one cycle after the read) and checks that a write does
// not disturb the registered read data.
module tb_source_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [6:0] addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  source_buffer dut(.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [96];
  initial begin
    int a;
    logic [31:0] last;
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 96; i++) begin
      model[i] = $urandom; en = 1; we = 1; addr = 7'(i); wdata = model[i];
      @(negedge clk);
    end
    for (int t = 0; t < 1000; t++) begin
      a = $urandom_range(0, 95);
      en = 1; we = 0; addr = 7'(a);
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; if (failures < 5) $display("addr %0d", a); end
      last = rdata;
      if (t % 5 == 0) begin
        a = $urandom_range(0, 95); model[a] = $urandom;
        en = 1; we = 1; addr = 7'(a); wdata = model[a];
        @(negedge clk);
        checks++;
        if (rdata != last) failures++;
      end
      if (t % 7 == 0) begin
        en = 0; @(negedge clk);
        checks++;
        if (rdata != last && t % 5 != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
