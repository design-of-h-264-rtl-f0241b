// coef_buffer: ping-pong coefficient buffer between the prediction /
// reconstruction loop and the entropy coder (macroblock-level pipelining).
//
// Two banks of DEPTH x WIDTH single-port memory. Port A belongs to the
// prediction loop, port B to the entropy stage; `bank_sel` chooses which
// bank port A sees, port B always sees the other one, and `swap` toggles it
// at a macroblock boundary. In encoding, port A writes the quantized levels
// of macroblock n while port B reads those of macroblock n-1; in decoding the
// roles reverse. Each 64-bit word holds four 16-bit levels (one row of a
// 4x4 block); 96 words hold the AC blocks and 8 the DC terms of one
// macroblock. Reads are registered (data the cycle after en).
module coef_buffer #(
  parameter int unsigned DEPTH = 104,
  parameter int unsigned WIDTH = 64
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     swap,
  output logic                     bank_sel,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem0 [DEPTH];
  logic [WIDTH-1:0] mem1 [DEPTH];
  logic [WIDTH-1:0] q0, q1;
  logic sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank_sel <= 1'b0;
    else if (swap) bank_sel <= ~bank_sel;
  end

  // bank 0: port A when bank_sel = 0, else port B
  logic en0, we0, en1, we1;
  logic [$clog2(DEPTH)-1:0] ad0, ad1;
  logic [WIDTH-1:0] wd0, wd1;
  always_comb begin
    en0 = bank_sel ? b_en : a_en;    we0 = bank_sel ? b_we : a_we;
    ad0 = bank_sel ? b_addr : a_addr; wd0 = bank_sel ? b_wdata : a_wdata;
    en1 = bank_sel ? a_en : b_en;    we1 = bank_sel ? a_we : b_we;
    ad1 = bank_sel ? a_addr : b_addr; wd1 = bank_sel ? a_wdata : b_wdata;
  end

  always_ff @(posedge clk) begin
    if (en0) begin
      if (we0) mem0[ad0] <= wd0;
      else     q0 <= mem0[ad0];
    end
    if (en1) begin
      if (we1) mem1[ad1] <= wd1;
      else     q1 <= mem1[ad1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= 1'b0;
    else        sel_q <= bank_sel;
  end
  assign a_rdata = sel_q ? q1 : q0;
  assign b_rdata = sel_q ? q0 : q1;

  assert property (@(posedge clk) disable iff (!rst_n) !(swap && (a_en || b_en)))
    else $error("coef_buffer: bank swap during an access");
endmodule
