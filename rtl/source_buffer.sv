// source_buffer: single-port SRAM of one macroblock, four pixels per 32-bit
// word (64 words of luma, 32 of chroma). In encoding it holds the source
// pixels of the current macroblock; in decoding it collects the
// reconstructed pixels until they are written out. One access per cycle,
// write or read; read data is registered (available the cycle after en).
// Written as an array so that synthesis maps it to a memory.
module source_buffer #(
  parameter int unsigned DEPTH = 96,
  parameter int unsigned WIDTH = 32
)(
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
