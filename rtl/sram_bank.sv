// sram_bank: one 8 kB scratchpad / stream-buffer bank (1024 x 64 bits).
//
// Synchronous memory with one read and one write port: a read issued with
// "re" in cycle t returns the word on rdata in cycle t+1 (rdata holds its
// value otherwise); a write with "we" updates the word at the clock edge.
// A read and a write to the same address in one cycle return the old word.
// It stands for the compiled SRAM macro of an ASIC implementation; its size
// follows the document, the port arrangement is this design's.
module sram_bank #(
  parameter int DEPTH = 1024,
  parameter int DW    = 64
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
