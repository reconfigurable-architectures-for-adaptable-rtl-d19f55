// montium_lmem: one MONTIUM local memory (M01..M10), 512 words of 16 bits.
//
// A single address serves the write and the read of a cycle: the write takes effect at the
// clock edge, the read returns the stored word combinationally, so a lookup-table read and the
// use of its result fit in one cycle. Written as an array for synthesis to map onto an SRAM
// macro. Width and depth follow the architecture; the asynchronous read is this design's choice
// and keeps the tile's one-instruction-per-cycle timing.
module montium_lmem
  import montium_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned AW    = MEM_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
