// montium_regfile: private input register file of one ALU input.
//
// Four 16-bit operands. One write per cycle (we, waddr, wdata, taking effect at the clock edge)
// and one read address whose operand drives the ALU input. The ALU always reads its operand from
// this file; there is no bypass from the write data, so a value written in one cycle reaches the
// ALU in the next. The four-entry depth and the no-bypass rule are the architecture's; the
// synchronous reset to zero is this design's choice.
module montium_regfile
  import montium_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [RF_AW-1:0] waddr,
  input  word_t            wdata,
  input  logic [RF_AW-1:0] raddr,
  output word_t            rdata
);

  word_t regs [RF_DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < RF_DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
