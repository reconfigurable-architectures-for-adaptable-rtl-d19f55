// montium_agu: address generation unit beside each local memory.
//
// Holds a base, a stride and a length, all configured, and a current address. Each cycle the
// sequencer's memory decoder picks one step: hold, advance by the stride (wrapping inside the
// window [base, base+length) so the memory can act as a circular buffer), reload the base, or
// index: address = base + an offset taken from data (the lookup-table mode). Every step, the
// index included, is applied at the clock edge, so an offset on the bus in one cycle addresses
// the memory in the next. The address is always the registered one: this keeps the path from a
// memory's read data, over the crossbar, back into a memory address free of logic loops.
// The document gives the unit's purpose; the base/stride/length model is this design's.
// nxt carries one bit more than an address for the wrap compare; its top bit is never
// stored, since a wrapped address is always below 512.
module montium_agu
  import montium_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,        // steps are applied only while the tile runs
  input  agu_op_e           op,
  input  logic [MEM_AW-1:0] base,
  input  logic [MEM_AW-1:0] stride,
  input  logic [MEM_AW:0]   length,     // 1..512
  input  logic [MEM_AW-1:0] index,      // offset for AGU_IDX
  output logic [MEM_AW-1:0] addr
);

  logic [MEM_AW-1:0] cur;
  logic [MEM_AW:0]   off, nxt;

  always_comb begin
    off = {1'b0, cur - base} + {1'b0, stride};
    if (off >= length) off = off - length;
    nxt = {1'b0, base} + off;
    addr = cur;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cur <= '0;
    else if (!run) cur <= base;
    else begin
      unique case (op)
        AGU_STEP: cur <= nxt[MEM_AW-1:0];
        AGU_BASE: cur <= base;
        AGU_IDX:  cur <= base + index;
        default:  cur <= cur;
      endcase
    end
  end

endmodule
