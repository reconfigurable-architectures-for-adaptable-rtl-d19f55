// montium_crossbar: the ten global buses of the tile and their source selection.
//
// Each bus carries, in every cycle, one of: a local memory read port (M01..M10), an ALU output
// (out_1 or out_2 of ALU1..ALU5), one of the CCU's input streams, or zero when idle. The
// selection comes from the crossbar decoder word of the current instruction. Register files and
// memories pick their inputs from these buses inside the PPs. Purely combinational.
// Ten buses are the architecture's; the flat source numbering (see montium_pkg) is this
// design's choice.
module montium_crossbar
  import montium_pkg::*;
(
  input  xbar_word_t             sel,
  input  word_t [N_MEM-1:0]      mem_rd,
  input  word_t [2*N_PP-1:0]     alu_out,   // {ALUk out_2, ALUk out_1} pairs, ALU1 first
  input  word_t [N_BUS-1:0]      ccu_in,
  output word_t [N_BUS-1:0]      bus
);

  always_comb begin
    for (int b = 0; b < N_BUS; b++) begin
      logic [SRC_SW-1:0] s;
      s = sel[b];
      if (s < SRC_ALU0)       bus[b] = mem_rd[s];
      else if (s < SRC_CCU0)  bus[b] = alu_out[s - SRC_ALU0];
      else if (int'(s) < int'(SRC_CCU0) + N_BUS) bus[b] = ccu_in[s - SRC_CCU0];
      else                    bus[b] = '0;
    end
  end

endmodule
