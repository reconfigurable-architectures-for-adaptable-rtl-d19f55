// montium_pp: one MONTIUM Processing Part, the vertical slice of the tile.
//
// A PP holds one ALU, the four register files in front of its inputs A..D and two local
// memories, each with its address generation unit. Register files and memories are written from
// the global buses; which bus, and whether at all, comes from the register and memory decoder
// words of the current instruction. Memory read ports and ALU outputs go back onto the buses
// through the crossbar outside this module. The East input and West output chain neighbouring
// ALUs combinationally.
//
// Timing: an operand written into a register file at one edge is used by the ALU in the
// following cycle; the ALU result is on out_1/out_2 in the same cycle as its operands. Writes and
// AGU steps happen only while `run` is high (the sequencer is executing and not stalled).
// While the tile is idle the CCU owns the memories through the ext_* port (configuration
// loading, block-mode input and output). The slice composition is the architecture's; the
// external port is this design's way of giving the CCU access.
module montium_pp
  import montium_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  alu_cfg_t                alu_cfg,
  input  rf_cfg_t  [3:0]          rf_cfg,
  input  mem_cfg_t [1:0]          mem_cfg,
  input  logic [1:0][MEM_AW-1:0]  agu_base,
  input  logic [1:0][MEM_AW-1:0]  agu_stride,
  input  logic [1:0][MEM_AW:0]    agu_length,
  input  word_t    [N_BUS-1:0]    bus,
  input  word_t                   east_in,
  // CCU access while idle
  input  logic                    ext_en,
  input  logic                    ext_we,
  input  logic                    ext_sel,     // which of the two memories
  input  logic [MEM_AW-1:0]       ext_addr,
  input  word_t                   ext_wdata,
  output word_t    [1:0]          mem_rd,
  output word_t                   out_1,
  output word_t                   out_2,
  output word_t                   west_out
);

  word_t [3:0] opnd;

  for (genvar r = 0; r < 4; r++) begin : g_rf
    montium_regfile u_rf (
      .clk, .rst_n,
      .we    (run && rf_cfg[r].we),
      .waddr (rf_cfg[r].waddr),
      .wdata (bus[rf_cfg[r].src]),
      .raddr (rf_cfg[r].raddr),
      .rdata (opnd[r])
    );
  end

  montium_alu u_alu (
    .cfg (alu_cfg),
    .in_a (opnd[0]), .in_b (opnd[1]), .in_c (opnd[2]), .in_d (opnd[3]),
    .in_east (east_in),
    .out_1, .out_2, .out_west (west_out)
  );

  for (genvar m = 0; m < 2; m++) begin : g_mem
    logic [MEM_AW-1:0] agu_addr, addr;
    word_t             wdata;
    logic              we;
    montium_agu u_agu (
      .clk, .rst_n, .run,
      .op     (mem_cfg[m].agu),
      .base   (agu_base[m]),
      .stride (agu_stride[m]),
      .length (agu_length[m]),
      .index  (bus[mem_cfg[m].src][MEM_AW-1:0]),
      .addr   (agu_addr)
    );
    always_comb begin
      if (ext_en && (ext_sel == 1'(m))) begin
        addr  = ext_addr;
        wdata = ext_wdata;
        we    = ext_we;
      end else begin
        addr  = agu_addr;
        wdata = bus[mem_cfg[m].src];
        we    = run && mem_cfg[m].we && (mem_cfg[m].agu != AGU_IDX);
      end
    end
    montium_lmem u_mem (.clk, .we, .addr, .wdata, .rdata (mem_rd[m]));
  end

endmodule
