// montium_ccu: Communication and Configuration Unit of a MONTIUM tile.
//
// The CCU is the tile's only connection to the outside. It has three jobs:
//  * Configuration. One 16-bit word (two bytes) is accepted per clock on cfg_*; its address
//    selects the sequencer program, one of the four decoders, the AGU registers, the CCU's own
//    registers or a word of a local memory (address map in montium_pkg). A configuration of
//    N bytes therefore loads in N/2 cycles.
//  * Streaming mode. The tile runs while data flows: the CCU puts the ten words of the current
//    input set (in_data) straight onto the crossbar's CCU sources, tells the sequencer one is
//    available (in_valid) and acknowledges it (in_ready) in the cycle an instruction consumes it.
//    Instructions with out_en present a chosen global bus on out_data/out_valid.
//  * Block mode. The host first writes the input block into local memory through the
//    configuration port, then starts the tile; after the sequencer halts the CCU reads
//    out_len words from one memory, starting at out_base, and sends them on out_data, one per
//    cycle, before it reports idle again.
// Writing chunk 4 of the CCU register entry starts the sequencer. The functions (off-tile
// interface, configuration, streaming and block mode) are the architecture's; the register map
// and handshake are this design's choice, since the off-tile interface depends on the network.
module montium_ccu
  import montium_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration port
  input  logic                        cfg_valid,
  input  logic [15:0]                 cfg_addr,
  input  logic [15:0]                 cfg_data,
  // streaming input
  input  logic                        in_valid,
  input  word_t [N_BUS-1:0]           in_data,
  output logic                        in_ready,
  // output stream
  output logic                        out_valid,
  output word_t                       out_data,
  output logic                        busy,
  // to the tile
  output logic                        seq_cfg_we,
  output logic [3:0]                  dec_cfg_we,   // memory, crossbar, register, ALU decoder
  output logic [7:0]                  cfg_entry,
  output logic [3:0]                  cfg_chunk,
  output logic [15:0]                 cfg_wdata,
  output logic [N_MEM-1:0][MEM_AW-1:0] agu_base,
  output logic [N_MEM-1:0][MEM_AW-1:0] agu_stride,
  output logic [N_MEM-1:0][MEM_AW:0]   agu_length,
  output logic                        ext_en,
  output logic                        ext_we,
  output logic [3:0]                  ext_mem,
  output logic [MEM_AW-1:0]           ext_addr,
  output word_t                       ext_wdata,
  input  word_t [N_MEM-1:0]           mem_rd,
  output word_t [N_BUS-1:0]           ccu_in,
  output logic                        seq_start,
  output logic                        seq_in_avail,
  input  logic                        seq_busy,
  input  logic                        seq_done,
  input  logic                        seq_in_take,
  input  logic                        seq_out_valid,
  input  logic [BUS_SW-1:0]           seq_out_bus,
  input  word_t [N_BUS-1:0]           bus
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e            state;
  logic              mode_block;
  logic [3:0]        out_mem;
  logic [MEM_AW-1:0] out_base;
  logic [MEM_AW:0]   out_len, drain_cnt;
  logic [MEM_AW-1:0] drain_addr;

  logic              is_mem;
  cfg_region_e       region;
  logic              wr_cfg;

  assign is_mem    = cfg_addr[15];
  assign region    = cfg_region_e'(cfg_addr[14:12]);
  assign wr_cfg    = cfg_valid && (state == S_IDLE);   // configuration only while idle
  assign cfg_entry = cfg_addr[11:4];
  assign cfg_chunk = cfg_addr[3:0];
  assign cfg_wdata = cfg_data;

  always_comb begin
    seq_cfg_we = wr_cfg && !is_mem && (region == RG_SEQ);
    dec_cfg_we = '0;
    if (wr_cfg && !is_mem) begin
      dec_cfg_we[0] = (region == RG_MEMD);
      dec_cfg_we[1] = (region == RG_XBRD);
      dec_cfg_we[2] = (region == RG_REGD);
      dec_cfg_we[3] = (region == RG_ALUD);
    end
    // memory access by the CCU: configuration writes or block-mode read-out
    ext_en    = (state != S_RUN);
    ext_we    = wr_cfg && is_mem;
    ext_mem   = (state == S_DRAIN) ? out_mem : cfg_addr[12:9];
    ext_addr  = (state == S_DRAIN) ? drain_addr : cfg_addr[8:0];
    ext_wdata = cfg_data;
    // streaming
    ccu_in       = in_data;
    seq_in_avail = mode_block ? 1'b1 : in_valid;
    in_ready     = !mode_block && seq_in_take;
    // output
    if (state == S_DRAIN) begin
      out_valid = 1'b1;
      out_data  = mem_rd[out_mem];
    end else begin
      out_valid = (state == S_RUN) && seq_out_valid;
      out_data  = bus[seq_out_bus];
    end
    busy = (state != S_IDLE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode_block <= 1'b0;
      out_mem    <= '0;
      out_base   <= '0;
      out_len    <= '0;
      drain_cnt  <= '0;
      drain_addr <= '0;
      seq_start  <= 1'b0;
      for (int m = 0; m < N_MEM; m++) begin
        agu_base[m]   <= '0;
        agu_stride[m] <= MEM_AW'(1);
        agu_length[m] <= (MEM_AW+1)'(MEM_DEPTH);
      end
    end else begin
      seq_start <= 1'b0;
      if (wr_cfg && !is_mem && region == RG_AGU && int'(cfg_entry) < N_MEM) begin
        unique case (cfg_chunk)
          4'd0:    agu_base[cfg_entry]   <= cfg_data[MEM_AW-1:0];
          4'd1:    agu_stride[cfg_entry] <= cfg_data[MEM_AW-1:0];
          4'd2:    agu_length[cfg_entry] <= cfg_data[MEM_AW:0];
          default: ;
        endcase
      end
      if (wr_cfg && !is_mem && region == RG_CCU) begin
        unique case (cfg_chunk)
          4'd0:    mode_block <= cfg_data[0];
          4'd1:    out_mem    <= cfg_data[3:0];
          4'd2:    out_base   <= cfg_data[MEM_AW-1:0];
          4'd3:    out_len    <= cfg_data[MEM_AW:0];
          4'd4:    seq_start  <= 1'b1;
          default: ;
        endcase
      end
      unique case (state)
        S_IDLE: if (seq_start) state <= S_RUN;
        S_RUN: if (seq_done || (!seq_busy && !seq_start)) begin
          if (mode_block && out_len != 0) begin
            state      <= S_DRAIN;
            drain_cnt  <= out_len;
            drain_addr <= out_base;
          end else state <= S_IDLE;
        end
        default: begin
          drain_addr <= drain_addr + 1'b1;
          drain_cnt  <= drain_cnt - 1'b1;
          if (drain_cnt == 1) state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
