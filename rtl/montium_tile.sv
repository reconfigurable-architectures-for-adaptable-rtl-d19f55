// montium_tile: one MONTIUM coarse-grained reconfigurable tile.
//
// The tile processor (TP) is a row of five Processing Parts (ALU1..ALU5, memories M01..M10),
// ten global buses with their crossbar, four decoders and a sequencer; the CCU below it is the
// tile's interface to the outside. Every cycle the sequencer issues one instruction that names
// an entry in each decoder; the four decoder words then set, for that cycle, every ALU's
// operation, every register file's write and read, every memory's write and address step, and
// the source of every bus. Neighbouring ALUs are chained combinationally: the West output of
// ALU k+1 drives the East input of ALU k, and ALU5's East input is zero. ALU1 has no
// left neighbour, so its West output goes nowhere, and the sequencer's program counter is
// left unconnected; both show as unused signals.
//
// Operation: while idle, load the configuration through cfg_* (one 16-bit word per cycle),
// then write the start register. In streaming mode input sets enter on in_data/in_valid and
// results leave on out_data/out_valid while the program runs; in block mode the data block is
// written into memory beforehand and read out by the CCU after the program halts. `busy` is
// high from start until the last output word.
//
// The composition follows the architecture's tile diagram. Encodings, the address map and the
// handshakes are this design's choices (see montium_pkg and montium_ccu).
module montium_tile
  import montium_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  logic [15:0]       cfg_addr,
  input  logic [15:0]       cfg_data,
  input  logic              in_valid,
  input  word_t [N_BUS-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output word_t             out_data,
  output logic              busy
);

  // CCU <-> TP
  logic                         seq_cfg_we;
  logic [3:0]                   dec_cfg_we;
  logic [7:0]                   cfg_entry;
  logic [3:0]                   cfg_chunk;
  logic [15:0]                  cfg_wdata;
  logic [N_MEM-1:0][MEM_AW-1:0] agu_base, agu_stride;
  logic [N_MEM-1:0][MEM_AW:0]   agu_length;
  logic                         ext_en, ext_we;
  logic [3:0]                   ext_mem;
  logic [MEM_AW-1:0]            ext_addr;
  word_t                        ext_wdata;
  word_t [N_MEM-1:0]            mem_rd;
  word_t [N_BUS-1:0]            ccu_in, bus;
  word_t [2*N_PP-1:0]           alu_out;
  word_t [N_PP:0]               east;          // east[k] = East input of ALU k+1
  logic                         seq_start, seq_in_avail, seq_busy, seq_done, seq_run;
  logic                         seq_in_take, seq_out_valid;
  logic [BUS_SW-1:0]            seq_out_bus;
  logic [DEC_AW-1:0]            mem_idx, xbar_idx, reg_idx, alu_idx;
  logic [SEQ_AW-1:0]            pc;

  mem_word_t  mem_word;
  xbar_word_t xbar_word;
  reg_word_t  reg_word;
  alu_word_t  alu_word;

  montium_ccu u_ccu (
    .clk, .rst_n, .cfg_valid, .cfg_addr, .cfg_data,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .busy,
    .seq_cfg_we, .dec_cfg_we, .cfg_entry, .cfg_chunk, .cfg_wdata,
    .agu_base, .agu_stride, .agu_length,
    .ext_en, .ext_we, .ext_mem, .ext_addr, .ext_wdata, .mem_rd,
    .ccu_in, .seq_start, .seq_in_avail, .seq_busy, .seq_done, .seq_in_take,
    .seq_out_valid, .seq_out_bus, .bus
  );

  montium_sequencer u_seq (
    .clk, .rst_n,
    .cfg_we (seq_cfg_we), .cfg_entry (cfg_entry[SEQ_AW-1:0]), .cfg_chunk, .cfg_data (cfg_wdata),
    .start (seq_start), .in_avail (seq_in_avail),
    .busy (seq_busy), .run (seq_run), .done (seq_done), .in_take (seq_in_take),
    .out_valid (seq_out_valid), .out_bus (seq_out_bus),
    .mem_idx, .xbar_idx, .reg_idx, .alu_idx, .pc
  );

  montium_decoder #(.W($bits(mem_word_t))) u_mem_dec (
    .clk, .rst_n, .cfg_we (dec_cfg_we[0]), .cfg_entry (cfg_entry[DEC_AW-1:0]), .cfg_chunk,
    .cfg_data (cfg_wdata), .idx (mem_idx), .word (mem_word)
  );
  montium_decoder #(.W($bits(xbar_word_t))) u_xbar_dec (
    .clk, .rst_n, .cfg_we (dec_cfg_we[1]), .cfg_entry (cfg_entry[DEC_AW-1:0]), .cfg_chunk,
    .cfg_data (cfg_wdata), .idx (xbar_idx), .word (xbar_word)
  );
  montium_decoder #(.W($bits(reg_word_t))) u_reg_dec (
    .clk, .rst_n, .cfg_we (dec_cfg_we[2]), .cfg_entry (cfg_entry[DEC_AW-1:0]), .cfg_chunk,
    .cfg_data (cfg_wdata), .idx (reg_idx), .word (reg_word)
  );
  montium_decoder #(.W($bits(alu_word_t))) u_alu_dec (
    .clk, .rst_n, .cfg_we (dec_cfg_we[3]), .cfg_entry (cfg_entry[DEC_AW-1:0]), .cfg_chunk,
    .cfg_data (cfg_wdata), .idx (alu_idx), .word (alu_word)
  );

  montium_crossbar u_xbar (
    .sel (xbar_word), .mem_rd, .alu_out, .ccu_in, .bus
  );

  assign east[N_PP] = '0;

  for (genvar k = 0; k < N_PP; k++) begin : g_pp
    word_t [1:0] rd;
    montium_pp u_pp (
      .clk, .rst_n, .run (seq_run),
      .alu_cfg    (alu_word[k]),
      .rf_cfg     (reg_word[4*k +: 4]),
      .mem_cfg    (mem_word[2*k +: 2]),
      .agu_base   (agu_base[2*k +: 2]),
      .agu_stride (agu_stride[2*k +: 2]),
      .agu_length (agu_length[2*k +: 2]),
      .bus,
      .east_in    (east[k+1]),
      .ext_en     (ext_en && (ext_mem[3:1] == 3'(k))),
      .ext_we,
      .ext_sel    (ext_mem[0]),
      .ext_addr, .ext_wdata,
      .mem_rd     (rd),
      .out_1      (alu_out[2*k]),
      .out_2      (alu_out[2*k+1]),
      .west_out   (east[k])
    );
    assign mem_rd[2*k +: 2] = rd;
  end

endmodule
