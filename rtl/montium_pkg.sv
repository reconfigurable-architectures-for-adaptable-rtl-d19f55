// montium_pkg: widths, operation encodings and configuration-word layouts shared by the
// MONTIUM tile processor modules.
//
// The tile is a 16-bit coarse-grained processor: five Processing Parts (PP), each with one ALU,
// four input register files of four words and two 512-word local memories, joined by ten global
// buses. The figures of five ALUs, ten memories, 16-bit data, 512-word memories and four-entry
// register files come from the architecture description. The binary encodings below (operation
// codes, field order of the decoder words, the configuration address map) are this design's own:
// the architecture defines what is configured, not how it is encoded. A few constants
// (memory depth, register-file depth, bus source numbers) document the layout; the modules
// do not need them, and the bus source numbers are used by the test programs.
package montium_pkg;

  localparam int unsigned DW        = 16;   // data path width
  localparam int unsigned N_PP      = 5;    // processing parts / ALUs
  localparam int unsigned N_MEM     = 10;   // local memories M01..M10
  localparam int unsigned N_BUS     = 10;   // global buses
  localparam int unsigned MEM_DEPTH = 512;  // words per local memory
  localparam int unsigned MEM_AW    = 9;
  localparam int unsigned RF_DEPTH  = 4;    // operands per ALU input register file
  localparam int unsigned RF_AW     = 2;
  localparam int unsigned N_RF      = 4 * N_PP; // register files (inputs A..D of every ALU)
  localparam int unsigned BUS_SW    = 4;    // bus index width
  localparam int unsigned SRC_SW    = 5;    // crossbar source index width

  typedef logic signed [DW-1:0] word_t;

  // Level-1 function unit operations.
  typedef enum logic [3:0] {
    FU_PASS_X = 4'd0,  // first operand
    FU_PASS_Y = 4'd1,  // second operand
    FU_ADD    = 4'd2,
    FU_SUB    = 4'd3,  // x - y
    FU_AND    = 4'd4,
    FU_OR     = 4'd5,
    FU_XOR    = 4'd6,
    FU_MIN    = 4'd7,
    FU_MAX    = 4'd8,
    FU_ABS    = 4'd9,  // |x|
    FU_NEG    = 4'd10, // -x
    FU_ZERO   = 4'd11,
    FU_SHR1   = 4'd12, // x >>> 1
    FU_SHL1   = 4'd13  // x << 1
  } fu_op_e;

  // Second operand of the level-2 adder.
  typedef enum logic [1:0] {
    ADD_ZERO = 2'd0,
    ADD_EAST = 2'd1,  // in_East from the right-hand neighbour ALU
    ADD_FU3  = 2'd2,
    ADD_FU4  = 2'd3
  } add_src_e;

  // Source of out_2 (out_1 and out_West always carry the adder result).
  typedef enum logic [1:0] {
    O2_ADDER = 2'd0,
    O2_FU3   = 2'd1,
    O2_FU4   = 2'd2,
    O2_MUL   = 2'd3
  } out2_sel_e;

  typedef struct packed {
    fu_op_e    fu1;      // on inputs A, B
    fu_op_e    fu2;      // on inputs C, D
    fu_op_e    fu3;      // on fu1, fu2 results
    fu_op_e    fu4;      // on fu1, fu2 results
    logic      mul_en;   // 1: multiplier product fu3*fu4, 0: fu3 passes the multiplier
    logic      mul_q15;  // 1: signed Q1.15 product, 0: signed integer product (low 16 bits)
    add_src_e  add_src;
    logic      add_sub;  // 1: product minus second operand
    logic      sat;      // 1: saturate the adder, 0: wrap
    out2_sel_e out2_sel;
  } alu_cfg_t;           // 24 bits

  // Per register file: write enable, write address, source bus, read address.
  typedef struct packed {
    logic              we;
    logic [RF_AW-1:0]  waddr;
    logic [BUS_SW-1:0] src;
    logic [RF_AW-1:0]  raddr;
  } rf_cfg_t;            // 9 bits

  // Address generation step of one memory's AGU.
  typedef enum logic [1:0] {
    AGU_HOLD = 2'd0,
    AGU_STEP = 2'd1,  // add the stride, wrap inside [base, base+length)
    AGU_BASE = 2'd2,  // reload the base
    AGU_IDX  = 2'd3   // next address = base + value on the memory's write bus (table lookup)
  } agu_op_e;

  // Per memory: write enable, write source bus, AGU step.
  typedef struct packed {
    logic              we;
    logic [BUS_SW-1:0] src;
    agu_op_e           agu;
  } mem_cfg_t;           // 7 bits

  typedef alu_cfg_t [N_PP-1:0]                alu_word_t;   // ALU decoder word
  typedef rf_cfg_t  [N_RF-1:0]                reg_word_t;   // register decoder word
  typedef mem_cfg_t [N_MEM-1:0]               mem_word_t;   // memory decoder word
  typedef logic     [N_BUS-1:0][SRC_SW-1:0]   xbar_word_t;  // crossbar decoder word

  // Crossbar sources: 0..9 memory read ports, 10..19 ALU outputs (ALU k: out_1 = 10+2k,
  // out_2 = 11+2k), 20..29 the CCU's input streams, 31 idle (zero).
  localparam logic [SRC_SW-1:0] SRC_MEM0  = 5'd0;
  localparam logic [SRC_SW-1:0] SRC_ALU0  = 5'd10;
  localparam logic [SRC_SW-1:0] SRC_CCU0  = 5'd20;
  localparam logic [SRC_SW-1:0] SRC_IDLE  = 5'd31;

  // Sequencer instruction flow control.
  typedef enum logic [2:0] {
    SQ_NEXT = 3'd0,
    SQ_JUMP = 3'd1,  // unconditional jump to target
    SQ_LOOP = 3'd2,  // load the loop counter with count on first visit, jump back while it runs
    SQ_HALT = 3'd3,  // stop and raise done
    SQ_WAIT = 3'd4   // repeat until a new input set is available
  } sq_op_e;

  localparam int unsigned DEC_AW = 5;   // entries per decoder: 32
  localparam int unsigned SEQ_AW = 8;   // sequencer program: 256 instructions

  typedef struct packed {
    sq_op_e              op;
    logic [SEQ_AW-1:0]   target;
    logic [7:0]          count;
    logic                use_in;   // consumes one input set from the CCU
    logic                out_en;   // presents a bus value to the CCU output
    logic [BUS_SW-1:0]   out_bus;
    logic [DEC_AW-1:0]   mem_idx;
    logic [DEC_AW-1:0]   xbar_idx;
    logic [DEC_AW-1:0]   reg_idx;
    logic [DEC_AW-1:0]   alu_idx;
  } seq_instr_t;         // 45 bits

  // Configuration address map of the CCU (16-bit words, one per cycle).
  //   addr[15] = 1 : local memory, addr[12:9] memory number, addr[8:0] word
  //   addr[15] = 0 : addr[14:12] region, addr[11:4] entry, addr[3:0] 16-bit chunk of the entry
  typedef enum logic [2:0] {
    RG_SEQ  = 3'd0,
    RG_MEMD = 3'd1,
    RG_XBRD = 3'd2,
    RG_REGD = 3'd3,
    RG_ALUD = 3'd4,
    RG_AGU  = 3'd5,  // entry = memory number, chunk 0 base, 1 stride, 2 length
    RG_CCU  = 3'd6   // chunk 0 mode (0 streaming, 1 block), 1 output memory, 2 output base,
                     // 3 output length, 4 start
  } cfg_region_e;

endpackage
