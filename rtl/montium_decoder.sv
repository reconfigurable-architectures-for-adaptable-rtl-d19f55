// montium_decoder: one of the tile's instruction decoders (memory, crossbar, register or ALU).
//
// A decoder is a small configuration table. The sequencer sends an entry number every cycle and
// the decoder returns the wide control word stored there, which sets up its part of the tile for
// that cycle. This keeps the sequencer's own instructions narrow: a few entry numbers instead of
// hundreds of control bits. The CCU fills the table 16 bits at a time (entry, chunk, data).
// The four decoders and the idea of configurable instructions selected by the sequencer are
// the architecture's; the 32-entry depth and the chunked write are this design's choice.
module montium_decoder
  import montium_pkg::*;
#(
  parameter int unsigned W    = 24,
  parameter int unsigned NENT = 1 << DEC_AW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [$clog2(NENT)-1:0] cfg_entry,
  input  logic [3:0]              cfg_chunk,
  input  logic [15:0]             cfg_data,
  input  logic [$clog2(NENT)-1:0] idx,
  output logic [W-1:0]            word
);

  localparam int unsigned NCH = (W + 15) / 16;
  logic [NCH*16-1:0] table_q [NENT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < NENT; e++) table_q[e] <= '0;
    end else if (cfg_we && (int'(cfg_chunk) < NCH)) begin
      table_q[cfg_entry][cfg_chunk*16 +: 16] <= cfg_data;
    end
  end

  assign word = table_q[idx][W-1:0];

endmodule
