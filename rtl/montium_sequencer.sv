// montium_sequencer: the tile's simple sequencer.
//
// Holds a program of up to 256 instructions. Each instruction names one entry in each of the
// four decoders (memory, crossbar, register, ALU), which together configure the whole
// Processing Part Array for one cycle, and says where to go next: the next instruction, a jump,
// a counted loop back to a target, a wait for input, or halt. One instruction is issued per
// clock while running. An instruction that consumes an input set from the CCU (use_in) stalls
// in place while none is available; during a stall `run` is low so no register, memory or AGU
// changes. `start` (from the CCU) begins at address 0; HALT drops `busy` and pulses `done`.
// A single loop counter is provided (loops do not nest).
//
// The architecture describes the sequencer only as simple and as selecting configured PPA
// instructions from the decoders; the instruction format and flow operations are this design's.
module montium_sequencer
  import montium_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [SEQ_AW-1:0] cfg_entry,
  input  logic [3:0]        cfg_chunk,
  input  logic [15:0]       cfg_data,
  input  logic              start,
  input  logic              in_avail,   // an input set is present at the CCU
  output logic              busy,
  output logic              run,        // executing, not stalled
  output logic              done,       // one-cycle pulse after HALT
  output logic              in_take,    // the current instruction consumes the input set
  output logic              out_valid,
  output logic [BUS_SW-1:0] out_bus,
  output logic [DEC_AW-1:0] mem_idx,
  output logic [DEC_AW-1:0] xbar_idx,
  output logic [DEC_AW-1:0] reg_idx,
  output logic [DEC_AW-1:0] alu_idx,
  output logic [SEQ_AW-1:0] pc
);

  localparam int unsigned IW  = $bits(seq_instr_t);
  localparam int unsigned NCH = (IW + 15) / 16;

  logic [NCH*16-1:0] prog [1 << SEQ_AW];
  seq_instr_t        ins;
  logic              loop_act;
  logic [7:0]        loop_cnt;
  logic              stall;

  always_ff @(posedge clk) begin
    if (cfg_we && (int'(cfg_chunk) < NCH)) prog[cfg_entry][cfg_chunk*16 +: 16] <= cfg_data;
  end

  assign ins   = seq_instr_t'(prog[pc][IW-1:0]);
  assign stall = (ins.use_in || ins.op == SQ_WAIT) && !in_avail;
  assign run   = busy && !stall;

  always_comb begin
    in_take   = run && ins.use_in;
    out_valid = run && ins.out_en;
    out_bus   = ins.out_bus;
    mem_idx   = busy ? ins.mem_idx  : '0;
    xbar_idx  = busy ? ins.xbar_idx : '0;
    reg_idx   = busy ? ins.reg_idx  : '0;
    alu_idx   = busy ? ins.alu_idx  : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      pc       <= '0;
      loop_act <= 1'b0;
      loop_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          pc       <= '0;
          loop_act <= 1'b0;
        end
      end else if (!stall) begin
        unique case (ins.op)
          SQ_JUMP: pc <= ins.target;
          SQ_LOOP: begin
            if (!loop_act) begin
              if (ins.count > 8'd1) begin
                loop_act <= 1'b1;
                loop_cnt <= ins.count - 8'd2;
                pc       <= ins.target;
              end else pc <= pc + 1'b1;
            end else if (loop_cnt != 0) begin
              loop_cnt <= loop_cnt - 1'b1;
              pc       <= ins.target;
            end else begin
              loop_act <= 1'b0;
              pc       <= pc + 1'b1;
            end
          end
          SQ_HALT: begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          default: pc <= pc + 1'b1;
        endcase
      end
    end
  end

endmodule
