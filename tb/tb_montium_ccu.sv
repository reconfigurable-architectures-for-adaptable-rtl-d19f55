// tb_montium_ccu: the CCU on its own, with the sequencer side emulated. Checks the routing of
// configuration words (sequencer, each decoder, AGU registers, memory writes), the start pulse,
// the streaming handshake (in_avail follows in_valid, in_ready follows the sequencer's take),
// the streaming output, and the block-mode read-out of out_len words after done.
module tb_montium_ccu;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_valid = 0, in_valid = 0;
  logic [15:0] cfg_addr = 0, cfg_data = 0;
  word_t [N_BUS-1:0] in_data, ccu_in, bus;
  logic in_ready, out_valid, busy, seq_cfg_we, ext_en, ext_we, seq_start, seq_in_avail;
  word_t out_data, ext_wdata;
  logic [3:0] dec_cfg_we, cfg_chunk, ext_mem;
  logic [7:0] cfg_entry;
  logic [15:0] cfg_wdata;
  logic [N_MEM-1:0][8:0] agu_base, agu_stride;
  logic [N_MEM-1:0][9:0] agu_length;
  logic [8:0] ext_addr;
  word_t [N_MEM-1:0] mem_rd;
  logic seq_busy = 0, seq_done = 0, seq_in_take = 0, seq_out_valid = 0;
  logic [3:0] seq_out_bus = 0;

  always #5 clk = ~clk;
  montium_ccu dut (.clk, .rst_n, .cfg_valid, .cfg_addr, .cfg_data, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .busy, .seq_cfg_we, .dec_cfg_we, .cfg_entry, .cfg_chunk, .cfg_wdata,
    .agu_base, .agu_stride, .agu_length, .ext_en, .ext_we, .ext_mem, .ext_addr, .ext_wdata,
    .mem_rd, .ccu_in, .seq_start, .seq_in_avail, .seq_busy, .seq_done, .seq_in_take,
    .seq_out_valid, .seq_out_bus, .bus);

  // memory model behind the external port: word = mem*1000 + addr
  always_comb for (int m = 0; m < N_MEM; m++) mem_rd[m] = 16'(m * 1000 + int'(ext_addr));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(logic [15:0] a, logic [15:0] d);
    @(negedge clk); cfg_valid = 1; cfg_addr = a; cfg_data = d; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    in_data = '0; bus = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    cfg({1'b0, RG_SEQ, 8'd7, 4'd2}, 16'h1234);
    chk(seq_cfg_we && dec_cfg_we == 0 && cfg_entry == 7 && cfg_chunk == 2 && cfg_wdata == 16'h1234, "seq write");
    for (int r = 1; r <= 4; r++) begin
      cfg({1'b0, 3'(r), 8'd3, 4'd1}, 16'(r));
      chk(!seq_cfg_we && dec_cfg_we == 4'(1 << (r - 1)) && !ext_we, "decoder write");
    end
    cfg(16'h8000 | (16'd5 << 9) | 16'd77, 16'hbeef);
    chk(ext_en && ext_we && ext_mem == 5 && ext_addr == 77 && ext_wdata == 16'hbeef, "memory write");
    cfg({1'b0, RG_AGU, 8'd4, 4'd0}, 16'd10);
    cfg({1'b0, RG_AGU, 8'd4, 4'd1}, 16'd3);
    cfg({1'b0, RG_AGU, 8'd4, 4'd2}, 16'd20);
    @(negedge clk); cfg_valid = 0; #1;
    chk(agu_base[4] == 10 && agu_stride[4] == 3 && agu_length[4] == 20 && agu_length[3] == 512, "agu regs");
    // streaming run
    cfg({1'b0, RG_CCU, 8'd0, 4'd0}, 16'd0);
    cfg({1'b0, RG_CCU, 8'd0, 4'd4}, 16'd0);
    @(negedge clk); cfg_valid = 0; #1;
    chk(seq_start, "start pulse");
    seq_busy = 1;
    @(negedge clk); #1;
    chk(!seq_start && busy, "start is a pulse, CCU busy");
    in_valid = 0; #1; chk(!seq_in_avail, "no input available");
    in_valid = 1; in_data[3] = 16'd55; #1; chk(seq_in_avail && ccu_in[3] == 55, "input available");
    seq_in_take = 1; #1; chk(in_ready, "in_ready on take");
    seq_in_take = 0;
    bus[6] = 16'd4242; seq_out_bus = 4'd6; seq_out_valid = 1; #1;
    chk(out_valid && out_data == 4242, "stream output");
    seq_out_valid = 0;
    cfg({1'b0, RG_SEQ, 8'd0, 4'd0}, 16'd1);
    chk(!seq_cfg_we, "no configuration while running");
    @(negedge clk); cfg_valid = 0;
    seq_done = 1; seq_busy = 0; @(negedge clk); seq_done = 0; #1;
    chk(!busy, "idle after done");
    // block run with read-out of 5 words of memory 7 from address 100
    cfg({1'b0, RG_CCU, 8'd0, 4'd0}, 16'd1);
    cfg({1'b0, RG_CCU, 8'd0, 4'd1}, 16'd7);
    cfg({1'b0, RG_CCU, 8'd0, 4'd2}, 16'd100);
    cfg({1'b0, RG_CCU, 8'd0, 4'd3}, 16'd5);
    cfg({1'b0, RG_CCU, 8'd0, 4'd4}, 16'd0);
    @(negedge clk); cfg_valid = 0; seq_busy = 1; #1;
    chk(seq_in_avail, "block mode needs no stream");
    repeat (3) @(negedge clk);
    seq_done = 1; seq_busy = 0; @(negedge clk); seq_done = 0;
    got = 0;
    for (int i = 0; i < 8; i++) begin
      #1;
      if (out_valid) begin
        chk(out_data == 16'(7000 + 100 + got), "block read-out word");
        got++;
      end
      @(negedge clk);
    end
    chk(got == 5 && !busy, "block read-out length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
