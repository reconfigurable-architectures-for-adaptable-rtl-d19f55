// tb_montium_sequencer: loads a small program (straight code, a counted loop, an input wait,
// an output and halt), runs it and checks the issued decoder indices cycle by cycle, the stall
// while no input is available, the loop count, and the done pulse.
module tb_montium_sequencer;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, start = 0, in_avail = 0;
  logic [7:0] entry = 0;
  logic [3:0] chunk = 0;
  logic [15:0] data = 0;
  logic busy, run, done, in_take, out_valid;
  logic [3:0] out_bus;
  logic [4:0] mem_idx, xbar_idx, reg_idx, alu_idx;
  logic [7:0] pc;

  always #5 clk = ~clk;
  montium_sequencer dut (.clk, .rst_n, .cfg_we(we), .cfg_entry(entry), .cfg_chunk(chunk),
    .cfg_data(data), .start, .in_avail, .busy, .run, .done, .in_take, .out_valid, .out_bus,
    .mem_idx, .xbar_idx, .reg_idx, .alu_idx, .pc);

  task automatic put(int a, seq_instr_t ins);
    logic [47:0] w;
    w = 48'(ins);
    for (int c = 0; c < 3; c++) begin
      @(negedge clk); we = 1; entry = 8'(a); chunk = 4'(c); data = w[c*16 +: 16];
    end
    @(negedge clk); we = 0;
  endtask

  function automatic seq_instr_t mk(sq_op_e op, int tgt, int cnt, bit ui, bit oe, int tag);
    seq_instr_t i;
    i = '0;
    i.op = op; i.target = 8'(tgt); i.count = 8'(cnt); i.use_in = ui; i.out_en = oe;
    i.out_bus = 4'(tag % 10);
    i.mem_idx = 5'(tag); i.xbar_idx = 5'(tag + 1); i.reg_idx = 5'(tag + 2); i.alu_idx = 5'(tag + 3);
    return i;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected trace of issued tags: 1, then (2,3) x 5, then 4 (needs input), 5 (output), halt 6
  int exp_tags[$];
  initial begin
    int cyc, stalls;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    put(0, mk(SQ_NEXT, 0, 0, 0, 0, 1));
    put(1, mk(SQ_NEXT, 0, 0, 0, 0, 2));
    put(2, mk(SQ_LOOP, 1, 5, 0, 0, 3));
    put(3, mk(SQ_NEXT, 0, 0, 1, 0, 4));
    put(4, mk(SQ_NEXT, 0, 0, 0, 1, 5));
    put(5, mk(SQ_HALT, 0, 0, 0, 0, 6));
    exp_tags.push_back(1);
    for (int i = 0; i < 5; i++) begin exp_tags.push_back(2); exp_tags.push_back(3); end
    exp_tags.push_back(4); exp_tags.push_back(5); exp_tags.push_back(6);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0; stalls = 0;
    while (exp_tags.size() > 0) begin
      #1;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy"); break; end
      if (mem_idx == 5'd4 && stalls < 3) begin
        // no input yet: must stall
        if (run || in_take) begin failures++; $display("FAIL no stall"); end
        stalls++;
      end else begin
        int t;
        if (mem_idx == 5'd4) begin
          in_avail = 1;
          #1;
        end
        t = exp_tags.pop_front();
        if (mem_idx != 5'(t) || xbar_idx != 5'(t + 1) || reg_idx != 5'(t + 2) ||
            alu_idx != 5'(t + 3)) begin
          failures++; $display("FAIL tag %0d got %0d", t, mem_idx);
        end
        if ((t == 4) != in_take) begin failures++; $display("FAIL in_take"); end
        if ((t == 5) != out_valid || (t == 5 && out_bus != 4'd5)) begin
          failures++; $display("FAIL out_valid");
        end
      end
      @(negedge clk);
      cyc++;
    end
    #1;
    checks++;
    if (!done || busy) begin failures++; $display("FAIL done"); end
    checks++;
    if (cyc != 14 + 3) begin failures++; $display("FAIL cycles %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
