// tb_montium_tile: configures a whole MONTIUM tile through its CCU and runs two programs.
// Streaming: 40 input sets, with gaps in in_valid so the sequencer must stall, each producing
// sat(a0*c0 + a1*c1) through the East-West chain of ALU1/ALU2. Block: 32 words preloaded into
// M01, doubled into M02 and read out by the CCU. Checks every output value and count, that
// one configuration word is taken per clock, and the 2-clock-per-item streaming rate.
module tb_montium_tile;
  import montium_pkg::*;
  import montium_prog_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, in_valid = 0;
  logic [15:0] cfg_addr = 0, cfg_data = 0;
  word_t [N_BUS-1:0] in_data;
  logic in_ready, out_valid, busy;
  word_t out_data;

  always #5 clk = ~clk;
  montium_tile dut (.clk, .rst_n, .cfg_valid, .cfg_addr, .cfg_data, .in_valid, .in_data,
                    .in_ready, .out_valid, .out_data, .busy);

  int exp_q[$];
  int stalls = 0;

  task automatic load(cfg_q_t q);
    foreach (q[i]) begin
      @(negedge clk); cfg_valid = 1; cfg_addr = q[i].addr; cfg_data = q[i].data;
    end
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic start_tile();
    @(negedge clk); cfg_valid = 1; cfg_addr = {1'b0, RG_CCU, 8'd0, 4'd4}; cfg_data = 0;
    @(negedge clk); cfg_valid = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid) begin
      int e;
      checks++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : 99999;
      if (int'(out_data) != e) begin
        failures++; $display("FAIL out %0d exp %0d", out_data, e);
      end
    end
    if (busy && in_valid === 1'b0 && dut.u_seq.busy && dut.u_seq.pc == 0) stalls++;
  end

  initial begin
    int n, t0, t1, a0, c0, a1, c1;
    int data [];
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---- streaming
    n = 40;
    load(dot2_stream(n));
    start_tile();
    t0 = $time;
    for (int i = 0; i < n; i++) begin
      a0 = $urandom_range(0, 65535) - 32768; c0 = $urandom_range(0, 65535) - 32768;
      a1 = $urandom_range(0, 65535) - 32768; c1 = $urandom_range(0, 65535) - 32768;
      exp_q.push_back(sat16(q15(a0, c0) + sat16(q15(a1, c1))));
      if (i % 7 == 3) begin
        in_valid = 0; repeat (3) @(negedge clk);
      end
      in_valid = 1;
      in_data[0] = 16'(a0); in_data[1] = 16'(c0); in_data[2] = 16'(a1); in_data[3] = 16'(c1);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 0;
    end
    while (busy) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs %0d", exp_q.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    // rate: back-to-back inputs, 2 clocks per item
    load(dot2_stream(10));
    start_tile();
    in_valid = 1;
    t0 = $time;
    for (int i = 0; i < 10; i++) begin
      exp_q.push_back(sat16(q15(1000 * i, 2000) + sat16(q15(-300, 700 + i))));
      in_data[0] = 16'(1000 * i); in_data[1] = 16'(2000); in_data[2] = -16'sd300;
      in_data[3] = 16'(700 + i);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    t1 = $time;
    in_valid = 0;
    while (busy) @(negedge clk);
    checks++;
    if ((t1 - t0) / 10 != 2 * 9 + 1) begin failures++; $display("FAIL rate %0d", (t1 - t0) / 10); end
    // ---- block mode
    n = 32;
    data = new[n];
    foreach (data[i]) begin
      data[i] = $urandom_range(0, 32767) - 16384;
      exp_q.push_back(2 * data[i]);
    end
    t0 = $time;
    load(double_block(n, data));
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != double_block(n, data).size() + 1) begin
      failures++; $display("FAIL config rate");
    end
    start_tile();
    @(negedge clk);
    while (busy) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL block outputs missing %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
