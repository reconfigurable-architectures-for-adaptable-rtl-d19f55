// tb_montium_pp: one Processing Part driven directly. Loads memory M0 through the external
// port, then runs cycles in which register files A and C load from buses, the ALU forms the
// Q1.15 product A*C plus the East input, memory M1 stores bus values at AGU-stepped addresses
// and M0 is read at stepped addresses. Checks ALU outputs, memory read data and, after the run,
// M1's contents through the external port.
module tb_montium_pp;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  alu_cfg_t alu_cfg;
  rf_cfg_t [3:0] rf_cfg;
  mem_cfg_t [1:0] mem_cfg;
  logic [1:0][8:0] base, stride;
  logic [1:0][9:0] length;
  word_t [9:0] bus;
  word_t east, o1, o2, ow;
  word_t [1:0] mem_rd;
  logic ext_en = 0, ext_we = 0, ext_sel = 0;
  logic [8:0] ext_addr = 0;
  word_t ext_wdata = 0;

  always #5 clk = ~clk;
  montium_pp dut (.clk, .rst_n, .run, .alu_cfg, .rf_cfg, .mem_cfg, .agu_base(base),
    .agu_stride(stride), .agu_length(length), .bus, .east_in(east), .ext_en, .ext_we, .ext_sel,
    .ext_addr, .ext_wdata, .mem_rd, .out_1(o1), .out_2(o2), .west_out(ow));

  function automatic int q15(int a, int b);
    int p, r;
    p = a * b;
    if (p == 1073741824) return 32767;
    r = p >>> 15;
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a_prev, c_prev, m1_model [16];
    alu_cfg = '0; rf_cfg = '0; mem_cfg = '0; bus = '0; east = '0;
    base = '0; stride = {9'd1, 9'd3}; length = {10'd16, 10'd32};
    base[1] = 9'd100;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // M0[i] = 1000 + i
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ext_en = 1; ext_we = 1; ext_sel = 0; ext_addr = 9'(i); ext_wdata = 16'(1000 + i);
    end
    @(negedge clk); ext_en = 0; ext_we = 0;
    alu_cfg.fu1 = FU_PASS_X; alu_cfg.fu2 = FU_PASS_X; alu_cfg.fu3 = FU_PASS_X;
    alu_cfg.fu4 = FU_PASS_Y; alu_cfg.mul_en = 1; alu_cfg.mul_q15 = 1; alu_cfg.add_src = ADD_EAST;
    alu_cfg.sat = 1; alu_cfg.out2_sel = O2_MUL;
    rf_cfg[0] = '{we: 1, waddr: 2'd1, src: 4'd2, raddr: 2'd1};   // A from bus 2
    rf_cfg[2] = '{we: 1, waddr: 2'd3, src: 4'd5, raddr: 2'd3};   // C from bus 5
    mem_cfg[0] = '{we: 0, src: 4'd0, agu: AGU_STEP};             // M0 read, stride 3 in 32
    mem_cfg[1] = '{we: 1, src: 4'd7, agu: AGU_STEP};             // M1 write from bus 7
    @(negedge clk);
    run = 1;
    a_prev = 0; c_prev = 0;
    for (int i = 0; i < 16; i++) begin
      int a, c, e, m;
      a = $urandom_range(0, 65535) - 32768; c = $urandom_range(0, 65535) - 32768;
      e = $urandom_range(0, 2000) - 1000;
      bus[2] = 16'(a); bus[5] = 16'(c); bus[7] = 16'(i * 11); east = 16'(e);
      m1_model[i] = i * 11;
      #1;
      // ALU sees the operands written in the previous cycle
      m = q15(a_prev, c_prev) + e;
      if (m > 32767) m = 32767;
      if (m < -32768) m = -32768;
      checks++;
      if (i > 0 && (int'(o1) != m || int'(ow) != m || int'(o2) != q15(a_prev, c_prev))) begin
        failures++; $display("FAIL alu %0d: %0d exp %0d", i, o1, m);
      end
      checks++;
      if (int'(mem_rd[0]) != 1000 + (3 * i) % 32) begin
        failures++; $display("FAIL mem read %0d: %0d", i, mem_rd[0]);
      end
      a_prev = a; c_prev = c;
      @(negedge clk);
    end
    run = 0;
    for (int i = 0; i < 16; i++) begin
      ext_en = 1; ext_we = 0; ext_sel = 1; ext_addr = 9'(100 + i); #1;
      checks++;
      if (int'(mem_rd[1]) != m1_model[i]) begin failures++; $display("FAIL M1[%0d]", i); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
