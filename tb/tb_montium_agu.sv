// tb_montium_agu: circular stepping with several base/stride/length settings against a model,
// base reload, hold and table-index mode (the indexed address appears after the clock edge).
module tb_montium_agu;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  agu_op_e op = AGU_HOLD;
  logic [8:0] base = 0, stride = 1, index = 0, addr;
  logic [9:0] length = 512;

  always #5 clk = ~clk;
  montium_agu dut (.clk, .rst_n, .run, .op, .base, .stride, .length, .index, .addr);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cfgn = 0; cfgn < 20; cfgn++) begin
      @(negedge clk);
      run = 0;
      length = 10'($urandom_range(1, 512));
      base   = 9'($urandom_range(0, 512 - int'(length)));
      stride = 9'($urandom_range(0, int'(length) - 1));
      @(negedge clk);
      run = 1;
      model = 0;
      for (int i = 0; i < 300; i++) begin
        int r;
        r = $urandom_range(0, 9);
        op = (r < 6) ? AGU_STEP : (r < 7) ? AGU_BASE : (r < 8) ? AGU_HOLD : AGU_IDX;
        index = 9'($urandom_range(0, int'(length) - 1));
        #1;
        checks++;
        if (int'(addr) != int'(base) + model) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d exp %0d", addr, int'(base) + model);
        end
        @(negedge clk);
        if (op == AGU_STEP) model = (model + int'(stride)) % int'(length);
        else if (op == AGU_BASE) model = 0;
        else if (op == AGU_IDX) model = int'(index);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
