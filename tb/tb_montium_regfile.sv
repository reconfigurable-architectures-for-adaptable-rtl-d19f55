// tb_montium_regfile: random writes and reads against a shadow array; also checks that a
// write is not visible on the read port before the clock edge (no bypass) and the reset value.
module tb_montium_regfile;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] wa = 0, ra = 0;
  word_t wd = 0, rd;
  int shadow [4];

  always #5 clk = ~clk;
  montium_regfile dut (.clk, .rst_n, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (shadow[i]) shadow[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      ra = 2'(i); #1; checks++; if (rd != 0) failures++;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 2'($urandom); wd = 16'($urandom); ra = wa;
      #1;
      checks++;
      if (int'(rd) != shadow[wa]) begin failures++; $display("FAIL bypass/read %0d", i); end
      @(posedge clk);
      if (we) shadow[wa] = int'(wd);
      #1;
      checks++;
      if (int'(rd) != shadow[ra]) begin failures++; $display("FAIL read after write %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
