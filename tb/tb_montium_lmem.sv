// tb_montium_lmem: fills all 512 words with a pattern, reads them back, then random mixed
// writes and reads against a shadow array.
module tb_montium_lmem;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [8:0] addr = 0;
  word_t wd = 0, rd;
  int shadow [512];

  always #5 clk = ~clk;
  montium_lmem dut (.clk, .we, .addr, .wdata(wd), .rdata(rd));

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; addr = 9'(i); wd = 16'(i * 37 + 5); shadow[i] = (i * 37 + 5) & 16'hffff;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 512; i++) begin
      addr = 9'(511 - i); #1;
      checks++; if (int'(16'(rd)) != shadow[511 - i]) failures++;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 9'($urandom); wd = 16'($urandom);
      #1;
      checks++; if (int'(16'(rd)) != shadow[addr]) failures++;
      @(posedge clk); if (we) shadow[addr] = int'(16'(wd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
