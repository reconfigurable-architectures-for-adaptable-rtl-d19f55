// tb_montium_decoder: writes random 120-bit words chunk by chunk into all 32 entries, then
// reads every entry back by index; checks the reset value and that chunks beyond the word are
// ignored.
module tb_montium_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] entry = 0, idx = 0;
  logic [3:0] chunk = 0;
  logic [15:0] data = 0;
  logic [119:0] word;
  logic [127:0] model [32];

  always #5 clk = ~clk;
  montium_decoder #(.W(120)) dut (.clk, .rst_n, .cfg_we(we), .cfg_entry(entry), .cfg_chunk(chunk),
                                  .cfg_data(data), .idx, .word);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    idx = 5'd7; #1; checks++; if (word != 0) failures++;
    for (int e = 0; e < 32; e++) begin
      model[e] = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 9; c++) begin
        @(negedge clk);
        we = 1; entry = 5'(e); chunk = 4'(c); data = (c < 8) ? model[e][c*16 +: 16] : 16'hdead;
      end
    end
    @(negedge clk); we = 0;
    for (int e = 31; e >= 0; e--) begin
      idx = 5'(e); #1;
      checks++;
      if (word != model[e][119:0]) begin failures++; $display("FAIL entry %0d", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
