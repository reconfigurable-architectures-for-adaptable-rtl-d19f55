// tb_hl2_prefix_removal: sends five 80-sample symbols (numbered samples, with idle gaps and
// noise samples between symbols) and checks that exactly samples 16..79 of each symbol come
// out, in order, with out_first on the first of them.
module tb_hl2_prefix_removal;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, iv = 0, ss = 0, ov, of;
  logic signed [15:0] ir = 0, ii = 0, orr, oi;
  int exp_q[$], got = 0;

  always #5 clk = ~clk;
  hl2_prefix_removal dut (.clk, .rst_n, .in_valid(iv), .sym_start(ss), .in_re(ir), .in_im(ii),
    .out_valid(ov), .out_first(of), .out_re(orr), .out_im(oi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    int e;
    checks++;
    e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
    if (int'(orr) != e || oi != ~orr || of != ((e % 100) == 16)) begin
      failures++; $display("FAIL got %0d first %0d exp %0d", orr, of, e);
    end
    got++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 5; s++) begin
      for (int n = 0; n < 80; n++) begin
        @(negedge clk);
        if (n == 40 && s == 2) begin iv = 0; ss = 0; @(negedge clk); end
        iv = 1; ss = (n == 0); ir = 16'(s * 100 + n); ii = ~16'(s * 100 + n);
        if (n >= 16) exp_q.push_back(s * 100 + n);
      end
      for (int g = 0; g < 7; g++) begin
        @(negedge clk); iv = 1; ss = 0; ir = 16'(9999); ii = ~16'(9999);
      end
    end
    @(negedge clk); iv = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (got != 5 * 64 || exp_q.size() != 0) begin failures++; $display("FAIL count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
