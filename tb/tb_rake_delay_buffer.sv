// tb_rake_delay_buffer: writes 3000 numbered samples (OSR 2) and checks, for every chip, that
// each of the four fingers receives the sample written delay[f] samples before the newest one,
// including delay 0 and delays near the buffer depth; changes the delay profile on the fly;
// checks that chip_valid holds until chip_ready and that a missed chip raises overrun.
module tb_rake_delay_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, iv = 0, cv, cr = 0, ovr;
  logic [3:0][8:0] delay;
  logic signed [15:0] ir = 0, ii = 0;
  logic [3:0][15:0] fr, fi;
  int nwritten = 0, overruns = 0, chips = 0;

  always #5 clk = ~clk;
  rake_delay_buffer dut (.clk, .rst_n, .delay, .in_valid(iv), .in_re(ir), .in_im(ii),
    .chip_valid(cv), .chip_ready(cr), .overrun(ovr), .f_re(fr), .f_im(fi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ovr) overruns++;

  initial begin
    delay = {9'd500, 9'd37, 9'd5, 9'd0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n == 1500) delay = {9'd1, 9'd511, 9'd100, 9'd64};
      iv = 1; ir = 16'(n); ii = 16'(n ^ 16'h5555);
      @(negedge clk);
      iv = 0;
      nwritten = n + 1;
      #1;
      if (n % 2 == 1) begin
        // chip formed by sample n
        checks++;
        if (!cv) begin failures++; $display("FAIL no chip at %0d", n); end
        else if (n >= 600) begin
          for (int f = 0; f < 4; f++) begin
            int e;
            e = n - int'(delay[f]);
            checks++;
            if (int'(fr[f]) != e || fi[f] != (16'(e) ^ 16'h5555)) begin
              failures++; $display("FAIL finger %0d at %0d got %0d exp %0d", f, n, fr[f], e);
            end
          end
        end
        // the chip waits until taken
        @(negedge clk); #1;
        checks++;
        if (!cv) begin failures++; $display("FAIL chip dropped"); end
        cr = 1; @(negedge clk); cr = 0; #1;
        checks++;
        if (cv) begin failures++; $display("FAIL chip not cleared"); end
        chips++;
      end
    end
    // two chips without taking the first: overrun
    for (int n = 0; n < 4; n++) begin
      @(negedge clk); iv = 1; @(negedge clk); iv = 0;
    end
    repeat (2) @(negedge clk);
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL overruns %0d", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
