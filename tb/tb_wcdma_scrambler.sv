// tb_wcdma_scrambler: compares the generator with the scrambling code computed here directly
// from the two m-sequences stored as arrays (x and y over one full period of 2^18-1),
// z(i) = x((i+n) mod L) + y(i), Q branch at i+131072. Covers code 0 and two other code numbers,
// a whole 38400-chip frame and the restart at the frame boundary, and the 19-cycle setup.
module tb_wcdma_scrambler;
  localparam int L = 262143;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, chip_en = 0, ready, ci, cq;
  logic [17:0] code_n = 0;
  bit x [L + 18];
  bit y [L + 18];

  always #5 clk = ~clk;
  wcdma_scrambler dut (.clk, .rst_n, .load, .code_n, .chip_en, .ready, .c_i(ci), .c_q(cq));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(int n, int chips);
    int setup, bad;
    @(negedge clk); code_n = 18'(n); load = 1;
    @(negedge clk); load = 0;
    setup = 0;
    while (!ready) begin @(negedge clk); setup++; end
    checks++;
    if (setup != 19) begin failures++; $display("FAIL setup %0d cycles", setup); end
    bad = 0;
    for (int i = 0; i < chips; i++) begin
      int k;
      bit ei, eq;
      k = i % 38400;
      ei = x[(k + n) % L] ^ y[k];
      eq = x[(k + n + 131072) % L] ^ y[(k + 131072) % L];
      chip_en = 1;
      #1;
      checks++;
      if (ci != ei || cq != eq) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL code %0d chip %0d got %0d%0d exp %0d%0d", n, i, ci, cq, ei, eq);
      end
      @(negedge clk);
    end
    chip_en = 0;
  endtask

  initial begin
    x[0] = 1;
    for (int i = 1; i < 18; i++) x[i] = 0;
    for (int i = 0; i < 18; i++) y[i] = 1;
    for (int i = 0; i < L; i++) begin
      x[i + 18] = x[i + 7] ^ x[i];
      y[i + 18] = y[i + 10] ^ y[i + 7] ^ y[i + 5] ^ y[i];
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_code(0, 500);
    run_code(16 * 37, 38400 + 300);
    run_code(8191 * 16 + 5, 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
