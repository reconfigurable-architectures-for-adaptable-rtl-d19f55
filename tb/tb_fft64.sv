// tb_fft64: transforms random and single-tone 64-sample blocks and compares every bin with a
// direct DFT computed here in real arithmetic, divided by 64 (tolerance 6 LSB for the
// fixed-point rounding of six stages). Checks that the compute phase takes 204 clocks and that
// the bins come out in natural order after it. Then symbols are sent back to back: the second
// must load while the first is transformed (in_ready stays high), and a third must wait until
// a bank frees up (in_ready low); all of them must still transform correctly.
module tb_fft64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, iv = 0, ifst = 0, rdy, busy, ov, of;
  logic signed [15:0] ir = 0, ii = 0, orr, oi;
  real xr [16][64], xi [16][64];
  int nbin = 0, busy_cycles = 0, maxerr = 0, iblk = 0, oblk = 0, rdy_low = 0;

  always #5 clk = ~clk;
  fft64 dut (.clk, .rst_n, .in_valid(iv), .in_first(ifst), .in_re(ir), .in_im(ii),
    .in_ready(rdy), .busy, .out_valid(ov), .out_first(of), .out_re(orr), .out_im(oi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  always @(posedge clk) if (rst_n && ov) begin
    real er, ei;
    int dr, di;
    er = 0; ei = 0;
    for (int n = 0; n < 64; n++) begin
      real a;
      a = -2.0 * 3.141592653589793 * nbin * n / 64.0;
      er += xr[oblk][n] * $cos(a) - xi[oblk][n] * $sin(a);
      ei += xr[oblk][n] * $sin(a) + xi[oblk][n] * $cos(a);
    end
    er = er / 64.0; ei = ei / 64.0;
    dr = int'(orr) - $rtoi(er); di = int'(oi) - $rtoi(ei);
    if (dr < 0) dr = -dr;
    if (di < 0) di = -di;
    if (dr > maxerr) maxerr = dr;
    if (di > maxerr) maxerr = di;
    checks++;
    if (dr > 6 || di > 6 || of != (nbin == 0)) begin
      failures++; $display("FAIL bin %0d got (%0d,%0d) exp (%0.1f,%0.1f)", nbin, orr, oi, er, ei);
    end
    nbin++;
    if (nbin == 64) begin nbin = 0; oblk++; end
  end

  task automatic make(int kind);
    for (int n = 0; n < 64; n++) begin
      if (kind == 0) begin
        xr[iblk][n] = int'($urandom_range(0, 60000)) - 30000; xi[iblk][n] = int'($urandom_range(0, 60000)) - 30000;
      end else begin
        xr[iblk][n] = $rtoi(20000.0 * $cos(2.0 * 3.141592653589793 * kind * n / 64.0));
        xi[iblk][n] = $rtoi(20000.0 * $sin(2.0 * 3.141592653589793 * kind * n / 64.0));
      end
    end
  endtask

  // feed block iblk, one sample per clock whenever in_ready allows
  task automatic feed();
    rdy_low = 0;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      while (!rdy) begin rdy_low++; @(negedge clk); end
      iv = 1; ifst = (n == 0); ir = 16'($rtoi(xr[iblk][n])); ii = 16'($rtoi(xi[iblk][n]));
    end
    @(negedge clk); iv = 0;
    iblk++;
  endtask

  task automatic block(int kind);
    make(kind);
    feed();
    busy_cycles = 0;
    while (oblk < iblk) @(negedge clk);
    checks++;
    if (busy_cycles != 204) begin failures++; $display("FAIL compute took %0d", busy_cycles); end
  endtask

  task automatic back_to_back();
    make(0); feed();
    make(3); feed();
    checks++;
    if (rdy_low != 0) begin failures++; $display("FAIL second symbol waited %0d clocks", rdy_low); end
    make(0); feed();
    checks++;
    if (rdy_low == 0) begin failures++; $display("FAIL third symbol did not wait for a free bank"); end
    while (oblk < iblk) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    block(0);
    block(5);
    block(0);
    block(37);
    back_to_back();
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
