// tb_hl2_freq_offset_corr: loads a table of phasors exp(-j*2*pi*df*n/fs) for a known offset,
// feeds symbols whose samples carry that offset, and checks that each output equals the sample
// times its coefficient (within one LSB of a real-number reference) and that the offset is
// removed. Checks the 67-clock span from the first sample in to the last sample out.
module tb_hl2_freq_offset_corr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cwe = 0, iv = 0, ifst = 0, ov, of;
  logic [5:0] cidx = 0;
  logic signed [15:0] cr = 0, ci = 0, ir = 0, ii = 0, orr, oi;
  real cre [64], cim [64];
  real exp_r[$], exp_i[$];
  int t_first_in, t_last_out, nout = 0;

  always #5 clk = ~clk;
  hl2_freq_offset_corr dut (.clk, .rst_n, .coef_we(cwe), .coef_idx(cidx), .coef_re(cr),
    .coef_im(ci), .in_valid(iv), .in_first(ifst), .in_re(ir), .in_im(ii), .out_valid(ov),
    .out_first(of), .out_re(orr), .out_im(oi));

  function automatic int q(real v);
    v = v * 32768.0;
    if (v > 32767.0) v = 32767.0;
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    real er, ei;
    checks++;
    er = exp_r.pop_front(); ei = exp_i.pop_front();
    if ((int'(orr) - q(er)) > 2 || (int'(orr) - q(er)) < -2 ||
        (int'(oi) - q(ei)) > 2 || (int'(oi) - q(ei)) < -2 || of != (nout % 64 == 0)) begin
      failures++; $display("FAIL %0d: (%0d,%0d) exp (%0d,%0d)", nout, orr, oi, q(er), q(ei));
    end
    nout++;
    t_last_out = $time / 10;
  end

  initial begin
    real w;
    w = 2.0 * 3.141592653589793 * 0.013;     // offset: 0.013 cycles per sample
    for (int n = 0; n < 64; n++) begin
      cre[n] = $cos(w * n) * 32767.0 / 32768.0; cim[n] = -$sin(w * n) * 32767.0 / 32768.0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); cwe = 1; cidx = 6'(n); cr = 16'(q(cre[n])); ci = 16'(q(cim[n]));
    end
    @(negedge clk); cwe = 0;
    for (int s = 0; s < 3; s++) begin
      real dr, di;
      dr = 0.3 + 0.1 * s; di = -0.2;           // constant symbol value, rotated by the offset
      for (int n = 0; n < 64; n++) begin
        real xr, xi, kr, ki;
        @(negedge clk);
        xr = dr * $cos(w * n) - di * $sin(w * n);
        xi = dr * $sin(w * n) + di * $cos(w * n);
        iv = 1; ifst = (n == 0); ir = 16'(q(xr)); ii = 16'(q(xi));
        if (s == 0 && n == 0) t_first_in = $time / 10;
        kr = q(cre[n]) / 32768.0; ki = q(cim[n]) / 32768.0;
        exp_r.push_back((ir / 32768.0) * kr - (ii / 32768.0) * ki);
        exp_i.push_back((ir / 32768.0) * ki + (ii / 32768.0) * kr);
        // offset removed: result close to the symbol value
        checks++;
        if ((ir / 32768.0) * kr - (ii / 32768.0) * ki - dr > 0.001 ||
            (ir / 32768.0) * kr - (ii / 32768.0) * ki - dr < -0.001) failures++;
      end
      @(negedge clk); iv = 0;
      repeat (3) @(negedge clk);
      if (s == 0) begin
        checks++;
        if (t_last_out - t_first_in + 1 != 67) begin
          failures++; $display("FAIL symbol took %0d clocks", t_last_out - t_first_in + 1);
        end
      end
    end
    checks++;
    if (nout != 192) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
