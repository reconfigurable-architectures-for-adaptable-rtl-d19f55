// tb_hl2_eq_phase: (bins taken at full scale: PRESHIFT 0) OFDM symbols through a random frequency-selective channel H_k with a random
// common phase error per symbol. The equalizer table holds 1/H_k; pilots carry their known
// +-1 values. Checks that the 48 data carriers come out in subcarrier order (-26 .. 26 without
// DC and pilots), that each equals the transmitted QPSK/16-QAM value within 0.005, with the
// phase error removed, and that a symbol takes 64 + 17 + 48 clocks plus the output register.
module tb_hl2_eq_phase;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cwe = 0, iv = 0, ifst = 0, rdy, ov, olast;
  logic [5:0] cidx = 0, oidx;
  logic signed [15:0] cr = 0, ci = 0, ir = 0, ii = 0, orr, oi;
  logic [3:0] pref = 0;
  real hr [64], hi [64], txr [64], txi [64];
  int dbin [48];
  int nout = 0, t_in, t_out;
  real worst = 0;

  always #5 clk = ~clk;
  hl2_eq_phase #(.PRESHIFT(0), .COEF_INT(0)) dut (.clk, .rst_n, .coef_we(cwe), .coef_idx(cidx), .coef_re(cr), .coef_im(ci),
    .pilot_ref(pref), .in_valid(iv), .in_first(ifst), .in_re(ir), .in_im(ii), .in_ready(rdy),
    .out_valid(ov), .out_idx(oidx), .out_last(olast), .out_re(orr), .out_im(oi));

  function automatic int q(real v);
    v = v * 32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    real er, ei, d;
    int k;
    k = dbin[nout % 48];
    er = orr / 32768.0 - txr[k]; ei = oi / 32768.0 - txi[k];
    d = (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
    if (d > worst) worst = d;
    checks++;
    if (d > 0.005 || int'(oidx) != nout % 48 || olast != (nout % 48 == 47)) begin
      failures++;
      $display("FAIL carrier %0d (bin %0d): (%0f,%0f) exp (%0f,%0f)", nout % 48, k,
               orr / 32768.0, oi / 32768.0, txr[k], txi[k]);
    end
    nout++;
    t_out = $time / 10;
  end

  initial begin
    int d;
    real lv [4] = '{-0.6, -0.2, 0.2, 0.6};
    d = 0;
    for (int sc = -26; sc <= 26; sc++)
      if (sc != 0 && sc != 7 && sc != -7 && sc != 21 && sc != -21) begin
        dbin[d] = (sc + 64) % 64; d++;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // channel and equalizer table
    for (int k = 0; k < 64; k++) begin
      real m, a;
      m = 1.05 + 0.25 * ($urandom_range(0, 1000) / 1000.0);
      a = 6.283185307 * ($urandom_range(0, 1000) / 1000.0);
      hr[k] = m * $cos(a); hi[k] = m * $sin(a);
      @(negedge clk);
      cwe = 1; cidx = 6'(k);
      cr = 16'(q(hr[k] / (m * m))); ci = 16'(q(-hi[k] / (m * m)));
    end
    @(negedge clk); cwe = 0;
    for (int s = 0; s < 4; s++) begin
      real th;
      th = 6.283185307 * ($urandom_range(0, 1000) / 1000.0) - 3.14159;
      pref = 4'($urandom);
      for (int k = 0; k < 64; k++) begin
        if (k == 7 || k == 21 || k == 43 || k == 57) begin
          int pi_;
          pi_ = (k == 43) ? 0 : (k == 57) ? 1 : (k == 7) ? 2 : 3;
          txr[k] = pref[pi_] ? -0.7 : 0.7; txi[k] = 0;
        end else if (s % 2 == 0) begin
          txr[k] = ($urandom_range(0, 1) ? -0.5 : 0.5); txi[k] = ($urandom_range(0, 1) ? -0.5 : 0.5);
        end else begin
          txr[k] = lv[$urandom_range(0, 3)]; txi[k] = lv[$urandom_range(0, 3)];
        end
      end
      while (!rdy) @(negedge clk);
      for (int k = 0; k < 64; k++) begin
        real yr, yi, zr, zi;
        // Y = H X exp(j th)
        zr = hr[k] * txr[k] - hi[k] * txi[k]; zi = hr[k] * txi[k] + hi[k] * txr[k];
        yr = zr * $cos(th) - zi * $sin(th); yi = zr * $sin(th) + zi * $cos(th);
        @(negedge clk);
        iv = 1; ifst = (k == 0); ir = 16'(q(yr * 0.92)); ii = 16'(q(yi * 0.92));
        if (k == 0) t_in = $time / 10;
      end
      @(negedge clk); iv = 0;
      // undo the 0.92 input scaling in the expected values after this symbol
      for (int k = 0; k < 64; k++) begin txr[k] = txr[k] * 0.92; txi[k] = txi[k] * 0.92; end
      while (nout < 48 * (s + 1)) @(negedge clk);
      checks++;
      if (t_out - t_in + 1 != 64 + 17 + 48 + 1) begin
        failures++; $display("FAIL symbol took %0d clocks", t_out - t_in + 1);
      end
    end
    $display("worst error %0f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
