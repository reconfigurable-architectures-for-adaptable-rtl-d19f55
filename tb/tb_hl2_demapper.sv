// tb_hl2_demapper: fills the table for QPSK, 16-QAM and 64-QAM in turn (Gray-coded levels,
// nearest-level decisions computed here from the index value) and sends noisy constellation
// points; checks that every decision returns the transmitted bits and the bit count.
module tb_hl2_demapper;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, lwe = 0, iv = 0, ov;
  logic [5:0] lidx = 0, obits;
  logic [2:0] lval = 0, onb;
  logic [1:0] bpa = 1;
  logic signed [15:0] ir = 0, ii = 0;
  int exp_q[$];

  always #5 clk = ~clk;
  hl2_demapper dut (.clk, .rst_n, .lut_we(lwe), .lut_idx(lidx), .lut_val(lval),
    .bits_per_axis(bpa), .in_valid(iv), .in_re(ir), .in_im(ii), .out_valid(ov),
    .out_bits(obits), .out_nbits(onb));

  // levels on one axis: M = 2^bits levels (2m - M + 1) / norm, Gray code of the level number
  function automatic real level(int b, int m);
    real norm;
    norm = (b == 1) ? 1.4142 : (b == 2) ? 3.1623 : 6.4807;
    return (2.0 * m - (1 << b) + 1) / norm;
  endfunction
  function automatic int gray(int m);
    return m ^ (m >> 1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    checks++;
    if (exp_q.size() == 0 || int'(obits) != exp_q.pop_front() || int'(onb) != 2 * int'(bpa)) begin
      failures++; $display("FAIL bits %b", obits);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int b = 1; b <= 3; b++) begin
      // table: index i in -32..31 stands for (i + 0.5) / 32
      for (int i = -32; i < 32; i++) begin
        real v, best;
        int bm;
        v = (i + 0.5) / 32.0;
        best = 10.0; bm = 0;
        for (int m = 0; m < (1 << b); m++) begin
          real dd;
          dd = v - level(b, m);
          if (dd < 0) dd = -dd;
          if (dd < best) begin best = dd; bm = m; end
        end
        @(negedge clk); lwe = 1; lidx = 6'(i); lval = 3'(gray(bm));
      end
      @(negedge clk); lwe = 0; bpa = 2'(b);
      for (int n = 0; n < 300; n++) begin
        int mi, mq, ni, nq;
        real xr, xq;
        ni = $urandom_range(0, 100); nq = $urandom_range(0, 100);
        mi = $urandom_range(0, (1 << b) - 1); mq = $urandom_range(0, (1 << b) - 1);
        xr = level(b, mi) + (ni - 50) / 2000.0;
        xq = level(b, mq) + (nq - 50) / 2000.0;
        if (xr > 0.9999) xr = 0.9999;
        if (xq > 0.9999) xq = 0.9999;
        if (xr < -1.0) xr = -1.0;
        if (xq < -1.0) xq = -1.0;
        exp_q.push_back((gray(mq) << b) | gray(mi));
        @(negedge clk); iv = 1; ir = 16'($rtoi(xr * 32768.0)); ii = 16'($rtoi(xq * 32768.0));
      end
      @(negedge clk); iv = 0;
      @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
