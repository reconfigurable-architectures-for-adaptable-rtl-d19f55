// tb_rake_receiver: end-to-end RAKE test. Random QPSK symbols are spread with a random +-1
// code of length SF, scrambled with a random complex chip sequence, and passed through four
// fingers with different complex gains plus noise. The MRC weights are the conjugate gains.
// Checks: every decided bit pair equals the transmitted one, every combined symbol equals an
// exact integer model of de-scrambling, de-spreading, scaling by 2*SF and weighting; the
// symbol period is 4*SF+5 clocks with four fingers and 2*SF+5 with two; a code load takes
// SF+1 clocks; a gap in chip_valid stalls the receiver. SF = 16, 4, 512. Then 16-QAM symbols
// (amplitudes 1000 and 3000 per axis) are de-mapped with a threshold at the midpoint of the
// combined amplitudes measured on the QPSK symbols.
module tb_rake_receiver;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ld_valid = 0, ld_busy, four = 1, cv = 0, cr, sci = 0, scq = 0, sv;
  logic [9:0] ld_data = 0;
  logic [3:0][15:0] wr, wi, fr, fi;
  logic [3:0] bits;
  logic q16 = 0;
  int thr = 0;
  real msum = 0;
  int mcnt = 0;
  logic signed [15:0] sr, si;

  always #5 clk = ~clk;
  rake_receiver dut (.clk, .rst_n, .ld_valid, .ld_data, .ld_busy, .four_fingers(four),
    .qam16(q16), .qam_thr(15'(thr)),
    .w_re(wr), .w_im(wi), .chip_valid(cv), .chip_ready(cr), .f_re(fr), .f_im(fi),
    .sc_i(sci), .sc_q(scq), .sym_valid(sv), .sym_bits(bits), .sym_re(sr), .sym_im(si));

  int code [512];
  int hr [4], hi [4];
  int exp_bits[$], exp_re[$], exp_im[$];
  int sym_times[$];
  int stall_gaps = 0;

  function automatic int sat16(longint v);
    return int'((v > 32767) ? 32767 : (v < -32768) ? -32768 : v);
  endfunction
  function automatic int rq(longint v);
    return sat16((v + 16384) >>> 15);
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && sv) begin
    sym_times.push_back($time / 10);
    checks++;
    if (exp_bits.size() == 0) begin failures++; $display("FAIL extra symbol"); end
    else begin
      int eb, er, ei;
      eb = exp_bits.pop_front(); er = exp_re.pop_front(); ei = exp_im.pop_front();
      if (int'(bits) != eb || int'(sr) != er || int'(si) != ei) begin
        failures++;
        $display("FAIL symbol bits %0d exp %0d, (%0d,%0d) exp (%0d,%0d)", bits, eb, sr, si, er, ei);
      end
    end
  end

  task automatic load_code(int sf);
    int t0;
    @(negedge clk);
    t0 = $time / 10;
    ld_valid = 1; ld_data = 10'(sf);
    for (int k = 0; k < sf; k++) begin
      code[k] = $urandom_range(0, 1);
      @(negedge clk); ld_data = 10'(code[k]);
    end
    @(negedge clk); ld_valid = 0;
    checks++;
    if ($time / 10 - t0 != sf + 1) begin failures++; $display("FAIL load time"); end
  endtask

  // transmit nsym symbols; gap > 0 inserts chip_valid gaps
  task automatic send(int sf, int nsym, int nf, bit gaps);
    int shift;
    shift = $clog2(sf) + 1;
    for (int s = 0; s < nsym; s++) begin
      int b, dr, di;
      longint ar [4], ai [4], tr, ti;
      if (q16) begin
        b = $urandom_range(0, 15);
        dr = (b[0] ? -1 : 1) * (b[2] ? 3000 : 1000);
        di = (b[1] ? -1 : 1) * (b[3] ? 3000 : 1000);
      end else begin
        b = $urandom_range(0, 3);
        dr = b[0] ? -3000 : 3000;
        di = b[1] ? -3000 : 3000;
      end
      for (int f = 0; f < 4; f++) begin ar[f] = 0; ai[f] = 0; end
      for (int k = 0; k < sf; k++) begin
        int ci, cq, xr, xim, sp;
        ci = $urandom_range(0, 1); cq = $urandom_range(0, 1);
        sp = code[k] ? -1 : 1;
        // transmitted chip: d * sp * (sI + j sQ)
        xr = sp * (dr * (ci ? -1 : 1) - di * (cq ? -1 : 1));
        xim = sp * (dr * (cq ? -1 : 1) + di * (ci ? -1 : 1));
        for (int f = 0; f < 4; f++) begin
          int rr, ri;
          rr = rq(longint'(xr) * hr[f] - longint'(xim) * hi[f]) + $urandom_range(0, 400) - 200;
          ri = rq(longint'(xr) * hi[f] + longint'(xim) * hr[f]) + $urandom_range(0, 400) - 200;
          fr[f] = 16'(rr); fi[f] = 16'(ri);
          // model: de-scramble with conj(c), de-spread
          ar[f] += sp * (rr * (ci ? -1 : 1) + ri * (cq ? -1 : 1));
          ai[f] += sp * (ri * (ci ? -1 : 1) - rr * (cq ? -1 : 1));
        end
        sci = 1'(ci); scq = 1'(cq);
        if (gaps && k == 3) begin
          cv = 0; repeat (7) @(negedge clk); stall_gaps++;
        end
        cv = 1;
        do @(posedge clk); while (!cr);
        @(negedge clk);
        cv = 0;
      end
      tr = 0; ti = 0;
      for (int f = 0; f < nf; f++) begin
        int nr, ni;
        nr = sat16(ar[f] >>> shift); ni = sat16(ai[f] >>> shift);
        tr += rq(longint'(nr) * int'($signed(wr[f])) - longint'(ni) * int'($signed(wi[f])));
        ti += rq(longint'(nr) * int'($signed(wi[f])) + longint'(ni) * int'($signed(wr[f])));
      end
      begin
        int er, ei, eb;
        er = sat16(tr); ei = sat16(ti);
        eb = (er < 0 ? 1 : 0) | (ei < 0 ? 2 : 0);
        if (q16) eb |= ((er < 0 ? -er : er) >= thr ? 4 : 0) | ((ei < 0 ? -ei : ei) >= thr ? 8 : 0);
        else if (nf == 4) begin
          msum += (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
          mcnt += 2;
        end
        exp_re.push_back(er); exp_im.push_back(ei);
        exp_bits.push_back(eb);
        checks++;
        if (eb != b) begin
          failures++; $display("FAIL model does not recover the symbol %0d as %0d", b, eb);
        end
      end
    end
  endtask

  task automatic check_period(int expected, int n);
    repeat (2 * expected) @(negedge clk);
    checks++;
    if (sym_times.size() < n) begin failures++; $display("FAIL too few symbols"); end
    else begin
      for (int i = 1; i < sym_times.size(); i++) begin
        checks++;
        if (sym_times[i] - sym_times[i-1] != expected) begin
          failures++; $display("FAIL period %0d exp %0d", sym_times[i] - sym_times[i-1], expected);
        end
      end
    end
    sym_times.delete();
  endtask

  initial begin
    int gr [4] = '{20000, -9000, 6000, 3000};
    int gi [4] = '{5000, 12000, -8000, 2000};
    for (int f = 0; f < 4; f++) begin
      hr[f] = gr[f]; hi[f] = gi[f];
      wr[f] = 16'(gr[f]); wi[f] = 16'(-gi[f]);
    end
    fr = '0; fi = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // SF 16, four fingers, continuous chips
    load_code(16);
    send(16, 6, 4, 0);
    check_period(4 * 16 + 5, 6);
    // two fingers
    four = 0;
    send(16, 5, 2, 0);
    check_period(2 * 16 + 5, 5);
    // stalls
    four = 1;
    send(16, 3, 4, 1);
    check_period(4 * 16 + 5 + 4, 3);  // 7 idle clocks, 3 of them overlap the previous chip
    checks++;
    if (stall_gaps != 3) failures++;
    // SF 4 and 512
    load_code(4);
    send(4, 8, 4, 0);
    check_period(4 * 4 + 5, 8);
    load_code(512);
    send(512, 2, 4, 0);
    check_period(4 * 512 + 5, 2);
    // 16-QAM at SF 16: threshold at 2/3 of the mean QPSK amplitude (levels 1000 and 3000)
    load_code(16);
    thr = $rtoi(msum / mcnt * 2.0 / 3.0);
    q16 = 1;
    send(16, 24, 4, 0);
    check_period(4 * 16 + 5, 24);
    q16 = 0;
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("FAIL missing symbols"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
