// tb_montium_sdr_top: end-to-end test of the whole receiver at its default sizes. Three
// processes run at the same time:
//  * W-CDMA: QPSK symbols are spread (SF 16), scrambled with the UMTS code generated here from
//    its two m-sequences, sent over four paths with different delays (0, 6, 13, 32 samples at
//    two samples per chip) and gains, and received through the FIR, the delay buffer and the
//    RAKE. The decided bits must equal the sent ones: QPSK and then 16-QAM symbols with four
//    fingers, then QPSK after a switch to two fingers. The 16-QAM threshold is set from the
//    mean amplitude of the first QPSK symbols. Finally samples are pushed too fast to provoke an overrun.
//  * HiperLAN/2: OFDM symbols (48 data carriers, 4 pilots) pass a frequency-selective channel,
//    get a carrier frequency offset, a cyclic prefix and are fed sample by sample. The bits
//    from the de-mapper must equal the sent ones, for QPSK and, after rewriting the de-mapping
//    table, for 16-QAM. Samples come one every 5 clocks (20 MHz samples at a 100 MHz clock,
//    one symbol per 400 clocks). Finally three symbols back to back overrun the FFT.
//  * MONTIUM tile: a streaming program with input gaps and a block-mode program.
// Each mechanism (RAKE stall, 4-finger and 2-finger symbols, W-CDMA and OFDM overrun, FFT runs,
// QPSK and 16-QAM de-mapping, tile stall, tile block read-out) is counted; one that never
// happened counts as a failure.
module tb_montium_sdr_top;
  import montium_pkg::*;
  import montium_prog_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT ports
  logic mt_cfg_valid = 0, mt_in_valid = 0, mt_in_ready, mt_out_valid, mt_busy;
  logic [15:0] mt_cfg_addr = 0, mt_cfg_data = 0;
  word_t [N_BUS-1:0] mt_in_data;
  word_t mt_out_data;
  logic w_fir_we = 0, w_sc_load = 0, w_sc_ready, w_ld_valid = 0, w_ld_busy, w_four_fingers = 1;
  logic [3:0] w_fir_idx = 0;
  logic [15:0] w_fir_coef = 0, w_in_re = 0, w_in_im = 0, w_sym_re, w_sym_im;
  logic [3:0][8:0] w_delay;
  logic [17:0] w_sc_code = 0;
  logic [9:0] w_ld_data = 0;
  logic [3:0][15:0] w_mrc_re, w_mrc_im;
  logic w_in_valid = 0, w_sym_valid, w_chip_taken, wcdma_overrun;
  logic [3:0] w_sym_bits;
  logic w_qam16 = 0;
  logic [14:0] w_qam_thr = 0;
  logic h_foc_we = 0, h_eq_we = 0, h_lut_we = 0, h_in_valid = 0, h_sym_start = 0;
  logic [5:0] h_foc_idx = 0, h_eq_idx = 0, h_lut_idx = 0, h_out_bits;
  logic [15:0] h_foc_re = 0, h_foc_im = 0, h_eq_re = 0, h_eq_im = 0, h_in_re = 0, h_in_im = 0;
  logic [3:0] h_pilot_ref = 4'b1000;
  logic [2:0] h_lut_val = 0, h_out_nbits;
  logic [1:0] h_bits_per_axis = 1;
  logic h_out_valid, h_fft_busy, ofdm_overrun;

  montium_sdr_top dut (.*);

  // ---------------------------------------------------------------- mechanism counters
  int n_rake_stall = 0, n_sym4 = 0, n_sym2 = 0, n_w_ovr = 0, n_h_ovr = 0, n_fft = 0;
  int n_qpsk = 0, n_qam16 = 0, n_tile_stall = 0, n_block_words = 0, n_w_qam16 = 0;
  logic fft_busy_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_rake.chip_ready && !dut.u_rake.chip_valid) n_rake_stall++;
    if (wcdma_overrun) n_w_ovr++;
    if (ofdm_overrun) n_h_ovr++;
    if (h_fft_busy && !fft_busy_q) n_fft++;
    fft_busy_q <= h_fft_busy;
    if (dut.u_tile.u_seq.busy && !dut.u_tile.u_seq.run) n_tile_stall++;
    if (dut.u_tile.u_ccu.state == 2'd2) n_block_words++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q15r(real v);
    v = v * 32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  // ================================================================ W-CDMA
  localparam int L = 262143;
  localparam int SF = 16;
  localparam int CODE_N = 16 * 3;
  localparam int NSYM = 40;
  bit xs [L + 18];
  bit ys [L + 18];
  int spread [SF];
  int tx_bits [NSYM];
  bit tx_q16 [NSYM];
  real amp_sum = 0;
  int amp_cnt = 0;
  int d_path [4] = '{0, 6, 13, 32};
  real g_re [4] = '{0.80, -0.20, 0.25, 0.15};
  real g_im [4] = '{0.10, 0.45, -0.20, 0.10};
  int rx_sym = 0, w_bad = 0;
  bit w_done = 0;

  always @(posedge clk) if (rst_n && w_sym_valid) begin
    // RAKE symbol m carries transmitted symbol m-1 (the longest path delays by one symbol)
    if (rx_sym >= 1 && rx_sym <= NSYM) begin
      checks++;
      if (int'(w_sym_bits) != tx_bits[rx_sym - 1]) begin
        failures++; w_bad++;
        if (w_bad < 6) $display("FAIL W-CDMA symbol %0d bits %0d exp %0d", rx_sym - 1, w_sym_bits, tx_bits[rx_sym - 1]);
      end
      if (w_four_fingers) n_sym4++; else n_sym2++;
      if (w_qam16) n_w_qam16++;
      else if (w_four_fingers) begin
        amp_sum += ($signed(w_sym_re) < 0 ? -$signed(w_sym_re) : $signed(w_sym_re));
        amp_sum += ($signed(w_sym_im) < 0 ? -$signed(w_sym_im) : $signed(w_sym_im));
        amp_cnt += 2;
      end
    end
    // the next RAKE symbol carries transmitted symbol rx_sym: choose its de-mapping
    if (rx_sym < NSYM && tx_q16[rx_sym]) begin
      if (!w_qam16) w_qam_thr <= 15'($rtoi(amp_sum / amp_cnt * 2.0 / 3.0));
      w_qam16 <= 1'b1;
    end else w_qam16 <= 1'b0;
    rx_sym++;
  end

  task automatic wcdma_run();
    real u_re [$], u_im [$];
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1; end
    for (int i = 0; i < L; i++) begin
      xs[i + 18] = xs[i + 7] ^ xs[i];
      ys[i + 18] = ys[i + 10] ^ ys[i + 7] ^ ys[i + 5] ^ ys[i];
    end
    // configuration: identity FIR, path delays, scrambling code, spreading code, MRC weights
    @(negedge clk); w_fir_we = 1; w_fir_idx = 0; w_fir_coef = 16'd32767;
    @(negedge clk); w_fir_we = 0;
    for (int f = 0; f < 4; f++) begin
      w_delay[f] = 9'(32 - d_path[f]);
      w_mrc_re[f] = 16'(q15r(g_re[f])); w_mrc_im[f] = 16'(q15r(-g_im[f]));
    end
    @(negedge clk); w_sc_load = 1; w_sc_code = 18'(CODE_N);
    @(negedge clk); w_sc_load = 0;
    while (!w_sc_ready) @(negedge clk);
    @(negedge clk); w_ld_valid = 1; w_ld_data = 10'(SF);
    for (int k = 0; k < SF; k++) begin
      spread[k] = (k / (1 << (k % 3))) % 2;   // a fixed +-1 pattern
      @(negedge clk); w_ld_data = 10'(spread[k]);
    end
    @(negedge clk); w_ld_valid = 0;
    // transmitted chips, oversampled by 2
    for (int s = 0; s < NSYM; s++) begin
      tx_q16[s] = (s >= 12 && s < 24);
      tx_bits[s] = tx_q16[s] ? $urandom_range(0, 15) : $urandom_range(0, 3);
      for (int k = 0; k < SF; k++) begin
        int i, ci, cq;
        real dr, di, sp, cr, cim;
        i = s * SF + k;
        ci = xs[(i + SF + CODE_N) % L] ^ ys[i + SF];
        cq = xs[(i + SF + CODE_N + 131072) % L] ^ ys[(i + SF + 131072) % L];
        dr = (tx_bits[s] & 1) ? -0.25 : 0.25;
        di = (tx_bits[s] & 2) ? -0.25 : 0.25;
        if (tx_q16[s]) begin
          if (!(tx_bits[s] & 4)) dr = dr / 3.0;   // inner level
          if (!(tx_bits[s] & 8)) di = di / 3.0;
        end
        sp = spread[k] ? -1.0 : 1.0;
        cr = ci ? -1.0 : 1.0; cim = cq ? -1.0 : 1.0;
        repeat (2) begin
          u_re.push_back(sp * (dr * cr - di * cim));
          u_im.push_back(sp * (dr * cim + di * cr));
        end
      end
    end
    // received samples, one every 3 clocks; switch to two fingers after about 30 symbols
    for (int n = 0; n < u_re.size() + 2 * SF + 40; n++) begin
      real rr, ri;
      rr = 0; ri = 0;
      for (int p = 0; p < 4; p++) begin
        int m;
        m = n - d_path[p];
        if (m >= 0 && m < u_re.size()) begin
          rr += g_re[p] * u_re[m] - g_im[p] * u_im[m];
          ri += g_re[p] * u_im[m] + g_im[p] * u_re[m];
        end
      end
      if (n == 2 * SF * 30) w_four_fingers = 0;
      @(negedge clk); w_in_valid = 1; w_in_re = 16'(q15r(rr)); w_in_im = 16'(q15r(ri));
      @(negedge clk); w_in_valid = 0;
      @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk(rx_sym >= NSYM + 1, "all W-CDMA symbols received");
    // overrun: samples on every clock
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); w_in_valid = 1;
    end
    @(negedge clk); w_in_valid = 0;
    w_done = 1;
  endtask

  // ================================================================ HiperLAN/2
  localparam real A = 0.016;                 // time-domain scale
  localparam real WOFF = 6.283185307 * 0.004;
  int dbin [48];
  real ch_re [64], ch_im [64];
  int h_exp[$];
  int h_nbits_exp[$];
  int h_got = 0, h_bad = 0;
  bit h_done = 0;
  bit h_check = 1;      // cleared for the unrecorded overrun symbols
  int abs_n = 0;

  function automatic real lvl(int b, int m);
    real norm;
    norm = (b == 1) ? 1.4142 : 3.1623;
    return (2.0 * m - (1 << b) + 1) / norm;
  endfunction
  function automatic int gray(int m);
    return m ^ (m >> 1);
  endfunction

  always @(posedge clk) if (rst_n && h_out_valid && h_check) begin
    int e, nb;
    checks++;
    e = (h_exp.size() > 0) ? h_exp.pop_front() : -1;
    nb = (h_nbits_exp.size() > 0) ? h_nbits_exp.pop_front() : -1;
    if (int'(h_out_bits) != e || int'(h_out_nbits) != nb) begin
      failures++; h_bad++;
      if (h_bad < 6) $display("FAIL OFDM carrier %0d bits %b exp %b", h_got % 48, h_out_bits, 6'(e));
    end
    if (nb == 2) n_qpsk++; else n_qam16++;
    h_got++;
  end

  task automatic load_lut(int b);
    for (int i = -32; i < 32; i++) begin
      real v, best;
      int bm;
      v = (i + 0.5) / 32.0;
      best = 10.0; bm = 0;
      for (int m = 0; m < (1 << b); m++) begin
        real dd;
        dd = v - lvl(b, m);
        if (dd < 0) dd = -dd;
        if (dd < best) begin best = dd; bm = m; end
      end
      @(negedge clk); h_lut_we = 1; h_lut_idx = 6'(i); h_lut_val = 3'(gray(bm));
    end
    @(negedge clk); h_lut_we = 0; h_bits_per_axis = 2'(b);
  endtask

  // one OFDM symbol: 80 samples, one every `gap` clocks
  task automatic ofdm_symbol(int b, int gap, bit record);
    real xr [64], xi [64], tr [64], ti [64];
    for (int k = 0; k < 64; k++) begin xr[k] = 0; xi[k] = 0; end
    xr[43] = 1.0; xr[57] = 1.0; xr[7] = 1.0; xr[21] = -1.0;   // pilots, reference 1,1,1,-1
    for (int d = 0; d < 48; d++) begin
      int mi, mq;
      mi = $urandom_range(0, (1 << b) - 1); mq = $urandom_range(0, (1 << b) - 1);
      xr[dbin[d]] = lvl(b, mi); xi[dbin[d]] = lvl(b, mq);
      if (record) begin
        h_exp.push_back((gray(mq) << b) | gray(mi));
        h_nbits_exp.push_back(2 * b);
      end
    end
    // channel, then inverse DFT scaled by A
    for (int n = 0; n < 64; n++) begin
      tr[n] = 0; ti[n] = 0;
      for (int k = 0; k < 64; k++) begin
        real yr, yi, a;
        yr = ch_re[k] * xr[k] - ch_im[k] * xi[k];
        yi = ch_re[k] * xi[k] + ch_im[k] * xr[k];
        a = 6.283185307179586 * k * n / 64.0;
        tr[n] += A * (yr * $cos(a) - yi * $sin(a));
        ti[n] += A * (yr * $sin(a) + yi * $cos(a));
      end
    end
    for (int m = 0; m < 80; m++) begin
      int n;
      real rr, ri, ph;
      n = (m < 16) ? m + 48 : m - 16;      // cyclic prefix
      ph = WOFF * abs_n;
      rr = tr[n] * $cos(ph) - ti[n] * $sin(ph);
      ri = tr[n] * $sin(ph) + ti[n] * $cos(ph);
      abs_n++;
      @(negedge clk); h_in_valid = 1; h_sym_start = (m == 0);
      h_in_re = 16'(q15r(rr)); h_in_im = 16'(q15r(ri));
      if (gap > 1) begin
        @(negedge clk); h_in_valid = 0; h_sym_start = 0;
        repeat (gap - 2) @(negedge clk);
      end
    end
    @(negedge clk); h_in_valid = 0; h_sym_start = 0;
  endtask

  task automatic hl2_run();
    int d;
    d = 0;
    for (int sc = -26; sc <= 26; sc++)
      if (sc != 0 && sc != 7 && sc != -7 && sc != 21 && sc != -21) begin
        dbin[d] = (sc + 64) % 64; d++;
      end
    for (int k = 0; k < 64; k++) begin
      real m, a, c;
      m = 1.1 + 0.2 * ($urandom_range(0, 1000) / 1000.0);
      a = 6.283185307 * ($urandom_range(0, 1000) / 1000.0);
      ch_re[k] = m * $cos(a); ch_im[k] = m * $sin(a);
      // equalizer coefficient 1 / (32 * A * H), written in Q2.14
      c = 1.0 / (32.0 * A * m * m);
      @(negedge clk); h_eq_we = 1; h_eq_idx = 6'(k);
      h_eq_re = 16'(q15r(0.5 * c * ch_re[k])); h_eq_im = 16'(q15r(-0.5 * c * ch_im[k]));
      h_foc_we = 1; h_foc_idx = 6'(k);
      h_foc_re = 16'(q15r(0.99997 * $cos(WOFF * k))); h_foc_im = 16'(q15r(-0.99997 * $sin(WOFF * k)));
    end
    @(negedge clk); h_eq_we = 0; h_foc_we = 0;
    load_lut(1);
    for (int s = 0; s < 4; s++) ofdm_symbol(1, 5, 1);
    repeat (500) @(negedge clk);
    load_lut(2);
    for (int s = 0; s < 4; s++) ofdm_symbol(2, 5, 1);
    repeat (500) @(negedge clk);
    chk(h_got == 8 * 48 && h_exp.size() == 0, "all OFDM carriers received");
    // overrun: three symbols back to back at one sample per clock; the FFT has two banks
    h_check = 0;
    ofdm_symbol(1, 1, 0);
    ofdm_symbol(1, 1, 0);
    ofdm_symbol(1, 1, 0);
    repeat (600) @(negedge clk);
    h_done = 1;
  endtask

  // ================================================================ MONTIUM tile
  bit t_done = 0;
  int t_exp[$];
  always @(posedge clk) if (rst_n && mt_out_valid) begin
    int e;
    checks++;
    e = (t_exp.size() > 0) ? t_exp.pop_front() : 99999;
    if (int'(mt_out_data) != e) begin failures++; $display("FAIL tile out %0d exp %0d", mt_out_data, e); end
  end

  task automatic tile_load(cfg_q_t q);
    foreach (q[i]) begin
      @(negedge clk); mt_cfg_valid = 1; mt_cfg_addr = q[i].addr; mt_cfg_data = q[i].data;
    end
    @(negedge clk); mt_cfg_addr = {1'b0, RG_CCU, 8'd0, 4'd4};
    @(negedge clk); mt_cfg_valid = 0;
  endtask

  task automatic tile_run();
    int data [];
    mt_in_data = '0;
    tile_load(dot2_stream(20));
    for (int i = 0; i < 20; i++) begin
      int a0, c0, a1, c1;
      a0 = $urandom_range(0, 65535) - 32768; c0 = $urandom_range(0, 65535) - 32768;
      a1 = $urandom_range(0, 65535) - 32768; c1 = $urandom_range(0, 65535) - 32768;
      t_exp.push_back(sat16(q15(a0, c0) + sat16(q15(a1, c1))));
      if (i % 5 == 2) repeat (4) @(negedge clk);
      mt_in_valid = 1;
      mt_in_data[0] = 16'(a0); mt_in_data[1] = 16'(c0); mt_in_data[2] = 16'(a1); mt_in_data[3] = 16'(c1);
      do @(posedge clk); while (!mt_in_ready);
      @(negedge clk); mt_in_valid = 0;
    end
    while (mt_busy) @(negedge clk);
    data = new[16];
    foreach (data[i]) begin
      data[i] = $urandom_range(0, 20000) - 10000;
      t_exp.push_back(2 * data[i]);
    end
    tile_load(double_block(16, data));
    @(negedge clk);
    while (mt_busy) @(negedge clk);
    chk(t_exp.size() == 0, "all tile outputs");
    t_done = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    fork
      wcdma_run();
      hl2_run();
      tile_run();
    join
    $display("W-CDMA 16-QAM symbols=%0d", n_w_qam16);
    $display("mechanisms: rake_stall=%0d sym4=%0d sym2=%0d wcdma_overrun=%0d ofdm_overrun=%0d fft=%0d qpsk=%0d qam16=%0d tile_stall=%0d block_words=%0d",
             n_rake_stall, n_sym4, n_sym2, n_w_ovr, n_h_ovr, n_fft, n_qpsk, n_qam16, n_tile_stall, n_block_words);
    chk(n_rake_stall > 0, "RAKE stall happened");
    chk(n_sym4 > 0, "4-finger symbols");
    chk(n_sym2 > 0, "2-finger symbols");
    chk(n_w_qam16 > 0, "W-CDMA 16-QAM symbols");
    chk(n_w_ovr > 0, "W-CDMA overrun happened");
    chk(n_h_ovr > 0, "OFDM overrun happened");
    chk(n_fft >= 8, "FFT runs");
    chk(n_qpsk > 0 && n_qam16 > 0, "QPSK and 16-QAM de-mapping");
    chk(n_tile_stall > 0, "tile stall happened");
    chk(n_block_words == 16, "tile block read-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
