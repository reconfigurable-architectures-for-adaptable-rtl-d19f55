// tb_pulse_shape_fir: loads 16 random taps, streams 600 random complex samples with gaps and
// compares each output with the convolution computed here (round to nearest, saturate).
// Also checks the one-clock latency and a tap reload in the middle of the stream.
module tb_pulse_shape_fir;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cwe = 0, iv = 0, ov;
  logic [3:0] cidx = 0;
  logic signed [15:0] cval = 0, ir = 0, ii = 0, orr, oi;
  int coef [16];
  int hr[$], hi[$];
  int exp_r[$], exp_i[$];

  always #5 clk = ~clk;
  pulse_shape_fir dut (.clk, .rst_n, .coef_we(cwe), .coef_idx(cidx), .coef_val(cval),
    .in_valid(iv), .in_re(ir), .in_im(ii), .out_valid(ov), .out_re(orr), .out_im(oi));

  function automatic int rs(longint v);
    longint r;
    r = (v + 16384) >>> 15;
    return int'((r > 32767) ? 32767 : (r < -32768) ? -32768 : r);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    checks++;
    if (exp_r.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      int er, ei;
      er = exp_r.pop_front(); ei = exp_i.pop_front();
      if (int'(orr) != er || int'(oi) != ei) begin
        failures++; $display("FAIL out (%0d,%0d) exp (%0d,%0d)", orr, oi, er, ei);
      end
    end
  end

  task automatic set_taps(int scale);
    for (int t = 0; t < 16; t++) begin
      coef[t] = $urandom_range(0, 2 * scale) - scale;
      @(negedge clk); cwe = 1; cidx = 4'(t); cval = 16'(coef[t]);
    end
    @(negedge clk); cwe = 0;
  endtask

  initial begin
    for (int t = 0; t < 16; t++) begin hr.push_back(0); hi.push_back(0); end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    set_taps(12000);
    for (int n = 0; n < 600; n++) begin
      longint ar, ai;
      if (n == 300) set_taps(30000);
      @(negedge clk);
      iv = ($urandom_range(0, 3) != 0);
      ir = 16'($urandom); ii = 16'($urandom);
      if (iv) begin
        hr.push_front(int'(ir)); hi.push_front(int'(ii));
        void'(hr.pop_back()); void'(hi.pop_back());
        ar = 0; ai = 0;
        for (int t = 0; t < 16; t++) begin
          ar += longint'(hr[t]) * coef[t];
          ai += longint'(hi[t]) * coef[t];
        end
        exp_r.push_back(rs(ar)); exp_i.push_back(rs(ai));
      end
    end
    @(negedge clk); iv = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_r.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_r.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
