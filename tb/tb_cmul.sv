// tb_cmul: checks the Q1.15 complex multiplier against a real-number reference (within one
// LSB) and bit-exactly against an integer model of round-half-up and saturation, including the
// conjugate mode and saturation at -1 * -1.
module tb_cmul;
  int checks = 0, failures = 0;
  logic signed [15:0] ar, ai, br, bi, pr, pi;
  logic cj;

  cmul dut (.a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .conj_b(cj), .p_re(pr), .p_im(pi));

  function automatic int expq(real v);
    v = v * 32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic int exact(longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic check_one();
    real xr, xi, yr, yi, er, ei;
    int  dr, di, ibi;
    xr = ar / 32768.0; xi = ai / 32768.0; yr = br / 32768.0; ibi = bi; if (cj) ibi = -ibi; yi = ibi / 32768.0;
    er = xr * yr - xi * yi;
    ei = xr * yi + xi * yr;
    #1;
    dr = int'(pr) - expq(er);
    di = int'(pi) - expq(ei);
    checks++;
    if (dr > 1 || dr < -1 || di > 1 || di < -1) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) conj=%0d got (%0d,%0d) exp (%0d,%0d)",
               ar, ai, br, bi, cj, pr, pi, expq(er), expq(ei));
    end
    begin
      longint vr, vi, bb;
      bb = cj ? -longint'(bi) : longint'(bi);
      vr = longint'(ar) * longint'(br) - longint'(ai) * bb;
      vi = longint'(ar) * bb + longint'(ai) * longint'(br);
      checks++;
      if (int'(pr) != exact(vr) || int'(pi) != exact(vi)) begin
        failures++;
        $display("FAIL rounding a=(%0d,%0d) b=(%0d,%0d) got (%0d,%0d)", ar, ai, br, bi, pr, pi);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ar = -16'sd32768; ai = 0; br = -16'sd32768; bi = 0; cj = 0;
    check_one();                           // saturates to +32767
    ar = 16384; ai = 16384; br = 0; bi = 32767; cj = 1;
    check_one();
    for (int i = 0; i < 2000; i++) begin
      ar = 16'($urandom); ai = 16'($urandom); br = 16'($urandom); bi = 16'($urandom);
      cj = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
