// tb_montium_alu: drives random operands and configurations through the MONTIUM ALU and
// compares out_1, out_2 and out_West with a reference model written independently here.
module tb_montium_alu;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  alu_cfg_t cfg;
  word_t a, b, c, d, e, o1, o2, ow;

  montium_alu dut (.cfg, .in_a(a), .in_b(b), .in_c(c), .in_d(d), .in_east(e),
                   .out_1(o1), .out_2(o2), .out_west(ow));

  function automatic int f(int op, int x, int y);
    int r;
    case (op)
      0: r = x;       1: r = y;       2: r = x + y;   3: r = x - y;
      4: r = x & y;   5: r = x | y;   6: r = x ^ y;
      7: r = (x < y) ? x : y;         8: r = (x > y) ? x : y;
      9: r = (x < 0) ? -x : x;        10: r = -x;     11: r = 0;
      12: r = x >>> 1;                13: r = x * 2;
      default: r = 0;
    endcase
    r = r & 16'hffff;
    return (r >= 32768) ? r - 65536 : r;
  endfunction

  function automatic int wrap16(longint v);
    longint r;
    r = v & 64'hffff;
    return int'((r >= 32768) ? r - 65536 : r);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r1, r2, r3, r4, p, s, q, x, o2e;
    longint full;
    for (int i = 0; i < 5000; i++) begin
      cfg = alu_cfg_t'($urandom);
      cfg.fu1 = fu_op_e'($urandom_range(0, 13));
      cfg.fu2 = fu_op_e'($urandom_range(0, 13));
      cfg.fu3 = fu_op_e'($urandom_range(0, 13));
      cfg.fu4 = fu_op_e'($urandom_range(0, 13));
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      e = 16'($urandom);
      if (i % 3 == 0) begin a = 16'($urandom_range(0, 200)); b = 16'($urandom_range(0, 200)); end
      #1;
      r1 = f(cfg.fu1, a, b);
      r2 = f(cfg.fu2, c, d);
      r3 = f(cfg.fu3, r1, r2);
      r4 = f(cfg.fu4, r1, r2);
      full = longint'(r3) * longint'(r4);
      if (!cfg.mul_en) p = r3;
      else if (cfg.mul_q15) p = (full == 64'sd1073741824) ? 32767 : wrap16(full >>> 15);
      else p = wrap16(full);
      case (cfg.add_src)
        ADD_ZERO: q = 0;
        ADD_EAST: q = e;
        ADD_FU3:  q = r3;
        default:  q = r4;
      endcase
      s = cfg.add_sub ? p - q : p + q;
      if (cfg.sat) x = (s > 32767) ? 32767 : (s < -32768) ? -32768 : s;
      else x = wrap16(s);
      case (cfg.out2_sel)
        O2_ADDER: o2e = x;
        O2_FU3:   o2e = r3;
        O2_FU4:   o2e = r4;
        default:  o2e = p;
      endcase
      checks++;
      if (int'(o1) != x || int'(ow) != x || int'(o2) != o2e) begin
        failures++;
        if (failures < 10)
          $display("FAIL cfg=%h a=%0d b=%0d c=%0d d=%0d e=%0d got %0d/%0d/%0d exp %0d/%0d",
                   cfg, a, b, c, d, e, o1, o2, ow, x, o2e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
