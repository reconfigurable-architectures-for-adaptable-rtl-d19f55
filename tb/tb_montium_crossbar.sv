// tb_montium_crossbar: random source selections for the ten buses against a model of the
// source numbering (memories 0..9, ALU outputs 10..19, CCU streams 20..29, idle otherwise).
module tb_montium_crossbar;
  import montium_pkg::*;
  int checks = 0, failures = 0;
  xbar_word_t sel;
  word_t [9:0] mem_rd, alu_out, ccu_in, bus;

  montium_crossbar dut (.sel, .mem_rd, .alu_out, .ccu_in, .bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 10; k++) begin
        mem_rd[k] = 16'($urandom); alu_out[k] = 16'($urandom); ccu_in[k] = 16'($urandom);
        sel[k] = 5'($urandom);
      end
      #1;
      for (int k = 0; k < 10; k++) begin
        int s;
        word_t e;
        s = int'(sel[k]);
        e = (s < 10) ? mem_rd[s] : (s < 20) ? alu_out[s - 10] : (s < 30) ? ccu_in[s - 20] : '0;
        checks++;
        if (bus[k] != e) begin failures++; $display("FAIL bus %0d sel %0d", k, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
