// montium_prog_pkg: configuration images for MONTIUM tile testbenches.
//
// Builds the list of (address, data) configuration words that the tile's CCU accepts, one per
// clock, for two small programs:
//  * dot2_stream (streaming mode): for each input set (a0, c0, a1, c1) on the CCU streams 0..3
//    the tile outputs sat(a0*c0 + sat(a1*c1)) in Q1.15. ALU2 forms a1*c1 and hands it over its
//    West output to the East input of ALU1, which adds it to a0*c0: the two-ALU pattern of a
//    complex multiplication's real part.
//  * double_block (block mode): N words preloaded into M01 are read with an AGU, doubled by
//    ALU1 and written to M02, which the CCU then sends out.
// Both loop over N items with the sequencer's counted loop and then halt.
package montium_prog_pkg;
  import montium_pkg::*;

  typedef struct packed {
    logic [15:0] addr;
    logic [15:0] data;
  } cfg_word_t;

  typedef cfg_word_t cfg_q_t [$];

  function automatic void put_wide(ref cfg_q_t q, input cfg_region_e rg, input int entry,
                                   input logic [255:0] bits, input int nbits);
    for (int c = 0; c < (nbits + 15) / 16; c++)
      q.push_back('{addr: {1'b0, rg, 8'(entry), 4'(c)}, data: bits[c*16 +: 16]});
  endfunction

  function automatic void put_instr(ref cfg_q_t q, input int a, input seq_instr_t ins);
    put_wide(q, RG_SEQ, a, 256'(ins), $bits(seq_instr_t));
  endfunction

  function automatic void put_ccu(ref cfg_q_t q, input int chunk, input int val);
    q.push_back('{addr: {1'b0, RG_CCU, 8'd0, 4'(chunk)}, data: 16'(val)});
  endfunction

  function automatic seq_instr_t ins(sq_op_e op, int tgt, int cnt, bit ui, bit oe, int ob,
                                     int mi, int xi, int ri, int ai);
    seq_instr_t i;
    i = '0;
    i.op = op; i.target = 8'(tgt); i.count = 8'(cnt); i.use_in = ui; i.out_en = oe;
    i.out_bus = 4'(ob); i.mem_idx = 5'(mi); i.xbar_idx = 5'(xi); i.reg_idx = 5'(ri);
    i.alu_idx = 5'(ai);
    return i;
  endfunction

  function automatic alu_cfg_t mac_cfg(add_src_e src);
    alu_cfg_t c;
    c = '0;
    c.fu1 = FU_PASS_X; c.fu2 = FU_PASS_X; c.fu3 = FU_PASS_X; c.fu4 = FU_PASS_Y;
    c.mul_en = 1'b1; c.mul_q15 = 1'b1; c.add_src = src; c.sat = 1'b1; c.out2_sel = O2_MUL;
    return c;
  endfunction

  function automatic cfg_q_t dot2_stream(int n);
    cfg_q_t     q;
    xbar_word_t xw;
    reg_word_t  rw;
    alu_word_t  aw;
    for (int b = 0; b < N_BUS; b++) xw[b] = SRC_IDLE;
    xw[0] = SRC_CCU0;     xw[1] = SRC_CCU0 + 5'd1;
    xw[2] = SRC_CCU0 + 5'd2; xw[3] = SRC_CCU0 + 5'd3;
    xw[4] = SRC_ALU0;     // ALU1 out_1
    rw = '0;
    rw[0] = '{we: 1'b1, waddr: 2'd0, src: 4'd0, raddr: 2'd0};  // ALU1 A
    rw[2] = '{we: 1'b1, waddr: 2'd0, src: 4'd1, raddr: 2'd0};  // ALU1 C
    rw[4] = '{we: 1'b1, waddr: 2'd0, src: 4'd2, raddr: 2'd0};  // ALU2 A
    rw[6] = '{we: 1'b1, waddr: 2'd0, src: 4'd3, raddr: 2'd0};  // ALU2 C
    aw = '0;
    aw[0] = mac_cfg(ADD_EAST);
    aw[1] = mac_cfg(ADD_ZERO);
    put_wide(q, RG_XBRD, 1, 256'(xw), $bits(xbar_word_t));
    put_wide(q, RG_REGD, 1, 256'(rw), $bits(reg_word_t));
    put_wide(q, RG_ALUD, 1, 256'(aw), $bits(alu_word_t));
    put_instr(q, 0, ins(SQ_NEXT, 0, 0, 1'b1, 1'b0, 0, 0, 1, 1, 1));
    put_instr(q, 1, ins(SQ_LOOP, 0, n, 1'b0, 1'b1, 4, 0, 1, 0, 1));
    put_instr(q, 2, ins(SQ_HALT, 0, 0, 1'b0, 1'b0, 0, 0, 0, 0, 0));
    put_ccu(q, 0, 0);      // streaming mode
    return q;
  endfunction

  function automatic cfg_q_t double_block(int n, int data []);
    cfg_q_t     q;
    xbar_word_t xw;
    reg_word_t  rw;
    mem_word_t  mw2, mw3;
    alu_word_t  aw;
    for (int b = 0; b < N_BUS; b++) xw[b] = SRC_IDLE;
    xw[0] = SRC_MEM0;     // M01
    xw[1] = SRC_ALU0;     // ALU1 out_1
    rw = '0;
    rw[0] = '{we: 1'b1, waddr: 2'd0, src: 4'd0, raddr: 2'd0};
    mw2 = '0;
    mw2[0] = '{we: 1'b0, src: 4'd0, agu: AGU_STEP};
    mw3 = '0;
    mw3[1] = '{we: 1'b1, src: 4'd1, agu: AGU_STEP};
    aw = '0;
    aw[0].fu1 = FU_SHL1; aw[0].fu3 = FU_PASS_X; aw[0].add_src = ADD_ZERO;
    put_wide(q, RG_XBRD, 2, 256'(xw), $bits(xbar_word_t));
    put_wide(q, RG_REGD, 2, 256'(rw), $bits(reg_word_t));
    put_wide(q, RG_MEMD, 2, 256'(mw2), $bits(mem_word_t));
    put_wide(q, RG_MEMD, 3, 256'(mw3), $bits(mem_word_t));
    put_wide(q, RG_ALUD, 2, 256'(aw), $bits(alu_word_t));
    put_instr(q, 0, ins(SQ_NEXT, 0, 0, 1'b0, 1'b0, 0, 2, 2, 2, 2));
    put_instr(q, 1, ins(SQ_LOOP, 0, n, 1'b0, 1'b0, 0, 3, 2, 0, 2));
    put_instr(q, 2, ins(SQ_HALT, 0, 0, 1'b0, 1'b0, 0, 0, 0, 0, 0));
    for (int i = 0; i < n; i++) q.push_back('{addr: 16'h8000 | 16'(i), data: 16'(data[i])});
    // AGU of M02 (memory 1): base 0
    q.push_back('{addr: {1'b0, RG_AGU, 8'd1, 4'd0}, data: 16'd0});
    put_ccu(q, 0, 1);      // block mode
    put_ccu(q, 1, 1);      // read out M02
    put_ccu(q, 2, 0);
    put_ccu(q, 3, n);
    return q;
  endfunction

  // q15 model used by the checks: round toward minus infinity, as the ALU's shift does
  function automatic int q15(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    if (p == 64'sd1073741824) return 32767;
    return int'(p >>> 15);
  endfunction

  function automatic int sat16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

endpackage
