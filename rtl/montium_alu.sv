// montium_alu: the MONTIUM ALU, purely combinational.
//
// Four 16-bit inputs A..D feed two levels. Level 1 holds four function units: unit 1 works on
// A and B, unit 2 on C and D, and units 3 and 4 each combine the results of units 1 and 2.
// Level 2 holds a multiplier on the results of units 3 and 4 and an adder behind it whose second
// operand can be the East input, coming combinationally from the neighbouring ALU on the right.
// The adder result leaves on out_1 and on out_West (to the left neighbour); out_2 can carry the
// adder, a level-1 result or the raw product. There are no registers inside, so a result is
// available in the cycle its operands are.
//
// The structure (four function units in two rows, multiplier, adder, East/West link, two
// outputs, no pipeline) follows the architecture description. The operation set of the
// function units, the Q1.15 / integer multiply choice and the saturation option are this
// design's choice: the description only says the ALU handles signed integer and signed
// fixed-point arithmetic.
module montium_alu
  import montium_pkg::*;
(
  input  alu_cfg_t cfg,
  input  word_t    in_a,
  input  word_t    in_b,
  input  word_t    in_c,
  input  word_t    in_d,
  input  word_t    in_east,
  output word_t    out_1,
  output word_t    out_2,
  output word_t    out_west
);

  function automatic word_t fu(input fu_op_e op, input word_t x, input word_t y);
    unique case (op)
      FU_PASS_X: fu = x;
      FU_PASS_Y: fu = y;
      FU_ADD:    fu = x + y;
      FU_SUB:    fu = x - y;
      FU_AND:    fu = x & y;
      FU_OR:     fu = x | y;
      FU_XOR:    fu = x ^ y;
      FU_MIN:    fu = (x < y) ? x : y;
      FU_MAX:    fu = (x > y) ? x : y;
      FU_ABS:    fu = (x < 0) ? -x : x;
      FU_NEG:    fu = -x;
      FU_SHR1:   fu = x >>> 1;
      FU_SHL1:   fu = x <<< 1;
      default:   fu = '0;
    endcase
  endfunction

  word_t r1, r2, r3, r4, prod, opnd;
  logic signed [2*DW-1:0] full;
  logic signed [DW:0]     sum;

  always_comb begin
    r1   = fu(cfg.fu1, in_a, in_b);
    r2   = fu(cfg.fu2, in_c, in_d);
    r3   = fu(cfg.fu3, r1, r2);
    r4   = fu(cfg.fu4, r1, r2);
    full = r3 * r4;
    if (!cfg.mul_en)      prod = r3;
    else if (cfg.mul_q15) prod = (full == 32'sh4000_0000) ? word_t'(16'sh7fff) : word_t'(full >>> 15);
    else                  prod = full[DW-1:0];
    unique case (cfg.add_src)
      ADD_ZERO: opnd = '0;
      ADD_EAST: opnd = in_east;
      ADD_FU3:  opnd = r3;
      default:  opnd = r4;
    endcase
    sum = cfg.add_sub ? ({prod[DW-1], prod} - {opnd[DW-1], opnd})
                      : ({prod[DW-1], prod} + {opnd[DW-1], opnd});
    if (cfg.sat && (sum[DW] != sum[DW-1]))
      out_1 = sum[DW] ? word_t'(16'sh8000) : word_t'(16'sh7fff);
    else
      out_1 = sum[DW-1:0];
    out_west = out_1;
    unique case (cfg.out2_sel)
      O2_ADDER: out_2 = out_1;
      O2_FU3:   out_2 = r3;
      O2_FU4:   out_2 = r4;
      default:  out_2 = prod;
    endcase
  end

endmodule
