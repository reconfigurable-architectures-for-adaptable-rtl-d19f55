// hl2_demapper: table-driven hard-decision de-mapper for QPSK, 16-QAM and 64-QAM.
//
// The real and imaginary parts of a corrected carrier (Q1.15) are each cut to their six most
// significant bits, a signed index covering -1..+1 in steps of 1/32, and looked up in a 64-word
// table that returns the bits of the nearest constellation level on that axis (up to 3). Both
// axes share the table. Changing the modulation means only rewriting the table (lut_we) and
// setting bits_per_axis (1 QPSK, 2 16-QAM, 3 64-QAM); no logic changes. Output is registered:
// bits appear one clock after the carrier, packed as {Q bits, I bits} in the low
// 2*bits_per_axis bits of out_bits, with the I bits lowest. out_nbits = 2*bits_per_axis, so its
// bit 0 is always zero; it is kept so the count reads as a plain number. Only the six top bits
// of in_re/in_im address the table; the lower bits are unused by design.
//
// A parametrizable LUT-based hard-decision de-mapper for the three modulations is what the
// document describes; the 6-bit index and the packing are this design's choices.
module hl2_demapper #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                lut_we,
  input  logic [5:0]          lut_idx,     // signed index, two's complement
  input  logic [2:0]          lut_val,
  input  logic [1:0]          bits_per_axis,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [5:0]          out_bits,
  output logic [2:0]          out_nbits
);

  logic [2:0] lut [64];
  logic [2:0] bi, bq;

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_idx] <= lut_val;
  end

  always_comb begin
    bi = lut[in_re[W-1 -: 6]];
    bq = lut[in_im[W-1 -: 6]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_nbits <= '0;
    end else begin
      out_valid <= in_valid;
      out_nbits <= 3'({bits_per_axis, 1'b0});
      unique case (bits_per_axis)
        2'd1:    out_bits <= {4'b0, bq[0], bi[0]};
        2'd2:    out_bits <= {2'b0, bq[1:0], bi[1:0]};
        default: out_bits <= {bq, bi};
      endcase
    end
  end

endmodule
