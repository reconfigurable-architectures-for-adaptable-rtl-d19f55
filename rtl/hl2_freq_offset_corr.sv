// hl2_freq_offset_corr: frequency offset correction of OFDM symbols (second HiperLAN/2 tile).
//
// Each sample n (0..NFFT-1) of a symbol is multiplied by correction coefficient n, a unit
// phasor exp(-j*2*pi*df*n/fs) that the controlling processor computes from the preamble once
// per MAC frame and writes into the coefficient table (coef_we/coef_idx). The phase step the
// prefix adds between symbols is common to all carriers of a symbol and is removed later by the
// pilot-based phase correction. Three pipeline stages (table read, complex multiply, round and
// register): the last of 64 samples leaves 67 clocks after the first one entered, matching the
// 67-cycle correction of one symbol the document reports for its tile. in_first marks sample 0
// and restarts the index.
//
// Multiplying every sample by the correction factor is the document's; holding one factor per
// sample position in a table is this design's reading of it.
module hl2_freq_offset_corr #(
  parameter int unsigned NFFT = 64,
  parameter int unsigned W    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [$clog2(NFFT)-1:0]   coef_idx,
  input  logic signed [W-1:0]       coef_re,
  input  logic signed [W-1:0]       coef_im,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic signed [W-1:0]       in_re,
  input  logic signed [W-1:0]       in_im,
  output logic                      out_valid,
  output logic                      out_first,
  output logic signed [W-1:0]       out_re,
  output logic signed [W-1:0]       out_im
);

  localparam int unsigned AW = $clog2(NFFT);

  logic signed [W-1:0] tab_re [NFFT];
  logic signed [W-1:0] tab_im [NFFT];
  logic [AW-1:0]       idx;

  // stage 1
  logic                v1, f1;
  logic signed [W-1:0] x1_re, x1_im, c1_re, c1_im;
  // stage 2
  logic                v2, f2;
  logic signed [W-1:0] p_re, p_im, p2_re, p2_im;

  always_ff @(posedge clk) begin
    if (coef_we) begin
      tab_re[coef_idx] <= coef_re;
      tab_im[coef_idx] <= coef_im;
    end
  end

  cmul #(.W(W)) u_mul (
    .a_re (x1_re), .a_im (x1_im), .b_re (c1_re), .b_im (c1_im), .conj_b (1'b0),
    .p_re, .p_im
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx <= '0;
      {v1, f1, v2, f2, out_valid, out_first} <= '0;
      {x1_re, x1_im, c1_re, c1_im, p2_re, p2_im, out_re, out_im} <= '0;
    end else begin
      v1 <= in_valid;
      f1 <= in_valid && in_first;
      if (in_valid) begin
        logic [AW-1:0] n;
        n     = in_first ? '0 : idx;
        idx   <= n + 1'b1;
        x1_re <= in_re;
        x1_im <= in_im;
        c1_re <= tab_re[n];
        c1_im <= tab_im[n];
      end
      v2    <= v1;
      f2    <= f1;
      p2_re <= p_re;
      p2_im <= p_im;
      out_valid <= v2;
      out_first <= f2;
      out_re    <= p2_re;
      out_im    <= p2_im;
    end
  end

endmodule
