// cmul: signed complex multiplier in Q1.15, purely combinational.
//
// p = a * b, or a * conj(b) when conj_b is set. The four real products are formed at full
// width, combined, rounded to nearest and shifted back to Q1.15, and the result saturates to
// the 16-bit range. It is the complex multiplication the receivers share (frequency offset
// correction, FFT butterflies, equalizer, phase correction, RAKE combining); on the MONTIUM it
// is built from the multipliers and East-West adders of neighbouring ALUs. Rounding and
// saturation are this design's choice.
module cmul #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  input  logic                conj_b,
  output logic signed [W-1:0] p_re,
  output logic signed [W-1:0] p_im
);

  localparam int unsigned PW = 2 * W + 1;

  function automatic logic signed [W-1:0] sat_round(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (W - 2))) >>> (W - 1);
    if (r > PW'((1 << (W - 1)) - 1))     sat_round = {1'b0, {(W-1){1'b1}}};
    else if (r < -PW'((1 << (W - 1))))   sat_round = {1'b1, {(W-1){1'b0}}};
    else                                 sat_round = r[W-1:0];
  endfunction

  logic signed [W:0]    bi;         // one bit wider, so conj(-1) is +1
  logic signed [PW-1:0] re, im;

  always_comb begin
    bi   = conj_b ? -(W+1)'(b_im) : (W+1)'(b_im);
    re   = PW'(a_re) * PW'(b_re) - PW'(a_im) * PW'(bi);
    im   = PW'(a_re) * PW'(bi)   + PW'(a_im) * PW'(b_re);
    p_re = sat_round(re);
    p_im = sat_round(im);
  end

endmodule
