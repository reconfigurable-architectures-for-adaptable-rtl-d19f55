// pulse_shape_fir: complex-input FIR filter with real coefficients (receive pulse shaping).
//
// Direct form: a delay line of NTAPS complex samples; each accepted sample (in_valid) shifts
// the line and, one clock later, produces one filtered output (out_valid), so the filter
// keeps pace with one sample per clock. Coefficients are signed Q1.15, written one at a time
// through coef_we/coef_idx/coef_val (by the controlling processor) and applied to both I and Q.
// Sums are kept at full width, rounded and saturated to 16 bits.
//
// The document implements the pulse shape filter as a FIR filter on one tile and gives no tap
// count or coefficients; the 16-tap default, the loadable coefficients and the direct-form
// structure are this design's choices (the matched filter's root-raised-cosine taps are loaded
// at run time).
module pulse_shape_fir #(
  parameter int unsigned NTAPS = 16,
  parameter int unsigned W     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [$clog2(NTAPS)-1:0]  coef_idx,
  input  logic signed [W-1:0]       coef_val,
  input  logic                      in_valid,
  input  logic signed [W-1:0]       in_re,
  input  logic signed [W-1:0]       in_im,
  output logic                      out_valid,
  output logic signed [W-1:0]       out_re,
  output logic signed [W-1:0]       out_im
);

  localparam int unsigned AW = 2 * W + $clog2(NTAPS) + 1;

  logic signed [W-1:0] coef [NTAPS];
  logic signed [W-1:0] dl_re [NTAPS];
  logic signed [W-1:0] dl_im [NTAPS];
  logic signed [AW-1:0] acc_re, acc_im;

  function automatic logic signed [W-1:0] sat_round(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] r;
    r = (v + (AW'(1) <<< (W - 2))) >>> (W - 1);
    if (r > AW'((1 << (W - 1)) - 1))    return {1'b0, {(W-1){1'b1}}};
    else if (r < -AW'(1 << (W - 1)))    return {1'b1, {(W-1){1'b0}}};
    else                                return r[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NTAPS; t++) begin
        coef[t]  <= '0;
        dl_re[t] <= '0;
        dl_im[t] <= '0;
      end
    end else begin
      if (coef_we) coef[coef_idx] <= coef_val;
      if (in_valid) begin
        dl_re[0] <= in_re;
        dl_im[0] <= in_im;
        for (int t = 1; t < NTAPS; t++) begin
          dl_re[t] <= dl_re[t-1];
          dl_im[t] <= dl_im[t-1];
        end
      end
    end
  end

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int t = 0; t < NTAPS; t++) begin
      acc_re = acc_re + AW'(dl_re[t] * coef[t]);
      acc_im = acc_im + AW'(dl_im[t] * coef[t]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
  end

  assign out_re = sat_round(acc_re);
  assign out_im = sat_round(acc_im);

endmodule
