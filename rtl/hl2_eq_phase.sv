// hl2_eq_phase: equalizer and pilot-based phase offset correction (fourth HiperLAN/2 tile).
//
// Works on one OFDM symbol at a time, given as the 64 FFT bins in natural order (bin k is
// subcarrier k for k < 32 and k-64 above). Three phases:
//  1. Equalize (64 clocks, one bin per in_valid): every bin is multiplied by its equalizer
//     coefficient from a table the controlling processor writes once per MAC frame
//     (coef_we/coef_idx). The equalized bins are stored; the four pilots (subcarriers -21, -7,
//     7, 21) are summed after multiplying each by its known +-1 value (pilot_ref, bit 1 = -1,
//     order -21, -7, 7, 21). The sum points in the direction of the symbol's common phase
//     error theta.
//  2. Correction factor (17 clocks): a CORDIC in vectoring mode turns the pilot sum onto the
//     real axis (a quadrant step, then 16 micro-rotations) and applies the same rotations to a
//     reference vector, which ends as exp(-j*theta) in Q1.15.
//  3. Correct (48 clocks): the 48 data carriers, from subcarrier -26 upward without DC and the
//     pilots, are multiplied by that factor and sent out (out_valid, out_idx 0..47, out_last).
// Equalization and phase correction use the same complex multiplier, as on the MONTIUM tile.
// Because the FFT in front divides by 64, each bin is first multiplied by 2^PRESHIFT (default
// 32, saturating), so the equalizer gain is the coefficient times 2^PRESHIFT. The coefficient
// has COEF_INT integer bits (default 1: Q2.14, range -2..2), so the product is shifted left
// by COEF_INT (saturating); this lets the equalizer also attenuate strong carriers without the
// pre-shift clipping them.
// Timing: the last corrected carrier leaves 64 + 17 + 48 + 1 clocks after the first bin enters.
//
// Equalizing by coefficients from the processor, estimating the phase error per symbol from the
// equalized pilots and correcting it by a complex multiplication follow the document. The
// subcarrier plan (52 used, 4 pilots at +-7 and +-21) is the HiperLAN/2 standard's; the CORDIC
// computation of the factor is this design's choice.
module hl2_eq_phase #(
  parameter int unsigned W        = 16,
  parameter int unsigned PRESHIFT = 5,    // bins are multiplied by 2^PRESHIFT before equalizing
  parameter int unsigned COEF_INT = 1     // integer bits of the equalizer coefficient beyond Q1.15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                coef_we,
  input  logic [5:0]          coef_idx,
  input  logic signed [W-1:0] coef_re,
  input  logic signed [W-1:0] coef_im,
  input  logic [3:0]          pilot_ref,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                in_ready,
  output logic                out_valid,
  output logic [5:0]          out_idx,
  output logic                out_last,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned N     = 64;
  localparam int unsigned ND    = 48;
  localparam int unsigned CW    = W + 8;        // CORDIC width
  localparam int unsigned ITERS = 16;
  localparam int signed   U0    = 19897;        // 32767 / 1.6468 (CORDIC gain of 16 steps)

  typedef logic [5:0] bins_t [ND];

  // bins of the data carriers, subcarrier -26 .. 26 without 0, +-7, +-21
  function automatic bins_t mk_bins();
    bins_t b;
    int    d;
    d = 0;
    for (int sc = -26; sc <= 26; sc++) begin
      if (sc != 0 && sc != 7 && sc != -7 && sc != 21 && sc != -21) begin
        b[d] = 6'((sc + N) % N);
        d++;
      end
    end
    return b;
  endfunction

  localparam bins_t DBIN = mk_bins();

  typedef enum logic [1:0] {S_EQ, S_ROT, S_COR} state_e;
  state_e state;

  logic signed [W-1:0]  tab_re [N];
  logic signed [W-1:0]  tab_im [N];
  logic signed [W-1:0]  eq_re [N];
  logic signed [W-1:0]  eq_im [N];
  logic [5:0]           cnt;
  logic [4:0]           it;
  logic signed [CW-1:0] vx, vy, ux, uy;
  logic signed [W-1:0]  f_re, f_im;

  logic signed [W-1:0] ma_re, ma_im, mb_re, mb_im, mp_re, mp_im;

  cmul #(.W(W)) u_mul (
    .a_re (ma_re), .a_im (ma_im), .b_re (mb_re), .b_im (mb_im), .conj_b (1'b0),
    .p_re (mp_re), .p_im (mp_im)
  );

  function automatic logic signed [W-1:0] pre(input logic signed [W-1:0] x);
    logic signed [W+PRESHIFT-1:0] v;
    v = (W+PRESHIFT)'(x) <<< PRESHIFT;
    if (v > (W+PRESHIFT)'((1 << (W - 1)) - 1))   return {1'b0, {(W-1){1'b1}}};
    else if (v < -(W+PRESHIFT)'(1 << (W - 1)))   return {1'b1, {(W-1){1'b0}}};
    else                                         return v[W-1:0];
  endfunction

  function automatic logic signed [W-1:0] post(input logic signed [W-1:0] x);
    logic signed [W+COEF_INT-1:0] v;
    v = (W+COEF_INT)'(x) <<< COEF_INT;
    if (v > (W+COEF_INT)'((1 << (W - 1)) - 1))   return {1'b0, {(W-1){1'b1}}};
    else if (v < -(W+COEF_INT)'(1 << (W - 1)))   return {1'b1, {(W-1){1'b0}}};
    else                                         return v[W-1:0];
  endfunction

  logic signed [W-1:0] qe_re, qe_im;    // equalized bin
  assign qe_re = post(mp_re);
  assign qe_im = post(mp_im);

  logic [5:0] bin_in;
  assign bin_in = in_first ? 6'd0 : cnt;

  always_comb begin
    if (state == S_COR) begin
      ma_re = eq_re[DBIN[cnt]]; ma_im = eq_im[DBIN[cnt]];
      mb_re = f_re;             mb_im = f_im;
    end else begin
      ma_re = pre(in_re);       ma_im = pre(in_im);
      mb_re = tab_re[bin_in];   mb_im = tab_im[bin_in];
    end
  end

  assign in_ready = (state == S_EQ);

  always_ff @(posedge clk) begin
    if (coef_we) begin
      tab_re[coef_idx] <= coef_re;
      tab_im[coef_idx] <= coef_im;
    end
  end

  function automatic logic pilot_sign(input logic [5:0] k, input logic [3:0] r);
    unique case (k)
      6'd43:   return r[0];   // -21
      6'd57:   return r[1];   // -7
      6'd7:    return r[2];
      default: return r[3];   // 21
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_EQ;
      cnt       <= '0;
      it        <= '0;
      {vx, vy, ux, uy} <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_EQ: if (in_valid) begin
          eq_re[bin_in] <= qe_re;
          eq_im[bin_in] <= qe_im;
          if (bin_in == 6'd0) begin
            vx <= '0;
            vy <= '0;
          end
          if (bin_in == 6'd7 || bin_in == 6'd21 || bin_in == 6'd43 || bin_in == 6'd57) begin
            logic signed [CW-1:0] px, py;
            px = CW'(qe_re);
            py = CW'(qe_im);
            if (pilot_sign(bin_in, pilot_ref)) begin
              px = -px; py = -py;
            end
            vx <= (bin_in == 6'd0 ? '0 : vx) + px;
            vy <= (bin_in == 6'd0 ? '0 : vy) + py;
          end
          cnt <= bin_in + 1'b1;
          if (bin_in == 6'd63) begin
            state <= S_ROT;
            it    <= '0;
            cnt   <= '0;
          end
        end
        S_ROT: begin
          if (it == 5'd0) begin
            // quadrant step: bring the vector into the right half-plane
            if (vx < 0) begin
              if (vy >= 0) begin
                vx <= vy;  vy <= -vx;
                ux <= '0;  uy <= -CW'(U0);
              end else begin
                vx <= -vy; vy <= vx;
                ux <= '0;  uy <= CW'(U0);
              end
            end else begin
              ux <= CW'(U0);
              uy <= '0;
            end
            it <= 5'd1;
          end else if (it <= 5'(ITERS)) begin
            logic [4:0] sh;
            sh = it - 1'b1;
            if (vy >= 0) begin
              vx <= vx + (vy >>> sh); vy <= vy - (vx >>> sh);
              ux <= ux + (uy >>> sh); uy <= uy - (ux >>> sh);
            end else begin
              vx <= vx - (vy >>> sh); vy <= vy + (vx >>> sh);
              ux <= ux - (uy >>> sh); uy <= uy + (ux >>> sh);
            end
            it <= it + 1'b1;
            if (it == 5'(ITERS)) state <= S_COR;
          end
        end
        default: begin  // S_COR
          out_valid <= 1'b1;
          out_idx   <= cnt;
          out_re    <= mp_re;
          out_im    <= mp_im;
          out_last  <= (cnt == 6'(ND - 1));
          cnt       <= cnt + 1'b1;
          if (cnt == 6'(ND - 1)) begin
            state <= S_EQ;
            cnt   <= '0;
          end
        end
      endcase
    end
  end

  // the correction factor follows the CORDIC reference vector, saturated to Q1.15
  always_comb begin
    f_re = (ux > CW'(32767)) ? W'(32767) : (ux < -CW'(32768)) ? W'(-32768) : ux[W-1:0];
    f_im = (uy > CW'(32767)) ? W'(32767) : (uy < -CW'(32768)) ? W'(-32768) : uy[W-1:0];
  end

endmodule
