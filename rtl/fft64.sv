// fft64: 64-point radix-2 FFT, the inverse-OFDM step of the HiperLAN/2 receiver (third tile).
//
// Two buffer banks of 64 complex words. Load: 64 complex samples are accepted (in_valid, at
// most one per clock, in_first on sample 0) and stored at bit-reversed addresses of the load
// bank. When a bank is full and the transform engine is free, the banks swap: the engine works
// on the full bank while the next symbol loads into the other one, so a symbol may stream in at
// any rate while the previous one is transformed. in_ready falls only when the load bank is
// full and the engine still holds the other one. Compute: six decimation-in-time stages of 32
// butterflies each, one butterfly issued per clock through a three-step pipeline (read the
// pair and twiddle, multiply the lower input by the twiddle, add/subtract and write back). Each
// stage waits two clocks for its pipeline to drain, so a stage takes 34 clocks and the whole
// transform 6 x 34 = 204 clocks, the cycle count the document gives for its 64-point FFT.
// Every butterfly halves its outputs, so the result is the DFT divided by 64, which cannot
// overflow. Output: the 64 bins leave in natural order, one per clock (out_valid, out_first on
// bin 0).
//
// Twiddles W^k = exp(-j*2*pi*k/64), k = 0..31, are computed at elaboration in Q1.15. The FFT
// size, its role and the 204-cycle budget are the document's; the radix-2 in-place
// organisation, the scaling and the double buffer are this design's.
module fft64 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                in_ready,
  output logic                busy,          // computing
  output logic                out_valid,
  output logic                out_first,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned N = 64;

  typedef logic signed [W-1:0] tw_t [N/2];

  function automatic tw_t mk_tw(input bit is_sin);
    tw_t   t;
    real   ang, v;
    for (int k = 0; k < N / 2; k++) begin
      ang = 6.283185307179586 * k / N;
      v   = is_sin ? -$sin(ang) : $cos(ang);
      v   = v * 32768.0;
      if (v > 32767.0) v = 32767.0;
      t[k] = W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_t TW_RE = mk_tw(1'b0);
  localparam tw_t TW_IM = mk_tw(1'b1);

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_OUT} state_e;
  state_e state;

  logic signed [W-1:0] buf_re [2*N];   // {bank, index}
  logic signed [W-1:0] buf_im [2*N];
  logic [5:0]          cnt;        // butterfly index within a stage, output index
  logic [2:0]          stage;
  logic                cbank;      // bank of the transform engine
  logic                lbank;      // bank being loaded
  logic [5:0]          lcnt;       // load index
  logic                lfull;      // load bank holds a complete symbol

  // butterfly addressing
  logic [5:0] top, bot;
  logic [4:0] twi;
  logic       issue;

  always_comb begin
    logic [5:0] half, pos, grp;
    half  = 6'(1) << stage;
    pos   = cnt & (half - 1'b1);
    grp   = (cnt >> stage);
    top   = 6'((grp << (stage + 1)) | pos);
    bot   = top + half;
    twi   = 5'(pos << (3'd5 - stage));
    issue = (state == S_CALC) && (cnt < 6'd32);
  end

  // pipeline
  logic                v1, v2;
  logic [5:0]          t1, b1, t2, b2;
  logic signed [W-1:0] a1_re, a1_im, b1_re, b1_im, w1_re, w1_im;
  logic signed [W-1:0] a2_re, a2_im, m2_re, m2_im, m_re, m_im;

  cmul #(.W(W)) u_mul (
    .a_re (b1_re), .a_im (b1_im), .b_re (w1_re), .b_im (w1_im), .conj_b (1'b0),
    .p_re (m_re), .p_im (m_im)
  );

  function automatic logic [5:0] bitrev6(input logic [5:0] x);
    for (int i = 0; i < 6; i++) bitrev6[i] = x[5-i];
  endfunction

  assign in_ready = !lfull;
  assign busy     = (state == S_CALC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      cbank     <= 1'b0;
      lbank     <= 1'b0;
      lcnt      <= '0;
      lfull     <= 1'b0;
      stage     <= '0;
      {v1, v2}  <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      {t1, b1, t2, b2} <= '0;
      {a1_re, a1_im, b1_re, b1_im, w1_re, w1_im, a2_re, a2_im, m2_re, m2_im} <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      // butterfly pipeline
      v1 <= issue;
      if (issue) begin
        t1 <= top; b1 <= bot;
        a1_re <= buf_re[{cbank, top}]; a1_im <= buf_im[{cbank, top}];
        b1_re <= buf_re[{cbank, bot}]; b1_im <= buf_im[{cbank, bot}];
        w1_re <= TW_RE[twi];  w1_im <= TW_IM[twi];
      end
      v2 <= v1;
      t2 <= t1; b2 <= b1;
      a2_re <= a1_re; a2_im <= a1_im;
      m2_re <= m_re;  m2_im <= m_im;
      if (v2) begin
        buf_re[{cbank, t2}] <= W'((($signed({a2_re[W-1], a2_re}) + $signed({m2_re[W-1], m2_re}))) >>> 1);
        buf_im[{cbank, t2}] <= W'((($signed({a2_im[W-1], a2_im}) + $signed({m2_im[W-1], m2_im}))) >>> 1);
        buf_re[{cbank, b2}] <= W'((($signed({a2_re[W-1], a2_re}) - $signed({m2_re[W-1], m2_re}))) >>> 1);
        buf_im[{cbank, b2}] <= W'((($signed({a2_im[W-1], a2_im}) - $signed({m2_im[W-1], m2_im}))) >>> 1);
      end
      // loader
      if (in_valid && !lfull) begin
        logic [5:0] n;
        n = in_first ? 6'd0 : lcnt;
        buf_re[{lbank, bitrev6(n)}] <= in_re;
        buf_im[{lbank, bitrev6(n)}] <= in_im;
        lcnt <= n + 1'b1;
        if (n == 6'd63) lfull <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (lfull) begin
          // hand the full bank to the engine, load into the other one
          state <= S_CALC;
          cbank <= lbank;
          lbank <= ~lbank;
          lfull <= 1'b0;
          lcnt  <= '0;
          cnt   <= '0;
          stage <= '0;
        end
        S_CALC: begin
          if (cnt == 6'd33) begin
            cnt <= '0;
            if (stage == 3'd5) state <= S_OUT;
            else               stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin
          out_valid <= 1'b1;
          out_first <= (cnt == 6'd0);
          out_re    <= buf_re[{cbank, cnt}];
          out_im    <= buf_im[{cbank, cnt}];
          cnt       <= cnt + 1'b1;
          if (cnt == 6'd63) begin
            state <= S_IDLE;
            cnt   <= '0;
          end
        end
      endcase
    end
  end

endmodule
