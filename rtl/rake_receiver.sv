// rake_receiver: flexible RAKE receiver with 4 or 2 fingers (the second W-CDMA tile).
//
// For every chip the receiver takes one complex sample per finger, already delay-aligned, and
// one complex scrambling chip common to all fingers. Fingers are handled in pairs, two clocks
// per pair: in the first clock the pair's samples are de-scrambled (multiplied by the conjugate
// of the +-1+-j scrambling chip, i.e. only additions), in the second they are de-spread
// (multiplied by the +-1 spreading chip from the code memory) and accumulated. With four fingers
// a chip therefore takes 4 clocks (fingers 1,2 then 3,4); in 2-finger mode the second pair is
// skipped and a chip takes 2 clocks. After SF chips, five clocks combine the fingers: scale the
// accumulators, weight each finger with its complex MRC coefficient (two complex multipliers,
// one pair per clock), add, and de-map the symbol to two bits (QPSK) or four bits (16-QAM). One symbol thus takes
// 4*SF+5 clocks (2*SF+5 in 2-finger mode).
//
// Interfaces:
//  * Code load (ld_valid/ld_data): the first word is the spreading factor SF (4..512, a power
//    of two), the next SF words carry one spreading chip each in bit 0 (1 = -1): SF+1 clocks.
//  * Chips (chip_valid/chip_ready): a chip set is taken in the first clock of a chip period;
//    without one the receiver stalls there.
//  * w_re/w_im: MRC coefficients, Q1.15, supplied by the channel estimator and applied as given.
//  * Symbols: sym_valid pulses with the combined symbol (sym_re/sym_im) and bits: bit 0 from
//    the sign of the real part, bit 1 from the sign of the imaginary part (1 means negative).
//    With qam16 set, bit 2 and bit 3 tell whether |re| and |im| reach qam_thr (1 = outer
//    level); otherwise they are 0. The threshold is the midpoint between the two amplitude
//    levels of the combined symbol, known to the channel estimator that sets the weights.
//
// The pair schedule, the 4*SF+5 timing, the SF+1-clock code load, the stored spreading code and
// the 4-to-2 finger switch follow the document, as do QPSK and 16-QAM as the modulations to
// de-map. The scaling of the accumulators by 2*SF, the bit order and the threshold input are
// this design's choices.
module rake_receiver #(
  parameter int unsigned SF_MAX = 512,
  parameter int unsigned W      = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_valid,
  input  logic [9:0]            ld_data,
  output logic                  ld_busy,
  input  logic                  four_fingers,  // 1: four fingers, 0: fingers 1 and 2 only
  input  logic                  qam16,         // 1: de-map 16-QAM, 0: QPSK
  input  logic [W-2:0]          qam_thr,       // 16-QAM amplitude threshold, Q1.15, positive
  input  logic [3:0][W-1:0]     w_re,
  input  logic [3:0][W-1:0]     w_im,
  input  logic                  chip_valid,
  output logic                  chip_ready,
  input  logic [3:0][W-1:0]     f_re,
  input  logic [3:0][W-1:0]     f_im,
  input  logic                  sc_i,
  input  logic                  sc_q,
  output logic                  sym_valid,
  output logic [3:0]            sym_bits,
  output logic signed [W-1:0]   sym_re,
  output logic signed [W-1:0]   sym_im
);

  localparam int unsigned CW = $clog2(SF_MAX);
  localparam int unsigned AW = W + CW + 3;   // accumulator width

  typedef enum logic [1:0] {S_CHIP, S_COMB, S_LOAD} state_e;
  state_e state;

  logic              code [SF_MAX];
  logic [CW:0]       sf;
  logic [CW:0]       ld_cnt;
  logic [3:0]        shift;                    // log2(SF) + 1
  logic [1:0]        slot;
  logic [CW-1:0]     chip;
  logic [2:0]        cstep;

  logic signed [W-1:0]  lat_re [4];
  logic signed [W-1:0]  lat_im [4];
  logic                 lat_ci, lat_cq;
  logic signed [W:0]    ds_re [2];
  logic signed [W:0]    ds_im [2];
  logic signed [AW-1:0] acc_re [4];
  logic signed [AW-1:0] acc_im [4];
  logic signed [W-1:0]  nrm_re [4];
  logic signed [W-1:0]  nrm_im [4];
  logic signed [W+1:0]  sum_re, sum_im;

  // two complex multipliers shared by the finger pairs
  logic signed [W-1:0] ma_re [2];
  logic signed [W-1:0] ma_im [2];
  logic signed [W-1:0] mb_re [2];
  logic signed [W-1:0] mb_im [2];
  logic signed [W-1:0] mp_re [2];
  logic signed [W-1:0] mp_im [2];

  for (genvar m = 0; m < 2; m++) begin : g_mul
    cmul #(.W(W)) u_cmul (
      .a_re (ma_re[m]), .a_im (ma_im[m]), .b_re (mb_re[m]), .b_im (mb_im[m]), .conj_b (1'b0),
      .p_re (mp_re[m]), .p_im (mp_im[m])
    );
  end

  function automatic logic [W-1:0] mag(input logic signed [W-1:0] v);
    return v[W-1] ? W'(-v) : W'(v);
  endfunction

  function automatic logic signed [W-1:0] sat16(input logic signed [AW-1:0] v);
    if (v > AW'((1 << (W - 1)) - 1))    return {1'b0, {(W-1){1'b1}}};
    else if (v < -AW'(1 << (W - 1)))    return {1'b1, {(W-1){1'b0}}};
    else                                return v[W-1:0];
  endfunction

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      logic [1:0] f;
      f = (cstep == 3'd2) ? 2'(m + 2) : 2'(m);
      ma_re[m] = nrm_re[f];
      ma_im[m] = nrm_im[f];
      mb_re[m] = w_re[f];
      mb_im[m] = w_im[f];
    end
  end

  assign chip_ready = (state == S_CHIP) && (slot == 2'd0);
  assign ld_busy    = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_CHIP;
      sf        <= (CW+1)'(4);
      shift     <= 4'd3;
      ld_cnt    <= '0;
      slot      <= '0;
      chip      <= '0;
      cstep     <= '0;
      sym_valid <= 1'b0;
      sym_bits  <= '0;
      sym_re    <= '0;
      sym_im    <= '0;
      sum_re    <= '0;
      sum_im    <= '0;
      lat_ci    <= 1'b0;
      lat_cq    <= 1'b0;
      for (int f = 0; f < 4; f++) begin
        acc_re[f] <= '0; acc_im[f] <= '0;
        nrm_re[f] <= '0; nrm_im[f] <= '0;
        lat_re[f] <= '0; lat_im[f] <= '0;
      end
      for (int p = 0; p < 2; p++) begin
        ds_re[p] <= '0; ds_im[p] <= '0;
      end
    end else begin
      sym_valid <= 1'b0;
      unique case (state)
        S_LOAD: begin
          if (ld_valid) begin
            code[ld_cnt[CW-1:0]] <= ld_data[0];
            ld_cnt <= ld_cnt + 1'b1;
            if (ld_cnt == sf - 1'b1) state <= S_CHIP;
          end
        end
        S_CHIP: begin
          if (slot == 2'd0 && ld_valid) begin
            // new spreading code: SF, then SF chips; restart the symbol
            sf     <= ld_data[CW:0];
            shift  <= 4'd1;
            for (int b = 0; b < CW; b++) if (ld_data[b+1]) shift <= 4'(b + 2);
            ld_cnt <= '0;
            chip   <= '0;
            state  <= S_LOAD;
            for (int f = 0; f < 4; f++) begin
              acc_re[f] <= '0; acc_im[f] <= '0;
            end
          end else begin
            unique case (slot)
              2'd0, 2'd2: begin
                logic [1:0] f0;
                logic       ci, cq;
                if (slot == 2'd0) begin
                  ci = sc_i; cq = sc_q;
                end else begin
                  ci = lat_ci; cq = lat_cq;
                end
                f0 = slot;
                if (slot != 2'd0 || chip_valid) begin
                  for (int p = 0; p < 2; p++) begin
                    logic signed [W:0] a, b;
                    if (slot == 2'd0) begin
                      a = (W+1)'($signed(f_re[p])); b = (W+1)'($signed(f_im[p]));
                    end else begin
                      a = (W+1)'(lat_re[f0 + 2'(p)]); b = (W+1)'(lat_im[f0 + 2'(p)]);
                    end
                    // (a + jb)(sI - j sQ): re = a sI + b sQ, im = b sI - a sQ
                    ds_re[p] <= (ci ? -a : a) + (cq ? -b : b);
                    ds_im[p] <= (ci ? -b : b) - (cq ? -a : a);
                  end
                  slot <= slot + 1'b1;
                end
                if (slot == 2'd0 && chip_valid) begin
                  for (int f = 0; f < 4; f++) begin
                    lat_re[f] <= f_re[f];
                    lat_im[f] <= f_im[f];
                  end
                  lat_ci <= sc_i;
                  lat_cq <= sc_q;
                end
              end
              default: begin
                for (int p = 0; p < 2; p++) begin
                  logic [1:0] f;
                  f = (slot == 2'd1) ? 2'(p) : 2'(p + 2);
                  acc_re[f] <= acc_re[f] + (code[chip] ? -AW'(ds_re[p]) : AW'(ds_re[p]));
                  acc_im[f] <= acc_im[f] + (code[chip] ? -AW'(ds_im[p]) : AW'(ds_im[p]));
                end
                if (slot == 2'd3 || !four_fingers) begin
                  slot <= 2'd0;
                  if (chip == CW'(sf - 1'b1)) begin
                    chip  <= '0;
                    cstep <= '0;
                    state <= S_COMB;
                  end else begin
                    chip <= chip + 1'b1;
                  end
                end else begin
                  slot <= slot + 1'b1;
                end
              end
            endcase
          end
        end
        default: begin  // S_COMB, five clocks
          cstep <= cstep + 1'b1;
          unique case (cstep)
            3'd0: for (int f = 0; f < 4; f++) begin
              nrm_re[f] <= sat16(acc_re[f] >>> shift);
              nrm_im[f] <= sat16(acc_im[f] >>> shift);
              acc_re[f] <= '0;
              acc_im[f] <= '0;
            end
            3'd1: begin
              sum_re <= (W+2)'(mp_re[0]) + (W+2)'(mp_re[1]);
              sum_im <= (W+2)'(mp_im[0]) + (W+2)'(mp_im[1]);
            end
            3'd2: if (four_fingers) begin
              sum_re <= sum_re + (W+2)'(mp_re[0]) + (W+2)'(mp_re[1]);
              sum_im <= sum_im + (W+2)'(mp_im[0]) + (W+2)'(mp_im[1]);
            end
            3'd3: begin
              sym_re <= sat16(AW'(sum_re));
              sym_im <= sat16(AW'(sum_im));
            end
            default: begin
              sym_bits  <= {qam16 && (mag(sym_im) >= {1'b0, qam_thr}),
                            qam16 && (mag(sym_re) >= {1'b0, qam_thr}),
                            sym_im[W-1], sym_re[W-1]};
              sym_valid <= 1'b1;
              state     <= S_CHIP;
            end
          endcase
        end
      endcase
    end
  end

endmodule
