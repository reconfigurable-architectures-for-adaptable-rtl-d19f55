// montium_sdr_top: a multi-standard receiver built on MONTIUM-style tiles.
//
// Three parts stand side by side, each with its own ports:
//  * A programmable MONTIUM tile (montium_tile): configuration port, streaming input and output.
//  * The W-CDMA (UMTS downlink) receiver. Samples pass the pulse-shaping FIR (tile 1), the
//    per-finger delay buffer and the RAKE receiver (tile 2) with de-scrambling, de-spreading,
//    maximal-ratio combining and QPSK or 16-QAM de-mapping (w_qam16, w_qam_thr). The scrambling code comes from the
//    shift-register generator that a fine-grained tile would hold. Path delays, MRC
//    coefficients, the scrambling code number and the spreading code come from the control
//    processor through ports, as do the FIR taps.
//  * The HiperLAN/2 OFDM receiver: prefix removal (tile 1), frequency offset correction (tile 2),
//    64-point FFT (tile 3), equalizer with pilot-based phase correction and the table de-mapper
//    (tile 4). Symbol timing, the correction and equalizer coefficients, the pilot polarities and
//    the de-mapping table come from outside through ports.
// Every receiver stage reports back-pressure it cannot absorb: wcdma_overrun when a chip is
// formed before the RAKE took the previous one, ofdm_overrun when a sample reaches the FFT while
// both its banks are taken, or a bin reaches the equalizer while it is busy (the value is then
// lost). With a 100 MHz clock, HiperLAN/2 samples at 20 MHz (one per 5 clocks) pass without loss.
//
// The split of functions over tiles and the order of the stages follow the document's receiver
// mapping. The stages are dedicated RTL implementations of the functions the document maps onto
// tiles, not programs for the generic tile; the control processor, the network between tiles and
// the synchronization search are outside this module. The equalizer's symbol index and last
// flag (eq_idx, eq_last) are left unused: the de-mapper output carries its own valid, and the
// carrier order is fixed.
module montium_sdr_top
  import montium_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- generic MONTIUM tile
  input  logic                  mt_cfg_valid,
  input  logic [15:0]           mt_cfg_addr,
  input  logic [15:0]           mt_cfg_data,
  input  logic                  mt_in_valid,
  input  word_t [N_BUS-1:0]     mt_in_data,
  output logic                  mt_in_ready,
  output logic                  mt_out_valid,
  output word_t                 mt_out_data,
  output logic                  mt_busy,
  // ---- W-CDMA receiver
  input  logic                  w_fir_we,
  input  logic [3:0]            w_fir_idx,
  input  logic [15:0]           w_fir_coef,
  input  logic [3:0][8:0]       w_delay,          // per finger, samples
  input  logic                  w_sc_load,
  input  logic [17:0]           w_sc_code,
  output logic                  w_sc_ready,
  input  logic                  w_ld_valid,       // spreading factor, then spreading code
  input  logic [9:0]            w_ld_data,
  output logic                  w_ld_busy,
  input  logic                  w_four_fingers,
  input  logic                  w_qam16,          // 1: 16-QAM de-mapping, 0: QPSK
  input  logic [14:0]           w_qam_thr,        // 16-QAM amplitude threshold
  input  logic [3:0][15:0]      w_mrc_re,
  input  logic [3:0][15:0]      w_mrc_im,
  input  logic                  w_in_valid,
  input  logic [15:0]           w_in_re,
  input  logic [15:0]           w_in_im,
  output logic                  w_sym_valid,
  output logic [3:0]            w_sym_bits,
  output logic [15:0]           w_sym_re,
  output logic [15:0]           w_sym_im,
  output logic                  w_chip_taken,
  output logic                  wcdma_overrun,
  // ---- HiperLAN/2 receiver
  input  logic                  h_foc_we,
  input  logic [5:0]            h_foc_idx,
  input  logic [15:0]           h_foc_re,
  input  logic [15:0]           h_foc_im,
  input  logic                  h_eq_we,
  input  logic [5:0]            h_eq_idx,
  input  logic [15:0]           h_eq_re,
  input  logic [15:0]           h_eq_im,
  input  logic [3:0]            h_pilot_ref,
  input  logic                  h_lut_we,
  input  logic [5:0]            h_lut_idx,
  input  logic [2:0]            h_lut_val,
  input  logic [1:0]            h_bits_per_axis,
  input  logic                  h_in_valid,
  input  logic                  h_sym_start,
  input  logic [15:0]           h_in_re,
  input  logic [15:0]           h_in_im,
  output logic                  h_out_valid,
  output logic [5:0]            h_out_bits,
  output logic [2:0]            h_out_nbits,
  output logic                  h_fft_busy,
  output logic                  ofdm_overrun
);

  // ------------------------------------------------------------------ MONTIUM tile
  montium_tile u_tile (
    .clk, .rst_n,
    .cfg_valid (mt_cfg_valid), .cfg_addr (mt_cfg_addr), .cfg_data (mt_cfg_data),
    .in_valid (mt_in_valid), .in_data (mt_in_data), .in_ready (mt_in_ready),
    .out_valid (mt_out_valid), .out_data (mt_out_data), .busy (mt_busy)
  );

  // ------------------------------------------------------------------ W-CDMA
  logic                   psf_valid;
  logic signed [15:0]     psf_re, psf_im;
  logic                   chip_valid, chip_ready, sc_i, sc_q;
  logic [3:0][15:0]       f_re, f_im;

  pulse_shape_fir #(.NTAPS(16)) u_psf (
    .clk, .rst_n,
    .coef_we (w_fir_we), .coef_idx (w_fir_idx), .coef_val (w_fir_coef),
    .in_valid (w_in_valid), .in_re (w_in_re), .in_im (w_in_im),
    .out_valid (psf_valid), .out_re (psf_re), .out_im (psf_im)
  );

  rake_delay_buffer u_dly (
    .clk, .rst_n, .delay (w_delay),
    .in_valid (psf_valid), .in_re (psf_re), .in_im (psf_im),
    .chip_valid, .chip_ready, .overrun (wcdma_overrun),
    .f_re, .f_im
  );

  wcdma_scrambler u_scr (
    .clk, .rst_n, .load (w_sc_load), .code_n (w_sc_code),
    .chip_en (w_chip_taken), .ready (w_sc_ready), .c_i (sc_i), .c_q (sc_q)
  );

  rake_receiver u_rake (
    .clk, .rst_n,
    .ld_valid (w_ld_valid), .ld_data (w_ld_data), .ld_busy (w_ld_busy),
    .four_fingers (w_four_fingers), .qam16 (w_qam16), .qam_thr (w_qam_thr),
    .w_re (w_mrc_re), .w_im (w_mrc_im),
    .chip_valid, .chip_ready, .f_re, .f_im, .sc_i, .sc_q,
    .sym_valid (w_sym_valid), .sym_bits (w_sym_bits), .sym_re (w_sym_re), .sym_im (w_sym_im)
  );

  assign w_chip_taken = chip_valid && chip_ready;

  // ------------------------------------------------------------------ HiperLAN/2
  logic               pr_valid, pr_first, fo_valid, fo_first, ff_valid, ff_first;
  logic               ff_in_ready, eq_in_ready, eq_valid;
  logic signed [15:0] pr_re, pr_im, fo_re, fo_im, ff_re, ff_im, eq_re, eq_im;
  logic [5:0]         eq_idx;
  logic               eq_last;

  hl2_prefix_removal u_pfx (
    .clk, .rst_n, .in_valid (h_in_valid), .sym_start (h_sym_start),
    .in_re (h_in_re), .in_im (h_in_im),
    .out_valid (pr_valid), .out_first (pr_first), .out_re (pr_re), .out_im (pr_im)
  );

  hl2_freq_offset_corr u_foc (
    .clk, .rst_n,
    .coef_we (h_foc_we), .coef_idx (h_foc_idx), .coef_re (h_foc_re), .coef_im (h_foc_im),
    .in_valid (pr_valid), .in_first (pr_first), .in_re (pr_re), .in_im (pr_im),
    .out_valid (fo_valid), .out_first (fo_first), .out_re (fo_re), .out_im (fo_im)
  );

  fft64 u_fft (
    .clk, .rst_n,
    .in_valid (fo_valid && ff_in_ready), .in_first (fo_first), .in_re (fo_re), .in_im (fo_im),
    .in_ready (ff_in_ready), .busy (h_fft_busy),
    .out_valid (ff_valid), .out_first (ff_first), .out_re (ff_re), .out_im (ff_im)
  );

  hl2_eq_phase u_eq (
    .clk, .rst_n,
    .coef_we (h_eq_we), .coef_idx (h_eq_idx), .coef_re (h_eq_re), .coef_im (h_eq_im),
    .pilot_ref (h_pilot_ref),
    .in_valid (ff_valid && eq_in_ready), .in_first (ff_first), .in_re (ff_re), .in_im (ff_im),
    .in_ready (eq_in_ready),
    .out_valid (eq_valid), .out_idx (eq_idx), .out_last (eq_last), .out_re (eq_re), .out_im (eq_im)
  );

  hl2_demapper u_dmp (
    .clk, .rst_n,
    .lut_we (h_lut_we), .lut_idx (h_lut_idx), .lut_val (h_lut_val),
    .bits_per_axis (h_bits_per_axis),
    .in_valid (eq_valid), .in_re (eq_re), .in_im (eq_im),
    .out_valid (h_out_valid), .out_bits (h_out_bits), .out_nbits (h_out_nbits)
  );

  assign ofdm_overrun = (fo_valid && !ff_in_ready) || (ff_valid && !eq_in_ready);

endmodule
