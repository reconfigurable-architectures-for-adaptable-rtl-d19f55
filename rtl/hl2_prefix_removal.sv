// hl2_prefix_removal: cyclic-prefix removal for OFDM symbols (first HiperLAN/2 tile).
//
// Samples stream in one per valid clock. sym_start marks the first sample of an OFDM symbol, as
// found by synchronization; the module then drops the NCP prefix samples and forwards the next
// NFFT samples, marking the first forwarded one with out_first, and ignores what follows until
// the next sym_start. Output is registered: a kept sample leaves one clock after it arrives.
//
// HiperLAN/2 numbers: a 4 us symbol at the 20 MHz sample rate is 80 samples, of which the
// 64-point transform uses 64, leaving a 16-sample prefix. The symbol time, bandwidth and FFT size
// are the document's; the sym_start interface is this design's (the correlation that finds the
// symbol start is not part of this block).
module hl2_prefix_removal #(
  parameter int unsigned NFFT = 64,
  parameter int unsigned NCP  = 16,
  parameter int unsigned W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                sym_start,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_first,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned CW = $clog2(NFFT + NCP + 1);
  logic [CW-1:0] pos;     // position inside the symbol, NFFT+NCP = outside a symbol
  logic [CW-1:0] p;

  always_comb p = sym_start ? '0 : pos;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= CW'(NFFT + NCP);
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (in_valid) begin
        if (p < CW'(NFFT + NCP)) pos <= p + 1'b1;
        if (p >= CW'(NCP) && p < CW'(NFFT + NCP)) begin
          out_valid <= 1'b1;
          out_first <= (p == CW'(NCP));
          out_re    <= in_re;
          out_im    <= in_im;
        end
      end
    end
  end

endmodule
