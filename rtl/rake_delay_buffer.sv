// rake_delay_buffer: path-delay buffering and downsampling for the RAKE fingers.
//
// Filtered samples arrive at OSR samples per chip and are written into a circular buffer of
// DEPTH complex words (a pair of local memories on the MONTIUM). Every OSR-th sample, the
// buffer forms one chip for every finger: finger f gets the sample written delay[f] samples
// before the newest one. The delays, in samples, select both the multipath delay and the
// sampling phase of each finger, so changing the delay profile is only a change of these
// read offsets (the "buffering strategy"). chip_valid rises one clock after the sample that
// completes a chip and stays high, with the finger samples held, until the RAKE takes the chip
// (chip_ready). A chip formed while the previous one is still waiting replaces it and pulses
// overrun: the RAKE is then clocked too slowly for the chip rate.
//
// The document says the finger streams are buffered in local memory and that a path-delay
// change reconfigures the buffering; the downsampling arrows come from its receiver diagram.
// The oversampling factor of 2, and reading all fingers in parallel, are this design's choices.
module rake_delay_buffer #(
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned OSR      = 2,
  parameter int unsigned NFINGERS = 4,
  parameter int unsigned W        = 16
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NFINGERS-1:0][$clog2(DEPTH)-1:0] delay,   // per finger, samples (< DEPTH)
  input  logic                                  in_valid,
  input  logic signed [W-1:0]                   in_re,
  input  logic signed [W-1:0]                   in_im,
  output logic                                  chip_valid,
  input  logic                                  chip_ready,
  output logic                                  overrun,
  output logic [NFINGERS-1:0][W-1:0]            f_re,
  output logic [NFINGERS-1:0][W-1:0]            f_im
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [2*W-1:0] mem [DEPTH];
  logic [AW-1:0]  wptr;
  logic [$clog2(OSR+1)-1:0] phase;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wptr] <= {in_re, in_im};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr       <= '0;
      phase      <= '0;
      chip_valid <= 1'b0;
      overrun    <= 1'b0;
      f_re       <= '0;
      f_im       <= '0;
    end else begin
      overrun <= 1'b0;
      if (chip_valid && chip_ready) chip_valid <= 1'b0;
      if (in_valid) begin
        wptr <= wptr + 1'b1;
        if (int'(phase) == OSR - 1) begin
          phase      <= '0;
          chip_valid <= 1'b1;
          overrun    <= chip_valid && !chip_ready;
          for (int f = 0; f < NFINGERS; f++) begin
            // the sample just written is at wptr; it is forwarded when delay is zero
            if (delay[f] == '0) {f_re[f], f_im[f]} <= {in_re, in_im};
            else                {f_re[f], f_im[f]} <= mem[wptr - delay[f]];
          end
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
