// wcdma_scrambler: UMTS downlink complex scrambling code generator.
//
// Two 18-bit linear feedback shift registers produce the m-sequences
//   x(i+18) = x(i+7) + x(i)                    (x starts as 1,0,...,0)
//   y(i+18) = y(i+10) + y(i+7) + y(i+5) + y(i) (y starts as all ones)
// over GF(2). Code number n uses z(i) = x(i+n) + y(i) on the I branch and z(i+131072) on the
// Q branch; a bit 1 means chip value -1. Delayed and advanced versions of x and y are taken as
// XOR masks of the register contents: the mask for an advance of k steps holds the
// coefficients of t^k mod p(t). The Q-branch advance of 131072 is a constant computed at
// elaboration; the code-number advance n is computed after `load` by square-and-multiply, one
// bit of n per cycle (18 cycles, `ready` then rises). Each `chip_en` emits one complex chip and
// steps both registers; the code restarts after FRAME_LEN chips (one radio frame).
//
// The generator is built, as the architecture suggests for a fine-grained tile, from shift
// registers and XOR gates. The polynomials, initial states, Q-branch offset and 38400-chip
// frame are the UMTS standard's; the document gives only the code length and the gate style.
module wcdma_scrambler #(
  parameter int unsigned FRAME_LEN = 38400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,      // latch code_n and prepare the generator
  input  logic [17:0] code_n,    // scrambling code number
  input  logic        chip_en,   // advance one chip (ignored until ready)
  output logic        ready,
  output logic        c_i,       // I chip, 1 = -1
  output logic        c_q        // Q chip, 1 = -1
);

  localparam logic [17:0] PX = 18'h00081;        // t^7 + 1
  localparam logic [17:0] PY = 18'h004A1;        // t^10 + t^7 + t^5 + 1

  // a * b mod (t^18 + p), polynomials over GF(2) of degree < 18
  function automatic logic [17:0] mulmod(input logic [17:0] a, input logic [17:0] b,
                                         input logic [17:0] p);
    logic [17:0] r, s;
    r = '0;
    s = a;
    for (int i = 0; i < 18; i++) begin
      if (b[i]) r = r ^ s;
      s = s[17] ? ((s << 1) ^ p) : (s << 1);
    end
    return r;
  endfunction

  // t^(2^e) mod (t^18 + p)
  function automatic logic [17:0] pow2mod(input int e, input logic [17:0] p);
    logic [17:0] r;
    r = 18'h2;   // t
    for (int i = 0; i < e; i++) r = mulmod(r, r, p);
    return r;
  endfunction

  localparam logic [17:0] MX_Q = pow2mod(17, PX);  // t^131072 mod px
  localparam logic [17:0] MY_Q = pow2mod(17, PY);  // t^131072 mod py

  logic [17:0] xs, ys;       // xs[j] = x(i+j), ys[j] = y(i+j)
  logic [17:0] mask_i, mask_q, n_q;
  logic [4:0]  step;
  logic        busy;
  logic [$clog2(FRAME_LEN)-1:0] chip_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      ready    <= 1'b0;
      step     <= '0;
      mask_i   <= 18'h1;
      mask_q   <= MX_Q;
      n_q      <= '0;
      xs       <= 18'h1;
      ys       <= '1;
      chip_cnt <= '0;
    end else if (load) begin
      busy     <= 1'b1;
      ready    <= 1'b0;
      step     <= 5'd18;
      n_q      <= code_n;
      mask_i   <= 18'h1;   // t^0
      xs       <= 18'h1;
      ys       <= '1;
      chip_cnt <= '0;
    end else if (busy) begin
      // left-to-right square and multiply over the bits of n
      if (step != 0) begin
        mask_i <= n_q[step-1] ? mulmod(mulmod(mask_i, mask_i, PX), 18'h2, PX)
                              : mulmod(mask_i, mask_i, PX);
        step   <= step - 1'b1;
      end else begin
        mask_q <= mulmod(mask_i, MX_Q, PX);
        busy   <= 1'b0;
        ready  <= 1'b1;
      end
    end else if (ready && chip_en) begin
      if (int'(chip_cnt) == FRAME_LEN - 1) begin
        chip_cnt <= '0;
        xs       <= 18'h1;
        ys       <= '1;
      end else begin
        chip_cnt <= chip_cnt + 1'b1;
        xs       <= {xs[7] ^ xs[0], xs[17:1]};
        ys       <= {ys[10] ^ ys[7] ^ ys[5] ^ ys[0], ys[17:1]};
      end
    end
  end

  assign c_i = (^(xs & mask_i)) ^ ys[0];
  assign c_q = (^(xs & mask_q)) ^ (^(ys & MY_Q));

endmodule
