// fft8: 8-point forward FFT, radix-2 decimation in time.
//
// The signal-flow graph is the design's 8-point FFT butterfly network:
// bit-reversed order in (x0, x4, x2, x6, x1, x5, x3, x7), natural order out.
// Stage 1 combines neighbours with W_2^0; stage 2 combines elements two apart
// within each half, the lower one first multiplied by W_4^0 or W_4^1; stage 3
// combines i with i+4 after multiplying element i+4 by W_8^i, i = 0..3.
// W_N = exp(-j*2*pi/N). The input reordering is done by wiring, so in_frame
// is given in natural time order. No scaling: the outputs carry the full DFT
// sum, which the word width has room for at the design's signal levels.
//
// Each stage ends in a register: latency 3 clocks, one frame per clock, with
// a valid/ready handshake that stalls the pipeline as a whole. The Q1.14
// twiddles and pipelining are this design's choices.
module fft8
  import mccdma_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  frame_t in_frame,   // x(n), n = 0..7
  output logic   out_valid,
  input  logic   out_ready,
  output frame_t out_frame   // X(k), k = 0..7
);

  frame_t y;                  // input in bit-reversed order
  frame_t s1_d, s2_d, s3_d;
  frame_t s1_q, s2_q, s3_q;
  logic   v1, v2, v3;
  logic   en;

  assign en       = !v3 || out_ready;
  assign in_ready = en;

  always_comb begin
    cplx_t t;
    for (int k = 0; k < N_SC; k++) y[k] = in_frame[bitrev3(k)];
    // Stage 1: 2-point butterflies.
    for (int p = 0; p < 8; p += 2) begin
      s1_d[p]   = c_add(y[p], y[p+1]);
      s1_d[p+1] = c_sub(y[p], y[p+1]);
    end
    // Stage 2: 4-point butterflies, W_4^i = W_8^(2i).
    for (int h = 0; h < 8; h += 4) begin
      for (int i = 0; i < 2; i++) begin
        t           = c_twiddle(s1_q[h+i+2], 2'(2*i), 1'b0);
        s2_d[h+i]   = c_add(s1_q[h+i], t);
        s2_d[h+i+2] = c_sub(s1_q[h+i], t);
      end
    end
    // Stage 3: 8-point butterflies, W_8^i.
    for (int i = 0; i < 4; i++) begin
      t         = c_twiddle(s2_q[i+4], 2'(i), 1'b0);
      s3_d[i]   = c_add(s2_q[i], t);
      s3_d[i+4] = c_sub(s2_q[i], t);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      for (int i = 0; i < N_SC; i++) begin
        s1_q[i] <= '0; s2_q[i] <= '0; s3_q[i] <= '0;
      end
    end else if (en) begin
      v1 <= in_valid; v2 <= v1; v3 <= v2;
      s1_q <= s1_d;
      s2_q <= s2_d;
      s3_q <= s3_d;
    end
  end

  assign out_frame = s3_q;
  assign out_valid = v3;

  // Handshake rule: a frame offered and not taken stays offered.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);

endmodule
