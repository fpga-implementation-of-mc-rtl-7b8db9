// ifft8: 8-point inverse FFT, radix-2 decimation in frequency.
//
// The signal-flow graph is the design's 8-point butterfly network: natural
// order in, three stages of butterflies, bit-reversed order out. In stage 1
// element i pairs with i+4 and the difference is multiplied by the twiddle
// of index i (0..3); in stage 2 elements pair at distance 2 within each half
// with twiddles of index 0 and 2; stage 3 pairs neighbours with no twiddle.
// For the inverse transform the twiddles are W_8^-k = exp(+j*2*pi*k/8), and
// the 1/N factor of the inverse DFT is applied as a halving in each stage, so
// outputs stay inside the input range. The output is put back into natural
// order by wiring (out_frame[n] is x(n)).
//
// Each stage ends in a register: latency 3 clocks, one frame per clock. The
// valid/ready handshake stalls all three stages together when the output is
// not taken. Per-stage halving, the Q1.14 twiddles and the pipelining are
// this design's choices.
module ifft8
  import mccdma_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  frame_t in_frame,   // X(k), k = 0..7
  output logic   out_valid,
  input  logic   out_ready,
  output frame_t out_frame   // x(n), n = 0..7
);

  frame_t s1_d, s2_d, s3_d;   // combinational stage outputs
  frame_t s1_q, s2_q, s3_q;   // stage registers
  logic   v1, v2, v3;
  logic   en;

  assign en       = !v3 || out_ready;
  assign in_ready = en;

  always_comb begin
    // Stage 1: span 4, twiddle W^-i on the difference.
    for (int i = 0; i < 4; i++) begin
      s1_d[i]   = c_add_half(in_frame[i], in_frame[i+4]);
      s1_d[i+4] = c_twiddle(c_sub_half(in_frame[i], in_frame[i+4]), 2'(i), 1'b1);
    end
    // Stage 2: span 2 within each half, twiddles W^0 and W^-2.
    for (int h = 0; h < 8; h += 4) begin
      for (int i = 0; i < 2; i++) begin
        s2_d[h+i]   = c_add_half(s1_q[h+i], s1_q[h+i+2]);
        s2_d[h+i+2] = c_twiddle(c_sub_half(s1_q[h+i], s1_q[h+i+2]), 2'(2*i), 1'b1);
      end
    end
    // Stage 3: span 1, no twiddle.
    for (int p = 0; p < 8; p += 2) begin
      s3_d[p]   = c_add_half(s2_q[p], s2_q[p+1]);
      s3_d[p+1] = c_sub_half(s2_q[p], s2_q[p+1]);
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

  // Stage 3 leaves the points in bit-reversed order.
  always_comb begin
    for (int k = 0; k < N_SC; k++) out_frame[bitrev3(k)] = s3_q[k];
  end
  assign out_valid = v3;

  // Handshake rule: a frame offered and not taken stays offered.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);

endmodule
