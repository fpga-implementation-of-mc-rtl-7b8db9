// qpsk_framer: maps code pairs onto QPSK points and gathers one OFDM symbol.
//
// Each accepted pair {b1,b0} (b1 the first bit) becomes one of four points
// on the axes, at carrier phase 0, pi/2, pi or 3*pi/2:
//   00 -> (+A, 0)   01 -> (0, +A)   11 -> (-A, 0)   10 -> (0, -A)
// with A = QPSK_AMP. This is the constellation of the design; the amplitude
// is this design's choice. N_SC consecutive points fill subcarriers 0..7 in
// arrival order and are then offered, all in parallel, to the IFFT.
//
// Interface: valid/ready on the pair input and on the frame output. While a
// full frame waits for the IFFT, in_ready is low; the frame leaves in the
// clock its handshake completes, and the framer accepts the first pair of
// the next frame in that same clock, so it sustains one pair per clock.
module qpsk_framer
  import mccdma_pkg::*;
#(
  parameter int AMP = QPSK_AMP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_code,
  output logic       out_valid,
  input  logic       out_ready,
  output frame_t     out_frame
);

  logic [$clog2(N_SC+1)-1:0] fill;
  logic                      full;
  cplx_t                     point;

  assign full      = (fill == N_SC[$clog2(N_SC+1)-1:0]);
  assign out_valid = full;
  assign in_ready  = !full || out_ready;

  always_comb begin
    unique case (in_code)
      2'b00: begin point.re = DATA_W'(AMP);  point.im = '0;            end
      2'b01: begin point.re = '0;            point.im = DATA_W'(AMP);  end
      2'b11: begin point.re = -DATA_W'(AMP); point.im = '0;            end
      2'b10: begin point.re = '0;            point.im = -DATA_W'(AMP); end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      fill <= '0;
      for (int i = 0; i < N_SC; i++) out_frame[i] <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (full) begin
          out_frame[0] <= point;
          fill         <= 1;
        end else begin
          out_frame[fill[$clog2(N_SC)-1:0]] <= point;
          fill                              <= fill + 1'b1;
        end
      end else if (full && out_ready) begin
        fill <= '0;
      end
    end
  end

  // Handshake rule: a frame offered and not taken stays offered.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
    out_valid && !out_ready |=> out_valid);

endmodule
