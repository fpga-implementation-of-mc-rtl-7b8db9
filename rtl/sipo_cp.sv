// sipo_cp: serial-in parallel-out with cyclic prefix removal.
//
// Receives the serial sample stream of piso_cp. Symbols are CP_LEN + N_SC
// samples long; in_first marks the first sample of a symbol and restarts the
// count, so the receiver aligns to the transmitter's symbol boundary. The
// first CP_LEN samples (the prefix) are dropped, the next N_SC are written
// into a frame buffer, and a one-clock out_valid pulse follows the last of
// them. The buffer holds the frame until the next symbol's data overwrite
// it, at least CP_LEN clocks later.
//
// Removing the prefix before the FFT is as the design describes. Symbol
// timing is not described; taking it from a start-of-symbol flag sent with
// the samples is this design's choice (the transmitter and receiver are
// connected back to back).
module sipo_cp
  import mccdma_pkg::*;
#(
  parameter int CP_LEN = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  cplx_t  in_sample,
  output logic   out_valid,
  output frame_t out_frame,
  output logic   cp_drop        // a prefix sample was discarded this clock
);

  localparam int SYM_LEN = CP_LEN + N_SC;
  localparam int CW      = $clog2(SYM_LEN + 1);

  logic [CW-1:0] cnt;            // index of the incoming sample
  logic [CW-1:0] pos;
  logic [$clog2(N_SC)-1:0] widx;  // frame element to write

  assign pos     = in_first ? '0 : cnt;
  assign cp_drop = in_valid && (int'(pos) < CP_LEN);
  assign widx    = $clog2(N_SC)'(int'(pos) - CP_LEN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < N_SC; i++) out_frame[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (int'(pos) >= CP_LEN) out_frame[widx] <= in_sample;
        if (pos == CW'(SYM_LEN - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
        end else begin
          cnt <= pos + 1'b1;
        end
      end
    end
  end

endmodule
