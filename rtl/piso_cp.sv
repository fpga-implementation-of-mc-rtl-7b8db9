// piso_cp: parallel-in serial-out with cyclic prefix insertion.
//
// A frame of N_SC time samples from the IFFT is sent one sample per clock.
// The last CP_LEN samples of the frame go first, as the cyclic prefix (guard
// interval), followed by the whole frame in order: CP_LEN + N_SC samples per
// OFDM symbol, e.g. x5 x6 x7 x0 ... x7 for CP_LEN = 3.
//
// Interface: frame input with valid/ready; the serial output has only a
// valid, since the channel cannot stall. in_ready is high when idle and in
// the clock of the last sample of a symbol, so back-to-back frames give a
// gap-free sample stream. Output is registered.
//
// The prefix copying the tail of the symbol is as the design describes; its
// length is not given, so CP_LEN = 2 (a quarter of the symbol) is this
// design's choice.
module piso_cp
  import mccdma_pkg::*;
#(
  parameter int CP_LEN = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  frame_t in_frame,
  output logic   out_valid,
  output cplx_t  out_sample,
  output logic   out_first      // first sample (start of prefix) of a symbol
);

  localparam int SYM_LEN = CP_LEN + N_SC;
  localparam int CW      = $clog2(SYM_LEN + 1);

  frame_t        buf_q;
  logic [CW-1:0] cnt;            // sample index within the symbol
  logic          busy;
  logic          last;
  logic [$clog2(N_SC)-1:0] idx;  // frame element to send

  assign last     = busy && (cnt == CW'(SYM_LEN - 1));
  assign in_ready = !busy || last;

  // Prefix samples come from the tail of the frame.
  always_comb begin
    if (int'(cnt) < CP_LEN) idx = $clog2(N_SC)'(N_SC - CP_LEN + int'(cnt));
    else                    idx = $clog2(N_SC)'(int'(cnt) - CP_LEN);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= '0;
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_sample <= '0;
      for (int i = 0; i < N_SC; i++) buf_q[i] <= '0;
    end else begin
      out_valid <= busy;
      out_first <= busy && (cnt == '0);
      if (busy) out_sample <= buf_q[idx];
      if (in_valid && in_ready) begin
        buf_q <= in_frame;
        busy  <= 1'b1;
        cnt   <= '0;
      end else if (last) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
