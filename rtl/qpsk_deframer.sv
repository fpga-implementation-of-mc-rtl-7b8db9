// qpsk_deframer: QPSK decision and parallel-to-serial conversion.
//
// On in_valid the N_SC subcarrier values of one FFT output frame are decided
// to bit pairs, the inverse of qpsk_framer's mapping: the point lies on the
// I axis when |I| >= |Q| (00 for +I, 11 for -I), otherwise on the Q axis
// (01 for +Q, 10 for -Q). The pairs are then sent out one per clock,
// subcarrier 0 first, starting in the clock after in_valid, so a frame takes
// N_SC clocks. A new frame may arrive in the clock that sends the last pair
// of the previous one; `overrun` flags one that comes sooner (its
// predecessor's remaining pairs are lost).
//
// The nearest-axis decision rule and the timing are this design's choices;
// the design says only that the deframer undoes the framer and converts the
// parallel data to serial.
module qpsk_deframer
  import mccdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  frame_t     in_frame,
  output logic       out_valid,
  output logic [1:0] out_code,
  output logic       overrun
);

  localparam int CW = $clog2(N_SC + 1);

  logic [1:0]    dec   [N_SC];
  logic [1:0]    pairs [N_SC];
  logic [CW-1:0] left;           // pairs still to send
  logic [CW-1:0] idx;

  function automatic logic signed [DATA_W:0] absv(logic signed [DATA_W-1:0] v);
    return (v < 0) ? -(DATA_W+1)'(v) : (DATA_W+1)'(v);
  endfunction

  always_comb begin
    for (int k = 0; k < N_SC; k++) begin
      if (absv(in_frame[k].re) >= absv(in_frame[k].im))
        dec[k] = (in_frame[k].re >= 0) ? 2'b00 : 2'b11;
      else
        dec[k] = (in_frame[k].im >= 0) ? 2'b01 : 2'b10;
    end
  end

  assign out_valid = (left != '0);
  assign out_code  = pairs[idx[$clog2(N_SC)-1:0]];
  assign overrun   = in_valid && (left > CW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= '0;
      idx  <= '0;
      for (int k = 0; k < N_SC; k++) pairs[k] <= 2'b00;
    end else if (in_valid) begin
      pairs <= dec;
      left  <= CW'(N_SC);
      idx   <= '0;
    end else if (left != '0) begin
      left <= left - 1'b1;
      idx  <= idx + 1'b1;
    end
  end

endmodule
