// spreader: scrambles the coded bit stream with the PN sequence.
//
// Each accepted two-bit code pair is XORed, bit by bit, with the next two
// chips of a pn_lfsr, and the result is registered (latency one clock,
// valid/ready on both sides). code[1] meets the earlier chip. The
// despreader applies the same sequence from the same seed to undo it.
//
// XOR with an LFSR sequence is the spreader the design describes. One chip
// per coded bit (so no bandwidth expansion) follows the despreader's
// description, which XORs the serial data with the PN pattern to recover the
// original bits; the chip rate and the PN generator's length are this
// design's choices.
module spreader #(
  parameter int M = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_code,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_code
);

  logic [1:0] chips;
  logic       fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  pn_lfsr #(.M(M), .CHIPS(2)) u_pn (
    .clk, .rst_n, .clear, .step(fire), .chips
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      out_valid <= 1'b0;
      out_code  <= 2'b00;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_code <= in_code ^ {chips[0], chips[1]};
    end
  end

  // Handshake rule: a pair offered and not taken stays, unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
    out_valid && !out_ready |=> out_valid && $stable(out_code));

endmodule
