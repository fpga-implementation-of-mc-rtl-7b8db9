// viterbi_decoder: hard-decision Viterbi decoder for the rate 1/2,
// constraint length 3 code of conv_encoder.
//
// Built, as the design describes, from a branch metric unit (Hamming
// distances), an add-compare-select unit with its path metric memory, and a
// survivor memory unit that yields the decoded bits. One received code pair
// is accepted per clock with in_valid. The decoded bit for the pair received
// at step t comes out DEPTH steps later, two clocks after the pair of step
// t + DEPTH - 1 went in; a message is flushed out by following it with
// DEPTH - 1 or more known zero bits at the encoder. `clear` restarts the
// decoder in state 00 for a new message.
module viterbi_decoder #(
  parameter int DEPTH = 15,
  parameter int PM_W  = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  logic [1:0] in_code,
  output logic       out_valid,
  output logic       out_bit
);

  logic [1:0]      bm [4];
  logic            acs_valid;
  logic [3:0]      dec;
  logic [1:0]      best_state;
  logic [PM_W-1:0] pm [4];

  viterbi_bmu u_bmu (.rx_code(in_code), .bm);

  viterbi_acsu #(.PM_W(PM_W)) u_acsu (
    .clk, .rst_n, .clear, .in_valid, .bm,
    .out_valid(acs_valid), .dec, .best_state, .pm
  );

  viterbi_smu #(.DEPTH(DEPTH)) u_smu (
    .clk, .rst_n, .clear, .in_valid(acs_valid), .dec, .best_state,
    .out_valid, .out_bit
  );

endmodule
