// conv_encoder: rate 1/2, constraint length 3 convolutional encoder (k=1, n=2).
//
// A two-bit shift register {s1,s0} holds the last two input bits, s1 the
// newer. For each accepted input bit u the encoder emits the pair {v1,v2}
//   v1 = u ^ s1 ^ s0   (taps 1 1 1)
//   v2 = u ^ s0        (taps 1 0 1)
// and moves to state {u, s1}. This reproduces the encoder state table and
// the encoder drawing of the design: the upper adder taps the input and both
// delay outputs, the lower adder the input and the last delay. (A sentence
// elsewhere names the generators the other way round; the table is followed.)
//
// Interface: valid/ready on both sides. The output pair is registered, so
// the latency is one clock; a new bit can be accepted every clock while the
// consumer is ready. Reset (active low, synchronous) clears the state to 00,
// the start state of the trellis; `clear` does the same between messages.
module conv_encoder
  import mccdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,      // return to state 00 (start of a message)
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_code    // {v1, v2}
);

  logic [1:0] state;             // {s1, s0}

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      state     <= 2'b00;
      out_valid <= 1'b0;
      out_code  <= 2'b00;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_code <= conv_code(in_bit, state);
        state    <= {in_bit, state[1]};
      end
    end
  end

  // Handshake rule: a pair offered and not taken stays, unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
    out_valid && !out_ready |=> out_valid && $stable(out_code));

endmodule
