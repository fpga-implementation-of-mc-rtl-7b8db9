// pn_lfsr: m-stage Fibonacci linear feedback shift register, the PN
// (pseudo-noise) generator shared by the spreader and the despreader.
//
// The register shifts one place per chip; the new bit entering stage 1 is
// the XOR of the stages selected by TAPS, and the output chip is the last
// stage. With step asserted the register advances CHIPS places in one
// clock, and `chips` presents the CHIPS output chips of that step, chips[0]
// being the first in time. `chips` shows the chips of the coming step
// (combinational from the register), so a user XORs them with its data and
// asserts step in the same clock.
//
// The shift register with XOR feedback is the generator described for the
// design; its length and feedback taps are not given, so M = 7 with the
// primitive polynomial x^7 + x^6 + 1 (period 127) is this design's choice, as
// are the seed and the two chips per step (one QPSK symbol's worth).
module pn_lfsr #(
  parameter int                   M     = 7,
  parameter logic [M-1:0]         TAPS  = 7'b1100000,  // bit i set: stage i+1 feeds back
  parameter logic [M-1:0]         SEED  = 7'b1010101,  // non-zero
  parameter int                   CHIPS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // reload SEED
  input  logic             step,
  output logic [CHIPS-1:0] chips
);

  logic [M-1:0] sr;                    // sr[0] = stage 1, sr[M-1] = stage m
  logic [M-1:0] nxt;

  always_comb begin
    logic [M-1:0] s;
    s = sr;
    for (int c = 0; c < CHIPS; c++) begin
      chips[c] = s[M-1];
      s = {s[M-2:0], ^(s & TAPS)};
    end
    nxt = s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sr <= SEED;
    else if (step)       sr <= nxt;
  end

endmodule
