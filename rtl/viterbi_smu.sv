// viterbi_smu: survivor memory unit, register-exchange form.
//
// Each of the four states owns a DEPTH-bit register holding the input bits
// of its survivor path, newest in bit 0. On a trellis step, state n takes
// the register of its surviving predecessor {n[0], dec[n]}, shifted up by one,
// and appends its own input bit u = n[1]. The decoded bit is the oldest bit,
// DEPTH-1, of the register of the best state, so a bit leaves DEPTH trellis
// steps after it entered. out_valid is suppressed until the registers hold
// DEPTH real steps.
//
// Timing: the step is taken in the clock after in_valid from the ACSU
// (registered); out_valid and out_bit are registered. The design says only
// that the SMU finds the survivor path and produces the decoded bits; the
// register-exchange structure and DEPTH = 15 (five constraint lengths) are
// this design's choices.
module viterbi_smu #(
  parameter int DEPTH = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  logic [3:0] dec,
  input  logic [1:0] best_state,
  output logic       out_valid,
  output logic       out_bit
);

  localparam int FW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0] surv [4];
  logic [DEPTH-1:0] surv_d [4];
  logic [FW-1:0]    fill;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      logic [1:0] p;
      p         = {n[0], dec[n]};
      surv_d[n] = {surv[p][DEPTH-2:0], n[1]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int n = 0; n < 4; n++) surv[n] <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        surv <= surv_d;
        if (fill != FW'(DEPTH)) fill <= fill + 1'b1;
        out_valid <= (fill >= FW'(DEPTH - 1));
        out_bit   <= surv_d[best_state][DEPTH-1];
      end
    end
  end

endmodule
