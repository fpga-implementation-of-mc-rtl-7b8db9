// despreader: removes the PN scrambling applied by the spreader.
//
// Each received two-bit pair is XORed with the next two chips of a pn_lfsr
// started from the same seed as the transmitter's, and registered (latency
// one clock). The receive path has no back-pressure: a pair arrives with
// in_valid and leaves one clock later with out_valid. The pairing of chips
// to bits matches the spreader (in_code[1] meets the earlier chip).
//
// The XOR with the PN pattern is as described for the design; the chip
// alignment, the seed and the register length are this design's choices.
module despreader #(
  parameter int M = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  logic [1:0] in_code,
  output logic       out_valid,
  output logic [1:0] out_code
);

  logic [1:0] chips;

  pn_lfsr #(.M(M), .CHIPS(2)) u_pn (
    .clk, .rst_n, .clear, .step(in_valid), .chips
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      out_valid <= 1'b0;
      out_code  <= 2'b00;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_code <= in_code ^ {chips[0], chips[1]};
    end
  end

endmodule
