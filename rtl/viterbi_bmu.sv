// viterbi_bmu: branch metric unit of the hard-decision Viterbi decoder.
//
// For a received code pair r it gives, for each of the four possible code
// pairs c = 0..3, the Hamming distance between r and c (0, 1 or 2): the
// number of differing bits, as the design specifies. Purely combinational.
module viterbi_bmu (
  input  logic [1:0] rx_code,
  output logic [1:0] bm [4]      // bm[c] = Hamming distance(rx_code, c)
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [1:0] d;
      d     = rx_code ^ 2'(c);
      bm[c] = 2'(d[1]) + 2'(d[0]);
    end
  end

endmodule
