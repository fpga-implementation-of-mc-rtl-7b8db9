// tb_viterbi_bmu: exhaustive check of the four Hamming distances for all
// four received pairs, against a bit-counting loop.
module tb_viterbi_bmu;
  logic [1:0] rx_code;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;

  viterbi_bmu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_code = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int d;
        d = 0;
        for (int b = 0; b < 2; b++) if (((r >> b) & 1) != ((c >> b) & 1)) d++;
        checks++;
        if (int'(bm[c]) != d) begin
          failures++;
          $display("FAIL: rx %0d code %0d distance %0d expected %0d", r, c, bm[c], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
