// tb_pn_lfsr: compares the generator's chips with a bit-by-bit model of the
// same 7-stage register, with random stepping, and checks the period of
// 127 steps of a maximal-length sequence and the reload on clear.
module tb_pn_lfsr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [1:0] chips;
  int checks = 0, failures = 0;

  pn_lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pn_model m;
  bit first_seq[254];

  initial begin
    m = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Sequence of 2*127 chips: must repeat with period 127 chips.
    for (int i = 0; i < 300; i++) begin
      bit c0, c1;
      @(negedge clk);
      step = ($urandom % 3) != 0;
      if (i < 40) step = 1;
      #1;
      if (step) begin
        c0 = m.next();
        c1 = m.next();
        checks++;
        if (chips !== {c1, c0}) begin
          failures++;
          $display("FAIL: step %0d chips %b expected %b", i, chips, {c1, c0});
        end
      end
      @(posedge clk);
    end
    // Period: 127 steps of 2 chips = 254 chips = two periods, back at the start state.
    @(negedge clk); clear = 1; step = 0;
    @(negedge clk); clear = 0;
    m = new();
    for (int i = 0; i < 127; i++) begin
      first_seq[2*i]   = m.next();
      first_seq[2*i+1] = m.next();
    end
    checks++;
    if (m.r !== 7'b1010101) begin
      failures++;
      $display("FAIL: model period is not 127");
    end
    for (int i = 0; i < 127; i++) begin
      @(negedge clk);
      checks++;
      if (chips !== {first_seq[2*i+1], first_seq[2*i]}) begin
        failures++;
        $display("FAIL: after clear step %0d", i);
      end
      step = 1;
      @(posedge clk);
    end
    @(negedge clk); step = 0;
    #1;
    checks++;
    if (chips !== {first_seq[1], first_seq[0]}) begin
      failures++;
      $display("FAIL: sequence does not repeat after 127 steps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
