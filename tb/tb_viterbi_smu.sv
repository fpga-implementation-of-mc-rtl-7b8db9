// tb_viterbi_smu: random decision vectors and best states at random times.
// The expected decoded bit is found by trace-back over the stored decision
// history: from the best state of the newest step, follow predecessors
// {n[0], dec[n]} back DEPTH-1 steps and take the input bit (n[1]) of the
// state reached. This must equal the register-exchange output, which must
// appear one clock after each step once DEPTH steps have been seen.
module tb_viterbi_smu;

  localparam int DEPTH = 15;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0;
  logic [3:0] dec = 0;
  logic [1:0] best_state = 0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;

  viterbi_smu #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] hist[$];
  bit exp_valid = 0, exp_bit = 0;
  int outs = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid   = ($urandom % 4) != 0;
      dec        = 4'($urandom);
      best_state = 2'($urandom);
      if (i == 2000) begin clear = 1; in_valid = 0; end
      else clear = 0;
    end
    @(negedge clk); in_valid = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (outs < 2000) begin
      failures++;
      $display("FAIL: only %0d outputs", outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_valid || (out_valid && out_bit !== exp_bit)) begin
      failures++;
      $display("FAIL: valid %b bit %b expected %b %b", out_valid, out_bit, exp_valid, exp_bit);
    end
    if (out_valid) outs++;
    exp_valid = 0;
    if (clear) hist.delete();
    else if (in_valid) begin
      hist.push_back(dec);
      if (hist.size() >= DEPTH) begin
        logic [1:0] s;
        s = best_state;
        for (int j = hist.size() - 1; j > hist.size() - DEPTH; j--) s = {s[0], hist[j][s]};
        exp_valid = 1;
        exp_bit   = s[1];
      end
    end
  end

endmodule
