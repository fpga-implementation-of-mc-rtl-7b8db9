// tb_viterbi_acsu: random branch metrics at random times; the path metrics,
// decision bits and best state are compared with a model that walks the
// trellis forward from the encoder's state table (every state and input,
// keeping the smaller sum per next state, ties to the predecessor with
// s0 = 0) and then subtracts the minimum. Latency is one clock.
module tb_viterbi_acsu;
  import tb_ref_pkg::*;

  localparam int PM_W = 6;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0;
  logic [1:0] bm [4];
  logic out_valid;
  logic [3:0] dec;
  logic [1:0] best_state;
  logic [PM_W-1:0] pm [4];
  int checks = 0, failures = 0;

  viterbi_acsu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_pm[4] = '{0, 8, 8, 8};
  int m_dec[4];
  int m_best;
  bit m_valid = 0;
  int ties = 0;

  task automatic model_step(input int b[4]);
    int np[4];
    int mn;
    for (int n = 0; n < 4; n++) np[n] = 1 << 30;
    // predecessor order: s0 = 0 before s0 = 1, so a tie keeps s0 = 0
    for (int s0 = 0; s0 < 2; s0++)
      for (int s1 = 0; s1 < 2; s1++)
        for (int u = 0; u < 2; u++) begin
          int p, idx, n, m;
          p   = s1 * 2 + s0;
          idx = p * 2 + u;
          n   = ENC_NEXT[idx];
          m   = m_pm[p] + b[ENC_OUT[idx]];
          if (m < np[n]) begin
            np[n] = m;
            m_dec[n] = s0;
          end else if (m == np[n]) ties++;
        end
    mn = np[0];
    m_best = 0;
    for (int n = 1; n < 4; n++) if (np[n] < mn) begin mn = np[n]; m_best = n; end
    for (int n = 0; n < 4; n++) m_pm[n] = np[n] - mn;
  endtask

  initial begin
    for (int c = 0; c < 4; c++) bm[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      // metrics of a real received pair: Hamming distances to each code
      begin
        int r;
        r = $urandom % 4;
        for (int c = 0; c < 4; c++) bm[c] = 2'(((r ^ c) & 1) + (((r ^ c) >> 1) & 1));
      end
      if (i == 1500) begin
        clear = 1;
        in_valid = 0;
      end else clear = 0;
    end
    @(negedge clk); in_valid = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL: no tie exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== m_valid) begin
      failures++;
      $display("FAIL: out_valid");
    end
    if (m_valid) begin
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (int'(pm[n]) != m_pm[n] || int'(dec[n]) != m_dec[n]) begin
          failures++;
          $display("FAIL: state %0d pm %0d dec %0d expected %0d %0d", n, pm[n], dec[n], m_pm[n], m_dec[n]);
        end
      end
      checks++;
      if (int'(best_state) != m_best) begin
        failures++;
        $display("FAIL: best %0d expected %0d", best_state, m_best);
      end
    end
    if (clear) begin
      m_pm = '{0, 8, 8, 8};
      m_valid = 0;
    end else begin
      m_valid = in_valid;
      if (in_valid) begin
        int b[4];
        for (int c = 0; c < 4; c++) b[c] = int'(bm[c]);
        model_step(b);
      end
    end
  end

endmodule
