// tb_conv_encoder: drives random bits, with random back-pressure, and checks
// every output pair against the encoder state table. Also checks the
// one-clock latency and that a stalled output holds.
module tb_conv_encoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_bit = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic [1:0] out_code;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] st = 2'b00;
  logic [1:0] exp_q[$];
  bit seen_trans[8];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 4) != 0;
      in_bit    = $urandom;
      out_ready = ($urandom % 3) != 0;
      if (i == 1000) begin clear = 1; in_valid = 0; end
      else clear = 0;
      @(posedge clk);
      #1;
      if (clear) begin
        st = 2'b00;
        exp_q.delete();
      end
    end
    in_valid = 0;
    out_ready = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (!seen_trans[t]) begin
        failures++;
        $display("FAIL: state table row %0d never exercised", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard sampled at each rising edge (before the DUT updates).
  logic prev_valid = 0, prev_stall = 0;
  logic [1:0] prev_code;
  always @(posedge clk) if (rst_n && !clear) begin
    // a stalled output must hold its value
    if (prev_stall) begin
      checks++;
      if (!out_valid || out_code !== prev_code) begin
        failures++;
        $display("FAIL: output changed while stalled");
      end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else if (out_code !== exp_q.pop_front()) begin
        failures++;
        $display("FAIL: code %b wrong at %0t", out_code, $time);
      end
    end
    if (in_valid && in_ready) begin
      int idx;
      idx = {st, in_bit};
      seen_trans[idx] = 1;
      exp_q.push_back(ENC_OUT[idx]);
      st = ENC_NEXT[idx];
      // one-clock latency: the pair is visible right after this edge
      fork begin
        #1;
        checks++;
        if (!out_valid || out_code !== ENC_OUT[idx]) begin
          failures++;
          $display("FAIL: latency: output not present one clock after input");
        end
      end join_none
    end
    prev_stall = out_valid && !out_ready;
    prev_code  = out_code;
  end

endmodule
