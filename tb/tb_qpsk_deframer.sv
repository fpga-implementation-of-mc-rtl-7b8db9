// tb_qpsk_deframer: random frames of noisy QPSK points (each point of
// amplitude 2048 disturbed by up to +-900 on each axis, so the nearest axis
// is never in doubt), offered every 8 to 12 clocks. The serial pairs must
// match the transmitted pairs, subcarrier 0 first, starting one clock after
// the frame, 8 consecutive clocks per frame; overrun must stay low.
module tb_qpsk_deframer;
  import mccdma_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_t in_frame;
  logic out_valid, overrun;
  logic [1:0] out_code;
  int checks = 0, failures = 0;

  qpsk_deframer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] exp_q[$];
  int cycle = 0, frame_cycle = -100;

  always @(posedge clk) cycle++;

  initial begin
    for (int k = 0; k < N_SC; k++) in_frame[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      int gap;
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < N_SC; k++) begin
        int c;
        c = $urandom % 4;
        in_frame[k].re = DATA_W'(QPSK_RE[c] * QPSK_AMP + ($signed($urandom % 1801) - 900));
        in_frame[k].im = DATA_W'(QPSK_IM[c] * QPSK_AMP + ($signed($urandom % 1801) - 900));
        exp_q.push_back(2'(c));
      end
      gap = 8 + $urandom % 5;
      @(negedge clk);
      in_valid = 0;
      repeat (gap - 2) @(negedge clk);
    end
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d pairs never sent", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    int since;
    since = cycle - frame_cycle;
    checks++;
    if (overrun) begin
      failures++;
      $display("FAIL: overrun");
    end
    if (out_valid !== (since >= 1 && since <= 8)) begin
      failures++;
      $display("FAIL: out_valid %b, %0d clocks after the frame", out_valid, since);
    end
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0 || out_code !== exp_q.pop_front()) begin
        failures++;
        $display("FAIL: pair %b wrong", out_code);
      end
    end
    if (in_valid) frame_cycle = cycle;
  end

endmodule
