// tb_qpsk_framer: random bit pairs in, random back-pressure on the frame
// output. Each frame must hold the next 8 pairs, in order, mapped to the
// constellation table, and a waiting frame must hold still.
module tb_qpsk_framer;
  import mccdma_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, out_ready = 0;
  logic [1:0] in_code = 0;
  logic in_ready, out_valid;
  frame_t out_frame;
  int checks = 0, failures = 0;
  int frames = 0, stalls = 0, sent = 0;

  qpsk_framer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] q[$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = (i < 200) ? 1'b1 : (($urandom % 4) != 0);
      in_code   = 2'($urandom);
      out_ready = (i < 200) ? 1'b1 : (($urandom % 3) == 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (frames < 100 || stalls == 0 || q.size() != sent - 8 * frames) begin
      failures++;
      $display("FAIL: frames=%0d stalls=%0d queue=%0d", frames, stalls, q.size());
    end
    $display("frames=%0d stalls=%0d", frames, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid && out_ready) begin
      frames++;
      for (int k = 0; k < N_SC; k++) begin
        logic [1:0] c;
        c = q.pop_front();
        checks++;
        if (out_frame[k].re !== DATA_W'(QPSK_RE[c] * QPSK_AMP) ||
            out_frame[k].im !== DATA_W'(QPSK_IM[c] * QPSK_AMP)) begin
          failures++;
          $display("FAIL: frame %0d sc %0d pair %b got (%0d,%0d)", frames, k, c,
                   out_frame[k].re, out_frame[k].im);
        end
      end
    end
    if (in_valid && in_ready) begin
      q.push_back(in_code);
      sent++;
    end
  end

endmodule
