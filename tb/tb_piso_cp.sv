// tb_piso_cp: offers random frames at random times and checks the serial
// stream: for each frame, CP_LEN prefix samples equal to its last CP_LEN
// samples, then the 8 samples in order, out_first on the first of them, and
// no gap between symbols when frames are offered back to back.
module tb_piso_cp;
  import mccdma_pkg::*;

  localparam int CP = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  frame_t in_frame;
  logic in_ready, out_valid, out_first;
  cplx_t out_sample;
  int checks = 0, failures = 0;
  int symbols = 0, gapless = 0;

  piso_cp #(.CP_LEN(CP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t exp_q[$];
  bit    first_q[$];

  initial begin
    for (int k = 0; k < N_SC; k++) in_frame[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      in_valid = (i < 300) ? 1'b1 : (($urandom % 8) == 0);
      for (int k = 0; k < N_SC; k++) in_frame[k] = cplx_t'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (15) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || symbols < 40 || gapless == 0) begin
      failures++;
      $display("FAIL: %0d samples missing, %0d symbols, %0d gapless", exp_q.size(), symbols, gapless);
    end
    $display("symbols=%0d back-to-back=%0d", symbols, gapless);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_valid = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sample");
      end else begin
        cplx_t e;
        bit f;
        e = exp_q.pop_front();
        f = first_q.pop_front();
        if (out_sample !== e || out_first !== f) begin
          failures++;
          $display("FAIL: sample %h first %b expected %h %b", out_sample, out_first, e, f);
        end
      end
      if (out_first) begin
        symbols++;
        if (prev_valid) gapless++;
      end
    end else if (exp_q.size() != 0 && prev_valid && !first_q[0]) begin
      checks++;
      failures++;
      $display("FAIL: gap inside a symbol");
    end
    prev_valid = out_valid;
    if (in_valid && in_ready) begin
      for (int k = 0; k < CP; k++) begin
        exp_q.push_back(in_frame[N_SC-CP+k]);
        first_q.push_back(k == 0);
      end
      for (int k = 0; k < N_SC; k++) begin
        exp_q.push_back(in_frame[k]);
        first_q.push_back(CP == 0 && k == 0);
      end
    end
  end

endmodule
