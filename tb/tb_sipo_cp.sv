// tb_sipo_cp: sends symbols of CP_LEN + 8 random samples (first flagged),
// with random idle clocks between and inside them, and checks that each
// output frame holds the 8 samples after the prefix, that out_valid follows
// the last sample by one clock, and that exactly CP_LEN samples per symbol
// are discarded.
module tb_sipo_cp;
  import mccdma_pkg::*;

  localparam int CP = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  cplx_t in_sample = '0;
  logic out_valid, cp_drop;
  frame_t out_frame;
  int checks = 0, failures = 0;
  int drops = 0, frames = 0;

  sipo_cp #(.CP_LEN(CP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t exp_q[$];        // expected frame elements, in order
  bit    last_sent = 0;
  bit    drv_last = 0;   // the sample being driven is the last of its symbol
  int    nsym = 200;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < nsym; s++) begin
      cplx_t f[N_SC];
      for (int k = 0; k < N_SC; k++) f[k] = cplx_t'($urandom);
      for (int k = 0; k < N_SC; k++) exp_q.push_back(f[k]);
      for (int j = 0; j < CP + N_SC; j++) begin
        @(negedge clk);
        while (s >= 50 && ($urandom % 4) == 0) begin
          in_valid = 0;
          drv_last = 0;
          in_sample = cplx_t'($urandom);
          @(negedge clk);
        end
        in_valid  = 1;
        in_first  = (j == 0);
        drv_last  = (j == CP + N_SC - 1);
        in_sample = (j < CP) ? cplx_t'($urandom) : f[j-CP];
      end
    end
    @(negedge clk); in_valid = 0; in_first = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (frames != nsym || drops != CP * nsym) begin
      failures++;
      $display("FAIL: frames=%0d drops=%0d", frames, drops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (cp_drop) drops++;
    checks++;
    if (out_valid !== last_sent) begin
      failures++;
      $display("FAIL: out_valid %b, last sample a clock ago %b", out_valid, last_sent);
    end
    if (out_valid) begin
      frames++;
      for (int k = 0; k < N_SC; k++) begin
        cplx_t e;
        e = exp_q.pop_front();
        checks++;
        if (out_frame[k] !== e) begin
          failures++;
          $display("FAIL: frame %0d element %0d", frames, k);
        end
      end
    end
    last_sent = in_valid && drv_last;
  end

endmodule
