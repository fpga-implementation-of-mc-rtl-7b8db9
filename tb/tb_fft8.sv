// tb_fft8: random QPSK frames (and some frames of random values) go through
// the IFFT with random output back-pressure. Each result is compared with a
// floating-point inverse DFT (including 1/8) within a few LSBs, and the
// latency through an unstalled pipeline must be 3 clocks.
module tb_fft8;
  import mccdma_pkg::*;
  import tb_ref_pkg::*;

  localparam real TOL = 6.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 1;
  frame_t in_frame;
  logic in_ready, out_valid;
  frame_t out_frame;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  fft8 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real r[8]; real i[8]; } rframe_t;
  rframe_t exp_q[$];
  int t_in[$];
  int cycle = 0;
  int lat_checked = 0;

  bit free_run = 1;   // output always taken: latency must be exactly 3
  always @(posedge clk) cycle++;

  function automatic real abs_r(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic make_frame(input bit qpsk);
    for (int k = 0; k < 8; k++) begin
      if (qpsk) begin
        int c;
        c = $urandom % 4;
        in_frame[k].re = DATA_W'(QPSK_RE[c] * QPSK_AMP);
        in_frame[k].im = DATA_W'(QPSK_IM[c] * QPSK_AMP);
      end else begin
        in_frame[k].re = DATA_W'($signed($urandom % 4097) - 2048);
        in_frame[k].im = DATA_W'($signed($urandom % 4097) - 2048);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) in_frame[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i == 50) free_run = 0;
      in_valid  = (i < 50) ? (i % 5 == 0) : (($urandom % 2) == 0);
      out_ready = (i < 50) ? 1'b1 : (($urandom % 4) != 0);
      make_frame(i % 3 != 2);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || lat_checked == 0) begin
      failures++;
      $display("FAIL: %0d frames not delivered", exp_q.size());
    end
    $display("max error %f LSB, %0d frames with 3-clock latency", max_err, lat_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      rframe_t e;
      int t0;
      e  = exp_q.pop_front();
      t0 = t_in.pop_front();
      if (free_run) begin
        checks++;
        if (cycle - t0 != 3) begin
          failures++;
          $display("FAIL: latency %0d clocks", cycle - t0);
        end else lat_checked++;
      end
      for (int k = 0; k < 8; k++) begin
        real er, ei;
        er = abs_r(real'(out_frame[k].re) - e.r[k]);
        ei = abs_r(real'(out_frame[k].im) - e.i[k]);
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > TOL || ei > TOL) begin
          failures++;
          $display("FAIL: X(%0d) = (%0d,%0d) expected (%f,%f)", k,
                   out_frame[k].re, out_frame[k].im, e.r[k], e.i[k]);
        end
      end
    end
    if (in_valid && in_ready) begin
      real xr[8], xi[8];
      rframe_t e;
      for (int k = 0; k < 8; k++) begin
        xr[k] = real'(in_frame[k].re);
        xi[k] = real'(in_frame[k].im);
      end
      dft8(xr, xi, 1'b0, e.r, e.i);
      exp_q.push_back(e);
      t_in.push_back(cycle);
    end
  end

endmodule
