// tb_mccdma_top: end-to-end test of the MC-CDMA link at the default
// parameters. A random message, followed by zero bits that flush the Viterbi
// decoder, is offered to the transmitter with random idle clocks. The
// testbench acts as the channel: it gathers each transmitted OFDM symbol
// (prefix included), adds a little noise to every sample, and on every
// fourth symbol also rotates one subcarrier's QPSK point by 90 degrees (one
// code bit wrong), before replaying the symbol into the receiver. The
// decoded stream must equal the message.
//
// Mechanisms counted, each of which must occur: transmitter back-pressure
// (in_ready low while data wait), cyclic prefix insertion and removal,
// subcarrier errors corrected by the Viterbi decoder, and back-to-back
// symbols on the line. The deframer must never overrun.
module tb_mccdma_top;
  import mccdma_pkg::*;
  import tb_ref_pkg::*;

  localparam int LEN    = 1600;     // message bits
  localparam int CP     = 2;        // the top's default prefix length
  localparam int DEPTH  = 15;       // the top's default survivor depth
  localparam int TAIL   = 24;       // >= DEPTH, total a multiple of 8
  localparam int NOISE  = 40;       // +- LSB of noise per component

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_bit = 0;
  logic  in_ready;
  logic  tx_valid, tx_first;
  cplx_t tx_sample;
  logic  rx_valid = 0, rx_first = 0;
  cplx_t rx_sample = '0;
  logic  out_valid, out_bit;
  logic  rx_cp_drop, rx_overrun;

  int checks = 0, failures = 0;
  int stalls = 0, symbols = 0, cp_drops = 0, injected = 0, overruns = 0, gapless = 0;

  mccdma_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit msg[$];
  bit exp_q[$];
  logic [1:0] code_q[$];   // reference encoder output, what the decoder should receive
  int code_errs = 0;

  // ---------------- source ----------------
  initial begin
    for (int i = 0; i < LEN + TAIL; i++) begin
      bit b;
      b = (i < LEN) ? 1'($urandom) : 1'b0;
      msg.push_back(b);
      if (i < LEN + TAIL - (DEPTH - 1)) exp_q.push_back(b);
    end
    begin
      logic [1:0] st;
      st = 2'b00;
      for (int i = 0; i < LEN + TAIL; i++) begin
        code_q.push_back(ENC_OUT[{st, msg[i]}]);
        st = ENC_NEXT[{st, msg[i]}];
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LEN + TAIL; i++) begin
      @(negedge clk);
      while (($urandom % 8) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_bit   = msg[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;

  // ---------------- channel ----------------
  cplx_t sym_buf[CP + N_SC];
  int    sym_fill = 0;
  cplx_t line_q[$];
  bit    first_q[$];

  function automatic int clip16(real v);
    int r;
    r = $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic finish_symbol();
    real xr[8], xi[8], Xr[8], Xi[8];
    for (int n = 0; n < N_SC; n++) begin
      xr[n] = real'(sym_buf[CP + n].re);
      xi[n] = real'(sym_buf[CP + n].im);
    end
    if (symbols % 4 == 3) begin
      // Rotate subcarrier k by +90 degrees: add (j - 1) * X(k) on that bin.
      int k;
      real dr, di, ang;
      k = $urandom % 8;
      dft8(xr, xi, 1'b0, Xr, Xi);
      dr = -Xr[k] - Xi[k];
      di =  Xr[k] - Xi[k];
      for (int n = 0; n < N_SC; n++) begin
        ang = 2.0 * 3.14159265358979 * real'(k * n) / 8.0;
        xr[n] += (dr * $cos(ang) - di * $sin(ang)) / 8.0;
        xi[n] += (dr * $sin(ang) + di * $cos(ang)) / 8.0;
      end
      injected++;
    end
    for (int j = 0; j < CP + N_SC; j++) begin
      int n;
      cplx_t s;
      n = (j < CP) ? (N_SC - CP + j) : (j - CP);
      s.re = DATA_W'(clip16(xr[n] + real'($signed($urandom % (2 * NOISE + 1)) - NOISE)));
      s.im = DATA_W'(clip16(xi[n] + real'($signed($urandom % (2 * NOISE + 1)) - NOISE)));
      line_q.push_back(s);
      first_q.push_back(j == 0);
    end
  endtask

  bit prev_tx = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid) begin
      if (tx_first) begin
        if (sym_fill != 0 && sym_fill != CP + N_SC) begin
          failures++;
          $display("FAIL: short symbol on the line");
        end
        sym_fill = 0;
        if (prev_tx) gapless++;
      end
      sym_buf[sym_fill] = tx_sample;
      sym_fill++;
      if (sym_fill == CP + N_SC) begin
        // the prefix must repeat the end of the symbol
        for (int j = 0; j < CP; j++) begin
          checks++;
          if (sym_buf[j] !== sym_buf[N_SC + j]) begin
            failures++;
            $display("FAIL: prefix sample %0d differs from the symbol tail", j);
          end
        end
        finish_symbol();
        symbols++;
      end
    end
    prev_tx = tx_valid;
    if (rx_cp_drop) cp_drops++;
    if (rx_overrun) overruns++;
  end

  always @(negedge clk) begin
    if (line_q.size() != 0) begin
      rx_valid  = 1;
      rx_sample = line_q.pop_front();
      rx_first  = first_q.pop_front();
    end else begin
      rx_valid = 0;
      rx_first = 0;
    end
  end

  // Code pairs as they enter the Viterbi decoder (after despreading): count
  // those the channel corrupted.
  always @(posedge clk) if (rst_n && dut.u_dsp.out_valid) begin
    if (code_q.size() != 0 && dut.u_dsp.out_code !== code_q.pop_front()) code_errs++;
  end

  // ---------------- sink ----------------
  int nout = 0, errors = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: extra decoded bit");
    end else if (out_bit !== exp_q.pop_front()) begin
      failures++;
      errors++;
      if (errors < 10) $display("FAIL: decoded bit %0d wrong", nout);
    end
    nout++;
  end

  initial begin
    wait (rst_n);
    wait (exp_q.size() == 0 && msg.size() != 0);
    repeat (50) @(posedge clk);
    $display("decoded %0d bits, %0d symbols, %0d stalls, %0d prefix samples dropped, %0d subcarrier errors injected, %0d code pairs corrected, %0d back-to-back symbols",
             nout, symbols, stalls, cp_drops, injected, code_errs, gapless);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no back-pressure seen"); end
    checks++;
    if (symbols == 0 || cp_drops != CP * symbols) begin failures++; $display("FAIL: prefix removal count"); end
    checks++;
    if (injected == 0) begin failures++; $display("FAIL: no subcarrier error injected"); end
    checks++;
    if (code_errs != injected) begin failures++; $display("FAIL: %0d code errors reached the decoder, %0d injected", code_errs, injected); end
    checks++;
    if (gapless == 0) begin failures++; $display("FAIL: no back-to-back symbols"); end
    checks++;
    if (overruns != 0) begin failures++; $display("FAIL: deframer overrun"); end
    checks++;
    if (symbols != (LEN + TAIL) / 8) begin failures++; $display("FAIL: %0d symbols sent", symbols); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
