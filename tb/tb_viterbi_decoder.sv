// tb_viterbi_decoder: messages of random bits followed by DEPTH zero bits
// are encoded with the state-table model; one code bit in every block of 16
// pairs is flipped at a random place. The decoder must return every message
// bit. The first message is sent back to back and the latency checked (the
// bit of pair t leaves 2 clocks after pair t + DEPTH - 1 goes in); the
// second, after a clear, with random idle clocks.
module tb_viterbi_decoder;
  import tb_ref_pkg::*;

  localparam int DEPTH = 15;
  localparam int LEN   = 400;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0;
  logic [1:0] in_code = 0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;
  int flips = 0;

  viterbi_decoder #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_q[$];
  int in_cycle[$];
  int cycle = 0;
  bit timed = 0;
  int nout = 0;
  always @(posedge clk) cycle++;

  task automatic send_message(input bit gaps);
    logic [1:0] st;
    int errpos;
    st = 2'b00;
    errpos = $urandom % 16;
    for (int i = 0; i < LEN + DEPTH; i++) begin
      bit u;
      int idx;
      logic [1:0] c;
      u   = (i < LEN) ? 1'($urandom) : 1'b0;
      idx = {st, u};
      c   = ENC_OUT[idx];
      st  = ENC_NEXT[idx];
      if (i % 16 == errpos) begin
        c ^= (($urandom % 2) != 0) ? 2'b10 : 2'b01;
        flips++;
      end
      if (i % 16 == 15) errpos = $urandom % 16;
      if (gaps) while (($urandom % 3) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_code  = c;
      if (i < LEN) exp_q.push_back(u);
      else if (i == LEN) exp_q.push_back(1'b0);   // DEPTH pairs after bit t release it
      in_cycle.push_back(cycle);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    timed = 1;
    send_message(0);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d bits not decoded", exp_q.size());
    end
    timed = 0;
    clear = 1;
    exp_q.delete();
    in_cycle.delete();
    nout = 0;
    @(negedge clk);
    clear = 0;
    send_message(1);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d bits not decoded", exp_q.size());
    end
    $display("code bits flipped: %0d", flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sampled on the falling edge, when every register update of the rising
  // edge is complete; `cycle` then counts rising edges without a race.
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_bit !== exp_q.pop_front()) begin
      failures++;
      $display("FAIL: decoded bit %0d wrong", nout);
    end
    if (timed) begin
      checks++;
      if (cycle - in_cycle[nout + DEPTH - 1] != 2) begin
        failures++;
        $display("FAIL: bit %0d latency %0d", nout, cycle - in_cycle[nout + DEPTH - 1]);
      end
    end
    nout++;
  end

endmodule
