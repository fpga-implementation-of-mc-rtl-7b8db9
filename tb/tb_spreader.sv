// tb_spreader: random code pairs with random back-pressure; every output
// must be the input XOR the next two PN chips of the reference generator
// (first chip on bit 1), in order, one clock after acceptance.
module tb_spreader;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, out_ready = 0;
  logic [1:0] in_code = 0;
  logic in_ready, out_valid;
  logic [1:0] out_code;
  int checks = 0, failures = 0;
  int stalls = 0;

  spreader dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pn_model m;
  logic [1:0] exp_q[$];

  initial begin
    m = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 4) != 0;
      in_code   = 2'($urandom);
      out_ready = ($urandom % 4) != 0;
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || stalls == 0) begin
      failures++;
      $display("FAIL: %0d outputs missing, %0d stalls", exp_q.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_code !== exp_q.pop_front()) begin
        failures++;
        $display("FAIL: wrong output %b at %0t", out_code, $time);
      end
    end
    if (in_valid && in_ready) begin
      bit c0, c1;
      c0 = m.next();
      c1 = m.next();
      exp_q.push_back(in_code ^ {c0, c1});
    end
  end

endmodule
