// tb_despreader: feeds the despreader with the output of a reference
// spreader (random data XOR the PN model) at random intervals and checks that
// the original data come back, one clock after each input.
module tb_despreader;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0;
  logic [1:0] in_code = 0;
  logic out_valid;
  logic [1:0] out_code;
  int checks = 0, failures = 0;

  despreader dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pn_model m;
  logic [1:0] exp_q[$];
  int outs = 0, ins = 0;

  initial begin
    m = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      if (in_valid) begin
        logic [1:0] d;
        bit c0, c1;
        d  = 2'($urandom);
        c0 = m.next();
        c1 = m.next();
        in_code = d ^ {c0, c1};
        exp_q.push_back(d);
        ins++;
      end else in_code = 2'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (outs != ins) begin
      failures++;
      $display("FAIL: %0d inputs, %0d outputs", ins, outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_in = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== prev_in) begin
      failures++;
      $display("FAIL: latency is not one clock");
    end
    if (out_valid) begin
      outs++;
      checks++;
      if (exp_q.size() == 0 || out_code !== exp_q.pop_front()) begin
        failures++;
        $display("FAIL: wrong output %b", out_code);
      end
    end
    prev_in = in_valid;
  end

endmodule
