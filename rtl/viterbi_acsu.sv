// viterbi_acsu: add-compare-select unit with its path metric memory (PMM).
//
// Trellis of the rate 1/2, constraint length 3 code: state {s1,s0}, input u
// leads from state p to {u, p[1]} with code pair conv_code(u, p). Each next
// state n therefore has the two predecessors {n[0], 0} and {n[0], 1}. For
// every n the unit adds the branch metric of each incoming branch to that
// predecessor's path metric, compares the two sums and keeps the smaller
// (the predecessor with s0 = 0 on a tie). The decision bit dec[n] is the s0
// of the surviving predecessor. The new metrics are stored in the PMM after
// subtracting their minimum, so they stay small and PM_W bits suffice;
// best_state is a state with metric 0 after that.
//
// Timing: one trellis step per in_valid; dec, best_state and out_valid are
// registered with the metrics (latency one clock). Reset and `clear` set
// state 00 to metric 0 and the others to INIT_PM, since the encoder starts in
// state 00. Normalisation, widths and initial metrics are this design's
// choices; the add, compare and select and the PMM feedback are the design's.
module viterbi_acsu
  import mccdma_pkg::*;
#(
  parameter int PM_W    = 6,
  parameter int INIT_PM = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [1:0]      bm [4],
  output logic            out_valid,
  output logic [3:0]      dec,          // dec[n]: s0 of n's surviving predecessor
  output logic [1:0]      best_state,
  output logic [PM_W-1:0] pm [4]        // path metric memory
);

  logic [PM_W-1:0] sum_new [4];
  logic [PM_W-1:0] pm_min;
  logic [3:0]      dec_d;
  logic [1:0]      best_d;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      logic [1:0]      p0, p1;
      logic [PM_W-1:0] m0, m1;
      p0 = {n[0], 1'b0};
      p1 = {n[0], 1'b1};
      m0 = pm[p0] + PM_W'(bm[conv_code(n[1], p0)]);
      m1 = pm[p1] + PM_W'(bm[conv_code(n[1], p1)]);
      dec_d[n]   = (m1 < m0);
      sum_new[n] = (m1 < m0) ? m1 : m0;
    end
    pm_min = sum_new[0];
    best_d = 2'd0;
    for (int n = 1; n < 4; n++) begin
      if (sum_new[n] < pm_min) begin
        pm_min = sum_new[n];
        best_d = 2'(n);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      out_valid  <= 1'b0;
      dec        <= '0;
      best_state <= 2'd0;
      pm[0]      <= '0;
      for (int n = 1; n < 4; n++) pm[n] <= PM_W'(INIT_PM);
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dec        <= dec_d;
        best_state <= best_d;
        for (int n = 0; n < 4; n++) pm[n] <= sum_new[n] - pm_min;
      end
    end
  end

endmodule
