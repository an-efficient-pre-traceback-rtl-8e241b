// acs: add-compare-select unit, fully parallel over the 2^(K-1) trellis states.
//
// For every state s the two candidate predecessors are {0, s>>1} and {1, s>>1}. Each
// candidate's path metric plus the metric of its branch label is compared, the smaller
// survives, and the decision bit (1 = predecessor {1, s>>1} won, ties go to 0) is the
// bit that the survivor memory stores for s. One trellis step is taken per clock with
// bm_valid high; the new path metrics and the decision vector are registered, so
// dec_valid follows bm_valid by one clock. Path metrics are PM_W-bit unsigned numbers
// that are allowed to wrap: two metrics are compared through the sign of their
// difference, which is exact while their spread stays below 2^(PM_W-1); the spread is
// bounded by (K-1) times the largest branch metric. Reset puts state 0 at metric 0 and
// every other state at INIT_BIAS, since a coder starts in state 0. The parallel
// structure, the wrap-around metric and the reset values are this design's choices;
// the source of the architecture only names the unit.
module acs
  import viterbi_pkg::*;
#(
  parameter int unsigned K         = 7,
  parameter int unsigned G0        = 'o133,
  parameter int unsigned G1        = 'o171,
  parameter int unsigned BM_W      = 4,
  parameter int unsigned PM_W      = 9,
  parameter int unsigned INIT_BIAS = 64,
  localparam int unsigned M        = K - 1,
  localparam int unsigned NS       = 1 << M
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   bm_valid,
  input  logic [3:0][BM_W-1:0]   bm,
  output logic                   dec_valid,
  output logic [NS-1:0]          dec,       // decision bit of each state
  output logic [NS-1:0][PM_W-1:0] pm        // path metrics after the last step
);
  logic [NS-1:0]           dec_d;
  logic [NS-1:0][PM_W-1:0] pm_d;

  always_comb begin
    for (int unsigned s = 0; s < NS; s++) begin
      logic [PM_W-1:0] m0, m1, diff;
      logic [1:0]      lab0, lab1;
      lab0 = branch_label(s, 1'b0, K, G0, G1);
      lab1 = branch_label(s, 1'b1, K, G0, G1);
      m0   = pm[pred_state(s, 1'b0, M)] + PM_W'(bm[lab0]);
      m1   = pm[pred_state(s, 1'b1, M)] + PM_W'(bm[lab1]);
      diff = m0 - m1;
      // m1 strictly smaller than m0 (modulo compare)
      dec_d[s] = !diff[PM_W-1] && (diff != '0);
      pm_d[s]  = dec_d[s] ? m1 : m0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec       <= '0;
      for (int unsigned s = 0; s < NS; s++)
        pm[s] <= (s == 0) ? '0 : PM_W'(INIT_BIAS);
    end else begin
      dec_valid <= bm_valid;
      if (bm_valid) begin
        dec <= dec_d;
        pm  <= pm_d;
      end
    end
  end
endmodule
