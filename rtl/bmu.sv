// bmu: branch metric unit of a rate-1/2 soft-decision Viterbi decoder.
//
// Each received coded bit arrives as a SOFT_W-bit level, 0 meaning a confident 0 and
// 2^SOFT_W-1 a confident 1 (3 bits, 8 levels, as in the decoder this follows). The
// distance of a level r to an expected bit is r for a 0 and (2^SOFT_W-1)-r for a 1,
// and the metric of a branch label {c1, c0} is the sum of the distances of the two
// received levels; smaller is better. The four metrics are registered: bm_valid
// follows in_valid one clock later. The soft-level coding and the absolute-distance
// metric are this design's choice; only the 3-bit, 8-level input is given.
module bmu #(
  parameter int unsigned SOFT_W = 3,
  parameter int unsigned BM_W   = SOFT_W + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [1:0][SOFT_W-1:0]        in_sym,    // [0] = c0, [1] = c1
  output logic                          bm_valid,
  output logic [3:0][BM_W-1:0]          bm         // indexed by label {c1, c0}
);
  localparam logic [SOFT_W-1:0] MAXL = '1;

  logic [3:0][BM_W-1:0] bm_d;

  always_comb begin
    for (int lab = 0; lab < 4; lab++) begin
      logic [SOFT_W-1:0] d0, d1;
      d0 = lab[0] ? MAXL - in_sym[0] : in_sym[0];
      d1 = lab[1] ? MAXL - in_sym[1] : in_sym[1];
      bm_d[lab] = BM_W'(d0) + BM_W'(d1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bm_valid <= 1'b0;
      bm       <= '0;
    end else begin
      bm_valid <= in_valid;
      if (in_valid) bm <= bm_d;
    end
  end
endmodule
