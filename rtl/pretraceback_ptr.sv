// pretraceback_ptr: the pointer registers of the pre-traceback survivor memory unit.
//
// One M-bit register per trellis state i. After the step that writes column c of a
// block, register i holds the state, at the start of the block, from which the
// survivor of state i descends. It is kept up to date in the forward direction, in
// parallel with the write of the decision vector: with d_i the decision bit of state
// i and p_i = {d_i, i >> 1} its predecessor,
//   first column of a block:  S_i <= p_i        (the registers start as S_j = j)
//   any other column:         S_i <= S_{p_i}    (a multiplexer per state)
// At the last column of a block every register points L steps back; the survivor of
// any state merges by then, so the register of one fixed state, SEL, is taken as the
// start state of the decode-read (`target`, valid in the cycle of a `last` step, from
// the values being written). The update rule is the one the architecture defines;
// the fixed choice SEL = 0 for the "arbitrary" state is this design's.
module pretraceback_ptr
  import viterbi_pkg::*;
#(
  parameter int unsigned K   = 7,
  parameter int unsigned SEL = 0,
  localparam int unsigned M  = K - 1,
  localparam int unsigned NS = 1 << M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,
  input  logic                 first,
  input  logic [NS-1:0]        dec,
  output logic [NS-1:0][M-1:0] ptr,
  output logic [M-1:0]         target
);
  logic [NS-1:0][M-1:0] ptr_d;

  always_comb begin
    for (int unsigned i = 0; i < NS; i++) begin
      int unsigned p;
      p = pred_state(i, dec[i], M);
      ptr_d[i] = first ? M'(p) : ptr[p];
    end
  end

  assign target = ptr_d[SEL];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NS; i++) ptr[i] <= M'(i);
    end else if (step) begin
      ptr <= ptr_d;
    end
  end
endmodule
