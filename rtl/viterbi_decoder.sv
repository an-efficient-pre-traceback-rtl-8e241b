// viterbi_decoder: rate-1/2 soft-decision Viterbi decoder with a pre-traceback
// survivor memory unit.
//
// Data path: bmu (branch metrics of the received soft pair, registered) -> acs (all
// 2^(K-1) states in parallel, one trellis step per clock, decision vector registered)
// -> smu (pre-traceback survivor memory, decode-read and LIFO). One received symbol
// pair is accepted per clock with in_valid high; in_valid may drop at any time and
// every stage then holds. Decoded bits leave in order, one per accepted pair: the bit
// coded by pair n leaves when pair n + 3L is accepted, 3 clocks later (one each for
// the bmu, the acs and the LIFO output register). The first 3L pairs yield nothing,
// and the last 3L bits of a stream come out only as further pairs are fed in.
//
// Defaults: K = 7 (64 states), truncation length L = 64, 3-bit soft input. The code
// polynomials (133, 171 octal) are the common K = 7 pair and are this design's choice;
// for K = 9 set e.g. G0 = 'o561, G1 = 'o753. The ACS path metrics (pm) are left
// unread here; they are kept as an observation point for simulation.
module viterbi_decoder #(
  parameter int unsigned K      = 7,
  parameter int unsigned L      = 64,
  parameter int unsigned SOFT_W = 3,
  parameter int unsigned G0     = 'o133,
  parameter int unsigned G1     = 'o171,
  parameter int unsigned PM_W   = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [1:0][SOFT_W-1:0] in_sym,
  output logic                   out_valid,
  output logic                   out_bit
);
  localparam int unsigned BM_W = SOFT_W + 1;
  localparam int unsigned NS   = 1 << (K - 1);

  logic                   bm_valid, dec_valid;
  logic [3:0][BM_W-1:0]   bm;
  logic [NS-1:0]          dec;
  logic [NS-1:0][PM_W-1:0] pm;

  bmu #(.SOFT_W(SOFT_W), .BM_W(BM_W)) u_bmu (
    .clk, .rst_n, .in_valid, .in_sym, .bm_valid, .bm
  );

  acs #(.K(K), .G0(G0), .G1(G1), .BM_W(BM_W), .PM_W(PM_W), .INIT_BIAS(1 << (PM_W - 3))) u_acs (
    .clk, .rst_n, .bm_valid, .bm, .dec_valid, .dec, .pm
  );

  smu #(.K(K), .L(L)) u_smu (
    .clk, .rst_n, .dec_valid, .dec, .out_valid, .out_bit
  );
endmodule
