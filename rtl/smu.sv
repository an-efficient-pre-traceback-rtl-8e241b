// smu: pre-traceback survivor memory unit.
//
// Takes one decision vector per step (dec_valid) and gives one decoded bit per step,
// in order, 3L steps later. Only two memory operations run:
//   WR  writes the decision vector into column c of the write bank and, in the same
//       step, updates the pointer registers (pretraceback_ptr), so that after the
//       last column of a block the register of any state points to the state at the
//       block's start, i.e. the end state of the previous block;
//   DC  loads that state into the DC start register and, during the following block,
//       walks the previous-but-one block backwards from it (dc_unit), pushing one bit
//       per step into the two-stack LIFO, whose other stack is popped meanwhile.
// No traceback read is needed, so each decision bit is read once, and three banks of
// L columns suffice (survivor_mem). smu_ctrl supplies the rotation. Output bits are
// valid once three blocks have passed; out_valid follows the step by one clock.
// The pointer registers, the DC start register and dc_en are wired out of their
// blocks only as observation points for simulation; nothing here reads them.
module smu #(
  parameter int unsigned K   = 7,
  parameter int unsigned L   = 64,
  localparam int unsigned M  = K - 1,
  localparam int unsigned NS = 1 << M,
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dec_valid,
  input  logic [NS-1:0] dec,
  output logic          out_valid,
  output logic          out_bit
);
  logic [1:0]           wr_bank, pf_bank;
  logic [CW-1:0]        wr_col, pf_col;
  logic                 first, last, lifo_sel, dc_en, out_en;
  logic [NS-1:0]        rdata;
  logic [NS-1:0][M-1:0] ptr;
  logic [M-1:0]         target, start_reg;
  logic                 dc_bit;

  smu_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .step(dec_valid),
    .wr_bank, .wr_col, .first, .last, .pf_bank, .pf_col, .lifo_sel, .dc_en, .out_en
  );

  survivor_mem #(.NS(NS), .L(L), .BANKS(3)) u_mem (
    .clk, .rst_n,
    .we(dec_valid), .wbank(wr_bank), .wcol(wr_col), .wdata(dec),
    .re(dec_valid), .rbank(pf_bank), .rcol(pf_col), .rdata
  );

  pretraceback_ptr #(.K(K), .SEL(0)) u_ptr (
    .clk, .rst_n, .step(dec_valid), .first, .dec, .ptr, .target
  );

  dc_unit #(.K(K)) u_dc (
    .clk, .rst_n, .step(dec_valid), .first, .last, .target, .rdata,
    .bit_out(dc_bit), .start_reg
  );

  lifo #(.L(L)) u_lifo (
    .clk, .rst_n, .step(dec_valid), .sel(lifo_sel), .idx(wr_col),
    .push_bit(dc_bit), .pop_en(out_en), .out_valid, .out_bit
  );
endmodule
