// survivor_mem: survivor path memory of the pre-traceback decoder.
//
// BANKS banks of L columns; a column is the NS-bit decision vector of one trellis
// step. There is one write port, used by WR, and one read port, used by DC. The read
// port is registered: rdata holds the column addressed at the last clock with re high.
// Three banks, i.e. 3L columns, is the size that the pre-traceback scheme needs, a
// quarter less than the 4L of a conventional traceback memory. The memory is written
// as a plain array, which a tool may map to registers or to a two-port RAM. An
// assertion states the schedule's rule that WR and DC never use the same bank in
// the same clock, so the two ports never collide.
module survivor_mem #(
  parameter int unsigned NS    = 64,
  parameter int unsigned L     = 64,
  parameter int unsigned BANKS = 3,
  localparam int unsigned CW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [1:0]    wbank,
  input  logic [CW-1:0] wcol,
  input  logic [NS-1:0] wdata,
  input  logic          re,
  input  logic [1:0]    rbank,
  input  logic [CW-1:0] rcol,
  output logic [NS-1:0] rdata
);
  logic [NS-1:0] mem [BANKS*L];

  always_ff @(posedge clk) begin
    if (we) mem[int'(wbank) * L + int'(wcol)] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[int'(rbank) * L + int'(rcol)];
  end

  a_no_bank_collision: assert property (@(posedge clk) disable iff (!rst_n)
    (we && re) |-> (wbank != rbank))
    else $error("survivor_mem: read and write in bank %0d in one clock", wbank);

  a_bank_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (we |-> int'(wbank) < BANKS) and (re |-> int'(rbank) < BANKS))
    else $error("survivor_mem: bank number out of range");
endmodule
