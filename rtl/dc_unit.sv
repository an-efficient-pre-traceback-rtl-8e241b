// dc_unit: decode-read of the pre-traceback survivor memory unit, with its DC start
// register.
//
// At the last step of every block the start state found by the pointer registers
// (`target`) is loaded into the DC start register. During the next block but one the
// survivor memory is read backwards, one column per step: at the first step the walk
// starts from the DC start register, afterwards from its own state register. At each
// step the decoded bit is bit 0 of the current state (the newest information bit) and
// the state moves to its predecessor {d, S >> 1}, where d is the current state's bit
// of the column just read. Bits come out newest first, one per step, on bit_out in
// the same cycle as `step`. The recursion and the start register follow the
// architecture; the register-level split is this design's.
module dc_unit #(
  parameter int unsigned K   = 7,
  localparam int unsigned M  = K - 1,
  localparam int unsigned NS = 1 << M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          first,     // first DC column of a block: start from the register
  input  logic          last,      // load the DC start register
  input  logic [M-1:0]  target,
  input  logic [NS-1:0] rdata,     // column being decoded
  output logic          bit_out,
  output logic [M-1:0]  start_reg
);
  logic [M-1:0] state, cur;
  logic         d;

  assign cur     = first ? start_reg : state;
  assign d       = rdata[cur];
  assign bit_out = cur[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      start_reg <= '0;
    end else if (step) begin
      state <= {d, cur[M-1:1]};
      if (last) start_reg <= target;
    end
  end
endmodule
