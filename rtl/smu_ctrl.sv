// smu_ctrl: schedule of the pre-traceback survivor memory unit.
//
// The survivor memory is three banks of L columns used in rotation. While decision
// vectors are written (WR) into bank b with an increasing column address, the bank
// written two blocks earlier, (b+1) mod 3, is decoded (DC) with a decreasing column
// address, and the bank written one block earlier, (b+2) mod 3, waits for its start
// state. Every L steps the roles rotate. Everything advances only on `step`, one
// trellis step, so WR and DC run at the same rate.
//
// Outputs: the write bank and column; `first` and `last` mark the first and last
// column of a block (pointer re-initialisation and DC start register load); the read
// address pf_bank/pf_col (combinational) is the DC column of the *next* step, so
// that a memory with a registered read port, read at this step, delivers it in time; lifo_sel picks the stack being pushed
// (the other is popped) and toggles every block; dc_en and out_en rise after two and
// three complete blocks, when the DC and the LIFO output first carry real data. The
// rotation and the three-bank split follow the architecture; the read prefetch and
// the warm-up flags are this design's choices.
module smu_ctrl #(
  parameter int unsigned L     = 64,
  localparam int unsigned CW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  output logic [1:0]    wr_bank,
  output logic [CW-1:0] wr_col,
  output logic          first,
  output logic          last,
  output logic [1:0]    pf_bank,
  output logic [CW-1:0] pf_col,
  output logic          lifo_sel,
  output logic          dc_en,
  output logic          out_en
);
  logic [1:0]    blocks;     // completed blocks, saturating at 3
  logic [CW-1:0] col_n;
  logic [1:0]    bank_n;

  assign first = (wr_col == '0);
  assign last  = (wr_col == CW'(L - 1));
  assign dc_en  = (blocks >= 2'd2);
  assign out_en = (blocks == 2'd3);

  function automatic logic [1:0] bank_inc(logic [1:0] b);
    return (b == 2'd2) ? 2'd0 : b + 2'd1;
  endfunction

  // position of the step after this one
  always_comb begin
    col_n  = last ? '0 : wr_col + 1'b1;
    bank_n = last ? bank_inc(wr_bank) : wr_bank;
  end

  // DC column of the next step: bank written two blocks before it, mirrored column
  assign pf_col  = CW'(L - 1) - col_n;
  assign pf_bank = bank_inc(bank_n);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_col   <= '0;
      wr_bank  <= 2'd0;
      lifo_sel <= 1'b0;
      blocks   <= 2'd0;
    end else if (step) begin
      wr_col  <= col_n;
      wr_bank <= bank_n;
      if (last) begin
        lifo_sel <= ~lifo_sel;
        if (blocks != 2'd3) blocks <= blocks + 2'd1;
      end
    end
  end
endmodule
