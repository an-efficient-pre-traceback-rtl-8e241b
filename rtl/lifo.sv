// lifo: two-stack bit-order reversal after the decode-read.
//
// Two stacks of L bits. During one block the decode-read pushes its bits, newest
// first, into stack `sel` at position idx = 0..L-1, while the other stack, filled in
// the block before, is popped from position L-1-idx, so its bits leave oldest first.
// The roles swap every block (sel toggles). A pop happens on every `step` with pop_en
// high; the popped bit is registered into out_bit with out_valid one clock later.
// Both stacks are cleared by reset.
module lifo #(
  parameter int unsigned L   = 64,
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          sel,
  input  logic [CW-1:0] idx,
  input  logic          push_bit,
  input  logic          pop_en,
  output logic          out_valid,
  output logic          out_bit
);
  logic [L-1:0] stack0, stack1;
  logic [CW-1:0] pop_idx;

  assign pop_idx = CW'(L - 1) - idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stack0    <= '0;
      stack1    <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= step && pop_en;
      if (step) begin
        if (sel) begin
          stack1[idx] <= push_bit;
          out_bit     <= stack0[pop_idx];
        end else begin
          stack0[idx] <= push_bit;
          out_bit     <= stack1[pop_idx];
        end
      end
    end
  end
endmodule
