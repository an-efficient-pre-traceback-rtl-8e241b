// lifo_tb: two stacks of L = 8. Random bits are pushed at positions 0..L-1 of one
// stack per block while the other is popped; after the first block every popped bit
// must be the bit pushed at position L-1-idx of the previous block, one clock after
// its step, with out_valid tracking pop_en.
module lifo_tb;
  localparam int L = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step = 1'b0, sel = 1'b0, push_bit = 1'b0, pop_en = 1'b0;
  logic [2:0] idx = '0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;

  lifo #(.L(L)) dut (.clk, .rst_n, .step, .sel, .idx, .push_bit, .pop_en, .out_valid, .out_bit);
  always #5 clk = ~clk;

  bit pushed [2][L];

  initial begin
    int c = 0, blk = 0;
    bit exp_b;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 40 * L; n++) begin
      automatic bit v = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      step = v; sel = bit'(blk & 1); idx = 3'(c); push_bit = bit'($urandom_range(0, 1));
      pop_en = (blk > 0);
      exp_b = pushed[~sel][L - 1 - c];
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != (v && blk > 0)) begin failures++; $display("FAIL: out_valid"); end
      if (v) begin
        pushed[sel][c] = push_bit;
        if (blk > 0) begin
          checks++;
          if (out_bit != exp_b) begin
            failures++;
            if (failures < 10) $display("FAIL: block %0d idx %0d popped %0d expected %0d", blk, c, out_bit, exp_b);
          end
        end
        c++;
        if (c == L) begin c = 0; blk++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
