// smu_ctrl_tb: schedule for L = 4. Checks the write column and bank sequence
// (0..L-1, banks 0,1,2 in turn), first/last, the read address (next step's DC
// column: bank (write bank + 1) mod 3, column L-1-col), the LIFO select toggling per
// block, and dc_en / out_en rising after two and three blocks.
module smu_ctrl_tb;
  localparam int L = 4;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [1:0] wr_bank, pf_bank;
  logic [1:0] wr_col, pf_col;
  logic first, last, lifo_sel, dc_en, out_en;
  int checks = 0, failures = 0;

  smu_ctrl #(.L(L)) dut (.clk, .rst_n, .step, .wr_bank, .wr_col, .first, .last, .pf_bank,
                         .pf_col, .lifo_sel, .dc_en, .out_en);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n = 0;   // steps taken
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (n < 12 * L) begin
      automatic bit v = ($urandom_range(0, 3) != 0);
      automatic int c = n % L, b = (n / L) % 3, blk = n / L;
      automatic int n1 = n + 1;
      @(negedge clk);
      step = v;
      #1;
      check(int'(wr_col) == c, "write column");
      check(int'(wr_bank) == b, "write bank");
      check(first == (c == 0), "first");
      check(last == (c == L - 1), "last");
      check(int'(pf_col) == L - 1 - (n1 % L), "read column");
      check(int'(pf_bank) == ((n1 / L) % 3 + 1) % 3, "read bank");
      check(lifo_sel == bit'(blk & 1), "lifo select");
      check(dc_en == (blk >= 2), "dc_en");
      check(out_en == (blk >= 3), "out_en");
      @(posedge clk);
      if (v) n++;
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
