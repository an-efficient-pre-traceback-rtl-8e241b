// dc_unit_tb: decode-read for K = 5 over blocks of L = 8 random columns. A random
// target is loaded at the last step of each block; in the next block the unit walks
// the supplied columns from it, and each step's bit must equal bit 0 of the state a
// reference traceback (predecessor = {d, s >> 1}) reaches from the target.
module dc_unit_tb;
  localparam int K = 5, M = K - 1, NS = 1 << M, L = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step = 1'b0, first = 1'b0, last = 1'b0;
  logic [M-1:0] target = '0;
  logic [NS-1:0] rdata = '0;
  logic bit_out;
  logic [M-1:0] start_reg;
  int checks = 0, failures = 0;

  dc_unit #(.K(K)) dut (.clk, .rst_n, .step, .first, .last, .target, .rdata, .bit_out, .start_reg);
  always #5 clk = ~clk;

  initial begin
    int c = 0, st = 0, next_start = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 30 * L; n++) begin
      automatic bit v = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      step = v; first = (c == 0); last = (c == L - 1);
      rdata = NS'($urandom); target = M'($urandom);
      #1;
      if (v) begin
        if (c == 0) st = next_start;
        if (n > L) begin   // the first block has no loaded start
          checks++;
          if (bit_out != bit'(st & 1)) begin
            failures++;
            if (failures < 10) $display("FAIL: step %0d bit %0d expected %0d", n, bit_out, st & 1);
          end
        end
        st = (int'(rdata[st]) << (M - 1)) | (st >> 1);
        if (c == L - 1) next_start = int'(target);
        c = (c + 1) % L;
      end
      @(posedge clk);
      #1;
      checks++;
      if (int'(start_reg) != next_start && n > L) begin
        failures++;
        if (failures < 10) $display("FAIL: start register %0d expected %0d", start_reg, next_start);
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
