// pretraceback_ptr_tb: pointer registers for K = 5 (16 states) fed random decision
// vectors in blocks of L = 8 columns. After every step, the register of each state
// must equal the result of a conventional traceback (predecessor = {d, s >> 1}) from
// that state back through all columns of the current block, i.e. the state at the
// start of the block; `target` must equal the register of state 0.
module pretraceback_ptr_tb;
  localparam int K = 5, M = K - 1, NS = 1 << M, L = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step = 1'b0, first = 1'b0;
  logic [NS-1:0] dec = '0;
  logic [NS-1:0][M-1:0] ptr;
  logic [M-1:0] target;
  int checks = 0, failures = 0;

  pretraceback_ptr #(.K(K), .SEL(0)) dut (.clk, .rst_n, .step, .first, .dec, .ptr, .target);
  always #5 clk = ~clk;

  logic [NS-1:0] cols [L];

  function automatic int traceback(int s, int upto);
    for (int c = upto; c >= 0; c--) s = (int'(cols[c][s]) << (M - 1)) | (s >> 1);
    return s;
  endfunction

  initial begin
    int c = 0;
    int exp_t;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20 * L; n++) begin
      automatic bit v = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      step = v; first = (c == 0); dec = NS'($urandom);
      #1;
      exp_t = -1;
      if (v) begin
        cols[c] = dec;
        exp_t = traceback(0, c);
        checks++;
        if (int'(target) != exp_t) begin
          failures++;
          if (failures < 10) $display("FAIL: target %0d expected %0d", target, exp_t);
        end
      end
      @(posedge clk);
      #1;
      if (v) begin
        for (int i = 0; i < NS; i++) begin
          checks++;
          if (int'(ptr[i]) != traceback(i, c)) begin
            failures++;
            if (failures < 10) $display("FAIL: col %0d state %0d ptr %0d expected %0d", c, i, ptr[i], traceback(i, c));
          end
        end
        c = (c + 1) % L;
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
