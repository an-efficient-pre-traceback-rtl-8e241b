// smu_tb: survivor memory unit for K = 5, L = 16, fed random decision vectors with
// random gaps. The reference is a conventional traceback over the stored vectors:
// for block j it traces state 0 back from the end of block j+1 through L columns to
// find the start state, then traces block j from there; bit 0 of each state visited
// is the decoded bit. The unit must emit block j in order while block j+3 is written,
// one clock after each step.
module smu_tb;
  localparam int K = 5, M = K - 1, NS = 1 << M, L = 16, NBLK = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_valid = 1'b0;
  logic [NS-1:0] dec = '0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;

  smu #(.K(K), .L(L)) dut (.clk, .rst_n, .dec_valid, .dec, .out_valid, .out_bit);
  always #5 clk = ~clk;

  logic [NS-1:0] cols [NBLK * L];
  bit expd [NBLK * L];
  int n_out = 0;

  initial begin
    int n = 0;
    for (int i = 0; i < NBLK * L; i++) cols[i] = NS'($urandom);
    // reference decode of every block that has a following block
    for (int j = 0; j + 1 < NBLK; j++) begin
      automatic int s = 0;
      for (int i = (j + 2) * L - 1; i >= (j + 1) * L; i--) s = (int'(cols[i][s]) << (M - 1)) | (s >> 1);
      for (int i = (j + 1) * L - 1; i >= j * L; i--) begin
        expd[i] = bit'(s & 1);
        s = (int'(cols[i][s]) << (M - 1)) | (s >> 1);
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (n < NBLK * L) begin
      automatic bit v = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      dec_valid = v;
      dec = cols[n];
      @(posedge clk);
      if (v) n++;
    end
    @(negedge clk);
    dec_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != (NBLK - 3) * L) begin
      failures++;
      $display("FAIL: %0d bits out, expected %0d", n_out, (NBLK - 3) * L);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit v_q = 0;   // a step that should produce an output bit
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != v_q) begin
        failures++;
        $display("FAIL: out_valid timing");
      end
      if (out_valid) begin
        checks++;
        if (out_bit != expd[n_out]) begin
          failures++;
          if (failures < 10) $display("FAIL: bit %0d = %0d expected %0d", n_out, out_bit, expd[n_out]);
        end
        n_out++;
      end
    end
  end
  int steps = 0;
  always @(posedge clk) begin
    v_q <= dec_valid && (steps >= 3 * L);
    if (dec_valid) steps <= steps + 1;
  end

  initial begin
    repeat (20 * NBLK * L) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
