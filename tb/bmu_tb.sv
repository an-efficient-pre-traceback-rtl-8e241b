// bmu_tb: checks the four branch metrics of random soft pairs against the distance
// rule (level for an expected 0, 7 - level for an expected 1, summed over the pair),
// the one-clock register delay, and that the metrics hold while in_valid is low.
module bmu_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0][2:0] in_sym = '0;
  logic bm_valid;
  logic [3:0][3:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.clk, .rst_n, .in_valid, .in_sym, .bm_valid, .bm);

  always #5 clk = ~clk;

  function automatic int expect_bm(int s0, int s1, int lab);
    return ((lab & 1) ? 7 - s0 : s0) + ((lab & 2) ? 7 - s1 : s1);
  endfunction

  initial begin
    int s0, s1, ps0, ps1;
    bit loaded = 0;   // metrics are 0 until the first valid pair
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    ps0 = 0; ps1 = 0;
    for (int n = 0; n < 400; n++) begin
      automatic bit v = ($urandom_range(0, 3) != 0);
      s0 = $urandom_range(0, 7);
      s1 = $urandom_range(0, 7);
      @(negedge clk);
      in_valid  = v;
      in_sym[0] = 3'(s0);
      in_sym[1] = 3'(s1);
      @(posedge clk);
      #1;
      checks++;
      if (bm_valid != v) begin failures++; $display("FAIL: bm_valid"); end
      if (v) begin ps0 = s0; ps1 = s1; loaded = 1; end
      for (int lab = 0; lab < 4; lab++) begin
        checks++;
        if (int'(bm[lab]) != (loaded ? expect_bm(ps0, ps1, lab) : 0)) begin
          failures++;
          $display("FAIL: sym %0d,%0d label %0d: bm %0d expected %0d", ps0, ps1, lab, bm[lab], expect_bm(ps0, ps1, lab));
        end
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
