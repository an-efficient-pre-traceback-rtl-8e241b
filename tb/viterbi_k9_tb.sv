// viterbi_k9_tb: the same end-to-end test as viterbi_decoder_tb for the K = 9 (256
// state) configuration with the rate-1/2 polynomials 561/753 octal and L = 64.
// Random information bits are encoded here, sent as noisy 3-bit soft levels with a
// confident wrong level every ERR_GAP pairs and random input stalls; every decoded
// bit is checked for value and for its latency of 3L accepted pairs plus 3 clocks,
// and each mechanism of the decoder must be seen at least once.
module viterbi_k9_tb;
  localparam int K       = 9;
  localparam int L       = 64;
  localparam int G0      = 'o561;
  localparam int G1      = 'o753;
  localparam int NBITS   = 10000;         // checked information bits
  localparam int NPAIRS  = NBITS + 3 * L; // extra pairs flush the last bits out
  localparam int ERR_GAP = 41;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0][2:0] in_sym = '0;
  logic out_valid, out_bit;

  int checks = 0, failures = 0;

  viterbi_decoder #(.K(K), .L(L), .G0(G0), .G1(G1)) dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_bit);

  always #5 clk = ~clk;

  bit       info   [NPAIRS];
  longint   acc_cyc[NPAIRS];
  longint   cyc = 0;
  int       n_out = 0;
  int       n_stall = 0, n_err = 0, n_reinit = 0, n_dcload = 0, n_swap = 0;
  int       n_wrap = 0, n_conv = 0, n_blocks_end = 0;
  int       bank_used [3] = '{0, 0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit parity_tap(bit hist[K], int g);
    automatic bit p = 0;
    for (int t = 0; t < K; t++) if (((g >> (K - 1 - t)) & 1) != 0) p ^= hist[t];
    return p;
  endfunction

  // Stimulus
  initial begin
    bit hist[K];
    bit c[2];
    for (int t = 0; t < K; t++) hist[t] = 0;
    for (int n = 0; n < NPAIRS; n++) info[n] = bit'($urandom_range(0, 1));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NPAIRS; n++) begin
      while ($urandom_range(0, 9) < 2) begin      // stall
        in_valid <= 1'b0;
        n_stall++;
        @(posedge clk);
      end
      for (int t = K - 1; t > 0; t--) hist[t] = hist[t-1];
      hist[0] = info[n];
      c[0] = parity_tap(hist, G0);
      c[1] = parity_tap(hist, G1);
      for (int j = 0; j < 2; j++)
        in_sym[j] <= c[j] ? 3'(7 - $urandom_range(0, 2)) : 3'($urandom_range(0, 2));
      if (n % ERR_GAP == 7 && n < NBITS) begin
        automatic int j = $urandom_range(0, 1);
        in_sym[j] <= c[j] ? 3'd0 : 3'd7;
        n_err++;
      end
      in_valid   <= 1'b1;
      acc_cyc[n] = cyc + 1;   // cycle count read at the edge that samples it
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    if (n_out != NBITS) begin
      failures++;
      $display("FAIL: %0d bits decoded, %0d expected", n_out, NBITS);
    end
    checks++;
    $display("mechanisms: stalls=%0d channel_errors=%0d ptr_reinit=%0d dc_start_loads=%0d lifo_swaps=%0d pm_wraps=%0d banks=%0d/%0d/%0d converged_blocks=%0d/%0d",
             n_stall, n_err, n_reinit, n_dcload, n_swap, n_wrap,
             bank_used[0], bank_used[1], bank_used[2], n_conv, n_blocks_end);
    if (n_stall == 0 || n_err == 0 || n_reinit == 0 || n_dcload == 0 || n_swap == 0 ||
        n_wrap == 0 || bank_used[0] == 0 || bank_used[1] == 0 || bank_used[2] == 0 ||
        n_conv == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output check: value and latency
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out < NBITS) begin
        checks += 2;
        if (out_bit != info[n_out]) begin
          failures++;
          if (failures < 10) $display("FAIL: bit %0d decoded %0d expected %0d", n_out, out_bit, info[n_out]);
        end
        if (cyc != acc_cyc[n_out + 3 * L] + 3) begin
          failures++;
          if (failures < 10) $display("FAIL: bit %0d left at cycle %0d, expected %0d", n_out, cyc, acc_cyc[n_out + 3 * L] + 3);
        end
      end
      n_out++;
    end
  end

  // Mechanism monitors
  logic [8:0] pm0_q = '0;
  always @(posedge clk) begin
    if (rst_n && dut.dec_valid) begin
      bank_used[dut.u_smu.wr_bank]++;
      if (dut.u_smu.first) n_reinit++;
      if (dut.u_smu.last) begin
        automatic bit same = 1;
        n_dcload++;
        n_swap++;
        n_blocks_end++;
        for (int i = 1; i < (1 << (K - 1)); i++)
          if (dut.u_smu.u_ptr.ptr_d[i] != dut.u_smu.u_ptr.ptr_d[0]) same = 0;
        if (same) n_conv++;
      end
    end
    if (rst_n) begin
      if (dut.pm[0] < pm0_q) n_wrap++;
      pm0_q <= dut.pm[0];
    end
  end

  // Watchdog
  initial begin
    repeat (20 * NPAIRS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
