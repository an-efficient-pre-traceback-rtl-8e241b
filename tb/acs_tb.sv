// acs_tb: runs the ACS unit (K = 7, 133/171 octal) on random branch metrics and
// compares every decision bit and every path metric (modulo 2^PM_W) with a reference
// trellis kept in full-width integers. The reference derives each branch label from
// a shift-register view of the coder: entering state s from the predecessor whose
// oldest bit is d, the window of information bits is s[0] (newest) .. s[5], d.
module acs_tb;
  localparam int K = 7, M = K - 1, NS = 1 << M, PM_W = 9, BIAS = 64;
  localparam int G0 = 'o133, G1 = 'o171;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bm_valid = 1'b0;
  logic [3:0][3:0] bm = '0;
  logic dec_valid;
  logic [NS-1:0] dec;
  logic [NS-1:0][PM_W-1:0] pm;
  int checks = 0, failures = 0;

  acs #(.K(K), .G0(G0), .G1(G1), .BM_W(4), .PM_W(PM_W), .INIT_BIAS(BIAS)) dut (
    .clk, .rst_n, .bm_valid, .bm, .dec_valid, .dec, .pm);

  always #5 clk = ~clk;

  longint ref_pm [NS];
  bit     ref_dec[NS];

  function automatic int label(int s, int d);
    int u[K];
    automatic int c0 = 0, c1 = 0;
    for (int t = 0; t < M; t++) u[t] = (s >> t) & 1;
    u[M] = d;
    for (int t = 0; t < K; t++) begin
      if ((G0 >> (K - 1 - t)) & 1) c0 ^= u[t];
      if ((G1 >> (K - 1 - t)) & 1) c1 ^= u[t];
    end
    return c1 * 2 + c0;
  endfunction

  initial begin
    int b[4];
    longint nw[NS];
    for (int s = 0; s < NS; s++) ref_pm[s] = (s == 0) ? 0 : BIAS;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 600; n++) begin
      automatic bit v = ($urandom_range(0, 4) != 0);
      for (int l = 0; l < 4; l++) b[l] = $urandom_range(0, 14);
      @(negedge clk);
      bm_valid = v;
      for (int l = 0; l < 4; l++) bm[l] = 4'(b[l]);
      if (v) begin
        for (int s = 0; s < NS; s++) begin
          automatic int p0 = (s >> 1), p1 = (1 << (M - 1)) | (s >> 1);
          automatic longint m0 = ref_pm[p0] + b[label(s, 0)];
          automatic longint m1 = ref_pm[p1] + b[label(s, 1)];
          ref_dec[s] = (m1 < m0);
          nw[s] = (m1 < m0) ? m1 : m0;
        end
        for (int s = 0; s < NS; s++) ref_pm[s] = nw[s];
      end
      @(posedge clk);
      #1;
      checks++;
      if (dec_valid != v) begin failures++; $display("FAIL: dec_valid at step %0d", n); end
      for (int s = 0; s < NS; s++) begin
        checks += 2;
        if (v && dec[s] != ref_dec[s]) begin
          failures++;
          if (failures < 10) $display("FAIL: step %0d state %0d decision %0d expected %0d", n, s, dec[s], ref_dec[s]);
        end
        if (pm[s] != PM_W'(ref_pm[s])) begin
          failures++;
          if (failures < 10) $display("FAIL: step %0d state %0d metric %0d expected %0d", n, s, pm[s], PM_W'(ref_pm[s]));
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
