// survivor_mem_tb: small survivor memory (3 banks x 4 columns x 8 bits). Random
// writes and reads against a reference array; a read returns its column one clock
// later and holds while re is low. Writes and reads in one clock go to different
// banks, as in the decoder's schedule.
module survivor_mem_tb;
  localparam int NS = 8, L = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [1:0] wbank = '0, rbank = '0;
  logic [1:0] wcol = '0, rcol = '0;
  logic [NS-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  survivor_mem #(.NS(NS), .L(L), .BANKS(3)) dut (.clk, .rst_n, .we, .wbank, .wcol, .wdata,
                                                .re, .rbank, .rcol, .rdata);
  always #5 clk = ~clk;

  logic [NS-1:0] ref_mem [3][L];
  logic [NS-1:0] exp_q;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // fill every column first
    for (int b = 0; b < 3; b++)
      for (int c = 0; c < L; c++) begin
        @(negedge clk);
        we = 1; wbank = 2'(b); wcol = 2'(c); wdata = NS'($urandom);
        ref_mem[b][c] = wdata;
      end
    @(negedge clk);
    we = 0;
    exp_q = '0;
    for (int n = 0; n < 500; n++) begin
      automatic int wb = $urandom_range(0, 2);
      automatic int rb = (wb + 1 + $urandom_range(0, 1)) % 3;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); wbank = 2'(wb); wcol = 2'($urandom_range(0, L - 1));
      wdata = NS'($urandom);
      re = ($urandom_range(0, 3) != 0); rbank = 2'(rb); rcol = 2'($urandom_range(0, L - 1));
      if (re) exp_q = ref_mem[rb][rcol];
      @(posedge clk);
      #1;
      if (we) ref_mem[wb][wcol] = wdata;
      checks++;
      if (rdata != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d/%0d got %h expected %h", rb, rcol, rdata, exp_q);
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
