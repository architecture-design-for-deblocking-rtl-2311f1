// dbf_sram_sp_tb: both SRAM sizes of the design (96x32 and 64x32) with random
// writes and reads against an array model. A read shows the addressed word in
// the same cycle; a write lands at the clock edge.
module dbf_sram_sp_tb;
  logic clk = 0;
  logic we0 = 0, we1 = 0;
  logic [6:0] a0 = '0, a1 = '0;
  logic [31:0] d0 = '0, d1 = '0, q0, q1;
  logic [31:0] m0 [96], m1 [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dbf_sram_sp #(.DEPTH(96), .AW(7)) u0 (.clk, .we(we0), .addr(a0), .wdata(d0), .rdata(q0));
  dbf_sram_sp #(.DEPTH(64), .AW(7)) u1 (.clk, .we(we1), .addr(a1), .wdata(d1), .rdata(q1));

  initial begin
    // fill both completely
    for (int i = 0; i < 96; i++) begin
      @(negedge clk); we0 = 1; a0 = 7'(i); d0 = $urandom; m0[i] = d0;
      we1 = i < 64; a1 = 7'(i % 64); d1 = $urandom; if (i < 64) m1[i] = d1;
    end
    @(negedge clk); we0 = 0; we1 = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we0 = 1'($urandom_range(0, 1)); a0 = 7'($urandom_range(0, 95)); d0 = $urandom;
      we1 = 1'($urandom_range(0, 1)); a1 = 7'($urandom_range(0, 63)); d1 = $urandom;
      #1;
      if (!we0) begin checks++; if (q0 !== m0[a0]) failures++; end
      if (!we1) begin checks++; if (q1 !== m1[a1]) failures++; end
      if (we0) m0[a0] = d0;
      if (we1) m1[a1] = d1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
