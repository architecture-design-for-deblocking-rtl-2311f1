// dbf_coding_info_regs_tb: writes random coding information words and checks
// that every field appears on the right output.
module dbf_coding_info_regs_tb;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr = '0;
  logic [31:0] wdata = '0;
  mb_param_t mb;
  blk_info_t cur [16];
  blk_info_t left [4];
  blk_info_t top [4];
  logic [31:0] w [50];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dbf_coding_info_regs dut (.*);

  initial begin
    #12 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 50; i++) begin
        @(negedge clk); we = 1; waddr = 6'(i); wdata = $urandom; w[i] = wdata;
      end
      @(negedge clk); we = 0; waddr = 6'd55; wdata = $urandom;  // out of range: ignored
      @(negedge clk);
      checks += 9;
      if (mb.qp_cur != w[0][5:0]) failures++;
      if (mb.qp_left != w[0][11:6]) failures++;
      if (mb.qp_top != w[0][17:12]) failures++;
      if (mb.offset_a != w[0][22:18]) failures++;
      if (mb.offset_b != w[0][27:23]) failures++;
      if (mb.left_avail != w[0][28]) failures++;
      if (mb.top_avail != w[0][29]) failures++;
      if (mb.sp_si_slice != w[0][30]) failures++;
      if (mb.chroma_qp_offset != w[1][4:0]) failures++;
      for (int i = 0; i < 16; i++) begin
        checks += 9;
        if (cur[i].intra != w[2+2*i][0]) failures++;
        if (cur[i].nz != w[2+2*i][1]) failures++;
        if (cur[i].ref_id != w[2+2*i][7:2]) failures++;
        if (cur[i].mvx != w[2+2*i][19:8]) failures++;
        if (cur[i].mvy != w[2+2*i][31:20]) failures++;
        if (cur[i].bipred != w[3+2*i][1]) failures++;
        if (cur[i].ref_id1 != w[3+2*i][7:2]) failures++;
        if (cur[i].mvx1 != w[3+2*i][19:8]) failures++;
        if (cur[i].mvy1 != w[3+2*i][31:20]) failures++;
      end
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (left[i] != {w[35+2*i], w[34+2*i]}) failures++;
        if (top[i] != {w[43+2*i], w[42+2*i]}) failures++;
      end
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
