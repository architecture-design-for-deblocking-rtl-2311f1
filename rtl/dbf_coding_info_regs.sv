// dbf_coding_info_regs: coding information of the macroblock being filtered.
//
// Bus word 0 carries the macroblock parameters {sp_si_slice, top_avail,
// left_avail, offset_b, offset_a, qp_top, qp_left, qp_cur} (bits 30..0), word 1
// the chroma QP offset (bits 4..0). Then come two words per 4x4 block: words
// 2..33 the sixteen blocks of the current macroblock in raster order, words
// 34..41 the right-hand column of blocks of the left macroblock (top to
// bottom) and words 42..49 the bottom row of blocks of the top macroblock (left
// to right). The first word of a block is {mvy[11:0], mvx[11:0], ref_id[5:0],
// nz, intra} (list 0), the second {mvy1[11:0], mvx1[11:0], ref_id1[5:0],
// bipred, unused} (list 1, used when bipred is set). The architecture names this
// register file and says the coding information is loaded before deblocking;
// its contents and layout are this design's choice.
//
// Written one word per cycle; all contents are always visible.
module dbf_coding_info_regs
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [5:0]  waddr,      // 0..INFO_WORDS-1
  input  logic [31:0] wdata,
  output mb_param_t   mb,
  output blk_info_t   cur  [16],
  output blk_info_t   left [4],
  output blk_info_t   top  [4]
);

  logic [31:0] regs [INFO_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < INFO_WORDS; i++) regs[i] <= '0;
    end else if (we && int'(waddr) < INFO_WORDS) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    mb = {regs[0][30:0], regs[1][4:0]};
    for (int i = 0; i < 16; i++) cur[i]  = {regs[3 + 2*i], regs[2 + 2*i]};
    for (int i = 0; i < 4; i++)  left[i] = {regs[35 + 2*i], regs[34 + 2*i]};
    for (int i = 0; i < 4; i++)  top[i]  = {regs[43 + 2*i], regs[42 + 2*i]};
  end

endmodule
