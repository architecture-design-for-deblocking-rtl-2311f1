// dbf_frame_tb: whole frames through the accelerator at its default size.
//
// Deblocks a CIF (352x288), an NTSC (720x480) and a 720p (1280x720) frame of
// random, filter-friendly content, macroblock by macroblock in raster order, the
// way a host would: for each MB it cuts the MB and its left/top strips out of
// the frame (already holding the results of earlier MBs), sends them with the
// MB's coding information, and writes the 160 returned words back. The same is
// done on a second copy of the frame with the reference deblocking of
// dbf_ref_pkg, and the two frames are compared pixel by pixel. Frame-border
// MBs have no left or top neighbour, and neighbouring MBs have different QPs.
// The cycles per frame give the frame rate at 100 MHz; 720p must reach 30
// frames/s.
module dbf_frame_tb;
  import dbf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic busy, done;
  logic in_valid = 0, in_ready;
  logic [31:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  logic line_filtered;
  longint cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  longint nlines = 0;   // lines in which the filter changed samples
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (line_filtered) nlines <= nlines + 1;
  end

  dbf_top dut (.*);

  // Frame planes: [0] luma, [1] Cb, [2] Cr; the DUT copy and the reference copy.
  byte unsigned fd [3][], fr [3][];
  ref_blk_t binfo [];     // per 4x4 luma block
  int qp [];              // per MB
  int wmb, hmb;

  function automatic int pw(int plane); return (plane == 0) ? 16 * wmb : 8 * wmb; endfunction

  // Cut MB (mx,my) and its neighbour strips out of a frame copy.
  function automatic void cut(ref byte unsigned f [3][], input int mx, input int my, ref mb_pic_t pic);
    for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++) begin
      int fx = 16 * mx + x - 4, fy = 16 * my + y - 4;
      pic.lum[y][x] = (fx >= 0 && fy >= 0) ? int'(f[0][fy * pw(0) + fx]) : 0;
    end
    for (int c = 0; c < 2; c++) for (int y = 0; y < 12; y++) for (int x = 0; x < 12; x++) begin
      int fx = 8 * mx + x - 4, fy = 8 * my + y - 4;
      pic.chr[c][y][x] = (fx >= 0 && fy >= 0) ? int'(f[1+c][fy * pw(1) + fx]) : 0;
    end
  endfunction

  // Write back everything the accelerator may have changed (not the corner).
  function automatic void paste(ref byte unsigned f [3][], input int mx, input int my, ref mb_pic_t pic);
    for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++) begin
      int fx = 16 * mx + x - 4, fy = 16 * my + y - 4;
      if (fx >= 0 && fy >= 0 && !(x < 4 && y < 4)) f[0][fy * pw(0) + fx] = 8'(pic.lum[y][x]);
    end
    for (int c = 0; c < 2; c++) for (int y = 0; y < 12; y++) for (int x = 0; x < 12; x++) begin
      int fx = 8 * mx + x - 4, fy = 8 * my + y - 4;
      if (fx >= 0 && fy >= 0 && !(x < 4 && y < 4)) f[1+c][fy * pw(1) + fx] = 8'(pic.chr[c][y][x]);
    end
  endfunction

  function automatic void mb_info(input int mx, input int my, ref ref_info_t inf);
    inf.qp_cur = qp[my * wmb + mx];
    inf.qp_left = (mx > 0) ? qp[my * wmb + mx - 1] : 0;
    inf.qp_top = (my > 0) ? qp[(my - 1) * wmb + mx] : 0;
    inf.offa = 0; inf.offb = 2; inf.cqp_off = -2; inf.sp_si = 0;
    inf.left_avail = mx > 0; inf.top_avail = my > 0;
    for (int i = 0; i < 16; i++) inf.cur[i] = binfo[(4 * my + i / 4) * 4 * wmb + 4 * mx + i % 4];
    for (int i = 0; i < 4; i++) begin
      inf.left[i] = (mx > 0) ? binfo[(4 * my + i) * 4 * wmb + 4 * mx - 1] : inf.cur[0];
      inf.top[i]  = (my > 0) ? binfo[(4 * my - 1) * 4 * wmb + 4 * mx + i] : inf.cur[0];
    end
  endfunction

  task automatic run_frame(input string name, input int w, input int h);
    longint t0, cycles, l0;
    real fps;
    int bad;
    wmb = w; hmb = h;
    for (int p = 0; p < 3; p++) begin
      fd[p] = new[pw(p) * ((p == 0) ? 16 : 8) * hmb];
      fr[p] = new[fd[p].size()];
    end
    // content: smooth gradient, a DC step per 4x4 block, small noise
    for (int p = 0; p < 3; p++) begin
      int wp = pw(p), bsz = 4;
      for (int i = 0; i < fd[p].size(); i++) begin
        int x = i % wp, y = i / wp;
        fd[p][i] = 8'(clip(0, 255, 60 + (x + 2 * y) / 8 + 7 * (((x / bsz) * 13 + (y / bsz) * 7) % 3) + int'($urandom_range(0, 2))));
        fr[p][i] = fd[p][i];
      end
    end
    binfo = new[16 * wmb * hmb];
    foreach (binfo[i]) begin
      binfo[i].intra = ($urandom_range(0, 9) == 0);
      binfo[i].nz = ($urandom_range(0, 2) == 0);
      binfo[i].ref_id = $urandom_range(0, 1);
      binfo[i].mvx = $signed($urandom_range(0, 10)) - 5;
      binfo[i].mvy = $signed($urandom_range(0, 10)) - 5;
      binfo[i].bipred = ($urandom_range(0, 4) == 0);
      binfo[i].ref1 = binfo[i].bipred ? 1 : 0;
      binfo[i].mvx1 = binfo[i].bipred ? $signed($urandom_range(0, 10)) - 5 : 0;
      binfo[i].mvy1 = binfo[i].bipred ? $signed($urandom_range(0, 10)) - 5 : 0;
    end
    qp = new[wmb * hmb];
    foreach (qp[i]) qp[i] = $urandom_range(28, 40);

    t0 = cyc; l0 = nlines;
    for (int my = 0; my < hmb; my++) for (int mx = 0; mx < wmb; mx++) begin
      mb_pic_t pic, rpic;
      ref_info_t inf;
      bit [31:0] pwords [160], owords [160], iw [50];
      int nin, nout;
      mb_info(mx, my, inf);
      cut(fd, mx, my, pic);
      cut(fr, mx, my, rpic);
      void'(r_deblock(rpic, inf));
      paste(fr, mx, my, rpic);
      pic_to_words(pic, pwords);
      info_to_words(inf, iw);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      nin = 0; nout = 0;
      in_valid = 1; out_ready = 1;
      while (nout < 160) begin
        in_data = (nin < 50) ? iw[nin] : (nin < 210) ? pwords[nin - 50] : '0;
        in_valid = nin < 210;
        @(posedge clk);
        if (in_valid && in_ready) nin++;
        if (out_valid && out_ready) begin owords[nout] = out_data; nout++; end
        #1;
      end
      in_valid = 0;
      while (!done) @(posedge clk);
      words_to_pic(owords, pic);
      paste(fd, mx, my, pic);
    end
    cycles = cyc - t0;
    bad = 0;
    for (int p = 0; p < 3; p++) foreach (fd[p][i]) begin
      checks++;
      if (fd[p][i] != fr[p][i]) begin
        failures++; bad++;
        if (bad < 5) $display("%s plane %0d pixel %0d: got %0d expected %0d", name, p, i, fd[p][i], fr[p][i]);
      end
    end
    // the frame must actually have been filtered
    checks++;
    if (nlines - l0 == 0) begin failures++; $display("%s: no line filtered", name); end
    fps = 100.0e6 / real'(cycles);
    $display("%s: %0d MBs, %0d cycles (%0.1f per MB incl. host turnaround), %0.1f frames/s at 100 MHz, %0d lines filtered, %0d pixels differ",
             name, wmb * hmb, cycles, real'(cycles) / real'(wmb * hmb), fps, nlines - l0, bad);
    if (name == "720p") begin checks++; if (fps < 30.0) begin failures++; $display("720p below 30 frames/s"); end end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_frame("CIF", 22, 18);
    run_frame("NTSC", 45, 30);
    run_frame("720p", 80, 45);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
