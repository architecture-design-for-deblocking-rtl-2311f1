// dbf_ref_pkg: behavioural reference for the testbenches.
//
// Holds a picture-domain model of one macroblock and its neighbours (luma
// 20x20 with the top-left 4x4 corner unused, two chroma 12x12 planes likewise),
// the H.264 deblocking of that macroblock written line by line in the order of
// the standard (all vertical edges, then all horizontal edges), the boundary
// strength rules, and the packing of the picture into the 160-word bus stream
// and the coding information into its words. It shares no code with the RTL.
package dbf_ref_pkg;

  // Picture coordinates are offset by 4: index 0..3 = neighbour, 4.. = current.
  typedef struct {
    int lum [20][20];
    int chr [2][12][12];
  } mb_pic_t;

  typedef struct {
    bit intra;
    bit nz;
    int ref_id;
    int mvx;
    int mvy;
    bit bipred;
    int ref1;
    int mvx1;
    int mvy1;
  } ref_blk_t;

  typedef struct {
    int qp_cur, qp_left, qp_top;
    int offa, offb, cqp_off;
    bit left_avail, top_avail, sp_si;
    ref_blk_t cur [16];
    ref_blk_t left [4];
    ref_blk_t top [4];
  } ref_info_t;

  function automatic int r_alpha(int i);
    int t [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,
                   25,28,32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
    return t[i];
  endfunction

  function automatic int r_beta(int i);
    int t [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,
                   8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
    return t[i];
  endfunction

  function automatic int r_tc0(int i, int bs);
    int t [52][3] = '{'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
      '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
      '{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},'{1,1,1},'{1,1,1},
      '{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},'{1,2,3},'{2,2,3},'{2,2,4},
      '{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},'{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},
      '{6,8,11},'{6,8,13},'{7,10,14},'{8,11,16},'{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};
    return t[i][bs-1];
  endfunction

  function automatic int r_qpc(int qpi);
    int t [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    return (qpi < 30) ? qpi : t[qpi-30];
  endfunction

  function automatic int clip(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int r_bs(ref_blk_t p, ref_blk_t q, bit mb_edge, bit avail, bit sp_si);
    if (mb_edge && !avail) return 0;
    if (p.intra || q.intra || sp_si) return mb_edge ? 4 : 3;
    if (p.nz || q.nz) return 2;
    if (p.bipred != q.bipred || p.ref_id != q.ref_id || (p.bipred && p.ref1 != q.ref1)) return 1;
    if (iabs(p.mvx - q.mvx) >= 4 || iabs(p.mvy - q.mvy) >= 4) return 1;
    if (p.bipred && (iabs(p.mvx1 - q.mvx1) >= 4 || iabs(p.mvy1 - q.mvy1) >= 4)) return 1;
    return 0;
  endfunction

  // Filter one line in place. s[0..3] = p0..p3, s[4..7] = q0..q3.
  // Returns 1 if the line met the filter conditions.
  function automatic bit r_filter(ref int s [8], input int bs, input int qpp, input int qpq,
                                  input bit chroma, input ref_info_t inf);
    int qav, ia, ib, a, b, tc0, tc, d, ap, aq;
    int p0, p1, p2, p3, q0, q1, q2, q3;
    if (chroma) qav = (r_qpc(clip(0, 51, qpp + inf.cqp_off)) + r_qpc(clip(0, 51, qpq + inf.cqp_off)) + 1) / 2;
    else        qav = (qpp + qpq + 1) / 2;
    ia = clip(0, 51, qav + inf.offa);
    ib = clip(0, 51, qav + inf.offb);
    a = r_alpha(ia); b = r_beta(ib);
    p0 = s[0]; p1 = s[1]; p2 = s[2]; p3 = s[3]; q0 = s[4]; q1 = s[5]; q2 = s[6]; q3 = s[7];
    if (bs == 0 || iabs(p0 - q0) >= a || iabs(p1 - p0) >= b || iabs(q1 - q0) >= b) return 0;
    ap = iabs(p2 - p0); aq = iabs(q2 - q0);
    if (bs < 4) begin
      tc0 = r_tc0(ia, bs);
      tc = chroma ? tc0 + 1 : tc0 + (ap < b) + (aq < b);
      d = clip(-tc, tc, (4 * (q0 - p0) + (p1 - q1) + 4) >>> 3);
      s[0] = clip(0, 255, p0 + d);
      s[4] = clip(0, 255, q0 - d);
      if (!chroma) begin
        if (ap < b) s[1] = p1 + clip(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - 2 * p1) >>> 1);
        if (aq < b) s[5] = q1 + clip(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - 2 * q1) >>> 1);
      end
    end else begin
      if (!chroma && ap < b && iabs(p0 - q0) < (a / 4 + 2)) begin
        s[0] = (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) / 8;
        s[1] = (p2 + p1 + p0 + q0 + 2) / 4;
        s[2] = (2*p3 + 3*p2 + p1 + p0 + q0 + 4) / 8;
      end else s[0] = (2*p1 + p0 + q1 + 2) / 4;
      if (!chroma && aq < b && iabs(p0 - q0) < (a / 4 + 2)) begin
        s[4] = (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) / 8;
        s[5] = (p0 + q0 + q1 + q2 + 2) / 4;
        s[6] = (2*q3 + 3*q2 + q1 + q0 + p0 + 4) / 8;
      end else s[4] = (2*q1 + q0 + p1 + 2) / 4;
    end
    return 1;
  endfunction

  // Bs of the vertical edge left of luma block (bx,by) / horizontal edge above it.
  function automatic int bs_v(ref_info_t inf, int bx, int by);
    return r_bs(bx == 0 ? inf.left[by] : inf.cur[by*4+bx-1], inf.cur[by*4+bx], bx == 0, inf.left_avail, inf.sp_si);
  endfunction
  function automatic int bs_h(ref_info_t inf, int bx, int by);
    return r_bs(by == 0 ? inf.top[bx] : inf.cur[(by-1)*4+bx], inf.cur[by*4+bx], by == 0, inf.top_avail, inf.sp_si);
  endfunction

  // Deblock the macroblock in place; returns number of lines that were filtered.
  function automatic int r_deblock(ref mb_pic_t pic, input ref_info_t inf);
    int s [8];
    int n, bs, qpp;
    n = 0;
    // vertical edges, luma
    for (int ex = 0; ex < 16; ex += 4)
      for (int y = 0; y < 16; y++) begin
        bs = bs_v(inf, ex/4, y/4); qpp = (ex == 0) ? inf.qp_left : inf.qp_cur;
        for (int i = 0; i < 4; i++) begin s[i] = pic.lum[y+4][ex+3-i]; s[4+i] = pic.lum[y+4][ex+4+i]; end
        n += r_filter(s, bs, qpp, inf.qp_cur, 0, inf);
        for (int i = 0; i < 4; i++) begin pic.lum[y+4][ex+3-i] = s[i]; pic.lum[y+4][ex+4+i] = s[4+i]; end
      end
    // vertical edges, chroma
    for (int c = 0; c < 2; c++)
      for (int ex = 0; ex < 8; ex += 4)
        for (int y = 0; y < 8; y++) begin
          bs = bs_v(inf, ex/2, y/2); qpp = (ex == 0) ? inf.qp_left : inf.qp_cur;
          for (int i = 0; i < 4; i++) begin s[i] = pic.chr[c][y+4][ex+3-i]; s[4+i] = pic.chr[c][y+4][ex+4+i]; end
          n += r_filter(s, bs, qpp, inf.qp_cur, 1, inf);
          for (int i = 0; i < 4; i++) begin pic.chr[c][y+4][ex+3-i] = s[i]; pic.chr[c][y+4][ex+4+i] = s[4+i]; end
        end
    // horizontal edges, luma
    for (int ey = 0; ey < 16; ey += 4)
      for (int x = 0; x < 16; x++) begin
        bs = bs_h(inf, x/4, ey/4); qpp = (ey == 0) ? inf.qp_top : inf.qp_cur;
        for (int i = 0; i < 4; i++) begin s[i] = pic.lum[ey+3-i][x+4]; s[4+i] = pic.lum[ey+4+i][x+4]; end
        n += r_filter(s, bs, qpp, inf.qp_cur, 0, inf);
        for (int i = 0; i < 4; i++) begin pic.lum[ey+3-i][x+4] = s[i]; pic.lum[ey+4+i][x+4] = s[4+i]; end
      end
    // horizontal edges, chroma
    for (int c = 0; c < 2; c++)
      for (int ey = 0; ey < 8; ey += 4)
        for (int x = 0; x < 8; x++) begin
          bs = bs_h(inf, x/2, ey/2); qpp = (ey == 0) ? inf.qp_top : inf.qp_cur;
          for (int i = 0; i < 4; i++) begin s[i] = pic.chr[c][ey+3-i][x+4]; s[4+i] = pic.chr[c][ey+4+i][x+4]; end
          n += r_filter(s, bs, qpp, inf.qp_cur, 1, inf);
          for (int i = 0; i < 4; i++) begin pic.chr[c][ey+3-i][x+4] = s[i]; pic.chr[c][ey+4+i][x+4] = s[4+i]; end
        end
    return n;
  endfunction

  // The 160-word bus stream: columns c0..c10, top to bottom, pixel x in bits 8x+7:8x.
  function automatic void pic_to_words(ref mb_pic_t pic, ref bit [31:0] w [160]);
    int k = 0;
    for (int c = 0; c < 11; c++) begin
      int plane, x0, y0, n;
      if (c < 5) begin plane = -1; x0 = 4 * c; y0 = (c == 0) ? 4 : 0; n = (c == 0) ? 16 : 20; end
      else begin
        plane = (c < 8) ? 0 : 1;
        x0 = 4 * ((c - 5) % 3); y0 = (x0 == 0) ? 4 : 0; n = (x0 == 0) ? 8 : 12;
      end
      for (int r = 0; r < n; r++) begin
        for (int x = 0; x < 4; x++)
          w[k][8*x +: 8] = (plane < 0) ? 8'(pic.lum[y0+r][x0+x]) : 8'(pic.chr[plane][y0+r][x0+x]);
        k++;
      end
    end
  endfunction

  // Two bus words of a block: list 0 (low), list 1 (high).
  // Inverse of pic_to_words.
  function automatic void words_to_pic(ref bit [31:0] w [160], ref mb_pic_t pic);
    int k = 0;
    for (int c = 0; c < 11; c++) begin
      int plane, x0, y0, n;
      if (c < 5) begin plane = -1; x0 = 4 * c; y0 = (c == 0) ? 4 : 0; n = (c == 0) ? 16 : 20; end
      else begin
        plane = (c < 8) ? 0 : 1;
        x0 = 4 * ((c - 5) % 3); y0 = (x0 == 0) ? 4 : 0; n = (x0 == 0) ? 8 : 12;
      end
      for (int r = 0; r < n; r++) begin
        for (int x = 0; x < 4; x++)
          if (plane < 0) pic.lum[y0+r][x0+x] = int'(w[k][8*x +: 8]);
          else           pic.chr[plane][y0+r][x0+x] = int'(w[k][8*x +: 8]);
        k++;
      end
    end
  endfunction

  function automatic bit [63:0] blk_word(ref_blk_t b);
    return {12'(b.mvy1), 12'(b.mvx1), 6'(b.ref1), b.bipred, 1'b0,
            12'(b.mvy), 12'(b.mvx), 6'(b.ref_id), b.nz, b.intra};
  endfunction

  function automatic void info_to_words(ref_info_t inf, ref bit [31:0] w [50]);
    w[0] = {1'b0, inf.sp_si, inf.top_avail, inf.left_avail, 5'(inf.offb), 5'(inf.offa),
            6'(inf.qp_top), 6'(inf.qp_left), 6'(inf.qp_cur)};
    w[1] = {27'd0, 5'(inf.cqp_off)};
    for (int i = 0; i < 16; i++) {w[3+2*i], w[2+2*i]} = blk_word(inf.cur[i]);
    for (int i = 0; i < 4; i++) {w[35+2*i], w[34+2*i]} = blk_word(inf.left[i]);
    for (int i = 0; i < 4; i++) {w[43+2*i], w[42+2*i]} = blk_word(inf.top[i]);
  endfunction

  // Random but filter-friendly content: smooth blocks with small steps.
  function automatic void rand_pic(ref mb_pic_t pic, input int base, input int step, input int noise);
    int off [5][5];
    for (int by = 0; by < 5; by++) for (int bx = 0; bx < 5; bx++) off[by][bx] = $urandom_range(0, step);
    for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++)
      pic.lum[y][x] = clip(0, 255, base + off[y/4][x/4] + int'($urandom_range(0, noise)));
    for (int c = 0; c < 2; c++) for (int y = 0; y < 12; y++) for (int x = 0; x < 12; x++)
      pic.chr[c][y][x] = clip(0, 255, base/2 + off[y/4][x/4] + int'($urandom_range(0, noise)));
  endfunction

  function automatic void rand_info(ref ref_info_t inf, input int kind);
    inf.qp_cur = $urandom_range(26, 45); inf.qp_left = $urandom_range(20, 51); inf.qp_top = $urandom_range(20, 51);
    inf.offa = 2 * $signed($urandom_range(0, 6)) - 6; inf.offb = 2 * $signed($urandom_range(0, 6)) - 6;
    inf.cqp_off = $signed($urandom_range(0, 8)) - 4;
    inf.left_avail = (kind != 3); inf.top_avail = (kind != 4); inf.sp_si = 0;
    for (int i = 0; i < 24; i++) begin
      ref_blk_t b;
      b.intra  = (kind == 1) ? 1 : (kind == 2) ? ($urandom_range(0, 5) == 0) : 0;
      b.nz     = ($urandom_range(0, 2) == 0);
      b.ref_id = $urandom_range(0, 1);
      b.mvx    = $signed($urandom_range(0, 12)) - 6;
      b.mvy    = $signed($urandom_range(0, 12)) - 6;
      b.bipred = (kind == 0) && ($urandom_range(0, 2) == 0);
      b.ref1   = b.bipred ? $urandom_range(0, 1) : 0;
      b.mvx1   = b.bipred ? $signed($urandom_range(0, 12)) - 6 : 0;
      b.mvy1   = b.bipred ? $signed($urandom_range(0, 12)) - 6 : 0;
      if (i < 16) inf.cur[i] = b; else if (i < 20) inf.left[i-16] = b; else inf.top[i-20] = b;
    end
  endfunction

endpackage
