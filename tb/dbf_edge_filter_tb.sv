// dbf_edge_filter_tb: random lines through the edge filter against the
// reference filter of dbf_ref_pkg. Thresholds are derived by the testbench from
// a random QP. Lines are drawn near-flat with a small step so that every branch
// (skip, Bs<4 with and without p1/q1 update, Bs=4 strong and weak, chroma) is
// taken; the branch counts are checked at the end.
module dbf_edge_filter_tb;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic [7:0] p_in [4], q_in [4];
  pixel_t [3:0] pi, qi, po, qo;
  logic [2:0] bs;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  logic chroma, filtered;
  int checks = 0, failures = 0, n_filt = 0, n_strong = 0, n_skip = 0;

  dbf_edge_filter dut (.p_in(pi), .q_in(qi), .bs, .alpha, .beta, .tc0, .chroma,
                       .p_out(po), .q_out(qo), .filtered);

  initial begin
    ref_info_t inf;
    int s [8];
    int qp, ia, base, step;
    bit f;
    inf.offa = 0; inf.offb = 0; inf.cqp_off = 0;
    for (int t = 0; t < 20000; t++) begin
      qp = $urandom_range(15, 51);
      chroma = $urandom_range(0, 3) == 0;
      bs = 3'($urandom_range(0, 4));
      base = $urandom_range(0, 255);
      step = $urandom_range(0, 24);
      for (int i = 0; i < 4; i++) begin
        s[i]   = clip(0, 255, base + int'($urandom_range(0, 6)) - 3);
        s[4+i] = clip(0, 255, base + step + int'($urandom_range(0, 6)) - 3);
      end
      ia = chroma ? r_qpc(qp) : qp;
      alpha = 8'(r_alpha(ia));
      beta  = 5'(r_beta(ia));
      tc0   = (bs == 0 || bs == 4) ? 5'd0 : 5'(r_tc0(ia, int'(bs)));
      for (int i = 0; i < 4; i++) begin pi[i] = 8'(s[i]); qi[i] = 8'(s[4+i]); end
      #1;
      f = r_filter(s, int'(bs), qp, qp, chroma, inf);
      checks++;
      if (filtered !== f) failures++;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(po[i]) != s[i])   failures++;
        if (int'(qo[i]) != s[4+i]) failures++;
      end
      if (f) n_filt++; else n_skip++;
      if (f && bs == 4 && !chroma && po[2] != pi[2]) n_strong++;
    end
    checks++; if (n_filt == 0 || n_skip == 0 || n_strong == 0) failures++;
    $display("filtered=%0d skipped=%0d strong=%0d", n_filt, n_skip, n_strong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
