// dbf_bs_unit_tb: random pairs of block descriptions through the boundary
// strength unit, compared with the decision rules of dbf_ref_pkg. Every Bs
// value 0..4 must occur.
module dbf_bs_unit_tb;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  blk_info_t p_info, q_info;
  logic mb_edge, nb_avail, sp_si_slice;
  logic [2:0] bs;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  dbf_bs_unit dut (.*);

  function automatic ref_blk_t rnd_blk();
    ref_blk_t b;
    b.intra = $urandom_range(0, 7) == 0;
    b.nz = $urandom_range(0, 3) == 0;
    b.ref_id = $urandom_range(0, 2);
    b.mvx = $signed($urandom_range(0, 16)) - 8;
    b.mvy = $signed($urandom_range(0, 16)) - 8;
    if ($urandom_range(0, 9) == 0) b.mvx = $signed($urandom_range(0, 4000)) - 2000;
    b.bipred = $urandom_range(0, 2) == 0;
    b.ref1 = b.bipred ? $urandom_range(0, 1) : 0;
    b.mvx1 = b.bipred ? $signed($urandom_range(0, 12)) - 6 : 0;
    b.mvy1 = b.bipred ? $signed($urandom_range(0, 12)) - 6 : 0;
    return b;
  endfunction

  initial begin
    ref_blk_t p, q;
    int e;
    for (int t = 0; t < 20000; t++) begin
      p = rnd_blk(); q = rnd_blk();
      if ($urandom_range(0, 3) == 0) q = p;
      if ($urandom_range(0, 3) == 0) begin q = p; q.mvx1 = p.mvx1 + $signed($urandom_range(0, 10)) - 5; q.mvy1 = p.mvy1 + $signed($urandom_range(0, 10)) - 5; q.intra = 0; p.intra = 0; q.nz = 0; p.nz = 0; end
      mb_edge = 1'($urandom_range(0, 1));
      nb_avail = $urandom_range(0, 7) != 0;
      sp_si_slice = $urandom_range(0, 31) == 0;
      p_info = blk_word(p);
      q_info = blk_word(q);
      #1;
      e = r_bs(p, q, mb_edge, nb_avail, sp_si_slice);
      checks++;
      if (int'(bs) != e) begin
        failures++;
        if (failures < 5) $display("bs %0d expected %0d", bs, e);
      end
      seen[e]++;
    end
    for (int i = 0; i < 5; i++) begin checks++; if (seen[i] == 0) failures++; end
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
