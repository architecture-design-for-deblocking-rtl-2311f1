// dbf_filter_unit_tb: the reconfigurable filter in both modes. In horizontal
// mode a line arrives as two SRAM words (p3 p2 p1 p0 and q0 q1 q2 q3); in
// vertical mode as the array's bottom row (q3 q2 q1 q0 | p0 p1 p2 p3). The
// expected ports 1/2 are the reference-filtered samples in the same order.
module dbf_filter_unit_tb;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic vmode, chroma, filtered;
  word_t sram_p_word, sram_q_word, port3, port4, port1, port2;
  logic [2:0] bs;
  logic [5:0] qp_p, qp_q;
  logic signed [4:0] chroma_qp_offset, offset_a, offset_b;
  int checks = 0, failures = 0, n_filt = 0;

  dbf_filter_unit dut (.*);

  initial begin
    ref_info_t inf;
    int s [8];
    int base, step;
    bit f;
    for (int t = 0; t < 20000; t++) begin
      vmode = 1'($urandom_range(0, 1));
      chroma = $urandom_range(0, 3) == 0;
      bs = 3'($urandom_range(0, 4));
      qp_p = 6'($urandom_range(20, 51));
      qp_q = 6'($urandom_range(20, 51));
      inf.cqp_off = $signed($urandom_range(0, 8)) - 4;
      inf.offa = 2 * ($signed($urandom_range(0, 6)) - 3);
      inf.offb = 2 * ($signed($urandom_range(0, 6)) - 3);
      chroma_qp_offset = 5'(inf.cqp_off); offset_a = 5'(inf.offa); offset_b = 5'(inf.offb);
      base = $urandom_range(0, 255); step = $urandom_range(0, 20);
      for (int i = 0; i < 4; i++) begin
        s[i]   = clip(0, 255, base + int'($urandom_range(0, 6)) - 3);
        s[4+i] = clip(0, 255, base + step + int'($urandom_range(0, 6)) - 3);
      end
      for (int x = 0; x < 4; x++) begin
        sram_p_word[x] = 8'(s[3-x]); sram_q_word[x] = 8'(s[4+x]);
        port3[x] = 8'(s[7-x]);       port4[x] = 8'(s[x]);
      end
      if (vmode) begin sram_p_word = ~sram_p_word; sram_q_word = ~sram_q_word; end
      else begin port3 = ~port3; port4 = ~port4; end
      #1;
      f = r_filter(s, int'(bs), int'(qp_p), int'(qp_q), chroma, inf);
      if (f) n_filt++;
      checks++; if (filtered !== f) failures++;
      for (int x = 0; x < 4; x++) begin
        checks += 2;
        if (vmode) begin
          if (int'(port1[x]) != s[7-x]) failures++;
          if (int'(port2[x]) != s[x]) failures++;
        end else begin
          if (int'(port1[x]) != s[3-x]) failures++;
          if (int'(port2[x]) != s[4+x]) failures++;
        end
      end
    end
    checks++; if (n_filt == 0) failures++;
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
