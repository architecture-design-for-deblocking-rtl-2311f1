// dbf_thresholds_tb: random QPs, offsets and Bs through the threshold lookup,
// compared with the tables and averaging of dbf_ref_pkg.
module dbf_thresholds_tb;
  import dbf_ref_pkg::*;

  logic [5:0] qp_p, qp_q;
  logic chroma;
  logic signed [4:0] chroma_qp_offset, offset_a, offset_b;
  logic [2:0] bs;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  int checks = 0, failures = 0;

  dbf_thresholds dut (.*);

  initial begin
    int qav, ia, ib;
    for (int t = 0; t < 20000; t++) begin
      qp_p = 6'($urandom_range(0, 51));
      qp_q = 6'($urandom_range(0, 51));
      chroma = 1'($urandom_range(0, 1));
      chroma_qp_offset = 5'($signed($urandom_range(0, 24)) - 12);
      offset_a = 5'(2 * ($signed($urandom_range(0, 12)) - 6));
      offset_b = 5'(2 * ($signed($urandom_range(0, 12)) - 6));
      bs = 3'($urandom_range(0, 4));
      #1;
      if (chroma) qav = (r_qpc(clip(0, 51, int'(qp_p) + int'(chroma_qp_offset))) +
                         r_qpc(clip(0, 51, int'(qp_q) + int'(chroma_qp_offset))) + 1) / 2;
      else        qav = (int'(qp_p) + int'(qp_q) + 1) / 2;
      ia = clip(0, 51, qav + int'(offset_a));
      ib = clip(0, 51, qav + int'(offset_b));
      checks += 3;
      if (int'(alpha) != r_alpha(ia)) failures++;
      if (int'(beta) != r_beta(ib)) failures++;
      if (bs >= 1 && bs <= 3 && int'(tc0) != r_tc0(ia, int'(bs))) failures++;
    end
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
