// dbf_thresholds: QP-dependent thresholds of one edge line.
//
// From the QPs of the blocks on the two sides of the edge it forms the average
// QP (luma), or the average of the two mapped chroma QPs (chroma, after adding
// the chroma QP offset), adds the slice filter offsets, clips to 0..51 and looks
// up alpha, beta and tC0 in the tables of the H.264 standard. The architecture
// only states that alpha and beta depend on QP; the formulas are the standard's.
//
// Purely combinational.
module dbf_thresholds
  import dbf_pkg::*;
(
  input  logic [5:0]        qp_p,
  input  logic [5:0]        qp_q,
  input  logic              chroma,
  input  logic signed [4:0] chroma_qp_offset,
  input  logic signed [4:0] offset_a,
  input  logic signed [4:0] offset_b,
  input  logic [2:0]        bs,
  output logic [7:0]        alpha,
  output logic [4:0]        beta,
  output logic [4:0]        tc0
);

  function automatic void lookup(
    input  logic [5:0] f_qp_p, input logic [5:0] f_qp_q, input logic f_chroma,
    input  logic signed [4:0] f_chroma_qp_offset, input logic signed [4:0] f_offset_a,
    input  logic signed [4:0] f_offset_b, input logic [2:0] f_bs,
    output logic [7:0] f_alpha, output logic [4:0] f_beta, output logic [4:0] f_tc0);
    int         qpav;
    logic [5:0] qa, qb, ia, ib;
    if (f_chroma) begin
      qa = qpc_of(clip_qp(int'(f_qp_p) + int'(f_chroma_qp_offset)));
      qb = qpc_of(clip_qp(int'(f_qp_q) + int'(f_chroma_qp_offset)));
    end else begin
      qa = f_qp_p;
      qb = f_qp_q;
    end
    qpav  = (int'(qa) + int'(qb) + 1) >>> 1;
    ia    = clip_qp(qpav + int'(f_offset_a));
    ib    = clip_qp(qpav + int'(f_offset_b));
    f_alpha = alpha_of(ia);
    f_beta  = beta_of(ib);
    f_tc0   = (f_bs == 3'd0 || f_bs == 3'd4) ? 5'd0 : tc0_of(ia, f_bs);
  endfunction

  always_comb lookup(qp_p, qp_q, chroma, chroma_qp_offset, offset_a, offset_b, bs, alpha, beta, tc0);

endmodule
