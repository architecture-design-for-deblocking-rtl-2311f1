// dbf_bs_unit: boundary strength (Bs) of the edge between 4x4 blocks p and q.
//
// Follows the decision flow of the architecture: Bs = 4 when p or q is intra
// coded (or the slice is SP/SI) and the edge is a macroblock edge; Bs = 3 for
// the same case inside the macroblock; Bs = 2 when either block has coded
// coefficients; Bs = 1 when the reference pictures differ or a motion vector
// component differs by one integer sample or more (4 in quarter-sample units),
// comparing the second motion vectors as well when the blocks are
// bi-predicted; otherwise Bs = 0. Reference pictures count as different when
// either reference or the number of motion vectors differs; the vectors are
// compared list by list, as the decision flow draws it (the H.264 standard also
// accepts a crossed pairing of the two vectors, which is not done here). A
// macroblock edge whose neighbour is not available (picture border) gets
// Bs = 0, which is this design's choice.
//
// Purely combinational.
module dbf_bs_unit
  import dbf_pkg::*;
(
  input  blk_info_t  p_info,
  input  blk_info_t  q_info,
  input  logic       mb_edge,      // edge is also a macroblock edge
  input  logic       nb_avail,     // neighbouring macroblock exists (mb_edge only)
  input  logic       sp_si_slice,
  output logic [2:0] bs
);

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    if (mb_edge && !nb_avail)
      bs = 3'd0;
    else if (p_info.intra || q_info.intra || sp_si_slice)
      bs = mb_edge ? 3'd4 : 3'd3;
    else if (p_info.nz || q_info.nz)
      bs = 3'd2;
    else if (p_info.ref_id != q_info.ref_id || p_info.bipred != q_info.bipred ||
             (p_info.bipred && p_info.ref_id1 != q_info.ref_id1) ||
             iabs(int'(p_info.mvx) - int'(q_info.mvx)) >= 4 ||
             iabs(int'(p_info.mvy) - int'(q_info.mvy)) >= 4 ||
             (p_info.bipred && (iabs(int'(p_info.mvx1) - int'(q_info.mvx1)) >= 4 ||
                                iabs(int'(p_info.mvy1) - int'(q_info.mvy1)) >= 4)))
      bs = 3'd1;
    else
      bs = 3'd0;
  end

endmodule
