// dbf_filter_unit: the reconfigurable parallel-in parallel-out 1-D filter.
//
// Eight pixels in, eight pixels out, one line per cycle. In horizontal mode
// (vmode = 0) the inputs are the two SRAM words of a line, p3 p2 p1 p0 (word of
// the left column) and q0 q1 q2 q3 (word of the right column), and the result
// goes to ports 1/2 of the pixel array in the same order. In vertical mode the
// input is the bottom row of the array, which after the transposing load holds
// q3 q2 q1 q0 | p0 p1 p2 p3, and the result goes back to ports 1/2 in that
// order. The thresholds are looked up from the QPs of the two blocks; the
// filter arithmetic is in dbf_edge_filter. The in/out orders are those of the
// architecture's datapath; everything else is H.264 standard behaviour.
//
// Purely combinational.
module dbf_filter_unit
  import dbf_pkg::*;
(
  input  logic              vmode,
  input  word_t             sram_p_word,
  input  word_t             sram_q_word,
  input  word_t             port3,
  input  word_t             port4,
  input  logic [2:0]        bs,
  input  logic [5:0]        qp_p,
  input  logic [5:0]        qp_q,
  input  logic              chroma,
  input  logic signed [4:0] chroma_qp_offset,
  input  logic signed [4:0] offset_a,
  input  logic signed [4:0] offset_b,
  output word_t             port1,
  output word_t             port2,
  output logic              filtered
);

  pixel_t [3:0] p_in, q_in, p_out, q_out;
  logic   [7:0] alpha;
  logic   [4:0] beta, tc0;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (vmode) begin
        p_in[i] = port4[i];
        q_in[i] = port3[3 - i];
      end else begin
        p_in[i] = sram_p_word[3 - i];
        q_in[i] = sram_q_word[i];
      end
    end
    for (int x = 0; x < 4; x++) begin
      if (vmode) begin
        port1[x] = q_out[3 - x];
        port2[x] = p_out[x];
      end else begin
        port1[x] = p_out[3 - x];
        port2[x] = q_out[x];
      end
    end
  end

  dbf_thresholds u_thr (
    .qp_p, .qp_q, .chroma, .chroma_qp_offset, .offset_a, .offset_b, .bs,
    .alpha, .beta, .tc0
  );

  dbf_edge_filter u_filt (
    .p_in, .q_in, .bs, .alpha, .beta, .tc0, .chroma,
    .p_out, .q_out, .filtered
  );

endmodule
