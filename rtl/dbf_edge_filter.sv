// dbf_edge_filter: the arithmetic of one H.264 deblocking filter line.
//
// Takes the eight samples p3..p0 | q0..q3 that straddle one block edge (the edge
// lies between p0 and q0) and returns them filtered. A line is filtered only if
// bs != 0, |p0-q0| < alpha, |p1-p0| < beta and |q1-q0| < beta. For 0 < bs < 4
// the clipped 4-tap filter changes p0/q0 (and, for luma, p1/q1 when the side is
// smooth enough); for bs = 4 the strong 3/4/5-tap filters change up to p2..q2
// for luma and p0/q0 for chroma. The filter conditions and the affected samples
// follow the architecture's algorithm description; the exact coefficients and
// clipping are those of the H.264 standard. p3 and q3 are only read, never
// changed, so p_out[3] and q_out[3] are wired straight from the inputs; they
// stay in the interface so that a whole 8-pixel line goes in and out.
//
// Purely combinational: the surrounding datapath registers its output, so one
// line is filtered per clock cycle.
module dbf_edge_filter
  import dbf_pkg::*;
(
  input  pixel_t [3:0] p_in,      // p_in[i] = p_i (p0 next to the edge)
  input  pixel_t [3:0] q_in,      // q_in[i] = q_i
  input  logic   [2:0] bs,        // boundary strength 0..4
  input  logic   [7:0] alpha,
  input  logic   [4:0] beta,
  input  logic   [4:0] tc0,
  input  logic         chroma,    // 1: chroma line (only p0/q0 change)
  output pixel_t [3:0] p_out,
  output pixel_t [3:0] q_out,
  output logic         filtered   // 1 when the line met the filter conditions
);

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int clip3(input int lo, input int hi, input int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic pixel_t clip1(input int v);
    return pixel_t'(clip3(0, 255, v));
  endfunction

  // One line, as a function so that all working variables are automatic.
  function automatic void filter_line(
    input  pixel_t [3:0] f_p_in, input pixel_t [3:0] f_q_in, input logic [2:0] f_bs,
    input  logic [7:0] f_alpha, input logic [4:0] f_beta, input logic [4:0] f_tc0, input logic f_chroma,
    output pixel_t [3:0] f_p_out, output pixel_t [3:0] f_q_out, output logic f_filtered);
    int   p0, p1, p2, p3, q0, q1, q2, q3;
    int   a, b, tc, ap, aq, delta;
    logic cond;
    tc    = 0;
    delta = 0;
    p0 = int'(f_p_in[0]); p1 = int'(f_p_in[1]); p2 = int'(f_p_in[2]); p3 = int'(f_p_in[3]);
    q0 = int'(f_q_in[0]); q1 = int'(f_q_in[1]); q2 = int'(f_q_in[2]); q3 = int'(f_q_in[3]);
    a  = int'(f_alpha);
    b  = int'(f_beta);
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    f_p_out = f_p_in;
    f_q_out = f_q_in;
    cond = (f_bs != 3'd0) && (iabs(p0 - q0) < a) && (iabs(p1 - p0) < b) && (iabs(q1 - q0) < b);
    f_filtered = cond;
    if (cond) begin
      if (f_bs < 3'd4) begin
        if (f_chroma) tc = int'(f_tc0) + 1;
        else        tc = int'(f_tc0) + ((ap < b) ? 1 : 0) + ((aq < b) ? 1 : 0);
        delta = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        f_p_out[0] = clip1(p0 + delta);
        f_q_out[0] = clip1(q0 - delta);
        if (!f_chroma && ap < b)
          f_p_out[1] = pixel_t'(p1 + clip3(-int'(f_tc0), int'(f_tc0), (p2 + ((p0 + q0 + 1) >>> 1) - (p1 * 2)) >>> 1));
        if (!f_chroma && aq < b)
          f_q_out[1] = pixel_t'(q1 + clip3(-int'(f_tc0), int'(f_tc0), (q2 + ((p0 + q0 + 1) >>> 1) - (q1 * 2)) >>> 1));
      end else begin
        if (!f_chroma && ap < b && iabs(p0 - q0) < ((a >>> 2) + 2)) begin
          f_p_out[0] = pixel_t'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3);
          f_p_out[1] = pixel_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          f_p_out[2] = pixel_t'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3);
        end else begin
          f_p_out[0] = pixel_t'((2 * p1 + p0 + q1 + 2) >>> 2);
        end
        if (!f_chroma && aq < b && iabs(p0 - q0) < ((a >>> 2) + 2)) begin
          f_q_out[0] = pixel_t'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3);
          f_q_out[1] = pixel_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          f_q_out[2] = pixel_t'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >>> 3);
        end else begin
          f_q_out[0] = pixel_t'((2 * q1 + q0 + p1 + 2) >>> 2);
        end
      end
    end
  endfunction

  always_comb filter_line(p_in, q_in, bs, alpha, beta, tc0, chroma, p_out, q_out, filtered);

endmodule
