// dbf_pkg: types, constants and lookup functions shared by the H.264 deblocking
// accelerator.
//
// Pixels are 8-bit. One on-chip SRAM word holds a horizontal run of 4 pixels
// (a 4x1 slice of a 4x4 block), pixel x (x = 0 is the leftmost) in bits
// [8x+7:8x]. The macroblock and its neighbours are split into eleven 4-pixel
// wide columns c0..c10 (c0..c4 luma, c5..c7 Cb, c8..c10 Cr); adjacent columns
// sit in different SRAMs so that any 8 pixels across a column boundary can be
// read in one cycle. The column sizes and the bank of each column follow the
// memory organisation of the architecture; the address order inside a bank is
// this design's choice.
//
// The threshold tables (alpha, beta, tC0) and the chroma QP mapping are those of
// the H.264 standard. They are computed here by functions so no data file is
// needed.
package dbf_pkg;

  typedef logic [7:0]       pixel_t;
  typedef pixel_t [3:0]     word_t;    // 4 pixels, [x] = pixel x
  typedef pixel_t [7:0]     line8_t;   // 8 pixels of one array row, [c] = column c

  localparam int NUM_COLS   = 11;
  localparam int SRAM0_DEPTH = 96;
  localparam int SRAM1_DEPTH = 64;
  localparam int INFO_WORDS = 50;      // coding-information words per macroblock
  localparam int NUM_EDGES  = 24;      // 16 luma + 4 Cb + 4 Cr edges per direction

  // Shift mode of the 8x4 pixel array.
  typedef enum logic [1:0] {
    ARR_HOLD  = 2'd0,
    ARR_DOWN  = 2'd1,   // row r <= row r-1, top row from ports 1/2
    ARR_RIGHT = 2'd2    // column c <= column c-1, left column from port 0
  } arr_mode_e;

  // Top-level phase, shared by the control unit and the bus interface.
  typedef enum logic [2:0] {
    PH_IDLE      = 3'd0,
    PH_LOAD_INFO = 3'd1,
    PH_LOAD_PIX  = 3'd2,
    PH_HFILT     = 3'd3,
    PH_VFILT     = 3'd4,
    PH_STORE     = 3'd5
  } phase_e;

  // Coding information of one 4x4 luma block (two bus words: list 0 in the
  // low word, list 1 in the high word).
  typedef struct packed {
    logic signed [11:0] mvy1;    // [63:52] second motion vector (bi-predictive)
    logic signed [11:0] mvx1;    // [51:40]
    logic [5:0]         ref_id1; // [39:34] second reference picture
    logic               bipred;  // [33]    block is bi-predicted
    logic               rsv;     // [32]    unused
    logic signed [11:0] mvy;     // [31:20] quarter-sample units
    logic signed [11:0] mvx;     // [19:8]
    logic [5:0]         ref_id;  // [7:2] reference picture identifier
    logic               nz;      // [1]   non-zero transform coefficients
    logic               intra;   // [0]   intra coded
  } blk_info_t;

  // Macroblock-level parameters (bus words 0 and 1).
  typedef struct packed {
    logic               sp_si_slice;  // slice type SP or SI: treated as intra
    logic               top_avail;
    logic               left_avail;
    logic signed [4:0]  offset_b;     // FilterOffsetB
    logic signed [4:0]  offset_a;     // FilterOffsetA
    logic [5:0]         qp_top;
    logic [5:0]         qp_left;
    logic [5:0]         qp_cur;
    logic signed [4:0]  chroma_qp_offset;
  } mb_param_t;

  // Number of 32-bit words in column c.
  function automatic int col_len(input int c);
    case (c)
      0:          return 16;
      1, 2, 3, 4: return 20;
      5, 8:       return 8;
      default:    return 12;
    endcase
  endfunction

  // SRAM holding column c: 0 = 96x32 SRAM0, 1 = 64x32 SRAM1.
  function automatic logic col_bank(input int c);
    case (c)
      1, 3, 6, 9: return 1'b1;
      default:    return 1'b0;
    endcase
  endfunction

  // First address of column c inside its SRAM.
  function automatic logic [6:0] col_base(input int c);
    case (c)
      10: return 7'd0;   // SRAM0: c10 c8 c7 c5 c4 c2 c0
      8:  return 7'd12;
      7:  return 7'd20;
      5:  return 7'd32;
      4:  return 7'd40;
      2:  return 7'd60;
      0:  return 7'd80;
      9:  return 7'd0;   // SRAM1: c9 c6 c3 c1
      6:  return 7'd12;
      3:  return 7'd24;
      1:  return 7'd44;
      default: return 7'd0;
    endcase
  endfunction

  // alpha(indexA), H.264 Table 8-16.
  function automatic logic [7:0] alpha_of(input logic [5:0] idx);
    logic [7:0] t [36] = '{4, 4, 5, 6, 7, 8, 9, 10, 12, 13, 15, 17, 20, 22, 25, 28,
                           32, 36, 40, 45, 50, 56, 63, 71, 80, 90, 101, 113, 127, 144,
                           162, 182, 203, 226, 255, 255};
    if (idx < 6'd16) return 8'd0;
    return t[idx - 6'd16];
  endfunction

  // beta(indexB), H.264 Table 8-16.
  function automatic logic [4:0] beta_of(input logic [5:0] idx);
    logic [4:0] t [36] = '{2, 2, 2, 3, 3, 3, 3, 4, 4, 4, 6, 6, 7, 7, 8, 8,
                           9, 9, 10, 10, 11, 11, 12, 12, 13, 13, 14, 14, 15, 15,
                           16, 16, 17, 17, 18, 18};
    if (idx < 6'd16) return 5'd0;
    return t[idx - 6'd16];
  endfunction

  // tC0(indexA, bS) for bS = 1..3, H.264 Table 8-17.
  function automatic logic [4:0] tc0_of(input logic [5:0] idx, input logic [2:0] bs);
    logic [4:0] t1 [35] = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2,
                            2, 2, 3, 3, 3, 4, 4, 4, 5, 6, 6, 7, 8, 9, 10, 11, 13};
    logic [4:0] t2 [35] = '{0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2,
                            3, 3, 3, 4, 4, 5, 5, 6, 7, 8, 8, 10, 11, 12, 13, 15, 17};
    logic [4:0] t3 [35] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 4,
                            4, 4, 5, 6, 6, 7, 8, 9, 10, 11, 13, 14, 16, 18, 20, 23, 25};
    if (idx < 6'd17) return 5'd0;
    case (bs)
      3'd1:    return t1[idx - 6'd17];
      3'd2:    return t2[idx - 6'd17];
      default: return t3[idx - 6'd17];
    endcase
  endfunction

  // Chroma QP from qPI (0..51), H.264 Table 8-15.
  function automatic logic [5:0] qpc_of(input logic [5:0] qpi);
    logic [5:0] t [22] = '{29, 30, 31, 32, 32, 33, 34, 34, 35, 35, 36, 36,
                           37, 37, 37, 38, 38, 38, 39, 39, 39, 39};
    if (qpi < 6'd30) return qpi;
    return t[5'(qpi - 6'd30)];
  endfunction

  // Clip an integer into [0, 51].
  function automatic logic [5:0] clip_qp(input int v);
    if (v < 0)  return 6'd0;
    if (v > 51) return 6'd51;
    return 6'(v);
  endfunction

endpackage
