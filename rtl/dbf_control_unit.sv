// dbf_control_unit: sequences the deblocking of one macroblock.
//
// After start it runs: load coding information, load 160 pixel words (both
// through the bus interface), horizontal filtering across the 24 vertical
// edges, vertical filtering across the 24 horizontal edges, store 160 words.
//
// Horizontal filtering, 8 cycles per 4x4 block pair (edge): in cycles 0..3 line
// k is read from both SRAMs (p word and q word), filtered and shifted into the
// array top (downward path); in cycles 4..7 the bottom row goes back to both
// SRAMs. Edges run column boundary by column boundary, top to bottom.
//
// Vertical filtering, 12 cycles per edge: an 8-cycle load/store phase (the
// 8 words of the block pair above and below the edge enter the array through
// port 0 on the rightward path while the previously filtered pair leaves
// through port 5 into the other SRAM), then a 4-cycle filtering phase on the
// downward path. Edges run row by row, left to right. Luma, Cb and Cr each end
// with an 8-cycle store-only phase. 16 + 4 + 4 edges give
// (8 + 12*16) + 2*(8 + 12*4) = 312 cycles; horizontal takes 8*24 = 192.
//
// The phases, edge orders and cycle counts follow the architecture; the state
// encoding, the start/done handshake and the Bs/QP selection per line are this
// design's. Total latency from start to done with streams that never stall:
// INFO_WORDS + 160 + 192 + 312 + 160 = 874 cycles, plus one for the registered
// done pulse.
module dbf_control_unit
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output phase_e     phase,
  input  logic       xfer_done,
  // coding information
  input  mb_param_t  mb,
  input  blk_info_t  cur  [16],
  input  blk_info_t  left [4],
  input  blk_info_t  top  [4],
  // pixel array and filter
  output arr_mode_e  arr_mode,
  output logic       vmode,
  output logic [2:0] bs,
  output logic [5:0] qp_p,
  output logic [5:0] qp_q,
  output logic       chroma,
  // datapath SRAM access
  output logic [1:0] dp_we,
  output logic [6:0] dp_addr [2],
  output logic [1:0] dp_wsel [2],
  output logic       p_bank,
  output logic       load_bank
);

  typedef enum logic [2:0] {
    S_IDLE, S_INFO, S_PIX, S_H, S_VLS, S_VF, S_VDRAIN, S_STORE
  } state_e;

  state_e     state;
  logic [4:0] edge_i;     // 0..23
  logic [2:0] cyc;        // cycle inside a phase
  logic       has_prev;
  logic [3:0] prev_col;
  logic [4:0] prev_wb;

  // Edge geometry.
  logic [3:0] pcol, qcol, vcol;
  logic [4:0] pw, qw, vwb;
  logic [1:0] j_i, r_i;
  logic       is_chroma, mb_edge, last_of_comp;
  logic [1:0] line_i;
  logic [1:0] bx, by;
  blk_info_t  p_info, q_info;

  logic [1:0] comp;
  logic [1:0] mm;
  logic [3:0] cbase;

  always_comb begin
    is_chroma = (edge_i >= 5'd16);
    mm        = edge_i[1:0];
    comp      = is_chroma ? ((edge_i >= 5'd20) ? 2'd2 : 2'd1) : 2'd0;
    cbase     = (comp == 2'd1) ? 4'd5 : 4'd8;
    pcol = '0; qcol = '0; vcol = '0; pw = '0; qw = '0; vwb = '0; j_i = '0; r_i = '0;
    if (state == S_H) begin
      if (!is_chroma) begin
        j_i  = edge_i[3:2];
        r_i  = edge_i[1:0];
        pcol = {2'b00, j_i};
        qcol = {2'b00, j_i} + 4'd1;
      end else begin
        j_i  = {1'b0, mm[1]};
        r_i  = {1'b0, mm[0]};
        pcol = cbase + {2'b00, j_i};
        qcol = cbase + {2'b00, j_i} + 4'd1;
      end
      pw = (j_i == 2'd0) ? {1'b0, r_i, 2'b00} : {1'b0, r_i, 2'b00} + 5'd4;
      qw = {1'b0, r_i, 2'b00} + 5'd4;
    end else begin
      if (!is_chroma) begin
        r_i  = edge_i[3:2];
        j_i  = edge_i[1:0];
        vcol = 4'd1 + {2'b00, j_i};
      end else begin
        r_i  = {1'b0, mm[1]};
        j_i  = {1'b0, mm[0]};
        vcol = cbase + 4'd1 + {2'b00, j_i};
      end
      vwb = {1'b0, r_i, 2'b00};
    end
    mb_edge      = (state == S_H) ? (j_i == 2'd0) : (r_i == 2'd0);
    last_of_comp = (edge_i == 5'd15) || (edge_i == 5'd19) || (edge_i == 5'd23);
  end

  // Block pair and Bs of the line being filtered.
  always_comb begin
    line_i = (state == S_VF) ? 2'(3 - int'(cyc)) : cyc[1:0];
    if (state == S_H) begin
      bx = is_chroma ? {j_i[0], 1'b0} : j_i;
      by = is_chroma ? {r_i[0], line_i[1]} : r_i;
      p_info = mb_edge ? left[by] : cur[{by, bx - 2'd1}];
    end else begin
      bx = is_chroma ? {j_i[0], line_i[1]} : j_i;
      by = is_chroma ? {r_i[0], 1'b0} : r_i;
      p_info = mb_edge ? top[bx] : cur[{by - 2'd1, bx}];
    end
    q_info = cur[{by, bx}];
    chroma = is_chroma;
    vmode  = (state != S_H);
    qp_q   = mb.qp_cur;
    qp_p   = !mb_edge ? mb.qp_cur : (state == S_H) ? mb.qp_left : mb.qp_top;
  end

  dbf_bs_unit u_bs (
    .p_info, .q_info, .mb_edge,
    .nb_avail   ((state == S_H) ? mb.left_avail : mb.top_avail),
    .sp_si_slice(mb.sp_si_slice),
    .bs
  );

  // Datapath control.
  always_comb begin
    arr_mode   = ARR_HOLD;
    dp_we      = '0;
    dp_addr[0] = '0;
    dp_addr[1] = '0;
    dp_wsel[0] = 2'd2;
    dp_wsel[1] = 2'd2;
    p_bank     = col_bank(int'(pcol));
    load_bank  = col_bank(int'(vcol));
    case (state)
      S_H: begin
        arr_mode = ARR_DOWN;
        dp_addr[col_bank(int'(pcol))] = col_base(int'(pcol)) + 7'(pw) + 7'(cyc[1:0]);
        dp_addr[col_bank(int'(qcol))] = col_base(int'(qcol)) + 7'(qw) + 7'(cyc[1:0]);
        dp_wsel[col_bank(int'(pcol))] = 2'd0;
        dp_wsel[col_bank(int'(qcol))] = 2'd1;
        dp_we = cyc[2] ? 2'b11 : 2'b00;
      end
      S_VLS, S_VDRAIN: begin
        arr_mode = ARR_RIGHT;
        if (state == S_VLS)
          dp_addr[col_bank(int'(vcol))] = col_base(int'(vcol)) + 7'(vwb) + 7'(cyc);
        if (has_prev) begin
          dp_addr[col_bank(int'(prev_col))] = col_base(int'(prev_col)) + 7'(prev_wb) + 7'(cyc);
          dp_we[col_bank(int'(prev_col))]   = 1'b1;
        end
      end
      S_VF: arr_mode = ARR_DOWN;
      default: ;
    endcase
  end

  always_comb begin
    case (state)
      S_INFO:                  phase = PH_LOAD_INFO;
      S_PIX:                   phase = PH_LOAD_PIX;
      S_H:                     phase = PH_HFILT;
      S_VLS, S_VF, S_VDRAIN:   phase = PH_VFILT;
      S_STORE:                 phase = PH_STORE;
      default:                 phase = PH_IDLE;
    endcase
    busy = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      edge_i   <= '0;
      cyc      <= '0;
      has_prev <= 1'b0;
      prev_col <= '0;
      prev_wb  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) state <= S_INFO;
        S_INFO:  if (xfer_done) state <= S_PIX;
        S_PIX:   if (xfer_done) begin state <= S_H; edge_i <= '0; cyc <= '0; end
        S_H: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd7) begin
            if (int'(edge_i) == NUM_EDGES - 1) begin
              state    <= S_VLS;
              edge_i   <= '0;
              has_prev <= 1'b0;
            end else begin
              edge_i <= edge_i + 5'd1;
            end
          end
        end
        S_VLS: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd7) begin
            state <= S_VF;
            cyc   <= '0;
          end
        end
        S_VF: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd3) begin
            cyc      <= '0;
            has_prev <= 1'b1;
            prev_col <= vcol;
            prev_wb  <= vwb;
            state    <= last_of_comp ? S_VDRAIN : S_VLS;
            if (!last_of_comp) edge_i <= edge_i + 5'd1;
          end
        end
        S_VDRAIN: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd7) begin
            has_prev <= 1'b0;
            if (int'(edge_i) == NUM_EDGES - 1) begin
              state  <= S_STORE;
              edge_i <= '0;
            end else begin
              state  <= S_VLS;
              edge_i <= edge_i + 5'd1;
            end
          end
        end
        S_STORE: if (xfer_done) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The load and the store of a load/store phase must use different SRAMs.
  a_bank_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_VLS && has_prev) |-> (col_bank(int'(vcol)) != col_bank(int'(prev_col))))
    else $error("load/store bank conflict: column %0d vs %0d", vcol, prev_col);

endmodule
