// dbf_top: H.264 deblocking-filter accelerator for one macroblock at a time.
//
// A host streams in, over a 32-bit bus, INFO_WORDS words of coding information
// and 160 pixel words: the 16x16 luma and two 8x8 chroma blocks of the current
// macroblock plus the 4-pixel strips of the left and top neighbours that the
// edge filters touch. The words go into two single-port SRAMs (96x32 and 64x32)
// organised so that horizontally adjacent 4-pixel columns sit in different
// SRAMs. One 8-pixel 1-D filter and an 8x4 pixel array with a reconfigurable
// (downward or rightward) shift path then filter all vertical edges and all
// horizontal edges, and the 160 filtered words are streamed back out.
//
// Interface: pulse start for one cycle in idle; feed in_data with
// in_valid/in_ready (coding information first, then pixel words in column
// order c0..c10, top to bottom); take the result from out_data with
// out_valid/out_ready in the same order. done pulses after the last output
// word. With streams that never stall one macroblock takes 874 cycles of work
// and done rises one cycle after the last output word, 875 cycles after start.
//
// The block structure follows the architecture (bus interface, two SRAMs, SRAM
// interface, pixel array, 1-D filters, coding information registers, control
// unit). The bus protocol, coding information layout and SRAM read timing are
// this design's choices.
module dbf_top
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        line_filtered   // the filter changed the current line (status)
);

  phase_e     phase;
  logic       xfer_done;
  logic       info_we;
  logic [5:0] info_waddr;
  logic [31:0] info_wdata;
  logic       bus_we, bus_bank;
  logic [6:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  mb_param_t  mb;
  blk_info_t  cur [16];
  blk_info_t  left [4];
  blk_info_t  top [4];

  arr_mode_e  arr_mode;
  logic       vmode, chroma;
  logic [2:0] bs;
  logic [5:0] qp_p, qp_q;
  logic [1:0] dp_we;
  logic [6:0] dp_addr [2];
  logic [1:0] dp_wsel [2];
  logic       p_bank, load_bank;

  word_t      port0, port1, port2, port3, port4, port5;
  word_t      sram_p_word, sram_q_word;
  logic       filt_flag;

  logic [1:0]  sram_we;
  logic [6:0]  sram_addr [2];
  logic [31:0] sram_wdata [2];
  logic [31:0] sram_rdata [2];

  dbf_bus_interface u_bus (
    .clk, .rst_n, .phase,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .info_we, .info_waddr, .info_wdata,
    .bus_we, .bus_bank, .bus_addr, .bus_wdata, .bus_rdata,
    .done(xfer_done)
  );

  dbf_coding_info_regs u_info (
    .clk, .rst_n, .we(info_we), .waddr(info_waddr), .wdata(info_wdata),
    .mb, .cur, .left, .top
  );

  dbf_control_unit u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .phase, .xfer_done,
    .mb, .cur, .left, .top,
    .arr_mode, .vmode, .bs, .qp_p, .qp_q, .chroma,
    .dp_we, .dp_addr, .dp_wsel, .p_bank, .load_bank
  );

  dbf_sram_interface u_sif (
    .bus_sel(phase == PH_LOAD_PIX || phase == PH_STORE),
    .bus_we, .bus_bank, .bus_addr, .bus_wdata, .bus_rdata,
    .dp_we, .dp_addr, .dp_wsel,
    .port3, .port4, .port5,
    .p_bank, .load_bank,
    .sram_p_word, .sram_q_word, .load_word(port0),
    .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );

  dbf_sram_sp #(.DEPTH(SRAM0_DEPTH), .AW(7)) u_sram0 (
    .clk, .we(sram_we[0]), .addr(sram_addr[0]), .wdata(sram_wdata[0]), .rdata(sram_rdata[0])
  );

  dbf_sram_sp #(.DEPTH(SRAM1_DEPTH), .AW(7)) u_sram1 (
    .clk, .we(sram_we[1]), .addr(sram_addr[1]), .wdata(sram_wdata[1]), .rdata(sram_rdata[1])
  );

  dbf_pixel_array u_array (
    .clk, .rst_n, .mode(arr_mode),
    .port1_in(port1), .port2_in(port2), .port0_in(port0),
    .port3_out(port3), .port4_out(port4), .port5_out(port5)
  );

  dbf_filter_unit u_filter (
    .vmode, .sram_p_word, .sram_q_word, .port3, .port4,
    .bs, .qp_p, .qp_q, .chroma,
    .chroma_qp_offset(mb.chroma_qp_offset), .offset_a(mb.offset_a), .offset_b(mb.offset_b),
    .port1, .port2, .filtered(filt_flag)
  );

  // A line is really filtered only in the cycles that feed the filter result
  // into the array: the first four cycles of an edge (horizontal) or the
  // filtering phase (vertical).
  assign line_filtered = filt_flag && (arr_mode == ARR_DOWN) &&
                         ((phase == PH_VFILT) || !dp_we[0]);

endmodule
