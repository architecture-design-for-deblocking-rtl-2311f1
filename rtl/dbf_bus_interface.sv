// dbf_bus_interface: the accelerator's side of the 32-bit system bus.
//
// Moves one 32-bit word per cycle. In PH_LOAD_INFO it takes INFO_WORDS words
// from the input stream into the coding-information registers; in PH_LOAD_PIX it
// takes the 160 pixel words of the macroblock and its neighbours and writes
// each into the SRAM and address of its column; in PH_STORE it reads the same
// 160 words back out on the output stream. Pixel words travel column by column
// (c0, c1, ... c10), top to bottom within a column. Both streams use a
// valid/ready handshake: a word moves in a cycle where valid and ready are both
// high. done pulses in the cycle the last word of a phase moves. The word counts
// (160 each way) follow the architecture; the streaming handshake and the word
// order are this design's choice. The data words themselves pass through
// without a register: info_wdata and the SRAM write data are in_data, and
// out_data is the SRAM read word.
module dbf_bus_interface
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  phase_e      phase,
  // input stream from the system bus
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  // output stream to the system bus
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  // coding information registers
  output logic        info_we,
  output logic [5:0]  info_waddr,
  output logic [31:0] info_wdata,
  // SRAM access
  output logic        bus_we,
  output logic        bus_bank,
  output logic [6:0]  bus_addr,
  output logic [31:0] bus_wdata,
  input  logic [31:0] bus_rdata,
  output logic        done
);

  logic [5:0] info_cnt;
  logic [3:0] col;
  logic [4:0] word;
  logic       step;
  logic       last_word;

  always_comb begin
    in_ready   = (phase == PH_LOAD_INFO) || (phase == PH_LOAD_PIX);
    out_valid  = (phase == PH_STORE);
    out_data   = bus_rdata;
    info_we    = (phase == PH_LOAD_INFO) && in_valid;
    info_waddr = info_cnt;
    info_wdata = in_data;
    bus_bank   = col_bank(int'(col));
    bus_addr   = col_base(int'(col)) + 7'(word);
    bus_wdata  = in_data;
    bus_we     = (phase == PH_LOAD_PIX) && in_valid;
    step       = ((phase == PH_LOAD_PIX) && in_valid) || ((phase == PH_STORE) && out_ready);
    last_word  = (col == 4'(NUM_COLS - 1)) && (int'(word) == col_len(NUM_COLS - 1) - 1);
    done       = (info_we && int'(info_cnt) == INFO_WORDS - 1) || (step && last_word);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info_cnt <= '0;
      col      <= '0;
      word     <= '0;
    end else begin
      if (info_we)
        info_cnt <= (int'(info_cnt) == INFO_WORDS - 1) ? '0 : info_cnt + 6'd1;
      if (step) begin
        if (int'(word) == col_len(int'(col)) - 1) begin
          word <= '0;
          col  <= last_word ? '0 : col + 4'd1;
        end else begin
          word <= word + 5'd1;
        end
      end
    end
  end

endmodule
