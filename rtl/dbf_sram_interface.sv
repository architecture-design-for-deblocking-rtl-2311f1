// dbf_sram_interface: connects the two single-port SRAMs to the bus interface
// and to the filter datapath.
//
// While bus_sel is high the bus interface owns both SRAMs (one access per
// cycle, to the bank it names). Otherwise the control unit drives each SRAM's
// write enable and address, and selects per SRAM which array port supplies the
// write data: port 3 (left half of the bottom row), port 4 (right half) or port
// 5 (right column). On the read side it hands the filter the word of the p
// column (from SRAM p_bank) and of the q column (from the other SRAM), and hands
// port 0 of the array the word of SRAM load_bank. The existence of an SRAM
// interface follows the architecture; the multiplexing is this design's.
//
// Purely combinational.
module dbf_sram_interface
  import dbf_pkg::*;
(
  // bus side
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic        bus_bank,
  input  logic [6:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // datapath side, per SRAM
  input  logic [1:0]  dp_we,
  input  logic [6:0]  dp_addr [2],
  input  logic [1:0]  dp_wsel [2],    // 0: port 3, 1: port 4, 2: port 5
  input  word_t       port3,
  input  word_t       port4,
  input  word_t       port5,
  input  logic        p_bank,
  input  logic        load_bank,
  output word_t       sram_p_word,
  output word_t       sram_q_word,
  output word_t       load_word,
  // SRAM pins
  output logic [1:0]  sram_we,
  output logic [6:0]  sram_addr [2],
  output logic [31:0] sram_wdata [2],
  input  logic [31:0] sram_rdata [2]
);

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (bus_sel) begin
        sram_we[b]    = bus_we && (bus_bank == 1'(b));
        sram_addr[b]  = bus_addr;
        sram_wdata[b] = bus_wdata;
      end else begin
        sram_we[b]    = dp_we[b];
        sram_addr[b]  = dp_addr[b];
        case (dp_wsel[b])
          2'd0:    sram_wdata[b] = port3;
          2'd1:    sram_wdata[b] = port4;
          default: sram_wdata[b] = port5;
        endcase
      end
    end
    bus_rdata   = sram_rdata[bus_bank];
    sram_p_word = sram_rdata[p_bank];
    sram_q_word = sram_rdata[~p_bank];
    load_word   = sram_rdata[load_bank];
  end

endmodule
