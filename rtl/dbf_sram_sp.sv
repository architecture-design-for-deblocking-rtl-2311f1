// dbf_sram_sp: single-port on-chip SRAM, one 32-bit word (4 pixels) wide.
//
// One access per cycle: a write when we is high, otherwise a read. The read is
// combinational: rdata shows mem[addr] in the same cycle, which is what lets the
// datapath spend exactly 8 cycles per block pair (4 reads, 4 writes) and 8
// cycles per load/store of a column pair. Written as an array so that a
// technology SRAM macro (96x32 and 64x32 in this design) can replace it; the
// read timing is this design's choice. Contents are not reset.
module dbf_sram_sp #(
  parameter int DEPTH = 96,
  parameter int AW    = 7
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [31:0] mem [DEPTH];
  logic [IW-1:0] idx;
  logic          in_range;

  assign idx      = IW'(addr);
  assign in_range = int'(addr) < DEPTH;

  always_ff @(posedge clk) begin
    if (we && in_range) mem[idx] <= wdata;
  end

  assign rdata = in_range ? mem[idx] : '0;

endmodule
