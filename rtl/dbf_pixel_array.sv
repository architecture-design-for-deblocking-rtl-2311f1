// dbf_pixel_array: the 8x4 array of 8-bit registers with a reconfigurable path.
//
// Row 0 is the top row, column 0 the leftmost. In ARR_DOWN mode every row moves
// one row down and the top row is loaded from ports 1 and 2 (columns 0..3 and
// 4..7); the bottom row is visible on ports 3 and 4 before the shift. In
// ARR_RIGHT mode every column moves one column right and the left column is
// loaded from port 0 (pixel r of the 4-pixel word into row r); the right column
// is visible on port 5. The downward path serves horizontal filtering and the
// filtering phase of vertical filtering; the rightward path turns SRAM words
// (4x1 pixels) into array columns, i.e. transposes a 4x8 block pair, for the
// load/store phase of vertical filtering. The structure and port numbering
// follow the architecture; reset clears the array (a design choice).
//
// One shift per clock cycle when enabled; outputs are the register contents.
module dbf_pixel_array
  import dbf_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  arr_mode_e mode,
  input  word_t     port1_in,   // top row, columns 0..3
  input  word_t     port2_in,   // top row, columns 4..7
  input  word_t     port0_in,   // left column, rows 0..3
  output word_t     port3_out,  // bottom row, columns 0..3
  output word_t     port4_out,  // bottom row, columns 4..7
  output word_t     port5_out   // right column, rows 0..3
);

  line8_t arr [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) arr[r] <= '0;
    end else begin
      case (mode)
        ARR_DOWN: begin
          for (int r = 3; r > 0; r--) arr[r] <= arr[r-1];
          arr[0] <= {port2_in, port1_in};
        end
        ARR_RIGHT: begin
          for (int r = 0; r < 4; r++) arr[r] <= {arr[r][6:0], port0_in[r]};
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    port3_out = arr[3][3:0];
    port4_out = arr[3][7:4];
    for (int r = 0; r < 4; r++) port5_out[r] = arr[r][7];
  end

endmodule
