// dbf_pixel_array_tb: the 8x4 array against a plain model, with random modes
// and port data, checking ports 3, 4 and 5 every cycle. It then checks the
// transposition used by vertical filtering: eight words shifted in through port
// 0 appear in the bottom row in reverse order (q3..q0 | p0..p3), and four
// downward shifts that feed the bottom row back to the top leave the array
// unchanged, so port 5 returns the eight words in their original order.
module dbf_pixel_array_tb;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  arr_mode_e mode = ARR_HOLD;
  word_t port1_in = '0, port2_in = '0, port0_in = '0, port3_out, port4_out, port5_out;
  pixel_t m [4][8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dbf_pixel_array dut (.*);

  task automatic check_ports();
    for (int c = 0; c < 4; c++) begin
      checks += 2;
      if (port3_out[c] != m[3][c]) failures++;
      if (port4_out[c] != m[3][4+c]) failures++;
    end
    for (int r = 0; r < 4; r++) begin checks++; if (port5_out[r] != m[r][7]) failures++; end
  endtask

  task automatic step();
    @(posedge clk);
    case (mode)
      ARR_DOWN: begin
        for (int r = 3; r > 0; r--) m[r] = m[r-1];
        for (int c = 0; c < 4; c++) begin m[0][c] = port1_in[c]; m[0][4+c] = port2_in[c]; end
      end
      ARR_RIGHT: for (int r = 0; r < 4; r++) begin
        for (int c = 7; c > 0; c--) m[r][c] = m[r][c-1];
        m[r][0] = port0_in[r];
      end
      default: ;
    endcase
    #1;
  endtask

  initial begin
    word_t w [8];
    for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) m[r][c] = '0;
    #12 rst_n = 1;
    #1 check_ports();
    for (int t = 0; t < 3000; t++) begin
      mode = arr_mode_e'($urandom_range(0, 2));
      port0_in = $urandom; port1_in = $urandom; port2_in = $urandom;
      step();
      check_ports();
    end
    // transposing load, four recirculating shifts, ordered store
    for (int k = 0; k < 8; k++) w[k] = $urandom;
    mode = ARR_RIGHT;
    for (int k = 0; k < 8; k++) begin port0_in = w[k]; step(); end
    for (int c = 0; c < 8; c++) begin checks++; if (c < 4 ? port3_out[c] != w[7-c][3] : port4_out[c-4] != w[7-c][3]) failures++; end
    mode = ARR_DOWN;
    for (int k = 0; k < 4; k++) begin port1_in = port3_out; port2_in = port4_out; step(); end
    mode = ARR_RIGHT;
    for (int k = 0; k < 8; k++) begin checks++; if (port5_out != w[k]) failures++; port0_in = '0; step(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
