// dbf_bus_interface_tb: runs the three bus phases with a randomly throttled
// stream. Loading: every coding-information word must reach its register and
// every pixel word its SRAM bank and address (column order c0..c10, top to
// bottom), each SRAM word exactly once. Storing: the same order, with the SRAM
// read data on the output stream. done must pulse exactly on each last word.
module dbf_bus_interface_tb;
  import dbf_pkg::*;
  import dbf_tb_addr_pkg::*;

  logic clk = 0, rst_n = 0;
  phase_e phase = PH_IDLE;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = '0, out_data;
  logic info_we;
  logic [5:0] info_waddr;
  logic [31:0] info_wdata;
  logic bus_we, bus_bank;
  logic [6:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign bus_rdata = {24'h5a5a00, bus_bank, bus_addr};

  dbf_bus_interface dut (.*);

  initial begin
    int k, col, word, hits [2][96], n_done;
    #12 rst_n = 1;
    // coding information
    @(negedge clk) phase = PH_LOAD_INFO;
    k = 0; n_done = 0;
    while (k < 50) begin
      in_valid = 1'($urandom_range(0, 3) != 0); in_data = $urandom;
      #1;
      checks++; if (!in_ready) failures++;
      if (in_valid) begin
        checks += 3;
        if (!info_we || int'(info_waddr) != k || info_wdata != in_data) failures++;
        if (done != (k == 49)) failures++;
        if (bus_we) failures++;
        k++;
      end else begin checks++; if (info_we || done) failures++; end
      @(negedge clk);
    end
    // pixel words
    phase = PH_LOAD_PIX;
    col = 0; word = 0;
    for (int b = 0; b < 2; b++) for (int a = 0; a < 96; a++) hits[b][a] = 0;
    while (col < 11) begin
      in_valid = 1'($urandom_range(0, 3) != 0); in_data = $urandom;
      #1;
      if (in_valid) begin
        checks += 5;
        if (!bus_we) failures++;
        if (int'(bus_bank) != tb_bank(col)) failures++;
        if (int'(bus_addr) != tb_addr(col, word)) failures++;
        if (bus_wdata != in_data) failures++;
        if (done != (col == 10 && word == 11)) failures++;
        hits[bus_bank][bus_addr]++;
        word++;
        if (word == tb_len(col)) begin word = 0; col++; end
      end else begin checks++; if (bus_we) failures++; end
      @(negedge clk);
    end
    in_valid = 0;
    for (int a = 0; a < 96; a++) begin checks++; if (hits[0][a] != 1) failures++; end
    for (int a = 0; a < 64; a++) begin checks++; if (hits[1][a] != 1) failures++; end
    // store
    phase = PH_STORE;
    col = 0; word = 0;
    while (col < 11) begin
      out_ready = 1'($urandom_range(0, 2) != 0);
      #1;
      checks += 3;
      if (!out_valid) failures++;
      if (bus_we || in_ready) failures++;
      if (out_data != {24'h5a5a00, 1'(tb_bank(col)), 7'(tb_addr(col, word))}) failures++;
      if (out_ready) begin
        checks++; if (done != (col == 10 && word == 11)) failures++;
        word++;
        if (word == tb_len(col)) begin word = 0; col++; end
      end
      @(negedge clk);
    end
    phase = PH_IDLE;
    #1 checks++; if (out_valid || in_ready) failures++;
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
