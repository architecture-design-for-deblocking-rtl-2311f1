// dbf_sram_interface_tb: random requests through the SRAM interface, checking
// every SRAM pin and every read-data route against the selection rules.
module dbf_sram_interface_tb;
  import dbf_pkg::*;

  logic bus_sel, bus_we, bus_bank;
  logic [6:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [1:0] dp_we;
  logic [6:0] dp_addr [2];
  logic [1:0] dp_wsel [2];
  word_t port3, port4, port5;
  logic p_bank, load_bank;
  word_t sram_p_word, sram_q_word, load_word;
  logic [1:0] sram_we;
  logic [6:0] sram_addr [2];
  logic [31:0] sram_wdata [2];
  logic [31:0] sram_rdata [2];
  int checks = 0, failures = 0;

  dbf_sram_interface dut (.*);

  initial begin
    logic [31:0] ew;
    for (int t = 0; t < 5000; t++) begin
      bus_sel = 1'($urandom); bus_we = 1'($urandom); bus_bank = 1'($urandom);
      bus_addr = 7'($urandom); bus_wdata = $urandom;
      dp_we = 2'($urandom); dp_addr[0] = 7'($urandom); dp_addr[1] = 7'($urandom);
      dp_wsel[0] = 2'($urandom_range(0, 2)); dp_wsel[1] = 2'($urandom_range(0, 2));
      port3 = $urandom; port4 = $urandom; port5 = $urandom;
      p_bank = 1'($urandom); load_bank = 1'($urandom);
      sram_rdata[0] = $urandom; sram_rdata[1] = $urandom;
      #1;
      for (int b = 0; b < 2; b++) begin
        checks += 3;
        if (bus_sel) begin
          if (sram_we[b] != (bus_we && bus_bank == 1'(b))) failures++;
          if (sram_addr[b] != bus_addr) failures++;
          if (sram_wdata[b] != bus_wdata) failures++;
        end else begin
          ew = (dp_wsel[b] == 0) ? port3 : (dp_wsel[b] == 1) ? port4 : port5;
          if (sram_we[b] != dp_we[b]) failures++;
          if (sram_addr[b] != dp_addr[b]) failures++;
          if (sram_wdata[b] != ew) failures++;
        end
      end
      checks += 4;
      if (bus_rdata != sram_rdata[bus_bank]) failures++;
      if (sram_p_word != sram_rdata[p_bank]) failures++;
      if (sram_q_word != sram_rdata[!p_bank]) failures++;
      if (load_word != sram_rdata[load_bank]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
