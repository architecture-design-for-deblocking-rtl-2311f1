// dbf_top_tb: end-to-end test of the deblocking accelerator at its default size.
//
// For each macroblock it builds a random picture (smooth blocks with small
// steps so that the filters act) and random coding information, deblocks a
// copy with the reference model of dbf_ref_pkg, streams the coding information
// and the 160 pixel words into the design and compares the 160 words that come
// out. Macroblock kinds cover inter blocks (Bs 0..2), all-intra (Bs 3/4), mixed,
// no left neighbour and no top neighbour; the last ones throttle both streams
// at random. With unthrottled streams the macroblock must take 874 cycles
// (50 info + 160 load + 192 horizontal + 312 vertical + 160 store) from the
// clock edge that samples start to the one that moves the last output word;
// done follows one cycle later, so start-to-done is 875.
// It also counts how often each mechanism happened: horizontal edges,
// vertical load/store phases with a simultaneous load and store, vertical
// filtering phases, per-component store-only phases, each Bs value on a
// filtered line, input and output stalls. One that never happened fails.
module dbf_top_tb;
  import dbf_ref_pkg::*;

  localparam int NUM_MB   = 10;
  localparam int LATENCY  = 874 + 1;   // + the registered done pulse

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic busy, done;
  logic in_valid = 0, in_ready;
  logic [31:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  logic line_filtered;

  int checks = 0, failures = 0;
  int n_hedge = 0, n_vls = 0, n_vls_both = 0, n_vf = 0, n_drain = 0;
  int n_bs [5] = '{0, 0, 0, 0, 0};
  int n_in_stall = 0, n_out_stall = 0, n_chroma = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dbf_top dut (.*);

  // Mechanism counters, from the control unit's observable state.
  always @(posedge clk) if (rst_n) begin
    if (dut.phase == dbf_pkg::PH_HFILT && dut.u_ctrl.cyc == 3'd0) n_hedge++;
    if (dut.phase == dbf_pkg::PH_VFILT && dut.arr_mode == dbf_pkg::ARR_RIGHT && dut.u_ctrl.cyc == 3'd0) begin
      if (int'(dut.u_ctrl.state) == 4) n_vls++; else n_drain++;
    end
    if (int'(dut.u_ctrl.state) == 4 && dut.sram_we != 2'b00 && dut.u_ctrl.cyc == 3'd0) n_vls_both++;
    if (dut.phase == dbf_pkg::PH_VFILT && dut.arr_mode == dbf_pkg::ARR_DOWN && dut.u_ctrl.cyc == 3'd0) n_vf++;
    if (line_filtered) begin
      n_bs[dut.bs]++;
      if (dut.chroma) n_chroma++;
    end
    if (in_ready && !in_valid && busy) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
  end

  task automatic run_mb(input int kind, input bit throttle);
    mb_pic_t pic, exp_pic;
    ref_info_t inf;
    bit [31:0] pw [160], ew [160], iw [50];
    bit [31:0] got [160];
    longint t0, lat;
    int nfilt, nout;
    rand_pic(pic, $urandom_range(40, 200), (kind == 1) ? 12 : 6, 3);
    rand_info(inf, kind);
    exp_pic = pic;
    nfilt = r_deblock(exp_pic, inf);
    pic_to_words(pic, pw);
    pic_to_words(exp_pic, ew);
    info_to_words(inf, iw);

    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    fork
      begin : feed
        int k = 0;
        while (k < 50 + 160) begin
          in_valid = !throttle || ($urandom_range(0, 3) != 0);
          in_data  = (k < 50) ? iw[k] : pw[k - 50];
          @(posedge clk);
          if (in_valid && in_ready) k++;
          #1;
        end
        in_valid = 0;
      end
      begin : drain
        nout = 0;
        while (nout < 160) begin
          out_ready = !throttle || ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin got[nout] = out_data; nout++; end
          #1;
        end
        out_ready = 0;
      end
    join
    while (!done) @(posedge clk);
    lat = cyc - t0;
    for (int i = 0; i < 160; i++) begin
      checks++;
      if (got[i] !== ew[i]) begin
        failures++;
        if (failures < 10) $display("MB kind %0d word %0d: got %08x expected %08x (input %08x)", kind, i, got[i], ew[i], pw[i]);
      end
    end
    if (!throttle) begin
      checks++;
      if (lat != LATENCY) begin
        failures++;
        $display("MB kind %0d: latency %0d cycles, expected %0d", kind, lat, LATENCY);
      end
    end
    $display("MB kind %0d throttle %0d: %0d lines filtered by the reference, latency %0d", kind, throttle, nfilt, lat);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < NUM_MB; m++) run_mb(m % 5, m >= 7);
    // Every mechanism must have happened.
    checks++; if (n_hedge != 24 * NUM_MB) begin failures++; $display("horizontal edges %0d", n_hedge); end
    checks++; if (n_vls != 24 * NUM_MB) begin failures++; $display("vertical load/store phases %0d", n_vls); end
    checks++; if (n_vls_both != 21 * NUM_MB) begin failures++; $display("load+store phases %0d", n_vls_both); end
    checks++; if (n_vf != 24 * NUM_MB) begin failures++; $display("vertical filter phases %0d", n_vf); end
    checks++; if (n_drain != 3 * NUM_MB) begin failures++; $display("store-only phases %0d", n_drain); end
    for (int b = 1; b <= 4; b++) begin
      checks++; if (n_bs[b] == 0) begin failures++; $display("no filtered line with Bs=%0d", b); end
    end
    checks++; if (n_chroma == 0) begin failures++; $display("no chroma line filtered"); end
    checks++; if (n_in_stall == 0) begin failures++; $display("input never stalled"); end
    checks++; if (n_out_stall == 0) begin failures++; $display("output never stalled"); end
    $display("mechanisms: hedges=%0d vls=%0d vls_load_store=%0d vf=%0d drains=%0d bs1=%0d bs2=%0d bs3=%0d bs4=%0d chroma=%0d in_stall=%0d out_stall=%0d",
             n_hedge, n_vls, n_vls_both, n_vf, n_drain, n_bs[1], n_bs[2], n_bs[3], n_bs[4], n_chroma, n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
