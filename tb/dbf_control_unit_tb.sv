// dbf_control_unit_tb: checks the control unit's schedule cycle by cycle.
//
// The testbench plays the bus interface (done after 50, 160 and 160 transfer
// cycles) and lists, independently of the RTL, what each cycle must do:
// horizontal edges in column-boundary order, top to bottom, 4 read cycles and 4
// write cycles on both SRAMs; vertical edges row by row, an 8-cycle load/store
// phase (load from the edge's column, store the previous edge's column in the
// other SRAM), a 4-cycle filter phase, and an 8-cycle store-only phase after
// luma, Cb and Cr. It checks every SRAM address and write enable, the array
// mode, the filter mode, the Bs, chroma flag and QPs of every filtered line,
// and the phase lengths (192 horizontal and 312 vertical cycles).
module dbf_control_unit_tb;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  import dbf_tb_addr_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, xfer_done;
  phase_e phase;
  mb_param_t mb;
  blk_info_t cur [16];
  blk_info_t left [4];
  blk_info_t top [4];
  arr_mode_e arr_mode;
  logic vmode, chroma;
  logic [2:0] bs;
  logic [5:0] qp_p, qp_q;
  logic [1:0] dp_we;
  logic [6:0] dp_addr [2];
  logic [1:0] dp_wsel [2];
  logic p_bank, load_bank;
  int checks = 0, failures = 0;
  int phase_cnt = 0;
  ref_info_t inf;

  always #5 clk = ~clk;

  dbf_control_unit dut (.*);

  always_comb begin
    case (phase)
      PH_LOAD_INFO: xfer_done = (phase_cnt == 49);
      PH_LOAD_PIX, PH_STORE: xfer_done = (phase_cnt == 159);
      default: xfer_done = 0;
    endcase
  end
  always @(posedge clk) begin
    phase_e prev;
    prev = phase;
    #1 phase_cnt = (phase == prev) ? phase_cnt + 1 : 0;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("t=%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Check one cycle of SRAM activity; bank -1 means unused.
  task automatic expect_sram(input int rb, input int ra, input int wb, input int wa, input int ws);
    for (int b = 0; b < 2; b++) begin
      if (b == wb) begin
        expect_eq(dp_we[b], 1, "we");
        expect_eq(dp_addr[b], wa, "write addr");
        expect_eq(dp_wsel[b], ws, "wsel");
      end else begin
        expect_eq(dp_we[b], 0, "we");
        if (b == rb) expect_eq(dp_addr[b], ra, "read addr");
      end
    end
  endtask

  task automatic run();
    int t_h, t_v, y, pc, qc, pword, qword, base, col, pcol, pwb, wb, n_e, e_r [4], e_j [4];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (phase != PH_HFILT) @(negedge clk);
    // horizontal filtering
    t_h = 0;
    for (int e = 0; e < 24; e++) begin
      int j, r, comp;
      if (e < 16) begin j = e / 4; r = e % 4; comp = 0; end
      else begin comp = (e - 16) / 4 + 1; j = ((e - 16) % 4) / 2; r = (e - 16) % 2; end
      base = (comp == 1) ? 5 : 8;
      pc = (comp == 0) ? j : base + j;
      qc = pc + 1;
      for (int k = 0; k < 8; k++) begin
        int i;
        i = k % 4; y = 4 * r + i;
        pword = (j == 0) ? y : y + 4; qword = y + 4;
        expect_eq(phase, PH_HFILT, "phase");
        expect_eq(arr_mode, ARR_DOWN, "arr_mode");
        expect_eq(vmode, 0, "vmode");
        if (k < 4) begin
          expect_eq(dp_we, 0, "we");
          expect_eq(dp_addr[tb_bank(pc)], tb_addr(pc, pword), "p addr");
          expect_eq(dp_addr[tb_bank(qc)], tb_addr(qc, qword), "q addr");
          expect_eq(p_bank, tb_bank(pc), "p_bank");
          expect_eq(chroma, comp != 0, "chroma");
          expect_eq(bs, (comp == 0) ? bs_v(inf, j, r) : bs_v(inf, 2 * j, y / 2), "bs h");
          expect_eq(qp_p, (j == 0) ? inf.qp_left : inf.qp_cur, "qp_p");
          expect_eq(qp_q, inf.qp_cur, "qp_q");
        end else begin
          expect_eq(dp_we, 3, "we");
          expect_eq(dp_addr[tb_bank(pc)], tb_addr(pc, pword), "p waddr");
          expect_eq(dp_addr[tb_bank(qc)], tb_addr(qc, qword), "q waddr");
          expect_eq(dp_wsel[tb_bank(pc)], 0, "p wsel");
          expect_eq(dp_wsel[tb_bank(qc)], 1, "q wsel");
        end
        t_h++;
        @(negedge clk);
      end
    end
    expect_eq(t_h, 192, "horizontal cycles");
    // vertical filtering
    t_v = 0;
    for (int comp = 0; comp < 3; comp++) begin
      n_e = (comp == 0) ? 16 : 4;
      pcol = -1; pwb = 0;
      for (int e = 0; e <= n_e; e++) begin
        int r, j;
        if (e < n_e) begin
          if (comp == 0) begin r = e / 4; j = e % 4; col = 1 + j; end
          else begin r = e / 2; j = e % 2; col = ((comp == 1) ? 6 : 9) + j; end
          wb = 4 * r;
        end
        // load/store (or store-only) phase
        for (int k = 0; k < 8; k++) begin
          expect_eq(phase, PH_VFILT, "phase");
          expect_eq(arr_mode, ARR_RIGHT, "arr_mode ls");
          if (e < n_e) expect_eq(load_bank, tb_bank(col), "load_bank");
          expect_sram(e < n_e ? tb_bank(col) : -1, e < n_e ? tb_addr(col, wb + k) : 0,
                      pcol >= 0 ? tb_bank(pcol) : -1, pcol >= 0 ? tb_addr(pcol, pwb + k) : 0, 2);
          t_v++;
          @(negedge clk);
        end
        if (e == n_e) break;
        // filter phase
        for (int k = 0; k < 4; k++) begin
          int x;
          x = 3 - k;
          expect_eq(arr_mode, ARR_DOWN, "arr_mode vf");
          expect_eq(vmode, 1, "vmode");
          expect_eq(dp_we, 0, "we vf");
          expect_eq(chroma, comp != 0, "chroma");
          expect_eq(bs, (comp == 0) ? bs_h(inf, j, r) : bs_h(inf, (4 * j + x) / 2, 2 * r), "bs v");
          expect_eq(qp_p, (r == 0) ? inf.qp_top : inf.qp_cur, "qp_p v");
          t_v++;
          @(negedge clk);
        end
        pcol = col; pwb = wb;
      end
    end
    expect_eq(t_v, 312, "vertical cycles");
    expect_eq(phase, PH_STORE, "store phase");
    while (!done) @(negedge clk);
    @(negedge clk);
    expect_eq(busy, 0, "idle after done");
  endtask

  initial begin
    bit [31:0] w [50];
    #12 rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      rand_info(inf, m % 5);
      info_to_words(inf, w);
      mb = {w[0][30:0], w[1][4:0]};
      for (int i = 0; i < 16; i++) cur[i] = {w[3+2*i], w[2+2*i]};
      for (int i = 0; i < 4; i++) begin left[i] = {w[35+2*i], w[34+2*i]}; top[i] = {w[43+2*i], w[42+2*i]}; end
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
