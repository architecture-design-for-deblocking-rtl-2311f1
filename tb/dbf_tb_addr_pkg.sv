// dbf_tb_addr_pkg: the on-chip memory map as the testbenches expect it, written
// out independently of the RTL package: SRAM0 (96 words) holds columns c10, c8,
// c7, c5, c4, c2, c0 of 12, 8, 12, 8, 20, 20, 16 words from address 0 up; SRAM1
// (64 words) holds c9, c6, c3, c1 of 12, 12, 20, 20 words.
package dbf_tb_addr_pkg;
  function automatic int tb_bank(int col);
    return (col == 1 || col == 3 || col == 6 || col == 9) ? 1 : 0;
  endfunction
  function automatic int tb_addr(int col, int word);
    int order0 [7] = '{10, 8, 7, 5, 4, 2, 0};
    int order1 [4] = '{9, 6, 3, 1};
    int len [11] = '{16, 20, 20, 20, 20, 8, 12, 12, 8, 12, 12};
    int a = 0;
    if (tb_bank(col) == 0) begin
      foreach (order0[i]) begin if (order0[i] == col) return a + word; a += len[order0[i]]; end
    end else begin
      foreach (order1[i]) begin if (order1[i] == col) return a + word; a += len[order1[i]]; end
    end
    return -1;
  endfunction
  function automatic int tb_len(int col);
    int len [11] = '{16, 20, 20, 20, 20, 8, 12, 12, 8, 12, 12};
    return len[col];
  endfunction
endpackage
