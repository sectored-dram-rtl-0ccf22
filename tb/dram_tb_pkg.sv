// Testbench helpers: the initial content of the behavioural DRAM arrays
// and the matching reference value of a 64-bit word, so that reference
// models can predict data that was never written.
package dram_tb_pkg;
  import sdram_pkg::*;

  function automatic logic [7:0] init_byte(int rank, int chip, int bank, int row, int col, int sect);
    return 8'((rank * 7 + chip * 31 + bank * 13 + row * 17 + col * 3 + sect * 101) ^ (row >> 3) ^ (col << 4));
  endfunction

  // Word `sect` of block blk_addr (address map row|bank|rank|col).
  function automatic word_t init_word(logic [BLK_ADDR_W-1:0] blk, int sect);
    word_t w;
    int row, bank, rank, col;
    col  = int'(blk[COL_W-1:0]);
    rank = int'(blk[COL_W +: RANK_W]);
    bank = int'(blk[COL_W+RANK_W +: BANK_W]);
    row  = int'(blk[BLK_ADDR_W-1 -: ROW_W]);
    for (int c = 0; c < NCHIPS; c++) w[c*8 +: 8] = init_byte(rank, c, bank, row, col, sect);
    return w;
  endfunction
endpackage
