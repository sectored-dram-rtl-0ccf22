// Shared types and constants of the Sectored DRAM design.
//
// A Sectored DRAM system splits every DRAM row into eight independently
// activatable sectors (one per MAT) and lets a read or write burst carry
// only the 64-bit words of a cache block whose sectors are enabled. One
// sector of each of the eight x8 chips of a rank together holds one 64-bit
// word of a 512-bit cache block, so "sector bit i" and "word i of a cache
// block" are the same thing everywhere in this design.
//
// Geometry (eight sectors per subarray, 16 banks, 32K rows per bank, four
// ranks, eight x8 chips per rank, 64-byte blocks) follows the evaluated
// DDR4 configuration. The pin-level command encoding is standard DDR4; the
// placement of the sector bits on address pins A7..A0 of PRECHARGE is this
// design's choice among the pins DDR4 leaves unused in that command.
package sdram_pkg;

  localparam int unsigned NSECT      = 8;    // sectors per row = words per block
  localparam int unsigned WORD_W     = 64;   // one word / one beat of the rank
  localparam int unsigned BLOCK_W    = NSECT * WORD_W;  // 512-bit cache block
  localparam int unsigned CHIP_DQ    = 8;    // x8 chips
  localparam int unsigned NCHIPS     = WORD_W / CHIP_DQ; // chips per rank
  localparam int unsigned BANK_W     = 4;    // 4 bank groups x 4 banks
  localparam int unsigned NBANKS     = 1 << BANK_W;
  localparam int unsigned ROW_W      = 15;   // 32K rows per bank
  localparam int unsigned COL_W      = 7;    // 128 block columns per 1 KB chip row
  localparam int unsigned RANK_W     = 2;    // 4 ranks
  localparam int unsigned BLK_ADDR_W = ROW_W + BANK_W + RANK_W + COL_W; // 28
  localparam int unsigned SECT_IDX_W = $clog2(NSECT);

  typedef logic [NSECT-1:0]             sect_t;
  typedef logic [WORD_W-1:0]            word_t;
  typedef logic [NSECT-1:0][WORD_W-1:0] block_t;
  typedef logic [NSECT-1:0][CHIP_DQ-1:0] chip_slice_t; // one chip's share of a block

  // DDR4 command/address pins of one rank. a[16]=RAS_n, a[15]=CAS_n,
  // a[14]=WE_n when act_n is high; a[10] is AP / precharge-all.
  typedef struct packed {
    logic        cs_n;
    logic        act_n;
    logic [1:0]  bg;
    logic [1:0]  ba;
    logic [17:0] a;
  } ddr4_ca_t;

  localparam ddr4_ca_t CA_DESELECT = '{cs_n: 1'b1, act_n: 1'b1, bg: '0, ba: '0, a: 18'h1C000};

  typedef enum logic [2:0] {
    CMD_NOP, CMD_ACT, CMD_PRE, CMD_PREA, CMD_RD, CMD_WR, CMD_REF
  } dram_cmd_e;

  // Decoded command inside a chip.
  typedef struct packed {
    dram_cmd_e          cmd;
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
    sect_t              sb;     // sector bits carried by PRE / PREA
  } dram_dec_t;

  // Request from a chip's control logic to its cell array (MATs). Row
  // commands and the two column paths carry their own bank fields because
  // a delayed READ column access, the commit of a WRITE burst and a new
  // ACT/PRE can fall into the same clock.
  typedef struct packed {
    logic               act;     // drive master wordline of (bank,row)
    logic               pre;     // close the open row of bank
    logic               pre_all; // close the open rows of all banks
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    sect_t              lwl_en;  // local wordlines driven on act (per sector)
    logic               rd;      // column read into the Read FIFO
    logic [BANK_W-1:0]  rd_bank;
    logic [COL_W-1:0]   rd_col;
    logic               wr;      // Write FIFO into the sense amplifiers
    logic [BANK_W-1:0]  wr_bank;
    logic [COL_W-1:0]   wr_col;
    sect_t              wmask;   // sectors written on wr
    chip_slice_t        wdata;
  } arr_req_t;

  // Memory request between cache and memory controller.
  typedef struct packed {
    logic                  write;
    logic [BLK_ADDR_W-1:0] blk_addr;
    sect_t                 sb;     // words requested (read) or carried (write)
    block_t                data;
  } mem_req_t;

  typedef struct packed {
    sect_t  mask;                  // words present in data
    block_t data;
  } mem_rsp_t;

  // Core-side memory instruction, as kept in the load/store queue.
  typedef struct packed {
    logic [31:0] pc;
    logic [BLK_ADDR_W+5:0] addr;   // byte address
    logic        is_store;
    word_t       wdata;
  } mem_op_t;

endpackage
