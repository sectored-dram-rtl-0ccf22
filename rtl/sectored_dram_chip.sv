// Control and I/O logic of one x8 Sectored DRAM chip.
//
// The chip keeps the DDR4 pins and adds two mechanisms. Sectored
// Activation: PRECHARGE carries sector bits into per-bank sector latches,
// and ACTIVATE opens the row only in the sectors whose latch is set.
// Variable Burst Length: READ and WRITE bursts carry one beat per
// activated sector of the addressed bank, chosen by the 8x3 encoder, so the
// burst length is the popcount of that bank's sector latches; no command is
// needed to agree on it.
//
// The cell array (MATs, sense amplifiers) is outside this module and is
// driven through `arr` / `arr_rdata` (arr_rdata must answer the rd request
// combinationally in the same cycle, as the column access of a real chip
// completes inside CL).
//
// Timing, in clocks of a model clock that runs at the data rate (one DQ
// beat per clock): a READ sampled in cycle t reads the array in cycle
// t+CL-1 and drives beats in cycles t+CL .. t+CL+BL-1 with dq_valid high. A
// WRITE sampled in cycle t expects beat 0 on dq_in in cycle t+CWL and the
// following beats on consecutive cycles; the Write FIFO is written to the
// array one cycle after the last beat. CL and CWL are this design's values
// (13.75 ns and 10 ns at 3200 MT/s), the document gives neither.
module sectored_dram_chip
  import sdram_pkg::*;
#(
  parameter int unsigned CL  = 44,
  parameter int unsigned CWL = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ddr4_ca_t            ca,
  input  logic [CHIP_DQ-1:0]  dq_in,
  output logic [CHIP_DQ-1:0]  dq_out,
  output logic                dq_valid,
  output arr_req_t            arr,
  input  chip_slice_t         arr_rdata
);
  typedef struct packed {
    logic              v;
    logic [BANK_W-1:0] bank;
    logic [COL_W-1:0]  col;
    sect_t             sb;
  } col_op_t;

  dram_dec_t dec;
  sect_t     lwl_en, bank_sb;
  col_op_t   rd_pipe [CL-1];
  col_op_t   wr_pipe [CWL];
  col_op_t   rd_new, wr_new, rd_out, wr_out, wr_hold_q;
  logic      wr_done;
  sect_t     wr_mask;
  chip_slice_t wr_data;

  ddr4_cmd_decoder u_dec (.ca(ca), .dec(dec));

  sectored_activation #(.NUM_BANKS(NBANKS)) u_sa (
    .clk(clk), .rst_n(rst_n), .dec(dec), .lwl_en(lwl_en),
    .q_bank(dec.bank), .q_sb(bank_sb)
  );

  // The sector latches of an open bank cannot change until it is
  // precharged, so the burst's sector bits are sampled with the command.
  assign rd_new = '{v: dec.cmd == CMD_RD, bank: dec.bank, col: dec.col, sb: bank_sb};
  assign wr_new = '{v: dec.cmd == CMD_WR, bank: dec.bank, col: dec.col, sb: bank_sb};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CL-1; i++) rd_pipe[i] <= '0;
      for (int i = 0; i < CWL; i++)  wr_pipe[i] <= '0;
      wr_hold_q <= '0;
    end else begin
      rd_pipe[0] <= rd_new;
      for (int i = 1; i < CL-1; i++) rd_pipe[i] <= rd_pipe[i-1];
      wr_pipe[0] <= wr_new;
      for (int i = 1; i < CWL; i++) wr_pipe[i] <= wr_pipe[i-1];
      if (wr_out.v) wr_hold_q <= wr_out;
    end
  end

  assign rd_out = rd_pipe[CL-2];
  assign wr_out = wr_pipe[CWL-1];

  vbl_io u_io (
    .clk(clk), .rst_n(rst_n),
    .rd_load(rd_out.v), .rd_sb(rd_out.sb), .rd_data(arr_rdata),
    .dq_out(dq_out), .dq_valid(dq_valid),
    .wr_start(wr_out.v), .wr_sb(wr_out.sb), .dq_in(dq_in),
    .wr_done(wr_done), .wr_mask(wr_mask), .wr_data(wr_data)
  );

  always_comb begin
    arr         = '0;
    arr.act     = (dec.cmd == CMD_ACT);
    arr.pre     = (dec.cmd == CMD_PRE);
    arr.pre_all = (dec.cmd == CMD_PREA);
    arr.bank    = dec.bank;
    arr.row     = dec.row;
    arr.lwl_en  = lwl_en;
    arr.rd      = rd_out.v;
    arr.rd_bank = rd_out.bank;
    arr.rd_col  = rd_out.col;
    arr.wr      = wr_done;
    arr.wr_bank = wr_hold_q.bank;
    arr.wr_col  = wr_hold_q.col;
    arr.wmask   = wr_mask;
    arr.wdata   = wr_data;
  end
endmodule
