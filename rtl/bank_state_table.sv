// Bank state table of the memory controller, extended with sector bits.
//
// One entry per bank of every rank holds whether the bank has an open row,
// which row, and the bank's sector bits: the sectors that the last
// PRECHARGE sent to that bank's sector latches. While the bank is closed
// these are the sectors the next ACTIVATE will open; while it is open they
// are the sectors that are open, and their popcount is the burst length of
// every READ/WRITE to the bank (eight bits per bank, 128 bits for the 16
// banks of a rank). The controller and the chip both derive the burst
// length from the same bits, so no burst length is ever transmitted.
//
// Updates take effect at the clock edge of the issued command; all entries
// are read combinationally. Reset: all banks closed, sector bits all ones,
// matching the reset value of the chip's sector latches.
module bank_state_table
  import sdram_pkg::*;
#(
  parameter int unsigned NUM_BANKS = NBANKS << RANK_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pre_v,
  input  logic [$clog2(NUM_BANKS)-1:0] pre_idx,
  input  sect_t                        pre_sb,
  input  logic                         act_v,
  input  logic [$clog2(NUM_BANKS)-1:0] act_idx,
  input  logic [ROW_W-1:0]             act_row,
  output logic                         is_open [NUM_BANKS],
  output logic [ROW_W-1:0]             open_row [NUM_BANKS],
  output sect_t                        bank_sb [NUM_BANKS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        is_open[b]  <= 1'b0;
        open_row[b] <= '0;
        bank_sb[b]  <= '1;
      end
    end else begin
      if (pre_v) begin
        is_open[pre_idx] <= 1'b0;
        bank_sb[pre_idx] <= pre_sb;
      end
      if (act_v) begin
        is_open[act_idx]  <= 1'b1;
        open_row[act_idx] <= act_row;
      end
    end
  end

  // A bank cannot be precharged and activated by the same command.
  assert property (@(posedge clk) disable iff (!rst_n) !(pre_v && act_v && pre_idx == act_idx));
endmodule
