// Sectored Activation (SA) control of one DRAM chip.
//
// Each bank owns one sector latch per sector. A PRECHARGE writes the sector
// bits it carries into the latches of its bank (a precharge-all writes them
// into every bank); a 1 sets a latch, a 0 resets it. When an ACTIVATE
// drives the master wordline of a bank, the sector transistors connect it
// only to the local wordline drivers of the sectors whose latch is set, so
// only those MATs open the row: lwl_en = ACT & latch[bank]. Because the
// latches only change on PRECHARGE, which also closes the bank's row, the
// latch value of an open bank is exactly its set of activated sectors, and
// the I/O logic reads it through the query port to size bursts.
//
// Timing: latches update at the clock edge that samples the PRE; lwl_en is
// combinational from the decoded ACT of the same cycle. The transistor
// switch is modelled as an AND gate. Reset sets every latch, so that a
// chip that never receives sector bits behaves like a standard DDR4 chip;
// that reset value is this design's choice.
module sectored_activation
  import sdram_pkg::*;
#(
  parameter int unsigned NUM_BANKS = NBANKS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  dram_dec_t                    dec,
  output sect_t                        lwl_en,   // local wordline drive, per sector
  input  logic [$clog2(NUM_BANKS)-1:0] q_bank,
  output sect_t                        q_sb      // activated sectors of q_bank
);
  localparam int unsigned BW = $clog2(NUM_BANKS);

  sect_t latch_q [NUM_BANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) latch_q[b] <= '1;
    end else if (dec.cmd == CMD_PRE) begin
      latch_q[dec.bank[BW-1:0]] <= dec.sb;
    end else if (dec.cmd == CMD_PREA) begin
      for (int b = 0; b < NUM_BANKS; b++) latch_q[b] <= dec.sb;
    end
  end

  // Sector transistors: master wordline reaches a sector's LWDs only if
  // the sector latch is set.
  always_comb lwl_en = (dec.cmd == CMD_ACT) ? latch_q[dec.bank[BW-1:0]] : '0;

  assign q_sb = latch_q[q_bank];
endmodule
