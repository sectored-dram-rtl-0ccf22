// DDR4 command decoder of a Sectored DRAM chip.
//
// Decodes the standard DDR4 command/address pins of one clock into a
// command, bank, row, column and sector bits. The physical interface is
// unchanged: the only addition is that a PRECHARGE (single bank, A10 low,
// or all banks, A10 high) carries eight sector bits on address pins A7..A0,
// which plain DDR4 leaves unused in that command. DDR4 leaves fourteen
// address pins free in PRE (A0-A9, A11-A13, A17), which is where the limit
// of fourteen sector bits comes from; this design uses eight of them.
//
// Pin roles follow DDR4: ACT_n low is ACTIVATE with the row on A14..A0
// (A16..A14 double as RAS_n/CAS_n/WE_n otherwise); with ACT_n high,
// RAS_n/CAS_n/WE_n = L,H,L is PRECHARGE, H,L,H is READ, H,L,L is WRITE and
// L,L,H is REFRESH. The block column of a READ/WRITE is A9..A3 (a 64-byte
// block is eight x8 columns, so A2..A0 are the burst start, always zero
// here). Combinational.
module ddr4_cmd_decoder
  import sdram_pkg::*;
(
  input  ddr4_ca_t  ca,
  output dram_dec_t dec
);
  always_comb begin
    dec      = '0;
    dec.cmd  = CMD_NOP;
    dec.bank = {ca.bg, ca.ba};
    dec.row  = ca.a[ROW_W-1:0];
    dec.col  = ca.a[9:3];
    dec.sb   = ca.a[NSECT-1:0];
    if (!ca.cs_n) begin
      if (!ca.act_n) begin
        dec.cmd = CMD_ACT;
      end else begin
        unique case ({ca.a[16], ca.a[15], ca.a[14]})
          3'b010:  dec.cmd = ca.a[10] ? CMD_PREA : CMD_PRE;
          3'b101:  dec.cmd = CMD_RD;
          3'b100:  dec.cmd = CMD_WR;
          3'b001:  dec.cmd = CMD_REF;
          default: dec.cmd = CMD_NOP;
        endcase
      end
    end
  end
endmodule
