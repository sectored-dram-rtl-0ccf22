// Behavioural model of the cell array (MATs, sense amplifiers) of one x8
// DRAM chip, used only by testbenches. Storage is sparse. An ACTIVATE
// opens the row of a bank in the sectors whose local wordlines are driven;
// a column read returns the bytes of the open sectors (zero for closed
// ones); a column write stores the masked bytes. Unwritten cells read as
// dram_tb_pkg::init_byte. Protocol errors (activating an open bank,
// accessing a closed bank, writing a closed sector) are counted in
// `violations`. Read data is produced at the falling clock edge of the
// cycle in which the chip requests it. Requests are ignored during reset.
module dram_array_model
  import sdram_pkg::*;
  import dram_tb_pkg::*;
#(
  parameter int RANK = 0,
  parameter int CHIP = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  arr_req_t    arr,
  output chip_slice_t rdata,
  output int          violations,
  output int          sectors_opened
);
  logic [7:0] mem [longint];
  logic       open_q [NBANKS];
  logic [ROW_W-1:0] row_q [NBANKS];
  sect_t      osb_q [NBANKS];

  function automatic longint key(int bank, int row, int col, int s);
    return longint'(((bank * 32768 + row) * 128 + col) * 8 + s);
  endfunction

  initial begin
    violations = 0;
    sectors_opened = 0;
    rdata = '0;
    for (int b = 0; b < NBANKS; b++) begin open_q[b] = 0; row_q[b] = 0; osb_q[b] = 0; end
  end

  always @(posedge clk) if (rst_n) begin
    if (arr.wr) begin
      if (!open_q[arr.wr_bank] || (arr.wmask & ~osb_q[arr.wr_bank]) != 0) begin
        violations++;
        $display("%m %t: write to closed bank or sector", $time);
      end
      for (int s = 0; s < NSECT; s++)
        if (arr.wmask[s]) mem[key(int'(arr.wr_bank), int'(row_q[arr.wr_bank]), int'(arr.wr_col), s)] = arr.wdata[s];
    end
    if (arr.act) begin
      if (open_q[arr.bank]) begin
        violations++;
        $display("%m %t: ACT to an open bank", $time);
      end
      open_q[arr.bank] = 1;
      row_q[arr.bank]  = arr.row;
      osb_q[arr.bank]  = arr.lwl_en;
      for (int s = 0; s < NSECT; s++) sectors_opened += int'(arr.lwl_en[s]);
    end
    if (arr.pre) open_q[arr.bank] = 0;
    if (arr.pre_all) for (int b = 0; b < NBANKS; b++) open_q[b] = 0;
  end

  always @(negedge clk) begin
    rdata = '0;
    if (rst_n && arr.rd) begin
      if (!open_q[arr.rd_bank]) begin
        violations++;
        $display("%m %t: read from a closed bank", $time);
      end
      for (int s = 0; s < NSECT; s++) begin
        if (osb_q[arr.rd_bank][s]) begin
          longint k;
          k = key(int'(arr.rd_bank), int'(row_q[arr.rd_bank]), int'(arr.rd_col), s);
          rdata[s] = mem.exists(k) ? mem[k]
                   : init_byte(RANK, CHIP, int'(arr.rd_bank), int'(row_q[arr.rd_bank]), int'(arr.rd_col), s);
        end
      end
    end
  end
endmodule
