// Test of one Sectored DRAM chip driven at its DDR4 pins, with the
// behavioural cell array. For random banks, rows, columns and sector bits:
// PRE carrying the sector bits, ACT (only those sectors may open), READ
// (burst must start exactly CL cycles after the command, last popcount(sb)
// beats and carry the open sectors' bytes in ascending sector order), WRITE
// of a burst of that length CWL cycles after the command, and a READ that
// must return the written bytes.
module tb_sectored_dram_chip;
  import sdram_pkg::*;
  import dram_tb_pkg::*;
  localparam int CL = 44, CWL = 32;
  logic clk = 0, rst_n = 0;
  ddr4_ca_t ca;
  logic [7:0] dq_in, dq_out;
  logic dq_valid;
  arr_req_t arr;
  chip_slice_t arr_rdata;
  int violations, opened;
  int checks = 0, failures = 0;

  sectored_dram_chip #(.CL(CL), .CWL(CWL)) dut (
    .clk(clk), .rst_n(rst_n), .ca(ca), .dq_in(dq_in), .dq_out(dq_out),
    .dq_valid(dq_valid), .arr(arr), .arr_rdata(arr_rdata));
  dram_array_model #(.RANK(0), .CHIP(3)) u_arr (.clk(clk), .rst_n(rst_n), .arr(arr), .rdata(arr_rdata),
    .violations(violations), .sectors_opened(opened));

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(ddr4_ca_t c);
    @(negedge clk); ca = c;
    @(negedge clk); ca = CA_DESELECT;
  endtask

  function automatic ddr4_ca_t mk(logic act_n, logic [2:0] rcw, int bank, logic [17:0] a);
    ddr4_ca_t c;
    c = '{cs_n: 0, act_n: act_n, bg: 2'(bank >> 2), ba: 2'(bank), a: a};
    if (act_n) c.a[16:14] = rcw;
    return c;
  endfunction

  // READ and check the burst: beats must start exactly CL cycles later.
  task automatic read_check(int bank, int col, sect_t sb, chip_slice_t exp);
    int idx[$];
    for (int s = 0; s < 8; s++) if (sb[s]) idx.push_back(s);
    @(negedge clk); ca = mk(1, 3'b101, bank, 18'(col) << 3);
    @(negedge clk); ca = CA_DESELECT;
    repeat (CL - 1) begin
      checks++; if (dq_valid) begin failures++; $display("read: data before CL"); end
      @(negedge clk);
    end
    foreach (idx[k]) begin
      checks++;
      if (!dq_valid || dq_out != exp[idx[k]]) begin
        failures++;
        $display("read bank %0d col %0d sb %b beat %0d: v=%b %h exp %h", bank, col, sb, k, dq_valid, dq_out, exp[idx[k]]);
      end
      @(negedge clk);
    end
    checks++; if (dq_valid) begin failures++; $display("read sb %b: burst longer than %0d", sb, idx.size()); end
  endtask

  initial begin
    ca = CA_DESELECT; dq_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      int bank, row, col, idx[$];
      sect_t sb;
      chip_slice_t exp, wd;
      bank = $urandom_range(0, 15); row = $urandom_range(0, 32767); col = $urandom_range(0, 127);
      sb = 8'($urandom); if (sb == 0) sb = 8'h01; if (n == 0) sb = 8'hFF;
      idx = {};
      for (int s = 0; s < 8; s++) if (sb[s]) idx.push_back(s);
      // PRE with sector bits (bank may be closed), then ACT
      issue(mk(1, 3'b010, bank, 18'(sb)));
      repeat (4) @(negedge clk);
      issue(mk(0, 3'b000, bank, 18'(row)));
      checks++;
      if (u_arr.osb_q[bank] != sb) begin failures++; $display("ACT opened sectors %b, expected %b", u_arr.osb_q[bank], sb); end
      for (int s = 0; s < 8; s++) exp[s] = sb[s] ? init_byte(0, 3, bank, row, col, s) : 8'h00;
      if (u_arr.mem.exists(u_arr.key(bank, row, col, 0)) == 0 && n < 100) read_check(bank, col, sb, exp);
      // WRITE a burst of popcount(sb) beats
      @(negedge clk); ca = mk(1, 3'b100, bank, 18'(col) << 3);
      @(negedge clk); ca = CA_DESELECT;
      repeat (CWL - 1) @(negedge clk);
      wd = '0;
      foreach (idx[k]) begin
        dq_in = 8'($urandom);
        wd[idx[k]] = dq_in;
        @(negedge clk);
      end
      repeat (3) @(negedge clk);
      read_check(bank, col, sb, wd);
      // close the bank again (PRE also resets all latches of the bank)
      issue(mk(1, 3'b010, bank, 18'hFF));
    end
    checks++;
    if (violations != 0) begin failures++; $display("array protocol violations: %0d", violations); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
