// Test of the sector latches and sector-transistor gating: random PRE
// (set/reset latches of one bank), PREA (all banks) and ACT commands,
// compared with a reference copy of the latches.
module tb_sectored_activation;
  import sdram_pkg::*;
  logic clk = 0, rst_n = 0;
  dram_dec_t dec;
  sect_t lwl_en, q_sb;
  logic [3:0] q_bank;
  sect_t ref_l [16];
  int checks = 0, failures = 0;

  sectored_activation dut (.clk(clk), .rst_n(rst_n), .dec(dec), .lwl_en(lwl_en),
                           .q_bank(q_bank), .q_sb(q_sb));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec = '0; dec.cmd = CMD_NOP; q_bank = '0;
    for (int b = 0; b < 16; b++) ref_l[b] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(0, 9);
      dec = '0;
      dec.bank = 4'($urandom);
      dec.sb   = 8'($urandom);
      dec.row  = 15'($urandom);
      dec.cmd  = (k < 4) ? CMD_PRE : (k == 4) ? CMD_PREA : (k < 8) ? CMD_ACT : CMD_RD;
      q_bank = 4'($urandom);
      #1;
      checks++;
      if (lwl_en != ((dec.cmd == CMD_ACT) ? ref_l[dec.bank] : 8'h00)) begin
        failures++;
        $display("ACT bank %0d: lwl_en %b, expected %b", dec.bank, lwl_en, ref_l[dec.bank]);
      end
      checks++;
      if (q_sb != ref_l[q_bank]) failures++;
      @(posedge clk);
      if (dec.cmd == CMD_PRE) ref_l[dec.bank] = dec.sb;
      if (dec.cmd == CMD_PREA) for (int b = 0; b < 16; b++) ref_l[b] = dec.sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
