// Test of the DDR4 command decoder: ACT, PRE with sector bits, PREA, RD,
// WR, REF and deselect built from the DDR4 truth table, with random fields.
module tb_ddr4_cmd_decoder;
  import sdram_pkg::*;
  ddr4_ca_t  ca;
  dram_dec_t dec;
  int checks = 0, failures = 0;

  ddr4_cmd_decoder dut (.ca(ca), .dec(dec));

  task automatic expect_cmd(dram_cmd_e c, string what);
    #1;
    checks++;
    if (dec.cmd != c) begin
      failures++;
      $display("%s: decoded %s", what, dec.cmd.name());
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [14:0] row;
      logic [6:0]  col;
      logic [7:0]  sb;
      logic [3:0]  bank;
      row = 15'($urandom); col = 7'($urandom); sb = 8'($urandom); bank = 4'($urandom);
      // ACT
      ca = '{cs_n: 0, act_n: 0, bg: bank[3:2], ba: bank[1:0], a: {3'b000, row}};
      expect_cmd(CMD_ACT, "ACT");
      checks++; if (dec.row != row || dec.bank != bank) failures++;
      // PRE with sector bits on A7..A0
      ca = '{cs_n: 0, act_n: 1, bg: bank[3:2], ba: bank[1:0], a: 18'h08000 | 18'(sb)};
      expect_cmd(CMD_PRE, "PRE");
      checks++; if (dec.sb != sb || dec.bank != bank) failures++;
      ca.a[10] = 1'b1;
      expect_cmd(CMD_PREA, "PREA");
      checks++; if (dec.sb != sb) failures++;
      // RD / WR
      ca = '{cs_n: 0, act_n: 1, bg: bank[3:2], ba: bank[1:0], a: 18'h14000 | (18'(col) << 3)};
      expect_cmd(CMD_RD, "RD");
      checks++; if (dec.col != col || dec.bank != bank) failures++;
      ca.a[14] = 1'b0;
      expect_cmd(CMD_WR, "WR");
      checks++; if (dec.col != col) failures++;
      ca.a[16:14] = 3'b001;
      expect_cmd(CMD_REF, "REF");
      ca.a[16:14] = 3'b111;
      expect_cmd(CMD_NOP, "NOP");
      ca.cs_n = 1'b1; ca.act_n = 1'b0;
      expect_cmd(CMD_NOP, "deselect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
