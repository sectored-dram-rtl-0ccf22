// Test of the Sector Predictor: the index must be the XOR of the two low
// log2(ENTRIES)-bit fields of the instruction address and the word offset;
// random updates and lookups are compared with a reference table.
module tb_sector_predictor;
  import sdram_pkg::*;
  localparam int ENTRIES = 512, L = 9;
  logic clk = 0, rst_n = 0;
  logic [31:0] q_pc;
  logic [2:0]  q_woff;
  logic [L-1:0] q_idx, upd_idx;
  sect_t q_pred, upd_used;
  logic upd_v;
  sect_t ref_t [ENTRIES];
  int checks = 0, failures = 0;

  sector_predictor #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_v = 0; upd_idx = 0; upd_used = 0; q_pc = 0; q_woff = 0;
    for (int i = 0; i < ENTRIES; i++) ref_t[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [L-1:0] exp_idx;
      @(negedge clk);
      q_pc = $urandom; q_woff = 3'($urandom);
      exp_idx = q_pc[8:0] ^ q_pc[17:9] ^ {6'b0, q_woff};
      #1;
      checks++;
      if (q_idx != exp_idx || q_pred != ref_t[exp_idx]) begin
        failures++;
        $display("pc %h off %0d: idx %0d pred %b, expected %0d %b", q_pc, q_woff, q_idx, q_pred, exp_idx, ref_t[exp_idx]);
      end
      upd_v = 1'($urandom);
      upd_idx = (n % 3 == 0) ? exp_idx : L'($urandom);
      upd_used = 8'($urandom);
      @(posedge clk);
      if (upd_v) ref_t[upd_idx] = upd_used;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
