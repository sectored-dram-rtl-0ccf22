// Test of the bank state table: random PRE (close, new sector bits) and
// ACT (open row) against a reference model, all entries compared each cycle.
module tb_bank_state_table;
  import sdram_pkg::*;
  localparam int NB = 64;
  logic clk = 0, rst_n = 0;
  logic pre_v, act_v;
  logic [5:0] pre_idx, act_idx;
  sect_t pre_sb;
  logic [ROW_W-1:0] act_row;
  logic is_open [NB];
  logic [ROW_W-1:0] open_row [NB];
  sect_t bank_sb [NB];
  logic r_open [NB];
  logic [ROW_W-1:0] r_row [NB];
  sect_t r_sb [NB];
  int checks = 0, failures = 0;

  bank_state_table dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pre_v = 0; act_v = 0; pre_idx = 0; act_idx = 0; pre_sb = 0; act_row = 0;
    for (int b = 0; b < NB; b++) begin r_open[b] = 0; r_row[b] = 0; r_sb[b] = '1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (is_open[b] != r_open[b] || bank_sb[b] != r_sb[b] || (r_open[b] && open_row[b] != r_row[b])) begin
          failures++;
          $display("bank %0d: open %b row %h sb %b, expected %b %h %b", b, is_open[b], open_row[b], bank_sb[b], r_open[b], r_row[b], r_sb[b]);
        end
      end
      pre_v = $urandom_range(0, 2) == 0; act_v = $urandom_range(0, 2) == 0;
      pre_idx = 6'($urandom); act_idx = 6'($urandom);
      if (pre_idx == act_idx) act_v = 0;
      pre_sb = 8'($urandom); act_row = 15'($urandom);
      @(posedge clk);
      if (pre_v) begin r_open[pre_idx] = 0; r_sb[pre_idx] = pre_sb; end
      if (act_v) begin r_open[act_idx] = 1; r_row[act_idx] = act_row; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
