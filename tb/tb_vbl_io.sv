// Test of the VBL I/O path. Read: random FIFO contents and sector bits;
// the burst must last popcount(sb) beats starting one cycle after rd_load
// and carry the enabled entries in ascending sector order. Write: beats
// driven on consecutive cycles must land in the enabled entries and
// wr_done must pulse one cycle after the last beat.
module tb_vbl_io;
  import sdram_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_load, wr_start, dq_valid, wr_done;
  sect_t rd_sb, wr_sb, wr_mask;
  chip_slice_t rd_data, wr_data;
  logic [7:0] dq_out, dq_in;
  int checks = 0, failures = 0;

  vbl_io dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_load = 0; wr_start = 0; rd_sb = 0; wr_sb = 0; rd_data = 0; dq_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int exp_idx[$];
      chip_slice_t d, exp_w;
      sect_t s;
      exp_idx = {};
      s = 8'($urandom);
      if (n == 0) s = 8'hFF;
      if (n == 1) s = 8'b1000_1001;
      for (int i = 0; i < 8; i++) begin d[i] = 8'($urandom); if (s[i]) exp_idx.push_back(i); end
      // ---- read burst
      @(negedge clk);
      rd_load = 1; rd_sb = s; rd_data = d;
      @(negedge clk);
      rd_load = 0;
      for (int k = 0; k < exp_idx.size(); k++) begin
        checks++;
        if (!dq_valid || dq_out != d[exp_idx[k]]) begin
          failures++;
          $display("read sb=%b beat %0d: valid=%b dq=%h exp %h", s, k, dq_valid, dq_out, d[exp_idx[k]]);
        end
        @(negedge clk);
      end
      checks++;
      if (dq_valid) begin failures++; $display("read sb=%b: burst too long", s); end
      // ---- write burst
      exp_w = '0;
      for (int k = 0; k < exp_idx.size(); k++) begin
        logic [7:0] b;
        b = 8'($urandom);
        exp_w[exp_idx[k]] = b;
        wr_start = (k == 0); wr_sb = s; dq_in = b;
        @(negedge clk);
        wr_start = 0;
        checks++;
        if (wr_done != (k == exp_idx.size()-1)) begin
          failures++;
          $display("write sb=%b beat %0d: wr_done=%b", s, k, wr_done);
        end
      end
      if (exp_idx.size() > 0) begin
        checks++;
        if (wr_mask != s || (wr_data & {8{8'hFF}}) != exp_w) begin
          // only enabled entries matter
          for (int i = 0; i < 8; i++) if (s[i] && wr_data[i] != exp_w[i]) begin
            failures++;
            $display("write sb=%b entry %0d: %h exp %h", s, i, wr_data[i], exp_w[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
