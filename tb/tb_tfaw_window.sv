// Test of the sector-weighted tFAW window. An issuer sends an ACT whenever
// the window allows it. Checked: (1) the budget never goes negative in any
// window of TFAW cycles (reference sum over the history), (2) with 8-sector
// ACTs exactly four fit in a window and the fifth comes TFAW cycles after
// the first, (3) with 1-sector ACTs 32 fit in a window.
module tb_tfaw_window;
  localparam int TFAW = 80;
  logic clk = 0, rst_n = 0;
  logic act_v;
  logic [3:0] act_w;
  logic [5:0] left;
  int hist[$];   // charge per cycle, newest first
  int checks = 0, failures = 0;
  int t, t_first, acts;

  tfaw_window #(.TFAW(TFAW)) dut (.clk(clk), .rst_n(rst_n), .act_v(act_v), .act_w(act_w), .left(left));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int window_sum();
    int s = 0;
    for (int i = 0; i < hist.size() && i < TFAW-1; i++) s += hist[i];
    return s;
  endfunction

  task automatic run(int w_fixed, int cycles, output int n_acts, output int t5);
    n_acts = 0; t5 = -1;
    for (int c = 0; c < cycles; c++) begin
      int w, ref_left;
      @(negedge clk);
      w = (w_fixed > 0) ? w_fixed : $urandom_range(1, 8);
      ref_left = 32 - window_sum();
      checks++;
      if (int'(left) != ref_left) begin
        failures++;
        $display("cycle %0d: left %0d, reference %0d", c, left, ref_left);
      end
      act_v = (w <= int'(left));
      act_w = 4'(w);
      if (act_v) begin
        n_acts++;
        if (n_acts == 5 && t5 < 0) t5 = c;
      end
      hist.push_front(act_v ? w : 0);
      @(posedge clk);
    end
    @(negedge clk); act_v = 0;
    repeat (TFAW) begin hist.push_front(0); @(negedge clk); end
  endtask

  initial begin
    int n, t5;
    act_v = 0; act_w = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full-row ACTs: 4 per window, the fifth at cycle TFAW
    run(8, TFAW, n, t5);
    checks++; if (n != 4) begin failures++; $display("8-sector ACTs in one window: %0d", n); end
    run(8, TFAW + 1, n, t5);
    checks++; if (t5 != TFAW) begin failures++; $display("fifth 8-sector ACT at %0d, expected %0d", t5, TFAW); end
    // one-sector ACTs: 32 per window (one per cycle fits 32 in 32 cycles)
    run(1, TFAW - 1, n, t5);
    checks++; if (n != 32) begin failures++; $display("1-sector ACTs in one window: %0d", n); end
    // random weights
    run(0, 3000, n, t5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
