// Test of LSQ Lookahead against a reference queue: random pushes (addresses
// drawn from a few cache blocks so that matches are frequent) and pops.
// At every pop the head's operation and accumulated sector bits must equal
// the reference: own word bit OR the word bits of all younger entries of
// the same block pushed while it was queued. Full-queue back-pressure is
// checked with a small DEPTH.
module tb_lsq_lookahead;
  import sdram_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, out_valid, out_ready;
  mem_op_t push_op, out_op;
  sect_t out_sb;
  mem_op_t r_op[$];
  sect_t   r_sb[$];
  int checks = 0, failures = 0, full_seen = 0;

  lsq_lookahead #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; out_ready = 0; push_op = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic do_push, do_pop;
      @(negedge clk);
      push_op = '0;
      push_op.addr = {24'($urandom_range(0, 3)), 3'($urandom), 3'b000};
      push_op.pc = $urandom;
      push_op.is_store = 1'($urandom);
      push_valid = ($urandom_range(0, 99) < (n % 4000 < 2000 ? 70 : 30));
      out_ready  = ($urandom_range(0, 99) < 50);
      checks++;
      if (out_valid != (r_op.size() > 0) || push_ready != (r_op.size() < DEPTH)) begin
        failures++;
        $display("n=%0d: out_valid=%b push_ready=%b ref size %0d", n, out_valid, push_ready, r_op.size());
      end
      if (!push_ready) full_seen++;
      do_push = push_valid && push_ready;
      do_pop  = out_valid && out_ready;
      if (do_pop) begin
        checks++;
        if (out_op != r_op[0] || out_sb != r_sb[0]) begin
          failures++;
          $display("n=%0d: head addr %h sb %b, expected %h %b", n, out_op.addr, out_sb, r_op[0].addr, r_sb[0]);
        end
      end
      @(posedge clk);
      if (do_pop) begin void'(r_op.pop_front()); void'(r_sb.pop_front()); end
      if (do_push) begin
        for (int i = 0; i < r_op.size(); i++)
          if (r_op[i].addr[BLK_ADDR_W+5:6] == push_op.addr[BLK_ADDR_W+5:6])
            r_sb[i] |= sect_t'(1) << push_op.addr[5:3];
        r_op.push_back(push_op);
        r_sb.push_back(sect_t'(1) << push_op.addr[5:3]);
      end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
