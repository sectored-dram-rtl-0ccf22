// Load/store queue with LSQ Lookahead.
//
// Memory instructions enter at the tail in program order and leave at the
// head towards the L1 cache. Every entry carries sector bits next to its
// address. When a new entry is allocated, its cache-block address is
// compared with the block address of every entry already in the queue, and
// each matching entry gets the bit of the new entry's word offset set. When
// an older instruction then misses in the cache, its sector bits already
// name the words of that block that the younger, not yet executed
// instructions will touch, so one memory access fetches all of them.
// A new entry starts with only its own word's bit.
//
// Interface: push_* is a valid/ready tail port, out_* a valid/ready head
// port (out_sb are the head entry's accumulated sector bits). Both act at
// the same clock edge; an entry pushed in the cycle the head leaves does
// not update the leaving head. Loads and stores share the queue, which is
// this design's simplification of separate load and store queues.
module lsq_lookahead
  import sdram_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push_valid,
  output logic    push_ready,
  input  mem_op_t push_op,
  output logic    out_valid,
  input  logic    out_ready,
  output mem_op_t out_op,
  output sect_t   out_sb
);
  localparam int unsigned PW = $clog2(DEPTH);

  mem_op_t     op_q [DEPTH];
  sect_t       sb_q [DEPTH];
  logic        v_q  [DEPTH];
  logic [PW-1:0] head_q, tail_q;
  logic [PW:0]   cnt_q;

  logic push, pop;
  logic [BLK_ADDR_W-1:0] new_cb;
  sect_t new_bit;

  assign push_ready = (cnt_q != (PW+1)'(DEPTH));
  assign push       = push_valid && push_ready;
  assign out_valid  = (cnt_q != '0);
  assign pop        = out_valid && out_ready;
  assign out_op     = op_q[head_q];
  assign out_sb     = sb_q[head_q];

  assign new_cb  = push_op.addr[BLK_ADDR_W+5:6];
  assign new_bit = sect_t'(1) << push_op.addr[5:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        v_q[i]  <= 1'b0;
        sb_q[i] <= '0;
        op_q[i] <= '0;
      end
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (push) begin
        // Lookahead: CB-address compare against every queued entry.
        for (int i = 0; i < DEPTH; i++)
          if (v_q[i] && op_q[i].addr[BLK_ADDR_W+5:6] == new_cb)
            sb_q[i] <= sb_q[i] | new_bit;
        op_q[tail_q] <= push_op;
        sb_q[tail_q] <= new_bit;
        v_q[tail_q]  <= 1'b1;
        tail_q       <= tail_q + 1'b1;
      end
      if (pop) begin
        v_q[head_q] <= 1'b0;
        head_q      <= head_q + 1'b1;
      end
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end
endmodule
