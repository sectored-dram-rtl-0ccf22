// Sectored L1 data cache with Sector Predictor bookkeeping.
//
// Each 64-byte block carries, besides its tag, eight sector-valid bits (one
// per 64-bit word), eight dirty bits, the "currently used sectors" (words
// touched by loads/stores during this residency) and the Sector Predictor
// table index it was allocated with. A request carries an address and
// sector bits (from LSQ Lookahead). Looking up a block yields:
//  * hit            tag present and the addressed word valid;
//  * sector miss    tag present, word invalid, and the request is a load:
//                   the missing words among the request's sector bits and
//                   the predictor's bits are fetched. A store to an invalid
//                   word of a present block needs no fetch: it writes the
//                   whole word, which becomes valid and dirty, and counts
//                   as a hit;
//  * cache miss     tag absent: the victim is written back with only its
//                   dirty words (if any), its used sectors are written to
//                   the predictor entry it was allocated with, and the
//                   block is re-allocated with no valid word; the request's
//                   sector bits plus the predicted bits are fetched.
// A fill writes only words that are not valid yet, so dirty words are never
// overwritten, and then the request is looked up again.
//
// Organisation: direct-mapped, SETS sets, one miss outstanding (blocking),
// write-allocate for stores; these are this design's choices. A store
// writes a whole 64-bit word. Timing: a request is accepted in IDLE and
// looked up in the next cycle; a hit answers there (load data on
// rsp_valid), a miss stays in the FSM until the fill returns and the
// lookup is repeated.
module sectored_cache
  import sdram_pkg::*;
#(
  parameter int unsigned SETS = 512,     // 32 KiB of 64-byte blocks
  parameter int unsigned TIW  = 9        // Sector Predictor index width
) (
  input  logic            clk,
  input  logic            rst_n,
  // core side
  input  logic            req_valid,
  output logic            req_ready,
  input  mem_op_t         req,
  input  sect_t           req_sb,
  output logic            rsp_valid,
  output word_t           rsp_data,
  // Sector Predictor
  output logic [31:0]     sp_pc,
  output logic [2:0]      sp_woff,
  input  logic [TIW-1:0]  sp_idx,
  input  sect_t           sp_pred,
  output logic            sp_upd_v,
  output logic [TIW-1:0]  sp_upd_idx,
  output sect_t           sp_upd_used,
  // next level
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output mem_req_t        mem_req,
  input  logic            mem_rsp_valid,
  input  mem_rsp_t        mem_rsp,
  // events
  output logic            ev_hit,
  output logic            ev_sector_miss,
  output logic            ev_miss,
  output logic            ev_writeback
);
  localparam int unsigned SI = $clog2(SETS);
  localparam int unsigned TW = BLK_ADDR_W - SI;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB, S_RD, S_WAIT} state_e;

  logic            valid_q [SETS];
  logic [TW-1:0]   tag_q   [SETS];
  sect_t           sval_q  [SETS];
  sect_t           dirty_q [SETS];
  sect_t           used_q  [SETS];
  logic [TIW-1:0]  tidx_q  [SETS];
  block_t          data_q  [SETS];

  state_e   st_q;
  mem_op_t  cur_q;
  sect_t    cursb_q;
  sect_t    fetch_q;
  mem_req_t wb_q;

  logic [SI-1:0] set;
  logic [TW-1:0] tag;
  logic [2:0]    w;
  logic          tag_hit, word_hit;

  assign set = cur_q.addr[6 +: SI];
  assign tag = cur_q.addr[6+SI +: TW];
  assign w   = cur_q.addr[5:3];
  assign tag_hit  = valid_q[set] && tag_q[set] == tag;
  assign word_hit = tag_hit && sval_q[set][w];

  assign req_ready = (st_q == S_IDLE);
  assign sp_pc     = cur_q.pc;
  assign sp_woff   = w;

  always_comb begin
    ev_hit         = (st_q == S_LOOKUP) && (word_hit || (tag_hit && cur_q.is_store));
    ev_sector_miss = (st_q == S_LOOKUP) && tag_hit && !word_hit && !cur_q.is_store;
    ev_miss        = (st_q == S_LOOKUP) && !tag_hit;
    ev_writeback   = ev_miss && valid_q[set] && dirty_q[set] != '0;
    sp_upd_v       = ev_miss && valid_q[set];
    sp_upd_idx     = tidx_q[set];
    sp_upd_used    = used_q[set];
  end

  always_comb begin
    mem_req_valid = (st_q == S_WB) || (st_q == S_RD);
    mem_req       = '0;
    if (st_q == S_WB) begin
      mem_req = wb_q;
    end else begin
      mem_req.write    = 1'b0;
      mem_req.blk_addr = cur_q.addr[BLK_ADDR_W+5:6];
      mem_req.sb       = fetch_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= 1'b0;
      st_q      <= S_IDLE;
      cur_q     <= '0;
      cursb_q   <= '0;
      fetch_q   <= '0;
      wb_q      <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          cur_q   <= req;
          cursb_q <= req_sb | (sect_t'(1) << req.addr[5:3]);
          st_q    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (word_hit || (tag_hit && cur_q.is_store)) begin
            used_q[set][w] <= 1'b1;
            if (cur_q.is_store) begin
              data_q[set][w]  <= cur_q.wdata;
              dirty_q[set][w] <= 1'b1;
              sval_q[set][w]  <= 1'b1;
            end else begin
              rsp_valid <= 1'b1;
              rsp_data  <= data_q[set][w];
            end
            st_q <= S_IDLE;
          end else if (tag_hit) begin
            fetch_q <= (cursb_q | sp_pred) & ~sval_q[set];
            st_q    <= S_RD;
          end else begin
            wb_q <= '{write: 1'b1, blk_addr: {tag_q[set], set}, sb: dirty_q[set],
                      data: data_q[set]};
            st_q <= (valid_q[set] && dirty_q[set] != '0) ? S_WB : S_RD;
            valid_q[set] <= 1'b1;
            tag_q[set]   <= tag;
            sval_q[set]  <= '0;
            dirty_q[set] <= '0;
            used_q[set]  <= '0;
            tidx_q[set]  <= sp_idx;
            fetch_q      <= cursb_q | sp_pred;
          end
        end
        S_WB: if (mem_req_ready) st_q <= S_RD;
        S_RD: if (mem_req_ready) st_q <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) begin
          for (int i = 0; i < NSECT; i++)
            if (mem_rsp.mask[i] && !sval_q[set][i]) data_q[set][i] <= mem_rsp.data[i];
          sval_q[set] <= sval_q[set] | mem_rsp.mask;
          st_q <= S_LOOKUP;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // The requested word is always among the fetched ones.
  assert property (@(posedge clk) disable iff (!rst_n)
                   st_q == S_RD |-> fetch_q[w]);
endmodule
