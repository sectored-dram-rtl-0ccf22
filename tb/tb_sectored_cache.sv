// Test of the sectored L1 cache together with the Sector Predictor and a
// behavioural next level (random latency, answers with the requested words
// or, in the random phase, with extra words as a DRAM with more open
// sectors would).
// Directed phase: miss fetching exactly the LSQ sector bits, hit, sector
// miss fetching only the missing word, store to a missing word (no
// fetch), eviction
// writing back only the dirty word and training the predictor, and a
// later miss by the same instruction whose fetch includes the predicted
// words. Random phase: loads and stores over a few sets; every load must
// return the reference value and every write-back must carry exactly the
// words stored since the block was allocated.
module tb_sectored_cache;
  import sdram_pkg::*;
  localparam int SETS = 16, TIW = 9;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid;
  mem_op_t req;
  sect_t req_sb;
  word_t rsp_data;
  logic [31:0] sp_pc;
  logic [2:0] sp_woff;
  logic [TIW-1:0] sp_idx, sp_upd_idx;
  sect_t sp_pred, sp_upd_used;
  logic sp_upd_v;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic ev_hit, ev_sector_miss, ev_miss, ev_writeback;
  int checks = 0, failures = 0;
  int n_hit = 0, n_smiss = 0, n_miss = 0, n_wb = 0;

  sectored_cache #(.SETS(SETS), .TIW(TIW)) dut (.*);
  sector_predictor #(.ENTRIES(512)) u_sp (.clk(clk), .rst_n(rst_n), .q_pc(sp_pc), .q_woff(sp_woff),
    .q_idx(sp_idx), .q_pred(sp_pred), .upd_v(sp_upd_v), .upd_idx(sp_upd_idx), .upd_used(sp_upd_used));

  always #5 clk = !clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------- next level (memory)
  word_t mem [logic [BLK_ADDR_W-1:0]][8];
  logic  extra_words = 0;
  mem_req_t last_rd, last_wr;
  int n_rd = 0, n_wrq = 0;

  function automatic word_t mword(logic [BLK_ADDR_W-1:0] b, int w);
    return mem.exists(b) ? mem[b][w] : {32'(b), 29'(0), 3'(w)};
  endfunction

  initial begin
    mem_req_ready = 0; mem_rsp_valid = 0; mem_rsp = '0;
    forever begin
      @(negedge clk);
      mem_req_ready = 0;
      mem_rsp_valid = 0;
      if (mem_req_valid) begin
        mem_req_t r;
        r = mem_req;
        mem_req_ready = 1;
        @(negedge clk);
        mem_req_ready = 0;
        if (r.write) begin
          word_t cur [8];
          last_wr = r; n_wrq++;
          for (int w = 0; w < 8; w++) cur[w] = r.sb[w] ? r.data[w] : mword(r.blk_addr, w);
          mem[r.blk_addr] = cur;
        end else begin
          sect_t m;
          last_rd = r; n_rd++;
          m = r.sb | (extra_words ? 8'($urandom) : 8'h00);
          repeat ($urandom_range(3, 20)) @(negedge clk);
          mem_rsp.mask = m;
          for (int w = 0; w < 8; w++) mem_rsp.data[w] = m[w] ? mword(r.blk_addr, w) : {$urandom, $urandom};
          mem_rsp_valid = 1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_smiss += int'(ev_sector_miss); n_miss += int'(ev_miss); n_wb += int'(ev_writeback);
  end

  // ---------------------------------------------- core side
  word_t arch [logic [BLK_ADDR_W+2:0]];   // architectural value per word

  task automatic access(logic [31:0] pc, logic [BLK_ADDR_W+5:0] addr, logic st, word_t wd, sect_t sb,
                        output word_t ld);
    @(negedge clk);
    req = '{pc: pc, addr: addr, is_store: st, wdata: wd};
    req_sb = sb; req_valid = 1;
    do @(posedge clk); while (!req_ready);
    @(negedge clk); req_valid = 0;
    if (st) begin
      arch[addr[BLK_ADDR_W+5:3]] = wd;
      while (!req_ready) @(negedge clk);
    end else begin
      word_t exp;
      while (!rsp_valid) @(negedge clk);
      ld = rsp_data;
      exp = arch.exists(addr[BLK_ADDR_W+5:3]) ? arch[addr[BLK_ADDR_W+5:3]]
                                               : mword(addr[BLK_ADDR_W+5:6], int'(addr[5:3]));
      checks++;
      if (ld != exp) begin failures++; $display("load %h: %h, expected %h", addr, ld, exp); end
    end
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %h, expected %h", what, got, exp); end
  endtask

  localparam logic [BLK_ADDR_W+5:0] A = 34'h0000_1040;   // set 1
  localparam logic [BLK_ADDR_W+5:0] B = 34'h0000_2040;   // set 1, other tag

  initial begin
    word_t d;
    int rd0, wr0;
    req_valid = 0; req = '0; req_sb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: miss, fetch exactly the LSQ sector bits (predictor empty)
    access(32'h400, A | 0, 0, 0, 8'b0000_0101, d);
    expect_eq("miss fetch", last_rd.sb, 8'b0000_0101);
    expect_eq("miss count", n_miss, 1);
    // 2: hit on a fetched word
    rd0 = n_rd;
    access(32'h404, A | (2 << 3), 0, 0, 8'b0000_0100, d);
    expect_eq("hit makes no request", n_rd, rd0);
    expect_eq("hit count", n_hit, 2);
    // 3: sector miss fetches only the missing word
    access(32'h408, A | (1 << 3), 0, 0, 8'b0000_0010, d);
    expect_eq("sector miss fetch", last_rd.sb, 8'b0000_0010);
    expect_eq("sector miss count", n_smiss, 1);
    // 4: store to a missing word of a present block: written without a fetch
    rd0 = n_rd;
    access(32'h40C, A | (5 << 3), 1, 64'hDEAD_BEEF_0123_4567, 8'b0010_0000, d);
    expect_eq("store to missing word makes no request", n_rd, rd0);
    expect_eq("store to missing word is a hit", n_hit, 4);
    expect_eq("no further sector miss", n_smiss, 1);
    // 5: conflicting block: write back only the dirty word, train predictor
    wr0 = n_wrq;
    access(32'h500, B | (3 << 3), 0, 0, 8'b0000_1000, d);
    expect_eq("one write-back", n_wrq, wr0 + 1);
    expect_eq("write-back words", last_wr.sb, 8'b0010_0000);
    expect_eq("write-back data", last_wr.data[5][31:0], 32'h0123_4567);
    // 6: same instruction, same word offset misses again: prediction added
    access(32'h400, A | 0, 0, 0, 8'b0000_0001, d);
    expect_eq("predicted fetch", last_rd.sb, 8'b0010_0111);
    access(32'h410, A | (5 << 3), 0, 0, 8'b0010_0000, d);   // store value came back
    // ---- random phase
    extra_words = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [BLK_ADDR_W+5:0] a;
      a = {20'h0, 8'($urandom_range(0, 3)), 4'($urandom_range(0, 3)), 3'($urandom), 3'b000};
      access(32'h1000 + 4 * $urandom_range(0, 15), a, 1'($urandom_range(0, 3) == 0),
             {$urandom, $urandom}, 8'($urandom) | (8'b1 << a[5:3]), d);
    end
    $display("hits %0d sector_misses %0d misses %0d writebacks %0d", n_hit, n_smiss, n_miss, n_wb);
    checks++; if (n_wb == 0 || n_smiss < 2) begin failures++; $display("mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
