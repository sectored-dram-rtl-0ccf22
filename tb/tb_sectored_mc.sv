// Test of the memory controller with four ranks of Sectored DRAM chips
// and behavioural cell arrays. Random reads and writes with random sector
// bits over a small set of rows, banks, ranks and columns (many row hits,
// conflicts and re-opens for missing sectors). Checked:
//  * every read returns at least the requested words, and every returned
//    word equals a reference memory (writes are applied in request order);
//  * DDR4 timing seen at the pins: tRP, tRCD, tRC, tRAS per bank and the
//    sector-weighted four-activate window per rank;
//  * each ACT opens exactly the sectors of the PRE before it, and the
//    number of data beats equals the sum of popcounts of the open sectors
//    over all READs;
//  * the array model sees no protocol violation.
// Second half: coarse-grained mode (sectored_on low), where every read
// must return all eight words. Each mechanism (partial ACT, PRE to a
// closed bank, tFAW stall, re-open for missing sectors, short bursts,
// queue full) must occur at least once.
module tb_sectored_mc;
  import sdram_pkg::*;
  import dram_tb_pkg::*;
  localparam int RANKS = 4, TRCD = 44, TRAS = 112, TRC = 156, TRP = 44, TFAW = 80;
  logic clk = 0, rst_n = 0;
  logic sectored_on;
  logic req_valid, req_ready, rsp_valid;
  mem_req_t req;
  mem_rsp_t rsp;
  logic [2:0] req_id, rsp_id;
  ddr4_ca_t ca [RANKS];
  word_t dq_out, dq_in;
  logic dq_in_valid;
  logic [6:0] rd_occ;
  logic ev_act, ev_pre, ev_rd, ev_wr, ev_faw_stall, ev_sector_reopen;
  arr_req_t arr [RANKS][NCHIPS];
  chip_slice_t arr_rdata [RANKS][NCHIPS];
  logic [7:0] chip_dq [RANKS][NCHIPS];
  logic chip_dqv [RANKS][NCHIPS];
  int viol [RANKS][NCHIPS];
  int opened [RANKS][NCHIPS];

  int checks = 0, failures = 0;
  int n_partial_act = 0, n_pre_closed = 0, n_faw_stall = 0, n_reopen = 0, n_short_burst = 0;
  int n_full = 0, n_reads_done = 0, beats = 0, exp_beats = 0;

  sectored_mc dut (.*, .rd_occupancy(rd_occ));

  for (genvar r = 0; r < RANKS; r++) begin : g_r
    for (genvar c = 0; c < NCHIPS; c++) begin : g_c
      sectored_dram_chip u_chip (.clk(clk), .rst_n(rst_n), .ca(ca[r]),
        .dq_in(dq_out[c*8 +: 8]), .dq_out(chip_dq[r][c]), .dq_valid(chip_dqv[r][c]),
        .arr(arr[r][c]), .arr_rdata(arr_rdata[r][c]));
      dram_array_model #(.RANK(r), .CHIP(c)) u_arr (.clk(clk), .rst_n(rst_n), .arr(arr[r][c]),
        .rdata(arr_rdata[r][c]), .violations(viol[r][c]), .sectors_opened(opened[r][c]));
    end
  end

  always_comb begin
    dq_in = '0; dq_in_valid = 0;
    for (int r = 0; r < RANKS; r++)
      if (chip_dqv[r][0]) begin
        dq_in_valid = 1;
        for (int c = 0; c < NCHIPS; c++) dq_in[c*8 +: 8] = chip_dq[r][c];
      end
  end

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ reference memory
  word_t gold [logic [BLK_ADDR_W-1:0]][8];
  function automatic word_t gword(logic [BLK_ADDR_W-1:0] b, int w);
    return gold.exists(b) ? gold[b][w] : init_word(b, w);
  endfunction

  // ------------------------------------------------ pin-level monitor
  longint now = 0;
  longint t_pre [RANKS][16], t_act [RANKS][16];
  logic   is_open [RANKS][16];
  sect_t  lsb [RANKS][16];
  longint act_t [RANKS][$];
  int     act_w [RANKS][$];

  function automatic int pc8(sect_t s);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(s[i]);
    return n;
  endfunction

  always @(posedge clk) begin
    now++;
    if (rst_n) begin
      if (dq_in_valid) beats++;
      if (ev_faw_stall) n_faw_stall++;
      if (ev_sector_reopen) n_reopen++;
      if (req_valid && !req_ready) n_full++;
      for (int r = 0; r < RANKS; r++) begin
        ddr4_ca_t c;
        int b;
        c = ca[r];
        b = {c.bg, c.ba};
        if (!c.cs_n) begin
          if (!c.act_n) begin
            int sum;
            checks++;
            if (now - t_pre[r][b] < TRP || now - t_act[r][b] < TRC || is_open[r][b]) begin
              failures++; $display("t=%0d rank %0d bank %0d: ACT violates tRP/tRC", now, r, b);
            end
            sum = pc8(lsb[r][b]);
            for (int i = 0; i < act_t[r].size(); i++) if (now - act_t[r][i] < TFAW) sum += act_w[r][i];
            checks++;
            if (sum > 32) begin failures++; $display("t=%0d rank %0d: weighted tFAW sum %0d", now, r, sum); end
            act_t[r].push_back(now); act_w[r].push_back(pc8(lsb[r][b]));
            if (act_t[r].size() > 40) begin void'(act_t[r].pop_front()); void'(act_w[r].pop_front()); end
            if (lsb[r][b] != 8'hFF) n_partial_act++;
            t_act[r][b] = now; is_open[r][b] = 1;
          end else if (c.a[16:14] == 3'b010) begin
            if (is_open[r][b]) begin
              checks++;
              if (now - t_act[r][b] < TRAS) begin failures++; $display("t=%0d PRE violates tRAS", now); end
            end else n_pre_closed++;
            lsb[r][b] = c.a[7:0]; t_pre[r][b] = now; is_open[r][b] = 0;
          end else if (c.a[16:14] == 3'b101 || c.a[16:14] == 3'b100) begin
            checks++;
            if (!is_open[r][b] || now - t_act[r][b] < TRCD) begin
              failures++; $display("t=%0d rank %0d bank %0d: column command violates tRCD", now, r, b);
            end
            if (c.a[16:14] == 3'b101) begin
              exp_beats += pc8(lsb[r][b]);
              if (pc8(lsb[r][b]) < 8) n_short_burst++;
            end
          end
        end
      end
    end
  end

  // The sectors the array opened must be the ones the PRE conveyed.
  always @(negedge clk) begin
    if (rst_n)
      for (int r = 0; r < RANKS; r++)
        for (int b = 0; b < 16; b++)
          if (is_open[r][b] && t_act[r][b] == now) begin
            checks++;
            if (g_r_arr_osb(r, b) != lsb[r][b]) begin
              failures++; $display("rank %0d bank %0d opened %b, PRE sent %b", r, b, g_r_arr_osb(r, b), lsb[r][b]);
            end
          end
  end

  function automatic sect_t g_r_arr_osb(int r, int b);
    case (r)
      0: return g_r[0].g_c[5].u_arr.osb_q[b];
      1: return g_r[1].g_c[5].u_arr.osb_q[b];
      2: return g_r[2].g_c[5].u_arr.osb_q[b];
      default: return g_r[3].g_c[5].u_arr.osb_q[b];
    endcase
  endfunction

  // ------------------------------------------------ requests / responses
  logic  busy [8];
  sect_t want [8];
  logic  coarse [8];
  logic [BLK_ADDR_W-1:0] waddr [8];
  word_t snap [8][8];

  always @(posedge clk) begin
    if (rst_n && rsp_valid) begin
      checks++;
      if (!busy[rsp_id] || (want[rsp_id] & ~rsp.mask) != 0 || (coarse[rsp_id] && rsp.mask != 8'hFF)) begin
        failures++; $display("response id %0d: mask %b, wanted %b", rsp_id, rsp.mask, want[rsp_id]);
      end
      for (int w = 0; w < 8; w++) if (rsp.mask[w]) begin
        checks++;
        if (rsp.data[w] != snap[rsp_id][w]) begin
          failures++; $display("response id %0d blk %h word %0d: %h, expected %h", rsp_id, waddr[rsp_id], w, rsp.data[w], snap[rsp_id][w]);
        end
      end
      busy[rsp_id] = 0;
      n_reads_done++;
    end
  end

  function automatic logic [BLK_ADDR_W-1:0] rnd_blk();
    logic [ROW_W-1:0] row; logic [3:0] bank; logic [1:0] rank; logic [6:0] col;
    row = 15'($urandom_range(0, 3)); bank = 4'($urandom); rank = 2'($urandom); col = 7'($urandom_range(0, 3));
    return {row, bank, rank, col};
  endfunction

  initial begin
    automatic int sent = 0;
    for (int i = 0; i < 8; i++) busy[i] = 0;
    for (int r = 0; r < RANKS; r++) for (int b = 0; b < 16; b++) begin
      t_pre[r][b] = -1000; t_act[r][b] = -1000; is_open[r][b] = 0; lsb[r][b] = 8'hFF;
    end
    sectored_on = 1; req_valid = 0; req = '0; req_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < 3000) begin
      mem_req_t r;
      int id;
      @(negedge clk);
      if (sent == 2000) sectored_on = 0;
      if (req_valid && !req_ready) continue;   // hold until accepted
      req_valid = 0;
      r = '0;
      r.blk_addr = rnd_blk();
      r.sb = 8'($urandom); if (r.sb == 0) r.sb = 8'h10;
      id = -1;
      if ($urandom_range(0, 99) < 60) begin
        for (int i = 0; i < 8; i++) if (!busy[i] && id < 0) id = i;
        if (id < 0) continue;
        r.write = 0;
      end else begin
        r.write = 1;
        for (int w = 0; w < 8; w++) r.data[w] = {$urandom, $urandom};
      end
      req = r; req_id = (id < 0) ? 3'd0 : 3'(id); req_valid = 1;
      // apply to reference at acceptance
      do @(posedge clk); while (!req_ready);
      #1;
      if (r.write) begin
        word_t cur [8];
        for (int w = 0; w < 8; w++) cur[w] = gword(r.blk_addr, w);
        for (int w = 0; w < 8; w++) if (r.sb[w]) cur[w] = r.data[w];
        gold[r.blk_addr] = cur;
      end else begin
        busy[id] = 1; want[id] = r.sb; coarse[id] = !sectored_on; waddr[id] = r.blk_addr;
        for (int w = 0; w < 8; w++) snap[id][w] = gword(r.blk_addr, w);
      end
      sent++;
      @(negedge clk); req_valid = 0;
    end
    // drain
    repeat (20000) begin
      automatic int b = 0;
      @(negedge clk);
      for (int i = 0; i < 8; i++) b += int'(busy[i]);
      if (b == 0 && rd_occ == 0) break;
    end
    checks++; if (rd_occ != 0) begin failures++; $display("reads left in queue"); end
    checks++; if (beats != exp_beats) begin failures++; $display("data beats %0d, expected %0d", beats, exp_beats); end
    for (int r = 0; r < RANKS; r++) for (int c = 0; c < NCHIPS; c++) begin
      checks++; if (viol[r][c] != 0) begin failures++; $display("array %0d/%0d: %0d violations", r, c, viol[r][c]); end
    end
    $display("reads %0d partial_act %0d pre_closed %0d faw_stall %0d reopen %0d short_burst %0d queue_full %0d",
             n_reads_done, n_partial_act, n_pre_closed, n_faw_stall, n_reopen, n_short_burst, n_full);
    checks++; if (n_partial_act == 0) begin failures++; $display("no partial ACT"); end
    checks++; if (n_pre_closed == 0) begin failures++; $display("no PRE to a closed bank"); end
    checks++; if (n_faw_stall == 0) begin failures++; $display("no tFAW stall"); end
    checks++; if (n_reopen == 0) begin failures++; $display("no re-open for missing sectors"); end
    checks++; if (n_short_burst == 0) begin failures++; $display("no short burst"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
