// End-to-end test of the Sectored DRAM system at its default size: eight
// cores' memory pipelines, the memory controller and four ranks of eight
// chips with behavioural cell arrays.
// Each core runs a private stream of loads and stores in which every
// instruction address mostly touches a fixed set of words of its block, so the
// LSQ Lookahead finds same-block neighbours and the Sector Predictor can
// learn. Every load result is compared with a reference memory kept in
// program order. Phase 1 runs all cores with Sectored DRAM always on;
// phase 2 enables the dynamic on/off control with one lightly loaded core,
// which must switch sectored operation off; phase 3 runs all cores again in
// the coarse-grained mode that follows (eight cores with one miss each
// cannot push the read queue above the threshold), where full-block
// activations crowd rank 0 and hit the tFAW limit. Every mechanism must occur at
// least once: cache hit, sector miss, cache miss, write-back of dirty
// words, a lookahead-widened request, a predictor-widened request, partial
// activation, PRE to a closed bank, re-open for missing sectors, tFAW
// stall, short burst, full-length burst and the switch to coarse mode.
module tb_sectored_dram_system;
  import sdram_pkg::*;
  import dram_tb_pkg::*;
  localparam int NCORES = 8, RANKS = 4;
  localparam int OPS1 = 300, OPS2 = 120, OPS3 = 150;

  logic clk = 0, rst_n = 0;
  logic dynamic_en;
  logic op_valid [NCORES], op_ready [NCORES], ld_valid [NCORES];
  mem_op_t op [NCORES];
  word_t ld_data [NCORES];
  arr_req_t arr [RANKS][NCHIPS];
  chip_slice_t arr_rdata [RANKS][NCHIPS];
  logic sectored_on, ev_act, ev_pre, ev_rd, ev_wr, ev_faw_stall, ev_sector_reopen, ev_epoch;
  logic ev_hit [NCORES], ev_sector_miss [NCORES], ev_miss [NCORES], ev_writeback [NCORES];
  sect_t mc_req_sb;
  logic mc_req_fire;
  int viol [RANKS][NCHIPS], opened [RANKS][NCHIPS];

  int checks = 0, failures = 0;
  int n_hit = 0, n_smiss = 0, n_miss = 0, n_wb = 0, n_la = 0, n_pred = 0;
  int n_act = 0, n_partial = 0, n_pre_closed = 0, n_reopen = 0, n_faw = 0;
  int n_short = 0, n_fullb = 0, n_off = 0, n_loads = 0;

  sectored_dram_system dut (.*);

  for (genvar r = 0; r < RANKS; r++) begin : g_r
    for (genvar c = 0; c < NCHIPS; c++) begin : g_c
      dram_array_model #(.RANK(r), .CHIP(c)) u_arr (.clk(clk), .rst_n(rst_n), .arr(arr[r][c]),
        .rdata(arr_rdata[r][c]), .violations(viol[r][c]), .sectors_opened(opened[r][c]));
      always @(posedge clk) if (rst_n && c == 0 && arr[r][c].act && arr[r][c].lwl_en != 8'hFF) n_partial++;
    end
  end

  always #5 clk = !clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------- event counting
  logic lq_busy [NCORES];
  for (genvar c = 0; c < NCORES; c++) begin : g_mon
    logic refill = 0;   // the next lookup repeats one after a fill
    assign lq_busy[c] = dut.g_core[c].lq_valid;
    always @(posedge clk) if (rst_n) begin
      if (ev_hit[c] && !refill) n_hit++;
      if (dut.c_rsp_valid[c]) refill <= 1;
      else if (ev_hit[c] || ev_miss[c] || ev_sector_miss[c]) refill <= 0;
      if (dut.g_core[c].lq_valid && dut.g_core[c].lq_ready) begin
        int bits;
        bits = 0;
        for (int i = 0; i < 8; i++) bits += int'(dut.g_core[c].lq_sb[i]);
        if (bits > 1) n_la++;
      end
      if ((ev_miss[c] || ev_sector_miss[c]) &&
          (dut.g_core[c].sp_pred & ~dut.g_core[c].u_l1.cursb_q) != 0) n_pred++;
    end
  end

  logic on_prev = 1;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCORES; c++) begin
      n_smiss += int'(ev_sector_miss[c]);
      n_miss += int'(ev_miss[c]); n_wb += int'(ev_writeback[c]);
    end
    n_act += int'(ev_act); n_reopen += int'(ev_sector_reopen); n_faw += int'(ev_faw_stall);
    if (mc_req_fire && !dut.mc_req.write) begin
      int bits;
      bits = 0;
      for (int i = 0; i < 8; i++) bits += int'(mc_req_sb[i]);
      if (bits < 8 && sectored_on) n_short++;
      if (!sectored_on) n_fullb++;
    end
    if (on_prev && !sectored_on) n_off++;
    on_prev <= sectored_on;
    if (ev_pre && !dut.u_mc.bs_open[dut.u_mc.sel_b]) n_pre_closed++;
  end

  // --------------------------------------------------- per-core streams
  word_t arch [NCORES][logic [BLK_ADDR_W+2:0]];
  word_t exp_q [NCORES][$];
  int    pushed [NCORES];
  int    target [NCORES];

  // blk = pc * 64 + r: the column comes from the pc and r, the bank and
  // rank from r; the row is mostly the core's first row, so blocks are
  // reused, with occasional other rows that conflict in the L1 and in the
  // DRAM banks
  function automatic logic [BLK_ADDR_W+5:0] mk_addr(int core, int blk, int word, int rowsel);
    logic [ROW_W-1:0] row; logic [3:0] bank; logic [1:0] rank; logic [6:0] col;
    row  = 15'(core * 8 + rowsel);
    bank = 4'((blk >> 2) & 15);
    rank = 2'(blk & 3);
    col  = 7'(((blk >> 6) << 2) | ((blk >> 2) & 3));
    return {row, bank, rank, col, 3'(word), 3'b000};
  endfunction

  for (genvar c = 0; c < NCORES; c++) begin : g_core_tb
    // op_ready only depends on the LSQ fill level, so it is stable from the
    // falling edge on: an op presented there is taken at the next rising edge
    task automatic push(input mem_op_t o);
      logic [BLK_ADDR_W+2:0] wa;
      wa = o.addr[BLK_ADDR_W+5:3];
      op[c] = o; op_valid[c] = 1;
      while (!op_ready[c]) @(negedge clk);
      if (o.is_store) arch[c][wa] = o.wdata;
      else exp_q[c].push_back(arch[c].exists(wa) ? arch[c][wa]
                                                 : init_word(o.addr[BLK_ADDR_W+5:6], int'(o.addr[5:3])));
      pushed[c]++;
      @(negedge clk);
      op_valid[c] = 0;
    endtask

    initial begin
      op_valid[c] = 0; op[c] = '0;
      pushed[c] = 0;
      @(posedge rst_n);
      forever begin
        int pcn, blk, word, rowsel;
        mem_op_t o;
        @(negedge clk);
        if (pushed[c] >= target[c]) continue;
        if (target[c] == OPS1 + OPS2 && pushed[c] >= OPS1 && $urandom_range(0, 9) != 0) continue;
        // instruction pc k walks its own blocks and touches words k%8 and
        // (k+3)%8; three quarters of the blocks sit in rank 0 so that
        // activations crowd into one rank's tFAW window
        pcn  = $urandom_range(0, 7);
        blk  = pcn * 64 + $urandom_range(0, 63);
        if ($urandom_range(0, 3) != 0) blk = blk & ~3;
        word = ($urandom_range(0, 1) == 0) ? pcn : (pcn + 3) % 8;
        if ($urandom_range(0, 7) == 0) word = $urandom_range(0, 7);   // an unpredicted word
        o.pc = 32'h1000 + 32'(pcn * 4);
        rowsel = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
        o.addr = mk_addr(c, blk, word, rowsel);
        o.is_store = ($urandom_range(0, 3) == 0);
        o.wdata = {$urandom, $urandom};
        push(o);
        // a second access to the same block right behind it (lookahead)
        if ($urandom_range(0, 1) == 0 && pushed[c] < target[c]) begin
          o.pc = 32'h2000 + 32'(pcn * 4);
          o.addr = mk_addr(c, blk, ($urandom_range(0, 1) == 0) ? (pcn + 3) % 8 : $urandom_range(0, 7), rowsel);
          o.is_store = 0;
          push(o);
        end
      end
    end

    always @(posedge clk) if (rst_n && ld_valid[c]) begin
      checks++;
      n_loads++;
      if (exp_q[c].size() == 0) begin
        failures++; $display("core %0d: unexpected load result", c);
      end else begin
        word_t e;
        e = exp_q[c].pop_front();
        if (ld_data[c] != e) begin
          failures++; $display("core %0d: load %h, expected %h", c, ld_data[c], e);
        end
      end
    end
  end

  function automatic logic all_done();
    for (int c = 0; c < NCORES; c++)
      if (pushed[c] < target[c] || exp_q[c].size() != 0 || lq_busy[c]) return 0;
    return 1;
  endfunction

  initial begin
    dynamic_en = 0;
    for (int c = 0; c < NCORES; c++) target[c] = OPS1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: all cores, Sectored DRAM always on
    do @(negedge clk); while (!all_done());
    $display("phase 1 done at %0t", $time);
    // phase 2: dynamic control, one lightly loaded core
    dynamic_en = 1;
    target[0] = OPS1 + OPS2;
    do @(negedge clk); while (!all_done() || sectored_on);
    $display("phase 2 done at %0t", $time);
    // phase 3: all cores again; the read queue stays short, so coarse mode
    // stays and every read activates and transfers a whole block
    for (int c = 0; c < NCORES; c++) target[c] = OPS1 + OPS2 + OPS3;
    do @(negedge clk); while (!all_done());
    checks++;
    if (sectored_on) begin failures++; $display("coarse mode left with a short read queue"); end
    repeat (200) @(negedge clk);
    for (int r = 0; r < RANKS; r++) for (int c = 0; c < NCHIPS; c++) begin
      checks++; if (viol[r][c] != 0) begin failures++; $display("array %0d/%0d: %0d violations", r, c, viol[r][c]); end
    end
    $display("loads %0d hit %0d sector_miss %0d miss %0d writeback %0d lookahead %0d predicted %0d",
             n_loads, n_hit, n_smiss, n_miss, n_wb, n_la, n_pred);
    $display("act %0d partial_act %0d pre_closed %0d reopen %0d faw_stall %0d short_burst %0d coarse_reads %0d switched_off %0d",
             n_act, n_partial, n_pre_closed, n_reopen, n_faw, n_short, n_fullb, n_off);
    checks++; if (n_hit == 0)        begin failures++; $display("no cache hit"); end
    checks++; if (n_smiss == 0)      begin failures++; $display("no sector miss"); end
    checks++; if (n_miss == 0)       begin failures++; $display("no cache miss"); end
    checks++; if (n_wb == 0)         begin failures++; $display("no write-back"); end
    checks++; if (n_la == 0)         begin failures++; $display("no lookahead-widened request"); end
    checks++; if (n_pred == 0)       begin failures++; $display("no predictor-widened request"); end
    checks++; if (n_partial == 0)    begin failures++; $display("no partial activation"); end
    checks++; if (n_pre_closed == 0) begin failures++; $display("no PRE to a closed bank"); end
    checks++; if (n_reopen == 0)     begin failures++; $display("no re-open for missing sectors"); end
    checks++; if (n_faw == 0)        begin failures++; $display("no tFAW stall"); end
    checks++; if (n_short == 0)      begin failures++; $display("no short burst"); end
    checks++; if (n_fullb == 0)      begin failures++; $display("no coarse-grained read"); end
    checks++; if (n_off == 0)        begin failures++; $display("dynamic control never switched off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
