// Memory controller for Sectored DRAM (one channel, RANKS ranks).
//
// Requests carry a block address and sector bits (the words wanted, or for
// a write the words carried). The controller turns them into DDR4 commands
// with two additions:
//  * Every ACTIVATE is preceded by a PRECHARGE to the same bank that
//    carries the sector bits for it, also when the bank is already closed.
//    The bank state table remembers those bits per bank.
//  * READ/WRITE bursts are as long as the bank has open sectors (popcount
//    of its sector bits); beat k carries the word of the k-th open sector.
// A request can use an open row if the row matches and, for a read, the
// open sectors include the wanted ones; a write needs exactly its own
// sectors open, because every open sector receives a beat. Otherwise the
// bank is precharged with the request's sector bits and re-activated.
// ACTIVATEs are limited by a per-rank tFAW window that charges each
// ACTIVATE its number of opened sectors.
//
// Scheduling: a QDEPTH-entry queue kept in age order. Each command slot
// picks the oldest request whose column command is ready (row hit) and, if
// there is none, the oldest request whose PRE or ACT is ready; only the
// oldest request of a bank may precharge or activate it, a request waits
// for older requests to the same block, and row hits stop bypassing an
// older request of the same bank after CAP hits (first-ready, first-come-
// first-served with a cap). Commands go out only in every second clock,
// because the model clock runs at the data rate, twice the command rate.
// With sectored_on low, reads ask for all eight sectors (coarse-grained
// mode); writes always carry only their own words.
//
// Address map, from the top: row, bank, rank, column. Timing parameters
// are in clocks of 0.3125 ns: tRCD 13.75, tRAS 35, tRC 48.75, tFAW 25 ns
// follow the evaluated DDR4 configuration; tRP (13.75 ns), CL, CWL, tWR,
// the write-to-read gap and the cap are this design's values. Read data
// is returned on rsp_* one cycle after the last beat; writes get no
// response. At most INFL column accesses are in flight.
module sectored_mc
  import sdram_pkg::*;
#(
  parameter int unsigned QDEPTH = 64,
  parameter int unsigned RANKS  = 1 << RANK_W,
  parameter int unsigned ID_W   = 3,
  parameter int unsigned INFL   = 16,
  parameter int unsigned TRCD   = 44,
  parameter int unsigned TRAS   = 112,
  parameter int unsigned TRC    = 156,
  parameter int unsigned TRP    = 44,
  parameter int unsigned TFAW   = 80,
  parameter int unsigned CL     = 44,
  parameter int unsigned CWL    = 32,
  parameter int unsigned TWR    = 48,
  parameter int unsigned TWTR   = 4,
  parameter int unsigned CAP    = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sectored_on,
  // request port
  input  logic               req_valid,
  output logic               req_ready,
  input  mem_req_t           req,
  input  logic [ID_W-1:0]    req_id,
  // read responses
  output logic               rsp_valid,
  output mem_rsp_t           rsp,
  output logic [ID_W-1:0]    rsp_id,
  // DDR4 channel: one command bus per rank (cs_n differs), shared data
  output ddr4_ca_t           ca [RANKS],
  output word_t              dq_out,
  input  word_t              dq_in,
  input  logic               dq_in_valid,
  // status
  output logic [$clog2(QDEPTH+1)-1:0] rd_occupancy,
  output logic               ev_act,
  output logic               ev_pre,
  output logic               ev_rd,
  output logic               ev_wr,
  output logic               ev_faw_stall,   // an ACT was ready but for tFAW
  output logic               ev_sector_reopen // row was open but lacked sectors
);
  localparam int unsigned RW  = (RANKS > 1) ? $clog2(RANKS) : 1;
  localparam int unsigned NB  = NBANKS * RANKS;
  localparam int unsigned BIW = $clog2(NB);
  localparam int unsigned QW  = $clog2(QDEPTH);
  localparam int unsigned IW  = $clog2(INFL);
  localparam int unsigned SW  = $clog2(4*NSECT+1);

  typedef logic [31:0] time_t;

  typedef struct packed {
    logic              write;
    logic [BLK_ADDR_W-1:0] blk_addr;
    sect_t             sb;
    block_t            data;
    logic [ID_W-1:0]   id;
  } qent_t;

  typedef struct packed {
    logic              write;
    logic [ID_W-1:0]   id;
    sect_t             sb;      // sectors on the bus, in ascending order
    logic [3:0]        len;
    time_t             start;
    block_t            data;
  } infl_t;

  typedef enum logic [1:0] {NEED_COL, NEED_PRE, NEED_ACT} need_e;

  // ---------------------------------------------------------------- state
  qent_t  q_q [QDEPTH];
  logic   qv_q [QDEPTH];
  time_t  now_q;
  logic   phase_q;

  time_t  t_act_q [NB];
  time_t  t_pre_q [NB];
  time_t  t_preok_q [NB];
  logic [7:0] hits_q [NB];
  time_t  bus_free_q;

  infl_t  inf_q [INFL];
  logic [IW:0] inf_cnt_q;
  logic [IW-1:0] inf_rd_q, inf_wr_q;
  logic [2:0] beat_q;
  block_t rbuf_q;

  // bank state table
  logic              bs_open [NB];
  logic [ROW_W-1:0]  bs_row  [NB];
  sect_t             bs_sb   [NB];

  // ------------------------------------------------------ address decode
  function automatic logic [ROW_W-1:0] a_row(logic [BLK_ADDR_W-1:0] a);
    return a[BLK_ADDR_W-1 -: ROW_W];
  endfunction
  function automatic logic [BIW-1:0] a_bidx(logic [BLK_ADDR_W-1:0] a);
    logic [BANK_W-1:0] bank;
    logic [RANK_W-1:0] rank;
    bank = a[COL_W+RANK_W +: BANK_W];
    rank = a[COL_W +: RANK_W];
    return BIW'({rank, bank});
  endfunction
  function automatic logic [COL_W-1:0] a_col(logic [BLK_ADDR_W-1:0] a);
    return a[COL_W-1:0];
  endfunction
  function automatic logic [RW-1:0] rank_of(logic [BIW-1:0] b);
    return (RANKS > 1) ? RW'(b >> BANK_W) : '0;
  endfunction
  function automatic logic [3:0] pcnt(sect_t s);
    logic [3:0] c;
    c = '0;
    for (int i = 0; i < NSECT; i++) c = c + 4'(s[i]);
    return c;
  endfunction

  // ------------------------------------------------------------ tFAW
  logic [SW-1:0] faw_left [RANKS];
  logic          faw_act  [RANKS];
  logic [3:0]    faw_w;

  for (genvar r = 0; r < RANKS; r++) begin : g_faw
    tfaw_window #(.TFAW(TFAW), .MAX_ACTS(4), .NSECT(NSECT)) u_faw (
      .clk(clk), .rst_n(rst_n), .act_v(faw_act[r]), .act_w(faw_w), .left(faw_left[r])
    );
  end

  // ------------------------------------------------------------ scheduler
  need_e  need     [QDEPTH];
  logic   ready    [QDEPTH];
  logic   faw_blk  [QDEPTH];
  logic   reopen   [QDEPTH];
  logic   col_sel_v, row_sel_v;
  logic [QW-1:0] col_sel, row_sel;
  logic   issue_v;
  logic [QW-1:0] sel;
  need_e  sel_need;
  qent_t  sel_e;
  logic [BIW-1:0] sel_b;
  time_t  sel_start;
  logic [3:0] sel_len;
  logic   inf_full;

  assign inf_full = (inf_cnt_q == (IW+1)'(INFL));

  always_comb begin
    for (int i = 0; i < QDEPTH; i++) begin
      logic [BIW-1:0] b;
      logic older_bank, older_blk, rowhit, sbok, pend_ok;
      time_t start;
      logic [3:0] len;
      b = a_bidx(q_q[i].blk_addr);
      older_bank = 1'b0;
      older_blk  = 1'b0;
      for (int j = 0; j < i; j++) begin
        if (qv_q[j] && a_bidx(q_q[j].blk_addr) == b) older_bank = 1'b1;
        if (qv_q[j] && q_q[j].blk_addr == q_q[i].blk_addr) older_blk = 1'b1;
      end
      sbok    = q_q[i].write ? (bs_sb[b] == q_q[i].sb) : ((q_q[i].sb & ~bs_sb[b]) == '0);
      rowhit  = bs_open[b] && bs_row[b] == a_row(q_q[i].blk_addr);
      pend_ok = (bs_sb[b] == q_q[i].sb);  // closed bank: PRE conveyed exactly these
      len     = pcnt(bs_sb[b]);
      start   = now_q + (q_q[i].write ? time_t'(CWL) : time_t'(CL));
      reopen[i]  = qv_q[i] && rowhit && !sbok;
      faw_blk[i] = 1'b0;
      if (rowhit && sbok) begin
        need[i]  = NEED_COL;
        ready[i] = qv_q[i] && !older_blk && !inf_full
                   && now_q >= t_act_q[b] + TRCD && start >= bus_free_q
                   && !(older_bank && hits_q[b] >= 8'(CAP));
      end else if (bs_open[b] || !pend_ok) begin
        need[i]  = NEED_PRE;
        ready[i] = qv_q[i] && !older_bank && now_q >= t_preok_q[b]
                   && (!bs_open[b] || now_q >= t_act_q[b] + TRAS);
      end else begin
        need[i]  = NEED_ACT;
        ready[i] = qv_q[i] && !older_bank && now_q >= t_pre_q[b] + TRP
                   && now_q >= t_act_q[b] + TRC;
        faw_blk[i] = ready[i] && (SW'(len) > faw_left[rank_of(b)]);
        if (faw_blk[i]) ready[i] = 1'b0;
      end
    end
  end

  always_comb begin
    col_sel_v = 1'b0; col_sel = '0;
    row_sel_v = 1'b0; row_sel = '0;
    for (int i = QDEPTH-1; i >= 0; i--) begin
      if (ready[i] && need[i] == NEED_COL) begin col_sel_v = 1'b1; col_sel = QW'(i); end
      if (ready[i] && need[i] != NEED_COL) begin row_sel_v = 1'b1; row_sel = QW'(i); end
    end
    issue_v   = !phase_q && (col_sel_v || row_sel_v);
    sel       = col_sel_v ? col_sel : row_sel;
    sel_need  = need[sel];
    sel_e     = q_q[sel];
    sel_b     = a_bidx(sel_e.blk_addr);
    sel_len   = pcnt(bs_sb[sel_b]);
    sel_start = now_q + (sel_e.write ? time_t'(CWL) : time_t'(CL));
  end

  // Sector bits sent with the PRE that prepares a request's ACT.
  sect_t pre_sb;
  assign pre_sb = sel_e.sb;

  // ------------------------------------------------------ command pins
  logic [RW-1:0] sel_rank;
  ddr4_ca_t      cmd_ca;
  assign sel_rank = rank_of(sel_b);

  always_comb begin
    cmd_ca       = CA_DESELECT;
    cmd_ca.cs_n  = 1'b0;
    cmd_ca.bg    = sel_b[3:2];
    cmd_ca.ba    = sel_b[1:0];
    unique case (sel_need)
      NEED_ACT: begin
        cmd_ca.act_n = 1'b0;
        cmd_ca.a     = 18'(a_row(sel_e.blk_addr));
      end
      NEED_PRE: begin
        cmd_ca.a          = '0;
        cmd_ca.a[16:14]   = 3'b010;
        cmd_ca.a[NSECT-1:0] = pre_sb;
      end
      default: begin
        cmd_ca.a        = '0;
        cmd_ca.a[16:14] = sel_e.write ? 3'b100 : 3'b101;
        cmd_ca.a[9:3]   = a_col(sel_e.blk_addr);
      end
    endcase
    for (int r = 0; r < RANKS; r++) begin
      ca[r] = CA_DESELECT;
      if (issue_v && sel_rank == RW'(r)) ca[r] = cmd_ca;
    end
  end

  bank_state_table #(.NUM_BANKS(NB)) u_bst (
    .clk(clk), .rst_n(rst_n),
    .pre_v(issue_v && sel_need == NEED_PRE), .pre_idx(sel_b), .pre_sb(pre_sb),
    .act_v(issue_v && sel_need == NEED_ACT), .act_idx(sel_b), .act_row(a_row(sel_e.blk_addr)),
    .is_open(bs_open), .open_row(bs_row), .bank_sb(bs_sb)
  );

  always_comb begin
    faw_w = pcnt(bs_sb[sel_b]);
    for (int r = 0; r < RANKS; r++)
      faw_act[r] = issue_v && sel_need == NEED_ACT && sel_rank == RW'(r);
  end

  // ------------------------------------------------------ event outputs
  always_comb begin
    ev_act = issue_v && sel_need == NEED_ACT;
    ev_pre = issue_v && sel_need == NEED_PRE;
    ev_rd  = issue_v && sel_need == NEED_COL && !sel_e.write;
    ev_wr  = issue_v && sel_need == NEED_COL && sel_e.write;
    ev_faw_stall = 1'b0;
    ev_sector_reopen = 1'b0;
    for (int i = 0; i < QDEPTH; i++) begin
      if (faw_blk[i]) ev_faw_stall = 1'b1;
      if (reopen[i] && ev_pre && sel == QW'(i)) ev_sector_reopen = 1'b1;
    end
  end

  // ---------------------------------------------------- queue and timers
  logic [QW:0] qcount;
  logic        do_pop;
  logic        accept;
  mem_req_t    req_in;

  always_comb begin
    qcount = '0;
    rd_occupancy = '0;
    for (int i = 0; i < QDEPTH; i++) begin
      qcount = qcount + (QW+1)'(qv_q[i]);
      if (qv_q[i] && !q_q[i].write) rd_occupancy = rd_occupancy + 1'b1;
    end
  end

  assign do_pop    = issue_v && sel_need == NEED_COL;
  assign req_ready = (qcount < (QW+1)'(QDEPTH)) || do_pop;
  assign accept    = req_valid && req_ready;

  always_comb begin
    req_in = req;
    if (!sectored_on && !req.write) req_in.sb = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < QDEPTH; i++) begin
        qv_q[i] <= 1'b0;
        q_q[i]  <= '0;
      end
      for (int b = 0; b < NB; b++) begin
        t_act_q[b]   <= '0;
        t_pre_q[b]   <= '0;
        t_preok_q[b] <= '0;
        hits_q[b]    <= '0;
      end
      now_q      <= time_t'(TRC);   // all timers start satisfied
      phase_q    <= 1'b0;
      bus_free_q <= '0;
    end else begin
      logic [QW:0] n;
      now_q   <= now_q + 1;
      phase_q <= !phase_q;
      // compact the queue, removing the entry that got its column command
      n = '0;
      for (int i = 0; i < QDEPTH; i++) qv_q[i] <= 1'b0;
      for (int i = 0; i < QDEPTH; i++) begin
        if (qv_q[i] && !(do_pop && sel == QW'(i))) begin
          q_q[n[QW-1:0]]  <= q_q[i];
          qv_q[n[QW-1:0]] <= 1'b1;
          n = n + 1;
        end
      end
      if (accept) begin
        q_q[n[QW-1:0]]  <= '{write: req_in.write, blk_addr: req_in.blk_addr,
                             sb: req_in.sb, data: req_in.data, id: req_id};
        qv_q[n[QW-1:0]] <= 1'b1;
      end
      if (issue_v) begin
        unique case (sel_need)
          NEED_ACT: begin
            t_act_q[sel_b] <= now_q;
            hits_q[sel_b]  <= '0;
          end
          NEED_PRE: t_pre_q[sel_b] <= now_q;
          default: begin
            if (hits_q[sel_b] != 8'hFF) hits_q[sel_b] <= hits_q[sel_b] + 8'd1;
            if (sel_e.write) begin
              t_preok_q[sel_b] <= sel_start + time_t'(sel_len) + time_t'(TWR);
              bus_free_q       <= sel_start + time_t'(sel_len) + time_t'(TWTR);
            end else begin
              t_preok_q[sel_b] <= sel_start + time_t'(sel_len);
              bus_free_q       <= sel_start + time_t'(sel_len);
            end
          end
        endcase
      end
    end
  end

  // ---------------------------------------------------- data bus handling
  infl_t  head;
  logic   head_v;
  logic [2:0] widx;
  logic   wvalid;
  logic   wr_beat_now, last_beat, pop_inf;

  assign head   = inf_q[inf_rd_q];
  assign head_v = (inf_cnt_q != '0);

  vbl_encoder u_wenc (.sb(head.sb), .beat(beat_q), .idx(widx), .valid(wvalid));

  assign wr_beat_now = head_v && head.write && (now_q == head.start + time_t'(beat_q));
  assign last_beat   = ({1'b0, beat_q} == head.len - 4'd1);
  assign pop_inf     = head_v && (head.write ? wr_beat_now : dq_in_valid) && last_beat;
  assign dq_out      = wr_beat_now ? head.data[widx] : '0;

  // a write beat always maps to one of the bank's open sectors
  assert property (@(posedge clk) disable iff (!rst_n) wr_beat_now |-> wvalid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < INFL; i++) inf_q[i] <= '0;
      inf_cnt_q <= '0;
      inf_rd_q  <= '0;
      inf_wr_q  <= '0;
      beat_q    <= '0;
      rbuf_q    <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      rsp_id    <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (do_pop) begin
        inf_q[inf_wr_q] <= '{write: sel_e.write, id: sel_e.id, sb: bs_sb[sel_b],
                             len: sel_len, start: sel_start, data: sel_e.data};
        inf_wr_q <= inf_wr_q + 1'b1;
      end
      inf_cnt_q <= inf_cnt_q + (IW+1)'(do_pop) - (IW+1)'(pop_inf);
      if (head_v && !head.write && dq_in_valid) begin
        rbuf_q[widx] <= dq_in;
        beat_q <= last_beat ? 3'd0 : beat_q + 3'd1;
        if (last_beat) begin
          rsp_valid      <= 1'b1;
          rsp.mask       <= head.sb;
          rsp.data       <= rbuf_q;
          rsp.data[widx] <= dq_in;
          rsp_id         <= head.id;
          inf_rd_q       <= inf_rd_q + 1'b1;
        end
      end else if (wr_beat_now) begin
        beat_q <= last_beat ? 3'd0 : beat_q + 3'd1;
        if (last_beat) inf_rd_q <= inf_rd_q + 1'b1;
      end
    end
  end

  // A read beat can only arrive while a read is at the head.
  assert property (@(posedge clk) disable iff (!rst_n) dq_in_valid |-> head_v && !head.write);
endmodule
