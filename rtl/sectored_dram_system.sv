// Sectored DRAM system: cores' memory pipelines, memory controller and
// ranks of Sectored DRAM chips.
//
// Per core: memory instructions enter an LSQ with Lookahead, whose head
// feeds a sectored L1 cache with its Sector Predictor. L1 misses and
// sector misses (and write-backs of dirty words) go through a round-robin
// arbiter to the memory controller, which serves them from RANKS ranks of
// eight x8 Sectored DRAM chips sharing one 64-bit channel. The dynamic
// on/off controller watches the controller's read-queue occupancy; with
// dynamic_en low the system runs Sectored DRAM always on.
//
// What is outside: the cores (memory instructions come in on op_*, load
// data goes out on ld_*), the L2/L3 caches (L1 misses go straight to the
// controller here) and the DRAM cell arrays, which each chip drives
// through arr[rank][chip] / arr_rdata[rank][chip].
//
// Clock: one clock, running at the data rate of the channel (one beat per
// cycle); the core-side blocks run on the same clock in this model.
module sectored_dram_system
  import sdram_pkg::*;
#(
  parameter int unsigned NCORES      = 8,
  parameter int unsigned LSQ_DEPTH   = 128,
  parameter int unsigned SHT_ENTRIES = 512,
  parameter int unsigned L1_SETS     = 512,
  parameter int unsigned RANKS       = 1 << RANK_W,
  parameter int unsigned QDEPTH      = 64,
  parameter int unsigned TRCD        = 44,
  parameter int unsigned TRAS        = 112,
  parameter int unsigned TRC         = 156,
  parameter int unsigned TRP         = 44,
  parameter int unsigned TFAW        = 80,
  parameter int unsigned CL          = 44,
  parameter int unsigned CWL         = 32,
  parameter int unsigned EPOCH       = 1000,
  parameter int unsigned THRESH      = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dynamic_en,
  // cores
  input  logic        op_valid [NCORES],
  output logic        op_ready [NCORES],
  input  mem_op_t     op       [NCORES],
  output logic        ld_valid [NCORES],
  output word_t       ld_data  [NCORES],
  // DRAM cell arrays
  output arr_req_t    arr       [RANKS][NCHIPS],
  input  chip_slice_t arr_rdata [RANKS][NCHIPS],
  // status
  output logic        sectored_on,
  output logic        ev_act, ev_pre, ev_rd, ev_wr, ev_faw_stall, ev_sector_reopen,
  output logic        ev_epoch,
  output logic        ev_hit [NCORES],
  output logic        ev_sector_miss [NCORES],
  output logic        ev_miss [NCORES],
  output logic        ev_writeback [NCORES],
  output sect_t       mc_req_sb,        // sector bits of a request entering the MC
  output logic        mc_req_fire
);
  localparam int unsigned IDW = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam int unsigned TIW = $clog2(SHT_ENTRIES);

  // ------------------------------------------------------------- cores
  logic     c_req_valid [NCORES];
  logic     c_req_ready [NCORES];
  mem_req_t c_req       [NCORES];
  logic     c_rsp_valid [NCORES];

  logic     mc_req_valid, mc_req_ready, mc_rsp_valid;
  mem_req_t mc_req;
  mem_rsp_t mc_rsp;
  logic [IDW-1:0] mc_req_id, mc_rsp_id;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic    lq_valid, lq_ready;
    mem_op_t lq_op;
    sect_t   lq_sb;
    logic [31:0]    sp_pc;
    logic [2:0]     sp_woff;
    logic [TIW-1:0] sp_idx, sp_upd_idx;
    sect_t          sp_pred, sp_upd_used;
    logic           sp_upd_v;

    lsq_lookahead #(.DEPTH(LSQ_DEPTH)) u_lsq (
      .clk(clk), .rst_n(rst_n),
      .push_valid(op_valid[c]), .push_ready(op_ready[c]), .push_op(op[c]),
      .out_valid(lq_valid), .out_ready(lq_ready), .out_op(lq_op), .out_sb(lq_sb)
    );

    sector_predictor #(.ENTRIES(SHT_ENTRIES)) u_sp (
      .clk(clk), .rst_n(rst_n),
      .q_pc(sp_pc), .q_woff(sp_woff), .q_idx(sp_idx), .q_pred(sp_pred),
      .upd_v(sp_upd_v), .upd_idx(sp_upd_idx), .upd_used(sp_upd_used)
    );

    sectored_cache #(.SETS(L1_SETS), .TIW(TIW)) u_l1 (
      .clk(clk), .rst_n(rst_n),
      .req_valid(lq_valid), .req_ready(lq_ready), .req(lq_op), .req_sb(lq_sb),
      .rsp_valid(ld_valid[c]), .rsp_data(ld_data[c]),
      .sp_pc(sp_pc), .sp_woff(sp_woff), .sp_idx(sp_idx), .sp_pred(sp_pred),
      .sp_upd_v(sp_upd_v), .sp_upd_idx(sp_upd_idx), .sp_upd_used(sp_upd_used),
      .mem_req_valid(c_req_valid[c]), .mem_req_ready(c_req_ready[c]), .mem_req(c_req[c]),
      .mem_rsp_valid(c_rsp_valid[c]), .mem_rsp(mc_rsp),
      .ev_hit(ev_hit[c]), .ev_sector_miss(ev_sector_miss[c]), .ev_miss(ev_miss[c]),
      .ev_writeback(ev_writeback[c])
    );

    assign c_rsp_valid[c] = mc_rsp_valid && mc_rsp_id == IDW'(c);
  end

  // -------------------------------------------------- round-robin arbiter
  logic [IDW-1:0] rr_q;

  always_comb begin
    mc_req_valid = 1'b0;
    mc_req_id    = '0;
    for (int k = NCORES-1; k >= 0; k--) begin
      int unsigned c;
      c = (int'(rr_q) + k) % NCORES;
      if (c_req_valid[c]) begin
        mc_req_valid = 1'b1;
        mc_req_id    = IDW'(c);
      end
    end
    mc_req = c_req[mc_req_id];
    for (int c = 0; c < NCORES; c++)
      c_req_ready[c] = mc_req_ready && mc_req_valid && mc_req_id == IDW'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (mc_req_valid && mc_req_ready)
      rr_q <= (mc_req_id == IDW'(NCORES-1)) ? '0 : mc_req_id + 1'b1;
  end

  assign mc_req_sb   = mc_req.sb;
  assign mc_req_fire = mc_req_valid && mc_req_ready;

  // ---------------------------------------------------- memory controller
  ddr4_ca_t ca [RANKS];
  word_t    dq_mc_out, dq_mc_in;
  logic     dq_mc_in_valid;
  logic [$clog2(QDEPTH+1)-1:0] rd_occ;

  sector_mode_ctrl #(.EPOCH(EPOCH), .THRESH(THRESH), .OCC_W($clog2(QDEPTH+1))) u_mode (
    .clk(clk), .rst_n(rst_n), .dynamic_en(dynamic_en), .rd_occupancy(rd_occ),
    .sectored_on(sectored_on), .epoch_end(ev_epoch)
  );

  sectored_mc #(
    .QDEPTH(QDEPTH), .RANKS(RANKS), .ID_W(IDW), .TRCD(TRCD), .TRAS(TRAS), .TRC(TRC),
    .TRP(TRP), .TFAW(TFAW), .CL(CL), .CWL(CWL)
  ) u_mc (
    .clk(clk), .rst_n(rst_n), .sectored_on(sectored_on),
    .req_valid(mc_req_valid), .req_ready(mc_req_ready), .req(mc_req), .req_id(mc_req_id),
    .rsp_valid(mc_rsp_valid), .rsp(mc_rsp), .rsp_id(mc_rsp_id),
    .ca(ca), .dq_out(dq_mc_out), .dq_in(dq_mc_in), .dq_in_valid(dq_mc_in_valid),
    .rd_occupancy(rd_occ),
    .ev_act(ev_act), .ev_pre(ev_pre), .ev_rd(ev_rd), .ev_wr(ev_wr),
    .ev_faw_stall(ev_faw_stall), .ev_sector_reopen(ev_sector_reopen)
  );

  // ---------------------------------------------------------- DRAM ranks
  logic [CHIP_DQ-1:0] chip_dq [RANKS][NCHIPS];
  logic               chip_dqv [RANKS][NCHIPS];

  for (genvar r = 0; r < RANKS; r++) begin : g_rank
    for (genvar c = 0; c < NCHIPS; c++) begin : g_chip
      sectored_dram_chip #(.CL(CL), .CWL(CWL)) u_chip (
        .clk(clk), .rst_n(rst_n), .ca(ca[r]),
        .dq_in(dq_mc_out[c*CHIP_DQ +: CHIP_DQ]),
        .dq_out(chip_dq[r][c]), .dq_valid(chip_dqv[r][c]),
        .arr(arr[r][c]), .arr_rdata(arr_rdata[r][c])
      );
    end
  end

  // Only the rank that is bursting drives the shared data lines.
  always_comb begin
    dq_mc_in       = '0;
    dq_mc_in_valid = 1'b0;
    for (int r = 0; r < RANKS; r++) begin
      if (chip_dqv[r][0]) begin
        dq_mc_in_valid = 1'b1;
        for (int c = 0; c < NCHIPS; c++) dq_mc_in[c*CHIP_DQ +: CHIP_DQ] = chip_dq[r][c];
      end
    end
  end
endmodule
