// Sector Predictor: the Sector History Table (SHT) and its index function.
//
// The SHT has ENTRIES entries of eight "previously used sectors" bits. On
// an L1 miss or sector miss the table is read with an index formed by
// XOR-ing two log2(ENTRIES)-bit fields of the instruction address with the
// word offset of the data address; the bits read are added to the
// request's sector bits. The L1 keeps that index with the newly allocated
// block and tracks the block's "currently used sectors"; on eviction the
// SHT entry at the stored index is overwritten with them.
//
// Interface: lookup is combinational (q_pc/q_woff to q_idx and q_pred);
// the update is written at the clock edge. The fields of the instruction
// address are its lowest 2*log2(ENTRIES) bits, which is this design's
// choice, as is clearing the table at reset (predict nothing).
module sector_predictor
  import sdram_pkg::*;
#(
  parameter int unsigned ENTRIES = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [31:0]                q_pc,
  input  logic [2:0]                 q_woff,
  output logic [$clog2(ENTRIES)-1:0] q_idx,
  output sect_t                      q_pred,
  input  logic                       upd_v,
  input  logic [$clog2(ENTRIES)-1:0] upd_idx,
  input  sect_t                      upd_used
);
  localparam int unsigned L = $clog2(ENTRIES);

  sect_t sht_q [ENTRIES];

  assign q_idx  = q_pc[L-1:0] ^ q_pc[2*L-1:L] ^ L'(q_woff);
  assign q_pred = sht_q[q_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) sht_q[i] <= '0;
    end else if (upd_v) begin
      sht_q[upd_idx] <= upd_used;
    end
  end
endmodule
