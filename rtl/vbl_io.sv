// Variable Burst Length (VBL) I/O path of one x8 DRAM chip.
//
// Read side: a column read fills the eight-entry Read FIFO, one entry per
// sector, each entry being the eight bits the chip drives on its DQ pins in
// one beat. Instead of a burst counter selecting entries 0..7, the Read MUX
// is steered by the 8x3 encoder: beat k sends the entry of the k-th enabled
// sector, so a burst has exactly popcount(sector bits) beats and the
// entries of disabled sectors are skipped.
// Write side: the same encoder places beat k of an incoming burst into the
// Write FIFO entry of the k-th enabled sector; after the last beat the FIFO
// and the sector mask are handed to the array.
//
// Timing (one beat per clock; the clock of this model runs at the data
// rate): rd_load in cycle t puts beats on dq_out in cycles t+1 .. t+BL with
// dq_valid high. wr_start in cycle t marks that beat 0 is on dq_in in cycle
// t; beats are taken on consecutive cycles and wr_done pulses, one cycle
// after the last beat, with the filled FIFO. A burst with no sector
// enabled is empty: it sends nothing and completes at once. The one-beat-
// per-clock timing is this design's abstraction of the double-data-rate
// interface.
module vbl_io
  import sdram_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // read burst
  input  logic        rd_load,
  input  sect_t       rd_sb,
  input  chip_slice_t rd_data,
  output logic [CHIP_DQ-1:0] dq_out,
  output logic        dq_valid,
  // write burst
  input  logic        wr_start,
  input  sect_t       wr_sb,
  input  logic [CHIP_DQ-1:0] dq_in,
  output logic        wr_done,
  output sect_t       wr_mask,
  output chip_slice_t wr_data
);
  chip_slice_t rfifo_q;
  sect_t       rsb_q;
  logic [2:0]  rbeat_q;
  logic        ractive_q;
  logic [3:0]  rlen_q;

  chip_slice_t wfifo_q;
  sect_t       wsb_q;
  logic [2:0]  wbeat_q;
  logic        wactive_q;
  logic [3:0]  wlen_q;

  logic [3:0]  rd_len, wr_len;
  logic [2:0]  ridx, widx;
  logic        rvalid_beat, wvalid_beat;
  logic [2:0]  wbeat_now;
  sect_t       wsb_now;

  popcount8 u_rlen (.bits(rd_sb), .count(rd_len));
  popcount8 u_wlen (.bits(wr_sb), .count(wr_len));

  // Read MUX: the encoder replaces the burst counter.
  vbl_encoder u_renc (.sb(rsb_q), .beat(rbeat_q), .idx(ridx), .valid(rvalid_beat));

  assign dq_out   = rfifo_q[ridx];
  assign dq_valid = ractive_q && rvalid_beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rfifo_q   <= '0;
      rsb_q     <= '0;
      rbeat_q   <= '0;
      ractive_q <= 1'b0;
      rlen_q    <= '0;
    end else if (rd_load) begin
      rfifo_q   <= rd_data;
      rsb_q     <= rd_sb;
      rbeat_q   <= '0;
      rlen_q    <= rd_len;
      ractive_q <= (rd_len != 0);
    end else if (ractive_q) begin
      if ({1'b0, rbeat_q} == rlen_q - 4'd1) ractive_q <= 1'b0;
      rbeat_q <= rbeat_q + 3'd1;
    end
  end

  // Write FIFO fill: the same encoder, applied to the incoming beat.
  assign wbeat_now = wr_start ? 3'd0 : wbeat_q;
  assign wsb_now   = wr_start ? wr_sb : wsb_q;
  vbl_encoder u_wenc (.sb(wsb_now), .beat(wbeat_now), .idx(widx), .valid(wvalid_beat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wfifo_q   <= '0;
      wsb_q     <= '0;
      wbeat_q   <= '0;
      wactive_q <= 1'b0;
      wlen_q    <= '0;
      wr_done   <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      if (wr_start) begin
        wsb_q   <= wr_sb;
        wlen_q  <= wr_len;
        if (wr_len == 0) begin
          wr_done <= 1'b1;
        end else begin
          wfifo_q       <= '0;
          wfifo_q[widx] <= dq_in;
          wbeat_q       <= 3'd1;
          wactive_q     <= (wr_len > 1);
          wr_done       <= (wr_len == 1);
        end
      end else if (wactive_q) begin
        if (wvalid_beat) wfifo_q[widx] <= dq_in;
        wbeat_q <= wbeat_q + 3'd1;
        if ({1'b0, wbeat_q} == wlen_q - 4'd1) begin
          wactive_q <= 1'b0;
          wr_done   <= 1'b1;
        end
      end
    end
  end

  assign wr_mask = wsb_q;
  assign wr_data = wfifo_q;
endmodule
