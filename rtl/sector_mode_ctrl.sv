// Dynamic on/off control of Sectored DRAM.
//
// Workloads that keep few requests in flight gain nothing from the relaxed
// activation window but still pay for sector misses. This block measures
// the average occupancy of the memory controller's read request queue over
// fixed epochs (every EPOCH cycles) and enables sectored operation for the
// next epoch only if that average exceeded THRESH; otherwise the controller
// falls back to whole-row, whole-block reads. The average is compared
// without a division, as sum > THRESH*EPOCH.
//
// With dynamic_en low the block reports "on" permanently (the Always-ON
// configuration, the default of the evaluated system). The decision
// changes at the clock edge that ends an epoch. Sectored operation is on
// after reset; that initial value is this design's choice.
module sector_mode_ctrl #(
  parameter int unsigned EPOCH  = 1000,
  parameter int unsigned THRESH = 30,
  parameter int unsigned OCC_W  = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dynamic_en,
  input  logic [OCC_W-1:0] rd_occupancy,
  output logic             sectored_on,
  output logic             epoch_end      // pulses when a decision is taken
);
  localparam int unsigned CW = $clog2(EPOCH);
  localparam int unsigned AW = $clog2(EPOCH * ((1 << OCC_W) - 1) + 1);

  logic [CW-1:0] cyc_q;
  logic [AW-1:0] acc_q, acc_next;
  logic          on_q;

  assign acc_next  = acc_q + AW'(rd_occupancy);
  assign epoch_end = (cyc_q == CW'(EPOCH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q <= '0;
      acc_q <= '0;
      on_q  <= 1'b1;
    end else if (epoch_end) begin
      cyc_q <= '0;
      acc_q <= '0;
      on_q  <= (acc_next > AW'(THRESH * EPOCH));
    end else begin
      cyc_q <= cyc_q + CW'(1);
      acc_q <= acc_next;
    end
  end

  assign sectored_on = !dynamic_en || on_q;
endmodule
