// Sector-weighted four-activate window (tFAW) of one rank.
//
// DDR4 allows at most four ACTIVATEs in any tFAW-long window because of the
// power needed to open whole rows. With Sectored Activation an ACTIVATE
// opens only some sectors and draws correspondingly less power, so the
// limit is relaxed according to the number of sectors opened. This block
// charges each ACTIVATE its number of opened sectors and allows a new
// ACTIVATE only if the charges of the ACTIVATEs issued in the last TFAW-1
// cycles plus its own stay within MAX_ACTS*NSECT. Eight-sector ACTIVATEs
// therefore see exactly the DDR4 rule; one-sector ACTIVATEs may be up to 32
// per window. The linear charge is this design's reading of "relaxed
// according to the amount of sectors activated".
//
// Timing: `left` is the remaining budget for an ACTIVATE in the current
// cycle; act_v/act_w record an ACTIVATE issued in this cycle.
module tfaw_window #(
  parameter int unsigned TFAW     = 80,   // 25 ns at 0.3125 ns per clock
  parameter int unsigned MAX_ACTS = 4,
  parameter int unsigned NSECT    = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  act_v,
  input  logic [$clog2(NSECT+1)-1:0]            act_w,
  output logic [$clog2(MAX_ACTS*NSECT+1)-1:0]   left
);
  localparam int unsigned WW = $clog2(NSECT+1);
  localparam int unsigned SW = $clog2(MAX_ACTS*NSECT+1);
  localparam int unsigned BUDGET = MAX_ACTS * NSECT;

  logic [WW-1:0] hist_q [TFAW-1];   // hist_q[i]: charge of the ACT issued i+1 cycles ago
  logic [SW-1:0] sum_q;
  logic [WW-1:0] in_w;

  assign in_w = act_v ? act_w : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TFAW-1; i++) hist_q[i] <= '0;
      sum_q <= '0;
    end else begin
      hist_q[0] <= in_w;
      for (int i = 1; i < TFAW-1; i++) hist_q[i] <= hist_q[i-1];
      sum_q <= sum_q + SW'(in_w) - SW'(hist_q[TFAW-2]);
    end
  end

  assign left = SW'(BUDGET) - sum_q;

  assert property (@(posedge clk) disable iff (!rst_n) act_v |-> SW'(act_w) <= left);
endmodule
