// Variable Burst Length encoder (the "8x3 encoder" that replaces the burst
// counter in the DRAM I/O path).
//
// Given the sector bits of the accessed bank and the number of the current
// beat, it returns the index (0..7) of the Read/Write FIFO entry that this
// beat carries: the beat-th enabled sector in ascending sector order. Beats
// thereby skip the FIFO entries of disabled sectors. `valid` is low when the
// beat number is not below the number of enabled sectors, i.e. past the end
// of the shortened burst. Combinational; the ascending order of the sectors
// within the burst is this design's choice (the document's example sends
// sectors 0, 3 and 7 in that order).
module vbl_encoder (
  input  logic [7:0] sb,
  input  logic [2:0] beat,
  output logic [2:0] idx,
  output logic       valid
);
  always_comb begin
    logic [3:0] seen;
    seen  = '0;
    idx   = '0;
    valid = 1'b0;
    for (int s = 0; s < 8; s++) begin
      if (sb[s]) begin
        if (!valid && seen == {1'b0, beat}) begin
          idx   = 3'(s);
          valid = 1'b1;
        end
        seen = seen + 4'd1;
      end
    end
  end
endmodule
