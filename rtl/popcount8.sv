// Eight-bit population count.
//
// Counts the set sector bits of a bank; the count is the burst length of a
// Variable-Burst-Length READ or WRITE (one beat per enabled sector). Both
// the DRAM chip and the memory controller hold one of these so that the two
// sides agree on the burst length without any extra command. The count is
// purely combinational (an adder tree); the document only states that such
// a circuit is small, the adder-tree form is this design's.
module popcount8 (
  input  logic [7:0] bits,
  output logic [3:0] count
);
  logic [1:0] pair [4];
  logic [2:0] quad [2];

  always_comb begin
    for (int i = 0; i < 4; i++) pair[i] = {1'b0, bits[2*i]} + {1'b0, bits[2*i+1]};
    for (int i = 0; i < 2; i++) quad[i] = {1'b0, pair[2*i]} + {1'b0, pair[2*i+1]};
    count = {1'b0, quad[0]} + {1'b0, quad[1]};
  end
endmodule
