// puf_bent_func: Maiorana-McFarland style bent function of K bits.
//
// bf = y1.y2 XOR y3.y4 XOR ... : the AND of each pair of neighbouring bits, pairs
// starting at the first bit, all XORed. K should be even; with odd K the last bit is
// unused. Combinational.
//
// The pairwise AND/XOR form is published; starting the sum at 0 and pairing (1,2), (3,4),
// ... is this design's reading of the loop.
module puf_bent_func #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] y,
  output logic         bf
);
  always_comb begin
    bf = 1'b0;
    for (int i = 0; i + 1 < K; i += 2) bf ^= y[i] & y[i+1];
  end
endmodule
