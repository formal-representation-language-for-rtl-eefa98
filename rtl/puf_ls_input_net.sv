// puf_ls_input_net: input network of the lightweight secure PUF, applied to every row.
//
// With 1-based indices and N even, for each row: d_((N+2)/2) = x_1; for odd j >= 3,
// d_((j+1)/2) = x_j XOR x_(j+1); for even j, d_((N+j+2)/2) = x_j XOR x_(j+1)
// (j = 1..N-1). Bit d_1 is not reached by these rules and takes x_N, this design's
// choice. Each output bit thus depends on one or two adjacent input bits, which spreads
// a single input bit flip over two stages of the arbiter chain. Combinational.
module puf_ls_input_net #(
  parameter int unsigned Q = 8,
  parameter int unsigned N = 64
) (
  input  logic [Q-1:0][N-1:0] x,
  output logic [Q-1:0][N-1:0] d
);
  if (N % 2 != 0) begin : g_bad
    $error("puf_ls_input_net: N must be even");
  end
  always_comb begin
    for (int q = 0; q < Q; q++) begin
      d[q][0] = x[q][N-1];
      for (int j = 1; j <= N - 1; j++) begin
        if (j == 1)          d[q][(N+2)/2 - 1]   = x[q][0];
        else if (j % 2 != 0) d[q][(j+1)/2 - 1]   = x[q][j-1] ^ x[q][j];
        else                 d[q][(N+j+2)/2 - 1] = x[q][j-1] ^ x[q][j];
      end
    end
  end
endmodule
