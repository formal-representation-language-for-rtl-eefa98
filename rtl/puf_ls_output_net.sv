// puf_ls_output_net: output network of the lightweight secure PUF.
//
// Each of the M response bits XORs Z row responses: y_j = XOR over i = 1..Z of
// r[(j + S + i) mod Q], with j = 1..M and r indexed from 0. Z and S trade security
// against area; their defaults here are this design's choice. Combinational.
module puf_ls_output_net #(
  parameter int unsigned Q = 8,
  parameter int unsigned M = 4,
  parameter int unsigned Z = 3,
  parameter int unsigned S = 0
) (
  input  logic [Q-1:0] r,
  output logic [M-1:0] y
);
  always_comb begin
    for (int j = 1; j <= M; j++) begin
      y[j-1] = 1'b0;
      for (int i = 1; i <= Z; i++) y[j-1] ^= r[(j + S + i) % Q];
    end
  end
endmodule
