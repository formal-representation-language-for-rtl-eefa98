// puf_sn_puf: Sn-PUF, K S-PUFs combined by a bent function.
//
// K S-PUFs (puf_spuf, seed child_seed(SEED, i)) answer the same N-bit challenge and
// their responses go through puf_bent_func. Combinational.
//
// Structure as published; K = 4 S-PUFs is this design's choice.
module puf_sn_puf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K    = 4,
  parameter logic [31:0] SEED = 32'd22
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [K-1:0] y;
  for (genvar i = 0; i < K; i++) begin : g_spuf
    puf_spuf #(.N(N), .SEED(child_seed(SEED, i))) u_spuf (.en(en), .c(c), .r(y[i]));
  end
  puf_bent_func #(.K(K)) u_bent (.y(y), .bf(r));
endmodule
