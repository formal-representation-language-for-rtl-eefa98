// puf_bent_puf: K arbiter PUFs combined by a bent function.
//
// K N-stage arbiter PUFs (seed child_seed(SEED, i)) answer the same challenge; the
// response is puf_bent_func of their K responses. Combinational.
//
// Structure as published; K = 4 is this design's choice.
module puf_bent_puf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K    = 4,
  parameter logic [31:0] SEED = 32'd20
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [K-1:0] y;
  for (genvar i = 0; i < K; i++) begin : g_apuf
    puf_apuf #(.N(N), .SEED(child_seed(SEED, i))) u_apuf (.en(en), .c(c), .r(y[i]));
  end
  puf_bent_func #(.K(K)) u_bent (.y(y), .bf(r));
endmodule
