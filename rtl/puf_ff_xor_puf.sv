// puf_ff_xor_puf: feed-forward XOR PUF.
//
// K feed-forward arbiter PUFs share the challenge and enable; PUF i has one loop from
// stage FF_IN[i] to stage FF_OUT[i]. The response is the XOR of the K responses.
// Combinational. The loop positions are this design's choice.
module puf_ff_xor_puf
  import puf_pkg::*;
#(
  parameter int unsigned N          = 64,
  parameter int unsigned K          = 4,
  parameter int unsigned FF_IN  [K] = '{16, 24, 32, 40},
  parameter int unsigned FF_OUT [K] = '{48, 52, 56, 60},
  parameter logic [31:0] SEED       = 32'd4
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [K-1:0] ffa;
  for (genvar i = 0; i < K; i++) begin : g_ff
    localparam int unsigned P[8] = '{FF_IN[i], 0, 0, 0, 0, 0, 0, 0};
    localparam int unsigned Q[8] = '{FF_OUT[i], 0, 0, 0, 0, 0, 0, 0};
    puf_ff_apuf #(.N(N), .M(1), .FF_IN(P), .FF_OUT(Q), .SEED(child_seed(SEED, i)))
      u_ff (.en(en), .c(c), .r(ffa[i]));
  end
  assign r = ^ffa;
endmodule
