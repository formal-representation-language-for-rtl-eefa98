// puf_ipuf: (K_U, K_L) interpose PUF.
//
// An upper K_U-XOR APUF of N stages answers the challenge c; its response v is inserted
// as bit T (1-based) of an (N+1)-bit challenge x for a lower K_L-XOR APUF:
// x_i = c_i for i < T, x_T = v, x_i = c_(i-1) for i > T. The lower response is the
// interpose PUF's response. The upper XOR PUF uses seed child_seed(SEED, 0), the lower
// one child_seed(SEED, 1). Combinational; in silicon the lower race starts after the
// upper arbiters have decided.
//
// Structure as published; K_U = 1, K_L = 4 and T = 33 are this design's choices.
module puf_ipuf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K_U  = 1,
  parameter int unsigned K_L  = 4,
  parameter int unsigned T    = 33,
  parameter logic [31:0] SEED = 32'd7
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic         v;
  logic [N:0]   x;

  puf_xor_apuf #(.N(N), .K(K_U), .SEED(child_seed(SEED, 0))) u_upper (.en(en), .c(c), .r(v));

  always_comb begin
    for (int i = 1; i <= N + 1; i++) begin
      if (i < T)       x[i-1] = c[i-1];
      else if (i == T) x[i-1] = v;
      else             x[i-1] = c[i-2];
    end
  end

  puf_xor_apuf #(.N(N + 1), .K(K_L), .SEED(child_seed(SEED, 1))) u_lower (.en(en), .c(x), .r(r));
endmodule
