// puf_spuf: S-PUF, two arbiter PUFs on a challenge and its half-rotation.
//
// APUF 1 (seed child_seed(SEED, 0)) answers c; APUF 2 (seed child_seed(SEED, 1))
// answers cshift with cshift_i = c_(i+N/2) (indices mod N), i.e. the two halves of the
// challenge swapped. The response is the XOR of the two. Combinational.
//
// Structure as published; the half swap uses indices modulo N.
module puf_spuf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter logic [31:0] SEED = 32'd21
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [N-1:0] cshift;
  logic         y1, y2;
  localparam int unsigned K = N - N / 2;  // bit j of c moves to bit (j + K) mod N
  assign cshift = {c[N-K-1:0], c[N-1:N-K]};
  puf_apuf #(.N(N), .SEED(child_seed(SEED, 0))) u_a1 (.en(en), .c(c),      .r(y1));
  puf_apuf #(.N(N), .SEED(child_seed(SEED, 1))) u_a2 (.en(en), .c(cshift), .r(y2));
  assign r = y1 ^ y2;
endmodule
