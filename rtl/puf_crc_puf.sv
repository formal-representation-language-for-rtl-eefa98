// puf_crc_puf: CRC-PUF.
//
// The challenge is advanced M times through a Fibonacci LFSR step (puf_fibo_lfsr, the
// CRC of the challenge); after step i the resulting vector challenges arbiter PUF i,
// whose response is bit r[i-1]. The whole cascade is unrolled and combinational.
// APUF i uses seed child_seed(SEED, i).
//
// Structure as published; M = 4 and the generator polynomial are this design's choices.
module puf_crc_puf
  import puf_pkg::*;
#(
  parameter int unsigned  N    = 64,
  parameter int unsigned  M    = 4,
  parameter logic [N-1:0] G    = N'(64'h1B),
  parameter logic [31:0]  SEED = 32'd18
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic [M-1:0] r
);
  logic [M:0][N-1:0] x;
  assign x[0] = c;
  for (genvar i = 0; i < M; i++) begin : g_step
    puf_fibo_lfsr #(.N(N), .G(G)) u_lfsr (.c(x[i]), .c_next(x[i+1]));
    puf_apuf #(.N(N), .SEED(child_seed(SEED, i))) u_apuf (.en(en), .c(x[i+1]), .r(r[i]));
  end
endmodule
