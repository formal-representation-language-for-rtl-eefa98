// puf_xor_apuf: k-XOR arbiter PUF.
//
// K arbiter PUFs of N stages receive the same challenge and enable; the response is the
// XOR of their K responses. The default K = 3 is the common three-APUF example.
// APUF i uses seed child_seed(SEED, i). Combinational.
//
// Structure as published; K = 3 follows the three-APUF example.
module puf_xor_apuf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K    = 3,
  parameter logic [31:0] SEED = 32'd2
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [K-1:0] a;
  for (genvar i = 0; i < K; i++) begin : g_apuf
    puf_apuf #(.N(N), .SEED(child_seed(SEED, i))) u_apuf (.en(en), .c(c), .r(a[i]));
  end
  assign r = ^a;
endmodule
