// puf_cpuf_ax: composite PUF, configuration (B): arbiter PUFs combined by XOR.
//
// The N-bit challenge is cut into N/NA consecutive NA-bit slices; slice i (bits
// c[i*NA +: NA]) drives its own NA-stage arbiter PUF, and the response is the XOR of the
// N/NA APUF responses. APUF i uses seed child_seed(SEED, i). Combinational.
module puf_cpuf_ax
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned NA   = 16,
  parameter logic [31:0] SEED = 32'd12
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  localparam int unsigned N_ARB = N / NA;
  logic [N_ARB-1:0] y;
  for (genvar i = 0; i < N_ARB; i++) begin : g_apuf
    puf_apuf #(.N(NA), .SEED(child_seed(SEED, i))) u_apuf (.en(en), .c(c[i*NA +: NA]), .r(y[i]));
  end
  assign r = ^y;
endmodule
