// puf_cpuf_ar: composite PUF, configuration (A): arbiter PUFs feeding a ring-oscillator PUF.
//
// The N-bit challenge is cut into N/NA consecutive NA-bit slices, each answered by its
// own NA-stage arbiter PUF (seed child_seed(SEED, i)). The N/NA APUF responses form
// the challenge of an RO PUF (seed child_seed(SEED, N/NA)) whose response is the output.
// Interface as puf_ropuf: hold en = 1 and c stable, pulse start; done pulses WINDOW+2
// clock edges later and r is valid from then until the next start.
module puf_cpuf_ar
  import puf_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned NA     = 16,
  parameter int unsigned M      = 5,
  parameter int unsigned WINDOW = 2048,
  parameter logic [31:0] SEED   = 32'd13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         busy,
  output logic         done,
  output logic         r
);
  localparam int unsigned N_ARB = N / NA;
  logic [N_ARB-1:0] y;
  for (genvar i = 0; i < N_ARB; i++) begin : g_apuf
    puf_apuf #(.N(NA), .SEED(child_seed(SEED, i))) u_apuf (.en(en), .c(c[i*NA +: NA]), .r(y[i]));
  end
  puf_ropuf #(.N(N_ARB), .M(M), .WINDOW(WINDOW), .SEED(child_seed(SEED, N_ARB))) u_ropuf (
    .clk(clk), .rst_n(rst_n), .start(start), .c(y), .busy(busy), .done(done), .r(r));
endmodule
