// puf_colpuf: configurable LFSR-based PUF.
//
// The seed challenge cs is advanced one Fibonacci LFSR step (puf_fibo_lfsr, default
// polynomial x^4 + x^3 + 1, taps on bits 0 and 3, this design's choice) and the result
// challenges a configurable RO PUF (puf_cropuf). Interface and timing are those of
// puf_cropuf: pulse start with cs stable; done pulses WINDOW+2 clock edges later.
module puf_colpuf
  import puf_pkg::*;
#(
  parameter int unsigned  N      = 4,
  parameter int unsigned  M      = 5,
  parameter logic [N-1:0] G      = N'(4'b1001),
  parameter int unsigned  WINDOW = 2048,
  parameter logic [31:0]  SEED   = 32'd19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] cs,
  output logic         busy,
  output logic         done,
  output logic         r
);
  logic [N-1:0] c;
  puf_fibo_lfsr #(.N(N), .G(G)) u_lfsr (.c(cs), .c_next(c));
  puf_cropuf #(.N(N), .M(M), .WINDOW(WINDOW), .SEED(SEED)) u_cropuf (
    .clk(clk), .rst_n(rst_n), .start(start), .c(c), .busy(busy), .done(done), .r(r));
endmodule
