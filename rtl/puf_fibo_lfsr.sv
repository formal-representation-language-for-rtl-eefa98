// puf_fibo_lfsr: one step of a Fibonacci LFSR over an N-bit challenge.
//
// The feedback bit is the XOR of the challenge bits selected by the generator-polynomial
// coefficient vector G (G[i] is the coefficient of bit c[i]). The vector then shifts by
// one towards bit 0, dropping c[0], and the feedback enters at the top bit c[N-1].
// The default G = 0x1B taps bits 0, 1, 3 and 4, the Fibonacci form of
// x^64 + x^4 + x^3 + x + 1 (this design's choice). Combinational.
module puf_fibo_lfsr #(
  parameter int unsigned N = 64,
  parameter logic [N-1:0] G = N'(64'h1B)
) (
  input  logic [N-1:0] c,
  output logic [N-1:0] c_next
);
  logic fb;
  assign fb     = ^(G & c);
  assign c_next = {fb, c[N-1:1]};
endmodule
