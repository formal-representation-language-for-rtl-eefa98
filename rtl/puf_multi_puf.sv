// puf_multi_puf: Multi-PUF, a weak Pico-PUF array masking the challenge of an arbiter PUF.
//
// N Pico-PUF cells (seed child_seed(SEED, i)) provide a fixed N-bit device key k; the
// arbiter PUF (seed child_seed(SEED, N)) answers k XOR c.
// Timing: the Pico-PUF cells are clocked models; the key settles PICO_SETTLE (puf_pkg)
// clock cycles after en is first sampled high after reset, and from then on r follows
// {en, c} combinationally.
//
// Structure as published; one Pico-PUF cell per challenge bit is this design's reading.
module puf_multi_puf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter logic [31:0] SEED = 32'd24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [N-1:0] k;
  for (genvar i = 0; i < N; i++) begin : g_pico
    puf_pico_puf #(.SEED(child_seed(SEED, i))) u_pico (.clk(clk), .rst_n(rst_n), .en(en), .out(k[i]));
  end
  puf_apuf #(.N(N), .SEED(child_seed(SEED, N))) u_apuf (.en(en), .c(k ^ c), .r(r));
endmodule
