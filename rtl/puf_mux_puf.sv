// puf_mux_puf: multiplexer-based arbiter PUF composition.
//
// 2^K data APUFs and K selector APUFs all receive the same N-bit challenge. The data
// responses d enter a K-level tree of 2:1 muxes whose level i is steered by selector
// response s[i-1]; the tree output is the response. Data APUF i uses seed
// child_seed(SEED, i), selector APUF i uses child_seed(SEED, 2^K + i). Combinational.
//
// Structure as published; K = 3 is this design's choice.
module puf_mux_puf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K    = 3,
  parameter logic [31:0] SEED = 32'd6
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  logic [(1<<K)-1:0] d;
  logic [K-1:0]      s;

  for (genvar i = 0; i < (1 << K); i++) begin : g_data
    puf_apuf #(.N(N), .SEED(child_seed(SEED, i))) u_apuf (.en(en), .c(c), .r(d[i]));
  end
  for (genvar i = 0; i < K; i++) begin : g_sel
    puf_apuf #(.N(N), .SEED(child_seed(SEED, (1 << K) + i))) u_apuf (.en(en), .c(c), .r(s[i]));
  end

  puf_mux_tree #(.K(K)) u_tree (.d(d), .s(s), .y(r));
endmodule
