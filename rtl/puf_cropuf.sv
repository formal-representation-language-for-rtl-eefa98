// puf_cropuf: configurable ring-oscillator PUF with an N-bit challenge.
//
// Same organisation as puf_ropuf, but every oscillator is a configurable ring
// (puf_conf_ring_osc) and all rings share the configuration s = c[M-2:0], the first
// challenge bits, as the structural description takes s from c_1..c_m. This needs
// M-1 <= N. The remaining description is that of the plain RO PUF:
// 2^(N+1) ring oscillators of M gates are split into two banks of 2^N. The challenge
// steers one mux tree per bank (bit c[i-1] steers level i), so one oscillator of each
// bank reaches a counter. During a measurement both counters count the rising edges of
// their oscillator over the same window; the response is 1 when the first bank's
// oscillator counted strictly more edges, else 0.
// Interface: pulse start with the challenge on c (it is captured then); busy is high
// during the measurement; done pulses WINDOW+2 clock edges after start, and r holds the
// response from done until the next start. Oscillator i uses seed child_seed(SEED, i).
// The window length and counter width are this design's choices.
module puf_cropuf
  import puf_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned M      = 5,
  parameter int unsigned WINDOW = 2048,
  parameter int unsigned CW     = 16,
  parameter logic [31:0] SEED   = 32'd11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] c,
  output logic         busy,
  output logic         done,
  output logic         r
);
  localparam int unsigned NB = 1 << N;  // oscillators per bank

  if (M - 1 > N) begin : g_bad
    $error("puf_cropuf: the configuration takes M-1 challenge bits, so M-1 <= N");
  end

  logic          clr, ro_en;
  logic [N-1:0]  c_q;
  logic [NB-1:0] osc_y, osc_z;
  logic          y, z;
  logic [M-2:0]  s;
  logic [CW-1:0] count_y, count_z;

  puf_ro_ctrl #(.WINDOW(WINDOW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .clr(clr), .ro_en(ro_en), .done(done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            c_q <= '0;
    else if (start && !busy) c_q <= c;
  end

  for (genvar i = 0; i < NB; i++) begin : g_ro
    puf_conf_ring_osc #(.M(M), .SEED(child_seed(SEED, i)))
      u_y (.clk(clk), .rst_n(rst_n), .en(ro_en), .s(s), .osc(osc_y[i]));
    puf_conf_ring_osc #(.M(M), .SEED(child_seed(SEED, NB + i)))
      u_z (.clk(clk), .rst_n(rst_n), .en(ro_en), .s(s), .osc(osc_z[i]));
  end

  assign s = c_q[M-2:0];

  puf_mux_tree #(.K(N)) u_tree_y (.d(osc_y), .s(c_q), .y(y));
  puf_mux_tree #(.K(N)) u_tree_z (.d(osc_z), .s(c_q), .y(z));

  puf_edge_counter #(.CW(CW)) u_cnt_y (.clk(clk), .rst_n(rst_n), .clr(clr), .sig(y), .count(count_y));
  puf_edge_counter #(.CW(CW)) u_cnt_z (.clk(clk), .rst_n(rst_n), .clr(clr), .sig(z), .count(count_z));

  assign r = (count_y > count_z);
endmodule
