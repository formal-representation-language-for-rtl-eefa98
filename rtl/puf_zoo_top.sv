// puf_zoo_top: every PUF construction of this library, side by side.
//
// The constructions do not share logic: each one keeps its own challenge, enable and
// response ports, so any of them can be exercised, or removed, on its own. Two kinds of
// interface appear:
//  * Delay-based (arbiter) constructions are combinational in the arrival-time model:
//    with en_* = 1 the response r_* follows the challenge c_* directly.
//  * Constructions that contain ring-oscillator PUFs, and the recurrent DAPUF, are
//    sequenced on clk: pulse start_*, wait for done_* (busy_* is high meanwhile), then
//    read r_*, which stays valid until the next start.
// All sizes are the module defaults: 64-bit challenges for the arbiter-based designs,
// 4-bit challenges for the stand-alone RO PUFs, a 2048-cycle counting window.
// Every instance has its own SEED, i.e. stands for a different piece of silicon.
module puf_zoo_top (
  input  logic        clk,
  input  logic        rst_n,
  // arbiter PUF
  input  logic        en_apuf,
  input  logic [63:0] c_apuf,
  output logic        r_apuf,
  // 3-XOR arbiter PUF
  input  logic        en_xor,
  input  logic [63:0] c_xor,
  output logic        r_xor,
  // feed-forward arbiter PUF (one loop, stage 32 -> stage 48)
  input  logic        en_ff,
  input  logic [63:0] c_ff,
  output logic        r_ff,
  // feed-forward XOR PUF (four FF-APUFs)
  input  logic        en_ffx,
  input  logic [63:0] c_ffx,
  output logic        r_ffx,
  // 5-4 double arbiter PUF
  input  logic        en_dapuf,
  input  logic [63:0] c_dapuf,
  output logic [3:0]  r_dapuf,
  // MUX PUF (3 selector, 8 data APUFs)
  input  logic        en_mux,
  input  logic [63:0] c_mux,
  output logic        r_mux,
  // (1,4) interpose PUF
  input  logic        en_ipuf,
  input  logic [63:0] c_ipuf,
  output logic        r_ipuf,
  // ring-oscillator PUF
  input  logic        start_ropuf,
  input  logic [3:0]  c_ropuf,
  output logic        busy_ropuf,
  output logic        done_ropuf,
  output logic        r_ropuf,
  // composite PUF (A): APUFs -> RO PUF
  input  logic        start_cpuf_ar,
  input  logic        en_cpuf_ar,
  input  logic [63:0] c_cpuf_ar,
  output logic        busy_cpuf_ar,
  output logic        done_cpuf_ar,
  output logic        r_cpuf_ar,
  // composite PUF (B): APUFs -> XOR
  input  logic        en_cpuf_ax,
  input  logic [63:0] c_cpuf_ax,
  output logic        r_cpuf_ax,
  // composite PUF (C): RO PUFs -> APUF
  input  logic        start_cpuf_ra,
  input  logic        en_cpuf_ra,
  input  logic [63:0] c_cpuf_ra,
  output logic        busy_cpuf_ra,
  output logic        done_cpuf_ra,
  output logic        r_cpuf_ra,
  // composite PUF (D): RO PUFs -> XOR
  input  logic        start_cpuf_rx,
  input  logic [63:0] c_cpuf_rx,
  output logic        busy_cpuf_rx,
  output logic        done_cpuf_rx,
  output logic        r_cpuf_rx,
  // composite PUF (E): APUF/RO PUF pairs -> RO PUF
  input  logic        start_cpuf_e,
  input  logic        en_cpuf_e,
  input  logic [63:0] c_cpuf_e,
  output logic        busy_cpuf_e,
  output logic        done_cpuf_e,
  output logic        r_cpuf_e,
  // lightweight secure PUF (8 rows, 4 response bits)
  input  logic        en_ls,
  input  logic [63:0] c_ls,
  output logic [3:0]  r_ls,
  // CRC-PUF (4 response bits)
  input  logic        en_crc,
  input  logic [63:0] c_crc,
  output logic [3:0]  r_crc,
  // configurable RO PUF
  input  logic        start_cropuf,
  input  logic [3:0]  c_cropuf,
  output logic        busy_cropuf,
  output logic        done_cropuf,
  output logic        r_cropuf,
  // LFSR-based configurable RO PUF
  input  logic        start_colpuf,
  input  logic [3:0]  cs_colpuf,
  output logic        busy_colpuf,
  output logic        done_colpuf,
  output logic        r_colpuf,
  // bent-function PUF (4 APUFs)
  input  logic        en_bent,
  input  logic [63:0] c_bent,
  output logic        r_bent,
  // Sn-PUF (4 S-PUFs)
  input  logic        en_sn,
  input  logic [63:0] c_sn,
  output logic        r_sn,
  // Multi-PUF (Pico-PUF key + APUF)
  input  logic        en_multi,
  input  logic [63:0] c_multi,
  output logic        r_multi,
  // recurrent 5-4 DAPUF
  input  logic        start_rec,
  input  logic [63:0] c_rec,
  output logic        busy_rec,
  output logic        done_rec,
  output logic [3:0]  r_rec
);
  puf_apuf       u_apuf  (.en(en_apuf),  .c(c_apuf),  .r(r_apuf));
  puf_xor_apuf   u_xor   (.en(en_xor),   .c(c_xor),   .r(r_xor));
  puf_ff_apuf    u_ff    (.en(en_ff),    .c(c_ff),    .r(r_ff));
  puf_ff_xor_puf u_ffx   (.en(en_ffx),   .c(c_ffx),   .r(r_ffx));
  puf_dapuf      u_dapuf (.en(en_dapuf), .c(c_dapuf), .r(r_dapuf));
  puf_mux_puf    u_mux   (.en(en_mux),   .c(c_mux),   .r(r_mux));
  puf_ipuf       u_ipuf  (.en(en_ipuf),  .c(c_ipuf),  .r(r_ipuf));

  puf_ropuf u_ropuf (.clk(clk), .rst_n(rst_n), .start(start_ropuf), .c(c_ropuf),
                     .busy(busy_ropuf), .done(done_ropuf), .r(r_ropuf));

  puf_cpuf_ar u_cpuf_ar (.clk(clk), .rst_n(rst_n), .start(start_cpuf_ar), .en(en_cpuf_ar),
                         .c(c_cpuf_ar), .busy(busy_cpuf_ar), .done(done_cpuf_ar), .r(r_cpuf_ar));
  puf_cpuf_ax u_cpuf_ax (.en(en_cpuf_ax), .c(c_cpuf_ax), .r(r_cpuf_ax));
  puf_cpuf_ra u_cpuf_ra (.clk(clk), .rst_n(rst_n), .start(start_cpuf_ra), .en(en_cpuf_ra),
                         .c(c_cpuf_ra), .busy(busy_cpuf_ra), .done(done_cpuf_ra), .r(r_cpuf_ra));
  puf_cpuf_rx u_cpuf_rx (.clk(clk), .rst_n(rst_n), .start(start_cpuf_rx),
                         .c(c_cpuf_rx), .busy(busy_cpuf_rx), .done(done_cpuf_rx), .r(r_cpuf_rx));
  puf_cpuf_e  u_cpuf_e  (.clk(clk), .rst_n(rst_n), .start(start_cpuf_e), .en(en_cpuf_e),
                         .c(c_cpuf_e), .busy(busy_cpuf_e), .done(done_cpuf_e), .r(r_cpuf_e));

  puf_ls_puf  u_ls  (.en(en_ls),  .c(c_ls),  .r(r_ls));
  puf_crc_puf u_crc (.en(en_crc), .c(c_crc), .r(r_crc));

  puf_cropuf u_cropuf (.clk(clk), .rst_n(rst_n), .start(start_cropuf), .c(c_cropuf),
                       .busy(busy_cropuf), .done(done_cropuf), .r(r_cropuf));
  puf_colpuf u_colpuf (.clk(clk), .rst_n(rst_n), .start(start_colpuf), .cs(cs_colpuf),
                       .busy(busy_colpuf), .done(done_colpuf), .r(r_colpuf));

  puf_bent_puf  u_bent  (.en(en_bent),  .c(c_bent),  .r(r_bent));
  puf_sn_puf    u_sn    (.en(en_sn),    .c(c_sn),    .r(r_sn));
  puf_multi_puf u_multi (.clk(clk), .rst_n(rst_n), .en(en_multi), .c(c_multi), .r(r_multi));

  puf_rec_dapuf u_rec (.clk(clk), .rst_n(rst_n), .start(start_rec), .c(c_rec),
                       .busy(busy_rec), .done(done_rec), .r(r_rec));
endmodule
