// puf_cpuf_ra: composite PUF, configuration (C): ring-oscillator PUFs feeding an arbiter PUF.
//
// The N-bit challenge is cut into N/NR consecutive NR-bit slices, each answered by its
// own RO PUF (seed child_seed(SEED, i)); all of them measure at the same time. Their N/NR
// responses form the challenge of an (N/NR)-stage arbiter PUF (seed
// child_seed(SEED, N/NR)) launched by en. Interface as puf_ropuf: pulse start with c
// stable; done pulses WINDOW+2 clock edges later and r is valid from then until the next start.
module puf_cpuf_ra
  import puf_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned NR     = 4,
  parameter int unsigned M      = 5,
  parameter int unsigned WINDOW = 2048,
  parameter logic [31:0] SEED   = 32'd14
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
  localparam int unsigned N_RO = N / NR;
  logic [N_RO-1:0] y, ro_busy, ro_done;
  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    puf_ropuf #(.N(NR), .M(M), .WINDOW(WINDOW), .SEED(child_seed(SEED, i))) u_ropuf (
      .clk(clk), .rst_n(rst_n), .start(start), .c(c[i*NR +: NR]),
      .busy(ro_busy[i]), .done(ro_done[i]), .r(y[i]));
  end
  // all RO PUFs run the same sequence in lock step, so their done pulses coincide
  assign busy = |ro_busy;
  assign done = &ro_done;
  puf_apuf #(.N(N_RO), .SEED(child_seed(SEED, N_RO))) u_apuf (.en(en), .c(y), .r(r));
endmodule
