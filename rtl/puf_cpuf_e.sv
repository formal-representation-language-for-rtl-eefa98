// puf_cpuf_e: composite PUF, configuration (E): two-layer mix of APUFs and RO PUFs.
//
// The N-bit challenge is cut, from bit 0 upward, into A groups of an NA-bit slice
// followed by an MR-bit slice, and a final MR-bit slice (N = A*(NA+MR) + MR, so
// NA = (N-MR)/A - MR). In the first layer group i drives an NA-stage arbiter PUF a_i
// and an RO PUF r_i with an MR-bit challenge; the last slice drives one more RO PUF.
// The second-layer challenge x has A+1 bits: x_i = a_i XOR r_i for i = 1..A and
// x_(A+1) = the extra RO PUF's response. A second-layer RO PUF with an MR-bit challenge
// answers x, which therefore needs A+1 = MR.
// Sequence: start launches all first-layer RO PUFs; their done starts the second-layer
// RO PUF on x; its done is this block's done, 2*WINDOW+5 clock edges after start; r is
// valid from done until the next start. Child seeds: APUF i child_seed(SEED, i),
// RO PUF i child_seed(SEED, A+i), second layer
// child_seed(SEED, 2A+1). (The extra RO PUF uses child_seed(SEED, 2A).)
//
// The two-layer structure and the slice formula are published; A = 3, MR = 4 and the
// start/done sequencing are this design's choices.
module puf_cpuf_e
  import puf_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned A      = 3,
  parameter int unsigned MR     = 4,
  parameter int unsigned INV    = 5,
  parameter int unsigned WINDOW = 2048,
  parameter logic [31:0] SEED   = 32'd16
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
  localparam int unsigned NA = (N - MR) / A - MR;

  if (A * (NA + MR) + MR != N || A + 1 != MR) begin : g_bad
    $error("puf_cpuf_e: needs N = A*(NA+MR)+MR and A+1 = MR");
  end

  logic [A-1:0] a_resp;
  logic [A:0]   r_resp, l1_busy, l1_done;
  logic [A:0]   x;
  logic         l2_busy;

  for (genvar i = 0; i < A; i++) begin : g_grp
    localparam int unsigned LOC_A = i * (NA + MR);
    localparam int unsigned LOC_R = LOC_A + NA;
    puf_apuf #(.N(NA), .SEED(child_seed(SEED, i))) u_apuf (
      .en(en), .c(c[LOC_A +: NA]), .r(a_resp[i]));
    puf_ropuf #(.N(MR), .M(INV), .WINDOW(WINDOW), .SEED(child_seed(SEED, A + i))) u_ropuf (
      .clk(clk), .rst_n(rst_n), .start(start), .c(c[LOC_R +: MR]),
      .busy(l1_busy[i]), .done(l1_done[i]), .r(r_resp[i]));
    assign x[i] = a_resp[i] ^ r_resp[i];
  end

  puf_ropuf #(.N(MR), .M(INV), .WINDOW(WINDOW), .SEED(child_seed(SEED, 2 * A))) u_ropuf_last (
    .clk(clk), .rst_n(rst_n), .start(start), .c(c[N-MR +: MR]),
    .busy(l1_busy[A]), .done(l1_done[A]), .r(r_resp[A]));
  assign x[A] = r_resp[A];

  puf_ropuf #(.N(MR), .M(INV), .WINDOW(WINDOW), .SEED(child_seed(SEED, 2 * A + 1))) u_ropuf_l2 (
    .clk(clk), .rst_n(rst_n), .start(&l1_done), .c(x[MR-1:0]),
    .busy(l2_busy), .done(done), .r(r));

  assign busy = (|l1_busy) | l2_busy;
endmodule
