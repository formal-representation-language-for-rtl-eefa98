// puf_ff_apuf: feed-forward arbiter PUF with M feed-forward loops.
//
// An N-stage arbiter delay chain in which loop k taps the race after stage FF_IN[k]
// with an intermediate arbiter and uses that arbiter's decision as the challenge bit of
// stage FF_OUT[k] instead of the external bit c[FF_OUT[k]-1]. With M = 1 this is the
// single-input single-output form; M > 1 with distinct FF_IN gives the multiple-input
// multiple-output forms (nested, overlapping, cascaded or separate loops), and repeated
// FF_IN values give one arbiter driving several stages. Stage numbers are 1-based, as in
// the structural description, and every loop must satisfy FF_IN[k] < FF_OUT[k] <= N.
// The parameter arrays have room for 8 loops; entries from index M on are ignored.
// The feed-forward bit is assumed to settle before the race reaches stage FF_OUT[k]
// (the arrival-time model ignores the intermediate arbiter's own delay). Combinational.
module puf_ff_apuf
  import puf_pkg::*;
#(
  parameter int unsigned N             = 64,
  parameter int unsigned M             = 1,
  // loop k (k < M) taps after stage FF_IN[k] and drives stage FF_OUT[k]; up to 8 loops
  parameter int unsigned FF_IN  [8]    = '{32, 0, 0, 0, 0, 0, 0, 0},
  parameter int unsigned FF_OUT [8]    = '{48, 0, 0, 0, 0, 0, 0, 0},
  parameter logic [31:0] SEED          = 32'd3
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  arr_t t [N+1];
  arr_t b [N+1];
  logic [N-1:0] cs;      // challenge bits actually applied to the stages
  logic [M-1:0] arb_int; // intermediate arbiter decisions

  assign t[0] = '0;
  assign b[0] = '0;

  for (genvar i = 1; i <= N; i++) begin : g_stage
    puf_switch2x2 #(.SEED(SEED), .STAGE(i)) u_sw (
      .t_in(t[i-1]), .b_in(b[i-1]), .c_in(cs[i-1]), .t_out(t[i]), .b_out(b[i]));
  end

  if (M < 1 || M > 8) begin : g_bad_m
    $error("puf_ff_apuf: M must be 1..8");
  end

  for (genvar k = 0; k < M; k++) begin : g_loop
    if (FF_IN[k] < 1 || FF_IN[k] >= FF_OUT[k] || FF_OUT[k] > N) begin : g_bad
      $error("puf_ff_apuf: loop %0d needs 1 <= FF_IN < FF_OUT <= N", k);
    end
    puf_arbiter u_arb (.en(en), .t_arr(t[FF_IN[k]]), .b_arr(b[FF_IN[k]]), .out(arb_int[k]));
  end

  always_comb begin
    cs = c;
    for (int k = 0; k < M; k++) cs[FF_OUT[k]-1] = arb_int[k];
  end

  puf_arbiter u_arb_out (.en(en), .t_arr(t[N]), .b_arr(b[N]), .out(r));
endmodule
