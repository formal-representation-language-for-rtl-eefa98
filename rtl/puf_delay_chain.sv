// puf_delay_chain: behavioural model of the delay chain of an arbiter PUF.
//
// N switch stages (puf_switch2x2) in series; stage i is steered by challenge bit c[i-1]
// (c[0] is the first stage). Both lines are launched by the same enable edge at time 0,
// and the chain returns the arrival times of that edge on the top and bottom lines.
// `launched` repeats en so that the arbiter after the chain knows a race has taken place.
// Combinational. Stage i's delays come from puf_pkg::sw_delay(SEED, i, *).
//
// The chain of switches is published; launching both lines at time 0 and carrying arrival
// times are this design's model.
module puf_delay_chain
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,     // number of stages (challenge bits)
  parameter logic [31:0] SEED = 32'd1
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output arr_t         t_arr,
  output arr_t         b_arr,
  output logic         launched
);
  arr_t t [N+1];
  arr_t b [N+1];

  assign t[0] = '0;
  assign b[0] = '0;

  for (genvar i = 1; i <= N; i++) begin : g_stage
    puf_switch2x2 #(.SEED(SEED), .STAGE(i)) u_sw (
      .t_in(t[i-1]), .b_in(b[i-1]), .c_in(c[i-1]), .t_out(t[i]), .b_out(b[i]));
  end

  assign t_arr    = t[N];
  assign b_arr    = b[N];
  assign launched = en;
endmodule
