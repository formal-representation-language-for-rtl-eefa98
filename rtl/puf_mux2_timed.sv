// puf_mux2_timed: behavioural model of one 2:1 multiplexer of an arbiter delay chain.
//
// The inputs and the output carry the arrival time of the rising launch edge rather than
// a logic level (see puf_pkg). The selected input's edge appears at the output after that
// input's own propagation delay D0 or D1, which stand for the process variation of the
// silicon mux. Purely combinational; the two delays are per-instance parameters.
module puf_mux2_timed
  import puf_pkg::*;
#(
  parameter int unsigned D0 = SW_NOM,  // delay from in0 to out
  parameter int unsigned D1 = SW_NOM   // delay from in1 to out
) (
  input  arr_t in0,
  input  arr_t in1,
  input  logic sel,
  output arr_t out
);
  always_comb out = sel ? arr_t'(in1 + arr_t'(D1)) : arr_t'(in0 + arr_t'(D0));
endmodule
