// puf_arbiter: behavioural model of the arbiter (a D flip-flop whose data input is the
// top line and whose clock is the bottom line).
//
// When the bottom edge clocks the flip-flop, it captures 1 if the top edge is already
// there, so out = 1 exactly when the top edge arrives strictly first. A tie, which in
// silicon is a metastable race, resolves to 0 here. Without a launch (en = 0) there is no
// clock edge and the output is 0. Combinational in the arrival-time model.
//
// The flip-flop structure is published; comparing arrival times, a tie giving 0 and the
// output 0 without a launch are this design's choices.
module puf_arbiter
  import puf_pkg::*;
(
  input  logic en,     // a race was launched
  input  arr_t t_arr,  // arrival time at the D input
  input  arr_t b_arr,  // arrival time at the clock input
  output logic out
);
  always_comb out = en && (t_arr < b_arr);
endmodule
