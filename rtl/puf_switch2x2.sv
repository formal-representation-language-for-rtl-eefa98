// puf_switch2x2: behavioural model of one 2x2 switch stage of an arbiter PUF.
//
// As in the structural description, the stage is two 2:1 multiplexers sharing the
// challenge bit: the top output selects the top input when c = 0 and the bottom input
// when c = 1; the bottom output does the opposite, so c = 1 crosses the two paths.
// Ports carry edge arrival times (puf_pkg::arr_t). The four mux-input delays are drawn
// from SEED and STAGE by puf_pkg::sw_delay, which models process variation; that choice
// is this model's own. Combinational, no clock.
module puf_switch2x2
  import puf_pkg::*;
#(
  parameter logic [31:0] SEED  = 32'd1,  // identifies the physical chain
  parameter int unsigned STAGE = 1       // 1-based stage number within the chain
) (
  input  arr_t t_in,
  input  arr_t b_in,
  input  logic c_in,
  output arr_t t_out,
  output arr_t b_out
);
  puf_mux2_timed #(.D0(sw_delay(SEED, STAGE, 0)), .D1(sw_delay(SEED, STAGE, 1)))
    u_top (.in0(t_in), .in1(b_in), .sel(c_in), .out(t_out));
  puf_mux2_timed #(.D0(sw_delay(SEED, STAGE, 2)), .D1(sw_delay(SEED, STAGE, 3)))
    u_bot (.in0(b_in), .in1(t_in), .sel(c_in), .out(b_out));
endmodule
