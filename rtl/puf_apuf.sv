// puf_apuf: arbiter PUF.
//
// A delay chain of N switch stages (puf_delay_chain) followed by an arbiter
// (puf_arbiter), as in the structural description of the arbiter PUF. The response is 1
// when the edge on the top line wins the race. Combinational from {en, c} to r in the
// arrival-time model; SEED selects the modelled chip instance.
//
// Structure as published; N switches (one per challenge bit) and the arrival-time race
// model are this design's reading.
module puf_apuf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter logic [31:0] SEED = 32'd1
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic         r
);
  arr_t t_arr, b_arr;
  logic launched;

  puf_delay_chain #(.N(N), .SEED(SEED)) u_chain (
    .en(en), .c(c), .t_arr(t_arr), .b_arr(b_arr), .launched(launched));
  puf_arbiter u_arb (.en(launched), .t_arr(t_arr), .b_arr(b_arr), .out(r));
endmodule
