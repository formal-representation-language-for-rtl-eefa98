// puf_dapuf: double arbiter PUF with K delay chains and an M-bit response.
//
// K delay chains receive the same challenge. One arbiter is placed between the top lines
// of every pair of chains (i < j) and one between the bottom lines of every pair, giving
// K(K-1) arbiters, enumerated top pairs first, each in order i = 1..K-1, j = i+1..K.
// Consecutive groups of XOR_CNT = ceil(K(K-1)/M) arbiters are XORed into response bits
// r[0], r[1], ... The default K = 5, M = 4 is the 5-4 DAPUF (five groups of five
// arbiters). Chain i uses seed child_seed(SEED, i). Combinational.
//
// Arbiter placement and grouping are published, and so is the 5-4 configuration; seeds and
// the race model are this design's.
module puf_dapuf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K    = 5,
  parameter int unsigned M    = 4,
  parameter logic [31:0] SEED = 32'd5
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic [M-1:0] r
);
  localparam int unsigned NPAIR   = K * (K - 1) / 2;
  localparam int unsigned NARB    = 2 * NPAIR;
  localparam int unsigned XOR_CNT = (NARB + M - 1) / M;

  arr_t t [K];
  arr_t b [K];
  logic [K-1:0]    launched;
  logic [NARB-1:0] a;  // a[g]: arbiter g, top pairs 0..NPAIR-1, then bottom pairs

  for (genvar i = 0; i < K; i++) begin : g_chain
    puf_delay_chain #(.N(N), .SEED(child_seed(SEED, i))) u_chain (
      .en(en), .c(c), .t_arr(t[i]), .b_arr(b[i]), .launched(launched[i]));
  end

  for (genvar i = 0; i < K - 1; i++) begin : g_i
    for (genvar j = i + 1; j < K; j++) begin : g_j
      // position of pair (i, j) in the enumeration order
      localparam int unsigned G = i * K - i * (i + 1) / 2 + (j - i - 1);
      puf_arbiter u_top (.en(launched[i] & launched[j]), .t_arr(t[i]), .b_arr(t[j]), .out(a[G]));
      puf_arbiter u_bot (.en(launched[i] & launched[j]), .t_arr(b[i]), .b_arr(b[j]), .out(a[NPAIR + G]));
    end
  end

  always_comb begin
    r = '0;
    for (int g = 0; g < NARB; g++) r[g / XOR_CNT] ^= a[g];
  end
endmodule
