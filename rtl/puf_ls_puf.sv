// puf_ls_puf: lightweight secure PUF.
//
// The challenge goes through the interconnect network, the
// input network (XOR of neighbouring bits per row) and then drives Q parallel N-stage
// arbiter PUFs (row q uses seed child_seed(SEED, q)). The output network XORs Z row
// responses into each of the M response bits. Combinational.
// Interconnect network: row 1 receives c unchanged and row i+1 receives row i rotated
// by i-1 positions (bit j moves to (j + i-1) mod N), so row r is c rotated by
// (r-1)(r-2)/2 positions in total. It is pure wiring and is written here as such.
//
// Structure as published; Q = 8, M = 4, Z = 3, S = 0 are this design's choices.
module puf_ls_puf
  import puf_pkg::*;
#(
  parameter int unsigned Q    = 8,
  parameter int unsigned N    = 64,
  parameter int unsigned M    = 4,
  parameter int unsigned Z    = 3,
  parameter int unsigned S    = 0,
  parameter logic [31:0] SEED = 32'd17
) (
  input  logic         en,
  input  logic [N-1:0] c,
  output logic [M-1:0] r
);
  logic [Q-1:0][N-1:0] x, d;
  logic [Q-1:0]        rows;

  assign x[0] = c;
  for (genvar i = 1; i < Q; i++) begin : g_icn
    localparam int unsigned K = (i - 1) % N;
    if (K == 0) begin : g_same
      assign x[i] = x[i-1];
    end else begin : g_rot
      assign x[i] = {x[i-1][N-K-1:0], x[i-1][N-1:N-K]};
    end
  end
  puf_ls_input_net #(.Q(Q), .N(N)) u_in  (.x(x), .d(d));
  for (genvar q = 0; q < Q; q++) begin : g_row
    puf_apuf #(.N(N), .SEED(child_seed(SEED, q))) u_apuf (.en(en), .c(d[q]), .r(rows[q]));
  end
  puf_ls_output_net #(.Q(Q), .M(M), .Z(Z), .S(S)) u_out (.r(rows), .y(r));
endmodule
