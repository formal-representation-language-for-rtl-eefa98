// puf_mux_tree: binary tree of 2:1 multiplexers.
//
// Level 1 pairs the 2^K inputs, y[2j-2] and y[2j-1], under select bit s[0]; level i
// uses s[i-1]; the single output of level K is the tree's output. The selected input is
// therefore d[s] with s[0] as the least significant bit. Used by the MUX PUF (selects
// are APUF responses) and by the ring-oscillator PUFs (selects are challenge bits).
// Combinational.
//
// The tree is published; the select bit order (s[0] at the leaves) follows the published
// pairing.
module puf_mux_tree #(
  parameter int unsigned K = 2  // number of levels / select bits
) (
  input  logic [(1<<K)-1:0] d,
  input  logic [K-1:0]      s,
  output logic              y
);
  // level l holds 2^(K-l) signals at offset 2^(K+1) - 2^(K-l+1)
  logic [(1<<(K+1))-2:0] node;
  assign node[(1<<K)-1:0] = d;
  for (genvar l = 1; l <= K; l++) begin : g_lvl
    localparam int unsigned IN_OFF  = (1 << (K + 1)) - (1 << (K - l + 2));
    localparam int unsigned OUT_OFF = (1 << (K + 1)) - (1 << (K - l + 1));
    for (genvar j = 0; j < (1 << (K - l)); j++) begin : g_mux
      assign node[OUT_OFF + j] = s[l-1] ? node[IN_OFF + 2*j + 1] : node[IN_OFF + 2*j];
    end
  end
  assign y = node[(1<<(K+1))-2];
endmodule
