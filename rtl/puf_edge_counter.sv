// puf_edge_counter: counts rising edges of a ring-oscillator signal.
//
// The signal is registered once and a rising edge is seen when the registered copy is 0
// and the signal is 1. clr zeroes the count (and wins over counting). The count
// saturates at its maximum instead of wrapping. The counter width is this design's
// choice.
module puf_edge_counter #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          sig,
  output logic [CW-1:0] count
);
  logic sig_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q <= 1'b0;
      count <= '0;
    end else begin
      sig_q <= sig;
      if (clr)                         count <= '0;
      else if (sig && !sig_q && !(&count)) count <= count + 1'b1;
    end
  end
endmodule
