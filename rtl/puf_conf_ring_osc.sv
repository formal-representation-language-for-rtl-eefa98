// puf_conf_ring_osc: behavioural model of a configurable ring oscillator.
//
// One NAND enable stage followed by M-1 configurable stages; stage i holds two
// inverters driven by the same node, and configuration bit s[i-1] picks which of them
// drives the next stage. The half period is the NAND delay plus the delay of the chosen
// inverter of every stage (puf_pkg::ro_delay, 4..7 clock cycles each), so each
// configuration gives a different frequency. Modelled in the clock domain of the
// measuring logic as in puf_ring_osc: the output toggles every half period while en is 1
// and is held low while en is 0. The configuration must be stable while en is 1.
module puf_conf_ring_osc
  import puf_pkg::*;
#(
  parameter int unsigned M    = 5,
  parameter logic [31:0] SEED = 32'd9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-2:0] s,
  output logic         osc
);
  localparam int unsigned D_NAND = ro_delay(SEED, 0, 0);

  logic [15:0] stage_d [M-1];
  logic [15:0] half;
  logic [15:0] phase;

  for (genvar i = 1; i < M; i++) begin : g_stage
    localparam int unsigned D0 = ro_delay(SEED, i, 0);
    localparam int unsigned D1 = ro_delay(SEED, i, 1);
    assign stage_d[i-1] = s[i-1] ? 16'(D1) : 16'(D0);
  end

  always_comb begin
    half = 16'(D_NAND);
    for (int i = 0; i < M - 1; i++) half += stage_d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      osc   <= 1'b0;
    end else if (!en) begin
      phase <= '0;
      osc   <= 1'b0;
    end else if (phase >= half - 16'd1) begin
      phase <= '0;
      osc   <= ~osc;
    end else begin
      phase <= phase + 16'd1;
    end
  end
endmodule
