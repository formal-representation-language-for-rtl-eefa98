// puf_ring_osc: behavioural model of a ring oscillator (one NAND enable gate and M-1
// inverters, M odd in silicon).
//
// The ring is modelled in the clock domain of the measuring logic: one clock cycle is
// one delay unit. The half period is the sum of the M gate delays, each drawn from SEED
// by puf_pkg::ro_delay (4..7 cycles), which stands for the process variation between
// otherwise identical rings. While en is 1 the output toggles every HALF cycles, starting
// low; while en is 0 the ring is stopped with its output low, as the NAND forces.
//
// The NAND-plus-inverters ring is published; the clock-domain timing model and its delays
// are this design's choices.
module puf_ring_osc
  import puf_pkg::*;
#(
  parameter int unsigned M    = 5,
  parameter logic [31:0] SEED = 32'd8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic osc
);
  function automatic int unsigned half_period();
    int unsigned h = 0;
    for (int unsigned i = 0; i < M; i++) h += ro_delay(SEED, i, 0);
    return h;
  endfunction
  localparam int unsigned HALF = half_period();

  logic [15:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      osc   <= 1'b0;
    end else if (!en) begin
      phase <= '0;
      osc   <= 1'b0;
    end else if (phase == 16'(HALF - 1)) begin
      phase <= '0;
      osc   <= ~osc;
    end else begin
      phase <= phase + 16'd1;
    end
  end
endmodule
