// puf_pico_puf: behavioural model of a Pico-PUF cell (two arbiters and a NAND latch).
//
// Both arbiters have their data input tied high and are clocked by the same enable, so
// each output rises one clock-to-output delay after the first enable. The outputs a1 and
// a2 drive a NAND latch whose state follows b = !a1 | (a2 & b). While both are low the
// latch sits at 1; if a1 rises strictly first it falls to 0 and stays there, otherwise
// it stays at 1. The cell is a one-bit weak PUF whose value is fixed by the mismatch of
// the two arbiters.
// Model: the counter clock is the time base. After reset a1 = a2 = 0 and b = 1. The
// first cycle in which en is sampled high starts a cycle counter; arbiter k rises when
// the counter reaches pico_delay(SEED, k) (4..19 cycles, seed dependent), and the latch
// state is updated every cycle from the equation above. out is settled PICO_SETTLE
// cycles after en is first sampled high and then holds until reset (the arbiters stay
// set, as a flip-flop with D tied high does).
// Interface: clk, rst_n (asynchronous, active low), en, out.
//
// The two arbiters and the latch equation are published; the clock-domain timing, the
// delay range and the reset state are this design's model.
module puf_pico_puf
  import puf_pkg::*;
#(
  parameter logic [31:0] SEED = 32'd23
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic out
);
  localparam int unsigned D_A1 = pico_delay(SEED, 0);
  localparam int unsigned D_A2 = pico_delay(SEED, 1);
  localparam int unsigned CNTW = $clog2(PICO_SETTLE + 1);

  logic            started;
  logic [CNTW-1:0] cnt;
  logic            a1, a2, b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      cnt     <= '0;
      a1      <= 1'b0;
      a2      <= 1'b0;
      b       <= 1'b1;
    end else begin
      started <= started | en;
      if (started && cnt != CNTW'(PICO_SETTLE)) cnt <= cnt + 1'b1;
      if (started && cnt == CNTW'(D_A1)) a1 <= 1'b1;
      if (started && cnt == CNTW'(D_A2)) a2 <= 1'b1;
      b <= ~a1 | (a2 & b);
    end
  end

  assign out = b;
endmodule
