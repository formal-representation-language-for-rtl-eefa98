// puf_ro_ctrl: measurement sequencer of a ring-oscillator PUF.
//
// On start (while idle) it clears the edge counters for one cycle, enables the ring
// oscillators for exactly WINDOW cycles, stops them, waits one cycle for the last edge to
// be counted and pulses done. busy is high from the cycle after start until done.
// Timing: done rises at the (WINDOW+2)-th clock edge after the edge that sampled
// start. The enable window and this handshake are this design's choice: the structural
// description only says that the oscillators run while en is high and that counters
// are then compared.
module puf_ro_ctrl #(
  parameter int unsigned WINDOW = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic clr,
  output logic ro_en,
  output logic done
);
  typedef enum logic [2:0] {S_IDLE, S_CLR, S_RUN, S_DRAIN, S_DONE} state_t;
  state_t      state;
  logic [31:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      timer <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_CLR;
        S_CLR:   begin state <= S_RUN; timer <= '0; end
        S_RUN:   begin
                   timer <= timer + 32'd1;
                   if (timer == 32'(WINDOW - 1)) state <= S_DRAIN;
                 end
        S_DRAIN: state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign clr   = (state == S_CLR);
  assign ro_en = (state == S_RUN);
  assign done  = (state == S_DONE);
endmodule
