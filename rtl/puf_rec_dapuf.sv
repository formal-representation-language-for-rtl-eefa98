// puf_rec_dapuf: recurrent DAPUF, one DAPUF used twice with response feedback.
//
// A K-chain, M-bit DAPUF (puf_dapuf) first answers the challenge c, giving the hidden
// intermediate response r_int. The challenge is then split into M blocks of N/M
// consecutive bits and block i is inverted when r_int[i] is 1 (c_int = c XOR r_int[i]
// over bits [i*N/M +: N/M]). The same DAPUF answers c_int and that is the response r.
// Sequencing: start (while idle) captures c and launches the first race in the next
// cycle; r_int is captured at the end of that cycle, the second race runs in the cycle
// after, and r and a done pulse appear 2 cycles after the start edge. busy is high
// between start and done. Only one DAPUF is built, as the two evaluations must see the
// same delays; the two-cycle sequence is this design's choice.
module puf_rec_dapuf
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter int unsigned K    = 5,
  parameter int unsigned M    = 4,
  parameter logic [31:0] SEED = 32'd25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] c,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] r
);
  localparam int unsigned BLK = N / M;

  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_SECOND} state_t;
  state_t       state;
  logic [N-1:0] c_q, c_int, c_dapuf;
  logic [M-1:0] r_int, r_dapuf;
  logic         launch;

  always_comb begin
    for (int i = 0; i < N; i++) c_int[i] = c_q[i] ^ r_int[i / BLK];
  end

  assign c_dapuf = (state == S_SECOND) ? c_int : c_q;
  assign launch  = (state == S_FIRST) || (state == S_SECOND);

  puf_dapuf #(.N(N), .K(K), .M(M), .SEED(SEED)) u_dapuf (.en(launch), .c(c_dapuf), .r(r_dapuf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c_q   <= '0;
      r_int <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) begin c_q <= c; state <= S_FIRST; end
        S_FIRST:  begin r_int <= r_dapuf; state <= S_SECOND; end
        S_SECOND: begin r <= r_dapuf; done <= 1'b1; state <= S_IDLE; end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
