// tb_puf_rec_dapuf: self-checking testbench of puf_rec_dapuf.
//
// Each trial pulses start with a random 64-bit challenge and waits for done. It checks
// that done rises exactly 2 clock edges after the edge that sampled start, that busy
// covers the operation, and that r equals the reference: r_int = DAPUF(c), then
// DAPUF(c XOR block-wise r_int), with 16-bit blocks. It counts how often the
// intermediate response was non-zero, so that the feedback path was really exercised.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_rec_dapuf;
  import puf_ref_pkg::*;

  localparam int TRIALS = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fed_back = 0, lat;

  logic rst_n, start, busy, done;
  logic [63:0] c;
  logic [3:0]  r, r_int, exp_r;
  vec_t cv, ci;

  puf_rec_dapuf dut (.clk(clk), .rst_n(rst_n), .start(start), .c(c), .busy(busy), .done(done), .r(r));

  initial begin
    repeat (TRIALS * 10 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; c = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < TRIALS; t++) begin
      cv = rand_vec();
      c  = cv[63:0];
      cv = vec_t'(c);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        #1 lat++;
        if (!done && !busy) begin failures++; $display("busy low before done"); break; end
      end while (!done && lat < 10);
      checks++;
      if (lat != 2) begin failures++; $display("latency %0d, expected 2", lat); end
      r_int = 4'(dapuf(32'd25, 64, 5, 4, cv));
      ci = cv;
      for (int i = 0; i < 64; i++) ci[i] = cv[i] ^ r_int[i / 16];
      exp_r = 4'(dapuf(32'd25, 64, 5, 4, ci));
      if (r_int != 0) fed_back++;
      checks++;
      if (r !== exp_r) begin failures++; $display("mismatch c=%h r=%b exp=%b", c, r, exp_r); end
      @(posedge clk);
      #1;
    end
    checks++;
    if (fed_back == 0) begin failures++; $display("feedback never changed the challenge"); end
    $display("trials with non-zero intermediate response: %0d of %0d", fed_back, TRIALS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
