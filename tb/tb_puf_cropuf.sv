// tb_puf_cropuf: self-checking testbench of puf_cropuf.
//
// Checks the configurable RO PUF: the challenge selects the rings and configures them.
// Each trial pulses start with a random challenge, waits for done, checks that done
// came exactly W+2 cycles after start and that busy was high in between, and compares
// r with the reference model of puf_ref_pkg, which predicts the oscillator counts
// exactly. It also checks that the responses are not stuck at one value. A watchdog ends the run with a failure if the trials do not finish.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_cropuf;
  import puf_ref_pkg::*;

  localparam int TRIALS = 40;
  localparam int W      = 2048;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, undecided = 0, ones = 0, decided = 0;

  logic rst_n, start, busy, done, r;
  logic [4-1:0] c;
  vec_t cv;
  bit   exp_r, sure;
  int   lat;

  puf_cropuf dut (.clk(clk), .rst_n(rst_n), .start(start), .c(c), .busy(busy), .done(done), .r(r));

  initial begin
    repeat (TRIALS * (W+2 + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int t = 0; t < TRIALS; t++) begin
      cv = rand_vec();
      c  = cv[4-1:0];
      cv = vec_t'(c);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        #1;
        lat++;
        if (!done && !busy) begin failures++; $display("busy low before done"); break; end
      end while (!done && lat < W+2 + 5);
      checks++;
      if (lat != W+2) begin failures++; $display("latency %0d, expected W+2", lat); end
      exp_r = ropuf(32'd11, 4, 5, W, cv, sure, 1'b1);
      if (sure) begin
        checks++;
        decided++;
        ones += int'(r);
        if (r !== exp_r) begin failures++; $display("mismatch c=%h r=%b exp=%b", c, r, exp_r); end
      end else undecided++;
      @(posedge clk);
      #1;
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    checks++;
    if (decided < TRIALS / 2 || ones == 0 || ones == decided) begin
      failures++;
      $display("too few decided trials or stuck response: %0d decided, %0d ones", decided, ones);
    end
    $display("undecided trials: %0d of %0d", undecided, TRIALS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
