// tb_puf_cpuf_e: self-checking testbench of puf_cpuf_e.
//
// Checks composite PUF (E): three APUF/RO-PUF pairs and one more RO PUF feed a second-layer RO PUF.
// Each trial pulses start with a random challenge, waits for done, checks that done
// came exactly 2*W+5 cycles after start and that busy was high in between, and compares
// r with the reference model of puf_ref_pkg, which predicts the oscillator counts
// exactly. It also checks that the responses are not stuck at one value. A watchdog ends the run with a failure if the trials do not finish.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_cpuf_e;
  import puf_ref_pkg::*;

  localparam int TRIALS = 24;
  localparam int W      = 2048;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, undecided = 0, ones = 0, decided = 0;

  logic rst_n, start, en, busy, done, r;
  logic [64-1:0] c;
  vec_t cv;
  bit   exp_r, sure;
  int   lat;
  function automatic bit ce(vec_t v, output bit s);
    vec_t x = 0;
    bit si;
    s = 1;
    for (int i = 0; i < 3; i++) begin
      x[i] = apuf(kid(32'd16, i), 16, (v >> (20 * i)) & 128'hFFFF)
           ^ ropuf(kid(32'd16, 3 + i), 4, 5, W, (v >> (20 * i + 16)) & 128'hF, si);
      s &= si;
    end
    x[3] = ropuf(kid(32'd16, 6), 4, 5, W, (v >> 60) & 128'hF, si);
    s &= si;
    x = ropuf(kid(32'd16, 7), 4, 5, W, x, si);
    s &= si;
    return x[0];
  endfunction

  puf_cpuf_e dut (.clk(clk), .rst_n(rst_n), .start(start), .en(en), .c(c), .busy(busy), .done(done), .r(r));

  initial begin
    repeat (TRIALS * (2*W+5 + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; en = 1'b1; c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int t = 0; t < TRIALS; t++) begin
      cv = rand_vec();
      c  = cv[64-1:0];
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
      end while (!done && lat < 2*W+5 + 5);
      checks++;
      if (lat != 2*W+5) begin failures++; $display("latency %0d, expected 2*W+5", lat); end
      exp_r = ce(cv, sure);
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
