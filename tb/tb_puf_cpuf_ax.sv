// tb_puf_cpuf_ax: self-checking testbench of puf_cpuf_ax.
//
// Checks composite PUF (B): four 16-stage APUFs XORed.
// Each trial applies a random challenge with en = 1, waits one clock and compares the
// response with the reference model in puf_ref_pkg. It also checks that en = 0 gives 0
// and that the responses over all trials are not stuck at one value. A watchdog ends the
// run with a failure if the trials do not finish in time.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_cpuf_ax;
  import puf_ref_pkg::*;

  localparam int TRIALS = 300;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ones = 0;

  logic en;
  logic [64-1:0] c;
  logic [1-1:0] r;
  logic [1-1:0] exp_r;
  vec_t cv;

  function automatic logic cax(vec_t v);
    logic x = 0;
    for (int i = 0; i < 4; i++) x ^= apuf(kid(32'd12, i), 16, (v >> (16 * i)) & 128'hFFFF);
    return x;
  endfunction

  puf_cpuf_ax dut (.en(en), .c(c), .r(r));

  initial begin
    repeat (TRIALS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    c  = '0;
    @(posedge clk);
    for (int t = 0; t < TRIALS; t++) begin
      cv = rand_vec();
      c  = cv[64-1:0];
      cv = vec_t'(c);
      en = 1'b1;
      @(posedge clk);
      #1;
      exp_r = cax(cv);
      checks++;
      if (r !== exp_r) begin
        failures++;
        if (failures < 10) $display("mismatch c=%h r=%b exp=%b", c, r, exp_r);
      end
      ones += int'(r[0]);
    end
    en = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (r !== '0) begin failures++; $display("response without launch"); end
    checks++;
    if (ones == 0 || ones == TRIALS) begin failures++; $display("response stuck: %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
