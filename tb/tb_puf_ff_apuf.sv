// tb_puf_ff_apuf: self-checking testbench of puf_ff_apuf.
//
// Checks a feed-forward APUF with two nested loops (8->40, 16->24) and one arbiter feeding
// two stages (8->56), and a second instance with cascaded loops (10->20, 20->30, 30->45).
// Each trial applies a random challenge with en = 1, waits one clock and compares the
// response with the reference model in puf_ref_pkg. It also checks that en = 0 gives 0
// and that the responses over all trials are not stuck at one value. A watchdog ends the
// run with a failure if the trials do not finish in time.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_ff_apuf;
  import puf_ref_pkg::*;

  localparam int TRIALS = 300;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ones = 0;

  logic en;
  logic [64-1:0] c;
  logic [1-1:0] r, r2;
  logic [1-1:0] exp_r;
  vec_t cv;

  puf_ff_apuf #(.M(3), .FF_IN('{8, 16, 8, 0, 0, 0, 0, 0}), .FF_OUT('{40, 24, 56, 0, 0, 0, 0, 0})) dut (.en(en), .c(c), .r(r));
  // cascaded loops: each loop taps right after the stage the previous loop drives
  puf_ff_apuf #(.M(3), .FF_IN('{10, 20, 30, 0, 0, 0, 0, 0}), .FF_OUT('{20, 30, 45, 0, 0, 0, 0, 0}), .SEED(32'd9)) dut2 (.en(en), .c(c), .r(r2));

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
      exp_r = ff_apuf(32'd3, 64, cv, '{8, 16, 8}, '{40, 24, 56});
      checks++;
      if (r !== exp_r) begin
        failures++;
        if (failures < 10) $display("mismatch c=%h r=%b exp=%b", c, r, exp_r);
      end
      ones += int'(r[0]);
      checks++;
      if (r2 !== ff_apuf(32'd9, 64, cv, '{10, 20, 30}, '{20, 30, 45})) begin
        failures++;
        if (failures < 10) $display("cascade mismatch c=%h r2=%b", c, r2);
      end
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
