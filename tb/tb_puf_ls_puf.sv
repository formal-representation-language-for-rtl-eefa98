// tb_puf_ls_puf: self-checking testbench of puf_ls_puf.
//
// Checks the 8-row lightweight secure PUF with a 4-bit output.
// Each trial applies a random challenge with en = 1, waits one clock and compares the
// response with the reference model in puf_ref_pkg. It also checks that en = 0 gives 0
// and that the responses over all trials are not stuck at one value. A watchdog ends the
// run with a failure if the trials do not finish in time.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_ls_puf;
  import puf_ref_pkg::*;

  localparam int TRIALS = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ones = 0;

  logic en;
  logic [64-1:0] c;
  logic [4-1:0] r;
  logic [4-1:0] exp_r;
  vec_t cv;

  function automatic logic [3:0] lsp(vec_t v);
    vec_t x[8];
    vec_t d;
    bit row[8];
    logic [3:0] y = 0;
    x[0] = v;
    for (int i = 1; i < 8; i++) x[i] = rot(x[i-1], 64, i - 1);
    for (int q = 0; q < 8; q++) begin
      d = 0;
      d[32] = x[q][0];
      d[0]  = x[q][63];
      for (int j = 3; j <= 63; j += 2) d[(j+1)/2 - 1] = x[q][j-1] ^ x[q][j];
      for (int j = 2; j <= 62; j += 2) d[(64+j+2)/2 - 1] = x[q][j-1] ^ x[q][j];
      row[q] = apuf(kid(32'd17, q), 64, d);
    end
    for (int j = 1; j <= 4; j++) for (int i = 1; i <= 3; i++) y[j-1] ^= row[(j + i) % 8];
    return y;
  endfunction

  puf_ls_puf dut (.en(en), .c(c), .r(r));

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
      exp_r = lsp(cv);
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
