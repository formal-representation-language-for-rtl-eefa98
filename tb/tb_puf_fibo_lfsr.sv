// tb_puf_fibo_lfsr: self-checking testbench of puf_fibo_lfsr.
//
// Checks single steps of the 64-bit default LFSR against the reference, and that the
// 4-bit LFSR with polynomial x^4 + x^3 + 1 cycles through all 15 non-zero states.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_fibo_lfsr;
  import puf_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [63:0] c, c_next;
  logic [3:0]  c4, n4;
  logic [15:0] seen;
  vec_t cv, e;

  puf_fibo_lfsr dut (.c(c), .c_next(c_next));
  puf_fibo_lfsr #(.N(4), .G(4'b1001)) dut4 (.c(c4), .c_next(n4));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      cv = rand_vec();
      c = cv[63:0];
      #1;
      e = lfsr(vec_t'(c), 64, 128'h1B);
      checks++;
      if (c_next !== e[63:0]) begin failures++; $display("c=%h next=%h exp=%h", c, c_next, e[63:0]); end
    end
    seen = '0;
    c4 = 4'd1;
    for (int i = 0; i < 15; i++) begin
      #1;
      seen[c4] = 1'b1;
      c4 = n4;
    end
    checks++;
    if (seen != 16'hFFFE) begin failures++; $display("4-bit LFSR visited %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
