// tb_puf_bent_func: self-checking testbench of puf_bent_func.
//
// Exhaustive over 6 inputs against y1y2 ^ y3y4 ^ y5y6, and checks that the function
// is balanced the way a bent function is: 2^5 - 2^2 = 28 ones out of 64.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_bent_func;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ones = 0;
  logic [5:0] y;
  logic bf, e;

  puf_bent_func #(.K(6)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      y = 6'(v);
      #1;
      e = (y[0] & y[1]) ^ (y[2] & y[3]) ^ (y[4] & y[5]);
      ones += int'(bf);
      checks++;
      if (bf !== e) begin failures++; $display("y=%b bf=%b", y, bf); end
    end
    checks++;
    if (ones != 28) begin failures++; $display("weight %0d, expected 28", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
