// tb_puf_ls_output_net: self-checking testbench of puf_ls_output_net.
//
// Q = 8, M = 4, Z = 3, S = 2: every output bit j must be the XOR of r at indices
// (j+S+1..j+S+Z) mod Q. Exhaustive over all 256 row-response patterns.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_ls_output_net;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] r;
  logic [3:0] y, e;

  puf_ls_output_net #(.Q(8), .M(4), .Z(3), .S(2)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      r = 8'(v);
      #1;
      for (int j = 1; j <= 4; j++) e[j-1] = r[(j + 3) % 8] ^ r[(j + 4) % 8] ^ r[(j + 5) % 8];
      checks++;
      if (y !== e) begin failures++; $display("r=%b y=%b exp=%b", r, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
