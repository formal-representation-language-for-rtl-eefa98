// tb_puf_mux_tree: self-checking testbench of puf_mux_tree.
//
// A 4-level tree (16 inputs): for random data and every select value the output must be
// d[s] with s[0] the least significant select bit.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_mux_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] d;
  logic [3:0]  s;
  logic        y;

  puf_mux_tree #(.K(4)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      d = 16'($urandom());
      for (int k = 0; k < 16; k++) begin
        s = 4'(k);
        #1;
        checks++;
        if (y !== d[k]) begin failures++; $display("d=%h s=%0d y=%b", d, k, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
