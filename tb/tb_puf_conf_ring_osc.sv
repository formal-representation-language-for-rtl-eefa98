// tb_puf_conf_ring_osc: self-checking testbench of puf_ring_osc.
//
// Enables the ring, measures the cycles between output toggles and compares them with
// the reference half period for two configurations (NAND delay plus the chosen
// inverter of each of four stages); checks that the output stays low
// while the ring is disabled.
module tb_puf_conf_ring_osc;
  import puf_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n, h;
  logic rst_n, en, osc, prev;
  logic [3:0] s;

  puf_conf_ring_osc #(.M(5), .SEED(32'd33)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 4'b0000;
    h = cro_half(32'd33, 5, vec_t'(s));
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) begin
      @(posedge clk); #1;
      checks++;
      if (osc) failures++;
    end
    en = 1'b1;
    n = 0;
    prev = osc;
    for (int k = 0; k < 8; k++) begin
      n = 0;
      do begin @(posedge clk); #1 n++; end while (osc == prev);
      prev = osc;
      checks++;
      if (n != h) begin failures++; $display("toggle after %0d cycles, expected %0d", n, h); end
    end
    en = 1'b0;
    @(posedge clk); #1;
    s = 4'b0111;
    h = cro_half(32'd33, 5, vec_t'(s));
    en = 1'b1;
    prev = osc;
    for (int k = 0; k < 8; k++) begin
      n = 0;
      do begin @(posedge clk); #1 n++; end while (osc == prev);
      prev = osc;
      checks++;
      if (n != h) begin failures++; $display("toggle after %0d cycles, expected %0d", n, h); end
    end
    en = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (osc) begin failures++; $display("ring not stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
