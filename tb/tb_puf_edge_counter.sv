// tb_puf_edge_counter: self-checking testbench of puf_edge_counter.
//
// Drives a random waveform, counts its rising edges independently and compares; checks
// that clr zeroes the count, and that an 8-bit counter saturates at 255.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_edge_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ref_cnt;
  logic rst_n, clr, sig, last;
  logic [7:0] count;

  puf_edge_counter #(.CW(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0; sig = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      clr = 1'b1;
      @(posedge clk); #1;
      clr = 1'b0;
      checks++;
      if (count != 0) begin failures++; $display("clear failed"); end
      ref_cnt = 0;
      last = sig;
      for (int i = 0; i < 300 * (round + 1); i++) begin
        sig = 1'($urandom_range(0, 1));
        if (sig && !last) ref_cnt++;
        last = sig;
        @(posedge clk); #1;
      end
      checks++;
      if (int'(count) != (ref_cnt > 255 ? 255 : ref_cnt)) begin
        failures++; $display("count %0d, expected %0d", count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
