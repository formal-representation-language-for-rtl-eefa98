// tb_puf_delay_chain: self-checking testbench of puf_delay_chain.
//
// Applies random challenges to a 64-stage chain and compares both arrival times with
// the stage-by-stage reference puf_ref_pkg::chain; also checks the launch flag.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_delay_chain;
  import puf_pkg::*;
  import puf_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, launched;
  logic [63:0] c;
  arr_t t_arr, b_arr;
  int et, eb;
  vec_t cv;

  puf_delay_chain #(.N(64), .SEED(32'd9)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      cv = rand_vec();
      c  = cv[63:0];
      cv = vec_t'(c);
      en = 1'(i);
      @(posedge clk);
      #1;
      chain(32'd9, 64, cv, et, eb);
      checks += 3;
      if (int'(t_arr) != et) begin failures++; $display("top %0d exp %0d", t_arr, et); end
      if (int'(b_arr) != eb) begin failures++; $display("bottom %0d exp %0d", b_arr, eb); end
      if (launched != en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
