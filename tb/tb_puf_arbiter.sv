// tb_puf_arbiter: self-checking testbench of puf_arbiter.
//
// Checks top-first, bottom-first, tie and no-launch cases, then random arrival times.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_arbiter;
  import puf_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, out, e;
  arr_t t_arr, b_arr;

  puf_arbiter dut (.*);

  task automatic check(logic en_v, int t, int b);
    en = en_v; t_arr = arr_t'(t); b_arr = arr_t'(b);
    #1;
    e = en_v && (t < b);
    checks++;
    if (out !== e) begin failures++; $display("en=%b t=%0d b=%0d out=%b", en_v, t, b, out); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1, 10, 20);
    check(1, 20, 10);
    check(1, 15, 15);
    check(0, 10, 20);
    for (int i = 0; i < 200; i++) check(1, $urandom_range(0, 1000), $urandom_range(0, 1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
