// tb_puf_switch2x2: self-checking testbench of puf_switch2x2.
//
// Drives random arrival times on both inputs with either challenge value and checks
// that c = 0 passes the edges straight through and c = 1 crosses them, each with the
// delay of the mux input it uses (reference: puf_ref_pkg::sw_d for seed 7, stage 3).
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_switch2x2;
  import puf_pkg::*;
  import puf_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  arr_t t_in, b_in, t_out, b_out;
  logic c_in;
  int et, eb;

  puf_switch2x2 #(.SEED(32'd7), .STAGE(3)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      t_in = arr_t'($urandom_range(0, 9000));
      b_in = arr_t'($urandom_range(0, 9000));
      c_in = 1'(i);
      @(posedge clk);
      #1;
      if (c_in) begin et = int'(b_in) + sw_d(7, 3, 1); eb = int'(t_in) + sw_d(7, 3, 3); end
      else      begin et = int'(t_in) + sw_d(7, 3, 0); eb = int'(b_in) + sw_d(7, 3, 2); end
      checks += 2;
      if (int'(t_out) != et) begin failures++; $display("top %0d exp %0d", t_out, et); end
      if (int'(b_out) != eb) begin failures++; $display("bottom %0d exp %0d", b_out, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
