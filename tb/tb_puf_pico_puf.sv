// tb_puf_pico_puf: self-checking testbench of puf_pico_puf.
//
// Builds 32 cells with different seeds. Checks that every latch sits at 1 while en is
// low, raises en and checks that each cell holds the reference value once
// PICO_SETTLE cycles have passed: 0 exactly when its first arbiter fires strictly before
// the second. Also checks that each cell has settled at no later than the predicted
// cycle, that the value holds after en falls, and that the cells do not all agree.
// A watchdog ends the run with a failure if it does not finish in time.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// cell count are this testbench's own choices.
module tb_puf_pico_puf;
  import puf_ref_pkg::*;
  localparam int NC = 32;
  localparam int SETTLE = 4 + 16 + 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, en;
  logic [NC-1:0] k, exp_k;

  for (genvar i = 0; i < NC; i++) begin : g_cell
    puf_pico_puf #(.SEED(32'd100 + 32'(i))) u (.clk(clk), .rst_n(rst_n), .en(en), .out(k[i]));
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_a, first_b, settle_at;
    en = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NC; i++) exp_k[i] = pico(32'd100 + 32'(i));
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (k != '1) begin failures++; $display("latch not at 1 before enable: %b", k); end
    en = 1'b1;
    // en is sampled at the next edge; arbiter k rises d_k + 1 edges later and the latch
    // follows one edge after that
    for (int cyc = 1; cyc <= SETTLE; cyc++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < NC; i++) begin
        first_a = pico_d(32'd100 + 32'(i), 0);
        first_b = pico_d(32'd100 + 32'(i), 1);
        settle_at = first_a + 3;
        if (cyc >= settle_at) begin
          checks++;
          if (k[i] !== exp_k[i]) begin
            failures++;
            $display("cell %0d cycle %0d: %b expected %b", i, cyc, k[i], exp_k[i]);
          end
        end else begin
          checks++;
          if (k[i] !== 1'b1) begin failures++; $display("cell %0d left 1 early at cycle %0d", i, cyc); end
        end
      end
    end
    en = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (k !== exp_k) begin failures++; $display("value not held after en fell"); end
    checks++;
    if (exp_k == 0 || exp_k == '1) begin failures++; $display("all cells equal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
