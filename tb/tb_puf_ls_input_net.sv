// tb_puf_ls_input_net: self-checking testbench of puf_ls_input_net.
//
// For two rows of 64 bits, checks every output bit against its definition: the middle
// bit d_33 = x_1, d_1 = x_64, d_((j+1)/2) = x_j ^ x_(j+1) for odd j >= 3 and
// d_((n+j+2)/2) = x_j ^ x_(j+1) for even j (1-based). Also checks that flipping one
// input bit changes at most two output bits.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_ls_input_net;
  import puf_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0][63:0] x, d, d0;
  logic [63:0] e;

  puf_ls_input_net #(.Q(2), .N(64)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      x[0] = {$urandom(), $urandom()};
      x[1] = {$urandom(), $urandom()};
      #1;
      for (int q = 0; q < 2; q++) begin
        e = '0;
        e[32] = x[q][0];
        e[0]  = x[q][63];
        for (int j = 3; j < 64; j += 2) e[(j + 1) / 2 - 1] = x[q][j-1] ^ x[q][j];
        for (int j = 2; j < 64; j += 2) e[(64 + j + 2) / 2 - 1] = x[q][j-1] ^ x[q][j];
        checks++;
        if (d[q] !== e) begin failures++; $display("row %0d d=%h exp=%h", q, d[q], e); end
      end
      d0 = d;
      x[0][i % 64] = ~x[0][i % 64];
      #1;
      checks++;
      if ($countones(d[0] ^ d0[0]) > 2 || d[0] == d0[0]) begin failures++; $display("flip spread wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
