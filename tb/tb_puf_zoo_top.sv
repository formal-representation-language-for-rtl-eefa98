// tb_puf_zoo_top: end-to-end testbench of puf_zoo_top at its default sizes.
//
// Drives every construction through complete operations with random challenges and
// compares each response with the reference models of puf_ref_pkg: 40 challenges for
// each combinational (arbiter-based) design, and for the clocked designs 6 to 16
// start/done operations each, all running concurrently. Latencies of the clocked designs
// are checked too (WINDOW+2 clock edges for one RO PUF layer, twice that plus one for
// composite (E), 2 for the recurrent DAPUF).
// It also counts how often each mechanism of the constructions took effect and counts a
// failure for any that never did: both arbiter outcomes, a feed-forward bit overriding
// the external challenge bit, the interposed bit taking both values, more than one MUX
// PUF data path selected, a non-zero recurrent-DAPUF intermediate response (feedback),
// both RO PUF outcomes, the second layer of composite (E), and the LFSR of the ColPUF.
//
// The expected values come from the independent models in puf_ref_pkg; the stimulus and
// trial counts are this testbench's own choices.
module tb_puf_zoo_top;
  import puf_ref_pkg::*;

  localparam int W = 2048;
  localparam int NCOMB = 40;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // mechanism counters
  int m_top_wins = 0, m_bot_wins = 0, m_ff_override = 0, m_ipuf_one = 0, m_ipuf_zero = 0;
  int m_rec_feedback = 0, m_ro_one = 0, m_ro_zero = 0, m_cpuf_e_layer2 = 0, m_lfsr = 0;
  logic [7:0] m_mux_paths = '0;

  logic rst_n;
  logic en_apuf, en_xor, en_ff, en_ffx, en_dapuf, en_mux, en_ipuf, en_cpuf_ax, en_ls, en_crc;
  logic en_bent, en_sn, en_multi, en_cpuf_ar, en_cpuf_ra, en_cpuf_e;
  logic [63:0] c_apuf, c_xor, c_ff, c_ffx, c_dapuf, c_mux, c_ipuf, c_cpuf_ax, c_ls, c_crc;
  logic [63:0] c_bent, c_sn, c_multi, c_cpuf_ar, c_cpuf_ra, c_cpuf_rx, c_cpuf_e, c_rec;
  logic [3:0]  c_ropuf, c_cropuf, cs_colpuf;
  logic r_apuf, r_xor, r_ff, r_ffx, r_mux, r_ipuf, r_cpuf_ax, r_bent, r_sn, r_multi;
  logic [3:0] r_dapuf, r_ls, r_crc, r_rec;
  logic start_ropuf, start_cpuf_ar, start_cpuf_ra, start_cpuf_rx, start_cpuf_e;
  logic start_cropuf, start_colpuf, start_rec;
  logic busy_ropuf, busy_cpuf_ar, busy_cpuf_ra, busy_cpuf_rx, busy_cpuf_e, busy_cropuf, busy_colpuf, busy_rec;
  logic done_ropuf, done_cpuf_ar, done_cpuf_ra, done_cpuf_rx, done_cpuf_e, done_cropuf, done_colpuf, done_rec;
  logic r_ropuf, r_cpuf_ar, r_cpuf_ra, r_cpuf_rx, r_cpuf_e, r_cropuf, r_colpuf;

  puf_zoo_top dut (.*);

  // ---------------------------------------------------------------- reference helpers
  function automatic bit ref_ffx(vec_t v);
    int p[4] = '{16, 24, 32, 40};
    int q[4] = '{48, 52, 56, 60};
    bit x = 0;
    for (int i = 0; i < 4; i++) x ^= ff_apuf(kid(32'd4, i), 64, v, '{p[i]}, '{q[i]});
    return x;
  endfunction

  function automatic int mux_sel(vec_t v);
    int sel = 0;
    for (int i = 0; i < 3; i++) if (apuf(kid(32'd6, 8 + i), 64, v)) sel += 1 << i;
    return sel;
  endfunction

  function automatic bit ref_ipuf(vec_t v, output bit up);
    vec_t x = 0;
    up = xor_apuf(kid(32'd7, 0), 64, 1, v);
    for (int i = 0; i < 32; i++) x[i] = v[i];
    x[32] = up;
    for (int i = 33; i < 65; i++) x[i] = v[i-1];
    return xor_apuf(kid(32'd7, 1), 65, 4, x);
  endfunction

  function automatic bit ref_cax(vec_t v);
    bit x = 0;
    for (int i = 0; i < 4; i++) x ^= apuf(kid(32'd12, i), 16, (v >> (16 * i)) & 128'hFFFF);
    return x;
  endfunction

  function automatic logic [3:0] ref_ls(vec_t v);
    vec_t x[8];
    vec_t d;
    bit row[8];
    logic [3:0] y = 0;
    x[0] = v;
    for (int i = 1; i < 8; i++) x[i] = rot(x[i-1], 64, i - 1);
    for (int q = 0; q < 8; q++) begin
      d = 0;
      d[32] = x[q][0];
      d[0]  = x[q][63];
      for (int j = 3; j <= 63; j += 2) d[(j+1)/2 - 1] = x[q][j-1] ^ x[q][j];
      for (int j = 2; j <= 62; j += 2) d[(64+j+2)/2 - 1] = x[q][j-1] ^ x[q][j];
      row[q] = apuf(kid(32'd17, q), 64, d);
    end
    for (int j = 1; j <= 4; j++) for (int i = 1; i <= 3; i++) y[j-1] ^= row[(j + i) % 8];
    return y;
  endfunction

  function automatic logic [3:0] ref_crc(vec_t v);
    logic [3:0] y;
    vec_t x = v;
    for (int i = 0; i < 4; i++) begin
      x = lfsr(x, 64, 128'h1B);
      y[i] = apuf(kid(32'd18, i), 64, x);
    end
    return y;
  endfunction

  function automatic bit ref_bent(vec_t v);
    vec_t y = 0;
    for (int i = 0; i < 4; i++) y[i] = apuf(kid(32'd20, i), 64, v);
    return bent(y, 4);
  endfunction

  function automatic bit ref_sn(vec_t v);
    vec_t y = 0;
    for (int i = 0; i < 4; i++) y[i] = spuf(kid(32'd22, i), 64, v);
    return bent(y, 4);
  endfunction

  function automatic bit ref_multi(vec_t v);
    vec_t k = 0;
    for (int i = 0; i < 64; i++) k[i] = pico(kid(32'd24, i));
    return apuf(kid(32'd24, 64), 64, v ^ k);
  endfunction

  function automatic bit ref_car(vec_t v);
    vec_t y = 0;
    bit s;
    for (int i = 0; i < 4; i++) y[i] = apuf(kid(32'd13, i), 16, (v >> (16 * i)) & 128'hFFFF);
    return ropuf(kid(32'd13, 4), 4, 5, W, y, s);
  endfunction

  function automatic bit ref_cra(vec_t v, bit do_xor);
    vec_t y = 0;
    bit s;
    logic [31:0] seed = do_xor ? 32'd15 : 32'd14;
    for (int i = 0; i < 16; i++) y[i] = ropuf(kid(seed, i), 4, 5, W, (v >> (4 * i)) & 128'hF, s);
    return do_xor ? ^y[15:0] : apuf(kid(32'd14, 16), 16, y);
  endfunction

  function automatic bit ref_ce(vec_t v);
    vec_t x = 0;
    bit s;
    for (int i = 0; i < 3; i++)
      x[i] = apuf(kid(32'd16, i), 16, (v >> (20 * i)) & 128'hFFFF)
           ^ ropuf(kid(32'd16, 3 + i), 4, 5, W, (v >> (20 * i + 16)) & 128'hF, s);
    x[3] = ropuf(kid(32'd16, 6), 4, 5, W, (v >> 60) & 128'hF, s);
    return ropuf(kid(32'd16, 7), 4, 5, W, x, s);
  endfunction

  task automatic expect_bit(string name, logic got, logic exp_v);
    checks++;
    if (got !== exp_v) begin failures++; $display("%s: got %b expected %b", name, got, exp_v); end
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (20 * (W + 10) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clocked operation: pulse start, wait for done, check the latency
  task automatic run_op(string name, ref logic start, ref logic done, ref logic busy, input int lat_exp);
    int lat = 0;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    do begin
      @(posedge clk);
      #1 lat++;
    end while (!done && lat < lat_exp + 5);
    checks++;
    if (lat != lat_exp) begin failures++; $display("%s: latency %0d, expected %0d", name, lat, lat_exp); end
    // the block is idle again one cycle after done; the response stays valid
    @(posedge clk);
    #1;
    checks++;
    if (busy) begin failures++; $display("%s: still busy after done", name); end
  endtask

  // ---------------------------------------------------------------- stimulus
  initial begin
    vec_t v;
    bit up, s, e;
    int t_arr, b_arr;
    {en_apuf, en_xor, en_ff, en_ffx, en_dapuf, en_mux, en_ipuf, en_cpuf_ax, en_ls, en_crc} = '0;
    {en_bent, en_sn, en_multi, en_cpuf_ar, en_cpuf_ra, en_cpuf_e} = '1;
    {start_ropuf, start_cpuf_ar, start_cpuf_ra, start_cpuf_rx, start_cpuf_e} = '0;
    {start_cropuf, start_colpuf, start_rec} = '0;
    {c_apuf, c_xor, c_ff, c_ffx, c_dapuf, c_mux, c_ipuf, c_cpuf_ax, c_ls, c_crc} = '0;
    {c_bent, c_sn, c_multi, c_cpuf_ar, c_cpuf_ra, c_cpuf_rx, c_cpuf_e, c_rec} = '0;
    {c_ropuf, c_cropuf, cs_colpuf} = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    fork
      // ---- combinational arbiter-based constructions
      begin
        vec_t vc;
        {en_apuf, en_xor, en_ff, en_ffx, en_dapuf, en_mux, en_ipuf, en_cpuf_ax, en_ls, en_crc} = '1;
        // the Multi-PUF's Pico-PUF key settles within 22 cycles of the first enable
        repeat (22) @(posedge clk);
        for (int t = 0; t < NCOMB; t++) begin
          vc = rand_vec();
          vc[127:64] = '0;
          {c_apuf, c_xor, c_ff, c_ffx, c_dapuf, c_mux, c_ipuf, c_cpuf_ax} = {8{vc[63:0]}};
          {c_ls, c_crc, c_bent, c_sn, c_multi} = {5{vc[63:0]}};
          @(posedge clk);
          #1;
          e = apuf(32'd1, 64, vc);
          if (e) m_top_wins++; else m_bot_wins++;
          expect_bit("apuf", r_apuf, e);
          expect_bit("xor_apuf", r_xor, xor_apuf(32'd2, 64, 3, vc));
          expect_bit("ff_apuf", r_ff, ff_apuf(32'd3, 64, vc, '{32}, '{48}));
          chain(32'd3, 32, vc, t_arr, b_arr);
          if ((t_arr < b_arr) != v[47]) m_ff_override++;
          expect_bit("ff_xor_puf", r_ffx, ref_ffx(vc));
          checks++;
          if (r_dapuf !== 4'(dapuf(32'd5, 64, 5, 4, vc))) begin failures++; $display("dapuf mismatch"); end
          m_mux_paths[mux_sel(vc)] = 1'b1;
          expect_bit("mux_puf", r_mux, apuf(kid(32'd6, mux_sel(vc)), 64, vc));
          expect_bit("ipuf", r_ipuf, ref_ipuf(vc, up));
          if (up) m_ipuf_one++; else m_ipuf_zero++;
          expect_bit("cpuf_ax", r_cpuf_ax, ref_cax(vc));
          checks++;
          if (r_ls !== ref_ls(vc)) begin failures++; $display("ls_puf mismatch"); end
          checks++;
          if (r_crc !== ref_crc(vc)) begin failures++; $display("crc_puf mismatch"); end
          expect_bit("bent_puf", r_bent, ref_bent(vc));
          expect_bit("sn_puf", r_sn, ref_sn(vc));
          expect_bit("multi_puf", r_multi, ref_multi(vc));
        end
      end
      // ---- stand-alone RO PUF: every challenge once
      begin
        for (int k = 0; k < 16; k++) begin
          c_ropuf = 4'(k);
          run_op("ropuf", start_ropuf, done_ropuf, busy_ropuf, W + 2);
          e = ropuf(32'd10, 4, 5, W, vec_t'(c_ropuf), s);
          expect_bit("ropuf", r_ropuf, e);
          if (e) m_ro_one++; else m_ro_zero++;
        end
      end
      // ---- configurable RO PUF and ColPUF
      begin
        for (int k = 0; k < 8; k++) begin
          c_cropuf  = 4'($urandom());
          cs_colpuf = 4'($urandom());
          fork
            run_op("cropuf", start_cropuf, done_cropuf, busy_cropuf, W + 2);
            run_op("colpuf", start_colpuf, done_colpuf, busy_colpuf, W + 2);
          join
          expect_bit("cropuf", r_cropuf, ropuf(32'd11, 4, 5, W, vec_t'(c_cropuf), s, 1'b1));
          expect_bit("colpuf", r_colpuf, ropuf(32'd19, 4, 5, W, lfsr(vec_t'(cs_colpuf), 4, 128'b1001), s, 1'b1));
          if (lfsr(vec_t'(cs_colpuf), 4, 128'b1001) != vec_t'(cs_colpuf)) m_lfsr++;
        end
      end
      // ---- composite PUFs with RO PUFs
      begin
        vec_t vv;
        for (int k = 0; k < 6; k++) begin
          vv = rand_vec();
          c_cpuf_ar = vv[63:0];
          c_cpuf_ra = vv[127:64];
          c_cpuf_rx = vv[95:32];
          fork
            run_op("cpuf_ar", start_cpuf_ar, done_cpuf_ar, busy_cpuf_ar, W + 2);
            run_op("cpuf_ra", start_cpuf_ra, done_cpuf_ra, busy_cpuf_ra, W + 2);
            run_op("cpuf_rx", start_cpuf_rx, done_cpuf_rx, busy_cpuf_rx, W + 2);
          join
          expect_bit("cpuf_ar", r_cpuf_ar, ref_car(vec_t'(c_cpuf_ar)));
          expect_bit("cpuf_ra", r_cpuf_ra, ref_cra(vec_t'(c_cpuf_ra), 1'b0));
          expect_bit("cpuf_rx", r_cpuf_rx, ref_cra(vec_t'(c_cpuf_rx), 1'b1));
        end
      end
      begin
        vec_t vv;
        for (int k = 0; k < 6; k++) begin
          vv = rand_vec();
          c_cpuf_e = vv[63:0];
          run_op("cpuf_e", start_cpuf_e, done_cpuf_e, busy_cpuf_e, 2 * W + 5);
          expect_bit("cpuf_e", r_cpuf_e, ref_ce(vec_t'(c_cpuf_e)));
          m_cpuf_e_layer2++;
        end
      end
      // ---- recurrent DAPUF
      begin
        logic [3:0] ri;
        vec_t vi, vr;
        for (int k = 0; k < 40; k++) begin
          vr = rand_vec();
          c_rec = vr[63:0];
          vr = vec_t'(c_rec);
          run_op("rec_dapuf", start_rec, done_rec, busy_rec, 2);
          ri = 4'(dapuf(32'd25, 64, 5, 4, vr));
          vi = vr;
          for (int i = 0; i < 64; i++) vi[i] = vr[i] ^ ri[i / 16];
          if (ri != 0) m_rec_feedback++;
          checks++;
          if (r_rec !== 4'(dapuf(32'd25, 64, 5, 4, vi))) begin failures++; $display("rec_dapuf mismatch"); end
        end
      end
    join

    $display("mechanisms: top-wins=%0d bottom-wins=%0d ff-override=%0d ipuf-bit1=%0d ipuf-bit0=%0d",
             m_top_wins, m_bot_wins, m_ff_override, m_ipuf_one, m_ipuf_zero);
    $display("mechanisms: mux-paths=%b rec-feedback=%0d ro-one=%0d ro-zero=%0d cpuf-e-layer2=%0d lfsr=%0d",
             m_mux_paths, m_rec_feedback, m_ro_one, m_ro_zero, m_cpuf_e_layer2, m_lfsr);
    checks++;
    if (m_top_wins == 0 || m_bot_wins == 0 || m_ff_override == 0 || m_ipuf_one == 0 || m_ipuf_zero == 0
        || $countones(m_mux_paths) < 2 || m_rec_feedback == 0 || m_ro_one == 0 || m_ro_zero == 0
        || m_cpuf_e_layer2 == 0 || m_lfsr == 0) begin
      failures++;
      $display("a mechanism never took effect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
