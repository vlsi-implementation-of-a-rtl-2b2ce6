// tb_mmse_workloads: full-size run of the top level at its default
// parameters (N_MAX = 512) over the four subcarrier counts of the published
// evaluation: 52 (20 MHz channel), 108 (40 MHz), 216 and 472 (80 MHz).
// For each count both detectors process random channels; every G is checked
// against a double-precision MMSE reference, and the processing time (cycles
// to the first result of the last step, times the clock period: 4 ns for the
// 9-step detector at 250 MHz, 6.25 ns for the 2-step one at 160 MHz) is
// compared with the published figures and with the acceptable latency
// (4 us, or 7.2 us for 472 subcarriers).
module tb_mmse_workloads;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic       d9_h_we = 0, d9_start = 0, d2_h_we = 0, d2_start = 0;
  logic [8:0] d9_h_addr = '0, d2_h_addr = '0;
  mat4_t      d9_h_wdata = '0, d2_h_wdata = '0;
  fx_t        d9_sigma2 = '0, d2_sigma2 = '0;
  logic [9:0] d9_n_sc = '0, d2_n_sc = '0;
  logic       d9_busy, d9_done, d9_g_valid, d2_busy, d2_done, d2_g_valid;
  sel_t       d9_sel, d2_sel;
  logic [3:0] d9_step;
  logic [8:0] d9_g_idx, d2_g_idx;
  logic [1:0] d9_g_blk;
  mat2_t      d9_g_data;
  mat4_t      d2_g_data;
  int         checks = 0, failures = 0;
  real        maxe = 0.0;

  mmse_detector_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // published processing times (us) and acceptable latencies
  int  ns      [4] = '{52, 108, 216, 472};
  real t9_pub  [4] = '{2.10, 3.88, 7.34, 15.53};
  real t2_pub  [4] = '{0.51, 0.86, 1.54, 3.14};
  real t_acc   [4] = '{4.0, 4.0, 4.0, 7.2};

  task automatic run(input int w);
    rm4_t ref9 [], ref2 [];
    int   n, cyc, rd9, rd2, g9, g2, cnt9, cnt2;
    bit   dn9, dn2;
    real  t9, t2;
    n = ns[w];
    ref9 = new[n];
    ref2 = new[n];
    d9_sigma2 = r2fx(0.25);
    d2_sigma2 = r2fx(0.25);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      d9_h_we = 1; d9_h_addr = 9'(k); d9_h_wdata = rnd_m4(0.6);
      d2_h_we = 1; d2_h_addr = 9'(k); d2_h_wdata = rnd_m4(0.6);
      ref9[k] = mmse_ref(m4r(d9_h_wdata), fx2r(d9_sigma2));
      ref2[k] = mmse_ref(m4r(d2_h_wdata), fx2r(d2_sigma2));
    end
    @(negedge clk);
    d9_h_we = 0; d2_h_we = 0;
    d9_start = 1; d9_n_sc = 10'(n);
    d2_start = 1; d2_n_sc = 10'(n);
    @(negedge clk);
    d9_start = 0; d2_start = 0;
    cyc = 0; rd9 = -1; rd2 = -1; g9 = -1; g2 = -1; cnt9 = 0; cnt2 = 0; dn9 = 0; dn2 = 0;
    while (!(dn9 && dn2) && cyc < 6000) begin
      if (dut.u_det9.rd_valid && rd9 < 0) rd9 = cyc;
      if (dut.u_det2.rd_valid && rd2 < 0) rd2 = cyc;
      if (d9_g_valid) begin
        real er;
        if (d9_step == 9 && g9 < 0) g9 = cyc;
        er = err2(d9_g_data, blk(ref9[d9_g_idx], d9_g_blk / 2, d9_g_blk % 2));
        if (er > maxe) maxe = er;
        checks++; cnt9++;
        if (er > 0.02) begin failures++; $display("FAIL: 9-step G error %g", er); end
      end
      if (d2_g_valid) begin
        mat2_t gb [4];
        gb = '{d2_g_data.b11, d2_g_data.b12, d2_g_data.b21, d2_g_data.b22};
        if (g2 < 0) g2 = cyc;
        cnt2++;
        for (int b = 0; b < 4; b++) begin
          real er;
          er = err2(gb[b], blk(ref2[d2_g_idx], b / 2, b % 2));
          if (er > maxe) maxe = er;
          checks++;
          if (er > 0.02) begin failures++; $display("FAIL: 2-step G error %g", er); end
        end
      end
      if (d9_done) dn9 = 1;
      if (d2_done) dn2 = 1;
      @(negedge clk);
      cyc++;
    end
    t9 = real'(g9 - rd9) * 4.0e-3;      // us at 250 MHz
    t2 = real'(g2 - rd2) * 6.25e-3;     // us at 160 MHz
    checks += 5;
    if (!dn9 || !dn2) begin failures++; $display("FAIL: done missing"); end
    if (cnt9 != 4 * n || cnt2 != n) begin failures++; $display("FAIL: G count"); end
    if (g9 - rd9 != (n + 12) * 8 + 12 || g2 - rd2 != (n + 15) + 15) begin
      failures++; $display("FAIL: processing cycles %0d %0d", g9 - rd9, g2 - rd2);
    end
    // published times are rounded or truncated to 0.01 us
    if (rabs(t9 - t9_pub[w]) > 0.011) begin failures++; $display("FAIL: 9-step time %f", t9); end
    if (rabs(t2 - t2_pub[w]) > 0.011) begin failures++; $display("FAIL: 2-step time %f", t2); end
    $display("N=%0d: 9-step %0d cycles = %.3f us (%s budget), 2-step %0d cycles = %.3f us (%s)",
             n, g9 - rd9, t9, (t9 <= t_acc[w]) ? "within" : "over",
             g2 - rd2, t2, (t2 <= t_acc[w]) ? "within" : "over");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Step count of the 9-step design: the largest M with
    // ((N + alpha)(M - 1) + alpha) / Fs <= T_FFT + T_GI, for N = 108,
    // alpha = 12, Fs = 250 MHz, T_FFT + T_GI = 4 us  ->  M <= 9.23.
    begin
      real m_max;
      m_max = (4.0e-6 * 250.0e6 - 12.0) / (108.0 + 12.0) + 1.0;
      checks++;
      if ($floor(m_max) != 9.0) begin failures++; $display("FAIL: step count %f", m_max); end
      $display("largest step count for N=108 at 250 MHz: %.2f -> %0d", m_max, int'($floor(m_max)));
    end
    for (int w = 0; w < 4; w++) run(w);
    $display("max G error %g", maxe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
