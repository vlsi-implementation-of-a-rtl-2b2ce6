// tb_mmse_detector_top: end-to-end test of the top level with both detector
// configurations running at the same time (N_MAX reduced to 16).
// Each run loads its own random channel matrices into each detector, starts
// both, and checks every G against a double-precision MMSE reference, the
// processing cycles of both configurations and that done arrives.
// It counts the mechanisms of the design and fails if one never occurs:
//   Sel switches Type A -> Type B and Type B -> Type A (9-step),
//   Sel switch Type A -> Type B (2-step),
//   write-backs of intermediate values to the feedback memory (both),
//   G outputs (both), and runs with different subcarrier counts.
module tb_mmse_detector_top;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  localparam int N_MAX = 16;
  logic clk = 0, rst_n = 0;
  logic       d9_h_we = 0, d9_start = 0, d2_h_we = 0, d2_start = 0;
  logic [3:0] d9_h_addr = '0, d2_h_addr = '0;
  mat4_t      d9_h_wdata = '0, d2_h_wdata = '0;
  fx_t        d9_sigma2 = '0, d2_sigma2 = '0;
  logic [4:0] d9_n_sc = '0, d2_n_sc = '0;
  logic       d9_busy, d9_done, d9_g_valid, d2_busy, d2_done, d2_g_valid;
  sel_t       d9_sel, d2_sel;
  logic [3:0] d9_step, d9_g_idx, d2_g_idx;
  logic [1:0] d9_g_blk;
  mat2_t      d9_g_data;
  mat4_t      d2_g_data;
  int         checks = 0, failures = 0;
  real        maxe = 0.0;
  // mechanism counters
  int n_sw9_ab = 0, n_sw9_ba = 0, n_sw2_ab = 0, n_fb9 = 0, n_fb2 = 0, n_g9 = 0, n_g2 = 0;

  mmse_detector_top #(.N_MAX(N_MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sel_t p9 = TYPE_A, p2 = TYPE_A;
  always @(posedge clk) if (rst_n) begin
    if (p9 == TYPE_A && d9_sel == TYPE_B) n_sw9_ab++;
    if (p9 == TYPE_B && d9_sel == TYPE_A) n_sw9_ba++;
    if (p2 == TYPE_A && d2_sel == TYPE_B) n_sw2_ab++;
    p9 <= d9_sel; p2 <= d2_sel;
    if (dut.u_det9.wr_en != '0) n_fb9++;
    if (dut.u_det2.u_imem.we != '0) n_fb2++;
  end

  task automatic run(input int n9, input int n2, input real s2);
    rm4_t ref9 [N_MAX], ref2 [N_MAX];
    int   cyc, rd9, rd2, g9, g2, cnt9, cnt2;
    bit   dn9, dn2;
    d9_sigma2 = r2fx(s2);
    d2_sigma2 = r2fx(s2 * 0.5);
    for (int k = 0; k < N_MAX; k++) begin
      @(negedge clk);
      d9_h_we = (k < n9); d9_h_addr = 4'(k); d9_h_wdata = rnd_m4(0.6);
      d2_h_we = (k < n2); d2_h_addr = 4'(k); d2_h_wdata = rnd_m4(0.6);
      ref9[k] = mmse_ref(m4r(d9_h_wdata), fx2r(d9_sigma2));
      ref2[k] = mmse_ref(m4r(d2_h_wdata), fx2r(d2_sigma2));
    end
    @(negedge clk);
    d9_h_we = 0; d2_h_we = 0;
    d9_start = 1; d9_n_sc = 5'(n9);
    d2_start = 1; d2_n_sc = 5'(n2);
    @(negedge clk);
    d9_start = 0; d2_start = 0;
    cyc = 0; rd9 = -1; rd2 = -1; g9 = -1; g2 = -1; cnt9 = 0; cnt2 = 0; dn9 = 0; dn2 = 0;
    while (!(dn9 && dn2) && cyc < 3000) begin
      if (dut.u_det9.rd_valid && rd9 < 0) rd9 = cyc;
      if (dut.u_det2.rd_valid && rd2 < 0) rd2 = cyc;
      if (d9_g_valid) begin
        real er;
        if (d9_step == 9 && g9 < 0) g9 = cyc;
        er = err2(d9_g_data, blk(ref9[d9_g_idx], d9_g_blk / 2, d9_g_blk % 2));
        if (er > maxe) maxe = er;
        checks++; n_g9++; cnt9++;
        if (er > 0.02) begin failures++; $display("FAIL: 9-step G error %g", er); end
      end
      if (d2_g_valid) begin
        mat2_t gb [4];
        gb = '{d2_g_data.b11, d2_g_data.b12, d2_g_data.b21, d2_g_data.b22};
        if (g2 < 0) g2 = cyc;
        n_g2++; cnt2++;
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
    checks += 4;
    if (!dn9 || !dn2) begin failures++; $display("FAIL: done missing"); end
    if (cnt9 != 4 * n9 || cnt2 != n2) begin failures++; $display("FAIL: G count %0d %0d", cnt9, cnt2); end
    if (g9 - rd9 != (n9 + 12) * 8 + 12) begin failures++; $display("FAIL: 9-step cycles %0d", g9 - rd9); end
    if (g2 - rd2 != (n2 + 15) + 15) begin failures++; $display("FAIL: 2-step cycles %0d", g2 - rd2); end
    $display("run N9=%0d N2=%0d: processing cycles 9-step %0d, 2-step %0d", n9, n2, g9 - rd9, g2 - rd2);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(10, 10, 0.3);
    run(16, 3, 0.2);
    run(2, 16, 0.4);
    $display("Sel switches 9-step A->B %0d B->A %0d, 2-step A->B %0d", n_sw9_ab, n_sw9_ba, n_sw2_ab);
    $display("feedback writes 9-step %0d 2-step %0d, G outputs 9-step %0d 2-step %0d, max error %g",
             n_fb9, n_fb2, n_g9, n_g2, maxe);
    checks += 7;
    if (n_sw9_ab == 0) failures++;
    if (n_sw9_ba == 0) failures++;
    if (n_sw2_ab == 0) failures++;
    if (n_fb9 == 0) failures++;
    if (n_fb2 == 0) failures++;
    if (n_g9 == 0) failures++;
    if (n_g2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
