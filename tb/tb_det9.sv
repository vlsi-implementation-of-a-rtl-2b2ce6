// tb_det9: end-to-end test of the 9-step detector at N_MAX = 16.
// Loads random channel matrices, runs the preprocessing for several
// subcarrier counts and compares every 2x2 block of G with the MMSE filter
// (A A^H + sigma^2 I)^-1 A computed in double precision by Gauss-Jordan
// elimination. Checks that each block of each subcarrier arrives exactly once,
// that Sel is Type B in steps 4-5 only, and that the first block of step 9
// leaves (N+12)*8+12 cycles after the first read.
module tb_det9;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  localparam int N_MAX = 16;
  logic        clk = 0, rst_n = 0, h_we = 0, start = 0;
  logic [3:0]  h_addr = '0;
  mat4_t       h_wdata = '0;
  fx_t         sigma2 = '0;
  logic [4:0]  n_sc = '0;
  logic        busy, done, g_valid;
  sel_t        sel;
  logic [3:0]  step;
  logic [1:0]  g_blk;
  logic [3:0]  g_idx;
  mat2_t       g_data;
  int          checks = 0, failures = 0;
  real         maxe = 0.0;

  det9 #(.N_MAX(N_MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input real s2, input real amp);
    rm4_t gref [N_MAX];
    int   seen [N_MAX][4];
    int   cyc, first_rd, first9;
    // load channel matrices
    sigma2 = r2fx(s2);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      h_we = 1; h_addr = 4'(k); h_wdata = rnd_m4(amp);
      gref[k] = mmse_ref(m4r(h_wdata), fx2r(sigma2));
      for (int b = 0; b < 4; b++) seen[k][b] = 0;
    end
    @(negedge clk);
    h_we = 0; start = 1; n_sc = 5'(n);
    @(negedge clk);
    start = 0;
    cyc = 0; first_rd = -1; first9 = -1;
    while (!done && cyc < 2000) begin
      if (dut.rd_valid && first_rd < 0) first_rd = cyc;
      if (busy) begin
        checks++;
        if ((sel == TYPE_B) != (step == 4 || step == 5)) begin
          failures++; $display("FAIL: Sel %s in step %0d", sel.name(), step);
        end
      end
      if (g_valid) begin
        real er;
        if (step == 9 && first9 < 0) first9 = cyc;
        er = err2(g_data, blk(gref[g_idx], g_blk / 2, g_blk % 2));
        if (er > maxe) maxe = er;
        checks++;
        if (er > 0.02) begin
          failures++; $display("FAIL: g blk %0d sc %0d error %g", g_blk, g_idx, er);
        end
        seen[g_idx][g_blk]++;
      end
      @(negedge clk);
      cyc++;
    end
    for (int k = 0; k < n; k++)
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (seen[k][b] != 1) begin failures++; $display("FAIL: sc %0d blk %0d seen %0d", k, b, seen[k][b]); end
      end
    checks++;
    if (first9 - first_rd != (n + 12) * 8 + 12) begin
      failures++; $display("FAIL: processing cycles %0d", first9 - first_rd);
    end
    $display("N=%0d: first G block of step 9 after %0d cycles", n, first9 - first_rd);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(7, 0.25, 0.5);
    run(16, 0.1, 0.7);
    run(1, 0.5, 0.5);
    $display("max G error %g", maxe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
