// tb_dp9_datapath: self-checking test of the reconfigurable 9-step datapath.
// Runs batches of random operands in both flows with random Hermitian, sign
// and sigma^2 options (Sel and the options are constant within a batch, as
// within a step) and compares all three outputs with a double-precision model
// of the selected flow. Every result must leave exactly 12 cycles after its
// operands.
module tb_dp9_datapath;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic     clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sel_t     sel = TYPE_A;
  dp9_ctl_t ctl = '0;
  fx_t      sigma2 = '0;
  dp9_in_t  opnd = '0;
  mat2_t    add_out, mul1_out, inv_out;
  int       checks = 0, failures = 0, cyc = 0, n_a = 0, n_b = 0;
  real      maxe = 0.0;

  dp9_datapath dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { rm2_t add; rm2_t m1; rm2_t inv; int c; } exp_t;
  exp_t q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rm2_t opt_h(input rm2_t a, input logic h);
    return h ? herm2(a) : a;
  endfunction

  function automatic rm2_t lin(input rm2_t a, input logic na, input rm2_t b,
                               input logic nb, input real s);
    rm2_t r;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r[i][j].re = (na ? -a[i][j].re : a[i][j].re) + (nb ? -b[i][j].re : b[i][j].re) + ((i == j) ? s : 0.0);
        r[i][j].im = (na ? -a[i][j].im : a[i][j].im) + (nb ? -b[i][j].im : b[i][j].im);
      end
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    real  ea, em, ei;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      e = q.pop_front();
      ea = err2(add_out, e.add); em = err2(mul1_out, e.m1); ei = err2(inv_out, e.inv);
      if (ea > maxe) maxe = ea;
      if (cyc - e.c != 12) begin failures++; $display("FAIL: latency %0d", cyc - e.c); end
      if (ea > 0.01 || em > 0.01 || ei > 0.01) begin
        failures++; $display("FAIL: sel %s err add %g mul1 %g inv %g", sel.name(), ea, em, ei);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int batch = 0; batch < 12; batch++) begin
      @(negedge clk);
      sel = (batch % 2) ? TYPE_B : TYPE_A;
      ctl = dp9_ctl_t'($urandom);
      sigma2 = rnd_fx(0.5);
      for (int i = 0; i < 25; i++) begin
        exp_t e;
        rm2_t ix, m1x, m1y, m2x, m2y, ax, p1, p2, inv;
        mat2_t w;
        @(negedge clk);
        w = rnd_m2(0.3);
        w.m11.re = r2fx(1.0 + real'($urandom_range(0, 50)) / 100.0);
        w.m22.re = r2fx(1.0 + real'($urandom_range(0, 50)) / 100.0);
        opnd.inv_x = w;
        opnd.m1_x = rnd_m2(1.0); opnd.m1_y = rnd_m2(1.0);
        opnd.m2_x = rnd_m2(1.0); opnd.m2_y = rnd_m2(1.0);
        opnd.add_x = rnd_m2(1.0);
        in_valid = ($urandom_range(0, 5) != 0);
        ix = m2r(opnd.inv_x); m1x = m2r(opnd.m1_x); m1y = m2r(opnd.m1_y);
        m2x = m2r(opnd.m2_x); m2y = m2r(opnd.m2_y); ax = m2r(opnd.add_x);
        inv = inv2(ix);
        if (sel == TYPE_A) begin
          p1 = mul2(opt_h(m1x, ctl.m1_hx), opt_h(m1y, ctl.m1_hy));
          p2 = mul2(opt_h(m2x, ctl.m2_hx), opt_h(m2y, ctl.m2_hy));
          e.add = lin(p2, ctl.neg_a, p1, ctl.neg_b, ctl.add_sigma ? fx2r(sigma2) : 0.0);
        end else begin
          p1 = mul2(opt_h(m1x, ctl.m1_hx), opt_h(inv, ctl.m1_hy));
          p2 = mul2(opt_h(p1, ctl.m2_hx), opt_h(m2y, ctl.m2_hy));
          e.add = lin(p2, ctl.neg_a, ax, ctl.neg_b, ctl.add_sigma ? fx2r(sigma2) : 0.0);
        end
        e.m1 = p1; e.inv = inv; e.c = cyc;
        if (in_valid) begin
          q.push_back(e);
          if (sel == TYPE_A) n_a++; else n_b++;
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (14) @(posedge clk);     // drain before the flow changes
    end
    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    if (n_a == 0 || n_b == 0) failures++;
    $display("max add error %g, %0d Type A and %0d Type B operations", maxe, n_a, n_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
