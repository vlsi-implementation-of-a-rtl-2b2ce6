// tb_inv_half: self-checking test of the 4x4 INV HALF chain.
// Batches with sub = 1 (first-step use: c1, c2, c4 from b11, b12, b22) and
// sub = 0 (second-step use: c5, c6, c8 from c4, c2, c1); x is a random
// Hermitian positive-definite block. All three outputs are compared with a
// double-precision model and must leave 12 cycles after the inputs.
module tb_inv_half;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic  clk = 0, rst_n = 0, in_valid = 0, sub = 0, out_valid;
  mat2_t x = '0, y = '0, z = '0, inv_o, mul_o, add_o;
  int    checks = 0, failures = 0, cyc = 0;
  real   maxe = 0.0;

  inv_half dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { rm2_t i; rm2_t m; rm2_t a; int c; } exp_t;
  exp_t q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    real  er;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = q.pop_front();
      er = err2(inv_o, e.i);
      if (err2(mul_o, e.m) > er) er = err2(mul_o, e.m);
      if (err2(add_o, e.a) > er) er = err2(add_o, e.a);
      if (er > maxe) maxe = er;
      if (cyc - e.c != 12) begin failures++; $display("FAIL: latency %0d", cyc - e.c); end
      if (er > 0.01) begin failures++; $display("FAIL: error %g", er); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int batch = 0; batch < 6; batch++) begin
      @(negedge clk);
      sub = batch[0];
      for (int k = 0; k < 30; k++) begin
        exp_t e;
        rm2_t xr, yr, zr, pr;
        mat2_t w;
        @(negedge clk);
        w = rnd_m2(0.3);
        w.m11.re = r2fx(1.0 + real'($urandom_range(0, 80)) / 100.0); w.m11.im = '0;
        w.m22.re = r2fx(1.0 + real'($urandom_range(0, 80)) / 100.0); w.m22.im = '0;
        w.m21 = conj(w.m12);
        x = w; y = rnd_m2(1.0); z = rnd_m2(1.0);
        in_valid = ($urandom_range(0, 4) != 0);
        xr = m2r(x); yr = m2r(y); zr = m2r(z);
        e.i = inv2(xr);
        e.m = mul2(herm2(yr), e.i);
        pr  = mul2(e.m, yr);
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 2; j++) begin
            e.a[i][j].re = zr[i][j].re + (sub ? -pr[i][j].re : pr[i][j].re);
            e.a[i][j].im = zr[i][j].im + (sub ? -pr[i][j].im : pr[i][j].im);
          end
        e.c = cyc;
        if (in_valid) q.push_back(e);
      end
      @(negedge clk) in_valid = 0;
      repeat (14) @(posedge clk);
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("max error %g", maxe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
