// tb_cmat2_inv: self-checking test of the 2x2 complex matrix inverse.
// Streams random complex matrices with a dominant diagonal (so the inverse
// is well defined and within range) back to back, compares each result with
// a double-precision inverse and checks the seven-cycle latency. It also
// checks that L * L^-1 is close to the identity.
module tb_cmat2_inv;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, out_valid;
  mat2_t l = '0, li;
  int    checks = 0, failures = 0, cyc = 0;
  real   maxe = 0.0;

  cmat2_inv dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { rm2_t a; int c; } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    rm2_t r, id;
    real  er, tol;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      e  = q.pop_front();
      r  = inv2(e.a);
      er = err2(li, r);
      // tolerance: a few LSB scaled by the size of the inverse
      tol = 8.0 * LSB * (1.0 + rabs(r[0][0].re) + rabs(r[1][1].re));
      if (er > maxe) maxe = er;
      if (cyc - e.c != 7) begin failures++; $display("FAIL: latency %0d", cyc - e.c); end
      if (er > tol) begin failures++; $display("FAIL: inverse error %g > %g", er, tol); end
      id = mul2(e.a, m2r(li));
      checks++;
      if (rabs(id[0][0].re - 1.0) > 0.01 || rabs(id[1][1].re - 1.0) > 0.01 ||
          rabs(id[0][1].re) > 0.01 || rabs(id[1][0].im) > 0.01) begin
        failures++; $display("FAIL: L*L^-1 not identity");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      mat2_t m;
      real   sc;
      @(negedge clk);
      sc = (i < 100) ? 1.0 : (i < 200 ? 0.2 : 8.0);
      m = rnd_m2(0.5 * sc);
      m.m11.re = r2fx(sc * (1.0 + real'($urandom_range(0, 100)) / 100.0));
      m.m22.re = r2fx(sc * (1.0 + real'($urandom_range(0, 100)) / 100.0));
      l = m;
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        exp_t e;
        e.a = m2r(m);
        e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("max error %g", maxe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
