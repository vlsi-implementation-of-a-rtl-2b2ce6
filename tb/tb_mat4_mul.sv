// tb_mat4_mul: self-checking test of the 4x4 MUL unit in both flows.
// Type A: blocks b11, b12, b22 of A A^H + sigma^2 I (block 21 idle, zero).
// Type B: G = [c8 -c6; -c6^H c5] A. Random operands, compared with a
// double-precision model; results must leave three cycles after the inputs.
module tb_mat4_mul;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sel_t  sel = TYPE_A;
  mat4_t a = '0, o;
  mat2_t c5 = '0, c6 = '0, c8 = '0;
  fx_t   sigma2 = '0;
  int    checks = 0, failures = 0, cyc = 0;

  mat4_mul dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { rm2_t e [4]; int c; } exp_t;
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
      er = err2(o.b11, e.e[0]);
      if (err2(o.b12, e.e[1]) > er) er = err2(o.b12, e.e[1]);
      if (err2(o.b21, e.e[2]) > er) er = err2(o.b21, e.e[2]);
      if (err2(o.b22, e.e[3]) > er) er = err2(o.b22, e.e[3]);
      if (cyc - e.c != 3) begin failures++; $display("FAIL: latency %0d", cyc - e.c); end
      if (er > 2.0 * LSB) begin failures++; $display("FAIL: sel %s error %g", sel.name(), er); end
    end
  end

  function automatic rm2_t addm(input rm2_t x, input rm2_t y, input real sx, input real sy, input real s);
    rm2_t r;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r[i][j].re = sx * x[i][j].re + sy * y[i][j].re + ((i == j) ? s : 0.0);
        r[i][j].im = sx * x[i][j].im + sy * y[i][j].im;
      end
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int batch = 0; batch < 6; batch++) begin
      @(negedge clk);
      sel = batch[0] ? TYPE_B : TYPE_A;
      sigma2 = rnd_fx(0.5);             // held for the batch, like a step
      for (int k = 0; k < 30; k++) begin
        exp_t e;
        rm2_t h11, h12, h21, h22, r5, r6, r8, zero;
        real  s;
        @(negedge clk);
        a = rnd_m4(1.0); c5 = rnd_m2(1.0); c6 = rnd_m2(1.0); c8 = rnd_m2(1.0);
        in_valid = ($urandom_range(0, 4) != 0);
        h11 = m2r(a.b11); h12 = m2r(a.b12); h21 = m2r(a.b21); h22 = m2r(a.b22);
        r5 = m2r(c5); r6 = m2r(c6); r8 = m2r(c8); s = fx2r(sigma2);
        zero = m2r('0);
        if (sel == TYPE_A) begin
          e.e[0] = addm(mul2(h11, herm2(h11)), mul2(h12, herm2(h12)), 1, 1, s);
          e.e[1] = addm(mul2(h11, herm2(h21)), mul2(h12, herm2(h22)), 1, 1, 0);
          e.e[2] = zero;
          e.e[3] = addm(mul2(h21, herm2(h21)), mul2(h22, herm2(h22)), 1, 1, s);
        end else begin
          e.e[0] = addm(mul2(r8, h11), mul2(r6, h21), 1, -1, 0);
          e.e[1] = addm(mul2(r8, h12), mul2(r6, h22), 1, -1, 0);
          e.e[2] = addm(mul2(herm2(r6), h11), mul2(r5, h21), -1, 1, 0);
          e.e[3] = addm(mul2(herm2(r6), h12), mul2(r5, h22), -1, 1, 0);
        end
        e.c = cyc;
        if (in_valid) q.push_back(e);
      end
      @(negedge clk) in_valid = 0;
      repeat (5) @(posedge clk);
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
