// tb_cmat2_add: self-checking test of the 2x2 complex adder/subtracter.
// Random operands (including values that saturate), random signs and
// sigma^2 option; results are compared bit-exactly with an integer model and
// must appear one cycle after the operands.
module tb_cmat2_add;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, neg_a = 0, neg_b = 0, add_sigma = 0, out_valid;
  mat2_t a = '0, b = '0, s;
  fx_t   sigma2 = '0;
  int    checks = 0, failures = 0;

  cmat2_add dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampi(input longint v);
    if (v > (1 << (W-1)) - 1) return (1 << (W-1)) - 1;
    if (v < -(1 << (W-1))) return -(1 << (W-1));
    return v;
  endfunction

  function automatic longint ref1(input fx_t p, input fx_t q, input logic np,
                                 input logic nq, input fx_t r);
    longint t;
    t = (np ? -longint'(p) : longint'(p)) + (nq ? -longint'(q) : longint'(q)) + longint'(r);
    return clampi(t);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      fx_t av [8], bv [8], ev [8];
      @(negedge clk);
      in_valid = 1;
      a = rnd_m2(i % 3 == 0 ? 2000.0 : 4.0);
      b = rnd_m2(i % 3 == 0 ? 2000.0 : 4.0);
      neg_a = $urandom_range(0, 1);
      neg_b = $urandom_range(0, 1);
      add_sigma = $urandom_range(0, 1);
      sigma2 = rnd_fx(1.0);
      av = {a.m11.re, a.m11.im, a.m12.re, a.m12.im, a.m21.re, a.m21.im, a.m22.re, a.m22.im};
      bv = {b.m11.re, b.m11.im, b.m12.re, b.m12.im, b.m21.re, b.m21.im, b.m22.re, b.m22.im};
      for (int k = 0; k < 8; k++)
        ev[k] = fx_t'(ref1(av[k], bv[k], neg_a, neg_b,
                           (add_sigma && (k == 0 || k == 6)) ? sigma2 : fx_t'(0)));
      @(posedge clk); #1;
      checks++;
      if (!out_valid || {s.m11.re, s.m11.im, s.m12.re, s.m12.im, s.m21.re, s.m21.im,
                         s.m22.re, s.m22.im} != {ev[0], ev[1], ev[2], ev[3], ev[4], ev[5], ev[6], ev[7]}) begin
        failures++;
        $display("FAIL at %0d", i);
      end
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
