// tb_cmat2_mul: self-checking test of the 2x2 complex matrix multiplier.
// Streams random operands with random Hermitian options and gaps, compares
// each product with a double-precision reference (within 0.6 LSB, i.e. exact
// rounding) and checks that it appears exactly two cycles after its operands.
module tb_cmat2_mul;
  import mmse_pkg::*;
  import mmse_tb_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, herm_x = 0, herm_y = 0, out_valid;
  mat2_t x = '0, y = '0, p;
  int    checks = 0, failures = 0, cyc = 0;

  cmat2_mul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { rm2_t r; int c; } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = q.pop_front();
        if (cyc - e.c != 2) begin
          failures++; $display("FAIL: latency %0d", cyc - e.c);
        end
        if (err2(p, e.r) > 0.6 * LSB) begin
          failures++; $display("FAIL: product error %g", err2(p, e.r));
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x = rnd_m2(i < 200 ? 2.0 : 20.0);
      y = rnd_m2(i < 200 ? 2.0 : 20.0);
      herm_x = $urandom_range(0, 1);
      herm_y = $urandom_range(0, 1);
      if (in_valid) begin
        exp_t e;
        rm2_t a, b;
        a = herm_x ? herm2(m2r(x)) : m2r(x);
        b = herm_y ? herm2(m2r(y)) : m2r(y);
        e.r = mul2(a, b);
        e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
