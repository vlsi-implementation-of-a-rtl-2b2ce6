// inv_half: the "4x4 INV HALF" unit of the 2-step detector.
//
// Half of Strassen's 4x4 inversion as one chain of 2x2 units:
//   inv_o = x^-1,  mul_o = y^H * x^-1,  add_o = z -/+ (mul_o * y)
// With x = b11, y = b12, z = b22, sub = 1 it yields c1, c2 and c4 (first
// step); with x = c4, y = c2, z = c1, sub = 0 it yields c5, c6 and c8 (second
// step). Stage counts follow the 9-step datapath: INV 7, MUL 2, MUL 2, ADD 1,
// ALPHA = 12 in all, with delay units of 3 and 5 cycles so that the three
// results leave together.
// Interface: x, y, z sampled with in_valid (y and z are delayed inside to the
// stage that uses them); sub is held for the whole step. Results and
// out_valid appear 12 cycles later, one set per cycle.
module inv_half
  import mmse_pkg::*;
#(
  parameter int ALPHA = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mat2_t x,
  input  mat2_t y,
  input  mat2_t z,
  input  logic  sub,
  output logic  out_valid,
  output mat2_t inv_o,
  output mat2_t mul_o,
  output mat2_t add_o
);
  mat2_t y7, y9, z11;
  delay_line #(.WIDTH(MAT2_W), .D(7))  u_dy7  (.clk, .rst_n, .din(y), .dout(y7));
  delay_line #(.WIDTH(MAT2_W), .D(9))  u_dy9  (.clk, .rst_n, .din(y), .dout(y9));
  delay_line #(.WIDTH(MAT2_W), .D(11)) u_dz11 (.clk, .rst_n, .din(z), .dout(z11));

  logic  inv_v, m1_v, m2_v;
  mat2_t inv_q, m1_q, m2_q;

  cmat2_inv u_inv (.clk, .rst_n, .in_valid(in_valid), .l(x),
                   .out_valid(inv_v), .li(inv_q));
  cmat2_mul u_mul1 (.clk, .rst_n, .in_valid(inv_v), .x(y7), .y(inv_q),
                    .herm_x(1'b1), .herm_y(1'b0), .out_valid(m1_v), .p(m1_q));
  cmat2_mul u_mul2 (.clk, .rst_n, .in_valid(m1_v), .x(m1_q), .y(y9),
                    .herm_x(1'b0), .herm_y(1'b0), .out_valid(m2_v), .p(m2_q));
  cmat2_add u_add (.clk, .rst_n, .in_valid(m2_v), .a(m2_q), .b(z11),
                   .neg_a(sub), .neg_b(1'b0), .add_sigma(1'b0), .sigma2('0),
                   .out_valid(out_valid), .s(add_o));

  delay_line #(.WIDTH(MAT2_W), .D(3)) u_d3 (.clk, .rst_n, .din(m1_q),  .dout(mul_o));
  delay_line #(.WIDTH(MAT2_W), .D(5)) u_d5 (.clk, .rst_n, .din(inv_q), .dout(inv_o));

  initial assert (ALPHA == 12) else $error("inv_half latency is 12");
endmodule
