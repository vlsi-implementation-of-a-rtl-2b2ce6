// dp9_datapath: reconfigurable datapath of the 9-step detector.
//
// One 2x2 INV (7 stages), two 2x2 MULs (2 stages each) and one 2x2 ADD
// (1 stage) are shared by the two operation flows of the 9-step schedule; the
// Sel signal switches the data paths between them:
//   TYPE_B (steps 4, 5): INV -> MUL1 -> MUL2 -> ADD chain
//       inv = inv_x^-1,  m1 = m1_x^H' * inv,  m2 = m1 * m2_y,  add = -/+m2 + add_x
//       e.g. c1 = b11^-1, c2 = b12^H c1, c3 = c2 b12, c4 = b22 - c3.
//   TYPE_A (all other steps): two products combined in the ADD
//       add = -/+(m2_x * m2_y) -/+(m1_x * m1_y) (+ sigma^2 I)
//       e.g. b11 = h11 h11^H + h12 h12^H + sigma^2 I, g11 = c8 h11 - c6 h21.
// In both flows MUL1 works at stage 7 and MUL2 at stage 9, so every result
// leaves after ALPHA = 12 cycles; in Type A the 2-cycle delay unit after MUL1
// lines its product up with MUL2's at the ADD. Delay units of 3 and 5 cycles
// bring the MUL1 and INV results out at the same cycle as the ADD result, so
// a Type B step writes three results (e.g. c1, c2, c4) per subcarrier.
// The stage counts and delay units follow the published circuit; operands are
// taken in one cycle and delayed internally to their stage, which is this
// design's choice.
// Interface: sel and ctl are held constant for a whole step. opnd is sampled
// with in_valid; add_out, mul1_out, inv_out and out_valid appear 12 cycles
// later, one subcarrier per cycle.
module dp9_datapath
  import mmse_pkg::*;
#(
  parameter int ALPHA = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sel_t     sel,
  input  dp9_ctl_t ctl,
  input  fx_t      sigma2,
  input  logic     in_valid,
  input  dp9_in_t  opnd,
  output logic     out_valid,
  output mat2_t    add_out,
  output mat2_t    mul1_out,
  output mat2_t    inv_out
);
  localparam int T_M1  = 7;    // stage where MUL1 starts
  localparam int T_M2  = 9;    // stage where MUL2 starts
  localparam int T_ADD = 11;   // stage where the ADD starts

  mat2_t m1x_d, m1y_d, m2x_d, m2y_d, addx_d;
  delay_line #(.WIDTH(MAT2_W), .D(T_M1))  u_d_m1x (.clk, .rst_n, .din(opnd.m1_x),  .dout(m1x_d));
  delay_line #(.WIDTH(MAT2_W), .D(T_M1))  u_d_m1y (.clk, .rst_n, .din(opnd.m1_y),  .dout(m1y_d));
  delay_line #(.WIDTH(MAT2_W), .D(T_M2))  u_d_m2x (.clk, .rst_n, .din(opnd.m2_x),  .dout(m2x_d));
  delay_line #(.WIDTH(MAT2_W), .D(T_M2))  u_d_m2y (.clk, .rst_n, .din(opnd.m2_y),  .dout(m2y_d));
  delay_line #(.WIDTH(MAT2_W), .D(T_ADD)) u_d_add (.clk, .rst_n, .din(opnd.add_x), .dout(addx_d));

  // 2x2 INV
  logic  inv_v;
  mat2_t inv_q;
  cmat2_inv u_inv (.clk, .rst_n, .in_valid(in_valid), .l(opnd.inv_x),
                   .out_valid(inv_v), .li(inv_q));

  // 2x2 MUL 1: right factor is the INV result in Type B
  logic  m1_v;
  mat2_t m1_y, m1_q;
  assign m1_y = (sel == TYPE_B) ? inv_q : m1y_d;
  cmat2_mul u_mul1 (.clk, .rst_n, .in_valid(inv_v), .x(m1x_d), .y(m1_y),
                    .herm_x(ctl.m1_hx), .herm_y(ctl.m1_hy),
                    .out_valid(m1_v), .p(m1_q));

  // 2x2 MUL 2: left factor is the MUL1 result in Type B
  logic  m2_v;
  mat2_t m2_x, m2_q;
  assign m2_x = (sel == TYPE_B) ? m1_q : m2x_d;
  cmat2_mul u_mul2 (.clk, .rst_n, .in_valid(m1_v), .x(m2_x), .y(m2y_d),
                    .herm_x(ctl.m2_hx), .herm_y(ctl.m2_hy),
                    .out_valid(m2_v), .p(m2_q));

  // delay units printed in the circuit: 2 (MUL1 -> ADD), 3 (MUL1 -> out),
  // 5 (INV -> out)
  mat2_t m1_d2;
  delay_line #(.WIDTH(MAT2_W), .D(2)) u_d2 (.clk, .rst_n, .din(m1_q),  .dout(m1_d2));
  delay_line #(.WIDTH(MAT2_W), .D(3)) u_d3 (.clk, .rst_n, .din(m1_q),  .dout(mul1_out));
  delay_line #(.WIDTH(MAT2_W), .D(5)) u_d5 (.clk, .rst_n, .din(inv_q), .dout(inv_out));

  // 2x2 ADD: second operand is memory data (Type B) or the MUL1 product (Type A)
  mat2_t add_b;
  assign add_b = (sel == TYPE_B) ? addx_d : m1_d2;
  cmat2_add u_add (.clk, .rst_n, .in_valid(m2_v), .a(m2_q), .b(add_b),
                   .neg_a(ctl.neg_a), .neg_b(ctl.neg_b),
                   .add_sigma(ctl.add_sigma), .sigma2(sigma2),
                   .out_valid(out_valid), .s(add_out));

  initial assert (ALPHA == T_ADD + 1) else $error("dp9_datapath latency is 12");
endmodule
