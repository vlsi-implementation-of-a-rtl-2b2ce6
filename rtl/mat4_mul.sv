// mat4_mul: the "4x4 MUL" unit of the 2-step detector.
//
// Eight 2x2 MULs feed four 2x2 ADDs; output block j is
//   o_j = -/+(X1_j * Y1_j) -/+(X2_j * Y2_j) (+ sigma^2 I).
// Sel chooses what the unit computes on the channel matrix A = [a11 a12; a21 a22]:
//   TYPE_A (first step): the needed blocks of A A^H + sigma^2 I
//       o11 = a11 a11^H + a12 a12^H + sigma^2 I   (b11)
//       o12 = a11 a21^H + a12 a22^H              (b12)
//       o22 = a21 a21^H + a22 a22^H + sigma^2 I   (b22)
//       o21 is not needed (b21 = b12^H); its MUL pair is idle and o21 = 0.
//   TYPE_B (second step): G = [c8 -c6; -c6^H c5] * A
//       o11 = c8 a11 - c6 a21      o12 = c8 a12 - c6 a22
//       o21 = -c6^H a11 + c5 a21   o22 = -c6^H a12 + c5 a22
// Three pipeline stages (MUL 2 + ADD 1), as published.
// Interface: sel is held for the whole step; operands sampled with in_valid;
// o and out_valid three cycles later.
module mat4_mul
  import mmse_pkg::*;
#(
  parameter int LAT = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  sel_t  sel,
  input  logic  in_valid,
  input  mat4_t a,
  input  mat2_t c5,
  input  mat2_t c6,
  input  mat2_t c8,
  input  fx_t   sigma2,
  output logic  out_valid,
  output mat4_t o
);
  mat2_t x1 [4], y1 [4], x2 [4], y2 [4];
  logic  hx1 [4], hy2 [4], hx2 [4], hy1 [4];
  logic  n1 [4], n2 [4], sg [4];

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      hx1[j] = 1'b0; hy1[j] = 1'b0; hx2[j] = 1'b0; hy2[j] = 1'b0;
      n1[j]  = 1'b0; n2[j]  = 1'b0; sg[j]  = 1'b0;
    end
    if (sel == TYPE_A) begin
      x1[0] = a.b11; y1[0] = a.b11; x2[0] = a.b12; y2[0] = a.b12; sg[0] = 1'b1;
      x1[1] = a.b11; y1[1] = a.b21; x2[1] = a.b12; y2[1] = a.b22;
      x1[2] = '0;    y1[2] = '0;    x2[2] = '0;    y2[2] = '0;
      x1[3] = a.b21; y1[3] = a.b21; x2[3] = a.b22; y2[3] = a.b22; sg[3] = 1'b1;
      for (int j = 0; j < 4; j++) begin
        hy1[j] = 1'b1;
        hy2[j] = 1'b1;
      end
    end else begin
      x1[0] = c8; y1[0] = a.b11; x2[0] = c6; y2[0] = a.b21; n2[0] = 1'b1;
      x1[1] = c8; y1[1] = a.b12; x2[1] = c6; y2[1] = a.b22; n2[1] = 1'b1;
      x1[2] = c6; y1[2] = a.b11; x2[2] = c5; y2[2] = a.b21; n1[2] = 1'b1; hx1[2] = 1'b1;
      x1[3] = c6; y1[3] = a.b12; x2[3] = c5; y2[3] = a.b22; n1[3] = 1'b1; hx1[3] = 1'b1;
    end
  end

  // flags must travel with the data through the two MUL stages
  logic n1_d [4], n2_d [4], sg_d [4];
  logic [1:0][11:0] fl_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fl_sr <= '0;
    else begin
      for (int j = 0; j < 4; j++) fl_sr[0][3*j +: 3] <= {n1[j], n2[j], sg[j]};
      fl_sr[1] <= fl_sr[0];
    end
  end
  always_comb
    for (int j = 0; j < 4; j++) {n1_d[j], n2_d[j], sg_d[j]} = fl_sr[1][3*j +: 3];

  mat2_t p1 [4], p2 [4], s [4];
  logic  v1 [4], v2 [4], vs [4];

  for (genvar j = 0; j < 4; j++) begin : g_blk
    cmat2_mul u_m1 (.clk, .rst_n, .in_valid(in_valid), .x(x1[j]), .y(y1[j]),
                    .herm_x(hx1[j]), .herm_y(hy1[j]), .out_valid(v1[j]), .p(p1[j]));
    cmat2_mul u_m2 (.clk, .rst_n, .in_valid(in_valid), .x(x2[j]), .y(y2[j]),
                    .herm_x(hx2[j]), .herm_y(hy2[j]), .out_valid(v2[j]), .p(p2[j]));
    cmat2_add u_a  (.clk, .rst_n, .in_valid(v1[j] & v2[j]), .a(p1[j]), .b(p2[j]),
                    .neg_a(n1_d[j]), .neg_b(n2_d[j]), .add_sigma(sg_d[j]),
                    .sigma2(sigma2), .out_valid(vs[j]), .s(s[j]));
  end

  assign o.b11     = s[0];
  assign o.b12     = s[1];
  assign o.b21     = s[2];
  assign o.b22     = s[3];
  assign out_valid = vs[0];

  initial assert (LAT == 3) else $error("mat4_mul latency is 3");
endmodule
