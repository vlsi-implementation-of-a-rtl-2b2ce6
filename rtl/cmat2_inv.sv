// cmat2_inv: pipelined complex 2x2 matrix inverse ("2x2 INV").
//
// Direct formula:  [l11 l12; l21 l22]^-1 = adj / det,
//   det = l11*l22 - l12*l21,   adj = [l22 -l12; -l21 l11].
// The reciprocal of the complex determinant is formed as conj(det)/|det|^2
// with two integer divisions, kept with 2*FRAC fraction bits so that large
// determinants keep their relative precision, and then multiplied into the
// adjugate. A zero determinant yields saturated values.
//
// Seven pipeline stages, the count of the published datapath:
//   1 products l11*l22, l12*l21      2 det (rounded, saturated)
//   3 |det|^2                        4 divisions -> 1/det
//   5 saturation of 1/det            6 adjugate * (1/det), full precision
//   7 rounding and saturation
// The stage contents are this implementation's choice.
// Interface: l sampled with in_valid; li and out_valid LAT = 7 cycles later.
module cmat2_inv
  import mmse_pkg::*;
#(
  parameter int LAT = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mat2_t l,
  output logic  out_valid,
  output mat2_t li
);
  localparam int RW = W + FRAC;        // 1/det: 2*FRAC fraction bits
  localparam int MW = 2 * W + 2;       // |det|^2, signed container
  localparam int NW = W + 3 * FRAC + 2;// dividend det << 3*FRAC
  localparam int XW = W + RW + 2;      // adjugate * 1/det

  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } wide_t;

  typedef struct packed {
    logic signed [RW-1:0] re;
    logic signed [RW-1:0] im;
  } rcp_t;

  typedef struct packed {
    logic signed [XW-1:0] re;
    logic signed [XW-1:0] im;
  } xw_t;

  function automatic wide_t cmul(input cplx_t a, input cplx_t b);
    wide_t r;
    r.re = PW'(a.re * b.re) - PW'(a.im * b.im);
    r.im = PW'(a.re * b.im) + PW'(a.im * b.re);
    return r;
  endfunction

  function automatic xw_t xmul(input cplx_t a, input rcp_t b);
    xw_t r;
    r.re = XW'(a.re * b.re) - XW'(a.im * b.im);
    r.im = XW'(a.re * b.im) + XW'(a.im * b.re);
    return r;
  endfunction

  function automatic logic signed [RW-1:0] sat_r(input logic signed [NW-1:0] v);
    localparam logic signed [NW-1:0] MAXV = NW'(2**(RW-1) - 1);
    localparam logic signed [NW-1:0] MINV = -NW'(2**(RW-1));
    if (v > MAXV) return RW'(MAXV);
    if (v < MINV) return RW'(MINV);
    return RW'(v);
  endfunction

  // round a product with 3*FRAC fraction bits back to FRAC fraction bits
  function automatic fx_t rnd_x(input logic signed [XW-1:0] v);
    logic signed [XW-1:0] t;
    t = (v + XW'(2**(2*FRAC-1))) >>> (2 * FRAC);
    return sat((PW+FRAC)'(t));
  endfunction

  // pipeline registers
  logic [LAT-1:0]        vld;
  mat2_t                 ld [6];       // l carried along stages 1..6
  wide_t                 p1, p2;       // stage 1
  cplx_t                 det2, det3;   // stage 2, carried to 3
  logic signed [MW-1:0]  mag3;         // stage 3
  logic signed [NW-1:0]  q4re, q4im;   // stage 4
  rcp_t                  r5;           // stage 5
  xw_t                   x6 [4];       // stage 6

  logic signed [NW-1:0] num_re, num_im, den;
  assign num_re = NW'(det3.re) <<< (3 * FRAC);
  assign num_im = -(NW'(det3.im) <<< (3 * FRAC));
  assign den    = NW'(mag3);


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      for (int i = 0; i < 6; i++) ld[i] <= '0;
      p1   <= '0;
      p2   <= '0;
      det2 <= '0;
      det3 <= '0;
      mag3 <= '0;
      q4re <= '0;
      q4im <= '0;
      r5   <= '0;
      for (int i = 0; i < 4; i++) x6[i] <= '0;
      li   <= '0;
    end else begin
      vld <= {vld[LAT-2:0], in_valid};
      ld[0] <= l;
      for (int i = 1; i < 6; i++) ld[i] <= ld[i-1];
      // 1: cross products
      p1 <= cmul(l.m11, l.m22);
      p2 <= cmul(l.m12, l.m21);
      // 2: determinant
      det2.re <= rnd_sat(p1.re - p2.re);
      det2.im <= rnd_sat(p1.im - p2.im);
      // 3: squared magnitude
      det3 <= det2;
      mag3 <= MW'(det2.re * det2.re) + MW'(det2.im * det2.im);
      // 4: conj(det) / |det|^2 with 2*FRAC fraction bits
      if (mag3 == '0) begin
        q4re <= {1'b0, {(NW-1){1'b1}}};
        q4im <= '0;
      end else begin
        q4re <= num_re / den;
        q4im <= num_im / den;
      end
      // 5: limit the reciprocal
      r5.re <= sat_r(q4re);
      r5.im <= sat_r(q4im);
      // 6: adjugate times reciprocal
      x6[0] <= xmul(ld[4].m22, r5);
      x6[1] <= xmul(cneg(ld[4].m12), r5);
      x6[2] <= xmul(cneg(ld[4].m21), r5);
      x6[3] <= xmul(ld[4].m11, r5);
      // 7: back to the word format
      li.m11.re <= rnd_x(x6[0].re);
      li.m11.im <= rnd_x(x6[0].im);
      li.m12.re <= rnd_x(x6[1].re);
      li.m12.im <= rnd_x(x6[1].im);
      li.m21.re <= rnd_x(x6[2].re);
      li.m21.im <= rnd_x(x6[2].im);
      li.m22.re <= rnd_x(x6[3].re);
      li.m22.im <= rnd_x(x6[3].im);
    end
  end
  assign out_valid = vld[LAT-1];

  initial assert (LAT == 7) else $error("cmat2_inv has exactly seven stages");
endmodule
