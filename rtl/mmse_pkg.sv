// mmse_pkg: shared number format, matrix types and arithmetic helpers of the
// scalable pipeline MMSE detector.
//
// Every value is a complex number with W-bit two's-complement real and
// imaginary parts; FRAC of those bits are fraction (Q11.12 at the defaults).
// The 24-bit word length is the design's published figure; the split into
// integer and fraction bits is this implementation's choice. Arithmetic helpers
// round to nearest and saturate on the way back to W bits.
//
// Matrices are handled as 2x2 blocks (mat2_t); a 4x4 channel or filter matrix
// is four such blocks (mat4_t), the partition used by Strassen's inversion.
package mmse_pkg;

  localparam int W    = 24;            // word length of every real component
  localparam int FRAC = 12;            // fraction bits
  localparam int PW   = 2 * W + 2;     // width of a sum of two full products

  typedef logic signed [W-1:0] fx_t;

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  typedef struct packed {
    cplx_t m11;
    cplx_t m12;
    cplx_t m21;
    cplx_t m22;
  } mat2_t;

  typedef struct packed {
    mat2_t b11;
    mat2_t b12;
    mat2_t b21;
    mat2_t b22;
  } mat4_t;

  localparam int MAT2_W = $bits(mat2_t);

  // Operation flow selected by the reconfiguration signal "Sel".
  typedef enum logic {
    TYPE_A = 1'b0,    // two products added: X1*Y1 +/- X2*Y2
    TYPE_B = 1'b1     // chain: INV -> MUL -> MUL -> ADD
  } sel_t;

  // Operands of one subcarrier for the 9-step datapath, all presented in the
  // same cycle. Unused fields are ignored by the selected flow.
  typedef struct packed {
    mat2_t inv_x;     // input of the 2x2 INV            (Type B)
    mat2_t m1_x;      // left factor of MUL1             (Type A and B)
    mat2_t m1_y;      // right factor of MUL1            (Type A; B uses INV)
    mat2_t m2_x;      // left factor of MUL2             (Type A; B uses MUL1)
    mat2_t m2_y;      // right factor of MUL2            (Type A and B)
    mat2_t add_x;     // second operand of the ADD       (Type B; A uses MUL1)
  } dp9_in_t;

  // Per-step configuration of the 9-step datapath besides Sel.
  typedef struct packed {
    logic m1_hx;      // MUL1 uses m1_x^H
    logic m1_hy;      // MUL1 uses its right factor ^H
    logic m2_hx;      // MUL2 uses its left factor ^H
    logic m2_hy;      // MUL2 uses m2_y^H
    logic neg_a;      // ADD negates the MUL2 product
    logic neg_b;      // ADD negates its second operand
    logic add_sigma;  // ADD adds sigma^2 * I
  } dp9_ctl_t;

  // Saturate a wide signed value to W bits.
  function automatic fx_t sat(input logic signed [PW+FRAC-1:0] v);
    localparam logic signed [PW+FRAC-1:0] MAXV = (PW+FRAC)'(2**(W-1) - 1);
    localparam logic signed [PW+FRAC-1:0] MINV = -(PW+FRAC)'(2**(W-1));
    if (v > MAXV) return fx_t'(MAXV);
    if (v < MINV) return fx_t'(MINV);
    return fx_t'(v);
  endfunction

  // Round a value with 2*FRAC fraction bits to FRAC fraction bits and saturate.
  function automatic fx_t rnd_sat(input logic signed [PW-1:0] v);
    logic signed [PW+FRAC-1:0] t;
    t = (PW+FRAC)'(v) + (PW+FRAC)'(2**(FRAC-1));
    return sat(t >>> FRAC);
  endfunction

  function automatic cplx_t conj(input cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = sat(-(PW+FRAC)'(a.im));
    return r;
  endfunction

  // Hermitian transpose of a 2x2 block.
  function automatic mat2_t herm(input mat2_t a);
    mat2_t r;
    r.m11 = conj(a.m11);
    r.m12 = conj(a.m21);
    r.m21 = conj(a.m12);
    r.m22 = conj(a.m22);
    return r;
  endfunction

  function automatic cplx_t cneg(input cplx_t a);
    cplx_t r;
    r.re = sat(-(PW+FRAC)'(a.re));
    r.im = sat(-(PW+FRAC)'(a.im));
    return r;
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = sat((PW+FRAC)'(a.re) + (PW+FRAC)'(b.re));
    r.im = sat((PW+FRAC)'(a.im) + (PW+FRAC)'(b.im));
    return r;
  endfunction

endpackage
