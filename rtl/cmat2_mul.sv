// cmat2_mul: pipelined complex 2x2 matrix multiplier ("2x2 MUL").
//
// Computes P = op(X) * op(Y), where op() is either the identity or the
// Hermitian (conjugate) transpose, chosen per operand by herm_x / herm_y. The
// Hermitian option lets the same unit form products such as h11*h11^H and
// b12^H*c1 without a separate transpose step.
//
// Two pipeline stages, the count the published datapath gives for this unit:
//   stage 1 registers the eight complex products at full precision;
//   stage 2 adds them in pairs, rounds to FRAC fraction bits and saturates.
// The split of work between the stages is this implementation's choice.
// Interface: operands and flags are sampled together with in_valid; p and
// out_valid appear LAT = 2 cycles later. One new product per cycle.
module cmat2_mul
  import mmse_pkg::*;
#(
  parameter int LAT = 2     // fixed by the structure; documents the latency
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mat2_t x,
  input  mat2_t y,
  input  logic  herm_x,
  input  logic  herm_y,
  output logic  out_valid,
  output mat2_t p
);
  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } wide_t;

  function automatic wide_t cmul(input cplx_t a, input cplx_t b);
    wide_t r;
    r.re = PW'(a.re * b.re) - PW'(a.im * b.im);
    r.im = PW'(a.re * b.im) + PW'(a.im * b.re);
    return r;
  endfunction

  function automatic cplx_t wsum(input wide_t a, input wide_t b);
    cplx_t r;
    r.re = rnd_sat(a.re + b.re);
    r.im = rnd_sat(a.im + b.im);
    return r;
  endfunction

  mat2_t xo, yo;
  assign xo = herm_x ? herm(x) : x;
  assign yo = herm_y ? herm(y) : y;

  wide_t pr [8];
  logic  v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) pr[i] <= '0;
      v1        <= 1'b0;
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      // stage 1: products
      pr[0] <= cmul(xo.m11, yo.m11);
      pr[1] <= cmul(xo.m12, yo.m21);
      pr[2] <= cmul(xo.m11, yo.m12);
      pr[3] <= cmul(xo.m12, yo.m22);
      pr[4] <= cmul(xo.m21, yo.m11);
      pr[5] <= cmul(xo.m22, yo.m21);
      pr[6] <= cmul(xo.m21, yo.m12);
      pr[7] <= cmul(xo.m22, yo.m22);
      v1    <= in_valid;
      // stage 2: sums, rounding, saturation
      p.m11     <= wsum(pr[0], pr[1]);
      p.m12     <= wsum(pr[2], pr[3]);
      p.m21     <= wsum(pr[4], pr[5]);
      p.m22     <= wsum(pr[6], pr[7]);
      out_valid <= v1;
    end
  end

  initial assert (LAT == 2) else $error("cmat2_mul has exactly two stages");
endmodule
