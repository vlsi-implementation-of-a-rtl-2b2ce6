// cmat2_add: complex 2x2 matrix adder/subtracter ("2x2 ADD"), one stage.
//
// s = (neg_a ? -a : a) + (neg_b ? -b : b) + (add_sigma ? sigma2 * I : 0)
// Element-wise with saturation to W bits. The sigma^2 * I term of the MMSE
// regularisation is added here on the real part of the diagonal; the
// published design only says this addition is cheap, so placing it in the
// adder is this implementation's choice.
// Interface: inputs sampled with in_valid, s and out_valid one cycle later.
module cmat2_add
  import mmse_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mat2_t a,
  input  mat2_t b,
  input  logic  neg_a,
  input  logic  neg_b,
  input  logic  add_sigma,
  input  fx_t   sigma2,
  output logic  out_valid,
  output mat2_t s
);
  localparam int SW = W + 3;

  function automatic fx_t add3(input fx_t p, input fx_t q, input logic np,
                               input logic nq, input fx_t r);
    logic signed [SW-1:0] t;
    t = (np ? -SW'(p) : SW'(p)) + (nq ? -SW'(q) : SW'(q)) + SW'(r);
    return sat((PW+FRAC)'(t));
  endfunction

  fx_t sg;
  assign sg = add_sigma ? sigma2 : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= '0;
      out_valid <= 1'b0;
    end else begin
      s.m11.re  <= add3(a.m11.re, b.m11.re, neg_a, neg_b, sg);
      s.m11.im  <= add3(a.m11.im, b.m11.im, neg_a, neg_b, '0);
      s.m12.re  <= add3(a.m12.re, b.m12.re, neg_a, neg_b, '0);
      s.m12.im  <= add3(a.m12.im, b.m12.im, neg_a, neg_b, '0);
      s.m21.re  <= add3(a.m21.re, b.m21.re, neg_a, neg_b, '0);
      s.m21.im  <= add3(a.m21.im, b.m21.im, neg_a, neg_b, '0);
      s.m22.re  <= add3(a.m22.re, b.m22.re, neg_a, neg_b, sg);
      s.m22.im  <= add3(a.m22.im, b.m22.im, neg_a, neg_b, '0);
      out_valid <= in_valid;
    end
  end
endmodule
