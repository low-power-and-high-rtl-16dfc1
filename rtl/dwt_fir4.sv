// dwt_fir4 -- four-tap sum of products with constant taps, rounded.
//
// y = round( (C0*x0 + C1*x1 + C2*x2 + C3*x3) / 2^COEF_FRAC ), each product
// formed by a dwt_pe shift-add element. This is the arithmetic core of every
// filter in the analysis and synthesis datapaths; which taps and which
// samples are paired is decided by the instantiating filter. Combinational.
//
// Shift-add products follow the published processing element; the
// round-half-up after the sum is this design's choice.
module dwt_fir4
  import dwt_pkg::*;
#(
  parameter coef_e C0 = H0,
  parameter coef_e C1 = H1,
  parameter coef_e C2 = H2,
  parameter coef_e C3 = H3
) (
  input  sample_t x0,
  input  sample_t x1,
  input  sample_t x2,
  input  sample_t x3,
  output sample_t y
);

  acc_t p0, p1, p2, p3;

  dwt_pe #(.COEF(C0)) u_pe0 (.x(x0), .y(p0));
  dwt_pe #(.COEF(C1)) u_pe1 (.x(x1), .y(p1));
  dwt_pe #(.COEF(C2)) u_pe2 (.x(x2), .y(p2));
  dwt_pe #(.COEF(C3)) u_pe3 (.x(x3), .y(p3));

  assign y = round_frac(p0 + p1 + p2 + p3);

endmodule
