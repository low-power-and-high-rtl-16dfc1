// dwt_pe -- multiplierless processing element: y = COEF * x.
//
// The constant tap COEF (a quantized D4 coefficient, scaled by 2^COEF_FRAC)
// is a sum of at most three signed powers of two (dwt_pkg::coef_term). The
// three terms come from hard-wired shifts of x; a 3:2 carry-save stage
// compresses them to a sum and a carry word and one carry-propagate adder
// adds those. Subtracted terms enter as their two's complement.
//
// Purely combinational. Interface: x (DATA_W signed), y (ACC_W signed, exact
// product, no rounding). The shift/CSA/adder structure follows the
// architecture description; the term tables are this design's quantization.
module dwt_pe
  import dwt_pkg::*;
#(
  parameter coef_e COEF = H0
) (
  input  sample_t x,
  output acc_t    y
);

  acc_t xe;
  acc_t t0, t1, t2;
  acc_t csa_s, csa_c;

  assign xe = acc_t'(x);

  // Hard-wired shifter for one term.
  function automatic acc_t shifted(acc_t v, term_t t);
    acc_t s;
    s = v <<< t.shift;
    if (!t.en)     return '0;
    else if (t.neg) return -s;
    else           return s;
  endfunction

  always_comb begin
    t0    = shifted(xe, coef_term(COEF, 2'd0));
    t1    = shifted(xe, coef_term(COEF, 2'd1));
    t2    = shifted(xe, coef_term(COEF, 2'd2));
    // carry-save adder: three operands to two
    csa_s = t0 ^ t1 ^ t2;
    csa_c = ((t0 & t1) | (t0 & t2) | (t1 & t2)) <<< 1;
    // final adder
    y     = csa_s + csa_c;
  end

endmodule
