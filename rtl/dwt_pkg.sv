// dwt_pkg -- types and constants shared by the 2-D DWT and IDWT datapaths.
//
// Filter bank: the 4-tap Daubechies (D4) orthogonal pair, quantized to
// COEF_FRAC = 8 fractional bits and restricted to at most three signed
// power-of-two terms per coefficient, so that every product is formed by
// three hard-wired shifts, one carry-save stage and one adder (see dwt_pe).
//
//   ideal h = [0.48296, 0.83652, 0.22414, -0.12941]
//   h * 256 = [ 118,  216,   63,  -35 ]   118 = 2^7 - 2^3 - 2^1
//                                           216 = 2^8 - 2^5 - 2^3
//                                            63 = 2^6 - 2^0
//                                           -35 = -2^5 - 2^1 - 2^0
//   g(k) = (-1)^k h(3-k) : g * 256 = [ -35, -63, 216, -118 ]
//
// Among the three-term values near the ideal taps this set was picked for
// near-orthonormality (sum h^2 within 0.4 % of 1, h0 h2 + h1 h3 within
// 0.2 %, high-pass DC gain exactly 0), which bounds the analysis/synthesis
// round-trip error.
// The quantized values and the three-term budget are choices of this design;
// the filter family, the quantization before implementation and the
// shift/CSA/adder processing element follow the architecture description.
//
// Sample words are DATA_W-bit two's complement. Pixels enter as unsigned
// 8-bit values zero-extended to DATA_W; 16 bits leave headroom for the gain
// of about 2 per analysis level (the LL band of a 3-level transform of an
// 8-bit image stays below 2^12).
package dwt_pkg;

  localparam int DATA_W    = 16;  // sample / coefficient word width
  localparam int COEF_FRAC = 8;   // fractional bits of the filter taps
  localparam int ACC_W     = DATA_W + COEF_FRAC + 4;  // width of sums of products
  localparam int IDX_W     = 12;  // row / column tag width (images up to 4096 wide)

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [IDX_W-1:0]         idx_t;
  typedef logic [2:0]               level_t;   // decomposition level 1..7

  // Two horizontally adjacent samples x(2p), x(2p+1).
  typedef struct packed {
    sample_t e;
    sample_t o;
  } pair_t;

  // Low-pass and high-pass output of one horizontal filter step.
  typedef struct packed {
    sample_t l;
    sample_t h;
  } lh_t;

  // The four subband coefficients at one position.
  typedef struct packed {
    sample_t ll;
    sample_t lh;  // horizontal high, vertical low
    sample_t hl;  // horizontal low,  vertical high
    sample_t hh;
  } quad_t;

  // Commands of the synthesis sequencer to the vertical synthesis stage
  // (see idwt_vfilt).
  typedef enum logic [1:0] {
    OP_COEF,  // coefficients of (q, c) arrive; emit row 2q, park row 2q+1
    OP_ODD,   // emit parked row 2q+1
    OP_FLE,   // wrap-around: emit row 0
    OP_FLO    // wrap-around: emit row 1
  } vcmd_e;

  typedef enum logic [2:0] {H0, H1, H2, H3, G0, G1, G2, G3} coef_e;

  // One signed power-of-two term of a quantized coefficient.
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [3:0] shift;
  } term_t;

  // Term i (0..2) of coefficient c, value = sum over i of +/- 2^shift.
  function automatic term_t coef_term(coef_e c, logic [1:0] i);
    term_t t [3];
    case (c)
      H0:      t = '{'{1'b1, 1'b0, 4'd7}, '{1'b1, 1'b1, 4'd3}, '{1'b1, 1'b1, 4'd1}};
      H1:      t = '{'{1'b1, 1'b0, 4'd8}, '{1'b1, 1'b1, 4'd5}, '{1'b1, 1'b1, 4'd3}};
      H2:      t = '{'{1'b1, 1'b0, 4'd6}, '{1'b1, 1'b1, 4'd0}, '{1'b0, 1'b0, 4'd0}};
      H3:      t = '{'{1'b1, 1'b1, 4'd5}, '{1'b1, 1'b1, 4'd1}, '{1'b1, 1'b1, 4'd0}};
      G0:      t = '{'{1'b1, 1'b1, 4'd5}, '{1'b1, 1'b1, 4'd1}, '{1'b1, 1'b1, 4'd0}};
      G1:      t = '{'{1'b1, 1'b1, 4'd6}, '{1'b1, 1'b0, 4'd0}, '{1'b0, 1'b0, 4'd0}};
      G2:      t = '{'{1'b1, 1'b0, 4'd8}, '{1'b1, 1'b1, 4'd5}, '{1'b1, 1'b1, 4'd3}};
      default: t = '{'{1'b1, 1'b1, 4'd7}, '{1'b1, 1'b0, 4'd3}, '{1'b1, 1'b0, 4'd1}};
    endcase
    return t[i];
  endfunction

  // Round-half-up removal of the COEF_FRAC fractional bits of a sum.
  // The result must fit DATA_W bits; the filter gains keep it there.
  function automatic sample_t round_frac(acc_t s);
    return sample_t'((s + acc_t'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC);
  endfunction

endpackage
