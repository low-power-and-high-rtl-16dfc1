// dwt_idwt_top -- 2-D DWT encoder side and 2-D IDWT decoder side of a
// wavelet image codec, each a single transform module, side by side.
//
// The analysis side (dwt_system) reads an N x N image from an external
// frame memory two pixels per clock and emits the J-level decomposition
// as (LL, LH, HL, HH) quadruples tagged with level, row and column. The
// synthesis side (idwt_system) reads the subbands of a J-level
// decomposition from an external coefficient source (the entropy decoder)
// and emits the reconstructed image two pixels per clock. The entropy
// coder and decoder themselves are outside this design; the two sides share
// only the clock and reset and can run at the same time.
//
// Defaults: N = 8, J = 3, the worked example of the architecture: 42
// clocks of two samples each per transform; busy 54 clocks for the
// analysis and 61 for the synthesis.
//
// Pairing an analysis and a synthesis single transform module follows the
// published architecture; the port set is this design's choice.
module dwt_idwt_top
  import dwt_pkg::*;
#(
  parameter int N = 8,
  parameter int J = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  // analysis side
  input  logic   dwt_start,
  output logic   dwt_busy,
  output logic   dwt_done,
  output logic   img_rd_en,
  output idx_t   img_rd_row,
  output idx_t   img_rd_col,
  input  pair_t  img_rd_data,
  output logic   coef_valid,
  output level_t coef_level,
  output idx_t   coef_row,
  output idx_t   coef_col,
  output quad_t  coef_q,
  // synthesis side
  input  logic   idwt_start,
  output logic   idwt_busy,
  output logic   idwt_done,
  output logic   cin_rd_en,
  output level_t cin_rd_level,
  output idx_t   cin_rd_row,
  output idx_t   cin_rd_col,
  input  quad_t  cin_rd_data,
  output logic   pix_valid,
  output idx_t   pix_row,
  output idx_t   pix_col,
  output pair_t  pix_pair
);

  dwt_system #(.N(N), .J(J)) u_dwt (
    .clk, .rst_n, .start(dwt_start), .busy(dwt_busy), .done(dwt_done),
    .ext_rd_en(img_rd_en), .ext_rd_row(img_rd_row), .ext_rd_col(img_rd_col),
    .ext_rd_data(img_rd_data),
    .out_valid(coef_valid), .out_level(coef_level), .out_row(coef_row),
    .out_col(coef_col), .out_q(coef_q));

  idwt_system #(.N(N), .J(J)) u_idwt (
    .clk, .rst_n, .start(idwt_start), .busy(idwt_busy), .done(idwt_done),
    .ext_rd_en(cin_rd_en), .ext_rd_level(cin_rd_level), .ext_rd_row(cin_rd_row),
    .ext_rd_col(cin_rd_col), .ext_rd_data(cin_rd_data),
    .pix_valid, .pix_row, .pix_col, .pix_pair);

endmodule
