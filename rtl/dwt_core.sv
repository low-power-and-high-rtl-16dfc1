// dwt_core -- the 2-D DWT transform module: one row (horizontal) filter
// pair feeding the four vertical filters.
//
// Accepts two input samples per clock (one horizontal pair) in row-major
// order and produces one output position, i.e. the four coefficients
// LL, LH, HL, HH of (m, c), per clock during odd input rows. One level of
// decomposition of a W x H image therefore takes W*H/2 input clocks, plus the
// horizontal wrap slot (1 clock) and the vertical wrap-around flush (W/2
// clocks) after the last pair; the first row pair of the next image may
// already stream in during that flush (busy high). Latency from a row-2m+3
// pair to its outputs is 2 clocks.
//
// The same module processes every level: the level size is carried only by
// the row/column tags and the last-pair flags of the input stream.
//
// The split into a row stage followed by four column filters follows the
// published architecture; the stream tagging is this design's choice.
module dwt_core
  import dwt_pkg::*;
#(
  parameter int N = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pair_t  in_pair,
  input  idx_t   in_row,
  input  idx_t   in_col,
  input  logic   in_last_col,
  input  logic   in_last_row,
  output logic   busy,
  output logic   out_valid,
  output idx_t   out_row,
  output idx_t   out_col,
  output quad_t  out_q,
  output logic   out_done
);

  logic h_valid, h_last;
  idx_t h_row, h_col;
  lh_t  h_lh;

  dwt_hfilt u_hfilt (
    .clk, .rst_n,
    .in_valid, .in_pair, .in_row, .in_col, .in_last_col, .in_last_row,
    .out_valid(h_valid), .out_row(h_row), .out_col(h_col), .out_lh(h_lh),
    .out_last(h_last));

  dwt_vfilt #(.N(N)) u_vfilt (
    .clk, .rst_n,
    .in_valid(h_valid), .in_row(h_row), .in_col(h_col), .in_lh(h_lh),
    .in_last(h_last), .busy,
    .out_valid, .out_row, .out_col, .out_q, .out_done);

endmodule
