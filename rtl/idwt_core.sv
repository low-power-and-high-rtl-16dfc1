// idwt_core -- the 2-D IDWT transform module: four vertical synthesis
// filters (column stage first) feeding the horizontal synthesis filters.
//
// Takes one command per clock from the synthesis sequencer, with the
// coefficients it names (see idwt_vfilt), and produces two reconstructed
// samples per clock, tagged with image row and pair index. Latency from a command to the
// pixel pair it completes is 2 clocks (3 for pair 0 of a row).
//
// The column-then-row order follows the published architecture; the
// command interface is this design's choice.
module idwt_core
  import dwt_pkg::*;
#(
  parameter int N = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  vcmd_e      cmd_op,
  input  idx_t       cmd_q,
  input  idx_t       cmd_c,
  input  logic       cmd_last_col,
  input  quad_t      in_q,
  output logic       out_valid,
  output idx_t       out_row,
  output idx_t       out_col,
  output pair_t      out_pair
);

  logic v_valid, v_last_col;
  idx_t v_row, v_col;
  lh_t  v_lh;

  idwt_vfilt #(.N(N)) u_vfilt (
    .clk, .rst_n, .cmd_valid, .cmd_op, .cmd_q, .cmd_c, .cmd_last_col, .in_q,
    .out_valid(v_valid), .out_row(v_row), .out_col(v_col),
    .out_last_col(v_last_col), .out_lh(v_lh));

  idwt_hfilt u_hfilt (
    .clk, .rst_n,
    .in_valid(v_valid), .in_row(v_row), .in_col(v_col),
    .in_last_col(v_last_col), .in_lh(v_lh),
    .out_valid, .out_row, .out_col, .out_pair);

endmodule
