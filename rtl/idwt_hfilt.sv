// idwt_hfilt -- horizontal (row) synthesis filter of the 2-D IDWT.
//
// Takes one (L(c), H(c)) pair of a row per clock and produces the two
// reconstructed samples x(2c), x(2c+1) per clock:
//
//   x(2c)   = h1 L(c-1) + g1 H(c-1) + h3 L(c) + g3 H(c)
//   x(2c+1) = h0 L(c-1) + g0 H(c-1) + h2 L(c) + g2 H(c)
//
// with periodic extension L(-1) = L(M-1). Pair c >= 1 is formed when column
// c arrives; pair 0 needs the row's last column and is formed in the clock
// after it from the saved first column (the slot where the next row's first
// column produces nothing), so the output keeps pace with the input.
// Output is registered: valid, row, pair index, the pixel pair.
//
// Row synthesis as the second stage follows the published architecture;
// the tap alignment and the deferred pair 0 are this design's choices.
module idwt_hfilt
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  idx_t   in_row,
  input  idx_t   in_col,
  input  logic   in_last_col,
  input  lh_t    in_lh,
  output logic   out_valid,
  output idx_t   out_row,
  output idx_t   out_col,
  output pair_t  out_pair
);

  lh_t   prev_q, first_q;
  logic  pend_q;
  idx_t  pend_row_q;
  lh_t   cur;
  pair_t px;

  assign cur = pend_q ? first_q : in_lh;

  dwt_fir4 #(.C0(H1), .C1(G1), .C2(H3), .C3(G3)) u_even (
    .x0(prev_q.l), .x1(prev_q.h), .x2(cur.l), .x3(cur.h), .y(px.e));
  dwt_fir4 #(.C0(H0), .C1(G0), .C2(H2), .C3(G2)) u_odd (
    .x0(prev_q.l), .x1(prev_q.h), .x2(cur.l), .x3(cur.h), .y(px.o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q     <= '0;
      first_q    <= '0;
      pend_q     <= 1'b0;
      pend_row_q <= '0;
      out_valid  <= 1'b0;
      out_row    <= '0;
      out_col    <= '0;
      out_pair   <= '0;
    end else begin
      out_pair <= px;
      if (pend_q) begin
        out_valid <= 1'b1;
        out_row   <= pend_row_q;
        out_col   <= '0;
      end else begin
        out_valid <= in_valid && in_col != '0;
        out_row   <= in_row;
        out_col   <= in_col;
      end
      if (in_valid) begin
        prev_q <= in_lh;
        if (in_col == '0) first_q <= in_lh;
      end
      pend_q     <= in_valid && in_last_col;
      pend_row_q <= in_row;
    end
  end

  a_wrap_slot : assert property (@(posedge clk) disable iff (!rst_n)
    pend_q && in_valid |-> in_col == '0);

endmodule
