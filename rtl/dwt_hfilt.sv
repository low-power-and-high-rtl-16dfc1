// dwt_hfilt -- horizontal (row) analysis filter of the 2-D DWT.
//
// Takes one pair of horizontally adjacent samples x(2p), x(2p+1) per clock
// and produces the decimated low-pass and high-pass outputs of the row,
// one (L, H) pair per clock, using the even/odd (polyphase) split: no output
// sample is ever computed only to be discarded by the decimator.
//
//   L(c) = h0 x(2c+3) + h1 x(2c+2) + h2 x(2c+1) + h3 x(2c)
//   H(c) = g0 x(2c+3) + g1 x(2c+2) + g2 x(2c+1) + g3 x(2c)
//
// Row borders use periodic extension: x(W) = x(0), x(W+1) = x(1). The first
// pair of each row is held in a register; the last output of the row,
// column W/2-1, combines the last pair with that saved first pair and is
// issued in the clock after the last pair (which is the slot in which the
// next row's first pair produces nothing), so a continuous stream of pairs
// gives a continuous stream of outputs. Output column c of a row therefore
// appears when pair c+1 arrives, and the wrap-around column one clock after
// the row's last pair.
//
// Interface: in_* valid/row/pair index/last-pair-of-row/last-row flags; the
// stream has no back-pressure. out_* is registered: valid, row, column,
// (L, H) and out_last marking the final output of the image.
//
// The even/odd split and periodic extension follow the published
// architecture; the wrap-slot scheduling and the register layout are this
// design's choices.
module dwt_hfilt
  import dwt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  pair_t   in_pair,
  input  idx_t    in_row,
  input  idx_t    in_col,       // pair index p
  input  logic    in_last_col,  // p == W/2-1
  input  logic    in_last_row,
  output logic    out_valid,
  output idx_t    out_row,
  output idx_t    out_col,
  output lh_t     out_lh,
  output logic    out_last
);

  pair_t prev_q, first_q;
  logic  pend_q, pend_last_row_q;
  idx_t  pend_row_q, pend_col_q;

  pair_t a, b;       // a: pair c, b: pair c+1 (mod W/2)
  sample_t l_c, h_c;

  always_comb begin
    a = prev_q;
    b = pend_q ? first_q : in_pair;
  end

  dwt_fir4 #(.C0(H0), .C1(H1), .C2(H2), .C3(H3)) u_low (
    .x0(b.o), .x1(b.e), .x2(a.o), .x3(a.e), .y(l_c));
  dwt_fir4 #(.C0(G0), .C1(G1), .C2(G2), .C3(G3)) u_high (
    .x0(b.o), .x1(b.e), .x2(a.o), .x3(a.e), .y(h_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q          <= '0;
      first_q         <= '0;
      pend_q          <= 1'b0;
      pend_last_row_q <= 1'b0;
      pend_row_q      <= '0;
      pend_col_q      <= '0;
      out_valid       <= 1'b0;
      out_row         <= '0;
      out_col         <= '0;
      out_lh          <= '0;
      out_last        <= 1'b0;
    end else begin
      // output stage
      out_lh <= '{l: l_c, h: h_c};
      if (pend_q) begin
        out_valid <= 1'b1;
        out_row   <= pend_row_q;
        out_col   <= pend_col_q;
        out_last  <= pend_last_row_q;
      end else if (in_valid && in_col != '0) begin
        out_valid <= 1'b1;
        out_row   <= in_row;
        out_col   <= in_col - 1'b1;
        out_last  <= 1'b0;
      end else begin
        out_valid <= 1'b0;
        out_last  <= 1'b0;
      end
      // state
      if (in_valid) begin
        prev_q <= in_pair;
        if (in_col == '0) first_q <= in_pair;
      end
      pend_q          <= in_valid && in_last_col;
      pend_row_q      <= in_row;
      pend_col_q      <= in_col;
      pend_last_row_q <= in_last_row;
    end
  end

  // The wrap-around slot may only meet the first pair of the next row.
  a_wrap_slot : assert property (@(posedge clk) disable iff (!rst_n)
    pend_q && in_valid |-> in_col == '0);

endmodule
