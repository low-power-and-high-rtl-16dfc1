// idwt_vfilt -- vertical (column) synthesis stage of the 2-D IDWT: four
// vertical synthesis filters and their row buffers.
//
// For column c, coefficient row q of the four subbands gives, with the
// previous coefficient row q-1, image-space rows 2q and 2q+1 of the L
// (horizontal-low) and H (horizontal-high) columns. With the time-reversed
// synthesis taps of the orthogonal D4 pair:
//
//   L(2q)   = h1 LL(q-1) + g1 HL(q-1) + h3 LL(q) + g3 HL(q)
//   L(2q+1) = h0 LL(q-1) + g0 HL(q-1) + h2 LL(q) + g2 HL(q)
//   H(2q), H(2q+1): the same with LH in place of LL and HH in place of HL
//
// Row indices are periodic (row -1 is row M-1). The stage is driven by
// commands from the synthesis sequencer, one per clock:
//   COEF (q, c)  coefficients of (q, c) arrive; for q >= 1 row 2q is emitted
//                and row 2q+1 is parked in the odd-row buffer
//   ODD  (q, c)  row 2q+1 of column c is emitted from the odd-row buffer
//   FLE (c)      wrap-around: rows 0 of column c from row M-1 and row 0,
//                row 1 parked
//   FLO (c)      row 1 of column c emitted
// so the stage emits one (L, H) pair per clock, two image rows per
// coefficient row, matching the row synthesis filter's two pixels per clock.
// Buffers: previous coefficient row (4 words per column), first coefficient
// row (4 words) and odd output row (2 words). Outputs are registered.
//
// Column synthesis as the first stage with four vertical filters follows
// the published architecture; the command set and the buffers are this
// design's choices.
module idwt_vfilt
  import dwt_pkg::*;
#(
  parameter int N = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cmd_valid,
  input  vcmd_e  cmd_op,
  input  idx_t   cmd_q,
  input  idx_t   cmd_c,
  input  logic   cmd_last_col,
  input  quad_t  in_q,          // valid with COEF
  output logic   out_valid,
  output idx_t   out_row,
  output idx_t   out_col,
  output logic   out_last_col,
  output lh_t    out_lh
);

  localparam int COLS = N / 2;
  localparam int CW   = (COLS > 1) ? $clog2(COLS) : 1;

  quad_t prev_buf  [COLS];
  quad_t first_buf [COLS];
  lh_t   odd_buf   [COLS];

  logic [CW-1:0] ci;
  quad_t p, cur;
  lh_t   even_c, odd_c;
  logic  is_coef, is_fle, make;

  always_comb begin
    ci      = CW'(cmd_c);
    is_coef = cmd_valid && cmd_op == OP_COEF;
    is_fle  = cmd_valid && cmd_op == OP_FLE;
    make    = (is_coef && cmd_q != '0) || is_fle;
    p       = prev_buf[ci];
    cur     = is_fle ? first_buf[ci] : in_q;
  end

  dwt_fir4 #(.C0(H1), .C1(G1), .C2(H3), .C3(G3)) u_le (
    .x0(p.ll), .x1(p.hl), .x2(cur.ll), .x3(cur.hl), .y(even_c.l));
  dwt_fir4 #(.C0(H0), .C1(G0), .C2(H2), .C3(G2)) u_lo (
    .x0(p.ll), .x1(p.hl), .x2(cur.ll), .x3(cur.hl), .y(odd_c.l));
  dwt_fir4 #(.C0(H1), .C1(G1), .C2(H3), .C3(G3)) u_he (
    .x0(p.lh), .x1(p.hh), .x2(cur.lh), .x3(cur.hh), .y(even_c.h));
  dwt_fir4 #(.C0(H0), .C1(G0), .C2(H2), .C3(G2)) u_ho (
    .x0(p.lh), .x1(p.hh), .x2(cur.lh), .x3(cur.hh), .y(odd_c.h));

  // buffers (no reset: written before read in every schedule)
  always_ff @(posedge clk) begin
    if (is_coef) begin
      prev_buf[ci] <= in_q;
      if (cmd_q == '0) first_buf[ci] <= in_q;
    end
    if (make) odd_buf[ci] <= odd_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_row      <= '0;
      out_col      <= '0;
      out_last_col <= 1'b0;
      out_lh       <= '0;
    end else begin
      out_col      <= cmd_c;
      out_last_col <= cmd_last_col;
      unique case (cmd_op)
        OP_COEF: begin
          out_valid <= cmd_valid && cmd_q != '0;
          out_row   <= cmd_q << 1;
          out_lh    <= even_c;
        end
        OP_ODD: begin
          out_valid <= cmd_valid;
          out_row   <= (cmd_q << 1) + 1'b1;
          out_lh    <= odd_buf[ci];
        end
        OP_FLE: begin
          out_valid <= cmd_valid;
          out_row   <= '0;
          out_lh    <= even_c;
        end
        OP_FLO: begin
          out_valid <= cmd_valid;
          out_row   <= idx_t'(1);
          out_lh    <= odd_buf[ci];
        end
      endcase
    end
  end

endmodule
