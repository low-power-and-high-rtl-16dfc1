// dwt_vfilt -- vertical (column) analysis stage of the 2-D DWT: four
// vertical filters (LL, LH, HL, HH) with their line buffers.
//
// Input is the row filter's stream: one (L, H) pair per clock for row r,
// column c. Vertical decimation pairs the rows; output row m combines rows
// 2m .. 2m+3 of both the L and the H columns:
//
//   LL(m,c) = h0 L(2m+3,c) + h1 L(2m+2,c) + h2 L(2m+1,c) + h3 L(2m,c)
//   HL(m,c) = same taps g0..g3 on the L column
//   LH(m,c), HH(m,c) = h and g taps on the H column
//
// Five row buffers of W/2 (L, H) entries each hold: the even row of the
// current row pair (E), the previous row pair (P0, P1) and the first row
// pair of the image (F0, F1) for periodic extension at the bottom edge.
// When an odd row 2m+3 streams in, all four outputs of column c are formed
// in the same clock from P0, P1, E and the incoming pair, so the stage emits
// four coefficients per clock during odd rows and rests during even rows.
// After the image's last input the stage runs a flush of W/2 clocks on its
// own, producing the wrap-around row m = H/2-1 from P0, P1, F0 and F1.
// Rows 0 and 1 of the next (half-size) image may already stream in during
// the flush, as long as each column arrives no earlier than the flush
// reads it (asserted); they only fill buffers and produce no output, so
// the flush hides behind the next level's first row pair. out_done marks
// the flush's last output.
//
// All outputs are registered. Periodic extension, the four vertical filters
// and the line buffers follow the architecture description; the buffer
// organisation and the flush schedule are this design's choices.
module dwt_vfilt
  import dwt_pkg::*;
#(
  parameter int N = 8   // widest image row handled (level-1 width)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  idx_t   in_row,
  input  idx_t   in_col,
  input  lh_t    in_lh,
  input  logic   in_last,   // last (row, column) of the image
  output logic   busy,      // flush in progress
  output logic   out_valid,
  output idx_t   out_row,
  output idx_t   out_col,
  output quad_t  out_q,
  output logic   out_done
);

  localparam int COLS = N / 2;
  localparam int CW   = (COLS > 1) ? $clog2(COLS) : 1;

  lh_t e_buf  [COLS];
  lh_t p0_buf [COLS];
  lh_t p1_buf [COLS];
  lh_t f0_buf [COLS];
  lh_t f1_buf [COLS];

  logic  fl_q;
  idx_t  fl_col_q, fl_ncol_q, fl_m_q;

  logic [CW-1:0] ci, wi;
  lh_t ra, rb, rc, rd;   // rows 2m, 2m+1, 2m+2, 2m+3
  quad_t q_c;
  logic  emit;

  always_comb begin
    ci = fl_q ? CW'(fl_col_q) : CW'(in_col);
    wi = CW'(in_col);
    ra = p0_buf[ci];
    rb = p1_buf[ci];
    rc = fl_q ? f0_buf[ci] : e_buf[ci];
    rd = fl_q ? f1_buf[ci] : in_lh;
    emit = fl_q || (in_valid && in_row[0] && in_row >= idx_t'(3));
  end

  dwt_fir4 #(.C0(H0), .C1(H1), .C2(H2), .C3(H3)) u_ll (
    .x0(rd.l), .x1(rc.l), .x2(rb.l), .x3(ra.l), .y(q_c.ll));
  dwt_fir4 #(.C0(G0), .C1(G1), .C2(G2), .C3(G3)) u_hl (
    .x0(rd.l), .x1(rc.l), .x2(rb.l), .x3(ra.l), .y(q_c.hl));
  dwt_fir4 #(.C0(H0), .C1(H1), .C2(H2), .C3(H3)) u_lh (
    .x0(rd.h), .x1(rc.h), .x2(rb.h), .x3(ra.h), .y(q_c.lh));
  dwt_fir4 #(.C0(G0), .C1(G1), .C2(G2), .C3(G3)) u_hh (
    .x0(rd.h), .x1(rc.h), .x2(rb.h), .x3(ra.h), .y(q_c.hh));

  // line buffers (no reset: every entry is written before it is read).
  // Rows 0 and 1 of the next image may arrive while the flush still reads
  // P0/P1/F0/F1: column c is then written no earlier than the clock in
  // which the flush reads it, so the flush always sees the old contents.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (!in_row[0]) begin
        e_buf[wi] <= in_lh;
        if (in_row == '0) f0_buf[wi] <= in_lh;
      end else begin
        if (in_row == idx_t'(1)) f1_buf[wi] <= in_lh;
        p0_buf[wi] <= e_buf[wi];
        p1_buf[wi] <= in_lh;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_q      <= 1'b0;
      fl_col_q  <= '0;
      fl_ncol_q <= '0;
      fl_m_q    <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_q     <= '0;
      out_done  <= 1'b0;
    end else begin
      out_valid <= emit;
      out_q     <= q_c;
      out_col   <= fl_q ? fl_col_q : in_col;
      out_row   <= fl_q ? fl_m_q : (in_row >> 1) - 1'b1;
      out_done  <= fl_q && (fl_col_q == fl_ncol_q);
      if (fl_q) begin
        if (fl_col_q == fl_ncol_q) fl_q <= 1'b0;
        fl_col_q <= fl_col_q + 1'b1;
      end else if (in_valid && in_last) begin
        fl_q      <= 1'b1;
        fl_col_q  <= '0;
        fl_ncol_q <= in_col;       // W/2 - 1
        fl_m_q    <= in_row >> 1;  // H/2 - 1
      end
    end
  end

  assign busy = fl_q;

  // during a flush only rows 0 and 1 of the next image may enter, and only
  // behind the flush's column
  a_overlap_rows : assert property (@(posedge clk) disable iff (!rst_n)
    (fl_q && in_valid) |-> (in_row <= idx_t'(1) && !in_last));
  a_overlap_order : assert property (@(posedge clk) disable iff (!rst_n)
    (fl_q && in_valid) |-> (in_col <= fl_col_q));

endmodule
