// tb_dwt_vfilt -- checks the four vertical analysis filters and their row
// buffers: streams random (L, H) images of 8, 4 and 2 rows (4, 2, 1
// columns), back to back with and without idle gaps, and compares every
// LL/LH/HL/HH with an integer reference of the periodic column filters.
// Checks timing too: outputs of row m one clock after row 2m+3 enters, and
// the wrap-around row m = H/2-1 from the self-started flush, column c at
// 2 + c clocks after the last input, with out_done on its last column and
// busy high during the flush. In the last passes the 4-row image starts in
// the clock after the 8-row image's last input, so its first row pair
// enters while the flush still runs; the flush results must be unaffected.
module tb_dwt_vfilt;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int H [4] = '{118, 216, 63, -35};
  localparam int G [4] = '{-35, -63, 216, -118};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  idx_t in_row = '0, in_col = '0;
  lh_t in_lh = '0;
  logic busy, out_valid, out_done;
  idx_t out_row, out_col;
  quad_t out_q;

  always #5 clk = ~clk;

  dwt_vfilt #(.N(N)) dut (.*);

  typedef struct {
    int row, col, ll, lh, hl, hh, due;
    bit done;
  } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cyc = 0, n_overlap = 0;
  int lv [N][N/2], hv [N][N/2];

  function automatic int rnd(int s);
    return (s + 128) >>> 8;
  endfunction

  function automatic void push_exp(int s, int m, int c, int due, bit done);
    exp_t e;
    int a = 0, b = 0, d = 0, f = 0;
    for (int k = 0; k < 4; k++) begin
      a += H[k] * lv[(2*m + 3 - k) % s][c];
      b += H[k] * hv[(2*m + 3 - k) % s][c];
      d += G[k] * lv[(2*m + 3 - k) % s][c];
      f += G[k] * hv[(2*m + 3 - k) % s][c];
    end
    e.row = m; e.col = c; e.ll = rnd(a); e.lh = rnd(b); e.hl = rnd(d); e.hh = rnd(f);
    e.due = due; e.done = done;
    q.push_back(e);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (busy && in_valid) n_overlap++;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output row %0d col %0d", out_row, out_col);
      end else begin
        e = q.pop_front();
        if (int'(out_row) != e.row || int'(out_col) != e.col ||
            int'(out_q.ll) != e.ll || int'(out_q.lh) != e.lh ||
            int'(out_q.hl) != e.hl || int'(out_q.hh) != e.hh ||
            cyc != e.due || out_done != e.done) begin
          failures++;
          $display("FAIL: got m%0d c%0d @%0d done%0d exp m%0d c%0d @%0d done%0d (LL %0d/%0d)",
                   out_row, out_col, cyc, out_done, e.row, e.col, e.due, e.done,
                   int'(out_q.ll), e.ll);
        end
      end
    end else if (out_done) begin
      failures++;
      $display("FAIL: out_done without output");
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_image(int s, bit gaps, bit overlap);
    int t_last;
    foreach (lv[r, c]) begin
      lv[r][c] = int'($urandom_range(0, 8191)) - 4096;
      hv[r][c] = int'($urandom_range(0, 8191)) - 4096;
    end
    for (int r = 0; r < s; r++)
      for (int c = 0; c < s / 2; c++) begin
        @(negedge clk);
        if (gaps && $urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_row = idx_t'(r); in_col = idx_t'(c);
        in_lh = '{l: sample_t'(lv[r][c]), h: sample_t'(hv[r][c])};
        in_last = (r == s - 1) && (c == s / 2 - 1);
        if (r % 2 == 1 && r >= 3) push_exp(s, (r - 3) / 2, c, cyc + 1, 1'b0);
        t_last = cyc;
      end
    for (int c = 0; c < s / 2; c++) push_exp(s, s / 2 - 1, c, t_last + 2 + c, c == s / 2 - 1);
    if (overlap) return;
    @(negedge clk);
    in_valid = 1'b0;
    in_last = 1'b0;
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL: flush did not start");
    end
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++)
      for (int s = 8; s >= 2; s /= 2) send_image(s, pass >= 2, 1'b0);
    for (int pass = 0; pass < 2; pass++)
      for (int s = 8; s >= 2; s /= 2) send_image(s, pass == 1, s == 8);
    send_image(8, 1'b0, 1'b0);
    repeat (3) @(negedge clk);
    checks++;
    if (n_overlap == 0) begin
      failures++;
      $display("FAIL: no input arrived during a flush");
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
