// tb_idwt_hfilt -- checks the row synthesis filter on rows of 4, 2 and 1
// (L, H) columns, back to back and with idle gaps, against an integer
// reference of the periodic synthesis. Timing: pair c >= 1 one clock after
// column c enters, pair 0 (the wrap-around) two clocks after the last
// column.
module tb_idwt_hfilt;
  import dwt_pkg::*;

  localparam int H [4] = '{118, 216, 63, -35};
  localparam int G [4] = '{-35, -63, 216, -118};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last_col = 1'b0;
  idx_t in_row = '0, in_col = '0;
  lh_t in_lh = '0;
  logic out_valid;
  idx_t out_row, out_col;
  pair_t out_pair;

  always #5 clk = ~clk;

  idwt_hfilt dut (.*);

  typedef struct {
    int row, col, e, o, due;
  } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cyc = 0;

  function automatic int rnd(int s);
    return (s + 128) >>> 8;
  endfunction

  function automatic void push_exp(int r, int m, int c, int lv [], int hv [], int due);
    exp_t e;
    int cm = (c + m - 1) % m;
    e.row = r; e.col = c; e.due = due;
    e.e = rnd(H[1]*lv[cm] + G[1]*hv[cm] + H[3]*lv[c] + G[3]*hv[c]);
    e.o = rnd(H[0]*lv[cm] + G[0]*hv[cm] + H[2]*lv[c] + G[2]*hv[c]);
    q.push_back(e);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output row %0d pair %0d", out_row, out_col);
      end else begin
        e = q.pop_front();
        if (int'(out_row) != e.row || int'(out_col) != e.col || int'(out_pair.e) != e.e ||
            int'(out_pair.o) != e.o || cyc != e.due) begin
          failures++;
          $display("FAIL: got r%0d p%0d @%0d (%0d %0d) exp r%0d p%0d @%0d (%0d %0d)",
                   out_row, out_col, cyc, int'(out_pair.e), int'(out_pair.o),
                   e.row, e.col, e.due, e.e, e.o);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_row(int r, int m, bit gaps);
    int lv [], hv [];
    lv = new[m];
    hv = new[m];
    foreach (lv[i]) begin
      lv[i] = int'($urandom_range(0, 4095)) - 2048;
      hv[i] = int'($urandom_range(0, 1023)) - 512;
    end
    for (int c = 0; c < m; c++) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_lh = '{l: sample_t'(lv[c]), h: sample_t'(hv[c])};
      in_row = idx_t'(r); in_col = idx_t'(c);
      in_last_col = (c == m - 1);
      if (c >= 1) push_exp(r, m, c, lv, hv, cyc + 1);
      if (c == m - 1) push_exp(r, m, 0, lv, hv, cyc + 2);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 6; pass++)
      for (int m = 4; m >= 1; m /= 2)
        for (int r = 0; r < 2 * m; r++) send_row(r, m, pass >= 3);
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
