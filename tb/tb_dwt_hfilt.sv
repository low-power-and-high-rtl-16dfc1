// tb_dwt_hfilt -- checks the row analysis filter on rows of width 8, 4 and
// 2 (the three level sizes of an 8 x 8, 3-level transform), streamed back
// to back and with idle gaps, against an integer reference of the periodic
// polyphase filter. Also checks timing: output column c one clock after
// pair c+1 enters, the wrap-around column two clocks after the last pair,
// and the end-of-image flag.
module tb_dwt_hfilt;
  import dwt_pkg::*;

  localparam int H [4] = '{118, 216, 63, -35};
  localparam int G [4] = '{-35, -63, 216, -118};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last_col = 1'b0, in_last_row = 1'b0;
  pair_t in_pair = '0;
  idx_t in_row = '0, in_col = '0;
  logic out_valid, out_last;
  idx_t out_row, out_col;
  lh_t out_lh;

  always #5 clk = ~clk;

  dwt_hfilt dut (.*);

  typedef struct {
    int row, col, l, h, due;
    bit last;
  } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cyc = 0;

  function automatic int rnd(int s);
    return (s + 128) >>> 8;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output row %0d col %0d", out_row, out_col);
      end else begin
        e = q.pop_front();
        if (int'(out_row) != e.row || int'(out_col) != e.col || int'(out_lh.l) != e.l ||
            int'(out_lh.h) != e.h || cyc != e.due || out_last != e.last) begin
          failures++;
          $display("FAIL: got r%0d c%0d L%0d H%0d @%0d last%0d exp r%0d c%0d L%0d H%0d @%0d last%0d",
                   out_row, out_col, out_lh.l, out_lh.h, cyc, out_last,
                   e.row, e.col, e.l, e.h, e.due, e.last);
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

  task automatic send_row(int r, int w, bit last_row, bit gaps);
    int x [];
    int t_in [];
    x = new[w];
    t_in = new[w / 2];
    foreach (x[i]) x[i] = int'($urandom_range(0, 4095)) - 2048;
    for (int p = 0; p < w / 2; p++) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_pair = '{e: sample_t'(x[2*p]), o: sample_t'(x[2*p+1])};
      in_row = idx_t'(r); in_col = idx_t'(p);
      in_last_col = (p == w / 2 - 1);
      in_last_row = last_row;
      t_in[p] = cyc;
      if (p >= 1) push_exp(r, w, p - 1, x, t_in[p] + 1, 1'b0);
      if (p == w / 2 - 1) push_exp(r, w, p, x, t_in[p] + 2, last_row);
    end
  endtask

  function automatic void push_exp(int r, int w, int c, int x [], int due, bit last);
      exp_t e;
      int sl = 0, sh = 0;
      for (int k = 0; k < 4; k++) begin
        sl += H[k] * x[(2*c + 3 - k) % w];
        sh += G[k] * x[(2*c + 3 - k) % w];
      end
      e.row = r; e.col = c; e.l = rnd(sl); e.h = rnd(sh);
      e.due = due;
      e.last = last;
      q.push_back(e);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 6; pass++) begin
      for (int w = 8; w >= 2; w /= 2)
        for (int r = 0; r < w; r++) send_row(r, w, r == w - 1, pass >= 3);
    end
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
