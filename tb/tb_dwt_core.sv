// tb_dwt_core -- checks the DWT transform module on one decomposition
// level of random 8 x 8, 4 x 4 and 2 x 2 images streamed as pixel pairs,
// one pair per clock: every LL/LH/HL/HH against the reference analysis,
// each position exactly once, and the level latency: out_done exactly
// S/2 + 3 clocks after the last pair enters (1 clock row wrap-around slot,
// S/2 clocks column flush, 2 register stages).
module tb_dwt_core;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last_col = 1'b0, in_last_row = 1'b0;
  pair_t in_pair = '0;
  idx_t in_row = '0, in_col = '0;
  logic busy, out_valid, out_done;
  idx_t out_row, out_col;
  quad_t out_q;

  always #5 clk = ~clk;

  dwt_core #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, t_done;
  int seen [N][N];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_done) t_done = cyc;
    if (out_valid) begin
      int m, c;
      m = int'(out_row); c = int'(out_col);
      checks++;
      if (m >= N / 2 || c >= N / 2) begin
        failures++;
        $display("FAIL: tag out of range %0d %0d", m, c);
      end else begin
        seen[m][c]++;
        if (int'(out_q.ll) != ll[1][m][c] || int'(out_q.lh) != lh[1][m][c] ||
            int'(out_q.hl) != hl[1][m][c] || int'(out_q.hh) != hh[1][m][c]) begin
          failures++;
          $display("FAIL: (%0d,%0d) got %0d %0d %0d %0d exp %0d %0d %0d %0d", m, c,
                   out_q.ll, out_q.lh, out_q.hl, out_q.hh,
                   ll[1][m][c], lh[1][m][c], hl[1][m][c], hh[1][m][c]);
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

  initial begin
    int t_last;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++)
      for (int s = 8; s >= 2; s /= 2) begin
        for (int r = 0; r < s; r++)
          for (int c = 0; c < s; c++) img[r][c] = int'($urandom_range(0, 255));
        forward(s, 1);
        foreach (seen[r, c]) seen[r][c] = 0;
        t_done = -1;
        for (int r = 0; r < s; r++)
          for (int p = 0; p < s / 2; p++) begin
            @(negedge clk);
            in_valid = 1'b1;
            in_pair = '{e: sample_t'(img[r][2*p]), o: sample_t'(img[r][2*p+1])};
            in_row = idx_t'(r); in_col = idx_t'(p);
            in_last_col = (p == s / 2 - 1);
            in_last_row = (r == s - 1);
            t_last = cyc;
          end
        @(negedge clk) in_valid = 1'b0;
        while (t_done < 0) @(negedge clk);
        @(negedge clk);
        for (int m = 0; m < s / 2; m++)
          for (int c = 0; c < s / 2; c++) begin
            checks++;
            if (seen[m][c] != 1) begin
              failures++;
              $display("FAIL: (%0d,%0d) produced %0d times", m, c, seen[m][c]);
            end
          end
        checks++;
        if (t_done - t_last != s / 2 + 3) begin
          failures++;
          $display("FAIL: size %0d done %0d clocks after last pair", s, t_done - t_last);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
