// tb_idwt_core -- checks the IDWT transform module on one synthesis step:
// the subbands of a random image of size 2M (M = 4, 2, 1) go in through the
// full command schedule, and every reconstructed pixel pair is compared
// with the reference synthesis; each pixel must appear exactly once and the
// last one 3 clocks after the last command.
module tb_idwt_core;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_last_col = 1'b0;
  vcmd_e cmd_op = OP_COEF;
  idx_t cmd_q = '0, cmd_c = '0;
  quad_t in_q = '0;
  logic out_valid;
  idx_t out_row, out_col;
  pair_t out_pair;

  always #5 clk = ~clk;

  idwt_core #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, t_out;
  int seen [N][N];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      int r, p;
      r = int'(out_row); p = int'(out_col);
      checks++;
      t_out = cyc;
      if (r >= N || p >= N / 2) begin
        failures++;
        $display("FAIL: tag out of range %0d %0d", r, p);
      end else begin
        seen[r][p]++;
        if (int'(out_pair.e) != rec[r][2*p] || int'(out_pair.o) != rec[r][2*p+1]) begin
          failures++;
          $display("FAIL: (%0d,%0d) got %0d %0d exp %0d %0d", r, 2*p,
                   int'(out_pair.e), int'(out_pair.o), rec[r][2*p], rec[r][2*p+1]);
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

  task automatic cmd(vcmd_e op, int qq, int c, int m);
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_q = idx_t'(qq); cmd_c = idx_t'(c);
    cmd_last_col = (c == m - 1);
    in_q = '{ll: sample_t'(ll[1][qq][c]), lh: sample_t'(lh[1][qq][c]),
             hl: sample_t'(hl[1][qq][c]), hh: sample_t'(hh[1][qq][c])};
  endtask

  initial begin
    int t_cmd;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++)
      for (int m = 4; m >= 1; m /= 2) begin
        for (int r = 0; r < 2 * m; r++)
          for (int c = 0; c < 2 * m; c++) img[r][c] = int'($urandom_range(0, 255));
        forward(2 * m, 1);
        inverse(2 * m, 1);
        foreach (seen[r, p]) seen[r][p] = 0;
        for (int qq = 0; qq < m; qq++) begin
          for (int c = 0; c < m; c++) cmd(OP_COEF, qq, c, m);
          if (qq != 0) for (int c = 0; c < m; c++) cmd(OP_ODD, qq, c, m);
        end
        for (int c = 0; c < m; c++) cmd(OP_FLE, 0, c, m);
        for (int c = 0; c < m; c++) cmd(OP_FLO, 0, c, m);
        t_cmd = cyc;
        @(negedge clk) cmd_valid = 1'b0;
        repeat (4) @(negedge clk);
        for (int r = 0; r < 2 * m; r++)
          for (int p = 0; p < m; p++) begin
            checks++;
            if (seen[r][p] != 1) begin
              failures++;
              $display("FAIL: pair (%0d,%0d) produced %0d times", r, p, seen[r][p]);
            end
          end
        checks++;
        if (t_out - t_cmd != 3) begin
          failures++;
          $display("FAIL: last pair %0d clocks after the last command", t_out - t_cmd);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
