// tb_idwt_vfilt -- checks the vertical synthesis stage: issues the full
// command schedule (COEF, ODD, FLE, FLO) for random M x M subband sets,
// M = 4, 2, 1, and compares every emitted (L, H) image-row sample with an
// integer reference of the periodic column synthesis. Every output must
// appear one clock after its command, with the right row, column and
// last-column flag; COEF commands of coefficient row 0 must emit nothing.
module tb_idwt_vfilt;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int H [4] = '{118, 216, 63, -35};
  localparam int G [4] = '{-35, -63, 216, -118};

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_last_col = 1'b0;
  vcmd_e cmd_op = OP_COEF;
  idx_t cmd_q = '0, cmd_c = '0;
  quad_t in_q = '0;
  logic out_valid, out_last_col;
  idx_t out_row, out_col;
  lh_t out_lh;

  always #5 clk = ~clk;

  idwt_vfilt #(.N(N)) dut (.*);

  typedef struct {
    int row, col, l, h, due;
    bit last;
  } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cyc = 0;
  int cll [N][N], clh [N][N], chl [N][N], chh [N][N];

  function automatic int rnd(int s);
    return (s + 128) >>> 8;
  endfunction

  // image-space row r (0..2M-1) of column c
  function automatic void push_exp(int m, int r, int c, int due);
    exp_t e;
    int qq = r / 2, qm;
    qm = (qq + m - 1) % m;
    e.row = r; e.col = c; e.due = due; e.last = (c == m - 1);
    if (r % 2 == 0) begin
      e.l = rnd(H[1]*cll[qm][c] + G[1]*chl[qm][c] + H[3]*cll[qq][c] + G[3]*chl[qq][c]);
      e.h = rnd(H[1]*clh[qm][c] + G[1]*chh[qm][c] + H[3]*clh[qq][c] + G[3]*chh[qq][c]);
    end else begin
      e.l = rnd(H[0]*cll[qm][c] + G[0]*chl[qm][c] + H[2]*cll[qq][c] + G[2]*chl[qq][c]);
      e.h = rnd(H[0]*clh[qm][c] + G[0]*chh[qm][c] + H[2]*clh[qq][c] + G[2]*chh[qq][c]);
    end
    q.push_back(e);
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
            int'(out_lh.h) != e.h || cyc != e.due || out_last_col != e.last) begin
          failures++;
          $display("FAIL: got r%0d c%0d @%0d L%0d H%0d exp r%0d c%0d @%0d L%0d H%0d",
                   out_row, out_col, cyc, int'(out_lh.l), int'(out_lh.h),
                   e.row, e.col, e.due, e.l, e.h);
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
    in_q = (op == OP_COEF) ? '{ll: sample_t'(cll[qq][c]), lh: sample_t'(clh[qq][c]),
                              hl: sample_t'(chl[qq][c]), hh: sample_t'(chh[qq][c])} : quad_t'($urandom);
    case (op)
      OP_COEF: if (qq != 0) push_exp(m, 2 * qq, c, cyc + 1);
      OP_ODD:  push_exp(m, 2 * qq + 1, c, cyc + 1);
      OP_FLE:  push_exp(m, 0, c, cyc + 1);
      default: push_exp(m, 1, c, cyc + 1);
    endcase
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++)
      for (int m = 4; m >= 1; m /= 2) begin
        foreach (cll[r, c]) begin
          cll[r][c] = int'($urandom_range(0, 4095));
          clh[r][c] = int'($urandom_range(0, 1023)) - 512;
          chl[r][c] = int'($urandom_range(0, 1023)) - 512;
          chh[r][c] = int'($urandom_range(0, 511)) - 256;
        end
        for (int qq = 0; qq < m; qq++) begin
          for (int c = 0; c < m; c++) cmd(OP_COEF, qq, c, m);
          if (qq != 0) for (int c = 0; c < m; c++) cmd(OP_ODD, qq, c, m);
        end
        for (int c = 0; c < m; c++) cmd(OP_FLE, 0, c, m);
        for (int c = 0; c < m; c++) cmd(OP_FLO, 0, c, m);
        @(negedge clk) cmd_valid = 1'b0;
        if (pass % 2 == 1) repeat (3) @(negedge clk);
      end
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
