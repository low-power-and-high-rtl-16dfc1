// tb_idwt_addr_gen -- checks the IDWT sequencer for N = 8, J = 3: the exact
// command sequence of every step (COEF rows, ODD rows, FLE, FLO, drain),
// coefficient requests only with COEF, the level requested, LL taken from
// the RAM from step 2 on at the right word address, the output row offset
// and last-step flag, one done pulse, and 61 busy clocks per run.
module tb_idwt_addr_gen;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int J = 3;
  localparam int DRAIN = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, cmd_valid, cmd_last_col, rd_coef, rd_ll_ram, last_step;
  vcmd_e cmd_op;
  idx_t cmd_q, cmd_c, rd_ll_addr, out_row_off;
  level_t rd_level;

  always #5 clk = ~clk;

  idwt_addr_gen #(.N(N), .J(J), .DRAIN(DRAIN)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int step, m, clks;

  task automatic expect_cmd(vcmd_e op, int qq, int c);
    int in_off, out_off;
    in_off  = (m == N / 2) ? 0 : m;
    out_off = (2 * m == N / 2) ? 0 : 2 * m;
    check(busy && cmd_valid && cmd_op == op && int'(cmd_q) == qq && int'(cmd_c) == c &&
          cmd_last_col == (c == m - 1),
          $sformatf("step %0d: expected %s q%0d c%0d, got valid %0d %s q%0d c%0d",
                    step, op.name(), qq, c, cmd_valid, cmd_op.name(), cmd_q, cmd_c));
    check(rd_coef == (op == OP_COEF) && rd_ll_ram == (op == OP_COEF && step > 1),
          "read strobes");
    check(int'(rd_level) == J - step + 1 && last_step == (step == J) &&
          (step == J || int'(out_row_off) == out_off), "level / output region");
    if (op == OP_COEF && step > 1)
      check(int'(rd_ll_addr) == (in_off + qq) * (N / 4) + c / 2,
            $sformatf("LL address %0d for q%0d c%0d", rd_ll_addr, qq, c));
    @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && busy) clks++;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      clks = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      for (step = 1; step <= J; step++) begin
        m = N >> (J - step + 1);
        for (int qq = 0; qq < m; qq++) begin
          for (int c = 0; c < m; c++) expect_cmd(OP_COEF, qq, c);
          if (qq != 0) for (int c = 0; c < m; c++) expect_cmd(OP_ODD, qq, c);
        end
        for (int c = 0; c < m; c++) expect_cmd(OP_FLE, 0, c);
        for (int c = 0; c < m; c++) expect_cmd(OP_FLO, 0, c);
        for (int d = 0; d < DRAIN; d++) begin
          check(busy && !cmd_valid && !rd_coef, "drain");
          if (d == DRAIN - 1) @(posedge clk);
          else @(negedge clk);
        end
        #1;
        check(done == (step == J), "done pulse only after the last step");
        @(negedge clk);
      end
      check(!busy, "idle after done");
      check(clks == 61, $sformatf("%0d busy clocks", clks));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
