// tb_dwt_addr_gen -- checks the DWT address sequencer: for each level the
// row-major order of pair reads, the level number, the last-pair and
// last-row flags, the next level following in the very next clock, reads
// held back (address kept) while row_ok is low (driven at random), 42 read
// clocks per 8 x 8, 3-level transform, silence until the final level-done
// pulse (given after a random delay), and one done pulse with busy falling.
module tb_dwt_addr_gen;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int J = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, lvl_done = 1'b0, row_ok = 1'b1;
  logic rd_valid, rd_last_col, rd_last_row, busy, done;
  level_t rd_level;
  idx_t rd_row, rd_col;

  always #5 clk = ~clk;

  dwt_addr_gen #(.N(N), .J(J)) dut (.*);

  int checks = 0, failures = 0, holds = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    check(holds > 0, "row_ok hold-back exercised");
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

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      int reads, gap;
      reads = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      for (int l = 1; l <= J; l++) begin
        int s;
        s = N >> (l - 1);
        for (int r = 0; r < s; r++)
          for (int p = 0; p < s / 2; p++) begin
            while (!row_ok) begin
              check(!rd_valid && busy, "no read while row_ok is low");
              check(int'(rd_level) == l && int'(rd_row) == r && int'(rd_col) == p,
                    "address held while row_ok is low");
              holds++;
              @(negedge clk) row_ok = ($urandom_range(0, 3) != 0);
              #1;
            end
            check(rd_valid && busy, "read expected");
            check(int'(rd_level) == l && int'(rd_row) == r && int'(rd_col) == p,
                  $sformatf("address L%0d (%0d,%0d) got L%0d (%0d,%0d)", l, r, p,
                            rd_level, rd_row, rd_col));
            check(rd_last_col == (p == s / 2 - 1) && rd_last_row == (r == s - 1), "flags");
            reads++;
            @(negedge clk) row_ok = ($urandom_range(0, 3) != 0);
            #1;
          end
      end
      row_ok = 1'b1;
      gap = $urandom_range(0, 12);
      for (int g = 0; g < gap; g++) begin
        check(!rd_valid && busy && !done, "idle while waiting for the last flush");
        @(negedge clk);
      end
      lvl_done = 1'b1;
      @(negedge clk) lvl_done = 1'b0;
      check(done, "done pulse");
      check(reads == 42, $sformatf("%0d read clocks", reads));
      @(negedge clk);
      check(!busy && !done && !rd_valid, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
