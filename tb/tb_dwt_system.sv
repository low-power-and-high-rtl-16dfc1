// tb_dwt_system -- self-checking test of the single-transform-module DWT.
//
// Drives dwt_system with random 8-bit images (and one all-255 image), serves
// its frame-memory reads with one clock latency, and compares every emitted
// coefficient quadruple with an integer reference of the same periodic,
// quantized D4 analysis computed here with ordinary multiplications.
// Also checks that each (level, row, column) is produced exactly once, that
// the frame memory is read exactly N*N/2 times (two pixels per clock), that
// the sequencer issues (2/3)(1-4^-J)N^2 read clocks, and the total latency.
module tb_dwt_system;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int J = 3;
  localparam int IMAGES = 6;
  localparam int READ_CLKS = 42;        // (2/3)(1 - 4^-3) * 64
  localparam int MAX_CLKS  = 54;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic ext_rd_en;
  idx_t ext_rd_row, ext_rd_col;
  pair_t ext_rd_data;
  logic out_valid;
  level_t out_level;
  idx_t out_row, out_col;
  quad_t out_q;

  always #5 clk = ~clk;

  dwt_system #(.N(N), .J(J)) dut (.*);

  int img [N][N];
  int ref_ll [J+1][N][N], ref_lh [J+1][N][N], ref_hl [J+1][N][N], ref_hh [J+1][N][N];
  int seen [J+1][N][N];
  int checks = 0, failures = 0;
  int ext_reads, read_clks, clks;

  int H [4] = '{118, 216, 63, -35};
  int G [4] = '{-35, -63, 216, -118};

  function automatic int rnd(int s);
    return (s + 128) >>> 8;
  endfunction

  task automatic reference();
    int a [N][N];
    int lr [N][N], hr [N][N];
    int s;
    foreach (img[r, c]) a[r][c] = img[r][c];
    for (int j = 1; j <= J; j++) begin
      s = N >> (j - 1);
      for (int r = 0; r < s; r++)
        for (int c = 0; c < s / 2; c++) begin
          int sl = 0, sh = 0;
          for (int k = 0; k < 4; k++) begin
            sl += H[k] * a[r][(2*c + 3 - k) % s];
            sh += G[k] * a[r][(2*c + 3 - k) % s];
          end
          lr[r][c] = rnd(sl);
          hr[r][c] = rnd(sh);
        end
      for (int m = 0; m < s / 2; m++)
        for (int c = 0; c < s / 2; c++) begin
          int s1 = 0, s2 = 0, s3 = 0, s4 = 0;
          for (int k = 0; k < 4; k++) begin
            s1 += H[k] * lr[(2*m + 3 - k) % s][c];
            s2 += H[k] * hr[(2*m + 3 - k) % s][c];
            s3 += G[k] * lr[(2*m + 3 - k) % s][c];
            s4 += G[k] * hr[(2*m + 3 - k) % s][c];
          end
          ref_ll[j][m][c] = rnd(s1);
          ref_lh[j][m][c] = rnd(s2);
          ref_hl[j][m][c] = rnd(s3);
          ref_hh[j][m][c] = rnd(s4);
        end
      for (int m = 0; m < s / 2; m++)
        for (int c = 0; c < s / 2; c++) a[m][c] = ref_ll[j][m][c];
    end
  endtask

  // frame memory: one clock read latency
  always_ff @(posedge clk) begin
    if (ext_rd_en) begin
      ext_rd_data.e <= sample_t'(img[ext_rd_row][2*ext_rd_col]);
      ext_rd_data.o <= sample_t'(img[ext_rd_row][2*ext_rd_col + 1]);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (busy) clks++;
    if (ext_rd_en) ext_reads++;
    if (dut.u_addr.rd_valid) read_clks++;
    if (out_valid) begin
      int j, m, c;
      j = int'(out_level); m = int'(out_row); c = int'(out_col);
      checks++;
      if (j < 1 || j > J || m >= (N >> j) || c >= (N >> j)) begin
        failures++;
        $display("FAIL: output tag out of range level=%0d row=%0d col=%0d", j, m, c);
      end else begin
        seen[j][m][c]++;
        if (int'(out_q.ll) != ref_ll[j][m][c] || int'(out_q.lh) != ref_lh[j][m][c] ||
            int'(out_q.hl) != ref_hl[j][m][c] || int'(out_q.hh) != ref_hh[j][m][c]) begin
          failures++;
          $display("FAIL: L%0d (%0d,%0d) got %0d %0d %0d %0d exp %0d %0d %0d %0d", j, m, c,
                   out_q.ll, out_q.lh, out_q.hl, out_q.hh,
                   ref_ll[j][m][c], ref_lh[j][m][c], ref_hl[j][m][c], ref_hh[j][m][c]);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (IMAGES * 200 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < IMAGES; t++) begin
      foreach (img[r, c]) img[r][c] = (t == 0) ? 255 : int'($urandom_range(0, 255));
      reference();
      foreach (seen[j, m, c]) seen[j][m][c] = 0;
      ext_reads = 0; read_clks = 0; clks = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      // completeness: every coefficient exactly once
      for (int j = 1; j <= J; j++)
        for (int m = 0; m < (N >> j); m++)
          for (int c = 0; c < (N >> j); c++) begin
            checks++;
            if (seen[j][m][c] != 1) begin
              failures++;
              $display("FAIL: L%0d (%0d,%0d) produced %0d times", j, m, c, seen[j][m][c]);
            end
          end
      checks += 3;
      if (ext_reads != N * N / 2) begin
        failures++; $display("FAIL: %0d frame reads, expected %0d", ext_reads, N * N / 2);
      end
      if (read_clks != READ_CLKS) begin
        failures++; $display("FAIL: %0d read clocks, expected %0d", read_clks, READ_CLKS);
      end
      if (clks > MAX_CLKS) begin
        failures++; $display("FAIL: %0d clocks, expected at most %0d", clks, MAX_CLKS);
      end
      $display("image %0d: %0d read clocks, %0d clocks busy", t, read_clks, clks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
