// tb_dwt_idwt_top -- end-to-end test of the codec top at its default size
// (N = 8, J = 3).
//
// A stream of images goes through the analysis side; its coefficients are
// stored in a coefficient memory (standing in for the entropy coder and
// decoder, which pass them through unchanged) and fed to the synthesis side.
// Image k+1 is analysed while image k is reconstructed, so both sides run
// at the same time. Checks:
//   - every coefficient equals the integer reference analysis,
//   - every reconstructed pixel equals the integer reference synthesis and
//     is within 6 grey levels of the original (PSNR >= 40 dB),
//   - 42 read clocks per analysis and 42 output clocks per synthesis,
//   - each mechanism of the datapath happened: row wrap-around slots, column
//     wrap-around flushes, LL reads back through the multiplexers, LL writes
//     into both RAMs, column flushes overlapped with the next level's first
//     rows, reads held back until their LL row is written, parked odd rows
//     and wrap-around flushes of the synthesis column stage.
module tb_dwt_idwt_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  localparam int J = 3;
  localparam int IMAGES = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dwt_start = 1'b0, idwt_start = 1'b0;
  logic dwt_busy, dwt_done, idwt_busy, idwt_done;
  logic img_rd_en, coef_valid, cin_rd_en, pix_valid;
  idx_t img_rd_row, img_rd_col, coef_row, coef_col, cin_rd_row, cin_rd_col, pix_row, pix_col;
  level_t coef_level, cin_rd_level;
  pair_t img_rd_data, pix_pair;
  quad_t coef_q, cin_rd_data;

  always #5 clk = ~clk;

  dwt_idwt_top dut (.*);

  int checks = 0, failures = 0;

  // images and their reference results, per image slot
  int imgs [IMAGES][N][N];
  int exp_ll [IMAGES][J+1][N][N], exp_lh [IMAGES][J+1][N][N];
  int exp_hl [IMAGES][J+1][N][N], exp_hh [IMAGES][J+1][N][N];
  int exp_rec [IMAGES][N][N];
  // coefficient memory written by the analysis side, read by the synthesis side
  quad_t cmem [IMAGES][J+1][N][N];
  int dwt_img, idwt_img;
  int rd_clks, out_clks, seen_px, seen_coef;
  real sq_err;

  // mechanism counters
  int n_overlap, n_hold, n_hwrap, n_vflush, n_ram_rd, n_ll_wr, n_iram_rd, n_iwrap, n_odd, n_fle, n_flo, n_iram_wr;

  // frame memory and coefficient source, one clock read latency
  always_ff @(posedge clk) begin
    if (img_rd_en) begin
      img_rd_data.e <= sample_t'(imgs[dwt_img][img_rd_row][2*img_rd_col]);
      img_rd_data.o <= sample_t'(imgs[dwt_img][img_rd_row][2*img_rd_col + 1]);
    end
    if (cin_rd_en) cin_rd_data <= cmem[idwt_img][cin_rd_level][cin_rd_row][cin_rd_col];
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_dwt.u_core.u_hfilt.pend_q) n_hwrap++;
    if (dut.u_dwt.u_core.u_vfilt.fl_q) n_vflush++;
    if (dut.u_dwt.u_core.u_vfilt.fl_q && dut.u_dwt.u_core.u_vfilt.in_valid) n_overlap++;
    if (dut.u_dwt.u_addr.state_q == dut.u_dwt.u_addr.S_READ && !dut.u_dwt.row_ok) n_hold++;
    if (dut.u_dwt.ram_re) n_ram_rd++;
    if (dut.u_dwt.ram_we != 2'b00) n_ll_wr++;
    if (dut.u_idwt.rd_ll_ram) n_iram_rd++;
    if (dut.u_idwt.u_core.u_hfilt.pend_q) n_iwrap++;
    if (dut.u_idwt.ram_we != 2'b00) n_iram_wr++;
    if (dut.u_idwt.cmd_valid && dut.u_idwt.cmd_op == OP_ODD) n_odd++;
    if (dut.u_idwt.cmd_valid && dut.u_idwt.cmd_op == OP_FLE) n_fle++;
    if (dut.u_idwt.cmd_valid && dut.u_idwt.cmd_op == OP_FLO) n_flo++;
    if (img_rd_en || dut.u_dwt.ram_re) rd_clks++;
    if (dut.u_idwt.o_valid) out_clks++;
    if (coef_valid) begin
      int j, m, c;
      j = int'(coef_level); m = int'(coef_row); c = int'(coef_col);
      checks++;
      seen_coef++;
      cmem[dwt_img][j][m][c] <= coef_q;
      if (int'(coef_q.ll) != exp_ll[dwt_img][j][m][c] || int'(coef_q.lh) != exp_lh[dwt_img][j][m][c] ||
          int'(coef_q.hl) != exp_hl[dwt_img][j][m][c] || int'(coef_q.hh) != exp_hh[dwt_img][j][m][c]) begin
        failures++;
        $display("FAIL: image %0d L%0d (%0d,%0d) coefficient mismatch", dwt_img, j, m, c);
      end
    end
    if (pix_valid) begin
      int r, p, e0, e1;
      r = int'(pix_row); p = int'(pix_col);
      checks++;
      seen_px += 2;
      if (int'(pix_pair.e) != exp_rec[idwt_img][r][2*p] ||
          int'(pix_pair.o) != exp_rec[idwt_img][r][2*p+1]) begin
        failures++;
        $display("FAIL: image %0d pixel (%0d,%0d) mismatch", idwt_img, r, 2*p);
      end
      e0 = int'(pix_pair.e) - imgs[idwt_img][r][2*p];
      e1 = int'(pix_pair.o) - imgs[idwt_img][r][2*p+1];
      sq_err += real'(e0 * e0 + e1 * e1);
      checks++;
      if (e0 > 6 || e0 < -6 || e1 > 6 || e1 < -6) begin
        failures++;
        $display("FAIL: image %0d pixel (%0d,%0d) off by %0d/%0d", idwt_img, r, 2*p, e0, e1);
      end
    end
  end

  initial begin : watchdog
    repeat (IMAGES * 150 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    for (int t = 0; t < IMAGES; t++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          img[r][c] = (t == 0) ? ((r * 37 + c * 11) % 256) : int'($urandom_range(0, 255));
          imgs[t][r][c] = img[r][c];
        end
      forward(N, J);
      inverse(N, J);
      for (int j = 1; j <= J; j++)
        for (int m = 0; m < (N >> j); m++)
          for (int c = 0; c < (N >> j); c++) begin
            exp_ll[t][j][m][c] = ll[j][m][c];
            exp_lh[t][j][m][c] = lh[j][m][c];
            exp_hl[t][j][m][c] = hl[j][m][c];
            exp_hh[t][j][m][c] = hh[j][m][c];
          end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) exp_rec[t][r][c] = rec[r][c];
    end
    n_overlap = 0; n_hold = 0; n_hwrap = 0; n_vflush = 0; n_ram_rd = 0; n_ll_wr = 0; n_iram_rd = 0;
    n_iwrap = 0; n_odd = 0; n_fle = 0; n_flo = 0; n_iram_wr = 0;
    dwt_img = 0; idwt_img = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // pipeline: analysis of image t alongside synthesis of image t-1
    for (int t = 0; t <= IMAGES; t++) begin
      rd_clks = 0; out_clks = 0; seen_px = 0; seen_coef = 0; sq_err = 0.0;
      @(negedge clk);
      dwt_img  = (t < IMAGES) ? t : 0;
      idwt_img = (t > 0) ? t - 1 : 0;
      dwt_start  = (t < IMAGES);
      idwt_start = (t > 0);
      @(negedge clk);
      dwt_start = 1'b0; idwt_start = 1'b0;
      while (dwt_busy || idwt_busy) @(negedge clk);
      @(negedge clk);
      if (t < IMAGES) begin
        expect_count("analysis read clocks", rd_clks, 42);
        expect_count("coefficient quadruples", seen_coef, 16 + 4 + 1);
      end
      if (t > 0) begin
        real psnr;
        expect_count("synthesis output clocks", out_clks, 42);
        expect_count("reconstructed pixels", seen_px, N * N);
        psnr = 10.0 * $log10(255.0 * 255.0 * N * N / (sq_err + 1.0e-9));
        checks++;
        if (psnr < 40.0) begin
          failures++; $display("FAIL: image %0d PSNR %0.1f dB", t - 1, psnr);
        end
        $display("image %0d reconstructed, PSNR %0.1f dB", t - 1, psnr);
      end
    end
    $display("mechanisms: row wrap %0d, column flush %0d, LL reads %0d, LL writes %0d",
             n_hwrap, n_vflush, n_ram_rd, n_ll_wr);
    $display("            synthesis: LL reads %0d, RAM writes %0d, row wrap %0d, odd rows %0d, flush %0d/%0d",
             n_iram_rd, n_iram_wr, n_iwrap, n_odd, n_fle, n_flo);
    $display("            flush overlapped with next level %0d clocks, reads held back %0d clocks",
             n_overlap, n_hold);
    checks++;
    if (n_overlap == 0 || n_hold == 0) begin
      failures++; $display("FAIL: flush overlap or read hold-back never happened");
    end
    expect_count("row wrap slots per analysis", n_hwrap, IMAGES * (8 + 4 + 2));
    expect_count("column flush clocks per analysis", n_vflush, IMAGES * (4 + 2 + 1));
    expect_count("LL reads per analysis", n_ram_rd, IMAGES * (8 + 2));
    expect_count("LL writes per analysis", n_ll_wr, IMAGES * (16 + 4));
    expect_count("LL reads per synthesis", n_iram_rd, IMAGES * (4 + 16));
    expect_count("LL pair writes per synthesis", n_iram_wr, IMAGES * (2 + 8));
    checks++;
    if (n_iwrap == 0 || n_odd == 0 || n_fle == 0 || n_flo == 0) begin
      failures++; $display("FAIL: a synthesis mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
