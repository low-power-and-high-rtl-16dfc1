// tb_dwt_idwt_image -- 3-level compression/reconstruction flow on a larger
// picture: the codec top at N = 64 analyses a synthetic 64 x 64 image
// (smooth shading, a bright disc with a sharp edge and fine stripes) with
// periodic extension, the coefficients pass unchanged to the synthesis
// side, and the reconstruction is compared pixel by pixel with the
// integer reference and with the original (PSNR reported, at least 40 dB).
// Also checks (2/3)(1 - 4^-3) * 64^2 = 2688 read clocks for the analysis
// and 2688 two-sample output clocks for the synthesis.
module tb_dwt_idwt_image;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 64;
  localparam int J = 3;
  localparam int CLKS = 2688;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dwt_start = 1'b0, idwt_start = 1'b0;
  logic dwt_busy, dwt_done, idwt_busy, idwt_done;
  logic img_rd_en, coef_valid, cin_rd_en, pix_valid;
  idx_t img_rd_row, img_rd_col, coef_row, coef_col, cin_rd_row, cin_rd_col, pix_row, pix_col;
  level_t coef_level, cin_rd_level;
  pair_t img_rd_data, pix_pair;
  quad_t coef_q, cin_rd_data;

  always #5 clk = ~clk;

  dwt_idwt_top #(.N(N), .J(J)) dut (.*);

  int checks = 0, failures = 0;
  quad_t cmem [J+1][N/2][N/2];
  int rd_clks = 0, out_clks = 0, n_coef = 0, n_px = 0, max_err = 0;
  real sq_err = 0.0;

  always_ff @(posedge clk) begin
    if (img_rd_en) begin
      img_rd_data.e <= sample_t'(img[img_rd_row][2*img_rd_col]);
      img_rd_data.o <= sample_t'(img[img_rd_row][2*img_rd_col + 1]);
    end
    if (cin_rd_en) cin_rd_data <= cmem[cin_rd_level][cin_rd_row][cin_rd_col];
  end

  always @(posedge clk) if (rst_n) begin
    if (img_rd_en || dut.u_dwt.ram_re) rd_clks++;
    if (dut.u_idwt.o_valid) out_clks++;
    if (coef_valid) begin
      int j, m, c;
      j = int'(coef_level); m = int'(coef_row); c = int'(coef_col);
      checks++;
      n_coef++;
      cmem[j][m][c] <= coef_q;
      if (int'(coef_q.ll) != ll[j][m][c] || int'(coef_q.lh) != lh[j][m][c] ||
          int'(coef_q.hl) != hl[j][m][c] || int'(coef_q.hh) != hh[j][m][c]) begin
        failures++;
        if (failures < 10) $display("FAIL: L%0d (%0d,%0d) coefficient mismatch", j, m, c);
      end
    end
    if (pix_valid) begin
      int r, p, e0, e1;
      r = int'(pix_row); p = int'(pix_col);
      checks++;
      n_px += 2;
      if (int'(pix_pair.e) != rec[r][2*p] || int'(pix_pair.o) != rec[r][2*p+1]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel (%0d,%0d) mismatch", r, 2*p);
      end
      e0 = int'(pix_pair.e) - img[r][2*p];
      e1 = int'(pix_pair.o) - img[r][2*p+1];
      sq_err += real'(e0 * e0 + e1 * e1);
      if (e0 < 0) e0 = -e0;
      if (e1 < 0) e1 = -e1;
      if (e0 > max_err) max_err = e0;
      if (e1 > max_err) max_err = e1;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real psnr;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int v, d2;
        d2 = (r - 30) * (r - 30) + (c - 34) * (c - 34);
        v = 40 + r + c;                       // shading
        if (d2 < 18 * 18) v += 90;            // disc with a sharp edge
        if (r >= 48 && (c % 4) < 2) v += 40;  // fine stripes
        img[r][c] = (v > 255) ? 255 : v;
      end
    forward(N, J);
    inverse(N, J);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) dwt_start = 1'b1;
    @(negedge clk) dwt_start = 1'b0;
    while (dwt_busy) @(negedge clk);
    @(negedge clk) idwt_start = 1'b1;
    @(negedge clk) idwt_start = 1'b0;
    while (idwt_busy) @(negedge clk);
    @(negedge clk);
    psnr = 10.0 * $log10(255.0 * 255.0 * N * N / (sq_err + 1.0e-9));
    $display("analysis read clocks %0d, synthesis output clocks %0d, coefficients %0d, pixels %0d",
             rd_clks, out_clks, n_coef, n_px);
    $display("reconstruction: max |error| %0d, PSNR %0.1f dB", max_err, psnr);
    checks += 5;
    if (rd_clks != CLKS) begin failures++; $display("FAIL: read clocks"); end
    if (out_clks != CLKS) begin failures++; $display("FAIL: output clocks"); end
    if (n_coef != 1024 + 256 + 64) begin failures++; $display("FAIL: coefficient count"); end
    if (n_px != N * N) begin failures++; $display("FAIL: pixel count"); end
    if (psnr < 40.0) begin failures++; $display("FAIL: PSNR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
