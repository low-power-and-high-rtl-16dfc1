// tb_idwt_system -- self-checking test of the single-transform-module IDWT.
//
// For random 8-bit images the reference model computes the 3-level
// analysis; idwt_system reads those coefficients (one clock latency) and
// every reconstructed pixel pair is compared with the reference synthesis.
// Checks: each pixel produced once, no coefficient request outside the
// subbands, 42 clocks producing two samples (all steps together), at most 61
// busy clocks, and the reconstruction within 6 grey levels and at least
// 40 dB PSNR of the original image (the error comes only from the 8-bit tap
// quantization and from rounding).
module tb_idwt_system;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  localparam int J = 3;
  localparam int IMAGES = 6;
  localparam int OUT_CLKS = 42;
  localparam int MAX_CLKS = 61;
  localparam int MAX_ERR  = 6;
  localparam real MIN_PSNR = 40.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic ext_rd_en;
  level_t ext_rd_level;
  idx_t ext_rd_row, ext_rd_col;
  quad_t ext_rd_data;
  logic pix_valid;
  idx_t pix_row, pix_col;
  pair_t pix_pair;

  always #5 clk = ~clk;

  idwt_system #(.N(N), .J(J)) dut (.*);

  int checks = 0, failures = 0;
  int seen [N][N];
  int out_clks, clks, max_err;
  real sq_err, psnr;

  // coefficient source: one clock read latency
  always_ff @(posedge clk) begin
    if (ext_rd_en) begin
      int lv, r, c;
      lv = int'(ext_rd_level); r = int'(ext_rd_row); c = int'(ext_rd_col);
      if (lv < 1 || lv > J || r >= (N >> lv) || c >= (N >> lv)) begin
        failures++;
        $display("FAIL: coefficient request out of range L%0d (%0d,%0d)", lv, r, c);
      end else begin
        ext_rd_data.ll <= sample_t'(ll[lv][r][c]);
        ext_rd_data.lh <= sample_t'(lh[lv][r][c]);
        ext_rd_data.hl <= sample_t'(hl[lv][r][c]);
        ext_rd_data.hh <= sample_t'(hh[lv][r][c]);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (busy) clks++;
    if (dut.o_valid) out_clks++;
    if (pix_valid) begin
      int r, p;
      r = int'(pix_row); p = int'(pix_col);
      checks++;
      if (r >= N || p >= N / 2) begin
        failures++;
        $display("FAIL: pixel tag out of range (%0d,%0d)", r, p);
      end else begin
        seen[r][2*p]++;
        seen[r][2*p+1]++;
        if (int'(pix_pair.e) != rec[r][2*p] || int'(pix_pair.o) != rec[r][2*p+1]) begin
          failures++;
          $display("FAIL: pixel (%0d,%0d) got %0d %0d exp %0d %0d", r, 2*p,
                   pix_pair.e, pix_pair.o, rec[r][2*p], rec[r][2*p+1]);
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
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          img[r][c] = (t == 0) ? 255 : int'($urandom_range(0, 255));
      forward(N, J);
      inverse(N, J);
      foreach (seen[r, c]) seen[r][c] = 0;
      out_clks = 0; clks = 0; max_err = 0; sq_err = 0.0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      foreach (seen[r, c]) begin
        int e;
        checks++;
        if (seen[r][c] != 1) begin
          failures++;
          $display("FAIL: pixel (%0d,%0d) produced %0d times", r, c, seen[r][c]);
        end
        e = rec[r][c] - img[r][c];
        sq_err += real'(e * e);
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
      end
      psnr = (sq_err == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * N * N / sq_err);
      checks += 4;
      if (psnr < MIN_PSNR) begin
        failures++; $display("FAIL: PSNR %0.1f dB", psnr);
      end
      if (out_clks != OUT_CLKS) begin
        failures++; $display("FAIL: %0d output clocks, expected %0d", out_clks, OUT_CLKS);
      end
      if (clks > MAX_CLKS) begin
        failures++; $display("FAIL: %0d busy clocks, expected at most %0d", clks, MAX_CLKS);
      end
      if (max_err > MAX_ERR) begin
        failures++; $display("FAIL: reconstruction error %0d", max_err);
      end
      $display("image %0d: %0d busy clocks, max |rec - img| = %0d, PSNR %0.1f dB", t, clks, max_err, psnr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
